// tb_test_system: the core at its default size in the smallest real set-up,
// one GBT link with a single GBT-SCA, driven through every protocol.
//
// Only SCA 0 is activated, and a behavioural GBT-SCA model sits on its
// e-link slot; the other slots receive an idle line. The control PC, played
// through the Avalon-MM port, sends one ECS command for every op of every
// protocol driver (controller, GPIO, I2C, SPI, JTAG, ADC, DAC), all queued
// before the first reply is read, then polls the reply memory. Each reply
// is checked for tag, status, word count and data, the data being worked
// out from the model's reply rule {0xA5, channel, command, SCA id} and the
// GBT-SCA command of the captured step. The number of SCA commands the
// model received must equal the sum of the batch lengths (35), and a
// command to the non-activated SCA 1 must be refused without reaching the
// link.
module tb_test_system;
  import sca_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [8:0]  avs_address = '0;
  logic        avs_read = 0, avs_write = 0;
  logic [31:0] avs_writedata = '0, avs_readdata;
  logic        avs_readdatavalid, avs_waitrequest;
  logic [31:0] gbt_tx_ecs, gbt_rx_ecs;
  logic [1:0]  gbt_tx_ec, gbt_rx_ec;
  logic        retry, reply_done, fcs_err, rpy_drop;

  stfc_sca_top dut (.*);

  // one GBT-SCA on slot 0, idle line on every other slot
  int          n_cmds;
  logic [1:0]  sca_out;
  assign gbt_rx_ecs = {30'h3FFF_FFFF, sca_out};
  assign gbt_rx_ec  = 2'b11;

  gbt_sca_model #(.SCA_ID(8'd0)) u_sca (
    .clk, .rst_n, .elink_in(gbt_tx_ecs[1:0]), .elink_out(sca_out),
    .drop(0), .err_ch(8'hFF), .corrupt(1'b0), .n_cmds(n_cmds));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_retry = 0, n_replies = 0;
  always @(negedge clk) begin
    if (retry) n_retry++;
    if (reply_done) n_replies++;
  end

  // ------------------------------------------------------ Avalon master
  task automatic avs_wr(input logic [8:0] a, input logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_writedata = d; avs_write = 1;
    @(posedge clk);
    while (avs_waitrequest) @(posedge clk);
    @(negedge clk);
    avs_write = 0;
  endtask

  task automatic avs_rd(input logic [8:0] a, output logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_read = 1;
    @(negedge clk);
    avs_read = 0;
    while (!avs_readdatavalid) @(negedge clk);
    d = avs_readdata;
  endtask

  task automatic ecs_cmd(input logic [7:0] tag, input int sca, input logic [7:0] ch,
                         input logic [3:0] op, input logic [31:0] arg,
                         input logic [31:0] d[$]);
    avs_wr(9'h000, {tag, 3'b0, 5'(sca), ch, op, 1'b0, 3'(d.size())});
    avs_wr(9'h000, arg);
    foreach (d[i]) avs_wr(9'h000, d[i]);
  endtask

  function automatic logic [31:0] md(input logic [7:0] ch, input logic [7:0] cmd);
    return {8'hA5, ch, cmd, 8'h00};
  endfunction

  task automatic expect_reply(input logic [7:0] tag, input logic [2:0] status,
                              input logic [31:0] e[$], input string what);
    logic [8:0]  base;
    logic [31:0] hdr, w;
    base = 9'h100 + {2'b0, tag[3:0], 3'b0};
    hdr  = '0;
    for (int i = 0; i < 5000 && !(hdr[31:24] == tag && hdr[23]); i++) begin
      avs_rd(base, hdr);
      if (!(hdr[31:24] == tag && hdr[23])) repeat (20) @(posedge clk);
    end
    check(hdr[31:24] == tag && hdr[23], {what, ": reply present"});
    check(hdr[22:20] == status, $sformatf("%s: status %0d (expected %0d)", what, hdr[22:20], status));
    check(int'(hdr[18:16]) == e.size(), $sformatf("%s: %0d data words (expected %0d)", what, hdr[18:16], e.size()));
    foreach (e[i]) begin
      avs_rd(base + 9'(2 + i), w);
      check(w == e[i], $sformatf("%s: data word %0d = %h (expected %h)", what, i, w, e[i]));
    end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (200) @(posedge clk);    // reply memory clears itself after reset

    avs_wr(9'h001, 32'h0_0001);      // only SCA 0
    avs_wr(9'h020, 32'h3F_FFFF);     // all of its 22 channels
    c0 = n_cmds;

    // every op of every driver, queued back to back
    ecs_cmd(8'h01, 0, CH_CTRL, 4'd0, 32'h0000_00FF, '{});               // write CRB
    ecs_cmd(8'h02, 0, CH_CTRL, 4'd1, 32'h0000_0100, '{});               // read CRC
    ecs_cmd(8'h03, 0, CH_GPIO, 4'd0, 32'hCAFE_F00D, '{});               // write outputs
    ecs_cmd(8'h04, 0, CH_GPIO, 4'd1, 32'h0, '{});                       // read inputs
    ecs_cmd(8'h05, 0, CH_GPIO, 4'd2, 32'hFFFF_0000, '{});               // write direction
    ecs_cmd(8'h06, 0, CH_GPIO, 4'd3, 32'h0, '{});                       // read direction
    ecs_cmd(8'h07, 0, CH_I2C0, 4'd0, {19'h0, 5'd8, 1'b0, 7'h50},
            '{32'h1111_2222, 32'h3333_4444});                           // 8-byte write
    ecs_cmd(8'h08, 0, CH_I2C0, 4'd1, {19'h0, 5'd16, 1'b0, 7'h50}, '{}); // 16-byte read
    ecs_cmd(8'h09, 0, CH_I2C0, 4'd2, {8'h5A, 17'h0, 7'h51}, '{});       // single-byte write
    ecs_cmd(8'h0A, 0, CH_I2C0, 4'd3, {25'h0, 7'h51}, '{});              // single-byte read
    ecs_cmd(8'h0B, 0, CH_SPI,  4'd0, 32'h0001_0020, '{32'h89AB_CDEF});  // 32-bit transfer
    ecs_cmd(8'h0C, 0, CH_JTAG, 4'd0, 32'h0001_0040,
            '{32'hAAAA_5555, 32'h0F0F_F0F0});                           // 64-bit scan
    ecs_cmd(8'h0D, 0, CH_ADC,  4'd0, 32'h0000_001F, '{});               // convert input 31
    ecs_cmd(8'h0E, 0, CH_ADC,  4'd1, 32'h0, '{});                       // read multiplexer
    ecs_cmd(8'h0F, 0, CH_DAC,  4'd0, 32'h0000_0380, '{});               // write output D
    ecs_cmd(8'h10, 0, CH_DAC,  4'd1, 32'h0000_0300, '{});               // read output D

    expect_reply(8'h01, ST_OK, '{}, "controller write CRB");
    expect_reply(8'h02, ST_OK, '{md(CH_CTRL, CTRL_R_CRC)}, "controller read CRC");
    expect_reply(8'h03, ST_OK, '{}, "GPIO write outputs");
    expect_reply(8'h04, ST_OK, '{md(CH_GPIO, GPIO_R_DATAIN)}, "GPIO read inputs");
    expect_reply(8'h05, ST_OK, '{}, "GPIO write direction");
    expect_reply(8'h06, ST_OK, '{md(CH_GPIO, GPIO_R_DIR)}, "GPIO read direction");
    expect_reply(8'h07, ST_OK, '{}, "I2C 8-byte write");
    expect_reply(8'h08, ST_OK, '{md(CH_I2C0, 8'h41), md(CH_I2C0, 8'h51),
                                 md(CH_I2C0, 8'h61), md(CH_I2C0, 8'h71)}, "I2C 16-byte read");
    expect_reply(8'h09, ST_OK, '{}, "I2C single-byte write");
    expect_reply(8'h0A, ST_OK, '{md(CH_I2C0, I2C_S_7B_R)}, "I2C single-byte read");
    expect_reply(8'h0B, ST_OK, '{md(CH_SPI, SPI_R_MISO0)}, "SPI transfer");
    expect_reply(8'h0C, ST_OK, '{md(CH_JTAG, 8'h01), md(CH_JTAG, 8'h21)}, "JTAG scan");
    expect_reply(8'h0D, ST_OK, '{md(CH_ADC, ADC_GO)}, "ADC conversion");
    expect_reply(8'h0E, ST_OK, '{md(CH_ADC, ADC_R_MUX)}, "ADC multiplexer read");
    expect_reply(8'h0F, ST_OK, '{}, "DAC write D");
    expect_reply(8'h10, ST_OK, '{md(CH_DAC, 8'h41)}, "DAC read D");

    // 2 + 4 + (4 + 6 + 1 + 1) + 5 + 7 + (2 + 1) + 2 SCA commands
    check(n_cmds - c0 == 35, $sformatf("%0d SCA commands on the link (35 expected)", n_cmds - c0));
    check(n_retry == 0, "no retransmission on a clean link");

    // the other SCAs of the link are not activated
    c0 = n_cmds;
    ecs_cmd(8'h11, 1, CH_GPIO, 4'd1, 32'h0, '{});
    expect_reply(8'h11, ST_INACTIVE, '{}, "command to SCA 1");
    check(n_cmds == c0, "nothing sent for a non-activated SCA");
    check(n_replies == 17, $sformatf("%0d ECS replies written (17 expected)", n_replies));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
