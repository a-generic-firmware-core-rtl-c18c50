// tb_stfc_sca_top: end-to-end test of one core at its default size
// (17 SCAs), with a behavioural GBT-SCA model on every e-link slot.
//
// The control PC is played through the Avalon-MM port: it configures the
// core, writes ECS command packets, and polls the reply memory. Expected
// reply data are worked out from the model's reply rule and the GBT-SCA
// command codes of each batch. Mechanisms made to happen and counted:
// every protocol driver, the published I2C write example (6 SCA commands),
// several drivers busy at once, inactive SCA/channel, SCA error flags,
// reply loss with retransmission, frame-check error with retransmission,
// timeout after all retries, unsupported op, run-time e-link re-routing,
// commands FIFO back-pressure (waitrequest) and an HDLC connect command.
module tb_stfc_sca_top;
  import sca_pkg::*;

  localparam int NS = 17;

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

  // ----------------------------------------------------- front-end models
  int         drop [NS];
  logic [7:0] err_ch [NS];
  logic       corrupt [NS];
  int         n_cmds [NS];
  logic [33:0] tx_bits, rx_bits;
  assign tx_bits    = {gbt_tx_ec, gbt_tx_ecs};
  assign gbt_rx_ecs = rx_bits[31:0];
  assign gbt_rx_ec  = rx_bits[33:32];

  for (genvar s = 0; s < NS; s++) begin : gen_sca
    gbt_sca_model #(.SCA_ID(8'(s))) u_sca (
      .clk, .rst_n, .elink_in(tx_bits[2*s +: 2]), .elink_out(rx_bits[2*s +: 2]),
      .drop(drop[s]), .err_ch(err_ch[s]), .corrupt(corrupt[s]), .n_cmds(n_cmds[s]));
  end

  // ------------------------------------------------------------ checking
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_retry = 0, n_fcs = 0, n_wait = 0, n_replies = 0;
  always @(negedge clk) begin
    if (retry) n_retry++;
    if (fcs_err) n_fcs++;
    if (avs_write && avs_waitrequest) n_wait++;
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

  // wait for the reply of `tag`; returns header and data words
  task automatic ecs_reply(input logic [7:0] tag, output logic [31:0] hdr,
                           output logic [31:0] dw[4]);
    logic [8:0] base;
    logic [31:0] w;
    base = 9'h100 + {2'b0, tag[3:0], 3'b0};
    for (int i = 0; i < 5000; i++) begin
      avs_rd(base, hdr);
      if (hdr[31:24] == tag && hdr[23]) break;
      repeat (20) @(posedge clk);
    end
    for (int i = 0; i < 4; i++) begin
      avs_rd(base + 9'(2 + i), w);
      dw[i] = w;
    end
  endtask

  function automatic logic [31:0] model_data(input int sca, input logic [7:0] ch,
                                             input logic [7:0] cmd);
    return {8'hA5, ch, cmd, 8'(sca)};
  endfunction

  task automatic expect_reply(input logic [7:0] tag, input logic [2:0] status,
                              input int nw, input logic [31:0] e[$], input string what);
    logic [31:0] hdr;
    logic [31:0] dw[4];
    ecs_reply(tag, hdr, dw);
    check(hdr[31:24] == tag && hdr[23], {what, ": reply present"});
    check(hdr[22:20] == status, $sformatf("%s: status %0d (expected %0d)", what, hdr[22:20], status));
    check(int'(hdr[18:16]) == nw, $sformatf("%s: %0d data words", what, hdr[18:16]));
    foreach (e[i]) check(dw[i] == e[i], $sformatf("%s: data word %0d = %h (expected %h)", what, i, dw[i], e[i]));
  endtask

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    logic [31:0] hdr;
    logic [31:0] dw[4];
    int c0, c12, t0, t1;
    int mech_parallel;
    for (int s = 0; s < NS; s++) begin drop[s] = 0; err_ch[s] = 8'hFF; corrupt[s] = 0; end
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (200) @(posedge clk);    // reply memory clears itself after reset

    // configuration
    avs_wr(9'h001, 32'h1_FFFF);
    avs_wr(9'h002, 32'd400);
    for (int s = 0; s < NS; s++)
      avs_wr(9'h020 + 9'(s), (s == 3) ? 32'h3F_FFFB : 32'h3F_FFFF);
    avs_rd(9'h001, r);  check(r == 32'h1_FFFF, "SCA mask read back");
    avs_rd(9'h002, r);  check(r == 32'd400, "timeout read back");
    avs_rd(9'h023, r);  check(r == 32'h3F_FFFB, "channel mask read back");

    // HDLC connect on SCA 0
    avs_wr(9'h003, {11'h0, 5'd0, 8'h0, HDLC_CONNECT});
    repeat (300) @(posedge clk);
    avs_rd(9'h003, r);
    check(r[0] == 1'b1, "SCA 0 acknowledged the connect command");

    // the published example: I2C write of 16 bytes to device A4 (7-bit
    // 0x52) on SCA 12, channel 0x05, plus one command for every driver,
    // all issued before any reply is read
    c12 = n_cmds[12];
    t0 = $time;
    ecs_cmd(8'h01, 12, 8'h05, 4'd0, {14'h0, 2'b00, 3'b0, 5'd16, 1'b0, 7'h52},
            '{32'h0001_0203, 32'h0405_0607, 32'h0809_0A0B, 32'h0C0D_0E0F});
    ecs_cmd(8'h03, 0, CH_GPIO, 4'd1, 32'h0, '{});
    ecs_cmd(8'h04, 1, CH_CTRL, 4'd1, 32'h200, '{});
    ecs_cmd(8'h05, 2, CH_ADC, 4'd0, 32'h7, '{});
    ecs_cmd(8'h06, 16, CH_DAC, 4'd1, 32'h100, '{});
    ecs_cmd(8'h07, 4, CH_SPI, 4'd0, 32'h0001_0040, '{32'hDEAD_0001, 32'hDEAD_0002});
    ecs_cmd(8'h08, 5, CH_JTAG, 4'd0, 32'h0003_0020, '{32'h1234_5678});
    repeat (60) @(posedge clk);
    mech_parallel = (dut.u_proto.drv_cmd_ready == 7'b0) ? 1 : 0;
    check(mech_parallel == 1, "all seven protocol drivers busy at once");
    expect_reply(8'h01, ST_OK, 0, '{}, "I2C write example");
    check(n_cmds[12] - c12 == 6, $sformatf("I2C write became %0d SCA commands (6 expected)", n_cmds[12] - c12));
    expect_reply(8'h03, ST_OK, 1, '{model_data(0, CH_GPIO, GPIO_R_DATAIN)}, "GPIO read");
    expect_reply(8'h04, ST_OK, 1, '{model_data(1, CH_CTRL, CTRL_R_CRD)}, "controller read CRD");
    expect_reply(8'h05, ST_OK, 1, '{model_data(2, CH_ADC, ADC_GO)}, "ADC conversion");
    expect_reply(8'h06, ST_OK, 1, '{model_data(16, CH_DAC, 8'h21)}, "DAC read B (EC field SCA)");
    expect_reply(8'h07, ST_OK, 2, '{model_data(4, CH_SPI, 8'h01), model_data(4, CH_SPI, 8'h11)}, "SPI transfer");
    expect_reply(8'h08, ST_OK, 1, '{model_data(5, CH_JTAG, 8'h01)}, "JTAG scan");

    // I2C read of 8 bytes on the same channel
    ecs_cmd(8'h02, 12, 8'h05, 4'd1, {19'h0, 5'd8, 1'b0, 7'h52}, '{});
    expect_reply(8'h02, ST_OK, 2, '{model_data(12, 8'h05, 8'h41), model_data(12, 8'h05, 8'h51)}, "I2C read");

    // deactivated channel, SCA error flags, unsupported op
    ecs_cmd(8'h09, 3, CH_GPIO, 4'd1, 32'h0, '{});
    expect_reply(8'h09, ST_INACTIVE, 0, '{}, "inactive channel");
    err_ch[6] = CH_GPIO;
    ecs_cmd(8'h0A, 6, CH_GPIO, 4'd0, 32'h5555_AAAA, '{});
    ecs_reply(8'h0A, hdr, dw);
    check(hdr[22:20] == ST_SCA_ERR && hdr[15:8] == 8'h02, "SCA error flags reported");
    ecs_cmd(8'h0F, 0, CH_GPIO, 4'd7, 32'h0, '{});
    expect_reply(8'h0F, ST_BAD_OP, 0, '{}, "unsupported op");

    // lost reply -> retransmission
    c0 = n_retry;
    drop[7] = 1;
    ecs_cmd(8'h0B, 7, CH_GPIO, 4'd1, 32'h0, '{});
    expect_reply(8'h0B, ST_OK, 1, '{model_data(7, CH_GPIO, GPIO_R_DATAIN)}, "reply lost once");
    check(n_retry == c0 + 1, "one retransmission after a lost reply");

    // corrupted reply frame -> FCS error -> retransmission
    corrupt[8] = 1;
    ecs_cmd(8'h0C, 8, CH_GPIO, 4'd1, 32'h0, '{});
    expect_reply(8'h0C, ST_OK, 1, '{model_data(8, CH_GPIO, GPIO_R_DATAIN)}, "corrupted reply");
    corrupt[8] = 0;
    check(n_fcs >= 1, "frame check error seen");

    // SCA never answers -> timeout after 1 + 3 attempts
    drop[9] = 1000;
    c0 = n_cmds[9];
    ecs_cmd(8'h0D, 9, CH_GPIO, 4'd1, 32'h0, '{});
    expect_reply(8'h0D, ST_TIMEOUT, 0, '{}, "no reply");
    check(n_cmds[9] - c0 == 4, $sformatf("%0d attempts before timeout (4 expected)", n_cmds[9] - c0));

    // re-route: e-links 10 and 11 swap their GBT slots
    avs_wr(9'h040 + 9'd10, 32'd11);
    avs_wr(9'h040 + 9'd11, 32'd10);
    avs_rd(9'h04A, r); check(r == 32'd11, "router register read back");
    ecs_cmd(8'h0E, 10, CH_GPIO, 4'd1, 32'h0, '{});
    expect_reply(8'h0E, ST_OK, 1, '{model_data(11, CH_GPIO, GPIO_R_DATAIN)}, "re-routed e-link reaches SCA model 11");

    // back-pressure: 40 GPIO commands to one SCA overrun the commands FIFO
    for (int i = 0; i < 40; i++)
      ecs_cmd(8'h20 + 8'(i), 0, CH_GPIO, 4'd0, 32'(i), '{});
    expect_reply(8'h47, ST_OK, 0, '{}, "last of 40 queued commands");
    check(n_wait > 0, "waitrequest back-pressure seen");

    // rate: one GPIO round trip on the 80 Mb/s e-link
    t0 = $time;
    ecs_cmd(8'h10, 1, CH_GPIO, 4'd1, 32'h0, '{});
    expect_reply(8'h10, ST_OK, 1, '{model_data(1, CH_GPIO, GPIO_R_DATAIN)}, "timed GPIO read");
    t1 = ($time - t0) / 10;
    check(t1 >= 104, $sformatf("round trip %0d cycles is at least two 52-cycle frames", t1));

    $display("mechanisms: retry=%0d fcs_err=%0d waitrequest=%0d replies=%0d",
             n_retry, n_fcs, n_wait, n_replies);
    check(n_retry > 0 && n_fcs > 0 && n_wait > 0, "every mechanism happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
