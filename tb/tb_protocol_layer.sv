// tb_protocol_layer: self-checking test of the protocol layer with 17 SCAs.
//
// The testbench plays the ECS commands FIFO (a queue of words), the
// configuration lookup (SCA 4 and channel 2 of SCA 1 deactivated, channels
// above 21 invalid), the 17 MAC layers (each command answered after ten
// cycles with data {8'hA5, channel, command, SCA}) and the reply memory (an
// array that also records the order of writes).
// Checked: commands for different protocols run at the same time; each SCA
// command reaches the MAC layer of its SCA; each reply slot holds the right
// header, SCA word and data; the header is the last word written; inactive
// SCAs and channels get ST_INACTIVE without any SCA traffic.
module tb_protocol_layer;
  import sca_pkg::*;
  localparam int NS = 17;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cf_empty, cf_pop;
  logic [31:0] cf_dout;
  logic [SCA_IDX_W-1:0] lk_sca;
  logic [7:0] lk_ch;
  logic lk_sca_ok, lk_ch_ok;
  logic [15:0] timeout = 16'd300;
  logic [NS-1:0] mac_cmd_valid, mac_cmd_ready, mac_rpy_valid, mac_rpy_pop;
  sca_payload_t mac_cmd;
  sca_payload_t mac_rpy [NS];
  logic rm_we;
  logic [6:0] rm_waddr;
  logic [31:0] rm_wdata;
  logic retry_pulse, reply_pulse;

  protocol_layer dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ECS commands FIFO
  logic [31:0] fq[$];
  assign cf_empty = (fq.size() == 0);
  assign cf_dout  = (fq.size() > 0) ? fq[0] : '0;
  // Stubs sample the design's requests on the falling edge and act just
  // after the rising edge that the design used them on.
  logic cf_pop_s = 0;
  logic [NS-1:0] rpy_pop_s = '0;
  always @(negedge clk) begin cf_pop_s = cf_pop; rpy_pop_s = mac_rpy_pop; end
  always @(posedge clk) begin
    #1;
    if (cf_pop_s) void'(fq.pop_front());
    for (int s = 0; s < NS; s++) if (rpy_pop_s[s]) void'(rq[s].pop_front());
  end

  // configuration
  assign lk_sca_ok = (lk_sca != 5'd4) && (int'(lk_sca) < NS);
  assign lk_ch_ok  = (lk_ch < 8'd22) && !(lk_sca == 5'd1 && lk_ch == 8'd2);

  // MAC layers
  sca_payload_t rq [NS][$];
  int n_sent [NS];
  int bad_route = 0;
  assign mac_cmd_ready = '1;
  always_comb for (int s = 0; s < NS; s++) begin
    mac_rpy_valid[s] = (rq[s].size() > 0);
    mac_rpy[s]       = (rq[s].size() > 0) ? rq[s][0] : '0;
  end
  always @(negedge clk) begin
    for (int s = 0; s < NS; s++) if (mac_cmd_valid[s]) begin
      sca_payload_t r;
      n_sent[s]++;
      r = '{tr: mac_cmd.tr, ch: mac_cmd.ch, cmd: 8'h00, len: 8'd4, data: {8'hA5, mac_cmd.ch, mac_cmd.cmd, 8'(s)}};
      fork
        automatic int ss = s;
        automatic sca_payload_t rr = r;
        begin repeat (10) @(negedge clk); rq[ss].push_back(rr); end
      join_none
    end
  end

  // reply memory
  logic [31:0] mem [128];
  int wr_seq [128];
  int seq = 0;
  int max_busy = 0;
  always @(negedge clk) if (rm_we) begin mem[rm_waddr] = rm_wdata; wr_seq[rm_waddr] = seq; seq++; end
  always @(negedge clk) begin
    int b;
    b = 0;
    for (int p = 0; p < NUM_PROTO; p++) if (!dut.drv_cmd_ready[p]) b++;
    if (b > max_busy) max_busy = b;
  end

  task automatic cmd(input logic [7:0] tag, input int sca, input logic [7:0] ch, input logic [3:0] op,
                     input logic [31:0] arg, input logic [31:0] d[$]);
    fq.push_back({tag, 3'b0, 5'(sca), ch, op, 1'b0, 3'(d.size())});
    fq.push_back(arg);
    foreach (d[i]) fq.push_back(d[i]);
  endtask

  task automatic slot(input logic [7:0] tag, input int sca, input logic [7:0] ch, input logic [2:0] st,
                      input logic [31:0] e[$], input string what);
    int b;
    b = int'(tag[3:0]) * 8;
    check(mem[b] == {tag, 1'b1, st, 1'b0, 3'(e.size()), 8'h00, ch}, $sformatf("%s: header %h", what, mem[b]));
    check(mem[b + 1] == 32'(sca), {what, ": SCA word"});
    foreach (e[i]) check(mem[b + 2 + i] == e[i], $sformatf("%s: data %0d = %h", what, i, mem[b + 2 + i]));
    for (int w = 1; w < 6; w++) check(wr_seq[b + w] < wr_seq[b], {what, ": header written last"});
  endtask

  initial begin
    for (int a = 0; a < 128; a++) begin mem[a] = '0; wr_seq[a] = 0; end
    for (int s = 0; s < NS; s++) n_sent[s] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    cmd(8'h01, 0, CH_GPIO, 4'd1, 32'h0, '{});
    cmd(8'h02, 2, 8'h05, 4'd0, {19'h0, 5'd8, 1'b0, 7'h52}, '{32'h1111_1111, 32'h2222_2222});
    cmd(8'h03, 16, CH_CTRL, 4'd1, 32'h100, '{});
    cmd(8'h04, 7, CH_ADC, 4'd0, 32'h3, '{});
    cmd(8'h05, 4, CH_GPIO, 4'd1, 32'h0, '{});
    cmd(8'h06, 1, CH_GPIO, 4'd1, 32'h0, '{});
    cmd(8'h07, 1, CH_DAC, 4'd1, 32'h000, '{});
    cmd(8'h08, 3, 8'd40, 4'd0, 32'h0, '{});
    cmd(8'h09, 9, CH_SPI, 4'd0, 32'h0001_0008, '{32'h77});
    cmd(8'h0A, 10, CH_JTAG, 4'd0, 32'h0001_0008, '{32'h99});
    repeat (3000) @(negedge clk);
    slot(8'h01, 0, CH_GPIO, ST_OK, '{32'hA502_0100}, "GPIO read");
    slot(8'h02, 2, 8'h05, ST_OK, '{}, "I2C write");
    check(n_sent[2] == 4, "I2C write of two words = 4 SCA commands on SCA 2");
    slot(8'h03, 16, CH_CTRL, ST_OK, '{32'hA500_0510}, "controller read CRC");
    slot(8'h04, 7, CH_ADC, ST_OK, '{32'hA514_0207}, "ADC conversion");
    slot(8'h05, 4, CH_GPIO, ST_INACTIVE, '{}, "inactive SCA");
    slot(8'h06, 1, CH_GPIO, ST_INACTIVE, '{}, "inactive channel");
    slot(8'h07, 1, CH_DAC, ST_OK, '{32'hA515_1101}, "DAC read on SCA 1");
    slot(8'h08, 3, 8'd40, ST_INACTIVE, '{}, "channel out of range");
    slot(8'h09, 9, CH_SPI, ST_OK, '{32'hA501_0109}, "SPI transfer");
    slot(8'h0A, 10, CH_JTAG, ST_OK, '{32'hA513_010A}, "JTAG scan");
    check(n_sent[4] == 0 && n_sent[3] == 0, "no SCA traffic for refused commands");
    check(max_busy >= 3, $sformatf("%0d drivers busy at once", max_busy));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
