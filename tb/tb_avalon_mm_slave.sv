// tb_avalon_mm_slave: self-checking test of the Avalon-MM slave's address
// decoding, write strobes, back-pressure and read path.
//
// The FIFO, configuration, router and reply-memory sides are played by the
// testbench with fixed read values. Checked: a write to 0x000 pushes the
// word, and is held off (waitrequest, no push) while the FIFO is full; writes
// reach only the block their address names; a link command carries SCA and
// control byte; every read answers with readdatavalid one cycle later and
// the value of the right source; reply-memory reads pass the word address.
module tb_avalon_mm_slave;
  import sca_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [8:0] address = '0;
  logic read = 0, write = 0;
  logic [31:0] writedata = '0, readdata;
  logic readdatavalid, waitrequest;
  logic cmd_push, cmd_full = 0;
  logic [31:0] cmd_wdata;
  logic [15:0] cmd_count = 16'd7;
  logic cfg_we, rtr_we, link_cmd_valid, rpy_re;
  logic [6:0] cfg_addr;
  logic [4:0] rtr_addr;
  logic [31:0] cfg_wdata, cfg_rdata, rtr_wdata, rtr_rdata, rpy_rdata;
  logic [SCA_IDX_W-1:0] link_cmd_sca;
  logic [7:0] link_cmd_ctrl;
  logic [16:0] link_ack = 17'h1_0005;
  logic [6:0] rpy_raddr;

  avalon_mm_slave dut (.*);

  assign cfg_rdata = {25'h0C0FFEE, cfg_addr};
  assign rtr_rdata = {27'h5A5A5A5, rtr_addr};
  always_ff @(posedge clk) rpy_rdata <= {25'h1ABCDEF, rpy_raddr};

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_push = 0, n_cfg = 0, n_rtr = 0, n_link = 0;
  logic [31:0] last_push;
  always @(negedge clk) begin
    if (cmd_push) begin n_push++; last_push = cmd_wdata; end
    if (cfg_we) n_cfg++;
    if (rtr_we) n_rtr++;
    if (link_cmd_valid) n_link++;
  end

  task automatic wr(input logic [8:0] a, input logic [31:0] d);
    @(negedge clk); address = a; writedata = d; write = 1;
    #1;
    while (waitrequest) begin @(negedge clk); #1; end
    @(negedge clk); write = 0;
  endtask

  task automatic rd(input logic [8:0] a, output logic [31:0] d);
    @(negedge clk); address = a; read = 1;
    @(negedge clk); read = 0;
    check(readdatavalid, "readdatavalid one cycle after read");
    d = readdata;
    @(negedge clk);
    check(!readdatavalid, "readdatavalid is a single pulse");
  endtask

  initial begin
    logic [31:0] r;
    int waits;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wr(9'h000, 32'hCAFE_0001);
    check(n_push == 1 && last_push == 32'hCAFE_0001, "command word pushed");
    // FIFO full: held off for 5 cycles
    cmd_full = 1;
    @(negedge clk); address = 9'h000; writedata = 32'hCAFE_0002; write = 1;
    waits = 0;
    repeat (5) begin #1 if (waitrequest) waits++; @(negedge clk); end
    check(waits == 5 && n_push == 1, "waitrequest while FIFO full, nothing pushed");
    cmd_full = 0; #1;
    check(!waitrequest, "waitrequest drops when FIFO has room");
    @(negedge clk); write = 0;
    check(n_push == 2 && last_push == 32'hCAFE_0002, "held word pushed once");
    wr(9'h001, 32'h1FFFF);
    wr(9'h025, 32'h3);
    check(n_cfg == 2 && n_rtr == 0 && n_link == 0, "configuration writes");
    wr(9'h04B, 32'd2);
    check(n_rtr == 1 && n_cfg == 2, "router write");
    @(negedge clk); address = 9'h003; writedata = {11'h0, 5'd13, 8'h0, 8'h2F}; write = 1;
    #1 check(link_cmd_valid && link_cmd_sca == 5'd13 && link_cmd_ctrl == 8'h2F, "link command decoded");
    @(negedge clk); write = 0;
    wr(9'h180, 32'h0);
    check(n_push == 2 && n_cfg == 2 && n_rtr == 1 && n_link == 1, "reply memory is not writable");
    rd(9'h000, r); check(r == {1'b0, 15'h0, 16'd7}, "FIFO status read");
    rd(9'h002, r); check(r == {25'h0C0FFEE, 7'h02}, "configuration read");
    rd(9'h031, r); check(r == {25'h0C0FFEE, 7'h31}, "channel mask read");
    rd(9'h044, r); check(r == {27'h5A5A5A5, 5'h04}, "router read");
    rd(9'h003, r); check(r == 32'h1_0005, "link acknowledge read");
    rd(9'h1A3, r); check(r == {25'h1ABCDEF, 7'h23}, "reply memory read");
    rd(9'h0F0, r); check(r == 32'h0, "unmapped address reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
