// tb_sca_channel_config: self-checking test of the SCA/channel activation
// and timeout registers: reset values, write and read back, and the lookup
// port for every (SCA, channel) pair against the written masks, including
// SCA and channel numbers out of range.
module tb_sca_channel_config;
  import sca_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic we = 0;
  logic [6:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [SCA_IDX_W-1:0] lookup_sca = '0;
  logic [7:0] lookup_ch = '0;
  logic sca_ok, ch_ok;
  logic [15:0] timeout;

  sca_channel_config dut (.*);

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

  task automatic wr(input logic [6:0] a, input logic [31:0] d);
    @(negedge clk); we = 1; addr = a; wdata = d;
    @(negedge clk); we = 0;
  endtask

  logic [16:0] smask;
  logic [21:0] cmask [17];

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(timeout == 16'd2000, "reset timeout");
    addr = 7'h01; #1 check(rdata == 0, "reset SCA mask");
    lookup_sca = 5; lookup_ch = 3; #1 check(!sca_ok && !ch_ok, "nothing active after reset");
    smask = 17'($urandom);
    wr(7'h01, 32'(smask));
    wr(7'h02, 32'd1234);
    for (int s = 0; s < 17; s++) begin cmask[s] = 22'($urandom); wr(7'(32 + s), 32'(cmask[s])); end
    addr = 7'h01; #1 check(rdata == 32'(smask), "SCA mask read back");
    addr = 7'h02; #1 check(rdata == 32'd1234 && timeout == 16'd1234, "timeout read back");
    for (int s = 0; s < 17; s++) begin
      addr = 7'(32 + s); #1 check(rdata == 32'(cmask[s]), "channel mask read back");
    end
    for (int s = 0; s < 20; s++)
      for (int c = 0; c < 24; c++) begin
        lookup_sca = 5'(s); lookup_ch = 8'(c);
        #1;
        check(sca_ok == (s < 17 && smask[s % 17]), $sformatf("sca_ok %0d", s));
        check(ch_ok == (s < 17 && c < 22 && cmask[s % 17][c % 22]), $sformatf("ch_ok %0d/%0d", s, c));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
