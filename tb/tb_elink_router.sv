// tb_elink_router: self-checking test of the e-link router.
//
// With the default map e-link m must appear on GBT slot m (bits 2m+1:2m,
// slot 16 = EC field) one cycle later, in both directions. Then e-links are
// re-mapped at run time (two swapped, one moved to an unused slot number);
// random line bits are checked against a model of the mapping, including
// idle 1s on a slot nobody uses and the lowest-numbered e-link winning a
// slot claimed twice.
module tb_elink_router;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_we = 0;
  logic [4:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0, cfg_rdata;
  logic [1:0] mac_tx [17];
  logic [1:0] mac_rx [17];
  logic [33:0] gbt_tx, gbt_rx = '0;

  elink_router dut (.*);

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

  int map [17];

  task automatic wr(input int m, input int s);
    @(negedge clk); cfg_we = 1; cfg_addr = 5'(m); cfg_wdata = 32'(s);
    @(negedge clk); cfg_we = 0;
    map[m] = s;
  endtask

  task automatic random_cycles(input int n);
    logic [1:0] t [17];
    logic [33:0] r;
    logic [33:0] exp_tx;
    bit taken [17];
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      for (int m = 0; m < 17; m++) begin t[m] = 2'($urandom); mac_tx[m] = t[m]; end
      r = {$urandom, $urandom}; gbt_rx = r;
      @(negedge clk);
      exp_tx = '1;
      foreach (taken[s]) taken[s] = 0;
      for (int m = 0; m < 17; m++)
        if (map[m] < 17 && !taken[map[m]]) begin taken[map[m]] = 1; exp_tx[2*map[m] +: 2] = t[m]; end
      check(gbt_tx == exp_tx, $sformatf("tx frame %h (expected %h)", gbt_tx, exp_tx));
      for (int m = 0; m < 17; m++)
        check(mac_rx[m] == ((map[m] < 17) ? r[2*map[m] +: 2] : 2'b11), $sformatf("rx e-link %0d", m));
    end
  endtask

  initial begin
    for (int m = 0; m < 17; m++) begin map[m] = m; mac_tx[m] = 2'b00; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    cfg_addr = 5'd16; #1 check(cfg_rdata == 32'd16, "default map read back");
    random_cycles(50);
    wr(3, 4); wr(4, 3);       // swap
    wr(7, 20);                // e-link 7 unrouted: slot 7 idles
    wr(9, 2);                 // slot 2 claimed by e-links 2 and 9: 2 wins
    cfg_addr = 5'd9; #1 check(cfg_rdata == 32'd2, "changed map read back");
    random_cycles(50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
