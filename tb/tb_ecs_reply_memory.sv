// tb_ecs_reply_memory: self-checking test of the reply memory.
//
// Checks that the whole memory reads zero after its post-reset clearing
// pass, then writes random words to random addresses while reading random
// addresses, comparing each read (one cycle of latency) with an array model.
module tb_ecs_reply_memory;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic we = 0, re = 0;
  logic [6:0] waddr = '0, raddr = '0;
  logic [31:0] wdata = '0, rdata;

  ecs_reply_memory dut (.*);

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

  logic [31:0] model [128];

  initial begin
    logic [6:0] ra;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (130) @(negedge clk);
    for (int a = 0; a < 128; a++) begin
      re = 1; raddr = 7'(a);
      @(negedge clk);
      check(rdata == 32'h0, $sformatf("word %0d cleared", a));
      model[a] = '0;
    end
    for (int i = 0; i < 1000; i++) begin
      we = $urandom_range(0, 1); waddr = 7'($urandom); wdata = $urandom;
      re = 1; raddr = 7'($urandom);
      ra = raddr;
      @(negedge clk);
      check(rdata == model[ra], $sformatf("read %0d", ra));
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
