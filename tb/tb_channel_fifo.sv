// tb_channel_fifo: self-checking test of the synchronous FIFO.
//
// Two instances - the default (64-bit, two entries, as in the MAC layer)
// and a 16-bit, five-entry one - get random pushes and pops for 3000 cycles.
// A queue in the testbench predicts dout, empty, full and count; pushes to
// a full FIFO and pops from an empty one must be ignored.
module tb_channel_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        push_a = 0, pop_a = 0, empty_a, full_a;
  logic [63:0] din_a = '0, dout_a;
  logic [1:0]  count_a;
  logic        push_b = 0, pop_b = 0, empty_b, full_b;
  logic [15:0] din_b = '0, dout_b;
  logic [2:0]  count_b;

  channel_fifo u_a (.clk, .rst_n, .push(push_a), .din(din_a), .pop(pop_a),
                    .dout(dout_a), .empty(empty_a), .full(full_a), .count(count_a));
  channel_fifo #(.WIDTH(16), .DEPTH(5)) u_b (.clk, .rst_n, .push(push_b), .din(din_b), .pop(pop_b),
                    .dout(dout_b), .empty(empty_b), .full(full_b), .count(count_b));

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

  logic [63:0] qa[$];
  logic [15:0] qb[$];
  int n_full_push = 0, n_empty_pop = 0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // compare with the model
      check(empty_a == (qa.size() == 0) && full_a == (qa.size() == 2) && count_a == 2'(qa.size()), "A flags");
      if (qa.size() > 0) check(dout_a == qa[0], "A data");
      check(empty_b == (qb.size() == 0) && full_b == (qb.size() == 5) && count_b == 3'(qb.size()), "B flags");
      if (qb.size() > 0) check(dout_b == qb[0], "B data");
      // new stimulus, applied to the model as the FIFO will see it
      push_a = $urandom_range(0, 1); pop_a = $urandom_range(0, 1);
      din_a  = {$urandom, $urandom};
      push_b = ($urandom_range(0, 99) < (i < 1500 ? 70 : 30)); pop_b = ($urandom_range(0, 99) < (i < 1500 ? 30 : 70));
      din_b  = 16'($urandom);
      if (push_a && qa.size() == 2) n_full_push++;
      if (pop_b && qb.size() == 0) n_empty_pop++;
      begin
        bit pa, pb;
        pa = pop_a && qa.size() > 0;
        pb = pop_b && qb.size() > 0;
        if (push_a && qa.size() < 2) qa.push_back(din_a);
        if (pa) void'(qa.pop_front());
        if (push_b && qb.size() < 5) qb.push_back(din_b);
        if (pb) void'(qb.pop_front());
      end
    end
    check(n_full_push > 0 && n_empty_pop > 0, "full and empty corner cases reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
