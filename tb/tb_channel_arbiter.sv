// tb_channel_arbiter: self-checking test of the MAC layer's channel arbiter,
// with the 22 command and reply FIFOs modelled as queues in the testbench.
//
// Checked: with every command queue loaded, packets leave in round-robin
// channel order (each channel once per 22 grants) and only when the e-port is
// ready; a reply goes into the reply queue of its CH field; a reply to a full
// queue or to a channel above 21 is dropped with rpy_drop; queued replies
// are handed out round robin, one per out_pop.
module tb_channel_arbiter;
  import sca_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NUM_CH-1:0] cmd_empty, cmd_pop, rpy_push, rpy_full, rpy_empty, rpy_pop;
  sca_payload_t cmd_dout [NUM_CH];
  sca_payload_t rpy_dout [NUM_CH];
  logic tx_valid, tx_ready = 0, rx_valid = 0, out_valid, out_pop = 0, rpy_drop;
  sca_payload_t tx_payload, rx_payload = '0, rpy_din, out_payload;

  channel_arbiter dut (.*);

  sca_payload_t cq [NUM_CH][$];
  sca_payload_t rq [NUM_CH][$];
  always_comb
    for (int c = 0; c < NUM_CH; c++) begin
      cmd_empty[c] = (cq[c].size() == 0);
      cmd_dout[c]  = (cq[c].size() > 0) ? cq[c][0] : '0;
      rpy_empty[c] = (rq[c].size() == 0);
      rpy_full[c]  = (rq[c].size() >= 2);
      rpy_dout[c]  = (rq[c].size() > 0) ? rq[c][0] : '0;
    end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // queue updates happen on the rising edge, like real FIFOs
  // (sampled 2 ns after the falling edge, once the stimulus has settled,
  // and applied just after the rising edge)
  logic [NUM_CH-1:0] cpop_s = '0, rpop_s = '0, rpush_s = '0;
  sca_payload_t din_s;
  always @(negedge clk) begin #2; cpop_s = cmd_pop; rpop_s = rpy_pop; rpush_s = rpy_push; din_s = rpy_din; end
  always @(posedge clk) begin
    #1;
    for (int c = 0; c < NUM_CH; c++) begin
      if (cpop_s[c]) void'(cq[c].pop_front());
      if (rpop_s[c]) void'(rq[c].pop_front());
      if (rpush_s[c]) rq[c].push_back(din_s);
    end
  end

  initial begin
    int last, n_drop, seen4, seen21;
    sca_payload_t p;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NUM_CH; c++)
      for (int k = 0; k < 2; k++) cq[c].push_back('{tr: 8'(k), ch: 8'(c), cmd: 8'h10, len: 8'd4, data: 32'(c * 2 + k)});
    @(negedge clk);
    check(tx_valid, "request when commands wait");
    repeat (3) begin @(negedge clk); check(cq[0].size() == 2, "nothing taken while e-port busy"); end
    last = -1;
    for (int g = 0; g < 44; g++) begin
      tx_ready = 1;
      #1 p = tx_payload;
      check(int'(p.ch) == (last + 1) % NUM_CH, $sformatf("grant %0d to channel %0d", g, p.ch));
      check(p.data == 32'(int'(p.ch) * 2 + g / NUM_CH), "oldest packet of the channel");
      last = int'(p.ch);
      @(negedge clk);
      tx_ready = 0;
      @(negedge clk);
    end
    check(!tx_valid, "all command packets sent");

    // replies into their channel queues
    n_drop = 0;
    for (int i = 0; i < 3; i++) begin
      rx_payload = '{tr: 8'(i), ch: 8'd4, cmd: 8'h00, len: 8'd4, data: 32'hE000 + 32'(i)};
      rx_valid = 1;
      #1 if (rpy_drop) n_drop++;
      @(negedge clk);
    end
    rx_payload = '{tr: 8'd9, ch: 8'd30, cmd: 8'h00, len: 8'd4, data: 32'h0};
    #1 if (rpy_drop) n_drop++;
    @(negedge clk);
    rx_payload = '{tr: 8'd7, ch: 8'd21, cmd: 8'h00, len: 8'd4, data: 32'hF021};
    #1 if (rpy_drop) n_drop++;
    @(negedge clk);
    rx_valid = 0;
    check(rq[4].size() == 2 && rq[4][0].data == 32'hE000 && rq[4][1].data == 32'hE001, "replies sorted by channel");
    check(rq[21].size() == 1, "reply to channel 21 kept");
    check(n_drop == 2, "full queue and bad channel dropped");
    // out side
    check(out_valid, "reply offered");
    begin
      seen4 = 0; seen21 = 0;
      for (int i = 0; i < 3; i++) begin
        if (out_payload.ch == 8'd4) seen4++;
        if (out_payload.ch == 8'd21) seen21++;
        out_pop = 1;
        @(negedge clk);
        out_pop = 0;
        @(negedge clk);
      end
      check(seen4 == 2 && seen21 == 1 && !out_valid, "all replies handed out");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
