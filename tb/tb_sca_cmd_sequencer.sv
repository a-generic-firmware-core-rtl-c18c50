// tb_sca_cmd_sequencer: self-checking test of the send / wait / retransmit
// engine, driven with a three-step table made up by the testbench (step k:
// command 0x10+k, data 0x1000+k, steps 1 and 2 captured).
//
// Checked: the steps go out in order with increasing TR and the command's
// channel; replies with a wrong TR, channel or SCA are ignored; a lost reply
// makes the step go out again with a new TR after `timeout` cycles (and a
// retry pulse); captured data land in the ECS reply; error flags end the
// command with ST_SCA_ERR; a command that never gets an answer ends with
// ST_TIMEOUT after 1 + MAX_RETRY attempts; a table with no steps gives
// ST_BAD_OP without any packet.
module tb_sca_cmd_sequencer;
  import sca_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid = 0, cmd_ready, pl_valid, pl_ready = 1, rpy_valid = 0;
  logic reply_valid, reply_ready = 0, retry_pulse;
  ecs_cmd_t cmd_in = '0, cur_cmd;
  logic [3:0] step_idx, nsteps;
  sca_step_t step;
  sca_payload_t pl, rpy = '0;
  logic [SCA_IDX_W-1:0] rpy_sca = '0;
  logic [15:0] timeout = 16'd50;
  ecs_reply_t reply;

  sca_cmd_sequencer dut (.*);

  logic [3:0] tb_nsteps = 4'd3;
  assign nsteps = tb_nsteps;
  assign step = '{cmd: 8'h10 + 8'(step_idx), len: 8'd4, data: 32'h1000 + 32'(step_idx),
                  capture: (step_idx != 0)};

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

  int n_retry = 0;
  always @(negedge clk) if (retry_pulse) n_retry++;

  // wait for the next packet, return it
  task automatic get_pl(output sca_payload_t p, output int waited);
    waited = 0;
    while (!pl_valid) begin @(negedge clk); waited++; end
    p = pl;
    @(negedge clk);
  endtask

  task automatic send_rpy(input sca_payload_t r, input logic [4:0] s);
    rpy = r; rpy_sca = s; rpy_valid = 1;
    @(negedge clk);
    rpy_valid = 0;
  endtask

  task automatic start(input logic [7:0] ch);
    @(negedge clk);
    cmd_in = '0; cmd_in.tag = 8'h33; cmd_in.sca = 5'd2; cmd_in.ch = ch;
    cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0;
  endtask

  task automatic finish_reply();
    while (!reply_valid) @(negedge clk);
    reply_ready = 1;
    @(negedge clk);
    reply_ready = 0;
    check(cmd_ready, "idle after the reply is taken");
  endtask

  initial begin
    sca_payload_t p, p2;
    int w;
    logic [7:0] tr0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // normal run with noise and one lost reply
    start(8'h07);
    get_pl(p, w);
    check(p.cmd == 8'h10 && p.data == 32'h1000 && p.ch == 8'h07, "step 0 packet");
    tr0 = p.tr;
    send_rpy('{tr: p.tr + 8'd1, ch: 8'h07, cmd: 8'h00, len: 8'd4, data: 32'hBAD0}, 5'd2);
    send_rpy('{tr: p.tr, ch: 8'h08, cmd: 8'h00, len: 8'd4, data: 32'hBAD1}, 5'd2);
    send_rpy('{tr: p.tr, ch: 8'h07, cmd: 8'h00, len: 8'd4, data: 32'hBAD2}, 5'd3);
    check(!pl_valid, "mismatched replies ignored");
    send_rpy('{tr: p.tr, ch: 8'h07, cmd: 8'h00, len: 8'd4, data: 32'h0}, 5'd2);
    get_pl(p, w);
    check(p.cmd == 8'h11 && p.data == 32'h1001 && p.tr == tr0 + 8'd1, "step 1 packet, next TR");
    // lose this reply: the step must come again with a new TR
    get_pl(p2, w);
    check(p2.cmd == 8'h11 && p2.tr == p.tr + 8'd1, "step 1 retransmitted with new TR");
    check(w >= 50 && w <= 53, $sformatf("retransmission after the timeout (%0d cycles)", w));
    check(n_retry == 1, "one retry pulse");
    send_rpy('{tr: p.tr, ch: 8'h07, cmd: 8'h00, len: 8'd4, data: 32'hBAD3}, 5'd2);
    send_rpy('{tr: p2.tr, ch: 8'h07, cmd: 8'h00, len: 8'd4, data: 32'hAAAA_0001}, 5'd2);
    get_pl(p, w);
    check(p.cmd == 8'h12 && w == 0, "step 2 one cycle after the reply");
    send_rpy('{tr: p.tr, ch: 8'h07, cmd: 8'h00, len: 8'd4, data: 32'hAAAA_0002}, 5'd2);
    while (!reply_valid) @(negedge clk);
    check(reply.status == ST_OK && reply.tag == 8'h33 && reply.sca == 5'd2 && reply.ch == 8'h07, "reply header");
    check(reply.nwords == 3'd2 && reply.data[0] == 32'hAAAA_0001 && reply.data[1] == 32'hAAAA_0002, "captured data");
    finish_reply();

    // error flags in the first reply
    start(8'h02);
    get_pl(p, w);
    send_rpy('{tr: p.tr, ch: 8'h02, cmd: 8'h40, len: 8'd4, data: 32'h0}, 5'd2);
    while (!reply_valid) @(negedge clk);
    check(reply.status == ST_SCA_ERR && reply.sca_err == 8'h40, "error flags end the command");
    finish_reply();

    // no answer at all
    n_retry = 0;
    start(8'h02);
    for (int a = 0; a < 4; a++) get_pl(p, w);
    while (!reply_valid) begin
      check(!pl_valid, "no fifth attempt");
      @(negedge clk);
    end
    check(reply.status == ST_TIMEOUT && n_retry == 3, "timeout after 1 + 3 attempts");
    finish_reply();

    // empty table
    tb_nsteps = 4'd0;
    start(8'h02);
    for (int i = 0; i < 3; i++) begin check(!pl_valid, "no packet for an empty table"); @(negedge clk); end
    check(reply_valid && reply.status == ST_BAD_OP, "unsupported op");
    finish_reply();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
