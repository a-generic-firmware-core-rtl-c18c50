// tb_jtag_protocol_driver: self-checking test of the JTAG protocol driver.
//
// The testbench plays the GBT-SCA: it takes every command packet the driver
// sends, checks command code, length-independent data and channel against a
// list written out by hand from the GBT-SCA command set, and answers with
// the same TR and the data word {8'hA5, channel, command, 8'h00}. It then
// checks the ECS reply (status, number of data words, data). Also checked:
// an unsupported op (no commands, status ST_BAD_OP), a reply with error
// flags (ST_SCA_ERR) and that every step costs one round trip.
module tb_jtag_protocol_driver;
  import sca_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid = 0, cmd_ready, pl_valid, pl_ready, rpy_valid = 0;
  logic reply_valid, reply_ready = 0, retry_pulse;
  ecs_cmd_t cmd_in = '0;
  sca_payload_t pl, rpy = '0;
  logic [SCA_IDX_W-1:0] rpy_sca = '0;
  logic [15:0] timeout = 16'd200;
  ecs_reply_t reply;

  jtag_protocol_driver dut (.*);

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

  // SCA side
  logic [7:0]  seen_cmd[$];
  logic [31:0] seen_data[$];
  logic [7:0]  err_flags = 8'h00;
  assign pl_ready = 1'b1;
  always @(negedge clk) begin
    rpy_valid <= 1'b0;
    if (pl_valid) begin
      seen_cmd.push_back(pl.cmd);
      seen_data.push_back(pl.data);
      check(pl.ch == cmd_in.ch, "channel of SCA command");
      // answer three cycles later
      fork begin
        sca_payload_t r;
        r = '{tr: pl.tr, ch: pl.ch, cmd: err_flags, len: 8'd4,
              data: {8'hA5, pl.ch, pl.cmd, 8'h00}};
        repeat (3) @(negedge clk);
        rpy <= r; rpy_sca <= cmd_in.sca; rpy_valid <= 1'b1;
      end join_none
    end
  end

  task automatic run(input logic [7:0] ch, input logic [3:0] op, input logic [31:0] arg,
                     input logic [31:0] d[$], input logic [7:0] ecmd[$], input logic [31:0] edata[$],
                     input logic [2:0] est, input string what);
    int t0, steps;
    seen_cmd.delete(); seen_data.delete();
    @(negedge clk);
    cmd_in = '0;
    cmd_in.tag = 8'h5A; cmd_in.sca = 5'd3; cmd_in.ch = ch; cmd_in.op = op; cmd_in.arg = arg;
    cmd_in.nwords = 3'(d.size());
    foreach (d[i]) cmd_in.data[i] = d[i];
    cmd_valid = 1;
    @(negedge clk);
    check(!cmd_ready, {what, ": busy after accept"});
    cmd_valid = 0;
    t0 = $time / 10;
    while (!reply_valid) @(negedge clk);
    steps = ($time / 10 - t0);
    reply_ready = 1;
    @(negedge clk);
    reply_ready = 0;
    check(reply.status == est, $sformatf("%s: status %0d", what, reply.status));
    check(reply.tag == 8'h5A && reply.ch == ch, {what, ": reply tag and channel"});
    check(seen_cmd.size() == ecmd.size(), $sformatf("%s: %0d SCA commands (expected %0d)", what, seen_cmd.size(), ecmd.size()));
    foreach (ecmd[i]) if (i < seen_cmd.size()) begin
      check(seen_cmd[i] == ecmd[i], $sformatf("%s: step %0d command %h (expected %h)", what, i, seen_cmd[i], ecmd[i]));
      check(seen_data[i] == edata[i], $sformatf("%s: step %0d data %h (expected %h)", what, i, seen_data[i], edata[i]));
    end
    if (ecmd.size() > 0 && est == ST_OK)
      check(steps >= 4 * ecmd.size(), $sformatf("%s: %0d cycles for %0d round trips", what, steps, ecmd.size()));
  endtask

  function automatic logic [31:0] rd(input logic [7:0] ch, input logic [7:0] c);
    return {8'hA5, ch, c, 8'h00};
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    run(8'h13, 4'd0, 32'h0003_0020, '{32'h1234_5678},
        '{8'h80, 8'h10, 8'h00, 8'hA2, 8'h01},
        '{32'h20, 32'h3, 32'h1234_5678, 32'h0, 32'h0}, ST_OK, "one-word scan");
    check(reply.nwords == 3'd1, "data words");
    check(reply.data[0] == rd(8'h13, 8'h01), "reply data 0");
    run(8'h13, 4'd0, 32'hFFFF_0040, '{32'h1, 32'h2},
        '{8'h80, 8'h10, 8'h00, 8'h20, 8'hA2, 8'h01, 8'h21},
        '{32'h40, 32'hFFFF, 32'h1, 32'h2, 32'h0, 32'h0, 32'h0}, ST_OK, "two-word scan");
    check(reply.nwords == 3'd2, "data words");
    check(reply.data[0] == rd(8'h13, 8'h01), "reply data 0");
    check(reply.data[1] == rd(8'h13, 8'h21), "reply data 1");
    run(8'h13, 4'd2, 32'h0, '{}, '{}, '{}, ST_BAD_OP, "unsupported op");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
