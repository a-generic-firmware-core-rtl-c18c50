// tb_stfc_sca_mac_layer: self-checking test of one SCA MAC layer connected
// through its 2-bit e-link to a behavioural GBT-SCA model.
//
// Checked: command packets for several channels are queued (two per channel
// FIFO, then cmd_ready drops), sent over HDLC and answered; every reply comes
// back with its TR, channel and the model's data word; an HDLC connect
// command is acknowledged (link_ack); a reply frame corrupted on the line is
// flagged (fcs_err) and not delivered; a packet for channel 22 is refused.
module tb_stfc_sca_mac_layer;
  import sca_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid = 0, cmd_ready, rpy_valid, rpy_pop, ucmd_valid = 0, ucmd_ready;
  logic link_ack, fcs_err, rpy_drop;
  sca_payload_t cmd = '0, rpy;
  logic [7:0] ucmd = '0;
  logic [1:0] elink_tx, elink_rx;
  int n_cmds;
  logic corrupt = 0;

  stfc_sca_mac_layer dut (.*);
  gbt_sca_model #(.SCA_ID(8'h3C)) u_sca (.clk, .rst_n, .elink_in(elink_tx), .elink_out(elink_rx),
    .drop(0), .err_ch(8'hFF), .corrupt, .n_cmds);

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

  sca_payload_t got[$];
  int n_ack = 0, n_fcs = 0;
  assign rpy_pop = rpy_valid;
  always @(negedge clk) begin
    if (rpy_valid) got.push_back(rpy);
    if (link_ack) n_ack++;
    if (fcs_err) n_fcs++;
  end

  task automatic put(input logic [7:0] tr, input logic [7:0] ch, input logic [7:0] c, output bit ok);
    @(negedge clk);
    cmd = '{tr: tr, ch: ch, cmd: c, len: 8'd4, data: 32'h0};
    cmd_valid = 1;
    #1 ok = cmd_ready;
    @(negedge clk);
    cmd_valid = 0;
  endtask

  initial begin
    bit ok;
    int n;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    // link command
    ucmd = HDLC_CONNECT; ucmd_valid = 1;
    while (!ucmd_ready) @(negedge clk);
    @(negedge clk); ucmd_valid = 0;
    repeat (200) @(negedge clk);
    check(n_ack == 1, "connect acknowledged");
    // fill: channels 2, 5, 0x13 with two packets each; a third on ch 2 refused
    n = 0;
    for (int i = 0; i < 3; i++)
      for (int k = 0; k < 2; k++) begin
        logic [7:0] ch;
        ch = (i == 0) ? 8'h02 : (i == 1) ? 8'h05 : 8'h13;
        put(8'(10 * i + k + 1), ch, 8'h01 + 8'(k), ok);
        if (ok) n++;
      end
    put(8'd99, 8'h13, 8'h01, ok);
    check(!ok, "third packet of a channel waits for room");
    if (ok) n++;
    put(8'd98, 8'd22, 8'h01, ok);
    check(!ok, "channel 22 refused");
    repeat (2000) @(negedge clk);
    check(got.size() == n && n_cmds == n, $sformatf("%0d replies for %0d commands", got.size(), n));
    foreach (got[i])
      check(got[i].cmd == 8'h00 && got[i].data == {8'hA5, got[i].ch, got[i].data[15:8], 8'h3C}
            && got[i].data[15:8] inside {8'h01, 8'h02}, "reply contents");
    // line error on the next reply
    corrupt = 1;
    put(8'd50, 8'h14, 8'h02, ok);
    repeat (400) @(negedge clk);
    corrupt = 0;
    check(n_fcs == 1 && got[$].tr != 8'd50, "corrupted reply flagged and not delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
