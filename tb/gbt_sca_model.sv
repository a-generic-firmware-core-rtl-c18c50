// gbt_sca_model: behavioural model of the front-end GBT-SCA chip, for
// simulation only.
//
// It answers each HDLC I-frame with a reply that carries the same TR and
// channel, error flags 0 and the data word {8'hA5, channel, command,
// SCA_ID}, so a testbench can predict every read result. U-frames
// (connect, reset, test) are answered with an acknowledge U-frame.
// Fault injection for tests: `drop` replies are skipped (one per command,
// counting down), commands on channel err_ch get error flags 8'h02, and
// corrupt flips one line bit inside the next reply frame. The HDLC line
// coding reuses the core's e-port, as the chip uses the same framing.
module gbt_sca_model
  import sca_pkg::*;
#(
  parameter logic [7:0] SCA_ID = 8'h00
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] elink_in,
  output logic [1:0] elink_out,
  input  int         drop,
  input  logic [7:0] err_ch,
  input  logic       corrupt,
  output int         n_cmds
);
  logic         tx_valid, tx_ready, ucmd_valid, ucmd_ready;
  sca_payload_t tx_payload, rx_payload;
  logic [7:0]   ucmd, rx_u_ctrl;
  logic         rx_valid, rx_u_valid, rx_err;
  logic [1:0]   line;

  fpga_elink u_eport (
    .clk, .rst_n, .tx_valid, .tx_ready, .tx_payload, .ucmd_valid, .ucmd, .ucmd_ready,
    .elink_tx(line), .elink_rx(elink_in), .rx_valid, .rx_payload, .rx_u_valid, .rx_u_ctrl, .rx_err);

  sca_payload_t q[$];
  int           dropped = 0;
  int           flip_at = -1;
  int           pending_u = 0;

  assign tx_valid   = q.size() > 0;
  assign tx_payload = (q.size() > 0) ? q[0] : '0;
  assign ucmd_valid = pending_u > 0;
  assign ucmd       = HDLC_UA;

  // Everything is sampled on the falling edge, half a cycle away from the
  // e-port's rising-edge registers. A transfer that was offered with ready
  // high at one falling edge was taken at the rising edge after it.
  logic fire_pend = 1'b0, ufire_pend = 1'b0;
  always @(negedge clk) begin
    if (!rst_n) begin
      q.delete();
      n_cmds     <= 0;
      pending_u  = 0;
      fire_pend  = 1'b0;
      ufire_pend = 1'b0;
    end else begin
      if (fire_pend) begin
        void'(q.pop_front());
        if (corrupt && flip_at == -1) flip_at = 30;
      end
      if (ufire_pend) pending_u--;
      if (rx_valid) begin
        sca_payload_t r;
        n_cmds <= n_cmds + 1;
        r = '{tr: rx_payload.tr, ch: rx_payload.ch,
              cmd: (rx_payload.ch == err_ch) ? 8'h02 : 8'h00, len: 8'd4,
              data: {8'hA5, rx_payload.ch, rx_payload.cmd, SCA_ID}};
        if (dropped < drop) dropped++;
        else q.push_back(r);
      end
      if (rx_u_valid) pending_u++;
      if (flip_at > 0) flip_at--;
      else if (flip_at == 0) flip_at = -2;   // one flip per request
      if (!corrupt && flip_at == -2) flip_at = -1;
      fire_pend  = (q.size() > 0) && tx_ready && !(pending_u > 0);
      ufire_pend = (pending_u > 0) && ucmd_ready;
    end
  end

  assign elink_out = line ^ ((flip_at == 0) ? 2'b01 : 2'b00);
endmodule
