// channel_arbiter: the arbiter between the channel FIFOs of one SCA MAC
// layer and its e-port.
//
// Transmit: a round-robin choice among the non-empty command (CMD) FIFOs
// of the 22 channels; the oldest packet of the chosen FIFO goes to the
// e-port when the e-port is ready, so no channel can hold the link.
// Receive: a reply packet from the e-port is written into the reply (RPY)
// FIFO of the channel named in its CH field; a reply for an unknown channel
// or a full FIFO is dropped and signalled on rpy_drop.
// Replies out: a second round-robin choice among the non-empty RPY FIFOs
// presents one reply at a time to the protocol layer (out_valid/out_pop).
// An arbiter controlling the commands sent to the link is what the published
// MAC layer contains; round-robin order and the reply-side selection are
// this design's choices. All selection is combinational; the round-robin
// pointers move when a packet is taken.
module channel_arbiter
  import sca_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // command FIFOs
  input  logic [NUM_CH-1:0]   cmd_empty,
  input  sca_payload_t        cmd_dout [NUM_CH],
  output logic [NUM_CH-1:0]   cmd_pop,
  // e-port transmit
  output logic                tx_valid,
  input  logic                tx_ready,
  output sca_payload_t        tx_payload,
  // e-port receive
  input  logic                rx_valid,
  input  sca_payload_t        rx_payload,
  // reply FIFOs
  output logic [NUM_CH-1:0]   rpy_push,
  output sca_payload_t        rpy_din,
  input  logic [NUM_CH-1:0]   rpy_full,
  input  logic [NUM_CH-1:0]   rpy_empty,
  input  sca_payload_t        rpy_dout [NUM_CH],
  output logic [NUM_CH-1:0]   rpy_pop,
  // replies to the protocol layer
  output logic                out_valid,
  output sca_payload_t        out_payload,
  input  logic                out_pop,
  output logic                rpy_drop
);
  localparam int CW = $clog2(NUM_CH);

  logic [NUM_CH-1:0] tgrant, ogrant;
  logic [CW-1:0]     tidx, oidx;
  logic              tany, oany;

  rr_arbiter #(.N(NUM_CH)) u_tx_arb (
    .clk, .rst_n, .req(~cmd_empty), .accept(tx_ready),
    .grant(tgrant), .grant_idx(tidx), .any(tany));

  assign tx_valid   = tany;
  assign tx_payload = cmd_dout[tidx];
  assign cmd_pop    = (tx_ready && tany) ? tgrant : '0;

  always_comb begin
    rpy_push = '0;
    rpy_drop = 1'b0;
    if (rx_valid) begin
      if (int'(rx_payload.ch) < NUM_CH && !rpy_full[rx_payload.ch[CW-1:0]])
        rpy_push[rx_payload.ch[CW-1:0]] = 1'b1;
      else
        rpy_drop = 1'b1;
    end
  end
  assign rpy_din = rx_payload;

  rr_arbiter #(.N(NUM_CH)) u_out_arb (
    .clk, .rst_n, .req(~rpy_empty), .accept(out_pop),
    .grant(ogrant), .grant_idx(oidx), .any(oany));

  assign out_valid   = oany;
  assign out_payload = rpy_dout[oidx];
  assign rpy_pop     = (out_pop && oany) ? ogrant : '0;
endmodule
