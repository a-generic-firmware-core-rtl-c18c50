// stfc_sca_mac_layer: the MAC layer of one GBT-SCA - access to the SCA
// through one pair of bits of the GBT frame.
//
// Inside, as in the published MAC layer: one command (CMD) FIFO and one
// reply (RPY) FIFO for each of the 22 SCA channels, a channel arbiter that
// chooses which channel's command goes onto the link next and sorts the
// replies into the reply FIFOs, and the e-port that does HDLC framing and
// 2-bit serialization. One instance exists per SCA of the GBT link.
//
// Interface: cmd_valid/cmd/cmd_ready takes a command packet into the FIFO
// of channel cmd.ch (ready = that FIFO is not full; packets for channels
// above 21 are refused). rpy_valid/rpy/rpy_pop gives replies back.
// ucmd_* sends an HDLC link command; link_ack pulses when the SCA answers one.
// elink_tx/elink_rx are the two bits per clock on the line.
module stfc_sca_mac_layer
  import sca_pkg::*;
#(
  parameter int FIFO_DEPTH = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cmd_valid,
  input  sca_payload_t cmd,
  output logic         cmd_ready,
  output logic         rpy_valid,
  output sca_payload_t rpy,
  input  logic         rpy_pop,
  input  logic         ucmd_valid,
  input  logic [7:0]   ucmd,
  output logic         ucmd_ready,
  output logic         link_ack,
  output logic [1:0]   elink_tx,
  input  logic [1:0]   elink_rx,
  output logic         fcs_err,
  output logic         rpy_drop
);
  localparam int CW = $clog2(NUM_CH);
  localparam int NW = $clog2(FIFO_DEPTH + 1);

  logic [NUM_CH-1:0] cmd_empty, cmd_full, cmd_pop, cmd_push;
  logic [NUM_CH-1:0] rpy_empty, rpy_full, rpy_push, rpy_fpop;
  sca_payload_t      cmd_dout [NUM_CH];
  sca_payload_t      rpy_dout [NUM_CH];
  sca_payload_t      rpy_din;
  logic              tx_valid, tx_ready, rx_valid, rx_u_valid;
  sca_payload_t      tx_payload, rx_payload;
  logic [7:0]        rx_u_ctrl;
  logic [NW-1:0]     cmd_cnt [NUM_CH];
  logic [NW-1:0]     rpy_cnt [NUM_CH];

  assign cmd_ready = (int'(cmd.ch) < NUM_CH) && !cmd_full[cmd.ch[CW-1:0]];

  always_comb begin
    cmd_push = '0;
    if (cmd_valid && cmd_ready) cmd_push[cmd.ch[CW-1:0]] = 1'b1;
  end

  for (genvar c = 0; c < NUM_CH; c++) begin : gen_fifos
    channel_fifo #(.WIDTH(64), .DEPTH(FIFO_DEPTH)) u_cmd_fifo (
      .clk, .rst_n, .push(cmd_push[c]), .din(cmd), .pop(cmd_pop[c]),
      .dout(cmd_dout[c]), .empty(cmd_empty[c]), .full(cmd_full[c]), .count(cmd_cnt[c]));
    channel_fifo #(.WIDTH(64), .DEPTH(FIFO_DEPTH)) u_rpy_fifo (
      .clk, .rst_n, .push(rpy_push[c]), .din(rpy_din), .pop(rpy_fpop[c]),
      .dout(rpy_dout[c]), .empty(rpy_empty[c]), .full(rpy_full[c]), .count(rpy_cnt[c]));
  end

  channel_arbiter u_arb (
    .clk, .rst_n,
    .cmd_empty, .cmd_dout, .cmd_pop,
    .tx_valid, .tx_ready, .tx_payload,
    .rx_valid, .rx_payload,
    .rpy_push, .rpy_din, .rpy_full, .rpy_empty, .rpy_dout, .rpy_pop(rpy_fpop),
    .out_valid(rpy_valid), .out_payload(rpy), .out_pop(rpy_pop), .rpy_drop);

  fpga_elink u_eport (
    .clk, .rst_n,
    .tx_valid, .tx_ready, .tx_payload,
    .ucmd_valid, .ucmd, .ucmd_ready, .elink_tx,
    .elink_rx, .rx_valid, .rx_payload, .rx_u_valid, .rx_u_ctrl, .rx_err(fcs_err));

  assign link_ack = rx_u_valid && rx_u_ctrl == HDLC_UA;
endmodule
