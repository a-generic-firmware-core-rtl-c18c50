// stfc_sca_top: one GBT-SCA driver core - the firmware that lets the
// control PC talk to all GBT-SCA chips behind one GBT link.
//
// Layers, from the bus to the link (as in the published core):
//   Avalon-MM slave       -> ECS commands FIFO (command packets from the PC)
//                         <- ECS reply memory  (replies, polled by the PC)
//   protocol layer        one driver per SCA protocol, activation check,
//                         protocol and channel arbiters, configuration
//   MAC layer x NUM_SCA   22 CMD + 22 RPY FIFOs, channel arbiter, HDLC e-port
//   link layer            e-link router onto the GBT frame's ECS bits
// One core serves one GBT link with 16 + 1 SCAs (16 on the 32-bit ECS field
// of the GBT frame, one on the EC field). A board with several GBT links
// uses one core per link.
//
// GBT side: gbt_tx_ecs/gbt_tx_ec are the bits this core puts into each
// transmitted GBT frame (one frame per clock), gbt_rx_ecs/gbt_rx_ec the
// bits it takes from each received frame. Bit pair 2s+1:2s of the ECS field
// is e-link slot s. Event outputs pulse for one cycle: a command was
// retransmitted (retry), a reply was written (reply_done), a frame failed
// its check (fcs_err), a reply was dropped (rpy_drop).
// Reset: rst_n is an asynchronous, active-low reset for all control registers
// (memory arrays are not reset; the reply memory clears itself). It
// also appears as the disable condition of the handshake assertions in the
// FIFOs and the command sequencer, which is why lint reports it as used both
// synchronously and asynchronously; the logic itself uses it one way only.
module stfc_sca_top
  import sca_pkg::*;
#(
  parameter int NUM_SCA        = 17,
  parameter int CMD_FIFO_DEPTH = 64,
  parameter int CH_FIFO_DEPTH  = 2,
  parameter int MAX_RETRY      = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  // Avalon-MM slave
  input  logic [8:0]  avs_address,
  input  logic        avs_read,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  output logic [31:0] avs_readdata,
  output logic        avs_readdatavalid,
  output logic        avs_waitrequest,
  // GBT frame bits
  output logic [31:0] gbt_tx_ecs,
  output logic [1:0]  gbt_tx_ec,
  input  logic [31:0] gbt_rx_ecs,
  input  logic [1:0]  gbt_rx_ec,
  // events
  output logic        retry,
  output logic        reply_done,
  output logic        fcs_err,
  output logic        rpy_drop
);
  localparam int RPY_AW = 7;              // 16 reply slots of 8 words
  localparam int CFW    = $clog2(CMD_FIFO_DEPTH + 1);

  // ---------------------------------------------------- ECS packet buffers
  logic              cf_push, cf_pop, cf_empty, cf_full;
  logic [31:0]       cf_din, cf_dout;
  logic [CFW-1:0]    cf_count;

  channel_fifo #(.WIDTH(32), .DEPTH(CMD_FIFO_DEPTH)) u_ecs_cmd_fifo (
    .clk, .rst_n, .push(cf_push), .din(cf_din), .pop(cf_pop),
    .dout(cf_dout), .empty(cf_empty), .full(cf_full), .count(cf_count));

  logic              rm_we, rm_re;
  logic [RPY_AW-1:0] rm_waddr, rm_raddr;
  logic [31:0]       rm_wdata, rm_rdata;

  ecs_reply_memory #(.WORDS(1 << RPY_AW)) u_reply_mem (
    .clk, .rst_n, .we(rm_we), .waddr(rm_waddr), .wdata(rm_wdata),
    .re(rm_re), .raddr(rm_raddr), .rdata(rm_rdata));

  // ---------------------------------------------------------- Avalon slave
  logic        cfg_we, rtr_we, lc_valid;
  logic [6:0]  cfg_addr;
  logic [4:0]  rtr_addr;
  logic [31:0] cfg_wdata, cfg_rdata, rtr_wdata, rtr_rdata;
  logic [SCA_IDX_W-1:0] lc_sca;
  logic [7:0]  lc_ctrl;
  logic [NUM_SCA-1:0] link_ack, link_ack_seen;

  avalon_mm_slave #(.NUM_SCA(NUM_SCA), .AW(9), .RPY_AW(RPY_AW)) u_avs (
    .clk, .rst_n,
    .address(avs_address), .read(avs_read), .write(avs_write), .writedata(avs_writedata),
    .readdata(avs_readdata), .readdatavalid(avs_readdatavalid), .waitrequest(avs_waitrequest),
    .cmd_push(cf_push), .cmd_wdata(cf_din), .cmd_full(cf_full), .cmd_count(16'(cf_count)),
    .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .rtr_we, .rtr_addr, .rtr_wdata, .rtr_rdata,
    .link_cmd_valid(lc_valid), .link_cmd_sca(lc_sca), .link_cmd_ctrl(lc_ctrl),
    .link_ack(link_ack_seen),
    .rpy_re(rm_re), .rpy_raddr(rm_raddr), .rpy_rdata(rm_rdata));

  // --------------------------------------------------------- configuration
  logic [SCA_IDX_W-1:0] lk_sca;
  logic [7:0]           lk_ch;
  logic                 lk_sca_ok, lk_ch_ok;
  logic [15:0]          timeout;

  sca_channel_config #(.NUM_SCA(NUM_SCA)) u_cfg (
    .clk, .rst_n, .we(cfg_we), .addr(cfg_addr), .wdata(cfg_wdata), .rdata(cfg_rdata),
    .lookup_sca(lk_sca), .lookup_ch(lk_ch), .sca_ok(lk_sca_ok), .ch_ok(lk_ch_ok),
    .timeout);

  // -------------------------------------------------------- protocol layer
  logic [NUM_SCA-1:0] mac_cmd_valid, mac_cmd_ready, mac_rpy_valid, mac_rpy_pop;
  sca_payload_t       mac_cmd;
  sca_payload_t       mac_rpy [NUM_SCA];

  protocol_layer #(.NUM_SCA(NUM_SCA), .RPY_AW(RPY_AW), .MAX_RETRY(MAX_RETRY)) u_proto (
    .clk, .rst_n,
    .cf_empty, .cf_dout, .cf_pop,
    .lk_sca, .lk_ch, .lk_sca_ok, .lk_ch_ok, .timeout,
    .mac_cmd_valid, .mac_cmd, .mac_cmd_ready,
    .mac_rpy_valid, .mac_rpy, .mac_rpy_pop,
    .rm_we, .rm_waddr, .rm_wdata,
    .retry_pulse(retry), .reply_pulse(reply_done));

  // ------------------------------------------------------------ MAC layers
  logic [1:0]         mac_tx [NUM_SCA];
  logic [1:0]         mac_rx [NUM_SCA];
  logic [NUM_SCA-1:0] uc_pend, uc_ready, mac_fcs_err, mac_drop;
  logic [7:0]         uc_ctrl [NUM_SCA];

  for (genvar s = 0; s < NUM_SCA; s++) begin : gen_mac_layer
    stfc_sca_mac_layer #(.FIFO_DEPTH(CH_FIFO_DEPTH)) u_mac (
      .clk, .rst_n,
      .cmd_valid(mac_cmd_valid[s]), .cmd(mac_cmd), .cmd_ready(mac_cmd_ready[s]),
      .rpy_valid(mac_rpy_valid[s]), .rpy(mac_rpy[s]), .rpy_pop(mac_rpy_pop[s]),
      .ucmd_valid(uc_pend[s]), .ucmd(uc_ctrl[s]), .ucmd_ready(uc_ready[s]),
      .link_ack(link_ack[s]),
      .elink_tx(mac_tx[s]), .elink_rx(mac_rx[s]),
      .fcs_err(mac_fcs_err[s]), .rpy_drop(mac_drop[s]));
  end

  // HDLC link commands are held until the addressed MAC layer takes them;
  // acknowledgements are kept (sticky) until the next link command.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      uc_pend       <= '0;
      link_ack_seen <= '0;
      for (int s = 0; s < NUM_SCA; s++) uc_ctrl[s] <= '0;
    end else begin
      for (int s = 0; s < NUM_SCA; s++) begin
        if (uc_pend[s] && uc_ready[s]) uc_pend[s] <= 1'b0;
        if (link_ack[s]) link_ack_seen[s] <= 1'b1;
        if (lc_valid && int'(lc_sca) == s) begin
          uc_pend[s]       <= 1'b1;
          uc_ctrl[s]       <= lc_ctrl;
          link_ack_seen[s] <= 1'b0;
        end
      end
    end
  end

  assign fcs_err  = |mac_fcs_err;
  assign rpy_drop = |mac_drop;

  // ----------------------------------------------------------- link layer
  logic [33:0] gbt_tx, gbt_rx;

  elink_router #(.NUM_ELINK(NUM_SCA), .NUM_SLOT(17)) u_router (
    .clk, .rst_n, .cfg_we(rtr_we), .cfg_addr(rtr_addr), .cfg_wdata(rtr_wdata),
    .cfg_rdata(rtr_rdata), .mac_tx, .mac_rx, .gbt_tx, .gbt_rx);

  assign gbt_tx_ecs = gbt_tx[31:0];
  assign gbt_tx_ec  = gbt_tx[33:32];
  assign gbt_rx     = {gbt_rx_ec, gbt_rx_ecs};
endmodule
