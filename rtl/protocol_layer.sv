// protocol_layer: turns ECS command packets into GBT-SCA commands and SCA
// replies into ECS replies, for all SCAs of one GBT link.
//
// Work flow, as in the published architecture:
//  1. A dispatcher reads one ECS command packet (header, argument, data
//     words) from the ECS commands FIFO.
//  2. It asks the configuration block whether the addressed SCA and channel
//     are activated. If not, an ECS reply with status ST_INACTIVE is made at
//     once. Otherwise the packet is routed by its channel number to the
//     protocol driver of that channel type (controller, SPI, GPIO, I2C,
//     JTAG, ADC, DAC); the dispatcher waits while that driver is busy.
//  3. The channel arbiter (round robin) passes the SCA command packets of the
//     busy drivers, one per cycle, to the MAC layer of the addressed SCA.
//     SCA replies coming back from the MAC layers (round robin over the SCAs)
//     are handed to the driver that owns the reply's channel.
//  4. The protocol arbiter (round robin) takes the finished ECS replies of
//     the drivers and the dispatcher and writes each into its slot of the
//     ECS reply memory: words 1..5 first, the header word (with its done bit)
//     last, so that a polling reader never sees a half-written reply.
// One driver instance per protocol, each with one ECS command in flight, so
// up to seven ECS commands of different protocols run at the same time. The
// ECS packet layout and the reply slot layout are defined in sca_pkg.
module protocol_layer
  import sca_pkg::*;
#(
  parameter int NUM_SCA   = 17,
  parameter int RPY_AW    = 7,
  parameter int MAX_RETRY = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // ECS commands FIFO read side
  input  logic                 cf_empty,
  input  logic [31:0]          cf_dout,
  output logic                 cf_pop,
  // configuration lookup
  output logic [SCA_IDX_W-1:0] lk_sca,
  output logic [7:0]           lk_ch,
  input  logic                 lk_sca_ok,
  input  logic                 lk_ch_ok,
  input  logic [15:0]          timeout,
  // SCA commands to the MAC layers
  output logic [NUM_SCA-1:0]   mac_cmd_valid,
  output sca_payload_t         mac_cmd,
  input  logic [NUM_SCA-1:0]   mac_cmd_ready,
  // SCA replies from the MAC layers
  input  logic [NUM_SCA-1:0]   mac_rpy_valid,
  input  sca_payload_t         mac_rpy [NUM_SCA],
  output logic [NUM_SCA-1:0]   mac_rpy_pop,
  // ECS reply memory write side
  output logic                 rm_we,
  output logic [RPY_AW-1:0]    rm_waddr,
  output logic [31:0]          rm_wdata,
  // events
  output logic                 retry_pulse,
  output logic                 reply_pulse
);
  localparam int SW = $clog2(NUM_SCA);
  localparam int NSRC = NUM_PROTO + 1;      // drivers + dispatcher

  // ------------------------------------------------------------ dispatcher
  typedef enum logic [2:0] {D_HDR, D_ARG, D_DATA, D_CHECK, D_ROUTE, D_ERR} dstate_e;
  dstate_e    dstate;
  ecs_cmd_t   dcmd;
  logic [2:0] didx;
  logic [2:0] dproto;
  ecs_reply_t err_reply;

  logic [NUM_PROTO-1:0] drv_cmd_valid, drv_cmd_ready;
  logic [NUM_PROTO-1:0] drv_pl_valid, drv_pl_ready;
  sca_payload_t         drv_pl [NUM_PROTO];
  logic [NUM_PROTO-1:0] drv_rpy_valid;
  logic [NUM_PROTO-1:0] drv_reply_valid, drv_reply_ready, drv_retry;
  ecs_reply_t           drv_reply [NUM_PROTO];
  logic [SCA_IDX_W-1:0] drv_sca [NUM_PROTO];

  assign lk_sca = dcmd.sca;
  assign lk_ch  = dcmd.ch;
  assign cf_pop = !cf_empty && (dstate == D_HDR || dstate == D_ARG || dstate == D_DATA);

  logic err_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dstate    <= D_HDR;
      dcmd      <= '0;
      didx      <= '0;
      dproto    <= '0;
      err_reply <= '0;
      for (int p = 0; p < NUM_PROTO; p++) drv_sca[p] <= '0;
    end else begin
      case (dstate)
        D_HDR: if (!cf_empty) begin
          dcmd        <= '0;
          dcmd.tag    <= cf_dout[31:24];
          dcmd.sca    <= cf_dout[20:16];
          dcmd.ch     <= cf_dout[15:8];
          dcmd.op     <= cf_dout[7:4];
          dcmd.nwords <= (cf_dout[2:0] > 3'(MAX_DWORDS)) ? 3'(MAX_DWORDS) : cf_dout[2:0];
          didx        <= '0;
          dstate      <= D_ARG;
        end
        D_ARG: if (!cf_empty) begin
          dcmd.arg <= cf_dout;
          dstate   <= (dcmd.nwords == 0) ? D_CHECK : D_DATA;
        end
        D_DATA: if (!cf_empty) begin
          dcmd.data[didx[1:0]] <= cf_dout;
          didx <= didx + 1'b1;
          if (didx + 1'b1 == dcmd.nwords) dstate <= D_CHECK;
        end
        D_CHECK: begin
          dproto <= ch2proto(dcmd.ch);
          if (lk_sca_ok && lk_ch_ok) begin
            dstate <= D_ROUTE;
          end else begin
            err_reply        <= '0;
            err_reply.tag    <= dcmd.tag;
            err_reply.sca    <= dcmd.sca;
            err_reply.ch     <= dcmd.ch;
            err_reply.status <= ST_INACTIVE;
            dstate           <= D_ERR;
          end
        end
        D_ROUTE: if (drv_cmd_ready[dproto]) begin
          drv_sca[dproto] <= dcmd.sca;
          dstate          <= D_HDR;
        end
        D_ERR: if (err_ready) dstate <= D_HDR;
        default: dstate <= D_HDR;
      endcase
    end
  end

  always_comb begin
    drv_cmd_valid = '0;
    if (dstate == D_ROUTE) drv_cmd_valid[dproto] = 1'b1;
  end

  // ------------------------------------------------------- protocol drivers
  sca_payload_t         rpy_sel;
  logic [SW-1:0]        rpy_idx;
  logic                 rpy_any;
  logic [2:0]           rpy_proto;

  sca_controller_protocol_driver #(.MAX_RETRY(MAX_RETRY)) u_ctrl (
    .clk, .rst_n, .cmd_valid(drv_cmd_valid[PROTO_CTRL]), .cmd_ready(drv_cmd_ready[PROTO_CTRL]), .cmd_in(dcmd),
    .pl_valid(drv_pl_valid[PROTO_CTRL]), .pl_ready(drv_pl_ready[PROTO_CTRL]), .pl(drv_pl[PROTO_CTRL]),
    .rpy_valid(drv_rpy_valid[PROTO_CTRL]), .rpy_sca(SCA_IDX_W'(rpy_idx)), .rpy(rpy_sel), .timeout,
    .reply_valid(drv_reply_valid[PROTO_CTRL]), .reply_ready(drv_reply_ready[PROTO_CTRL]),
    .reply(drv_reply[PROTO_CTRL]), .retry_pulse(drv_retry[PROTO_CTRL]));
  spi_protocol_driver #(.MAX_RETRY(MAX_RETRY)) u_spi (
    .clk, .rst_n, .cmd_valid(drv_cmd_valid[PROTO_SPI]), .cmd_ready(drv_cmd_ready[PROTO_SPI]), .cmd_in(dcmd),
    .pl_valid(drv_pl_valid[PROTO_SPI]), .pl_ready(drv_pl_ready[PROTO_SPI]), .pl(drv_pl[PROTO_SPI]),
    .rpy_valid(drv_rpy_valid[PROTO_SPI]), .rpy_sca(SCA_IDX_W'(rpy_idx)), .rpy(rpy_sel), .timeout,
    .reply_valid(drv_reply_valid[PROTO_SPI]), .reply_ready(drv_reply_ready[PROTO_SPI]),
    .reply(drv_reply[PROTO_SPI]), .retry_pulse(drv_retry[PROTO_SPI]));
  gpio_protocol_driver #(.MAX_RETRY(MAX_RETRY)) u_gpio (
    .clk, .rst_n, .cmd_valid(drv_cmd_valid[PROTO_GPIO]), .cmd_ready(drv_cmd_ready[PROTO_GPIO]), .cmd_in(dcmd),
    .pl_valid(drv_pl_valid[PROTO_GPIO]), .pl_ready(drv_pl_ready[PROTO_GPIO]), .pl(drv_pl[PROTO_GPIO]),
    .rpy_valid(drv_rpy_valid[PROTO_GPIO]), .rpy_sca(SCA_IDX_W'(rpy_idx)), .rpy(rpy_sel), .timeout,
    .reply_valid(drv_reply_valid[PROTO_GPIO]), .reply_ready(drv_reply_ready[PROTO_GPIO]),
    .reply(drv_reply[PROTO_GPIO]), .retry_pulse(drv_retry[PROTO_GPIO]));
  i2c_protocol_driver #(.MAX_RETRY(MAX_RETRY)) u_i2c (
    .clk, .rst_n, .cmd_valid(drv_cmd_valid[PROTO_I2C]), .cmd_ready(drv_cmd_ready[PROTO_I2C]), .cmd_in(dcmd),
    .pl_valid(drv_pl_valid[PROTO_I2C]), .pl_ready(drv_pl_ready[PROTO_I2C]), .pl(drv_pl[PROTO_I2C]),
    .rpy_valid(drv_rpy_valid[PROTO_I2C]), .rpy_sca(SCA_IDX_W'(rpy_idx)), .rpy(rpy_sel), .timeout,
    .reply_valid(drv_reply_valid[PROTO_I2C]), .reply_ready(drv_reply_ready[PROTO_I2C]),
    .reply(drv_reply[PROTO_I2C]), .retry_pulse(drv_retry[PROTO_I2C]));
  jtag_protocol_driver #(.MAX_RETRY(MAX_RETRY)) u_jtag (
    .clk, .rst_n, .cmd_valid(drv_cmd_valid[PROTO_JTAG]), .cmd_ready(drv_cmd_ready[PROTO_JTAG]), .cmd_in(dcmd),
    .pl_valid(drv_pl_valid[PROTO_JTAG]), .pl_ready(drv_pl_ready[PROTO_JTAG]), .pl(drv_pl[PROTO_JTAG]),
    .rpy_valid(drv_rpy_valid[PROTO_JTAG]), .rpy_sca(SCA_IDX_W'(rpy_idx)), .rpy(rpy_sel), .timeout,
    .reply_valid(drv_reply_valid[PROTO_JTAG]), .reply_ready(drv_reply_ready[PROTO_JTAG]),
    .reply(drv_reply[PROTO_JTAG]), .retry_pulse(drv_retry[PROTO_JTAG]));
  adc_protocol_driver #(.MAX_RETRY(MAX_RETRY)) u_adc (
    .clk, .rst_n, .cmd_valid(drv_cmd_valid[PROTO_ADC]), .cmd_ready(drv_cmd_ready[PROTO_ADC]), .cmd_in(dcmd),
    .pl_valid(drv_pl_valid[PROTO_ADC]), .pl_ready(drv_pl_ready[PROTO_ADC]), .pl(drv_pl[PROTO_ADC]),
    .rpy_valid(drv_rpy_valid[PROTO_ADC]), .rpy_sca(SCA_IDX_W'(rpy_idx)), .rpy(rpy_sel), .timeout,
    .reply_valid(drv_reply_valid[PROTO_ADC]), .reply_ready(drv_reply_ready[PROTO_ADC]),
    .reply(drv_reply[PROTO_ADC]), .retry_pulse(drv_retry[PROTO_ADC]));
  dac_protocol_driver #(.MAX_RETRY(MAX_RETRY)) u_dac (
    .clk, .rst_n, .cmd_valid(drv_cmd_valid[PROTO_DAC]), .cmd_ready(drv_cmd_ready[PROTO_DAC]), .cmd_in(dcmd),
    .pl_valid(drv_pl_valid[PROTO_DAC]), .pl_ready(drv_pl_ready[PROTO_DAC]), .pl(drv_pl[PROTO_DAC]),
    .rpy_valid(drv_rpy_valid[PROTO_DAC]), .rpy_sca(SCA_IDX_W'(rpy_idx)), .rpy(rpy_sel), .timeout,
    .reply_valid(drv_reply_valid[PROTO_DAC]), .reply_ready(drv_reply_ready[PROTO_DAC]),
    .reply(drv_reply[PROTO_DAC]), .retry_pulse(drv_retry[PROTO_DAC]));

  assign retry_pulse = |drv_retry;

  // --------------------------------------- channel arbiter: commands out
  logic [NUM_PROTO-1:0] cgrant;
  logic [2:0]           cidx;
  logic                 cany, caccept;
  logic [SCA_IDX_W-1:0] csca;

  rr_arbiter #(.N(NUM_PROTO)) u_cmd_arb (
    .clk, .rst_n, .req(drv_pl_valid), .accept(caccept),
    .grant(cgrant), .grant_idx(cidx), .any(cany));

  assign csca    = drv_sca[cidx];
  assign mac_cmd = drv_pl[cidx];
  assign caccept = cany && (int'(csca) < NUM_SCA) && mac_cmd_ready[SW'(csca)];

  always_comb begin
    mac_cmd_valid = '0;
    if (cany && int'(csca) < NUM_SCA) mac_cmd_valid[SW'(csca)] = 1'b1;
    drv_pl_ready = caccept ? cgrant : '0;
  end

  // ------------------------------------ channel arbiter: replies back in
  logic [NUM_SCA-1:0] rgrant;

  rr_arbiter #(.N(NUM_SCA)) u_rpy_arb (
    .clk, .rst_n, .req(mac_rpy_valid), .accept(1'b1),
    .grant(rgrant), .grant_idx(rpy_idx), .any(rpy_any));

  assign rpy_sel     = mac_rpy[rpy_idx];
  assign rpy_proto   = ch2proto(rpy_sel.ch);
  assign mac_rpy_pop = rgrant;

  always_comb begin
    drv_rpy_valid = '0;
    if (rpy_any && int'(rpy_sel.ch) < NUM_CH) drv_rpy_valid[rpy_proto] = 1'b1;
  end

  // -------------------------------- protocol arbiter and reply writer
  logic [NSRC-1:0]         src_valid, src_grant;
  logic [$clog2(NSRC)-1:0] src_idx;
  logic                    src_any, src_accept;
  ecs_reply_t              wr_reply;
  logic [2:0]              wr_word;
  logic                    wr_busy;

  assign src_valid  = {dstate == D_ERR, drv_reply_valid};
  assign src_accept = src_any && !wr_busy;
  assign err_ready  = src_accept && src_grant[NSRC-1];
  assign drv_reply_ready = src_accept ? src_grant[NUM_PROTO-1:0] : '0;

  rr_arbiter #(.N(NSRC)) u_rpy_wr_arb (
    .clk, .rst_n, .req(src_valid), .accept(src_accept),
    .grant(src_grant), .grant_idx(src_idx), .any(src_any));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_busy     <= 1'b0;
      wr_word     <= '0;
      wr_reply    <= '0;
      reply_pulse <= 1'b0;
    end else begin
      reply_pulse <= 1'b0;
      if (!wr_busy) begin
        if (src_any) begin
          wr_reply <= (int'(src_idx) == NSRC - 1) ? err_reply : drv_reply[src_idx];
          wr_busy  <= 1'b1;
          wr_word  <= 3'd1;
        end
      end else begin
        if (wr_word == 3'd0) begin
          wr_busy     <= 1'b0;
          reply_pulse <= 1'b1;
        end else if (wr_word == 3'd5) begin
          wr_word <= 3'd0;
        end else begin
          wr_word <= wr_word + 1'b1;
        end
      end
    end
  end

  localparam int SLOT_W = RPY_AW - 3;
  assign rm_we    = wr_busy;
  assign rm_waddr = {wr_reply.tag[SLOT_W-1:0], wr_word};
  always_comb begin
    case (wr_word)
      3'd0:    rm_wdata = reply_header(wr_reply);
      3'd1:    rm_wdata = 32'(wr_reply.sca);
      3'd2:    rm_wdata = wr_reply.data[0];
      3'd3:    rm_wdata = wr_reply.data[1];
      3'd4:    rm_wdata = wr_reply.data[2];
      3'd5:    rm_wdata = wr_reply.data[3];
      default: rm_wdata = '0;
    endcase
  end
endmodule
