// spi_protocol_driver: SPI protocol driver of the protocol layer.
//
// Drives the SPI master (channel 0x01) of the GBT-SCA.
//   op 0  transfer: W_CTRL (arg[15:0]: transfer length and mode bits),
//         W_SS (arg[23:16]: slave-select lines), W_MOSI0.. one per ECS data
//         word, GO, then R_MISO0.. one per data word, captured into the reply.
//
// The driver is a translation table (ECS command and step number in, one
// GBT-SCA command out) around the shared sca_cmd_sequencer, which sends each
// step, waits for its reply, retransmits on timeout and assembles the ECS
// reply. One ECS command is handled at a time; cmd_ready is high when idle.
// Ports are those of sca_cmd_sequencer. Timing: each step costs one SCA
// command/reply round trip on the e-link.
module spi_protocol_driver
  import sca_pkg::*;
#(
  parameter int MAX_RETRY = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cmd_valid,
  output logic                 cmd_ready,
  input  ecs_cmd_t             cmd_in,
  output logic                 pl_valid,
  input  logic                 pl_ready,
  output sca_payload_t         pl,
  input  logic                 rpy_valid,
  input  logic [SCA_IDX_W-1:0] rpy_sca,
  input  sca_payload_t         rpy,
  input  logic [15:0]          timeout,
  output logic                 reply_valid,
  input  logic                 reply_ready,
  output ecs_reply_t           reply,
  output logic                 retry_pulse
);
  ecs_cmd_t   c;
  logic [3:0] k;
  sca_step_t  step;
  logic [3:0] nsteps;

  sca_cmd_sequencer #(.MAX_RETRY(MAX_RETRY)) u_seq (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_in,
    .cur_cmd(c), .step_idx(k), .step, .nsteps,
    .pl_valid, .pl_ready, .pl, .rpy_valid, .rpy_sca, .rpy,
    .timeout, .reply_valid, .reply_ready, .reply, .retry_pulse
  );

  // Translation table.
  always_comb begin
    logic [3:0] nw;
    nw     = 4'(c.nwords);
    step   = '0;
    nsteps = 4'd0;
    if (c.op == 4'd0) begin
      nsteps = 4'd3 + 4'(nw << 1);
      if (k == 4'd0)
        step = '{cmd: SPI_W_CTRL, len: 8'd4, data: {16'h0, c.arg[15:0]}, capture: 1'b0};
      else if (k == 4'd1)
        step = '{cmd: SPI_W_SS, len: 8'd4, data: {24'h0, c.arg[23:16]}, capture: 1'b0};
      else if (k < 4'd2 + nw)
        step = '{cmd: SPI_W_MOSI0 + 8'({k[1:0] - 2'd2, 4'h0}), len: 8'd4,
                 data: c.data[k[1:0] - 2'd2], capture: 1'b0};
      else if (k == 4'd2 + nw)
        step = '{cmd: SPI_GO, len: 8'd1, data: 32'h0, capture: 1'b0};
      else
        step = '{cmd: SPI_R_MISO0 + 8'({2'(k - nw - 4'd3), 4'h0}), len: 8'd1, data: 32'h0, capture: 1'b1};
    end
  end
endmodule
