// dac_protocol_driver: DAC protocol driver of the protocol layer.
//
// Drives the four DAC outputs A..D (channel 0x15) of the GBT-SCA.
//   op 0  write: arg[9:8] selects the output, arg[7:0] is the value
//   op 1  read back: arg[9:8] selects the output
// The value sits in data bits 31:24 of the SCA packet.
//
// The driver is a translation table (ECS command and step number in, one
// GBT-SCA command out) around the shared sca_cmd_sequencer, which sends each
// step, waits for its reply, retransmits on timeout and assembles the ECS
// reply. One ECS command is handled at a time; cmd_ready is high when idle.
// Ports are those of sca_cmd_sequencer. Timing: each step costs one SCA
// command/reply round trip on the e-link.
module dac_protocol_driver
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
    logic [7:0] off;
    off    = {2'b00, c.arg[9:8], 4'h0};
    step   = '0;
    nsteps = 4'd1;
    case (c.op)
      4'd0: step = '{cmd: DAC_W_A + off, len: 8'd1, data: {c.arg[7:0], 24'h0}, capture: 1'b0};
      4'd1: step = '{cmd: DAC_R_A + off, len: 8'd1, data: 32'h0, capture: 1'b1};
      default: nsteps = 4'd0;
    endcase
  end
endmodule
