// i2c_protocol_driver: I2C protocol driver of the protocol layer.
//
// Drives one of the 16 I2C masters (channels 0x03..0x12) of the GBT-SCA.
// arg[6:0] = 7-bit device address, arg[12:8] = byte count (1..16),
// arg[17:16] = bus speed code (0 = 100 kHz, the default), arg[31:24] = data
// byte of a single-byte write.
//   op 0  multi-byte write: W_CTRL (byte count, speed), then W_DATA0.. one
//         32-bit chunk per ECS data word, then M_7B_W (7-bit address) which
//         starts the bus transfer. This is the published example of an ECS
//         I2C write turned into a batch of SCA commands (16 bytes: CTRL,
//         four data chunks, multi-byte write).
//   op 1  multi-byte read: W_CTRL, M_7B_R, then R_DATA0.. one per 4 bytes,
//         each captured into the ECS reply.
//   op 2  single-byte write S_7B_W;  op 3  single-byte read S_7B_R.
// The I2C control byte is {0, nbytes[4:0], speed[1:0]} in data bits 31:24.
//
// The driver is a translation table (ECS command and step number in, one
// GBT-SCA command out) around the shared sca_cmd_sequencer, which sends each
// step, waits for its reply, retransmits on timeout and assembles the ECS
// reply. One ECS command is handled at a time; cmd_ready is high when idle.
// Ports are those of sca_cmd_sequencer. Timing: each step costs one SCA
// command/reply round trip on the e-link.
module i2c_protocol_driver
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
    logic [2:0] nrd;
    logic [7:0] ctrl;
    nrd    = 3'((c.arg[12:8] + 5'd3) >> 2);
    if (nrd > 3'd4) nrd = 3'd4;
    ctrl   = {1'b0, c.arg[12:8], c.arg[17:16]};
    step   = '0;
    nsteps = 4'd0;
    case (c.op)
      4'd0: begin
        nsteps = 4'd2 + 4'(c.nwords);
        if (k == 4'd0)
          step = '{cmd: I2C_W_CTRL, len: 8'd1, data: {ctrl, 24'h0}, capture: 1'b0};
        else if (k <= 4'(c.nwords))
          step = '{cmd: I2C_W_DATA0 + 8'({k[1:0] - 2'd1, 4'h0}), len: 8'd4,
                   data: c.data[k[1:0] - 2'd1], capture: 1'b0};
        else
          step = '{cmd: I2C_M_7B_W, len: 8'd1, data: {1'b0, c.arg[6:0], 24'h0}, capture: 1'b0};
      end
      4'd1: begin
        nsteps = 4'd2 + 4'(nrd);
        if (k == 4'd0)
          step = '{cmd: I2C_W_CTRL, len: 8'd1, data: {ctrl, 24'h0}, capture: 1'b0};
        else if (k == 4'd1)
          step = '{cmd: I2C_M_7B_R, len: 8'd1, data: {1'b0, c.arg[6:0], 24'h0}, capture: 1'b0};
        else
          step = '{cmd: I2C_R_DATA0 + 8'({k[1:0] - 2'd2, 4'h0}), len: 8'd1, data: 32'h0, capture: 1'b1};
      end
      4'd2: begin
        nsteps = 4'd1;
        step   = '{cmd: I2C_S_7B_W, len: 8'd2, data: {1'b0, c.arg[6:0], c.arg[31:24], 16'h0}, capture: 1'b0};
      end
      4'd3: begin
        nsteps = 4'd1;
        step   = '{cmd: I2C_S_7B_R, len: 8'd1, data: {1'b0, c.arg[6:0], 24'h0}, capture: 1'b1};
      end
      default: ;
    endcase
  end
endmodule
