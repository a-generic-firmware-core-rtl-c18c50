// sca_cmd_sequencer: send / wait / retransmit engine shared by all protocol
// drivers.
//
// A protocol driver turns one ECS command into a batch of GBT-SCA commands.
// This engine runs such a batch: it accepts the ECS command, asks the driver
// for step 0, 1, ... (cur_cmd and step_idx out, step and nsteps back),
// sends each step as an SCA payload packet with a fresh transaction id (TR),
// and waits for the reply with the same SCA, channel and TR before sending
// the next step. Replies that do not match are ignored. If no reply comes
// within `timeout` cycles the command is sent again with a new TR, up to
// MAX_RETRY times; then the ECS command ends with status ST_TIMEOUT. A reply
// with non-zero error flags ends it with ST_SCA_ERR. Data words of replies
// to steps marked `capture` are collected into the ECS reply, which is
// offered on reply_valid/reply_ready when the batch is done.
//
// Sending, waiting for replies, keeping the command context and
// retransmission follow the published description; the one-command-in-flight
// policy, the timeout counter and the retry limit are this design's choices.
// Interfaces are valid/ready; rpy_valid is a one-cycle pulse that is always
// accepted. Latency: one cycle from accept to the first payload, one cycle
// from a matching reply to the next payload.
module sca_cmd_sequencer
  import sca_pkg::*;
#(
  parameter int MAX_RETRY = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // ECS command in
  input  logic                 cmd_valid,
  output logic                 cmd_ready,
  input  ecs_cmd_t             cmd_in,
  // driver table
  output ecs_cmd_t             cur_cmd,
  output logic [3:0]           step_idx,
  input  sca_step_t            step,
  input  logic [3:0]           nsteps,     // 0 = op not supported
  // SCA payload out
  output logic                 pl_valid,
  input  logic                 pl_ready,
  output sca_payload_t         pl,
  // SCA reply in
  input  logic                 rpy_valid,
  input  logic [SCA_IDX_W-1:0] rpy_sca,
  input  sca_payload_t         rpy,
  // configuration
  input  logic [15:0]          timeout,
  // ECS reply out
  output logic                 reply_valid,
  input  logic                 reply_ready,
  output ecs_reply_t           reply,
  // event pulses
  output logic                 retry_pulse
);
  typedef enum logic [1:0] {S_IDLE, S_SEND, S_WAIT, S_DONE} state_e;

  state_e      state;
  logic [7:0]  tr;
  logic [15:0] timer;
  logic [$clog2(MAX_RETRY+1)-1:0] retries;
  logic [2:0]  ncap;
  logic        match;

  assign cmd_ready   = (state == S_IDLE);
  assign pl_valid    = (state == S_SEND) && (nsteps != 4'd0);
  assign pl          = '{tr: tr, ch: cur_cmd.ch, cmd: step.cmd, len: step.len, data: step.data};
  assign reply_valid = (state == S_DONE);
  assign match       = rpy_valid && rpy_sca == cur_cmd.sca && rpy.ch == cur_cmd.ch && rpy.tr == tr;

  function automatic logic [7:0] next_tr(input logic [7:0] t);
    return (t >= 8'hFE) ? 8'h01 : t + 8'h01;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      tr          <= 8'h01;
      timer       <= '0;
      retries     <= '0;
      ncap        <= '0;
      step_idx    <= '0;
      cur_cmd     <= '0;
      reply       <= '0;
      retry_pulse <= 1'b0;
    end else begin
      retry_pulse <= 1'b0;
      case (state)
        S_IDLE: if (cmd_valid) begin
          cur_cmd       <= cmd_in;
          step_idx      <= '0;
          ncap          <= '0;
          retries       <= '0;
          reply         <= '0;
          reply.tag     <= cmd_in.tag;
          reply.sca     <= cmd_in.sca;
          reply.ch      <= cmd_in.ch;
          state         <= S_SEND;
        end
        S_SEND: begin
          if (nsteps == 0) begin
            reply.status <= ST_BAD_OP;
            state        <= S_DONE;
          end else if (pl_ready) begin
            timer <= '0;
            state <= S_WAIT;
          end
        end
        S_WAIT: begin
          if (match) begin
            tr <= next_tr(tr);
            if (rpy.cmd != 8'h00) begin
              reply.status  <= ST_SCA_ERR;
              reply.sca_err <= rpy.cmd;
              state         <= S_DONE;
            end else begin
              if (step.capture && ncap < 3'(MAX_DWORDS)) begin
                reply.data[ncap[1:0]] <= rpy.data;
                ncap                  <= ncap + 1'b1;
                reply.nwords          <= ncap + 1'b1;
              end
              if (step_idx == nsteps - 1'b1) begin
                state <= S_DONE;
              end else begin
                step_idx <= step_idx + 1'b1;
                retries  <= '0;
                state    <= S_SEND;
              end
            end
          end else if (timer >= timeout) begin
            tr <= next_tr(tr);
            if (int'(retries) < MAX_RETRY) begin
              retries     <= retries + 1'b1;
              retry_pulse <= 1'b1;
              state       <= S_SEND;
            end else begin
              reply.status <= ST_TIMEOUT;
              state        <= S_DONE;
            end
          end else begin
            timer <= timer + 1'b1;
          end
        end
        S_DONE: if (reply_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_pl_stable: assert property (@(posedge clk) disable iff (!rst_n)
    pl_valid && !pl_ready |=> pl_valid && $stable(pl));
endmodule
