// channel_fifo: synchronous first-in first-out buffer.
//
// Used three ways in the core: as the ECS commands FIFO (32-bit words from
// the Avalon bus), and as the per-channel command (CMD) and reply (RPY)
// FIFOs of each SCA MAC layer (64-bit SCA payload packets). The channel
// FIFOs hold two packets by default, the depth suggested by the register
// count reported for the original per-channel FIFO (129 registers, i.e. two
// 64-bit entries plus one bit); the ECS commands FIFO depth is a choice of
// this design.
//
// Interface: push/din write when not full; pop reads dout (first-word
// fall-through: dout shows the oldest entry whenever empty is low). A push
// while full or a pop while empty is ignored. count gives the fill level.
// Timing: a pushed word is visible on dout the cycle after the push.
module channel_fifo #(
  parameter int WIDTH = 64,
  parameter int DEPTH = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  logic [WIDTH-1:0]         din,
  input  logic                     pop,
  output logic [WIDTH-1:0]         dout,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_push, do_pop;

  assign empty   = (count == 0);
  assign full    = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rptr];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_push) wptr <= inc(wptr);
      if (do_pop)  rptr <= inc(rptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) int'(count) <= DEPTH);
endmodule
