// ecs_reply_memory: memory for ECS replies, polled by the control software.
//
// Simple dual-port RAM: the protocol layer writes reply words on port A,
// the Avalon slave reads on port B with one cycle of latency. The memory is
// divided into slots of sca_pkg::REPLY_SLOT_WORDS words, one slot per
// command tag value (tag modulo the number of slots). That the replies sit
// in a memory that software polls follows the published architecture; the
// slot layout and size are choices of this design.
module ecs_reply_memory #(
  parameter int WORDS = 128,
  parameter int AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [31:0]   rdata
);
  logic [31:0] mem [WORDS];
  logic        init_done;
  logic [AW-1:0] init_addr;

  // After reset the memory is cleared once, one word per cycle, so that no
  // slot reads as a completed reply before a command has been executed.
  always_ff @(posedge clk) begin
    if (!init_done)  mem[init_addr] <= '0;
    else if (we)     mem[waddr]     <= wdata;
    if (re)          rdata          <= mem[raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_done <= 1'b0;
      init_addr <= '0;
    end else if (!init_done) begin
      init_addr <= init_addr + 1'b1;
      if (init_addr == AW'(WORDS - 1)) init_done <= 1'b1;
    end
  end
endmodule
