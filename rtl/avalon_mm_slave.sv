// avalon_mm_slave: the Avalon-MM slave through which the control PC reaches
// the core (ECS commands in, ECS replies and configuration out).
//
// The published design places an Avalon-MM slave between the board's bus and
// the ECS packet buffers; the word map below is this design's own:
//   0x000  W: push one word of an ECS command packet into the commands FIFO
//          R: [31] FIFO full, [15:0] FIFO fill level
//   0x001  RW: activated-SCA mask            (configuration block)
//   0x002  RW: reply timeout in clock cycles (configuration block)
//   0x003  W: HDLC link command, [20:16] SCA, [7:0] U-frame control byte
//          R: sticky mask of SCAs that acknowledged a link command
//   0x020+s RW: activated-channel mask of SCA s (configuration block)
//   0x040+m RW: GBT bit-pair slot of SCA e-link m (e-link router)
//   0x100.. R: ECS reply memory
// Timing: writes take one cycle; a write to 0x000 while the FIFO is full is
// held off with waitrequest. Every read returns readdatavalid one cycle
// later (the reply memory is synchronous).
module avalon_mm_slave
  import sca_pkg::*;
#(
  parameter int NUM_SCA = 17,
  parameter int AW      = 9,
  parameter int RPY_AW  = 7
) (
  input  logic               clk,
  input  logic               rst_n,
  // Avalon-MM slave
  input  logic [AW-1:0]      address,
  input  logic               read,
  input  logic               write,
  input  logic [31:0]        writedata,
  output logic [31:0]        readdata,
  output logic               readdatavalid,
  output logic               waitrequest,
  // ECS commands FIFO write side
  output logic               cmd_push,
  output logic [31:0]        cmd_wdata,
  input  logic               cmd_full,
  input  logic [15:0]        cmd_count,
  // configuration block
  output logic               cfg_we,
  output logic [6:0]         cfg_addr,
  output logic [31:0]        cfg_wdata,
  input  logic [31:0]        cfg_rdata,
  // e-link router configuration
  output logic               rtr_we,
  output logic [4:0]         rtr_addr,
  output logic [31:0]        rtr_wdata,
  input  logic [31:0]        rtr_rdata,
  // HDLC link commands
  output logic               link_cmd_valid,
  output logic [SCA_IDX_W-1:0] link_cmd_sca,
  output logic [7:0]         link_cmd_ctrl,
  input  logic [NUM_SCA-1:0] link_ack,
  // reply memory read side
  output logic               rpy_re,
  output logic [RPY_AW-1:0]  rpy_raddr,
  input  logic [31:0]        rpy_rdata
);
  typedef enum logic [1:0] {R_REG, R_MEM} rsrc_e;

  logic        is_fifo, is_cfg, is_link, is_rtr, is_mem;
  rsrc_e       rsrc_q;
  logic [31:0] reg_q;

  assign is_fifo = (address == AW'(0));
  assign is_link = (address == AW'(3));
  assign is_cfg  = (address == AW'(1)) || (address == AW'(2)) ||
                   (address >= AW'(32) && address < AW'(64));
  assign is_rtr  = (address >= AW'(64) && address < AW'(96));
  assign is_mem  = (address >= AW'(256));

  assign waitrequest = write && is_fifo && cmd_full;

  assign cmd_push  = write && is_fifo && !cmd_full;
  assign cmd_wdata = writedata;

  assign cfg_we    = write && is_cfg;
  assign cfg_addr  = address[6:0];
  assign cfg_wdata = writedata;

  assign rtr_we    = write && is_rtr;
  assign rtr_addr  = address[4:0];
  assign rtr_wdata = writedata;

  assign link_cmd_valid = write && is_link;
  assign link_cmd_sca   = writedata[20:16];
  assign link_cmd_ctrl  = writedata[7:0];

  assign rpy_re    = read && is_mem;
  assign rpy_raddr = address[RPY_AW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      readdatavalid <= 1'b0;
      rsrc_q        <= R_REG;
      reg_q         <= '0;
    end else begin
      readdatavalid <= read;
      rsrc_q        <= is_mem ? R_MEM : R_REG;
      if (is_fifo)     reg_q <= {cmd_full, 15'h0, cmd_count};
      else if (is_cfg) reg_q <= cfg_rdata;
      else if (is_rtr) reg_q <= rtr_rdata;
      else if (is_link) reg_q <= 32'(link_ack);
      else             reg_q <= '0;
    end
  end

  assign readdata = (rsrc_q == R_MEM) ? rpy_rdata : reg_q;
endmodule
