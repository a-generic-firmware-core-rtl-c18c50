// sca_channel_config: the "SCA channels configuration and shared data" of
// the protocol layer.
//
// Holds, for one GBT link, which GBT-SCAs are activated, which of the 22
// channels of each SCA are activated, and how many clock cycles a protocol
// driver waits for a reply before it retransmits a command. Keeping this
// state here is what the published architecture describes; the register
// layout and reset values are this design's own.
//
// Register port (local word address, written and read in the same cycle):
//   0x01        activated-SCA mask, bit s = SCA s
//   0x02        reply timeout in clock cycles (bits 15:0)
//   0x20 + s    activated-channel mask of SCA s, bit c = channel c
// Reset: all SCAs and channels deactivated, timeout RESET_TIMEOUT.
// Lookup port: sca_ok / ch_ok tell combinationally whether a command for
// (lookup_sca, lookup_ch) may be executed.
module sca_channel_config
  import sca_pkg::*;
#(
  parameter int          NUM_SCA       = 17,
  parameter logic [15:0] RESET_TIMEOUT = 16'd2000
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 we,
  input  logic [6:0]           addr,
  input  logic [31:0]          wdata,
  output logic [31:0]          rdata,
  input  logic [SCA_IDX_W-1:0] lookup_sca,
  input  logic [7:0]           lookup_ch,
  output logic                 sca_ok,
  output logic                 ch_ok,
  output logic [15:0]          timeout
);
  logic [NUM_SCA-1:0] sca_active;
  logic [NUM_CH-1:0]  ch_active [NUM_SCA];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sca_active <= '0;
      timeout    <= RESET_TIMEOUT;
      for (int s = 0; s < NUM_SCA; s++) ch_active[s] <= '0;
    end else if (we) begin
      if (addr == 7'h01) sca_active <= wdata[NUM_SCA-1:0];
      if (addr == 7'h02) timeout    <= wdata[15:0];
      for (int s = 0; s < NUM_SCA; s++)
        if (addr == 7'(32 + s)) ch_active[s] <= wdata[NUM_CH-1:0];
    end
  end

  always_comb begin
    rdata = '0;
    if (addr == 7'h01) rdata = 32'(sca_active);
    if (addr == 7'h02) rdata = {16'h0, timeout};
    for (int s = 0; s < NUM_SCA; s++)
      if (addr == 7'(32 + s)) rdata = 32'(ch_active[s]);
  end

  always_comb begin
    sca_ok = 1'b0;
    ch_ok  = 1'b0;
    if (int'(lookup_sca) < NUM_SCA) begin
      sca_ok = sca_active[lookup_sca];
      if (int'(lookup_ch) < NUM_CH) ch_ok = ch_active[lookup_sca][lookup_ch[4:0]];
    end
  end
endmodule
