// elink_router: the link layer - routes the e-links of the SCA MAC layers
// onto the bit pairs of the GBT frame, and back.
//
// The ECS part of a GBT frame is 32 bits, sixteen 2-bit e-link slots, plus
// the 2-bit EC field: 17 slots (slot 16 = EC field). Each MAC e-link m is
// assigned a slot by a configuration register (slot[m]); by default e-link
// m uses slot m. Transmit: slot s carries the e-link of the lowest m with
// slot[m] == s, or idle 1s when none is assigned. Receive: e-link m gets
// the bits of slot slot[m]. Changing the registers re-routes SCA
// connections at run time, which is the purpose of this layer in the
// published design; the register format and the idle level are this
// design's choices. Both directions are registered: one cycle of latency.
// Register port: cfg_addr m reads/writes slot[m] in bits 4:0.
module elink_router #(
  parameter int NUM_ELINK = 17,
  parameter int NUM_SLOT  = 17
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we,
  input  logic [4:0]        cfg_addr,
  input  logic [31:0]       cfg_wdata,
  output logic [31:0]       cfg_rdata,
  // MAC side
  input  logic [1:0]        mac_tx [NUM_ELINK],
  output logic [1:0]        mac_rx [NUM_ELINK],
  // GBT side: slot s = bits 2s+1:2s
  output logic [2*NUM_SLOT-1:0] gbt_tx,
  input  logic [2*NUM_SLOT-1:0] gbt_rx
);
  logic [4:0] slot [NUM_ELINK];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < NUM_ELINK; m++) slot[m] <= 5'(m);
    end else if (cfg_we && int'(cfg_addr) < NUM_ELINK) begin
      slot[cfg_addr] <= cfg_wdata[4:0];
    end
  end

  always_comb begin
    cfg_rdata = '0;
    if (int'(cfg_addr) < NUM_ELINK) cfg_rdata = 32'(slot[cfg_addr]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    logic [2*NUM_SLOT-1:0] t;
    logic [NUM_SLOT-1:0]   taken;
    if (!rst_n) begin
      gbt_tx <= '1;
      for (int m = 0; m < NUM_ELINK; m++) mac_rx[m] <= 2'b11;
    end else begin
      t     = '1;
      taken = '0;
      for (int m = 0; m < NUM_ELINK; m++) begin
        if (int'(slot[m]) < NUM_SLOT && !taken[slot[m]]) begin
          taken[slot[m]]      = 1'b1;
          t[2*slot[m] +: 2]   = mac_tx[m];
        end
      end
      gbt_tx <= t;
      for (int m = 0; m < NUM_ELINK; m++)
        mac_rx[m] <= (int'(slot[m]) < NUM_SLOT) ? gbt_rx[2*slot[m] +: 2] : 2'b11;
    end
  end
endmodule
