// fpga_elink: the e-port of one GBT-SCA link - HDLC framing and a 2-bit
// serializer/deserializer.
//
// Transmit: an SCA payload packet (64 bits, taken in one cycle) is wrapped
// in an HDLC frame - opening flag 0x7E, address byte (not used, 0x00),
// control byte, the payload (TR, CH, CMD, LEN, then the data bytes from
// bit 31 down), a 16-bit frame check sequence (FCS), closing flag - and
// sent two bits per clock cycle on elink_tx (bit 1 first). Every byte goes
// least-significant bit first, and a 0 is inserted after five consecutive
// 1s (bit stuffing) so that data never looks like a flag. Between frames
// the line carries flags. Link commands (connect, reset, test) are sent as
// U-frames: address, control, FCS, no payload.
// Receive: elink_rx is taken apart the same way (flag search, destuffing,
// seven 1s abort a frame). A frame whose FCS is right is delivered as an
// SCA payload packet (I-frame) on rx_valid, or as a link event on
// rx_u_valid (U-frame). A wrong FCS or length gives rx_err.
// I-frames carry a 3-bit send sequence number N(S), counting the frames
// sent, and a receive number N(R), the number of frames received + 1.
//
// HDLC encapsulation, frame layout, FCS error check and the pair of bits per
// clock follow the published description; the FCS polynomial (CRC-16-CCITT,
// reflected, initial 0xFFFF, complemented), the byte order of the data and
// the control-byte codes are this design's choices. At 40 MHz the e-link
// carries 80 Mb/s. A 96-bit frame takes at least 52 cycles on the line.
module fpga_elink
  import sca_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // transmit side
  input  logic         tx_valid,
  output logic         tx_ready,
  input  sca_payload_t tx_payload,
  input  logic         ucmd_valid,     // send a U-frame with control byte ucmd
  input  logic [7:0]   ucmd,
  output logic         ucmd_ready,
  output logic [1:0]   elink_tx,
  // receive side
  input  logic [1:0]   elink_rx,
  output logic         rx_valid,
  output sca_payload_t rx_payload,
  output logic         rx_u_valid,
  output logic [7:0]   rx_u_ctrl,
  output logic         rx_err
);
  // ------------------------------------------------------------ frame build
  function automatic logic [95:0] i_frame(input sca_payload_t p, input logic [2:0] ns,
                                          input logic [2:0] nr);
    logic [79:0] f;
    f = {p.data[7:0], p.data[15:8], p.data[23:16], p.data[31:24],
         p.len, p.cmd, p.ch, p.tr, {nr, 1'b0, ns, 1'b0}, HDLC_ADDR};
    return {~crc16_bits(f, 80), f};
  endfunction

  function automatic logic [31:0] u_frame(input logic [7:0] ctrl);
    logic [79:0] f;
    f = {64'h0, ctrl, HDLC_ADDR};
    return {~crc16_bits(f, 16), ctrl, HDLC_ADDR};
  endfunction

  // ------------------------------------------------------------ transmitter
  logic        t_data;          // sending frame bits (else flags)
  logic        t_loaded;        // a frame waits for the end of the flag
  logic [2:0]  t_fpos;          // position inside the flag
  logic [95:0] t_sr;            // frame bits, bit 0 next
  logic [6:0]  t_left;          // frame bits still to send
  logic [2:0]  t_ones;          // consecutive 1s sent
  logic [2:0]  t_ns;            // N(S)
  logic [2:0]  r_nr;            // N(R), from the receiver

  assign ucmd_ready = !t_data && !t_loaded;
  assign tx_ready   = !t_data && !t_loaded && !ucmd_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    logic        d;
    logic        lo;
    logic [2:0]  fp;
    logic [95:0] sr;
    logic [6:0]  left;
    logic [2:0]  ones;
    logic [1:0]  out;
    if (!rst_n) begin
      t_data   <= 1'b0;
      t_loaded <= 1'b0;
      t_fpos   <= '0;
      t_sr     <= '0;
      t_left   <= '0;
      t_ones   <= '0;
      t_ns     <= '0;
      elink_tx <= 2'b11;
    end else begin
      d = t_data; lo = t_loaded; fp = t_fpos; sr = t_sr; left = t_left; ones = t_ones;
      out = '0;
      for (int b = 1; b >= 0; b--) begin
        if (!d) begin
          out[b] = HDLC_FLAG[fp];
          if (fp == 3'd7 && lo) begin
            d    = 1'b1;
            lo   = 1'b0;
            ones = '0;
          end
          fp = fp + 1'b1;
        end else if (ones == 3'd5) begin
          out[b] = 1'b0;             // stuffed bit
          ones   = '0;
          if (left == 0) d = 1'b0;
        end else begin
          out[b] = sr[0];
          ones   = sr[0] ? ones + 1'b1 : 3'd0;
          sr     = sr >> 1;
          left   = left - 1'b1;
          if (left == 0 && ones != 3'd5) d = 1'b0;
        end
      end
      // load the next frame while flags are being sent
      if (!t_data && !t_loaded) begin
        if (ucmd_valid) begin
          sr   = {64'h0, u_frame(ucmd)};
          left = 7'd32;
          lo   = 1'b1;
        end else if (tx_valid) begin
          sr   = i_frame(tx_payload, t_ns, r_nr);
          left = 7'd96;
          lo   = 1'b1;
          t_ns <= t_ns + 1'b1;
        end
      end
      elink_tx <= out;
      t_data   <= d;
      t_loaded <= lo;
      t_fpos   <= fp;
      t_sr     <= sr;
      t_left   <= left;
      t_ones   <= ones;
    end
  end

  // --------------------------------------------------------------- receiver
  logic [102:0] r_sr;     // received (destuffed) bits, newest at bit 102
  logic [6:0]   r_cnt;
  logic [2:0]   r_ones;
  logic         r_in;     // a flag has been seen

  always_ff @(posedge clk or negedge rst_n) begin
    logic [102:0] sr;
    logic [6:0]   cnt;
    logic [2:0]   ones;
    logic         inf;
    logic         v, uv, e;
    logic [95:0]  fi;
    logic [31:0]  fu;
    if (!rst_n) begin
      r_sr       <= '0;
      r_cnt      <= '0;
      r_ones     <= '0;
      r_in       <= 1'b0;
      r_nr       <= '0;
      rx_valid   <= 1'b0;
      rx_u_valid <= 1'b0;
      rx_err     <= 1'b0;
      rx_payload <= '0;
      rx_u_ctrl  <= '0;
    end else begin
      sr = r_sr; cnt = r_cnt; ones = r_ones; inf = r_in;
      v = 1'b0; uv = 1'b0; e = 1'b0;
      for (int b = 1; b >= 0; b--) begin
        if (elink_rx[b]) begin
          if (ones == 3'd6) begin
            inf  = 1'b0;              // abort: seven 1s
            ones = 3'd7;
          end else if (ones != 3'd7) begin
            ones = ones + 1'b1;
            sr   = {1'b1, sr[102:1]};
            if (cnt != 7'h7F) cnt = cnt + 1'b1;
          end
        end else begin
          if (ones == 3'd5) begin
            // stuffed 0: dropped
          end else if (ones == 3'd6) begin
            // flag: the frame (if any) ends here; 7 flag bits were kept
            if (inf && cnt == 7'd103) begin
              fi = sr[95:0];
              if (~crc16_bits(fi[79:0], 80) == fi[95:80] && fi[8] == 1'b0) begin
                v = 1'b1;
                rx_payload <= '{tr: fi[23:16], ch: fi[31:24], cmd: fi[39:32], len: fi[47:40],
                                data: {fi[55:48], fi[63:56], fi[71:64], fi[79:72]}};
                r_nr <= fi[11:9] + 1'b1;
              end else begin
                e = 1'b1;
              end
            end else if (inf && cnt == 7'd39) begin
              fu = sr[95:64];
              if (~crc16_bits({64'h0, fu[15:0]}, 16) == fu[31:16]) begin
                uv = 1'b1;
                rx_u_ctrl <= fu[15:8];
              end else begin
                e = 1'b1;
              end
            end else if (inf && cnt > 7'd7) begin
              e = 1'b1;
            end
            inf = 1'b1;
            cnt = '0;
          end else begin
            sr = {1'b0, sr[102:1]};
            if (cnt != 7'h7F) cnt = cnt + 1'b1;
          end
          ones = '0;
        end
      end
      r_sr       <= sr;
      r_cnt      <= cnt;
      r_ones     <= ones;
      r_in       <= inf;
      rx_valid   <= v;
      rx_u_valid <= uv;
      rx_err     <= e;
    end
  end
endmodule
