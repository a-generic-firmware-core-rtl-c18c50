// sca_pkg: types and constants shared by the GBT-SCA driver core.
//
// The SCA payload packet is 64 bits wide and is passed between layers in a
// single clock cycle: TR (transaction id), CH (SCA channel), CMD/ERR (command
// on the way out, error flags on the way back), LEN, and 32 data bits
// (DATA[0] and DATA[1], 16 bits each). The field order and the 64-bit size
// follow the published packet drawing; the 8-bit width of each header field
// is this design's reading of that drawing (two 8-bit fields per 16-bit row).
//
// The ECS command and reply structures, the channel numbering and the
// GBT-SCA command codes below are this design's choices: the ECS packet
// format was left open ("can change in future"), and the command codes are
// those of the GBT-SCA specification as used by this core. Change them here
// if the front-end chip revision uses other codes.
package sca_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int NUM_CH       = 22;  // channels of one GBT-SCA
  localparam int NUM_PROTO    = 7;   // ctrl, spi, gpio, i2c, jtag, adc, dac
  localparam int MAX_DWORDS   = 4;   // data words per ECS command / reply
  localparam int SCA_IDX_W    = 5;   // up to 32 SCAs per core (16+1 used)

  // ---------------------------------------------------- SCA channel numbers
  localparam logic [7:0] CH_CTRL  = 8'h00;
  localparam logic [7:0] CH_SPI   = 8'h01;
  localparam logic [7:0] CH_GPIO  = 8'h02;
  localparam logic [7:0] CH_I2C0  = 8'h03;   // 0x03 .. 0x12: 16 I2C masters
  localparam logic [7:0] CH_JTAG  = 8'h13;
  localparam logic [7:0] CH_ADC   = 8'h14;
  localparam logic [7:0] CH_DAC   = 8'h15;

  typedef enum logic [2:0] {
    PROTO_CTRL = 3'd0,
    PROTO_SPI  = 3'd1,
    PROTO_GPIO = 3'd2,
    PROTO_I2C  = 3'd3,
    PROTO_JTAG = 3'd4,
    PROTO_ADC  = 3'd5,
    PROTO_DAC  = 3'd6
  } proto_e;

  // Which protocol driver serves a channel (valid for ch < NUM_CH).
  function automatic logic [2:0] ch2proto(input logic [7:0] ch);
    if (ch == CH_CTRL)                     return PROTO_CTRL;
    else if (ch == CH_SPI)                 return PROTO_SPI;
    else if (ch == CH_GPIO)                return PROTO_GPIO;
    else if (ch >= CH_I2C0 && ch < CH_JTAG) return PROTO_I2C;
    else if (ch == CH_JTAG)                return PROTO_JTAG;
    else if (ch == CH_ADC)                 return PROTO_ADC;
    else                                   return PROTO_DAC;
  endfunction

  // ------------------------------------------------------ SCA payload packet
  typedef struct packed {
    logic [7:0]  tr;     // transaction id (1..254)
    logic [7:0]  ch;     // channel
    logic [7:0]  cmd;    // command (down) / error flags (up)
    logic [7:0]  len;    // number of data bytes
    logic [31:0] data;   // DATA[0] = data[31:16], DATA[1] = data[15:0]
  } sca_payload_t;

  // One step of a driver's command batch.
  typedef struct packed {
    logic [7:0]  cmd;
    logic [7:0]  len;
    logic [31:0] data;
    logic        capture;   // keep the reply's data word for the ECS reply
  } sca_step_t;

  // ------------------------------------------------------------ ECS packets
  // An ECS command arrives as 2 + nwords 32-bit words:
  //   word 0 : [31:24] tag  [20:16] sca  [15:8] channel  [7:4] op  [2:0] nwords
  //   word 1 : argument (meaning depends on protocol and op)
  //   word 2+: data words (at most MAX_DWORDS)
  typedef struct packed {
    logic [7:0]           tag;
    logic [SCA_IDX_W-1:0] sca;
    logic [7:0]           ch;
    logic [3:0]           op;
    logic [2:0]           nwords;
    logic [31:0]          arg;
    logic [MAX_DWORDS-1:0][31:0] data;
  } ecs_cmd_t;

  // Reply status codes.
  localparam logic [2:0] ST_OK       = 3'd0;
  localparam logic [2:0] ST_INACTIVE = 3'd1;  // SCA or channel not activated
  localparam logic [2:0] ST_TIMEOUT  = 3'd2;  // no reply after all retries
  localparam logic [2:0] ST_SCA_ERR  = 3'd3;  // reply carried error flags
  localparam logic [2:0] ST_BAD_OP   = 3'd4;  // op or channel not supported

  typedef struct packed {
    logic [7:0]           tag;
    logic [SCA_IDX_W-1:0] sca;
    logic [7:0]           ch;
    logic [2:0]           status;
    logic [7:0]           sca_err;
    logic [2:0]           nwords;
    logic [MAX_DWORDS-1:0][31:0] data;
  } ecs_reply_t;

  // Reply memory: one slot of 8 words per tag[3:0].
  //   word 0 : [31:24] tag [23] done [22:20] status [18:16] nwords
  //            [15:8] sca error flags [7:0] channel
  //   word 1 : [4:0] sca
  //   word 2..5 : data words
  localparam int REPLY_SLOT_WORDS = 8;

  function automatic logic [31:0] reply_header(input ecs_reply_t r);
    return {r.tag, 1'b1, r.status, 1'b0, r.nwords, r.sca_err, r.ch};
  endfunction

  // -------------------------------------------------- GBT-SCA command codes
  // Controller
  localparam logic [7:0] CTRL_W_CRB = 8'h02, CTRL_R_CRB = 8'h03;
  localparam logic [7:0] CTRL_W_CRC = 8'h04, CTRL_R_CRC = 8'h05;
  localparam logic [7:0] CTRL_W_CRD = 8'h06, CTRL_R_CRD = 8'h07;
  // GPIO
  localparam logic [7:0] GPIO_W_DATAOUT = 8'h10, GPIO_R_DATAIN = 8'h01;
  localparam logic [7:0] GPIO_W_DIR     = 8'h20, GPIO_R_DIR    = 8'h21;
  // I2C
  localparam logic [7:0] I2C_W_CTRL  = 8'h30;
  localparam logic [7:0] I2C_W_DATA0 = 8'h40;   // +0x10 per data register
  localparam logic [7:0] I2C_R_DATA0 = 8'h41;   // +0x10 per data register
  localparam logic [7:0] I2C_M_7B_W  = 8'hDA, I2C_M_7B_R = 8'hDE;
  localparam logic [7:0] I2C_S_7B_W  = 8'h82, I2C_S_7B_R = 8'h86;
  // SPI
  localparam logic [7:0] SPI_W_MOSI0 = 8'h00;   // +0x10 per word
  localparam logic [7:0] SPI_R_MISO0 = 8'h01;   // +0x10 per word
  localparam logic [7:0] SPI_W_CTRL  = 8'h40, SPI_W_SS = 8'h60, SPI_GO = 8'h72;
  // JTAG
  localparam logic [7:0] JTAG_W_TDO0 = 8'h00;   // +0x20 per word
  localparam logic [7:0] JTAG_R_TDI0 = 8'h01;   // +0x20 per word
  localparam logic [7:0] JTAG_W_TMS0 = 8'h10;
  localparam logic [7:0] JTAG_W_CTRL = 8'h80, JTAG_GO = 8'hA2;
  // ADC
  localparam logic [7:0] ADC_GO = 8'h02, ADC_W_MUX = 8'h50, ADC_R_MUX = 8'h51;
  // DAC
  localparam logic [7:0] DAC_W_A = 8'h10;       // +0x10 per output A..D
  localparam logic [7:0] DAC_R_A = 8'h11;       // +0x10 per output A..D

  // ------------------------------------------------------------------ HDLC
  localparam logic [7:0] HDLC_FLAG    = 8'h7E;
  localparam logic [7:0] HDLC_ADDR    = 8'h00;  // address field is not used
  localparam logic [7:0] HDLC_CONNECT = 8'h2F;  // U-frame: connect (SABM)
  localparam logic [7:0] HDLC_RESET   = 8'h8F;  // U-frame: link reset
  localparam logic [7:0] HDLC_TEST    = 8'hE3;  // U-frame: test
  localparam logic [7:0] HDLC_UA      = 8'h63;  // U-frame: acknowledge

  // CRC-16-CCITT, reflected (polynomial 0x8408), initial value 0xFFFF, over
  // the first n bits of d, bit 0 first. The frame carries its complement.
  function automatic logic [15:0] crc16_bits(input logic [79:0] d, input int n);
    logic [15:0] c;
    logic        fb;
    c = 16'hFFFF;
    for (int i = 0; i < 80; i++) begin
      if (i < n) begin
        fb = c[0] ^ d[i];
        c  = c >> 1;
        if (fb) c = c ^ 16'h8408;
      end
    end
    return c;
  endfunction

endpackage
