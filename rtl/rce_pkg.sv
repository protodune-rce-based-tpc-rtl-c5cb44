// rce_pkg: constants, record formats and small functions shared by the RCE
// readout data path.
//
// The front-end numbers (128 channels per link, 12-bit ADC samples, 2 MHz
// ticks, 2 links per RCE, 1024 ticks per chunk) follow the ProtoDUNE warm
// readout description. The link frame layout, the CRC, the compressed record
// layout and the timing message layout are this design's own choices, because
// those formats are specified elsewhere; each is documented next to its
// constants below.
package rce_pkg;

  // ---------------- front end ----------------
  localparam int ADC_W           = 12;   // bits per ADC sample
  localparam int CH_PER_LINK     = 128;  // one FEB per link
  localparam int N_LINKS         = 2;    // two WIB links per RCE (256 channels)
  localparam int TICKS_PER_CHUNK = 1024; // ticks blocked into one chunk
  localparam int TS_W            = 64;   // global timestamp width

  // ---------------- link frame (own choice) ----------------
  // A frame carries one tick of one link as 16-bit words:
  //   word 0        header {feb_err[3:0], reserved[3:0], seq[7:0]}
  //   words 1..96   128 x 12-bit samples packed LSB first (3 words = 4 samples)
  //   word 97       CRC-16/CCITT (poly 0x1021, init 0xFFFF) over words 0..96
  // The first word of a frame is flagged with sof (a comma character on the
  // serial link).
  localparam int LINK_W           = 16;
  localparam int SAMPLES_PER_GRP  = 4;
  localparam int GRP_W            = SAMPLES_PER_GRP * ADC_W;  // 48 bits = 3 words
  localparam int GRPS_PER_LINK    = CH_PER_LINK / SAMPLES_PER_GRP; // 32
  localparam int FRAME_DATA_WORDS = GRPS_PER_LINK * 3;             // 96
  localparam int FRAME_WORDS      = FRAME_DATA_WORDS + 2;          // 98

  typedef struct packed {
    logic [3:0] feb_err;
    logic [3:0] rsvd;
    logic [7:0] seq;
  } frame_hdr_t;

  typedef struct packed {
    logic len_err;  // frame cut short by the next sof
    logic seq_err;  // sequence number did not follow the previous frame
    logic crc_err;  // CRC word mismatch
    logic feb_err;  // front end flagged an error in the header
  } rx_err_t;

  // ---------------- compressed stream (own choice) ----------------
  localparam int WORD_W = 64;     // DMA word
  localparam int BLK    = 16;     // deltas per bit-width block
  localparam int ZZ_W   = ADC_W + 1; // zig-zag coded first difference
  localparam int WID_W  = 4;      // block width field

  localparam logic [7:0] TAG_CHUNK   = 8'hC0; // chunk header word 0
  localparam logic [7:0] TAG_CHANNEL = 8'hC1; // channel record header
  localparam logic [7:0] TAG_TRAILER = 8'hCF; // chunk trailer

  // ---------------- timing message (own choice) ----------------
  // 88 bits, MSB first: start byte 0xA5, type byte, 64-bit value, check byte
  // (XOR of the type byte and the eight value bytes).
  localparam logic [7:0] MSG_START = 8'hA5;
  localparam logic [7:0] MSG_SYNC  = 8'h01; // load the timestamp counter
  localparam logic [7:0] MSG_TRIG  = 8'h02; // trigger at the given time
  localparam int         MSG_BITS  = 88;

  // One step of CRC-16/CCITT over a 16-bit word, MSB first.
  function automatic logic [15:0] crc16_step(input logic [15:0] crc,
                                             input logic [15:0] d);
    logic [15:0] c;
    c = crc;
    for (int i = 15; i >= 0; i--) begin
      if (c[15] ^ d[i]) c = {c[14:0], 1'b0} ^ 16'h1021;
      else              c = {c[14:0], 1'b0};
    end
    return c;
  endfunction

  // Zig-zag code of a signed first difference: 0,-1,1,-2,... -> 0,1,2,3,...
  function automatic logic [ZZ_W-1:0] zigzag(input logic signed [ZZ_W-1:0] d);
    return d[ZZ_W-1] ? ZZ_W'(~(d << 1)) : ZZ_W'(d << 1);
  endfunction

  // Number of bits needed to hold v (0 for v == 0).
  function automatic logic [WID_W-1:0] bit_width(input logic [ZZ_W-1:0] v);
    logic [WID_W-1:0] w;
    w = '0;
    for (int i = 0; i < ZZ_W; i++) if (v[i]) w = WID_W'(i + 1);
    return w;
  endfunction

  // XOR check byte of a timing message.
  function automatic logic [7:0] msg_check(input logic [7:0] typ,
                                           input logic [63:0] val);
    logic [7:0] c;
    c = typ;
    for (int i = 0; i < 8; i++) c ^= val[8*i +: 8];
    return c;
  endfunction

endpackage
