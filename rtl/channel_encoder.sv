// channel_encoder: lossless compression of one lane's channels, wire by wire.
//
// For each channel of the lane (CH channels, four per buffer group) the
// encoder reads the channel's TICKS samples out of the chunk buffer in time
// order and codes them:
//   * first difference d[t] = s[t] - s[t-1], with s[-1] = 0, so the first
//     value is the sample itself;
//   * zig-zag code z = 2d for d >= 0, -2d-1 for d < 0 (13 bits);
//   * blocks of BLK = 16 values share one width w = bits of the largest z
//     (0..13); a block is written as the 4-bit w followed by its 16 values in
//     w bits each.
// Bits are appended least significant first into 64-bit words. A channel's
// record is one header word {0xC1, 24'b0, 16'(TICKS), 16'(channel)} followed
// by the packed blocks and always closed by one final word holding the
// remaining 0..63 bits, zero padded; out_last marks that word.
// The document asks for per-wire compression without giving the algorithm;
// this difference plus block-width packing is the simplest lossless coder
// that gains on slowly varying, low-noise waveforms. It is this design's own.
//
// Structure: a loader issues one buffer read per clock and fills one of two
// 16-entry block registers while an emitter packs the other, so a block costs
// 17 clocks and a channel 64*17+1 clocks at TICKS=1024. The emitter stops
// while stall is high (downstream queue nearly full); the loader stops only
// when both block registers are full.
// Interface: start (one clock, while idle) begins a chunk from bank rd_bank_in;
// busy stays high until the last record word is out, then done pulses.
module channel_encoder
  import rce_pkg::*;
#(
  parameter int CH    = 64,
  parameter int TICKS = 1024
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        start,
  input  logic                        bank_in,
  input  logic [15:0]                 base_chan,
  output logic                        rd_en,
  output logic                        rd_bank,
  output logic [$clog2(TICKS)-1:0]    rd_tick,
  output logic [$clog2(CH)-3:0]       rd_grp,
  input  logic [GRP_W-1:0]            rd_data,
  input  logic                        stall,
  output logic                        out_valid,
  output logic [WORD_W-1:0]           out_data,
  output logic                        out_last,
  output logic                        busy,
  output logic                        done
);
  localparam int CW = $clog2(CH);
  localparam int TW = $clog2(TICKS);
  localparam int SW = $clog2(BLK);

  typedef enum logic [1:0] {E_IDLE, E_DATA, E_FLUSH} estate_t;

  typedef struct packed {
    logic [CW-1:0] ch;
    logic          first;
    logic          last;
  } blk_meta_t;

  // ---------------- loader ----------------
  logic          ld_active;
  logic [CW-1:0] lch;
  logic [TW-1:0] lt;
  logic          lbuf;
  logic          issue;

  // return stage
  logic          r_valid;
  logic [CW-1:0] r_ch;
  logic [TW-1:0] r_t;
  logic          r_buf;
  logic [ADC_W-1:0] prev;
  logic [ADC_W-1:0] smp;
  logic signed [ZZ_W-1:0] diff;
  logic [ZZ_W-1:0] zz_new;

  // block registers
  logic [ZZ_W-1:0] blk [2][BLK];
  logic [ZZ_W-1:0] orv [2];
  logic            full [2];
  blk_meta_t       meta [2];

  // ---------------- emitter ----------------
  estate_t       est;
  logic          eb;
  logic [SW-1:0] ei;
  logic [95:0]   acc;
  logic [6:0]    fill;
  logic [WID_W-1:0] w;
  logic [4:0]    nbits;
  logic [16:0]   vbits;
  logic [95:0]   acc_n;
  logic [6:0]    fill_n;
  logic [CW-1:0] fl_ch;     // channel of the record being closed

  assign issue   = ld_active && !full[lbuf];
  assign rd_en   = issue;
  assign rd_tick = lt;
  assign rd_grp  = lch[CW-1:2];

  assign smp    = rd_data[ADC_W*r_ch[1:0] +: ADC_W];
  assign diff   = $signed({1'b0, smp}) - $signed({1'b0, (r_t == '0) ? '0 : prev});
  assign zz_new = zigzag(diff);

  // width and bits of the value the emitter appends this clock
  always_comb begin
    w = bit_width(orv[eb]);
    if (ei == '0) begin
      nbits = 5'(WID_W) + 5'(w);
      vbits = {blk[eb][ei], w};   // z < 2**w by the choice of w
    end else begin
      nbits = 5'(w);
      vbits = 17'(blk[eb][ei]);
    end
    acc_n  = acc | (96'(vbits) << fill);
    fill_n = fill + 7'(nbits);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ld_active <= 1'b0;
      lch       <= '0;
      lt        <= '0;
      lbuf      <= 1'b0;
      rd_bank   <= 1'b0;
      r_valid   <= 1'b0;
      r_ch      <= '0;
      r_t       <= '0;
      r_buf     <= 1'b0;
      prev      <= '0;
      full[0]   <= 1'b0;
      full[1]   <= 1'b0;
      orv[0]    <= '0;
      orv[1]    <= '0;
      meta[0]   <= '0;
      meta[1]   <= '0;
      est       <= E_IDLE;
      eb        <= 1'b0;
      ei        <= '0;
      acc       <= '0;
      fill      <= '0;
      fl_ch     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_last  <= 1'b0;
      busy      <= 1'b0;
      done      <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      done      <= 1'b0;

      // ---- start ----
      if (start && !busy) begin
        busy      <= 1'b1;
        ld_active <= 1'b1;
        rd_bank   <= bank_in;
        lch       <= '0;
        lt        <= '0;
        lbuf      <= 1'b0;
        eb        <= 1'b0;
        est       <= E_IDLE;
      end

      // ---- loader: issue ----
      r_valid <= issue;
      if (issue) begin
        r_ch  <= lch;
        r_t   <= lt;
        r_buf <= lbuf;
        if (lt[SW-1:0] == SW'(BLK - 1)) lbuf <= ~lbuf;
        if (lt == TW'(TICKS - 1)) begin
          lt <= '0;
          if (lch == CW'(CH - 1)) ld_active <= 1'b0;
          else                    lch <= lch + 1'b1;
        end else begin
          lt <= lt + 1'b1;
        end
      end

      // ---- loader: return ----
      if (r_valid) begin
        prev <= smp;
        blk[r_buf][r_t[SW-1:0]] <= zz_new;
        orv[r_buf] <= (r_t[SW-1:0] == '0) ? zz_new : (orv[r_buf] | zz_new);
        if (r_t[SW-1:0] == SW'(BLK - 1)) begin
          full[r_buf] <= 1'b1;
          meta[r_buf] <= '{ch: r_ch, first: (r_t[TW-1:SW] == '0),
                           last: (r_t == TW'(TICKS - 1))};
        end
      end

      // ---- emitter ----
      if (!stall) begin
        unique case (est)
          E_IDLE: begin
            if (full[eb]) begin
              ei  <= '0;
              est <= E_DATA;
              if (meta[eb].first) begin
                out_valid <= 1'b1;
                out_data  <= {TAG_CHANNEL, 24'h0, 16'(TICKS),
                              base_chan + 16'(meta[eb].ch)};
              end
            end
          end
          E_DATA: begin
            if (fill_n >= 7'd64) begin
              out_valid <= 1'b1;
              out_data  <= acc_n[63:0];
              acc       <= acc_n >> 64;
              fill      <= fill_n - 7'd64;
            end else begin
              acc  <= acc_n;
              fill <= fill_n;
            end
            ei <= ei + 1'b1;
            if (ei == SW'(BLK - 1)) begin
              full[eb] <= 1'b0;
              eb       <= ~eb;
              fl_ch    <= meta[eb].ch;
              est      <= meta[eb].last ? E_FLUSH : E_IDLE;
            end
          end
          E_FLUSH: begin
            out_valid <= 1'b1;
            out_last  <= 1'b1;
            out_data  <= acc[63:0];
            acc       <= '0;
            fill      <= '0;
            est       <= E_IDLE;
            if (fl_ch == CW'(CH - 1)) begin
              busy <= 1'b0;
              done <= 1'b1;
            end
          end
          default: est <= E_IDLE;
        endcase
      end
    end
  end

endmodule
