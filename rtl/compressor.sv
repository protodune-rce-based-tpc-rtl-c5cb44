// compressor: chunking and compression of all channels of one RCE.
//
// Holds the last complete chunk (TICKS ticks x N_CH channels) and compresses
// it while the next chunk is written. The channels are split into N_LANES
// lanes of N_CH/N_LANES adjacent channels; each lane has its own double-banked
// chunk_buffer and channel_encoder, so the lanes compress in parallel, one
// sample per clock each. Each lane's records go into a small queue and a merge
// stage sends them out whole, taking one channel record from each lane in
// turn (lane 0, 1, ..., N_LANES-1, then lane 0 again). Each queue holds
// Q_DEPTH words, more than the longest record (1 + 64 blocks x 212 bits / 64
// + 1 = 214 words at TICKS = 1024), so a lane can finish a record and start
// the next while the merge stage is still busy with the other lanes; with a
// shorter queue the lanes would wait for each other and run no faster than
// one lane alone. Channel order in the
// output is therefore c, c+CPL, c+2*CPL, ... for c = 0..CPL-1 (CPL = channels
// per lane).
//
// Output chunk layout, 64-bit words:
//   header 0  {0xC0, errs[7:0], seq[15:0], 32'(N_CH)}
//   header 1  timestamp of the chunk's first tick
//   N_CH channel records (see channel_encoder)
//   trailer   {0xCF, 24'b0, 32'(words in the chunk, header and trailer included)}
// with m_last on the trailer. m_valid/m_ready is an AXI-Stream style handshake.
//
// Write side: wr_valid[l] writes group wr_grp[l] (4 channels) of link l at
// tick wr_tick[l] into bank wr_bank. start (while !busy) begins compressing
// bank rd_bank and latches the header fields; busy falls and done pulses
// after the trailer. At TICKS = 1024 and 64 channels per lane a chunk takes
// about 64*1089 clocks, against 1024 ticks x 125 clocks at a 250 MHz clock.
// The block size "256 ch x 1024 ticks" and wire-by-wire parallel compression
// follow the document; the lane count, queues and output layout are this
// design's own.
module compressor
  import rce_pkg::*;
#(
  parameter int N_CH    = 256,
  parameter int LINKS   = N_LINKS,
  parameter int N_LANES = 4,
  parameter int TICKS   = 1024,
  parameter int Q_DEPTH = 256    // per-lane queue: at least one full channel record
) (
  input  logic                        clk,
  input  logic                        rst,
  // chunk writes from the link receivers
  input  logic                        wr_bank,
  input  logic [LINKS-1:0]          wr_valid,
  input  logic [$clog2(TICKS)-1:0]    wr_tick [LINKS],
  input  logic [$clog2(N_CH/LINKS/SAMPLES_PER_GRP)-1:0] wr_grp [LINKS],
  input  logic [GRP_W-1:0]            wr_data [LINKS],
  // chunk start
  input  logic                        start,
  input  logic                        rd_bank,
  input  logic [15:0]                 hdr_seq,
  input  logic [TS_W-1:0]             hdr_ts,
  input  logic [7:0]                  hdr_errs,
  output logic                        busy,
  output logic                        done,
  // compressed stream
  output logic                        m_valid,
  output logic [WORD_W-1:0]           m_data,
  output logic                        m_last,
  input  logic                        m_ready
);
  localparam int CPL  = N_CH / N_LANES;            // channels per lane
  localparam int GPL  = CPL / SAMPLES_PER_GRP;     // groups per lane
  localparam int LPL  = N_LANES / LINKS;         // lanes per link
  localparam int TW   = $clog2(TICKS);
  localparam int GW   = $clog2(GPL);
  localparam int LGW  = $clog2(N_CH / LINKS / SAMPLES_PER_GRP);
  localparam int LW   = (N_LANES > 1) ? $clog2(N_LANES) : 1;

  typedef enum logic [2:0] {M_IDLE, M_H0, M_H1, M_REC, M_TRL} mstate_t;

  // lane signals
  logic             ln_rd_en   [N_LANES];
  logic             ln_rd_bank [N_LANES];
  logic [TW-1:0]    ln_rd_tick [N_LANES];
  logic [GW-1:0]    ln_rd_grp  [N_LANES];
  logic [GRP_W-1:0] ln_rd_data [N_LANES];
  logic             ln_valid   [N_LANES];
  logic [WORD_W-1:0] ln_data   [N_LANES];
  logic             ln_last    [N_LANES];
  logic [N_LANES-1:0] ln_busy;
  logic             q_afull    [N_LANES];
  logic             q_empty    [N_LANES];
  logic [WORD_W:0]  q_out      [N_LANES];
  logic [N_LANES-1:0] q_rd;
  logic             enc_start;

  mstate_t          mst;
  logic [LW-1:0]    rr;
  logic [15:0]      recs;
  logic [31:0]      words;
  logic [15:0]      seq_q;
  logic [TS_W-1:0]  ts_q;
  logic [7:0]       errs_q;
  logic             fire;

  assign enc_start = start && !busy;

  for (genvar l = 0; l < N_LANES; l++) begin : g_lane
    localparam int LINK = l / LPL;
    localparam int SUB  = l % LPL;
    logic wr_hit;
    logic q_full_unused;
    logic [$clog2(Q_DEPTH):0] q_cnt_unused;
    logic enc_done_unused;

    // group g of a link belongs to lane LINK*LPL + g/GPL
    if (LPL > 1) begin : g_sel
      assign wr_hit = wr_valid[LINK] && (wr_grp[LINK][LGW-1:GW] == (LGW-GW)'(SUB));
    end else begin : g_all
      assign wr_hit = wr_valid[LINK];
    end

    chunk_buffer #(.TICKS(TICKS), .GROUPS(GPL), .W(GRP_W)) u_buf (
      .clk     (clk),
      .wr_en   (wr_hit),
      .wr_bank (wr_bank),
      .wr_tick (wr_tick[LINK]),
      .wr_grp  (wr_grp[LINK][GW-1:0]),
      .wr_data (wr_data[LINK]),
      .rd_en   (ln_rd_en[l]),
      .rd_bank (ln_rd_bank[l]),
      .rd_tick (ln_rd_tick[l]),
      .rd_grp  (ln_rd_grp[l]),
      .rd_data (ln_rd_data[l])
    );

    channel_encoder #(.CH(CPL), .TICKS(TICKS)) u_enc (
      .clk       (clk),
      .rst       (rst),
      .start     (enc_start),
      .bank_in   (rd_bank),
      .base_chan (16'(l * CPL)),
      .rd_en     (ln_rd_en[l]),
      .rd_bank   (ln_rd_bank[l]),
      .rd_tick   (ln_rd_tick[l]),
      .rd_grp    (ln_rd_grp[l]),
      .rd_data   (ln_rd_data[l]),
      .stall     (q_afull[l]),
      .out_valid (ln_valid[l]),
      .out_data  (ln_data[l]),
      .out_last  (ln_last[l]),
      .busy      (ln_busy[l]),
      .done      (enc_done_unused)
    );

    sync_fifo #(.W(WORD_W + 1), .DEPTH(Q_DEPTH), .AFULL(Q_DEPTH - 3)) u_q (
      .clk         (clk),
      .rst         (rst),
      .wr_en       (ln_valid[l]),
      .wr_data     ({ln_last[l], ln_data[l]}),
      .rd_en       (q_rd[l]),
      .rd_data     (q_out[l]),
      .empty       (q_empty[l]),
      .full        (q_full_unused),
      .almost_full (q_afull[l]),
      .count       (q_cnt_unused)
    );
  end

  // ---------------- merge ----------------
  always_comb begin
    m_valid = 1'b0;
    m_data  = '0;
    m_last  = 1'b0;
    q_rd    = '0;
    unique case (mst)
      M_H0: begin
        m_valid = 1'b1;
        m_data  = {TAG_CHUNK, errs_q, seq_q, 32'(N_CH)};
      end
      M_H1: begin
        m_valid = 1'b1;
        m_data  = ts_q;
      end
      M_REC: begin
        m_valid  = !q_empty[rr];
        m_data   = q_out[rr][WORD_W-1:0];
        q_rd[rr] = m_ready;
      end
      M_TRL: begin
        m_valid = 1'b1;
        m_last  = 1'b1;
        m_data  = {TAG_TRAILER, 24'h0, words + 32'd1};
      end
      default: ;
    endcase
  end

  assign fire = m_valid && m_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      mst    <= M_IDLE;
      rr     <= '0;
      recs   <= '0;
      words  <= '0;
      seq_q  <= '0;
      ts_q   <= '0;
      errs_q <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (fire) words <= words + 32'd1;
      unique case (mst)
        M_IDLE: if (enc_start) begin
          busy   <= 1'b1;
          seq_q  <= hdr_seq;
          ts_q   <= hdr_ts;
          errs_q <= hdr_errs;
          rr     <= '0;
          recs   <= '0;
          words  <= '0;
          mst    <= M_H0;
        end
        M_H0: if (fire) mst <= M_H1;
        M_H1: if (fire) mst <= M_REC;
        M_REC: if (fire && q_out[rr][WORD_W]) begin
          rr   <= (rr == LW'(N_LANES - 1)) ? '0 : rr + 1'b1;
          recs <= recs + 16'd1;
          if (recs == 16'(N_CH - 1)) mst <= M_TRL;
        end
        M_TRL: if (fire) begin
          busy <= 1'b0;
          done <= 1'b1;
          mst  <= M_IDLE;
        end
        default: mst <= M_IDLE;
      endcase
    end
  end

  // the merge stage may only finish after every lane has finished
  a_lanes_done: assert property (@(posedge clk) disable iff (rst)
                                 (mst == M_TRL) |-> (ln_busy == '0));
  // AXI-Stream rule: data held stable while valid waits for ready
  a_hold: assert property (@(posedge clk) disable iff (rst)
                           (m_valid && !m_ready) |=> (m_valid && $stable(m_data)));

endmodule
