// rce_fsm: run control and chunk sequencing of the RCE data path.
//
// The FSM decides which link frames are stored, in which bank and at which
// tick, and when a filled chunk is handed to the compressor.
//   * With run high, each link starts filling at its next frame (tick 0).
//     A frame is taken (frame_acc high from its frame_start until the next
//     one) while the link has fewer than TICKS ticks in the current chunk.
//   * When every link has delivered TICKS frames the chunk is complete. If
//     the compressor is idle it is started on that bank and the links switch
//     to the other bank; if it is still busy the chunk is dropped and the
//     same bank is filled again (counted in chunks_dropped).
//   * The global timestamp at link 0's first frame of a chunk, the chunk
//     sequence number and the number of frames with errors (saturating at
//     255) become the chunk header.
//   * run low stops taking frames at the next frame boundary; a partial chunk
//     is discarded.
// A link that finishes its chunk before the other links takes no frames
// until the chunk is closed; links are expected to be tick aligned.
// The FSM is named in the document's data-flow diagram, which links it to
// Rx, compression and DMA; what it does in detail is this design's own.
module rce_fsm
  import rce_pkg::*;
#(
  parameter int LINKS = N_LINKS,
  parameter int TICKS = TICKS_PER_CHUNK
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     run,
  input  logic [TS_W-1:0]          ts_now,
  // link receiver events
  input  logic [LINKS-1:0]         frame_start,
  input  logic [LINKS-1:0]         frame_done,
  input  logic [LINKS-1:0]         frame_bad,
  // write control
  output logic [LINKS-1:0]         frame_acc,
  output logic [$clog2(TICKS)-1:0] tick [LINKS],
  output logic                     wr_bank,
  // compressor control
  input  logic                     comp_busy,
  output logic                     comp_start,
  output logic                     comp_bank,
  output logic [15:0]              hdr_seq,
  output logic [TS_W-1:0]          hdr_ts,
  output logic [7:0]               hdr_errs,
  // status
  output logic [31:0]              chunks_done,
  output logic [31:0]              chunks_dropped
);
  localparam int TW = $clog2(TICKS);

  typedef enum logic [1:0] {L_IDLE, L_FILL, L_FULL} lstate_t;

  lstate_t          lst [LINKS];
  logic [LINKS-1:0] all_full;
  logic             chunk_end;
  logic [15:0]      seq;
  logic [TS_W-1:0]  ts_first;
  logic [7:0]       errs;
  logic             err_now;

  always_comb begin
    for (int l = 0; l < LINKS; l++) all_full[l] = (lst[l] == L_FULL);
  end
  assign chunk_end = &all_full;

  // errors reported by the accepted frames this clock
  always_comb begin
    err_now = 1'b0;
    for (int l = 0; l < LINKS; l++)
      if (frame_done[l] && frame_acc[l] && frame_bad[l]) err_now = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int l = 0; l < LINKS; l++) begin
        lst[l]  <= L_IDLE;
        tick[l] <= '0;
      end
      frame_acc      <= '0;
      wr_bank        <= 1'b0;
      comp_start     <= 1'b0;
      comp_bank      <= 1'b0;
      hdr_seq        <= '0;
      hdr_ts         <= '0;
      hdr_errs       <= '0;
      seq            <= '0;
      ts_first       <= '0;
      errs           <= '0;
      chunks_done    <= '0;
      chunks_dropped <= '0;
    end else begin
      comp_start <= 1'b0;
      if (err_now && errs != 8'hFF) errs <= errs + 8'd1;

      for (int l = 0; l < LINKS; l++) begin
        lstate_t       st;
        logic [TW-1:0] tk;
        logic          acc;
        st  = lst[l];
        tk  = tick[l];
        acc = frame_acc[l];
        // a frame closes (possibly in the same clock as the next one opens)
        if (frame_done[l] && acc) begin
          acc = 1'b0;
          if (tk == TW'(TICKS - 1)) st = L_FULL;
          else                      tk = tk + 1'b1;
        end
        if (frame_start[l]) begin
          if (l == 0 && run && (st == L_IDLE || (st == L_FILL && tk == '0)))
            ts_first <= ts_now;
          unique case (st)
            L_IDLE: begin
              acc = run;
              tk  = '0;
              if (run) st = L_FILL;
            end
            L_FILL: begin
              acc = run;
              if (!run) st = L_IDLE;
            end
            default: acc = 1'b0;
          endcase
        end
        lst[l]       <= st;
        tick[l]      <= tk;
        frame_acc[l] <= acc;
      end

      if (chunk_end) begin
        for (int l = 0; l < LINKS; l++) begin
          lst[l]  <= run ? L_FILL : L_IDLE;
          tick[l] <= '0;
        end
        errs <= '0;
        seq  <= seq + 16'd1;
        if (!comp_busy) begin
          comp_start  <= 1'b1;
          comp_bank   <= wr_bank;
          wr_bank     <= ~wr_bank;
          hdr_seq     <= seq;
          hdr_ts      <= ts_first;
          hdr_errs    <= errs;
          chunks_done <= chunks_done + 32'd1;
        end else begin
          chunks_dropped <= chunks_dropped + 32'd1;
        end
      end
    end
  end

endmodule
