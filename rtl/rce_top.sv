// rce_top: programmable-logic data path of one RCE (Reconfigurable Computing
// Element) of the ProtoDUNE TPC warm readout.
//
// One RCE takes two WIB links, each carrying one front-end board of 128 wires
// sampled with 12 bits at 2 MHz, and turns them into compressed chunks in the
// processor's DRAM:
//   link -> wib_frame_rx (deserialize, error check)
//        -> compressor   (block into chunks of TICKS ticks x 256 channels,
//                         compress wire by wire in N_LANES parallel lanes)
//        -> tx_dma       (write into a DRAM ring, one descriptor per chunk)
// rce_fsm runs the chunk sequence and stamps each chunk with the global
// timestamp kept by trigger_listener, which also decodes triggers from the
// timing stream and queues them for the processor. The processor software
// (not part of this RTL) keeps chunks until a trigger selects them or they
// time out, sends selected data to the back end over TCP/IP and returns the
// buffer space through release_*.
//
// Interface: link_* per link, one 16-bit word per clock at most (the 8b/10b
// decoded transceiver output, sof on the first word of a frame); tbit_* the
// recovered timing data bits, sys_tick the 50 MHz system clock as a clock
// enable; mem_* the write port to DRAM; desc_* chunk descriptors; trig_*
// trigger times; status counters. Everything runs on one clock, clk; at the
// assumed 250 MHz a 2 MHz tick lasts 125 clocks.
// The block split follows the document's RCE data-flow diagram; widths,
// formats and the clocking are this design's own choices (see rce_pkg).
module rce_top
  import rce_pkg::*;
#(
  parameter int          TICKS      = TICKS_PER_CHUNK,
  parameter int          N_LANES    = 4,
  parameter logic [31:0] RING_BASE  = 32'h2000_0000,
  parameter int          RING_BYTES = 500 * 1024 * 1024
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                run,
  // WIB links
  input  logic [N_LINKS-1:0]  link_valid,
  input  logic [N_LINKS-1:0]  link_sof,
  input  logic [LINK_W-1:0]   link_data [N_LINKS],
  // timing stream from the DTM fan-out
  input  logic                sys_tick,
  input  logic                tbit_valid,
  input  logic                tbit,
  // DRAM write port
  output logic                mem_valid,
  output logic [31:0]         mem_addr,
  output logic [WORD_W-1:0]   mem_data,
  input  logic                mem_ready,
  // to / from the processor
  output logic                desc_valid,
  output logic [31:0]         desc_addr,
  output logic [31:0]         desc_bytes,
  input  logic                desc_ready,
  input  logic                release_valid,
  input  logic [31:0]         release_bytes,
  output logic                trig_valid,
  output logic [TS_W-1:0]     trig_ts,
  input  logic                trig_ready,
  // status
  output logic [TS_W-1:0]     ts_now,
  output logic [31:0]         frames_ok   [N_LINKS],
  output logic [31:0]         frames_bad  [N_LINKS],
  output logic [31:0]         chunks_done,
  output logic [31:0]         chunks_skipped,
  output logic [31:0]         chunks_written,
  output logic [31:0]         chunks_dropped,
  output logic [31:0]         used_bytes,
  output logic [31:0]         trigs,
  output logic [31:0]         trig_lost,
  output logic [31:0]         msg_errs
);
  localparam int N_CH = N_LINKS * CH_PER_LINK;
  localparam int TW   = $clog2(TICKS);

  logic [N_LINKS-1:0] f_start, f_done, f_bad, f_acc, g_valid, wr_valid;
  logic [4:0]         g_idx  [N_LINKS];
  logic [GRP_W-1:0]   g_data [N_LINKS];
  rx_err_t            f_err  [N_LINKS];
  logic [TW-1:0]      tick   [N_LINKS];
  logic               wr_bank, comp_start, comp_bank, comp_busy, comp_done_unused;
  logic [15:0]        hdr_seq;
  logic [TS_W-1:0]    hdr_ts;
  logic [7:0]         hdr_errs;
  logic               c_valid, c_last, c_ready;
  logic [WORD_W-1:0]  c_data;
  logic [31:0]        syncs_unused;

  for (genvar l = 0; l < N_LINKS; l++) begin : g_rx
    wib_frame_rx u_rx (
      .clk         (clk),
      .rst         (rst),
      .in_valid    (link_valid[l]),
      .in_sof      (link_sof[l]),
      .in_data     (link_data[l]),
      .frame_start (f_start[l]),
      .grp_valid   (g_valid[l]),
      .grp_idx     (g_idx[l]),
      .grp_data    (g_data[l]),
      .frame_done  (f_done[l]),
      .frame_err   (f_err[l]),
      .frames_ok   (frames_ok[l]),
      .frames_bad  (frames_bad[l])
    );
    assign f_bad[l]    = |f_err[l];
    assign wr_valid[l] = g_valid[l] && f_acc[l];
  end

  trigger_listener u_trig (
    .clk        (clk),
    .rst        (rst),
    .sys_tick   (sys_tick),
    .bit_valid  (tbit_valid),
    .bit_in     (tbit),
    .ts_now     (ts_now),
    .trig_valid (trig_valid),
    .trig_ts    (trig_ts),
    .trig_ready (trig_ready),
    .syncs      (syncs_unused),
    .trigs      (trigs),
    .msg_errs   (msg_errs),
    .trig_lost  (trig_lost)
  );

  rce_fsm #(.LINKS(N_LINKS), .TICKS(TICKS)) u_fsm (
    .clk            (clk),
    .rst            (rst),
    .run            (run),
    .ts_now         (ts_now),
    .frame_start    (f_start),
    .frame_done     (f_done),
    .frame_bad      (f_bad),
    .frame_acc      (f_acc),
    .tick           (tick),
    .wr_bank        (wr_bank),
    .comp_busy      (comp_busy),
    .comp_start     (comp_start),
    .comp_bank      (comp_bank),
    .hdr_seq        (hdr_seq),
    .hdr_ts         (hdr_ts),
    .hdr_errs       (hdr_errs),
    .chunks_done    (chunks_done),
    .chunks_dropped (chunks_skipped)
  );

  compressor #(.N_CH(N_CH), .LINKS(N_LINKS), .N_LANES(N_LANES), .TICKS(TICKS)) u_comp (
    .clk      (clk),
    .rst      (rst),
    .wr_bank  (wr_bank),
    .wr_valid (wr_valid),
    .wr_tick  (tick),
    .wr_grp   (g_idx),
    .wr_data  (g_data),
    .start    (comp_start),
    .rd_bank  (comp_bank),
    .hdr_seq  (hdr_seq),
    .hdr_ts   (hdr_ts),
    .hdr_errs (hdr_errs),
    .busy     (comp_busy),
    .done     (comp_done_unused),
    .m_valid  (c_valid),
    .m_data   (c_data),
    .m_last   (c_last),
    .m_ready  (c_ready)
  );

  tx_dma #(.ADDR_W(32), .RING_BASE(RING_BASE), .RING_BYTES(RING_BYTES)) u_dma (
    .clk            (clk),
    .rst            (rst),
    .s_valid        (c_valid),
    .s_data         (c_data),
    .s_last         (c_last),
    .s_ready        (c_ready),
    .mem_valid      (mem_valid),
    .mem_addr       (mem_addr),
    .mem_data       (mem_data),
    .mem_ready      (mem_ready),
    .desc_valid     (desc_valid),
    .desc_addr      (desc_addr),
    .desc_bytes     (desc_bytes),
    .desc_ready     (desc_ready),
    .release_valid  (release_valid),
    .release_bytes  (release_bytes),
    .used_bytes     (used_bytes),
    .chunks_written (chunks_written),
    .chunks_dropped (chunks_dropped)
  );

endmodule
