// tx_dma: moves the compressed chunk stream into a DRAM ring buffer.
//
// The processor's memory holds a ring of RING_BYTES bytes at RING_BASE
// (default 500 MB, the DRAM the readout can use as its trigger buffer). Each
// 64-bit stream word is written to the next ring address. When a chunk's
// last word has been written, a descriptor {start address, length in bytes}
// is queued for the processor, which keeps the chunk until a trigger selects
// it or a timeout discards it, and then returns its bytes with release_valid /
// release_bytes. A chunk may wrap from the end of the ring to its start.
//
// If the ring has no room for a word, the chunk being written is dropped: the
// rest of it is consumed and discarded, the write offset goes back to the
// chunk's start and chunks_dropped counts it. A chunk's last word waits while
// the descriptor queue is full, so no descriptor is ever lost.
//
// Interfaces: s_* is an AXI-Stream style input (s_last closes a chunk).
// mem_* is a simple posted write port, one word per mem_valid && mem_ready,
// standing in for the AXI write channel to the processor's memory
// controller. Throughput is one word per clock while mem_ready is high.
// DMA into DRAM and the 500 MB buffer follow the document; the ring and
// descriptor scheme is this design's own.
module tx_dma
  import rce_pkg::*;
#(
  parameter int          ADDR_W     = 32,
  parameter logic [31:0] RING_BASE  = 32'h2000_0000,
  parameter int          RING_BYTES = 500 * 1024 * 1024,
  parameter int          DESC_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst,
  // compressed stream
  input  logic              s_valid,
  input  logic [WORD_W-1:0] s_data,
  input  logic              s_last,
  output logic              s_ready,
  // memory write port
  output logic              mem_valid,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [WORD_W-1:0] mem_data,
  input  logic              mem_ready,
  // chunk descriptors to the processor
  output logic              desc_valid,
  output logic [ADDR_W-1:0] desc_addr,
  output logic [31:0]       desc_bytes,
  input  logic              desc_ready,
  // buffer space returned by the processor
  input  logic              release_valid,
  input  logic [31:0]       release_bytes,
  // status
  output logic [31:0]       used_bytes,
  output logic [31:0]       chunks_written,
  output logic [31:0]       chunks_dropped
);
  localparam int DW = ADDR_W + 32;

  typedef enum logic {D_WRITE, D_DROP} dstate_t;

  dstate_t          st;
  logic [31:0]      off;          // ring offset of the next word
  logic [31:0]      chunk_off;    // ring offset of the current chunk's start
  logic [31:0]      chunk_bytes;  // bytes of the current chunk written so far
  logic             space;
  logic             desc_full;
  logic             desc_empty;
  logic             wr_fire;
  logic             drop_now;
  logic             push_desc;
  logic [DW-1:0]    desc_out;
  logic             q_afull_unused;
  logic [$clog2(DESC_DEPTH):0] q_cnt_unused;
  logic [31:0]      off_next;

  assign space    = (used_bytes + 32'd8 <= 32'(RING_BYTES));
  assign mem_valid = (st == D_WRITE) && s_valid && space && !(s_last && desc_full);
  assign mem_addr  = ADDR_W'(RING_BASE) + ADDR_W'(off);
  assign mem_data  = s_data;
  assign wr_fire   = mem_valid && mem_ready;
  assign drop_now  = (st == D_WRITE) && s_valid && !space;
  assign push_desc = wr_fire && s_last;
  assign s_ready   = (st == D_DROP) || wr_fire || drop_now;
  assign off_next  = (off + 32'd8 == 32'(RING_BYTES)) ? 32'd0 : off + 32'd8;

  sync_fifo #(.W(DW), .DEPTH(DESC_DEPTH)) u_desc (
    .clk         (clk),
    .rst         (rst),
    .wr_en       (push_desc),
    .wr_data     ({ADDR_W'(RING_BASE) + ADDR_W'(chunk_off), chunk_bytes + 32'd8}),
    .rd_en       (desc_ready),
    .rd_data     (desc_out),
    .empty       (desc_empty),
    .full        (desc_full),
    .almost_full (q_afull_unused),
    .count       (q_cnt_unused)
  );
  assign desc_valid = !desc_empty;
  assign desc_addr  = desc_out[DW-1:32];
  assign desc_bytes = desc_out[31:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      st             <= D_WRITE;
      off            <= '0;
      chunk_off      <= '0;
      chunk_bytes    <= '0;
      used_bytes     <= '0;
      chunks_written <= '0;
      chunks_dropped <= '0;
    end else begin
      used_bytes <= used_bytes
                  + (wr_fire ? 32'd8 : 32'd0)
                  - (release_valid ? release_bytes : 32'd0)
                  - (drop_now ? chunk_bytes : 32'd0);
      if (wr_fire) begin
        off <= off_next;
        if (s_last) begin
          chunk_off      <= off_next;
          chunk_bytes    <= '0;
          chunks_written <= chunks_written + 32'd1;
        end else begin
          chunk_bytes <= chunk_bytes + 32'd8;
        end
      end
      if (drop_now) begin
        off            <= chunk_off;
        chunk_bytes    <= '0;
        chunks_dropped <= chunks_dropped + 32'd1;
        if (!s_last) st <= D_DROP;
      end
      if (st == D_DROP && s_valid && s_last) st <= D_WRITE;
    end
  end

  a_mem_hold: assert property (@(posedge clk) disable iff (rst)
                               (mem_valid && !mem_ready) |=> mem_valid && $stable(mem_addr));
  a_no_overfill: assert property (@(posedge clk) disable iff (rst)
                                  used_bytes <= 32'(RING_BYTES));

endmodule
