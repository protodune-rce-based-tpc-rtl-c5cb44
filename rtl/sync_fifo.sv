// sync_fifo: single-clock first-in first-out queue.
//
// A circular buffer of DEPTH entries (DEPTH a power of two) with a fill count.
// A word is written when wr_en is high and the queue is not full, and read
// when rd_en is high and it is not empty; rd_data shows the oldest word
// (first-word fall-through). almost_full rises once AFULL or more words are
// held, so a producer with a pipeline can stop in time. Used for the per-lane
// compressor queues, the DMA descriptor queue and the trigger queue.
module sync_fifo #(
  parameter int W     = 64,
  parameter int DEPTH = 16,
  parameter int AFULL = DEPTH - 2
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty,
  output logic         full,
  output logic         almost_full,
  output logic [$clog2(DEPTH):0] count
);
  localparam int AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_wr, do_rd;

  assign empty       = (count == 0);
  assign full        = (count == (AW+1)'(DEPTH));
  assign almost_full = (count >= (AW+1)'(AFULL));
  assign do_wr       = wr_en && !full;
  assign do_rd       = rd_en && !empty;
  assign rd_data     = mem[rp];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

endmodule
