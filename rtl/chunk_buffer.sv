// chunk_buffer: double-buffered chunk store for one compressor lane.
//
// Data arrive tick by tick (all channels of a tick, then the next tick) but
// are compressed wire by wire (all ticks of a channel, then the next channel),
// so a whole chunk of TICKS ticks has to be held and read out transposed.
// Two banks let the receivers fill one chunk while the lane compresses the
// previous one.
//
// Each entry is a group of four adjacent channels (GRP_W = 48 bits), which is
// how the link receiver delivers them; the reader picks one channel out of the
// group. Address = {bank, tick, group}. Write: one group per clock. Read: one
// group per clock, rd_data valid the clock after rd_en and held until the next
// rd_en (synchronous block RAM). Size per lane: 2 x TICKS x GROUPS x 48 bits.
module chunk_buffer #(
  parameter int TICKS  = 1024,
  parameter int GROUPS = 16,
  parameter int W      = 48
) (
  input  logic                      clk,
  input  logic                      wr_en,
  input  logic                      wr_bank,
  input  logic [$clog2(TICKS)-1:0]  wr_tick,
  input  logic [$clog2(GROUPS)-1:0] wr_grp,
  input  logic [W-1:0]              wr_data,
  input  logic                      rd_en,
  input  logic                      rd_bank,
  input  logic [$clog2(TICKS)-1:0]  rd_tick,
  input  logic [$clog2(GROUPS)-1:0] rd_grp,
  output logic [W-1:0]              rd_data
);
  localparam int TW = $clog2(TICKS);
  localparam int GW = $clog2(GROUPS);
  localparam int AW = 1 + TW + GW;

  logic [W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (wr_en) mem[{wr_bank, wr_tick, wr_grp}] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[{rd_bank, rd_tick, rd_grp}];
  end

endmodule
