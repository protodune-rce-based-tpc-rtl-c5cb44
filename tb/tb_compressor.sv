// tb_compressor: self-checking test of the chunk compressor.
//
// A reduced configuration (32 channels on 2 links, 4 lanes, 32 ticks) is
// written through the link write ports exactly as the receivers deliver data
// (tick by tick, groups of four channels). Chunk A is compressed from bank 0
// while chunk B is written into bank 1; chunk B is then compressed with the
// consumer applying random back-pressure. The whole output stream (headers,
// records in lane rotation order, trailer, m_last) is compared with the
// reference model. The unstalled chunk must finish within the lane rate.
module tb_compressor;
  import rce_pkg::*;
  import tb_ref_pkg::*;
  localparam int N_CH = 32, LINKS = 2, LANES = 4, TICKS = 32;
  localparam int CPL = N_CH / LANES;

  logic clk = 1'b0, rst = 1'b1;
  logic wr_bank = 1'b0;
  logic [LINKS-1:0] wr_valid = '0;
  logic [4:0] wr_tick [LINKS];
  logic [1:0] wr_grp [LINKS];
  logic [47:0] wr_data [LINKS];
  logic start = 1'b0, rd_bank = 1'b0;
  logic [15:0] hdr_seq = '0;
  logic [63:0] hdr_ts = '0;
  logic [7:0] hdr_errs = '0;
  logic busy, done, m_valid, m_last, m_ready = 1'b1;
  logic [63:0] m_data;
  int checks = 0, failures = 0;
  word_q_t expq;
  bit rand_ready = 0;
  int nwords;

  always #2 clk = ~clk;

  compressor #(.N_CH(N_CH), .LINKS(LINKS), .N_LANES(LANES), .TICKS(TICKS)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) if (rand_ready) m_ready = ($urandom_range(0, 3) != 0);

  always @(posedge clk) begin
    if (!rst && m_valid && m_ready) begin
      nwords++;
      if (expq.size() == 0) check(0, "unexpected output word");
      else begin
        logic [63:0] e;
        e = expq.pop_front();
        check(m_data == e, $sformatf("word %0d: %h, expected %h", nwords, m_data, e));
        check(m_last == (expq.size() == 0), "m_last on the trailer only");
      end
    end
  end

  // write one chunk: both links in parallel, one group per clock
  task automatic write_chunk(input bit bank, input int seed, input int tick0);
    for (int t = 0; t < TICKS; t++)
      for (int g = 0; g < N_CH / LINKS / 4; g++) begin
        @(negedge clk);
        wr_bank = bank;
        for (int l = 0; l < LINKS; l++) begin
          int c;
          c = l * (N_CH / LINKS) + 4 * g;
          wr_valid[l] = 1'b1;
          wr_tick[l]  = 5'(t);
          wr_grp[l]   = 2'(g);
          wr_data[l]  = {adc(c + 3, tick0 + t, seed), adc(c + 2, tick0 + t, seed),
                         adc(c + 1, tick0 + t, seed), adc(c, tick0 + t, seed)};
        end
      end
    @(negedge clk);
    wr_valid = '0;
  endtask

  task automatic start_chunk(input bit bank, input int seed, input int tick0,
                             input logic [15:0] seq, input logic [7:0] errs,
                             input logic [63:0] ts);
    encode_chunk(N_CH, LANES, TICKS, seed, tick0, seq, errs, ts, expq);
    nwords = 0;
    @(negedge clk);
    start = 1'b1; rd_bank = bank; hdr_seq = seq; hdr_errs = errs; hdr_ts = ts;
    @(negedge clk);
    start = 1'b0;
  endtask

  initial begin
    int cyc, total;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    write_chunk(0, 2, 0);
    start_chunk(0, 2, 0, 16'd7, 8'd3, 64'h0123_4567_89AB_CDEF);
    total = expq.size();
    fork
      write_chunk(1, 3, TICKS);
      begin
        cyc = 1;
        while (!done) begin @(negedge clk); cyc++; end
      end
    join
    check(expq.size() == 0, $sformatf("chunk A: %0d words missing", expq.size()));
    check(nwords == total, "chunk A word count");
    check(cyc <= CPL * TICKS * 18 / 16 + CPL * 4 + 10,
          $sformatf("chunk A took %0d clocks", cyc));
    check(!busy, "busy after done");
    rand_ready = 1;
    start_chunk(1, 3, TICKS, 16'd8, 8'd0, 64'd99);
    total = expq.size();
    while (!done) @(negedge clk);
    repeat (2) @(negedge clk);
    check(expq.size() == 0, $sformatf("chunk B: %0d words missing", expq.size()));
    check(nwords == total, "chunk B word count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
