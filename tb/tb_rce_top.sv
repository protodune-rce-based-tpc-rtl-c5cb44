// tb_rce_top: end-to-end test of one RCE at reduced chunk length.
//
// Runs the whole data path with 32-tick chunks (all else at full size: 256
// channels on two links, 4 lanes) and a DRAM ring of 20 KiB, so that every
// mechanism of the design happens within a short run:
//   * frames on both links, 98 words per 125-clock tick, from reference
//     waveforms; a timing stream with a sync message and triggers;
//   * a behavioural DRAM and processor: each descriptor is read back from
//     the DRAM model and compared word for word with the reference chunk,
//     then its space is released after a delay;
//   * a frame with a CRC error (must appear in the chunk header);
//   * DRAM back-pressure long enough to keep the compressor busy past the
//     end of the next chunk (chunk skipped by the FSM);
//   * the processor holding its buffers until the ring is full (chunk
//     dropped by the DMA).
// Each mechanism is counted and must have happened at least once.
module tb_rce_top;
  import rce_pkg::*;
  import tb_ref_pkg::*;
  localparam int TICKS = 32, LANES = 4, N_CH = 256;
  localparam logic [31:0] BASE = 32'h2000_0000;
  localparam int RING = 20 * 1024;
  localparam int SEED = 11;
  localparam int N_TICKS = 15 * TICKS;
  localparam int TICK_CLKS = 125;

  logic clk = 1'b0, rst = 1'b1, run = 1'b0;
  logic [1:0] link_valid = '0, link_sof = '0;
  logic [15:0] link_data [2];
  logic sys_tick = 1'b0, tbit_valid = 1'b0, tbit = 1'b0;
  logic mem_valid, mem_ready = 1'b1;
  logic [31:0] mem_addr;
  logic [63:0] mem_data;
  logic desc_valid, desc_ready;
  logic [31:0] desc_addr, desc_bytes;
  logic release_valid = 1'b0;
  logic [31:0] release_bytes = '0;
  logic trig_valid, trig_ready = 1'b0;
  logic [63:0] trig_ts, ts_now;
  logic [31:0] frames_ok [2], frames_bad [2];
  logic [31:0] chunks_done, chunks_skipped, chunks_written, chunks_dropped;
  logic [31:0] used_bytes, trigs, trig_lost, msg_errs;

  int checks = 0, failures = 0;
  logic [63:0] dram [logic [31:0]];
  logic [63:0] ts_at_tick [int];
  bit  hold_release = 0;
  int  rel_q [$];
  int  n_verified = 0, n_err_chunks = 0, n_stall = 0, n_trig = 0;
  int  bad_tick = 2 * TICKS + 5;

  always #2 clk = ~clk;

  rce_top #(.TICKS(TICKS), .N_LANES(LANES), .RING_BASE(BASE), .RING_BYTES(RING)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // 50 MHz system clock as an enable: one clock in five
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    sys_tick <= (cyc % 5 == 4);
  end

  // DRAM model
  always @(posedge clk) begin
    if (!rst && mem_valid && mem_ready) dram[mem_addr] = mem_data;
    if (!rst && mem_valid && !mem_ready) n_stall++;
  end

  // processor model: check each chunk, release its space later
  assign desc_ready = 1'b1;
  always @(posedge clk) begin
    if (!rst && desc_valid) begin
      word_q_t exp;
      logic [63:0] h0, h1;
      int seq, t0, nw;
      h0  = dram[desc_addr];
      h1  = dram[BASE + ((desc_addr - BASE + 8) % RING)];
      seq = int'(h0[47:32]);
      t0  = seq * TICKS;
      check(ts_at_tick.exists(t0) && h1 >= ts_at_tick[t0] && h1 <= ts_at_tick[t0] + 3,
            $sformatf("chunk %0d timestamp %0d", seq, h1));
      encode_chunk(N_CH, LANES, TICKS, SEED, t0, 16'(seq),
                   (t0 <= bad_tick && bad_tick < t0 + TICKS) ? 8'd1 : 8'd0, h1, exp);
      nw = int'(desc_bytes / 8);
      check(nw == exp.size(), $sformatf("chunk %0d: %0d words, expected %0d", seq, nw, exp.size()));
      for (int k = 0; k < nw && k < exp.size(); k++) begin
        logic [63:0] got;
        got = dram[BASE + ((desc_addr - BASE + 8 * k) % RING)];
        if (got != exp[k]) begin
          check(0, $sformatf("chunk %0d word %0d: %h, expected %h", seq, k, got, exp[k]));
          break;
        end
      end
      checks++;
      n_verified++;
      if (h0[55:48] != 0) n_err_chunks++;
      rel_q.push_back(int'(desc_bytes));
    end
  end

  always @(negedge clk) begin
    release_valid = 1'b0;
    if (!hold_release && rel_q.size() > 0 && cyc % 50 == 0) begin
      release_valid = 1'b1;
      release_bytes = 32'(rel_q.pop_front());
    end
  end

  // trigger queue reader
  always @(negedge clk) begin
    trig_ready = 1'b0;
    if (trig_valid) begin
      check(trig_ts == 64'(1000 + 1000 * n_trig), $sformatf("trigger time %0d", trig_ts));
      n_trig++;
      trig_ready = 1'b1;
    end
  end

  task automatic timing_msg(input logic [7:0] t, input logic [63:0] v);
    logic [87:0] m;
    m = {8'hA5, t, v, msg_check(t, v)};
    for (int i = 87; i >= 0; i--) begin
      @(negedge clk); tbit_valid = 1'b1; tbit = m[i];
      @(negedge clk); tbit_valid = 1'b0;
    end
  endtask

  // both links, one frame per tick
  task automatic send_tick(input int t);
    logic [11:0] s [128];
    logic [15:0] f [2][98];
    for (int l = 0; l < 2; l++) begin
      for (int c = 0; c < 128; c++) s[c] = adc(128 * l + c, t, SEED);
      make_frame(8'(t), 4'h0, s, f[l]);
    end
    if (t == bad_tick) f[1][97] = f[1][97] ^ 16'h0001;
    for (int k = 0; k < TICK_CLKS; k++) begin
      @(negedge clk);
      if (k == 0) ts_at_tick[t] = ts_now;
      for (int l = 0; l < 2; l++) begin
        link_valid[l] = (k < 98);
        link_sof[l]   = (k == 0);
        link_data[l]  = (k < 98) ? f[l][k] : 16'h0;
      end
    end
  endtask

  initial begin
    link_data[0] = '0; link_data[1] = '0;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    timing_msg(8'h01, 64'd500);
    check(ts_now >= 64'd500 && ts_now < 64'd510, "timestamp loaded by sync");
    run = 1'b1;
    fork
      for (int t = 0; t < N_TICKS; t++) send_tick(t);
      begin
        // triggers
        repeat (3000) @(negedge clk);
        for (int i = 0; i < 3; i++) timing_msg(8'h02, 64'(1000 + 1000 * i));
      end
      begin
        // long DRAM back-pressure from tick 100
        repeat (100 * TICK_CLKS) @(negedge clk);
        mem_ready = 1'b0;
        repeat (45 * TICK_CLKS) @(negedge clk);
        mem_ready = 1'b1;
      end
      begin
        // processor holds its buffers from tick 200 to tick 330
        repeat (200 * TICK_CLKS) @(negedge clk);
        hold_release = 1;
        repeat (130 * TICK_CLKS) @(negedge clk);
        hold_release = 0;
      end
    join
    link_valid = '0;
    repeat (6000) @(negedge clk);
    $display("chunks verified %0d, with frame errors %0d, skipped (compressor busy) %0d, dropped (ring full) %0d, DRAM stall clocks %0d, triggers %0d",
             n_verified, n_err_chunks, chunks_skipped, chunks_dropped, n_stall, n_trig);
    check(n_verified >= 6, "chunks verified");
    check(n_err_chunks == 1, "chunk flagged with a frame error");
    check(frames_bad[1] == 1 && frames_bad[0] == 0, "one bad frame counted");
    check(chunks_skipped >= 1, "chunk skipped while compressor busy");
    check(chunks_dropped >= 1, "chunk dropped on full ring");
    check(n_stall >= 1, "DRAM back-pressure");
    check(n_trig == 3 && trigs == 3, "triggers delivered");
    check(chunks_written == 32'(n_verified), "every written chunk verified");
    check(chunks_done + chunks_skipped == 32'(N_TICKS / TICKS), "every chunk accounted for");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_TICKS * TICK_CLKS + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
