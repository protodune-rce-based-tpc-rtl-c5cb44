// tb_readout_scenarios: the RCE's trigger-rate scenarios run through the DMA
// ring at scaled size.
//
// Each scenario fixes the trigger rate with beam on (4.8 s spill) and off
// (19.2 s), the data kept per trigger (5 ms of 256 channels = 3.84 MB raw,
// divided by the compression factor) and the rate at which the processor
// ships data out over Ethernet. Triggered data enter tx_dma as one chunk per
// trigger; a processor model sends the oldest chunk at the output rate and
// then releases its ring space. The test checks that the ring never
// overflows, that it is empty again by the end of the spill cycle, and that
// the longest wait from trigger to shipped data stays near the latency expected
// for the scenario. A last case at 170 Hz must overflow.
//
// Scaling, so that a 24 s spill cycle simulates in a fraction of a second:
// one 64-bit ring word stands for 40 KiB and one clock for 0.1 ms. The
// 500 MiB ring becomes 12,800 words (RING_BYTES = 102,400), 0.96 MB per
// trigger becomes 24 words (47 at compression factor 2), 50 MB/s becomes
// 0.122 words per clock and a spill cycle 240,000 clocks.
module tb_readout_scenarios;
  import rce_pkg::*;
  localparam int  RING      = 102400;      // 12,800 words
  localparam real WORD_B    = 40960.0;     // real bytes per scaled word
  localparam real CLK_S     = 1.0e-4;      // real seconds per clock
  localparam int  SPILL_ON  = 48000;       // 4.8 s
  localparam int  CYCLE     = 240000;      // 24 s

  logic clk = 1'b0, rst = 1'b1;
  logic s_valid = 1'b0, s_last = 1'b0, s_ready;
  logic [63:0] s_data = '0;
  logic mem_valid, mem_ready = 1'b1;
  logic [31:0] mem_addr;
  logic [63:0] mem_data;
  logic desc_valid, desc_ready = 1'b1;
  logic [31:0] desc_addr, desc_bytes;
  logic release_valid = 1'b0;
  logic [31:0] release_bytes = '0;
  logic [31:0] used_bytes, chunks_written, chunks_dropped;
  int checks = 0, failures = 0;

  always #2 clk = ~clk;

  tx_dma #(.ADDR_W(32), .RING_BASE(32'h0), .RING_BYTES(RING), .DESC_DEPTH(64)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // scenario state shared by the processes below
  real    rate_on, rate_off, out_mbps;
  int     words_per_trig;
  bit     active = 0;
  longint cyc;
  int     pend_words [$];         // chunks waiting to be written (sizes)
  longint trig_time [$];          // trigger clock of every written chunk
  int     desc_len [$];           // descriptors taken by the processor
  longint desc_trig [$];
  real    credit;
  int     sent;                   // words of the oldest chunk already sent
  longint max_lat;
  int     peak;

  // trigger generator: one chunk per trigger
  real phase;
  always @(posedge clk) begin
    if (active) begin
      real r;
      r = ((cyc % CYCLE) < SPILL_ON) ? rate_on : rate_off;
      phase += r * CLK_S;
      if (phase >= 1.0) begin
        phase -= 1.0;
        pend_words.push_back(words_per_trig);
        trig_time.push_back(cyc);
      end
      cyc++;
    end
  end

  // chunk writer into the DMA
  int wleft = 0;
  always @(negedge clk) begin
    if (s_valid && s_ready_q) begin
      wleft--;
      if (wleft == 0) pend_words.pop_front();
    end
    if (wleft == 0 && pend_words.size() > 0) wleft = pend_words[0];
    s_valid = (wleft > 0);
    s_last  = (wleft == 1);
    s_data  = 64'(wleft);
  end
  logic s_ready_q;
  always @(posedge clk) s_ready_q <= s_ready && s_valid;

  // processor: takes descriptors, ships the oldest chunk at out_mbps,
  // releases it when fully sent
  always @(posedge clk) begin
    if (!rst && desc_valid) begin
      desc_len.push_back(int'(desc_bytes / 8));
      desc_trig.push_back(trig_time.pop_front());
    end
    if (!rst && used_bytes > 32'(peak)) peak = int'(used_bytes);
  end
  always @(negedge clk) begin
    release_valid = 1'b0;
    if (active && desc_len.size() > 0) begin
      credit += out_mbps * 1.0e6 * CLK_S / WORD_B;
      while (credit >= 1.0 && sent < desc_len[0]) begin
        credit -= 1.0;
        sent++;
      end
      if (sent == desc_len[0]) begin
        longint lat;
        lat = cyc - desc_trig[0];
        if (lat > max_lat) max_lat = lat;
        release_valid = 1'b1;
        release_bytes = 32'(8 * desc_len[0]);
        void'(desc_len.pop_front());
        void'(desc_trig.pop_front());
        sent = 0;
      end
    end else begin
      credit = 0.0;
    end
  end

  task automatic scenario(input string name, input real on_hz, input real off_hz,
                          input int factor, input real mbps, input real doc_latency_s,
                          input bit expect_overflow);
    real per_trig_mb, peak_mb, lat_s, exp_peak_mb;
    rst = 1'b1;
    repeat (3) @(negedge clk);
    pend_words = {}; trig_time = {}; desc_len = {}; desc_trig = {};
    rate_on = on_hz; rate_off = off_hz; out_mbps = mbps;
    per_trig_mb = 3.84 / factor;
    words_per_trig = int'($ceil(per_trig_mb * 1.0e6 / WORD_B));
    cyc = 0; phase = 0.0; credit = 0.0; sent = 0; max_lat = 0; peak = 0; wleft = 0;
    rst = 1'b0;
    active = 1;
    repeat (CYCLE) @(posedge clk);
    active = 0;
    @(negedge clk);
    peak_mb = real'(peak) / 8.0 * WORD_B / 1.0e6;
    lat_s   = real'(max_lat) * CLK_S;
    exp_peak_mb = (on_hz * per_trig_mb - mbps) * 4.8;
    if (exp_peak_mb < 0.0) exp_peak_mb = 0.0;
    $display("%-28s peak %6.1f MB (expected about %6.1f), longest wait %5.2f s (expected ~%0.0f s), dropped %0d, left %0d bytes",
             name, peak_mb, exp_peak_mb, lat_s, doc_latency_s, chunks_dropped, used_bytes);
    if (expect_overflow) begin
      check(chunks_dropped > 0, {name, ": ring overflow expected"});
    end else begin
      check(chunks_dropped == 0, {name, ": no chunk dropped"});
      check(used_bytes == 0, {name, ": ring drained within the spill cycle"});
      check(lat_s <= doc_latency_s + 1.0, {name, ": latency"});
      check(peak_mb <= exp_peak_mb * 1.1 + 5.0, {name, ": peak occupancy"});
    end
  endtask

  initial begin
    scenario("Steady state 45/45 Hz",        45.0,  45.0, 4,  50.0,  0.0, 0);
    scenario("Max beam-on 140/0 Hz",        140.0,   0.0, 4,  50.0, 10.0, 0);
    scenario("100 Hz + cosmics 100/30 Hz",  100.0,  30.0, 4,  50.0,  6.0, 0);
    scenario("Improved bandwidth 200/75 Hz",200.0,  75.0, 4, 100.0,  4.0, 0);
    scenario("Noisy 65/5 Hz, factor 2",      65.0,   5.0, 2,  50.0, 10.0, 0);
    scenario("Overload 170/0 Hz",           170.0,   0.0, 4,  50.0,  0.0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (7 * (CYCLE + 10)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
