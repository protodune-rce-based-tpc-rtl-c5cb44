// tb_rce_top_full: three consecutive chunks through the RCE at full size.
//
// rce_top with every parameter at its default: 256 channels on two links,
// chunks of 1024 ticks, 4 compression lanes, a 500 MiB DRAM ring. Sends
// 3 x 1024 ticks without a gap (plus a few ticks of the next chunk), one
// frame per link every 125 clocks (2 MHz at a 250 MHz clock). The third chunk
// uses the noisy test waveform, the coder's hardest case. Each chunk's
// descriptor is taken as it appears; every chunk written to the DRAM model is
// checked word for word against the reference coder, together with its
// sequence number and timestamp. Compressing and writing each chunk must take
// fewer clocks than the next chunk needs to arrive (1024 x 125), so no chunk
// is skipped while the other bank fills.
module tb_rce_top_full;
  import rce_pkg::*;
  import tb_ref_pkg::*;
  localparam int TICKS = 1024, LANES = 4, N_CH = 256;
  localparam logic [31:0] BASE = 32'h2000_0000;
  localparam int SEEDS [3] = '{21, 22, 24};
  localparam int N_CHUNKS = 3;
  localparam int TICK_CLKS = 125;

  logic clk = 1'b0, rst = 1'b1, run = 1'b0;
  logic [1:0] link_valid = '0, link_sof = '0;
  logic [15:0] link_data [2];
  logic sys_tick = 1'b0, tbit_valid = 1'b0, tbit = 1'b0;
  logic mem_valid, mem_ready = 1'b1;
  logic [31:0] mem_addr;
  logic [63:0] mem_data;
  logic desc_valid, desc_ready = 1'b1;
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
  logic [63:0] ts0 [N_CHUNKS];
  longint cyc = 0;
  longint t_start [$], t_desc [$];
  logic [31:0] d_addr [$], d_bytes [$];

  always #2 clk = ~clk;

  rce_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    sys_tick <= (cyc % 5 == 4);
    if (!rst && mem_valid && mem_ready) dram[mem_addr] = mem_data;
    if (!rst && dut.comp_start) t_start.push_back(cyc);
    if (!rst && desc_valid && desc_ready) begin
      d_addr.push_back(desc_addr);
      d_bytes.push_back(desc_bytes);
      t_desc.push_back(cyc);
    end
  end

  task automatic send_tick(input int t);
    logic [11:0] s [128];
    logic [15:0] f [2][98];
    for (int l = 0; l < 2; l++) begin
      for (int c = 0; c < 128; c++) s[c] = adc(128 * l + c, t, SEEDS[(t / TICKS) % N_CHUNKS]);
      make_frame(8'(t), 4'h0, s, f[l]);
    end
    for (int k = 0; k < TICK_CLKS; k++) begin
      @(negedge clk);
      if (t % TICKS == 0 && k == 0 && t / TICKS < N_CHUNKS) ts0[t / TICKS] = ts_now;
      for (int l = 0; l < 2; l++) begin
        link_valid[l] = (k < 98);
        link_sof[l]   = (k == 0);
        link_data[l]  = (k < 98) ? f[l][k] : 16'h0;
      end
    end
  endtask

  initial begin
    word_q_t exp;
    logic [63:0] h1;
    logic [31:0] base;
    longint total = 0;
    link_data[0] = '0; link_data[1] = '0;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    run = 1'b1;
    for (int t = 0; t < N_CHUNKS * TICKS + 8; t++) send_tick(t);
    link_valid = '0;
    while (d_addr.size() < N_CHUNKS) @(negedge clk);
    check(chunks_done == N_CHUNKS && chunks_skipped == 0 && chunks_dropped == 0,
          $sformatf("chunks done %0d skipped %0d dropped %0d", chunks_done, chunks_skipped, chunks_dropped));
    check(t_start.size() == N_CHUNKS, $sformatf("%0d compressions started", t_start.size()));
    base = BASE;
    for (int c = 0; c < N_CHUNKS; c++) begin
      check(d_addr[c] == base, $sformatf("chunk %0d descriptor address %h, expected %h", c, d_addr[c], base));
      h1 = dram[base + 8];
      check(h1 >= ts0[c] && h1 <= ts0[c] + 3,
            $sformatf("chunk %0d timestamp %0d, its first frame at %0d", c, h1, ts0[c]));
      encode_chunk(N_CH, LANES, TICKS, SEEDS[c], c * TICKS, 16'(c), 8'd0, h1, exp);
      check(d_bytes[c] == 32'(8 * exp.size()),
            $sformatf("chunk %0d of %0d bytes, expected %0d", c, d_bytes[c], 8 * exp.size()));
      checks++;
      for (int k = 0; k < exp.size(); k++)
        if (dram[base + 32'(8 * k)] !== exp[k]) begin
          failures++;
          $display("FAIL: chunk %0d word %0d: %h, expected %h", c, k, dram[base + 32'(8 * k)], exp[k]);
          break;
        end
      check(t_desc[c] > t_start[c] && t_desc[c] - t_start[c] < TICKS * TICK_CLKS,
            $sformatf("chunk %0d: compression and DMA took %0d clocks, budget %0d",
                      c, t_desc[c] - t_start[c], TICKS * TICK_CLKS));
      $display("chunk %0d: %0d words for %0d samples (%0.2f bits/sample, factor %0.2f), %0d clocks",
               c, exp.size(), N_CH * TICKS, 64.0 * exp.size() / (N_CH * TICKS),
               12.0 * N_CH * TICKS / (64.0 * exp.size()), t_desc[c] - t_start[c]);
      base += d_bytes[c];
      total += longint'(d_bytes[c]);
    end
    check(used_bytes == 32'(total), "ring usage equals the chunks' size");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((N_CHUNKS * TICKS + 8) * TICK_CLKS + 200000) @(posedge clk);
    failures++;
    $display("watchdog expired: done %0d skipped %0d written %0d dropped %0d descriptors %0d", chunks_done, chunks_skipped, chunks_written, chunks_dropped, d_addr.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
