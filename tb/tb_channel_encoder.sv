// tb_channel_encoder: self-checking test of one compression lane.
//
// A lane of 8 channels and 64 ticks is loaded into a chunk_buffer bank with
// reference waveforms, then encoded. Every output word is compared with the
// reference coder (tb_ref_pkg::encode_channel), with out_last on the last
// word of each record. The run is repeated with random stalls and on the
// other bank with a noisy waveform. The clock count of an unstalled chunk is
// checked against a rate of at most 18 clocks per 16 samples plus 4 per
// channel, which at full size (64 channels x 1024 ticks, 250 MHz) is well
// inside the 512 us a chunk takes to arrive.
module tb_channel_encoder;
  import rce_pkg::*;
  import tb_ref_pkg::*;
  localparam int CH = 8, TICKS = 64;

  logic clk = 1'b0, rst = 1'b1;
  logic start = 1'b0, bank_in = 1'b0, stall = 1'b0;
  logic [15:0] base_chan = 16'd40;
  logic rd_en, rd_bank;
  logic [5:0] rd_tick;
  logic [0:0] rd_grp;
  logic [47:0] rd_data;
  logic out_valid, out_last, busy, done;
  logic [63:0] out_data;
  logic wr_en = 1'b0, wr_bank = 1'b0;
  logic [5:0] wr_tick = '0;
  logic [0:0] wr_grp = '0;
  logic [47:0] wr_data = '0;
  int checks = 0, failures = 0;
  word_q_t expq;
  bit lastq [$];
  int nrec;
  bit rand_stall = 0;

  always #2 clk = ~clk;

  chunk_buffer #(.TICKS(TICKS), .GROUPS(CH / 4), .W(48)) u_mem (
    .clk, .wr_en, .wr_bank, .wr_tick, .wr_grp, .wr_data,
    .rd_en, .rd_bank, .rd_tick, .rd_grp, .rd_data);

  channel_encoder #(.CH(CH), .TICKS(TICKS)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (!rst && rand_stall) stall <= ($urandom_range(0, 2) == 0);

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      if (expq.size() == 0) check(0, "unexpected output word");
      else begin
        logic [63:0] e;
        bit el;
        e  = expq.pop_front();
        el = lastq.pop_front();
        check(out_data == e, $sformatf("word %h, expected %h", out_data, e));
        check(out_last == el, "out_last on the last word of each record only");
        if (out_last) nrec++;
      end
    end
  end

  task automatic load(input bit bank, input int seed);
    for (int t = 0; t < TICKS; t++)
      for (int g = 0; g < CH / 4; g++) begin
        @(negedge clk);
        wr_en = 1'b1; wr_bank = bank; wr_tick = 6'(t); wr_grp = 1'(g);
        wr_data = {adc(40 + 4*g + 3, t, seed), adc(40 + 4*g + 2, t, seed),
                   adc(40 + 4*g + 1, t, seed), adc(40 + 4*g, t, seed)};
      end
    @(negedge clk); wr_en = 1'b0;
  endtask

  task automatic run(input bit bank, input int seed, output int cycles);
    logic [11:0] wave [$];
    expq = {};
    lastq = {};
    for (int c = 0; c < CH; c++) begin
      wave = {};
      for (int t = 0; t < TICKS; t++) wave.push_back(adc(40 + c, t, seed));
      encode_channel(wave, 40 + c, expq);
      while (lastq.size() < expq.size() - 1) lastq.push_back(1'b0);
      lastq.push_back(1'b1);
    end
    nrec = 0;
    @(negedge clk); start = 1'b1; bank_in = bank;
    @(negedge clk); start = 1'b0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    repeat (2) @(negedge clk);
    check(expq.size() == 0, $sformatf("%0d words missing", expq.size()));
    check(nrec == CH, $sformatf("%0d records, expected %0d", nrec, CH));
    check(!busy, "busy after done");
  endtask

  initial begin
    int cyc;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    load(0, 1);
    run(0, 1, cyc);
    // rate: at most 18 clocks per 16 samples and 4 per channel
    check(cyc <= CH * TICKS * 18 / 16 + CH * 4,
          $sformatf("chunk took %0d clocks, budget %0d", cyc, CH * TICKS * 18 / 16 + CH * 4));
    rand_stall = 1;
    run(0, 1, cyc);
    rand_stall = 0; stall = 0;
    load(1, 4);   // noisy waveform: wide blocks
    run(1, 4, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
