// tb_rce_fsm: self-checking test of the chunk sequencing FSM.
//
// Two links, 4 ticks per chunk. Emulates the receivers' frame_start /
// frame_done pulses and checks: no frames taken before run; tick numbers of
// accepted frames; the chunk handed to the compressor with bank, sequence
// number, error count and first-tick timestamp; the write bank switching; a
// chunk dropped while the compressor is busy (and the same bank refilled);
// and frames refused after run is lowered.
module tb_rce_fsm;
  import rce_pkg::*;
  localparam int LINKS = 2, TICKS = 4;

  logic clk = 1'b0, rst = 1'b1, run = 1'b0;
  logic [63:0] ts_now = 64'd1000;
  logic [LINKS-1:0] frame_start = '0, frame_done = '0, frame_bad = '0, frame_acc;
  logic [1:0] tick [LINKS];
  logic wr_bank, comp_busy = 1'b0, comp_start, comp_bank;
  logic [15:0] hdr_seq;
  logic [63:0] hdr_ts;
  logic [7:0] hdr_errs;
  logic [31:0] chunks_done, chunks_dropped;
  int checks = 0, failures = 0;
  int starts = 0;

  always #2 clk = ~clk;
  always @(posedge clk) ts_now <= ts_now + 1;
  always @(posedge clk) if (!rst && comp_start) starts++;

  rce_fsm #(.LINKS(LINKS), .TICKS(TICKS)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one frame on both links; checks acceptance and tick mid-frame
  task automatic frame(input bit exp_acc, input int exp_tick, input logic [1:0] bad,
                       output logic [63:0] ts_at_start);
    @(negedge clk);
    frame_start = '1;
    ts_at_start = ts_now;
    @(negedge clk);
    frame_start = '0;
    repeat (3) @(negedge clk);
    for (int l = 0; l < LINKS; l++) begin
      check(frame_acc[l] == exp_acc, $sformatf("link %0d acc %0d, expected %0d", l, frame_acc[l], exp_acc));
      if (exp_acc) check(tick[l] == 2'(exp_tick), $sformatf("link %0d tick %0d, expected %0d", l, tick[l], exp_tick));
    end
    frame_done = '1;
    frame_bad  = bad;
    @(negedge clk);
    frame_done = '0;
    frame_bad  = '0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    logic [63:0] ts0, tsx;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // not running: nothing taken
    frame(0, 0, '0, tsx);
    // chunk 0 into bank 0, one bad frame
    run = 1'b1;
    check(wr_bank == 1'b0, "first chunk in bank 0");
    frame(1, 0, '0, ts0);
    frame(1, 1, 2'b10, tsx);
    frame(1, 2, '0, tsx);
    frame(1, 3, '0, tsx);
    check(starts == 1, "compressor started on a full chunk");
    check(comp_bank == 1'b0 && wr_bank == 1'b1, "bank swap after chunk 0");
    check(hdr_seq == 16'd0, $sformatf("seq %0d", hdr_seq));
    check(hdr_errs == 8'd1, $sformatf("errs %0d, expected 1", hdr_errs));
    check(hdr_ts >= ts0 && hdr_ts <= ts0 + 2, $sformatf("ts %0d, frame start at %0d", hdr_ts, ts0));
    // chunk 1 while the compressor is busy: dropped
    comp_busy = 1'b1;
    for (int t = 0; t < TICKS; t++) frame(1, t, '0, tsx);
    check(starts == 1, "no start while busy");
    check(chunks_dropped == 1, "busy chunk counted as dropped");
    check(wr_bank == 1'b1, "dropped chunk refills the same bank");
    // chunk 2 into bank 1
    comp_busy = 1'b0;
    frame(1, 0, '0, ts0);
    for (int t = 1; t < TICKS; t++) frame(1, t, '0, tsx);
    check(starts == 2, "second chunk started");
    check(comp_bank == 1'b1 && wr_bank == 1'b0, "bank swap after chunk 2");
    check(hdr_seq == 16'd2 && hdr_errs == 8'd0, "seq counts dropped chunks, errs cleared");
    check(hdr_ts >= ts0 && hdr_ts <= ts0 + 2, "timestamp of chunk 2");
    // stop mid chunk
    frame(1, 0, '0, tsx);
    run = 1'b0;
    frame(0, 0, '0, tsx);
    check(chunks_done == 2, "chunks_done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
