// tb_trigger_listener: self-checking test of the timing stream decoder.
//
// Sends the timing stream bit by bit with idle noise between messages:
// a sync message (timestamp loaded, then counting on sys_tick), triggers
// (queued in order with their times), a message with a bad check byte and one
// with an unknown type (both counted and ignored), and more triggers than the
// queue holds (the excess counted as lost).
module tb_trigger_listener;
  import rce_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic sys_tick = 1'b0, bit_valid = 1'b0, bit_in = 1'b0;
  logic [63:0] ts_now, trig_ts;
  logic trig_valid, trig_ready = 1'b0;
  logic [31:0] syncs, trigs, msg_errs, trig_lost;
  int checks = 0, failures = 0;

  always #2 clk = ~clk;

  trigger_listener #(.TRIG_DEPTH(4)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // XOR check byte, computed here independently of the package function
  function automatic logic [7:0] chk(input logic [7:0] t, input logic [63:0] v);
    return t ^ v[7:0] ^ v[15:8] ^ v[23:16] ^ v[31:24] ^ v[39:32] ^ v[47:40] ^ v[55:48] ^ v[63:56];
  endfunction

  task automatic send_bits(input logic [87:0] m);
    for (int i = 87; i >= 0; i--) begin
      @(negedge clk);
      bit_valid = 1'b1; bit_in = m[i];
      @(negedge clk);
      bit_valid = 1'b0;   // one bit every other clock
    end
  endtask

  task automatic idle(input int n);
    // random bits without the start pattern
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      bit_valid = 1'b1; bit_in = (i % 3 == 0);
    end
    @(negedge clk);
    bit_valid = 1'b0;
  endtask

  task automatic msg(input logic [7:0] t, input logic [63:0] v, input bit corrupt);
    send_bits({8'hA5, t, v, chk(t, v) ^ (corrupt ? 8'h10 : 8'h00)});
  endtask

  initial begin
    logic [63:0] t0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    idle(20);
    msg(8'h01, 64'h0000_1234_0000_0000, 0);
    @(negedge clk);
    check(syncs == 1, "sync received");
    check(ts_now == 64'h0000_1234_0000_0000, $sformatf("timestamp %h after sync", ts_now));
    // counting on sys_tick
    repeat (10) begin
      @(negedge clk); sys_tick = 1'b1;
      @(negedge clk); sys_tick = 1'b0;
    end
    check(ts_now == 64'h0000_1234_0000_000A, $sformatf("timestamp %h after 10 ticks", ts_now));
    // two triggers
    idle(7);
    msg(8'h02, 64'd5000, 0);
    msg(8'h02, 64'd6000, 0);
    // bad check byte and unknown type
    msg(8'h02, 64'd7000, 1);
    msg(8'h07, 64'd8000, 0);
    @(negedge clk);
    check(msg_errs == 2, $sformatf("msg_errs %0d, expected 2", msg_errs));
    check(trigs == 2, $sformatf("trigs %0d, expected 2", trigs));
    check(trig_valid && trig_ts == 64'd5000, "first trigger queued");
    trig_ready = 1'b1; @(negedge clk); trig_ready = 1'b0;
    check(trig_valid && trig_ts == 64'd6000, "second trigger queued");
    trig_ready = 1'b1; @(negedge clk); trig_ready = 1'b0;
    check(!trig_valid, "queue empty");
    // six triggers into a four-entry queue
    for (int i = 0; i < 6; i++) msg(8'h02, 64'(100 + i), 0);
    @(negedge clk);
    check(trig_lost == 2, $sformatf("trig_lost %0d, expected 2", trig_lost));
    for (int i = 0; i < 4; i++) begin
      check(trig_valid && trig_ts == 64'(100 + i), $sformatf("queued trigger %0d", i));
      trig_ready = 1'b1; @(negedge clk); trig_ready = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
