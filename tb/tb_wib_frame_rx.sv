// tb_wib_frame_rx: self-checking test of the WIB link receiver.
//
// Sends frames built by the reference model (random samples, gaps between
// words) and checks every unpacked group against the samples, and the error
// verdict of every frame: good frames, a corrupted data word (CRC error), a
// skipped sequence number, front-end error bits and a frame cut short by the
// next start of frame. Also checks that a frame takes no more clocks than it
// has words, i.e. the receiver keeps up with a word per clock.
module tb_wib_frame_rx;
  import rce_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic in_valid = 1'b0, in_sof = 1'b0;
  logic [15:0] in_data = '0;
  logic frame_start, grp_valid, frame_done;
  logic [4:0] grp_idx;
  logic [47:0] grp_data;
  rx_err_t frame_err;
  logic [31:0] frames_ok, frames_bad;

  int checks = 0, failures = 0;
  logic [11:0] smp [128];
  int grp_seen;
  int exp_groups;
  rx_err_t exp_err;
  int done_seen;

  always #2 clk = ~clk;

  wib_frame_rx dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // group monitor
  always @(posedge clk) begin
    if (!rst && grp_valid) begin
      check(grp_idx == 5'(grp_seen), $sformatf("group index %0d, expected %0d", grp_idx, grp_seen));
      for (int k = 0; k < 4; k++)
        check(grp_data[12*k +: 12] == smp[4*grp_idx + k],
              $sformatf("group %0d sample %0d = %h, expected %h", grp_idx, k,
                        grp_data[12*k +: 12], smp[4*grp_idx + k]));
      grp_seen++;
    end
    if (!rst && frame_done) begin
      done_seen++;
      check(frame_err == exp_err, $sformatf("frame error %b, expected %b", frame_err, exp_err));
    end
  end

  // send nw words of a frame, optionally corrupting word bad_word
  task automatic send(input logic [15:0] f [98], input int nw, input int bad_word,
                      input bit gaps);
    for (int k = 0; k < nw; k++) begin
      if (gaps) while ($urandom_range(0, 3) == 0) begin
        @(negedge clk); in_valid = 1'b0; in_sof = 1'b0;
      end
      @(negedge clk);
      in_valid = 1'b1;
      in_sof   = (k == 0);
      in_data  = (k == bad_word) ? f[k] ^ 16'h0100 : f[k];
    end
    @(negedge clk);
    in_valid = 1'b0;
    in_sof   = 1'b0;
  endtask

  initial begin
    logic [15:0] f [98];
    longint t0, t1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // good frames, with and without gaps
    for (int n = 0; n < 6; n++) begin
      for (int c = 0; c < 128; c++) smp[c] = 12'($urandom);
      make_frame(8'(n), 4'h0, smp, f);
      grp_seen = 0;
      exp_err  = '0;
      t0 = $time;
      send(f, 98, -1, n % 2 == 1);
      t1 = $time;
      repeat (3) @(negedge clk);
      check(grp_seen == 32, $sformatf("frame %0d gave %0d groups", n, grp_seen));
      if (n % 2 == 0)
        check((t1 - t0) / 4 <= 99, $sformatf("frame took %0d clocks", (t1 - t0) / 4));
    end
    // CRC error: corrupt a data word (samples then differ, only check verdict)
    for (int c = 0; c < 128; c++) smp[c] = 12'($urandom);
    make_frame(8'd6, 4'h0, smp, f);
    exp_err = '{len_err: 0, seq_err: 0, crc_err: 1, feb_err: 0};
    grp_seen = 0;
    send(f, 98, 97, 0);   // corrupt the CRC word itself, samples stay right
    repeat (3) @(negedge clk);
    // sequence error: skip number 7
    make_frame(8'd8, 4'h0, smp, f);
    exp_err = '{len_err: 0, seq_err: 1, crc_err: 0, feb_err: 0};
    grp_seen = 0;
    send(f, 98, -1, 0);
    repeat (3) @(negedge clk);
    // front-end error bits
    make_frame(8'd9, 4'h5, smp, f);
    exp_err = '{len_err: 0, seq_err: 0, crc_err: 0, feb_err: 1};
    grp_seen = 0;
    send(f, 98, -1, 0);
    repeat (3) @(negedge clk);
    // frame cut short: 50 words, then a good frame
    make_frame(8'd10, 4'h0, smp, f);
    exp_err = '{len_err: 1, seq_err: 0, crc_err: 0, feb_err: 0};
    grp_seen = 0;
    send(f, 50, -1, 0);
    make_frame(8'd11, 4'h0, smp, f);
    @(negedge clk);
    // the cut frame is reported when the next sof arrives
    in_valid = 1'b1; in_sof = 1'b1; in_data = f[0];
    @(negedge clk);
    grp_seen = 0;
    for (int k = 1; k < 98; k++) begin
      in_valid = 1'b1; in_sof = 1'b0; in_data = f[k];
      @(negedge clk);
      if (k == 2) exp_err = '0;
    end
    in_valid = 1'b0;
    repeat (3) @(negedge clk);
    check(grp_seen == 32, "frame after a cut frame");
    check(done_seen == 11, $sformatf("%0d frame_done pulses, expected 11", done_seen));
    check(frames_ok == 7, $sformatf("frames_ok = %0d, expected 7", frames_ok));
    check(frames_bad == 4, $sformatf("frames_bad = %0d, expected 4", frames_bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    done_seen = 0;
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
