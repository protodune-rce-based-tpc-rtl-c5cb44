// tb_chunk_buffer: self-checking test of the double-banked chunk store.
//
// Fills bank 0 tick by tick, then reads it back group-major while bank 1 is
// being filled with different data in the same clocks, and finally reads
// bank 1. Checks the one-clock read latency and that rd_data holds while
// rd_en is low.
module tb_chunk_buffer;
  localparam int TICKS = 64, GROUPS = 4, W = 48;

  logic clk = 1'b0;
  logic wr_en = 1'b0, wr_bank = 1'b0, rd_en = 1'b0, rd_bank = 1'b0;
  logic [5:0] wr_tick = '0, rd_tick = '0;
  logic [1:0] wr_grp = '0, rd_grp = '0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [W-1:0] ref_mem [2][TICKS][GROUPS];
  int checks = 0, failures = 0;

  always #2 clk = ~clk;

  chunk_buffer #(.TICKS(TICKS), .GROUPS(GROUPS), .W(W)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int b = 0; b < 2; b++)
      for (int t = 0; t < TICKS; t++)
        for (int g = 0; g < GROUPS; g++) ref_mem[b][t][g] = {$urandom, $urandom};
    // fill bank 0 in arrival order
    for (int t = 0; t < TICKS; t++)
      for (int g = 0; g < GROUPS; g++) begin
        @(negedge clk);
        wr_en = 1'b1; wr_bank = 1'b0; wr_tick = 6'(t); wr_grp = 2'(g);
        wr_data = ref_mem[0][t][g];
      end
    @(negedge clk); wr_en = 1'b0;
    // read bank 0 channel-major while filling bank 1
    for (int g = 0; g < GROUPS; g++)
      for (int t = 0; t < TICKS; t++) begin
        @(negedge clk);
        wr_en = 1'b1; wr_bank = 1'b1; wr_tick = 6'(t); wr_grp = 2'(g);
        wr_data = ref_mem[1][t][g];
        rd_en = 1'b1; rd_bank = 1'b0; rd_tick = 6'(t); rd_grp = 2'(g);
        @(posedge clk); #1;
        check(rd_data == ref_mem[0][t][g], $sformatf("bank 0 tick %0d group %0d", t, g));
      end
    @(negedge clk); wr_en = 1'b0; rd_en = 1'b0;
    // data held while rd_en is low
    repeat (3) @(posedge clk);
    #1 check(rd_data == ref_mem[0][TICKS-1][GROUPS-1], "read data held");
    // read bank 1
    for (int g = GROUPS - 1; g >= 0; g--)
      for (int t = 0; t < TICKS; t++) begin
        @(negedge clk);
        rd_en = 1'b1; rd_bank = 1'b1; rd_tick = 6'(t); rd_grp = 2'(g);
        @(posedge clk); #1;
        check(rd_data == ref_mem[1][t][g], $sformatf("bank 1 tick %0d group %0d", t, g));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
