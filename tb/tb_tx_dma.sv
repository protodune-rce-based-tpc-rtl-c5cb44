// tb_tx_dma: self-checking test of the DMA into the DRAM ring buffer.
//
// Uses a 256-byte ring (32 words) at 0x1000 and a 4-entry descriptor queue so
// that every case happens in a short run: chunks written back to back with
// random memory back-pressure, descriptors with the right address and
// length, a chunk that wraps around the end of the ring, a chunk dropped
// because the ring is full (and the write offset restored), buffer space
// returned by the processor, and a chunk end held back while the descriptor
// queue is full. Every memory write is checked against the expected address
// and data.
module tb_tx_dma;
  import rce_pkg::*;
  localparam logic [31:0] BASE = 32'h1000;
  localparam int RING = 256;

  logic clk = 1'b0, rst = 1'b1;
  logic s_valid = 1'b0, s_last = 1'b0, s_ready;
  logic [63:0] s_data = '0;
  logic mem_valid, mem_ready = 1'b1;
  logic [31:0] mem_addr;
  logic [63:0] mem_data;
  logic desc_valid, desc_ready = 1'b0;
  logic [31:0] desc_addr, desc_bytes;
  logic release_valid = 1'b0;
  logic [31:0] release_bytes = '0;
  logic [31:0] used_bytes, chunks_written, chunks_dropped;
  int checks = 0, failures = 0;
  bit rand_mem = 0;
  int stall_cycles = 0;

  // expected memory writes
  logic [31:0] exp_addr [$];
  logic [63:0] exp_data [$];

  always #2 clk = ~clk;

  tx_dma #(.ADDR_W(32), .RING_BASE(BASE), .RING_BYTES(RING), .DESC_DEPTH(4)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) if (rand_mem) mem_ready = ($urandom_range(0, 2) != 0);

  always @(posedge clk) begin
    if (!rst && mem_valid && mem_ready) begin
      if (exp_addr.size() == 0) check(0, $sformatf("unexpected write to %h", mem_addr));
      else begin
        logic [31:0] a;
        logic [63:0] d;
        a = exp_addr.pop_front();
        d = exp_data.pop_front();
        check(mem_addr == a && mem_data == d,
              $sformatf("write %h:%h, expected %h:%h", mem_addr, mem_data, a, d));
      end
    end
    if (!rst && s_valid && s_last && !s_ready) stall_cycles++;
  end

  // send a chunk of n words, id in the upper half of each word
  task automatic send(input int id, input int n);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      s_valid = 1'b1;
      s_data  = {32'(id), 32'(k)};
      s_last  = (k == n - 1);
      @(posedge clk);
      while (!s_ready) @(posedge clk);
    end
    @(negedge clk);
    s_valid = 1'b0;
    s_last  = 1'b0;
  endtask

  task automatic expect_words(input int id, input int n, input int off);
    for (int k = 0; k < n; k++) begin
      exp_addr.push_back(BASE + 32'((off + 8 * k) % RING));
      exp_data.push_back({32'(id), 32'(k)});
    end
  endtask

  task automatic pop_desc(input logic [31:0] a, input logic [31:0] b);
    @(negedge clk);
    check(desc_valid, "descriptor present");
    check(desc_addr == a && desc_bytes == b,
          $sformatf("descriptor %h/%0d, expected %h/%0d", desc_addr, desc_bytes, a, b));
    desc_ready = 1'b1;
    @(negedge clk);
    desc_ready = 1'b0;
  endtask

  task automatic release_space(input int n);
    @(negedge clk);
    release_valid = 1'b1; release_bytes = 32'(n);
    @(negedge clk);
    release_valid = 1'b0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    rand_mem = 1;
    // three chunks back to back
    expect_words(1, 5, 0);  send(1, 5);
    expect_words(2, 7, 40); send(2, 7);
    expect_words(3, 3, 96); send(3, 3);
    pop_desc(BASE + 0, 40);
    pop_desc(BASE + 40, 56);
    pop_desc(BASE + 96, 24);
    check(used_bytes == 120, $sformatf("used %0d, expected 120", used_bytes));
    release_space(40);
    // 30 words with 22 free: the first 22 are written (wrapping), then dropped
    expect_words(4, 22, 120);
    send(4, 30);
    repeat (2) @(negedge clk);
    check(chunks_dropped == 1, "ring-full chunk dropped");
    check(used_bytes == 80, $sformatf("used %0d after drop, expected 80", used_bytes));
    check(!desc_valid, "no descriptor for a dropped chunk");
    release_space(80);
    // 20 words that wrap: the write offset was restored to 120
    expect_words(5, 20, 120);
    send(5, 20);
    pop_desc(BASE + 120, 160);
    release_space(160);
    // descriptor queue full: four one-word chunks fill it, the fifth waits
    rand_mem = 0; mem_ready = 1'b1;
    for (int i = 0; i < 4; i++) begin
      expect_words(6 + i, 1, (120 + 160 + 8 * i) % RING);
      send(6 + i, 1);
    end
    expect_words(10, 1, (120 + 160 + 32) % RING);
    fork
      send(10, 1);
      begin
        repeat (6) @(negedge clk);
        check(stall_cycles >= 4, $sformatf("chunk end held %0d clocks", stall_cycles));
        for (int i = 0; i < 4; i++)
          pop_desc(BASE + 32'((280 + 8 * i) % RING), 8);
      end
    join
    pop_desc(BASE + 32'((280 + 32) % RING), 8);
    repeat (2) @(negedge clk);
    check(exp_addr.size() == 0, $sformatf("%0d writes missing", exp_addr.size()));
    check(chunks_written == 9, $sformatf("chunks_written %0d, expected 9", chunks_written));
    check(used_bytes == 40, $sformatf("used %0d, expected 40", used_bytes));
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
