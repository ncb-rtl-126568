// tb_icache: test of the interleaved I-cache (64 KB, 4-way, 32-byte blocks)
// behind an ideal next level answering in 6 cycles.
//  1. Cold fetch at a block boundary: hit exactly 1 + 6 cycles later, and
//     the 8 words equal the program.
//  2. Cold fetch in the middle of a block: both blocks are refilled (two
//     misses), then the 8 words span the two banks.
//  3. Five blocks mapping to one set of one bank: the fifth evicts the first
//     (round-robin), the others still hit.
//  4. Sequential prefetch: after an aligned cold fetch the next block is
//     fetched ahead, so fetching it shortly after waits less than a miss.
//  5. Random fetches over a program larger than the cache: every delivered
//     run matches the program; hits with no wait happen.
module tb_icache;
  import ncb_pkg::*;
  import tb_prog_pkg::*;

  logic      clk = 1'b0, rst_n = 1'b0;
  logic      fetch_req;
  addr_t     pc;
  logic      hit;
  inst_vec_t inst;
  logic      refill_req_valid, refill_resp_valid;
  addr_t     refill_req_addr;
  inst_vec_t refill_data;

  int checks = 0, failures = 0;
  int n_refill = 0, n_fast = 0;

  icache dut (.*);
  l2_model #(.LATENCY(6)) u_l2 (
    .clk, .req_valid(refill_req_valid), .req_addr(refill_req_addr),
    .resp_valid(refill_resp_valid), .resp_data(refill_data)
  );

  always #5 clk = ~clk;
  always @(posedge clk) if (refill_req_valid && refill_resp_valid) n_refill++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // Present a PC until it hits; return the number of cycles waited.
  task automatic fetch(addr_t a, output int waited);
    pc = a; fetch_req = 1'b1; waited = 0;
    #1;
    while (!hit) begin
      @(posedge clk); #1;
      waited++;
      if (waited > 100) break;
    end
    for (int i = 0; i < FETCH_W; i++)
      check(inst[i] == word_at(a + 32'(4 * i)), $sformatf("word %0d at %h", i, a));
    @(posedge clk); #1;
  endtask

  // Let any prefetch in flight finish.
  task automatic quiet();
    fetch_req = 1'b0;
    repeat (10) @(posedge clk);
    #1;
  endtask

  initial begin
    int wt, r0;
    addr_t a, b;
    fetch_req = 0; pc = CODE_BASE;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // 1: cold, aligned
    r0 = n_refill;
    fetch(CODE_BASE + 32'h100, wt);
    check(wt == 7, $sformatf("aligned miss waited %0d, expected 7", wt));
    check(n_refill - r0 == 1, "aligned miss refills one block");
    fetch(CODE_BASE + 32'h100, wt);
    check(wt == 0, "re-fetch hits");
    quiet();
    // 2: cold, unaligned: two blocks
    r0 = n_refill;
    fetch(CODE_BASE + 32'h20C, wt);
    check(wt == 14, $sformatf("unaligned miss waited %0d, expected 14", wt));
    check(n_refill - r0 == 2, "unaligned miss refills two blocks");
    // 3: same set, same bank: block stride = 2 banks * 256 sets * 32 bytes
    a = CODE_BASE + 32'h4000 * 0 + 32'h40;
    for (int k = 0; k < 5; k++) begin
      quiet();
      fetch(a + 32'h4000 * k, wt);
    end
    quiet();
    fetch(a + 32'h4000 * 1, wt);
    check(wt == 0, "way 1 still present");
    fetch(a + 32'h4000 * 4, wt);
    check(wt == 0, "fifth block present");
    quiet();
    fetch(a, wt);
    check(wt == 7, "first block evicted by the fifth");
    // 4: prefetch of the next block
    quiet();
    r0 = n_refill;
    fetch(CODE_BASE + 32'h9000, wt);
    check(wt == 7, "cold aligned fetch");
    fetch(CODE_BASE + 32'h9020, wt);
    check(wt > 0 && wt < 7, $sformatf("prefetched block waited %0d, expected 1..6", wt));
    quiet();
    check(n_refill - r0 == 3, $sformatf("one demand refill, two prefetches: %0d", n_refill - r0));
    // 5: random
    for (int k = 0; k < 3000; k++) begin
      b = CODE_BASE + 4 * ($urandom % (CODE_WORDS - 8));
      if (k % 3 == 0) b = CODE_BASE + 4 * ($urandom % 512);   // hot region
      fetch(b, wt);
      if (wt == 0) n_fast++;
    end
    check(n_fast > 100, "hits without waiting");
    $display("refills=%0d fast hits=%0d", n_refill, n_fast);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
