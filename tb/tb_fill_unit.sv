// tb_fill_unit: directed and random test of the fill unit's line buffer.
// Scenarios: merge of two blocks ending in a second branch; second block cut
// at the full line; first block already filling the line; wrong-path runs
// ignored while waiting for the branch; redirects from another branch or with
// a not-taken outcome emptying the buffer; second block taken from an NCB run
// (first block only); a completing run that itself starts a new line. The
// expected NCB line is built here and compared field by field, together with
// the one-cycle write latency.
module tb_fill_unit;
  import ncb_pkg::*;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          deliver;
  fetch_bundle_t bundle;
  logic          fill_trigger;
  logic          redirect_valid;
  addr_t         redirect_br_pc;
  logic          redirect_taken;
  logic          wr_valid;
  ncb_line_t     wr_line;

  int checks = 0, failures = 0;

  fill_unit dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // Build a run of len instructions at a; the last one is a branch if br.
  function automatic fetch_bundle_t mk_run(addr_t a, int len, bit br, bit from_ncb = 0, int bb1 = 0);
    fetch_bundle_t b;
    b = '0;
    for (int i = 0; i < FETCH_W; i++) begin
      b.pc[i]   = a + 32'(4 * i);
      b.inst[i] = a + 32'(4 * i) ^ 32'h5A5A_0000;   // tag each word by its address
    end
    b.len      = cnt_t'(len);
    b.from_ncb = from_ncb;
    if (from_ncb) begin
      b.br0.valid = 1'b1; b.br0.slot = slot_t'(bb1 - 1);
    end else begin
      b.br0.valid = br; b.br0.slot = slot_t'(len - 1);
    end
    return b;
  endfunction

  task automatic idle_cycle();
    deliver = 0; fill_trigger = 0; redirect_valid = 0;
    @(posedge clk); #1;
    check(!wr_valid, "no write on an idle cycle");
  endtask

  task automatic give(fetch_bundle_t b, bit trig);
    bundle = b; deliver = 1; fill_trigger = trig; redirect_valid = 0;
    @(posedge clk); #1;
    deliver = 0; fill_trigger = 0;
  endtask

  task automatic redirect(addr_t br_pc, bit taken);
    redirect_valid = 1; redirect_br_pc = br_pc; redirect_taken = taken; deliver = 0;
    @(posedge clk); #1;
    redirect_valid = 0;
  endtask

  // Expected line for first block (a1, n1) and second run b (first n2 taken).
  task automatic expect_line(addr_t a1, int n1, addr_t t, int n2, bit br2);
    check(wr_valid, "write expected");
    check(wr_line.start == a1 && int'(wr_line.bb1_len) == n1 && int'(wr_line.len) == n1 + n2 &&
          wr_line.target == t && wr_line.next == t + 32'(4 * n2) && wr_line.br2 == br2,
          $sformatf("line fields start %h", a1));
    for (int i = 0; i < n1 + n2; i++)
      check(wr_line.inst[i] == (((i < n1) ? a1 + 32'(4 * i) : t + 32'(4 * (i - n1))) ^ 32'h5A5A_0000),
            $sformatf("line word %0d", i));
  endtask

  initial begin
    addr_t a, t;
    int n1, n2, avail;
    deliver = 0; fill_trigger = 0; redirect_valid = 0; redirect_br_pc = '0; redirect_taken = 0;
    bundle = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // 1: 3 + 4 with a second branch; a wrong-path run in between is ignored
    give(mk_run(32'h1000, 3, 1), 1);
    check(!wr_valid, "no write after first block");
    give(mk_run(32'h100C, 8, 0), 0);                 // fall-through, wrong path
    check(!wr_valid, "wrong-path run not merged");
    redirect(32'h1008, 1);
    give(mk_run(32'h2000, 4, 1), 0);
    expect_line(32'h1000, 3, 32'h2000, 4, 1);
    idle_cycle();                                    // single write pulse

    // 2: check the write one cycle after the completing run
    give(mk_run(32'h3000, 3, 1), 1);
    redirect(32'h3008, 1);
    bundle = mk_run(32'h4000, 4, 1); deliver = 1; fill_trigger = 0;
    #1;
    check(!wr_valid, "write is registered, not combinational");
    @(posedge clk); #1;
    deliver = 0;
    expect_line(32'h3000, 3, 32'h4000, 4, 1);
    idle_cycle();

    // 3: cut at the full line: 5 + 6 -> 5 + 3, no second branch
    give(mk_run(32'h5000, 5, 1), 1);
    redirect(32'h5010, 1);
    give(mk_run(32'h6000, 6, 1), 0);
    expect_line(32'h5000, 5, 32'h6000, 3, 0);

    // 4: first block fills the line: empty second block, next = target
    give(mk_run(32'h7000, 8, 1), 1);
    redirect(32'h701C, 1);
    give(mk_run(32'h7800, 2, 1), 0);
    expect_line(32'h7000, 8, 32'h7800, 0, 0);

    // 5: redirect from another branch empties the buffer
    give(mk_run(32'h8000, 2, 1), 1);
    redirect(32'h9000, 1);
    give(mk_run(32'h9100, 3, 1), 0);
    idle_cycle();

    // 6: matching branch resolved not taken empties the buffer
    give(mk_run(32'hA000, 2, 1), 1);
    redirect(32'hA004, 0);
    give(mk_run(32'hA008, 3, 1), 0);
    idle_cycle();

    // 7: second block from an NCB run: only its first block (3 of 7)
    give(mk_run(32'hB000, 2, 1), 1);
    redirect(32'hB004, 1);
    give(mk_run(32'hC000, 7, 1, 1, 3), 0);
    expect_line(32'hB000, 2, 32'hC000, 3, 1);

    // 8: completing run that triggers itself: write, then a new line
    give(mk_run(32'hD000, 2, 1), 1);
    redirect(32'hD004, 1);
    give(mk_run(32'hE000, 3, 1), 1);
    expect_line(32'hD000, 2, 32'hE000, 3, 1);
    redirect(32'hE008, 1);
    give(mk_run(32'hF000, 1, 1), 0);
    expect_line(32'hE000, 3, 32'hF000, 1, 1);

    // 9: random lengths
    for (int k = 0; k < 500; k++) begin
      a  = 32'h10_0000 + 32'(k * 256);
      t  = 32'h20_0000 + 32'(k * 256);
      n1 = 1 + int'($urandom % FETCH_W);
      avail = 1 + int'($urandom % FETCH_W);
      give(mk_run(a, n1, 1), 1);
      if ($urandom % 2) give(mk_run(a + 32'(4 * n1), 8, 0), 0);   // wrong path
      redirect(a + 32'(4 * (n1 - 1)), 1);
      give(mk_run(t, avail, 1), 0);
      n2 = (avail < FETCH_W - n1) ? avail : FETCH_W - n1;
      expect_line(a, n1, t, n2, n2 == avail && n2 > 0);
      idle_cycle();
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
