// tb_ncb_fetch_unit: end-to-end test of the NCB fetch unit at its default sizes.
//
// The fetch unit runs a synthetic program (tb_prog_pkg) from an ideal next
// level with a 6-cycle answer time. A back-end model stands in for the
// decoder and execution core: it takes each delivered run, checks every
// instruction's address and word against the program's correct path, resolves
// every branch with the oracle, and on the first wrong successor address sends
// a redirect (correct PC, corrected history, branch address and outcome) in
// the next cycle. It trains the PHT for every predicted branch. It also drops
// fb_ready at random to stall fetch.
// Mechanisms counted, each required at least once: I-cache refill, NCB line
// written by the fill unit, run delivered from the NCB, NCB run carrying two
// branches, NCB run whose second block was cut at the full line, redirect,
// stall. The test also checks that NCB runs are longer on average than
// I-cache runs, which is the point of the mechanism.
// Two workloads are run, each from reset: integer-like code (basic blocks of
// about 5 instructions) and floating-point-like code (about 12). For each the
// correct-path instructions fetched per cycle and the share of runs supplied
// by the NCB are printed; with larger basic blocks the I-cache runs are
// longer and the NCB is used less, as expected of the mechanism.
module tb_ncb_fetch_unit;
  import ncb_pkg::*;
  import tb_prog_pkg::*;

  localparam int unsigned CYCLES = 200000;   // per workload

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          fb_valid, fb_ready;
  fetch_bundle_t fb;
  logic          redirect_valid = 1'b0, redirect_taken = 1'b0;
  addr_t         redirect_pc = '0, redirect_br_pc = '0;
  bhr_t          redirect_bhr = '0;
  logic          update_valid;
  pht_idx_t      update_idx;
  logic          update_taken;
  logic          refill_req_valid, refill_resp_valid;
  addr_t         refill_req_addr;
  inst_vec_t     refill_data;
  logic          ncb_fill;

  int checks = 0, failures = 0;
  int n_refill = 0, n_fill = 0, n_ncb_runs = 0, n_two_br = 0, n_cut = 0;
  int n_redirect = 0, n_stall = 0, n_ic_runs = 0;
  longint ncb_insts = 0, ic_insts = 0, good_insts = 0;
  int cycle = 0;

  ncb_fetch_unit dut (
    .clk, .rst_n, .fb_valid, .fb, .fb_ready,
    .redirect_valid, .redirect_pc, .redirect_bhr, .redirect_br_pc, .redirect_taken,
    .update_valid, .update_idx, .update_taken,
    .refill_req_valid, .refill_req_addr, .refill_resp_valid, .refill_data,
    .ncb_fill
  );

  l2_model #(.LATENCY(6)) u_l2 (
    .clk, .req_valid(refill_req_valid), .req_addr(refill_req_addr),
    .resp_valid(refill_resp_valid), .resp_data(refill_data)
  );

  always #5 clk = ~clk;

  // PHT training queue: at most two entries per run, one update per cycle.
  pht_idx_t upd_idx_q[$];
  bit       upd_tkn_q[$];
  assign update_valid = upd_idx_q.size() != 0;
  assign update_idx   = update_valid ? upd_idx_q[0] : '0;
  assign update_taken = update_valid ? upd_tkn_q[0] : 1'b0;

  int unsigned exec_cnt [int unsigned];   // executions per branch word
  addr_t exp_pc = CODE_BASE;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  // Back end: inspect a delivered run.
  task automatic consume();
    addr_t pc, nxt, pred_nxt;
    bit tkn, br0_hit, br1_hit;
    int unsigned w, n;
    br_info_t bi;
    if (fb.from_ncb) begin
      n_ncb_runs++; ncb_insts += fb.len;
      if (fb.br1.valid) n_two_br++;
      else if (fb.len == cnt_t'(FETCH_W) && fb.br0.slot != slot_t'(FETCH_W - 1)) n_cut++;
    end else begin
      n_ic_runs++; ic_insts += fb.len;
    end
    for (int i = 0; i < int'(fb.len); i++) begin
      pc = fb.pc[i];
      check(pc == exp_pc, $sformatf("slot %0d pc %h expected %h", i, pc, exp_pc));
      check(fb.inst[i] == word_at(pc), $sformatf("slot %0d word at %h", i, pc));
      if (pc != exp_pc) return;
      good_insts++;
      pred_nxt = (i + 1 < int'(fb.len)) ? fb.pc[i+1] : fb.next_pc;
      if (!is_br_word(word_of(pc))) begin
        exp_pc = pc + 4;
        continue;
      end
      br0_hit = fb.br0.valid && int'(fb.br0.slot) == i;
      br1_hit = fb.br1.valid && int'(fb.br1.slot) == i;
      check(br0_hit || br1_hit, $sformatf("branch at %h not reported", pc));
      bi = br1_hit ? fb.br1 : fb.br0;
      w = word_of(pc);
      n = exec_cnt.exists(w) ? exec_cnt[w] : 0;
      exec_cnt[w] = n + 1;
      tkn = branch_taken(pc, n);
      nxt = tkn ? taken_target(pc) : pc + 4;
      if (bi.uses_pht) begin
        upd_idx_q.push_back(bi.pht_idx);
        upd_tkn_q.push_back(tkn);
      end
      exp_pc = nxt;
      if (pred_nxt != nxt) begin
        // Redirect in the next cycle; the rest of the run is wrong-path.
        redirect_valid <= 1'b1;
        redirect_pc    <= nxt;
        redirect_bhr   <= {bi.bhr[BHR_W-2:0], tkn};
        redirect_br_pc <= pc;
        redirect_taken <= tkn;
        n_redirect++;
        return;
      end
    end
  endtask

  // Statistics of one workload run.
  typedef struct {
    real ipc, ncb_share, ic_len;
  } stats_t;

  task automatic run_workload(int unsigned be, string name, output stats_t st);
    tb_prog_pkg::br_every = be;
    exec_cnt.delete();
    upd_idx_q.delete();
    upd_tkn_q.delete();
    exp_pc = CODE_BASE;
    n_refill = 0; n_fill = 0; n_ncb_runs = 0; n_two_br = 0; n_cut = 0;
    n_redirect = 0; n_stall = 0; n_ic_runs = 0;
    ncb_insts = 0; ic_insts = 0; good_insts = 0;
    cycle = 0;
    rst_n <= 1'b0;
    redirect_valid <= 1'b0;
    fb_ready <= 1'b1;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    while (cycle < int'(CYCLES)) begin
      @(posedge clk);
      cycle++;
      if (update_valid) begin
        void'(upd_idx_q.pop_front());
        void'(upd_tkn_q.pop_front());
      end
      if (refill_req_valid && refill_resp_valid) n_refill++;
      if (ncb_fill) n_fill++;
      if (fb_valid && !fb_ready) n_stall++;
      redirect_valid <= 1'b0;
      if (fb_valid && fb_ready) consume();
      fb_ready <= ($urandom % 16) != 0;
    end
    check(n_refill > 0,   {name, ": no I-cache refill"});
    check(n_fill > 0,     {name, ": no NCB line written"});
    check(n_ncb_runs > 0, {name, ": no run from the NCB"});
    check(n_two_br > 0,   {name, ": no NCB run with two branches"});
    check(n_cut > 0,      {name, ": no NCB run cut at the full line"});
    check(n_redirect > 0, {name, ": no redirect"});
    check(n_stall > 0,    {name, ": no stall"});
    check(n_ncb_runs > 0 && n_ic_runs > 0 &&
          real'(ncb_insts) / n_ncb_runs > real'(ic_insts) / n_ic_runs,
          {name, ": NCB runs not longer than I-cache runs"});
    check(good_insts > longint'(CYCLES) / 4, {name, ": too few correct-path instructions"});
    st.ipc       = real'(good_insts) / cycle;
    st.ncb_share = real'(n_ncb_runs) / (n_ncb_runs + n_ic_runs + 1);
    st.ic_len    = real'(ic_insts) / (n_ic_runs > 0 ? n_ic_runs : 1);
    $display("%s: cycles=%0d correct-path insts=%0d (%.2f/cycle) refills=%0d ncb_fills=%0d",
             name, cycle, good_insts, st.ipc, n_refill, n_fill);
    $display("%s: ncb runs=%0d avg len %.2f, icache runs=%0d avg len %.2f, two-branch=%0d cut=%0d redirects=%0d stalls=%0d",
             name, n_ncb_runs, real'(ncb_insts) / (n_ncb_runs > 0 ? n_ncb_runs : 1),
             n_ic_runs, st.ic_len, n_two_br, n_cut, n_redirect, n_stall);
  endtask

  initial begin
    stats_t s_int, s_fp;
    run_workload(5, "integer-like", s_int);
    run_workload(12, "fp-like", s_fp);
    check(s_fp.ic_len > s_int.ic_len, "larger basic blocks give longer I-cache runs");
    check(s_fp.ncb_share < s_int.ncb_share, "larger basic blocks use the NCB less");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * (2 * CYCLES + 1000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
