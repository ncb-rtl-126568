// tb_gshare_predictor: random test of the gshare predictor against a
// reference model of a 12-bit history, 4096 2-bit counters and the
// speculative-shift / restore / train rules. Each cycle it checks the index,
// the predicted direction and the history, then applies random shifts,
// restores and PHT updates (updates concentrated on a few entries so counters
// saturate in both directions). The 4096-cycle initialisation sweep after
// reset runs first, with an update applied throughout it that must be lost.
module tb_gshare_predictor;
  import ncb_pkg::*;

  logic     clk = 1'b0, rst_n = 1'b0;
  addr_t    pc;
  logic     pred_taken;
  pht_idx_t pht_idx;
  bhr_t     bhr;
  logic     push0_valid, push0_taken, push1_valid, push1_taken;
  logic     restore_valid;
  bhr_t     restore_bhr;
  logic     update_valid, update_taken;
  pht_idx_t update_idx;

  int checks = 0, failures = 0;
  int n_sat_hi = 0, n_sat_lo = 0, n_restore = 0, n_push2 = 0;

  bit [1:0] m_pht [4096];
  bhr_t     m_bhr;

  gshare_predictor dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    pc = '0; push0_valid = 0; push0_taken = 0; push1_valid = 0; push1_taken = 0;
    restore_valid = 0; restore_bhr = '0; update_valid = 0; update_taken = 0; update_idx = '0;
    foreach (m_pht[i]) m_pht[i] = 2'b01;
    m_bhr = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // let the initialisation sweep finish; an update during it is dropped
    update_valid = 1'b1; update_idx = '0; update_taken = 1'b1;
    repeat (4096) @(posedge clk);
    #1 update_valid = 1'b0;
    for (int c = 0; c < 20000; c++) begin
      // drive inputs for this cycle
      pc            = $urandom;
      push0_valid   = $urandom % 2;
      push0_taken   = $urandom % 2;
      push1_valid   = push0_valid && ($urandom % 4 == 0);
      push1_taken   = $urandom % 2;
      restore_valid = $urandom % 8 == 0;
      restore_bhr   = bhr_t'($urandom);
      update_valid  = $urandom % 2;
      update_idx    = pht_idx_t'($urandom % 8);      // few entries: saturate
      update_taken  = ($urandom % 3) != 0 ? (c / 2000) % 2 == 0 : $urandom % 2;
      #1;
      check(pht_idx == (pc[13:2] ^ m_bhr), "index");
      check(pred_taken == m_pht[pc[13:2] ^ m_bhr][1], "prediction");
      check(bhr == m_bhr, "history");
      @(posedge clk);
      // reference model
      if (restore_valid) begin
        m_bhr = restore_bhr; n_restore++;
      end else if (push0_valid && push1_valid) begin
        m_bhr = {m_bhr[BHR_W-3:0], push0_taken, push1_taken}; n_push2++;
      end else if (push0_valid) begin
        m_bhr = {m_bhr[BHR_W-2:0], push0_taken};
      end
      if (update_valid) begin
        if (update_taken) begin
          if (m_pht[update_idx] == 2'b11) n_sat_hi++; else m_pht[update_idx]++;
        end else begin
          if (m_pht[update_idx] == 2'b00) n_sat_lo++; else m_pht[update_idx]--;
        end
      end
      #1;
    end
    check(n_sat_hi > 0 && n_sat_lo > 0 && n_restore > 0 && n_push2 > 0, "coverage");
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
