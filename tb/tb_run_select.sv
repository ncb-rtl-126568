// tb_run_select: random test of the run selector.
// Builds I-cache runs with a branch (conditional or jump) at a random slot or
// none, and NCB lines whose first block ends in a branch, then checks the
// chosen source, run length, per-slot addresses, branch information, next PC,
// history shifts and fill trigger against expected values worked out here.
module tb_run_select;
  import ncb_pkg::*;

  addr_t         pc;
  logic          ic_hit;
  inst_vec_t     ic_inst;
  logic          ncb_hit;
  ncb_line_t     ncb_line;
  logic          pht_taken;
  pht_idx_t      pht_idx;
  bhr_t          bhr;
  logic          valid;
  fetch_bundle_t bundle;
  logic          push0_valid, push0_taken, push1_valid, push1_taken;
  logic          fill_trigger;

  int checks = 0, failures = 0;
  int n_ncb = 0, n_ic = 0, n_trig = 0, n_nohit = 0, n_jump_ncb = 0;

  run_select dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  localparam inst_t ADDIU = 32'h2421_0001;
  localparam inst_t BNE   = 32'h1422_fff0;
  localparam inst_t JUMP  = 32'h0810_0040;

  initial begin
    int br_slot, bb1, len;
    bit jump, exp_ncb, exp_taken;
    for (int c = 0; c < 5000; c++) begin
      pc        = {$urandom} & 32'hFFFF_FFFC;
      ic_hit    = ($urandom % 8) != 0;
      pht_taken = $urandom % 2;
      pht_idx   = pht_idx_t'($urandom);
      bhr       = bhr_t'($urandom);
      br_slot   = int'($urandom % 10);            // 8 or 9: no branch
      jump      = ($urandom % 4) == 0;
      for (int i = 0; i < FETCH_W; i++)
        ic_inst[i] = (i == br_slot) ? (jump ? JUMP : BNE) : ADDIU;
      // NCB line consistent with the I-cache run when there is a branch
      ncb_hit  = (br_slot < FETCH_W) && ($urandom % 2);
      bb1      = (br_slot < FETCH_W) ? br_slot + 1 : 1;
      len      = bb1 + int'($urandom % (FETCH_W - bb1 + 1));
      ncb_line = '0;
      ncb_line.start   = pc;
      ncb_line.bb1_len = cnt_t'(bb1);
      ncb_line.len     = cnt_t'(len);
      ncb_line.target  = {$urandom} & 32'hFFFF_FFFC;
      ncb_line.br2     = (len > bb1) && ($urandom % 2);
      ncb_line.next    = ncb_line.target + 32'(4 * (len - bb1));
      for (int i = 0; i < FETCH_W; i++)
        ncb_line.inst[i] = (i < bb1) ? ic_inst[i] : ((ncb_line.br2 && i == len - 1) ? BNE : ADDIU);
      #1;
      exp_taken = (br_slot < FETCH_W) && (jump || pht_taken);
      exp_ncb   = ncb_hit && exp_taken;
      check(bundle.from_ncb == exp_ncb, "source");
      if (exp_ncb) begin
        n_ncb++;
        if (jump && !pht_taken) n_jump_ncb++;
        check(valid, "NCB run valid without I-cache hit");
        check(int'(bundle.len) == len, "NCB run length");
        for (int i = 0; i < len; i++)
          check(bundle.pc[i] == ((i < bb1) ? pc + 32'(4 * i) : ncb_line.target + 32'(4 * (i - bb1))) &&
                bundle.inst[i] == ncb_line.inst[i], $sformatf("NCB slot %0d", i));
        check(bundle.next_pc == ncb_line.next, "NCB next pc");
        check(bundle.br0.valid && int'(bundle.br0.slot) == bb1 - 1 && bundle.br0.pred_taken &&
              bundle.br0.uses_pht == !jump && bundle.br0.pht_idx == pht_idx && bundle.br0.bhr == bhr,
              "NCB br0");
        check(bundle.br1.valid == ncb_line.br2 &&
              (!ncb_line.br2 || (int'(bundle.br1.slot) == len - 1 && !bundle.br1.pred_taken &&
                                 bundle.br1.bhr == {bhr[BHR_W-2:0], 1'b1})), "NCB br1");
        check(push0_valid && push0_taken && push1_valid == ncb_line.br2 && !push1_taken, "NCB pushes");
        check(!fill_trigger, "no fill from NCB runs");
      end else begin
        n_ic++;
        check(valid == ic_hit, "I-cache valid");
        check(int'(bundle.len) == ((br_slot < FETCH_W) ? br_slot + 1 : FETCH_W), "I-cache run length");
        for (int i = 0; i < FETCH_W; i++)
          check(bundle.pc[i] == pc + 32'(4 * i) && bundle.inst[i] == ic_inst[i], "I-cache slot");
        check(bundle.next_pc == pc + 32'(4 * int'(bundle.len)), "I-cache next pc");
        check(bundle.br0.valid == (br_slot < FETCH_W) && !bundle.br1.valid, "I-cache branch info");
        check(push0_valid == (ic_hit && br_slot < FETCH_W) && !push0_taken && !push1_valid,
              "I-cache pushes");
        check(fill_trigger == (ic_hit && exp_taken), "fill trigger");
        if (fill_trigger) n_trig++;
        if (!ic_hit) n_nohit++;
      end
      #1;
    end
    check(n_ncb > 100 && n_ic > 100 && n_trig > 100 && n_nohit > 10 && n_jump_ncb > 10, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
