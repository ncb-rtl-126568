// run_select: chooses the instruction run sent to the decoder.
//
// The I-cache run, the NCB line and the branch prediction for the current PC
// arrive in the same cycle. When the NCB holds a line starting at the PC and
// the branch ending its first basic block is predicted taken, the NCB run (two
// non-consecutive basic blocks) goes to the decoder and the next PC is the
// line's next-address field. Otherwise the I-cache run is used, cut after its
// first branch (no fetching beyond a branch), and the next PC is the address
// after its last instruction. This mirrors how a branch target buffer chooses
// between the incremented PC and a stored target.
//
// Purely combinational. Outputs: valid (a run is available: the NCB path does
// not need an I-cache hit), the bundle (addresses, instructions, length and
// branch information for the back end), the speculative history shifts for
// the predictor, and fill_trigger for the fill unit (an I-cache run ending in
// a branch the predictor calls taken).
// Design choices: unconditional jumps count as predicted taken; a taken
// prediction without an NCB line has no target, so fetch follows the
// fall-through path and the history records not-taken; the second branch of an
// NCB run is implicitly predicted not-taken (its line's next address is its
// fall-through) and records not-taken in the history.
module run_select
  import ncb_pkg::*;
(
  input  addr_t         pc,
  input  logic          ic_hit,
  input  inst_vec_t     ic_inst,
  input  logic          ncb_hit,
  input  ncb_line_t     ncb_line,
  input  logic          pht_taken,
  input  pht_idx_t      pht_idx,
  input  bhr_t          bhr,
  output logic          valid,
  output fetch_bundle_t bundle,
  output logic          push0_valid,
  output logic          push0_taken,
  output logic          push1_valid,
  output logic          push1_taken,
  output logic          fill_trigger
);

  logic  ic_br_found;
  slot_t ic_br_slot;
  logic  ic_pred, ncb_pred, use_ncb;
  inst_t ncb_br_inst;

  always_comb begin
    ic_br_found = 1'b0;
    ic_br_slot  = '0;
    for (int i = FETCH_W - 1; i >= 0; i--) begin
      if (is_branch(ic_inst[i])) begin
        ic_br_found = 1'b1;
        ic_br_slot  = slot_t'(i);
      end
    end
    ic_pred     = is_uncond(ic_inst[ic_br_slot]) || pht_taken;
    ncb_br_inst = ncb_line.inst[slot_t'(ncb_line.bb1_len - 1'b1)];
    ncb_pred    = is_uncond(ncb_br_inst) || pht_taken;
    use_ncb     = ncb_hit && ncb_pred;

    bundle       = '0;
    push0_valid  = 1'b0;
    push0_taken  = 1'b0;
    push1_valid  = 1'b0;
    push1_taken  = 1'b0;
    fill_trigger = 1'b0;

    if (use_ncb) begin
      valid           = 1'b1;
      bundle.from_ncb = 1'b1;
      bundle.inst     = ncb_line.inst;
      bundle.len      = ncb_line.len;
      for (int i = 0; i < int'(FETCH_W); i++)
        bundle.pc[i] = (cnt_t'(i) < ncb_line.bb1_len) ? pc + 32'(4 * i)
                     : ncb_line.target + 32'(4 * (i - int'(ncb_line.bb1_len)));
      bundle.br0 = '{valid: 1'b1, slot: slot_t'(ncb_line.bb1_len - 1'b1), pred_taken: 1'b1,
                     uses_pht: !is_uncond(ncb_br_inst), pht_idx: pht_idx, bhr: bhr};
      bundle.br1 = '{valid: ncb_line.br2, slot: slot_t'(ncb_line.len - 1'b1), pred_taken: 1'b0,
                     uses_pht: 1'b0, pht_idx: '0, bhr: {bhr[BHR_W-2:0], 1'b1}};
      bundle.next_pc = ncb_line.next;
      push0_valid = 1'b1;
      push0_taken = 1'b1;
      push1_valid = ncb_line.br2;
      push1_taken = 1'b0;
    end else begin
      valid       = ic_hit;
      bundle.inst = ic_inst;
      bundle.len  = ic_br_found ? cnt_t'(ic_br_slot) + 1'b1 : cnt_t'(FETCH_W);
      for (int i = 0; i < int'(FETCH_W); i++) bundle.pc[i] = pc + 32'(4 * i);
      bundle.br0 = '{valid: ic_br_found, slot: ic_br_slot, pred_taken: 1'b0,
                     uses_pht: !is_uncond(ic_inst[ic_br_slot]), pht_idx: pht_idx, bhr: bhr};
      bundle.next_pc = pc + 32'({bundle.len, 2'b00});
      push0_valid  = ic_hit && ic_br_found;
      push0_taken  = 1'b0;
      fill_trigger = ic_hit && ic_br_found && ic_pred;
    end
  end

endmodule
