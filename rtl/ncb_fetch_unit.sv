// ncb_fetch_unit: instruction fetch stage with a non-consecutive basic block
// buffer (NCB).
//
// Every cycle the PC indexes the I-cache, the NCB and the gshare predictor in
// parallel. If the NCB holds a line starting at the PC and the branch ending
// that first basic block is predicted taken, the line - the first basic block
// followed by the block at the branch target - goes to the decoder in one
// cycle. Otherwise the I-cache supplies up to 8 consecutive instructions, cut
// after the first branch. The fill unit watches delivered runs and writes new
// NCB lines. Instructions stay undecoded and in program order, with their
// addresses, so the back end resolves and corrects branches as usual.
//
// Interface and timing:
//   fb_valid/fb/fb_ready - run for the decoder; it is taken when fb_valid and
//     fb_ready are both high and no redirect is applied that cycle. fb_ready
//     low (e.g. the instruction window is full) stalls fetch.
//   redirect_* - misprediction from the back end: next PC, corrected global
//     history, and the address and outcome of the branch. Applied at the next
//     clock edge; the run offered in that cycle is dropped.
//   update_* - PHT training for a resolved branch (index echoed from fb).
//   refill_* - I-cache miss requests to the next level and its answers.
//   ncb_fill - pulses when a new line is written into the NCB.
// A run is delivered in the cycle its PC is presented (single-cycle fetch with
// combinational array reads); an I-cache miss holds fb_valid low until the
// refill arrives, unless the NCB supplies the run.
// The parallel lookup, the predictor-driven selection and the fill unit are
// the NCB mechanism itself; the reset PC, the handshake and the back-end
// interface are this design's choices.
module ncb_fetch_unit
  import ncb_pkg::*;
#(
  parameter addr_t       RESET_PC      = 32'h0040_0000,
  parameter int unsigned IC_SIZE_BYTES = 65536,
  parameter int unsigned IC_WAYS       = 4,
  parameter int unsigned NCB_SETS      = 512
) (
  input  logic          clk,
  input  logic          rst_n,
  // to the decoder
  output logic          fb_valid,
  output fetch_bundle_t fb,
  input  logic          fb_ready,
  // branch resolution from the back end
  input  logic          redirect_valid,
  input  addr_t         redirect_pc,
  input  bhr_t          redirect_bhr,
  input  addr_t         redirect_br_pc,
  input  logic          redirect_taken,
  input  logic          update_valid,
  input  pht_idx_t      update_idx,
  input  logic          update_taken,
  // next memory level
  output logic          refill_req_valid,
  output addr_t         refill_req_addr,
  input  logic          refill_resp_valid,
  input  inst_vec_t     refill_data,
  // event
  output logic          ncb_fill
);

  addr_t     pc_q;
  logic      deliver;

  logic      ic_hit;
  inst_vec_t ic_inst;
  logic      ncb_hit;
  ncb_line_t ncb_line;
  logic      pht_taken;
  pht_idx_t  pht_idx;
  bhr_t      bhr;
  logic      push0_valid, push0_taken, push1_valid, push1_taken;
  logic      fill_trigger;
  logic      wr_valid;
  ncb_line_t wr_line;
  logic      sel_valid;

  assign fb_valid = sel_valid && !redirect_valid;
  assign deliver  = fb_valid && fb_ready;
  assign ncb_fill = wr_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              pc_q <= RESET_PC;
    else if (redirect_valid) pc_q <= redirect_pc;
    else if (deliver)        pc_q <= fb.next_pc;
  end

  icache #(.SIZE_BYTES(IC_SIZE_BYTES), .WAYS(IC_WAYS)) u_icache (
    .clk, .rst_n,
    .fetch_req        (!redirect_valid && !fb.from_ncb),
    .pc               (pc_q),
    .hit              (ic_hit),
    .inst             (ic_inst),
    .refill_req_valid, .refill_req_addr, .refill_resp_valid, .refill_data
  );

  ncb_buffer #(.SETS(NCB_SETS)) u_ncb (
    .clk, .rst_n,
    .pc         (pc_q),
    .lookup_use (deliver),
    .hit        (ncb_hit),
    .line       (ncb_line),
    .wr_valid   (wr_valid),
    .wr_line    (wr_line)
  );

  gshare_predictor u_gshare (
    .clk, .rst_n,
    .pc            (pc_q),
    .pred_taken    (pht_taken),
    .pht_idx       (pht_idx),
    .bhr           (bhr),
    .push0_valid   (push0_valid && deliver),
    .push0_taken   (push0_taken),
    .push1_valid   (push1_valid && deliver),
    .push1_taken   (push1_taken),
    .restore_valid (redirect_valid),
    .restore_bhr   (redirect_bhr),
    .update_valid, .update_idx, .update_taken
  );

  run_select u_select (
    .pc          (pc_q),
    .ic_hit      (ic_hit),
    .ic_inst     (ic_inst),
    .ncb_hit     (ncb_hit),
    .ncb_line    (ncb_line),
    .pht_taken   (pht_taken),
    .pht_idx     (pht_idx),
    .bhr         (bhr),
    .valid       (sel_valid),
    .bundle      (fb),
    .push0_valid (push0_valid),
    .push0_taken (push0_taken),
    .push1_valid (push1_valid),
    .push1_taken (push1_taken),
    .fill_trigger(fill_trigger)
  );

  fill_unit u_fill (
    .clk, .rst_n,
    .deliver        (deliver),
    .bundle         (fb),
    .fill_trigger   (fill_trigger),
    .redirect_valid (redirect_valid),
    .redirect_br_pc (redirect_br_pc),
    .redirect_taken (redirect_taken),
    .wr_valid       (wr_valid),
    .wr_line        (wr_line)
  );

endmodule
