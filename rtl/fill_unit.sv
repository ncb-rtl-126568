// fill_unit: builds NCB lines by merging two non-consecutive basic blocks.
//
// The fill unit watches the runs delivered to the decoder. It works on
// original instructions, before decoding, and keeps them in program order.
//   IDLE  - line buffer empty. A delivered I-cache run that ends in a branch
//           predicted taken (fill_trigger) is copied into the line buffer as
//           the first basic block: state HOLD.
//   HOLD  - waiting for the branch to be resolved taken. A redirect from that
//           very branch with outcome taken moves to ARMED; any other redirect
//           empties the buffer; a new triggering run replaces the buffer.
//   ARMED - the next delivered run starts at the branch target. Its first
//           basic block is appended after the first block until the line
//           (8 instructions) is full or that block ends, and the merged line
//           is written to the NCB, tagged by the first block's start address,
//           with the address after its last instruction as next address.
// Timing: the NCB write (wr_valid, wr_line) is registered and appears one
// cycle after the run that completes the line. A line whose first block
// already fills all 8 slots is written with an empty second block, so its
// next address is the taken target.
// As the NCB mechanism defines it, merging stops at two basic blocks or a
// full line.
// This design's choice: the second block is taken from the run fetched after
// the branch is confirmed taken, because without a stored target the fetch
// unit follows the fall-through path when the NCB misses.
module fill_unit
  import ncb_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // delivered runs
  input  logic          deliver,
  input  fetch_bundle_t bundle,
  input  logic          fill_trigger,
  // branch resolution redirects
  input  logic          redirect_valid,
  input  addr_t         redirect_br_pc,
  input  logic          redirect_taken,
  // NCB write port
  output logic          wr_valid,
  output ncb_line_t     wr_line
);

  typedef enum logic [1:0] {IDLE, HOLD, ARMED} state_e;

  state_e    state_q;
  addr_t     start_q, br_pc_q;
  inst_vec_t buf_q;
  cnt_t      bb1_len_q;

  cnt_t      bb2_avail, room, n2;
  ncb_line_t merged;

  // Merge the line buffer with the delivered run.
  always_comb begin
    bb2_avail = bundle.from_ncb ? cnt_t'(bundle.br0.slot) + 1'b1 : bundle.len;
    room      = cnt_t'(FETCH_W) - bb1_len_q;
    n2        = (bb2_avail < room) ? bb2_avail : room;
    merged         = '0;
    merged.start   = start_q;
    merged.bb1_len = bb1_len_q;
    merged.len     = bb1_len_q + n2;
    merged.target  = bundle.pc[0];
    merged.next    = bundle.pc[0] + 32'({n2, 2'b00});
    merged.br2     = bundle.br0.valid && n2 != '0 && cnt_t'(bundle.br0.slot) == n2 - 1'b1;
    for (int i = 0; i < int'(FETCH_W); i++) begin
      if (cnt_t'(i) < bb1_len_q)
        merged.inst[i] = buf_q[i];
      else if (cnt_t'(i) < bb1_len_q + n2)
        merged.inst[i] = bundle.inst[slot_t'(i - int'(bb1_len_q))];
      else
        merged.inst[i] = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= IDLE;
      start_q   <= '0;
      br_pc_q   <= '0;
      buf_q     <= '0;
      bb1_len_q <= '0;
      wr_valid  <= 1'b0;
      wr_line   <= '0;
    end else begin
      wr_valid <= 1'b0;
      if (redirect_valid) begin
        if (state_q == HOLD && redirect_taken && redirect_br_pc == br_pc_q)
          state_q <= ARMED;
        else
          state_q <= IDLE;
      end else if (deliver) begin
        if (state_q == ARMED) begin
          wr_valid <= 1'b1;
          wr_line  <= merged;
        end
        if (fill_trigger) begin
          state_q   <= HOLD;
          start_q   <= bundle.pc[0];
          br_pc_q   <= bundle.pc[slot_t'(bundle.len - 1'b1)];
          buf_q     <= bundle.inst;
          bb1_len_q <= bundle.len;
        end else if (state_q == ARMED) begin
          state_q <= IDLE;
        end
      end
    end
  end

endmodule
