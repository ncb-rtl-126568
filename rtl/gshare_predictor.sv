// gshare_predictor: two-level adaptive branch direction predictor (gshare).
//
// The pattern history table (PHT) of 2-bit saturating counters is indexed by
// the word address of the fetch PC XOR the global branch history register
// (BHR). Following the evaluated configuration, the BHR is 12 bits, the PHT
// has 4096 entries, and only the BHR is updated speculatively: each predicted
// branch shifts its predicted direction in at fetch time. When a prediction
// fails the back end sends the corrected history (restore), and every resolved
// branch trains its PHT counter (update) with the index it was predicted with.
//
// Timing: after reset the PHT is initialised to weakly not-taken by a sweep
// of 2**IDX_W cycles (4096 by default); fetch may run meanwhile, its
// predictions then come from whatever the table held. Lookup is
// combinational (pred_taken/pht_idx follow pc and the BHR in the same cycle);
// shifts, restore and PHT updates take effect at the next rising clock edge.
// Restore has priority over speculative shifts in the same cycle.
// Design choices: counters initialised to weakly not-taken, the PC bits used
// are pc[13:2], and a run may shift in up to two bits (an NCB run carries two
// branches).
module gshare_predictor
  import ncb_pkg::*;
#(
  parameter int unsigned HIST_W = BHR_W,       // BHR length, 12 bits
  parameter int unsigned IDX_W  = PHT_IDX_W    // log2 of PHT entries, 4096
) (
  input  logic              clk,
  input  logic              rst_n,
  // lookup
  input  addr_t             pc,
  output logic              pred_taken,
  output logic [IDX_W-1:0]  pht_idx,
  output logic [HIST_W-1:0] bhr,
  // speculative history shifts (push0 is older than push1)
  input  logic              push0_valid,
  input  logic              push0_taken,
  input  logic              push1_valid,
  input  logic              push1_taken,
  // history correction after a misprediction
  input  logic              restore_valid,
  input  logic [HIST_W-1:0] restore_bhr,
  // PHT training at branch resolution
  input  logic              update_valid,
  input  logic [IDX_W-1:0]  update_idx,
  input  logic              update_taken
);

  logic [1:0]        pht [2**IDX_W];
  logic [HIST_W-1:0] bhr_q;
  logic [IDX_W-1:0]  hist_ext;

  // History folded to the index width (equal widths by default).
  always_comb begin
    hist_ext = '0;
    for (int i = 0; i < int'(HIST_W); i++) hist_ext[i % IDX_W] ^= bhr_q[i];
  end

  assign bhr        = bhr_q;
  assign pht_idx    = pc[IDX_W+1:2] ^ hist_ext;
  assign pred_taken = pht[pht_idx][1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bhr_q <= '0;
    end else if (restore_valid) begin
      bhr_q <= restore_bhr;
    end else if (push0_valid && push1_valid) begin
      bhr_q <= {bhr_q[HIST_W-3:0], push0_taken, push1_taken};
    end else if (push0_valid) begin
      bhr_q <= {bhr_q[HIST_W-2:0], push0_taken};
    end
  end

  // After reset the table is swept once, one entry per cycle, writing weakly
  // not-taken; training updates arriving during the sweep are dropped. The
  // table keeps a single write port and no reset, so it maps onto a RAM.
  logic [IDX_W-1:0] init_idx_q;
  logic             init_busy_q;
  logic             pht_we;
  logic [IDX_W-1:0] pht_widx;
  logic [1:0]       pht_wdata, cur;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_idx_q  <= '0;
      init_busy_q <= 1'b1;
    end else if (init_busy_q) begin
      init_idx_q  <= init_idx_q + 1'b1;
      init_busy_q <= (init_idx_q != '1);
    end
  end

  always_comb begin
    cur = pht[update_idx];
    if (init_busy_q) begin
      pht_we    = 1'b1;
      pht_widx  = init_idx_q;
      pht_wdata = 2'b01;
    end else begin
      pht_we    = update_valid && (update_taken ? cur != 2'b11 : cur != 2'b00);
      pht_widx  = update_idx;
      pht_wdata = update_taken ? cur + 2'b01 : cur - 2'b01;
    end
  end

  always_ff @(posedge clk) begin
    if (pht_we) pht[pht_widx] <= pht_wdata;
  end

endmodule
