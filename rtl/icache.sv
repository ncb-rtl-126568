// icache: two-bank interleaved, set-associative instruction cache.
//
// Default geometry is the evaluated one: 64 KB, 4-way, 32-byte blocks (8
// instructions). Consecutive blocks live in alternate banks (block address bit
// 0 selects the bank), so the block holding the PC and the sequential block
// after it are read in the same cycle and any 8 consecutive instructions can
// be delivered ("interleaved sequential" fetch).
//
// Fetch port (combinational): for fetch PC pc, inst[i] is the word at
// pc + 4*i, i = 0..7, valid when hit=1. hit needs the PC's block, and also the
// next block when the PC is not at a block boundary. Cutting the run at a
// branch is done by the run selector, not here.
// Miss handling: while fetch_req is high and either the PC's block or the
// block after it is absent, the cache requests the first absent one from the
// next level (refill_req_valid/addr, a 32-byte-aligned byte address, held
// until answered) and writes the refill_data returned with refill_resp_valid
// into a way chosen round-robin per set. One request is outstanding at a
// time. When the PC's block hits and its run does not need the next block,
// that request is a sequential prefetch of one block ahead and fetch goes on
// meanwhile; otherwise it is a miss and hit stays low. With an ideal next level
// answering 6 cycles after the request, a miss costs 1 + 6 cycles.
// Round-robin replacement and the single outstanding request are this
// design's choices.
module icache
  import ncb_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 65536,
  parameter int unsigned WAYS       = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      fetch_req,
  input  addr_t     pc,
  output logic      hit,
  output inst_vec_t inst,
  // refill from the next level
  output logic      refill_req_valid,
  output addr_t     refill_req_addr,
  input  logic      refill_resp_valid,
  input  inst_vec_t refill_data
);

  localparam int unsigned BLOCK_BYTES = FETCH_W * 4;
  localparam int unsigned OFF_W       = $clog2(BLOCK_BYTES);           // 5
  localparam int unsigned BANK_SETS   = SIZE_BYTES / BLOCK_BYTES / WAYS / 2;
  localparam int unsigned SET_W       = $clog2(BANK_SETS);              // 8
  localparam int unsigned TAG_W       = 32 - OFF_W - 1 - SET_W;
  localparam int unsigned WAY_W       = (WAYS > 1) ? $clog2(WAYS) : 1;

  typedef logic [31-OFF_W:0] blk_t;

  typedef struct packed {
    logic [TAG_W-1:0] tag;
    inst_vec_t        data;
  } line_t;

  logic [WAYS-1:0]  valid_q [2][BANK_SETS];
  logic [WAY_W-1:0] rr_q    [2][BANK_SETS];

  blk_t             blk0, blk1;
  blk_t             bank_blk [2];
  logic [1:0]       bank_hit;
  inst_vec_t        bank_data [2];
  line_t            rd_line [2][WAYS];
  logic             need1, hit0, hit1;
  logic [2*FETCH_W*32-1:0] window;

  typedef enum logic {IDLE, WAIT} state_e;
  state_e state_q;
  blk_t   miss_blk_q;

  assign blk0 = pc[31:OFF_W];
  assign blk1 = blk0 + 1'b1;
  // Bank b serves whichever of the two blocks has address parity b.
  assign bank_blk[0] = blk0[0] ? blk1 : blk0;
  assign bank_blk[1] = blk0[0] ? blk0 : blk1;

  always_comb begin
    for (int b = 0; b < 2; b++) begin
      bank_hit[b]  = 1'b0;
      bank_data[b] = '0;
      for (int w = 0; w < int'(WAYS); w++) begin
        if (valid_q[b][bank_blk[b][SET_W:1]][w] &&
            rd_line[b][w].tag == bank_blk[b][31-OFF_W:SET_W+1]) begin
          bank_hit[b]  = 1'b1;
          bank_data[b] = rd_line[b][w].data;
        end
      end
    end
    hit0  = bank_hit[blk0[0]];
    hit1  = bank_hit[blk1[0]];
    need1 = pc[OFF_W-1:2] != '0;
    hit   = hit0 && (hit1 || !need1);
    // 16 consecutive words starting at the PC's block; pick 8 from the PC on.
    window = {bank_data[blk1[0]], bank_data[blk0[0]]};
    for (int i = 0; i < int'(FETCH_W); i++)
      inst[i] = window[(32'(pc[OFF_W-1:2]) + i) * 32 +: 32];
  end

  assign refill_req_valid = (state_q == WAIT);
  assign refill_req_addr  = {miss_blk_q, {OFF_W{1'b0}}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= IDLE;
      miss_blk_q <= '0;
      for (int b = 0; b < 2; b++)
        for (int s = 0; s < int'(BANK_SETS); s++) begin
          valid_q[b][s] <= '0;
          rr_q[b][s]    <= '0;
        end
    end else begin
      unique case (state_q)
        // Demand miss on the PC's block or on the next block when the run
        // needs it, or sequential prefetch of the next block when the PC's
        // block hits and the next one is absent.
        IDLE: if (fetch_req && !(hit0 && hit1)) begin
          miss_blk_q <= hit0 ? blk1 : blk0;
          state_q    <= WAIT;
        end
        WAIT: if (refill_resp_valid) begin
          valid_q[miss_blk_q[0]][miss_blk_q[SET_W:1]][rr_q[miss_blk_q[0]][miss_blk_q[SET_W:1]]] <= 1'b1;
          rr_q[miss_blk_q[0]][miss_blk_q[SET_W:1]] <= rr_q[miss_blk_q[0]][miss_blk_q[SET_W:1]] + 1'b1;
          state_q <= IDLE;
        end
        default: state_q <= IDLE;
      endcase
    end
  end

  // One tag+data array per bank and way: a single write port (refill) and a
  // single combinational read port each.
  logic [WAY_W-1:0] fill_way;
  assign fill_way = rr_q[miss_blk_q[0]][miss_blk_q[SET_W:1]];

  for (genvar b = 0; b < 2; b++) begin : g_bank
    for (genvar w = 0; w < int'(WAYS); w++) begin : g_way
      line_t mem [BANK_SETS];
      always_ff @(posedge clk) begin
        if (state_q == WAIT && refill_resp_valid && miss_blk_q[0] == b[0] && fill_way == w[WAY_W-1:0])
          mem[miss_blk_q[SET_W:1]] <= '{tag: miss_blk_q[31-OFF_W:SET_W+1], data: refill_data};
      end
      assign rd_line[b][w] = mem[bank_blk[b][SET_W:1]];
    end
  end

endmodule
