// ncb_buffer: the non-consecutive basic block buffer (NCB).
//
// A set-associative cache, 512 sets x 2 ways by default (the geometry of the
// branch target buffer it replaces), whose lines each hold up to 8 original
// (undecoded) instructions: a first basic block ending in a branch, followed by
// the basic block at that branch's taken target. A line is tagged by the start
// address of its first basic block and carries the address of the instruction
// following its last one (the next-address field). Instruction words alone
// take 512*2*8*4 bytes = 32 KB.
//
// Lookup (combinational): the fetch PC indexes the set with its word address
// bits pc[10:2]; a way hits when it is valid and its tag equals pc[31:11].
// The hitting line is returned with hit=1 in the same cycle.
// Write (clocked): the fill unit presents a complete line; it overwrites the
// way that already holds that start address, otherwise the invalid or least
// recently used way. One LRU bit per set is refreshed by lookup hits that the
// fetch unit uses (lookup_use) and by writes.
// Besides the fields the NCB line format defines (tag, instructions, next
// address) the line stores its instruction count, the
// length of its first block, the second block's start address and whether it
// ends in a second branch; these are this design's choices, needed to give
// every delivered instruction its address.
module ncb_buffer
  import ncb_pkg::*;
#(
  parameter int unsigned SETS = 512
) (
  input  logic      clk,
  input  logic      rst_n,
  // lookup port
  input  addr_t     pc,
  input  logic      lookup_use,   // the fetch unit consumed the lookup this cycle
  output logic      hit,
  output ncb_line_t line,
  // write port from the fill unit
  input  logic      wr_valid,
  input  ncb_line_t wr_line
);

  localparam int unsigned IDX_W = $clog2(SETS);
  localparam int unsigned TAG_W = 32 - IDX_W - 2;
  localparam int unsigned WAYS  = 2;

  typedef struct packed {
    logic [TAG_W-1:0] tag;
    inst_vec_t        inst;
    cnt_t             len;
    cnt_t             bb1_len;
    addr_t            target;
    logic             br2;
    addr_t            next;
  } entry_t;

  logic   [WAYS-1:0] valid_q [SETS];
  entry_t            rd_entry [WAYS];
  entry_t            wr_entry [WAYS];   // read at the write index, for the tag match
  logic              lru_q   [SETS];     // way to replace next

  logic [IDX_W-1:0] rd_idx, wr_idx;
  logic [TAG_W-1:0] rd_tag, wr_tag;
  logic [WAYS-1:0]  rd_match, wr_match;
  logic             rd_way;
  logic             wr_way;

  assign rd_idx = pc[IDX_W+1:2];
  assign rd_tag = pc[31:IDX_W+2];
  assign wr_idx = wr_line.start[IDX_W+1:2];
  assign wr_tag = wr_line.start[31:IDX_W+2];

  always_comb begin
    for (int w = 0; w < int'(WAYS); w++) begin
      rd_match[w] = valid_q[rd_idx][w] && rd_entry[w].tag == rd_tag;
      wr_match[w] = valid_q[wr_idx][w] && wr_entry[w].tag == wr_tag;
    end
    rd_way = rd_match[1];
    hit    = |rd_match;

    line         = '0;
    line.start   = pc;
    line.inst    = rd_entry[rd_way].inst;
    line.len     = rd_entry[rd_way].len;
    line.bb1_len = rd_entry[rd_way].bb1_len;
    line.target  = rd_entry[rd_way].target;
    line.br2     = rd_entry[rd_way].br2;
    line.next    = rd_entry[rd_way].next;

    // Victim: the way already holding the start address, else an invalid
    // way, else the LRU way.
    if (|wr_match)                     wr_way = wr_match[1];
    else if (!valid_q[wr_idx][0])      wr_way = 1'b0;
    else if (!valid_q[wr_idx][1])      wr_way = 1'b1;
    else                               wr_way = lru_q[wr_idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(SETS); s++) begin
        valid_q[s] <= '0;
        lru_q[s]   <= 1'b0;
      end
    end else begin
      if (lookup_use && hit) lru_q[rd_idx] <= ~rd_way;
      if (wr_valid) begin
        valid_q[wr_idx][wr_way] <= 1'b1;
        lru_q[wr_idx]           <= ~wr_way;
      end
    end
  end

  // One array per way: a write port for the fill unit and read ports for the
  // lookup and for the write-side tag match.
  for (genvar w = 0; w < int'(WAYS); w++) begin : g_way
    entry_t mem [SETS];
    always_ff @(posedge clk) begin
      if (wr_valid && wr_way == w[0])
        mem[wr_idx] <= '{tag: wr_tag, inst: wr_line.inst, len: wr_line.len,
                         bb1_len: wr_line.bb1_len, target: wr_line.target,
                         br2: wr_line.br2, next: wr_line.next};
    end
    assign rd_entry[w] = mem[rd_idx];
    assign wr_entry[w] = mem[wr_idx];
  end

endmodule
