// ncb_pkg: types, constants and predecode helpers shared by the NCB fetch unit.
//
// The fetch unit delivers up to FETCH_W = 8 instructions per cycle (the fetch
// and issue width of the evaluated processor). Instructions are 32-bit MIPS
// words at word-aligned 32-bit byte addresses. A "run" is a group of
// instructions handed to the decoder in one cycle; an I-cache run holds one
// basic block (or part of one), an NCB run holds two non-consecutive basic
// blocks back to back. Branch detection uses MIPS opcodes; delay slots are not
// modelled (the evaluated instruction set has none). The gshare history length
// (12 bits) and PHT size (4096) are those of the evaluated predictor.
package ncb_pkg;

  parameter int unsigned FETCH_W = 8;              // instructions per run and per NCB line
  parameter int unsigned CNT_W   = $clog2(FETCH_W + 1);
  parameter int unsigned SLOT_W  = $clog2(FETCH_W);
  parameter int unsigned BHR_W   = 12;             // gshare history bits
  parameter int unsigned PHT_IDX_W = 12;           // 4096-entry pattern history table

  typedef logic [31:0]          addr_t;
  typedef logic [31:0]          inst_t;
  typedef logic [CNT_W-1:0]     cnt_t;
  typedef logic [SLOT_W-1:0]    slot_t;
  typedef logic [BHR_W-1:0]     bhr_t;
  typedef logic [PHT_IDX_W-1:0] pht_idx_t;
  typedef inst_t [FETCH_W-1:0]  inst_vec_t;
  typedef addr_t [FETCH_W-1:0]  addr_vec_t;

  // One NCB line: start address (tag), instructions, next address, as the
  // mechanism defines the line,
  // plus the bookkeeping needed to recover each instruction's address.
  typedef struct packed {
    addr_t     start;     // tag: address of the first basic block
    inst_vec_t inst;      // merged instructions, in program order
    cnt_t      len;       // number of valid instructions
    cnt_t      bb1_len;   // instructions of the first block, its branch included
    addr_t     target;    // address of the second block (taken target of the first branch)
    logic      br2;       // the line ends with a second branch
    addr_t     next;      // address following the last instruction
  } ncb_line_t;

  // Information on the (at most two) branches of a delivered run, echoed back
  // by the back end when the branch resolves.
  typedef struct packed {
    logic     valid;
    slot_t    slot;       // position in the run
    logic     pred_taken;
    logic     uses_pht;   // predicted by the PHT (update it on resolution)
    pht_idx_t pht_idx;    // PHT entry used for the prediction
    bhr_t     bhr;        // history before this branch's speculative shift
  } br_info_t;

  // Run delivered to the decoder.
  typedef struct packed {
    addr_vec_t pc;        // address of each slot
    inst_vec_t inst;
    cnt_t      len;
    logic      from_ncb;
    br_info_t  br0;       // branch ending the first basic block
    br_info_t  br1;       // branch ending the second block of an NCB run
    addr_t     next_pc;   // predicted address of the following run
  } fetch_bundle_t;

  // MIPS control-transfer instructions: J, JAL, BEQ, BNE, BLEZ, BGTZ, REGIMM
  // branches, JR and JALR.
  function automatic logic is_branch(inst_t i);
    logic [5:0] op, fn;
    op = i[31:26];
    fn = i[5:0];
    return (op inside {6'o01, 6'o02, 6'o03, 6'o04, 6'o05, 6'o06, 6'o07}) ||
           (op == 6'o00 && (fn == 6'o10 || fn == 6'o11));
  endfunction

  // Unconditional transfers: always predicted taken.
  function automatic logic is_uncond(inst_t i);
    logic [5:0] op, fn;
    op = i[31:26];
    fn = i[5:0];
    return (op == 6'o02) || (op == 6'o03) || (op == 6'o00 && (fn == 6'o10 || fn == 6'o11));
  endfunction

endpackage
