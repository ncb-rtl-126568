// tb_prog_pkg: synthetic MIPS-like program and branch oracle for the testbenches.
//
// The program occupies CODE_WORDS words from CODE_BASE. Word w is a control
// transfer when hash(w) % br_every == 0, which gives basic blocks of about
// br_every instructions: 5 is integer-code sized, 12 floating-point-code sized.
// A testbench may change br_every between runs (then reset the design, as the
// program changes). Conditional branches are BEQ
// with a PC-relative offset kept inside the program; some are J (absolute).
// The last word jumps back to CODE_BASE. Only loop-like and alternating
// branches jump backwards. Every other word is an ADDIU, which
// the fetch unit's predecoder does not treat as a branch.
// branch_taken() gives each branch a behaviour chosen by its address: always
// taken, never taken, loop-like (taken twice, then not) or alternating, as a
// function of how often that branch has executed before.
package tb_prog_pkg;

  parameter logic [31:0] CODE_BASE  = 32'h0040_0000;
  parameter int unsigned CODE_WORDS = 24576;
  int unsigned br_every = 5;

  function automatic int unsigned hash(int unsigned x);
    int unsigned y;
    y = x * 32'h9E37_79B1;
    y = y ^ (y >> 15);
    y = y * 32'h85EB_CA6B;
    return y ^ (y >> 13);
  endfunction

  function automatic int unsigned word_of(logic [31:0] pc);
    return (pc - CODE_BASE) >> 2;
  endfunction

  function automatic bit in_code(logic [31:0] pc);
    return pc >= CODE_BASE && pc < CODE_BASE + 4 * CODE_WORDS && pc[1:0] == 2'b00;
  endfunction

  function automatic bit is_br_word(int unsigned w);
    return (w == CODE_WORDS - 1) || (w != 0 && hash(w) % br_every == 0);
  endfunction

  function automatic bit is_jump_word(int unsigned w);
    return (w == CODE_WORDS - 1) || (is_br_word(w) && hash(w + 7) % 10 == 0);
  endfunction

  // Word index of the taken target of branch word w.
  function automatic int unsigned target_word(int unsigned w);
    int off;
    if (w == CODE_WORDS - 1) return 0;
    // Loop-like and alternating branches jump back, all others forward, so
    // the program cannot stay in one loop forever.
    if (!is_jump_word(w) && hash(w + 11) % 4 >= 2) off = -2 - int'(hash(w + 3) % 40);
    else                                            off = 1 + int'(hash(w + 3) % 40);
    return int'(unsigned'(int'(w) + off + int'(CODE_WORDS))) % CODE_WORDS;
  endfunction

  function automatic logic [31:0] word_at(logic [31:0] pc);
    int unsigned w, t;
    logic [15:0] imm;
    logic [31:0] tpc;
    if (!in_code(pc)) return 32'h2400_0000;         // ADDIU outside the program
    w = word_of(pc);
    if (is_br_word(w)) begin
      t   = target_word(w);
      tpc = CODE_BASE + 4 * t;
      if (is_jump_word(w)) return {6'o02, tpc[27:2]};             // J
      imm = 16'(int'(t) - int'(w) - 1);
      return {6'o04, 5'd1, 5'd2, imm};                            // BEQ r1,r2
    end
    return {6'o11, 5'(hash(w) >> 3), 5'(hash(w) >> 8), 16'(hash(w) >> 16)};  // ADDIU
  endfunction

  function automatic logic [31:0] taken_target(logic [31:0] pc);
    return CODE_BASE + 4 * target_word(word_of(pc));
  endfunction

  // Outcome of the n-th execution (n = 0, 1, ...) of branch word w.
  function automatic bit branch_taken(logic [31:0] pc, int unsigned n);
    int unsigned w;
    w = word_of(pc);
    if (is_jump_word(w)) return 1'b1;
    case (hash(w + 11) % 4)
      0:       return 1'b1;
      1:       return 1'b0;
      2:       return (n % 3) != 2;
      default: return n[0];
    endcase
  endfunction

endpackage
