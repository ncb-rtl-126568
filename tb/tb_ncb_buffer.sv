// tb_ncb_buffer: random test of the NCB storage against a reference model of
// a 512-set, 2-way cache with one LRU bit per set. Start addresses are drawn
// from a pool that maps several tags onto a few sets, so lines are replaced,
// overwritten in place and looked up after eviction. Each cycle the lookup
// result (hit and every line field) is compared with the model.
module tb_ncb_buffer;
  import ncb_pkg::*;

  localparam int SETS = 512;

  logic      clk = 1'b0, rst_n = 1'b0;
  addr_t     pc;
  logic      lookup_use;
  logic      hit;
  ncb_line_t line;
  logic      wr_valid;
  ncb_line_t wr_line;

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_evict = 0, n_overwrite = 0;

  // reference model
  bit        m_valid [SETS][2];
  ncb_line_t m_line  [SETS][2];
  bit        m_lru   [SETS];

  ncb_buffer dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic addr_t pick_addr();
    // 4 sets x 6 tags
    return {19'($urandom % 6), 9'(($urandom % 4) * 37), 2'b00} + 32'h0040_0000 * ($urandom % 2);
  endfunction

  function automatic ncb_line_t rand_line(addr_t start);
    ncb_line_t l;
    l.start = start;
    for (int i = 0; i < FETCH_W; i++) l.inst[i] = $urandom;
    l.len = cnt_t'(1 + $urandom % FETCH_W);
    l.bb1_len = cnt_t'(1 + $urandom % l.len);
    l.target = $urandom;
    l.br2 = $urandom % 2;
    l.next = $urandom;
    return l;
  endfunction

  initial begin
    int s, w;
    bit mh, mw;
    pc = '0; lookup_use = 0; wr_valid = 0; wr_line = '0;
    foreach (m_valid[i, j]) m_valid[i][j] = 0;
    foreach (m_lru[i]) m_lru[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 20000; c++) begin
      pc         = pick_addr();
      lookup_use = $urandom % 2;
      wr_valid   = $urandom % 3 == 0;
      wr_line    = rand_line(pick_addr());
      #1;
      s  = int'(pc[10:2]);
      mh = 0; mw = 0;
      for (int k = 0; k < 2; k++)
        if (m_valid[s][k] && m_line[s][k].start == pc) begin mh = 1; mw = k[0]; end
      check(hit == mh, $sformatf("hit for %h", pc));
      if (mh) begin
        n_hit++;
        check(line.start == pc && line.inst == m_line[s][mw].inst && line.len == m_line[s][mw].len &&
              line.bb1_len == m_line[s][mw].bb1_len && line.target == m_line[s][mw].target &&
              line.br2 == m_line[s][mw].br2 && line.next == m_line[s][mw].next,
              $sformatf("line contents for %h", pc));
      end else n_miss++;
      @(posedge clk);
      // model: the victim is chosen with the LRU state of this cycle; the
      // lookup refresh and the write both land at the clock edge, the write
      // last.
      w = -1;
      if (wr_valid) begin
        for (int k = 0; k < 2; k++)
          if (m_valid[int'(wr_line.start[10:2])][k] && m_line[int'(wr_line.start[10:2])][k].start == wr_line.start) w = k;
        if (w >= 0) n_overwrite++;
        else if (!m_valid[int'(wr_line.start[10:2])][0]) w = 0;
        else if (!m_valid[int'(wr_line.start[10:2])][1]) w = 1;
        else begin w = int'(m_lru[int'(wr_line.start[10:2])]); n_evict++; end
      end
      if (lookup_use && mh) m_lru[s] = !mw;
      if (wr_valid) begin
        s = int'(wr_line.start[10:2]);
        m_valid[s][w] = 1;
        m_line[s][w]  = wr_line;
        m_lru[s]      = !w[0];
      end
      #1;
    end
    check(n_hit > 100 && n_miss > 100 && n_evict > 100 && n_overwrite > 100, "coverage");
    $display("hits=%0d misses=%0d evictions=%0d overwrites=%0d", n_hit, n_miss, n_evict, n_overwrite);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
