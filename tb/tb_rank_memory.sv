// tb_rank_memory: self-checking test of the short/long-term rank list.
//
// Runs random insert and jump operations on a 16-entry list with a random
// long-term boundary, jump value and insertion mode, and after every
// operation compares the whole list (reference address and valid flag per
// position), the stored count and the predicted insert address / forgetting
// flag with a behavioural model written independently in the testbench.
// Counts that forgetting, jumps across the boundary, clamped jumps to the
// top, and long-term-first inserts each happened.
module tb_rank_memory;
  import am_pkg::*;

  localparam int unsigned N  = 16;
  localparam int unsigned AW = 4;
  localparam int unsigned CW = 5;

  logic clk = 1'b0;
  logic rst_n;
  always #500 clk = ~clk;

  ins_mode_e     ins_mode;
  logic [CW-1:0] boundary, count;
  logic          insert, jump, jump_hit, ins_evict, rd_valid;
  logic [AW-1:0] ins_addr, ins_pos, jump_ref, jump_val, jump_from, jump_to, rd_pos, rd_ref;

  rank_memory #(.N_ENT(N)) dut (.*);

  int m_ref [N];
  bit m_vld [N];
  int m_alloc;

  int checks = 0, failures = 0;
  int n_evict = 0, n_cross = 0, n_clamp = 0, n_lt_ins = 0, n_st_ins = 0, n_jump = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int m_ins_pos();
    int b = (int'(boundary) >= N) ? N - 1 : int'(boundary);
    if (ins_mode == INS_LONG_FIRST)
      for (int i = 0; i < int'(boundary) && i < N; i++) if (!m_vld[i]) return 0;
    return b;
  endfunction

  function automatic int m_free(input int s);
    for (int i = s; i < N; i++) if (!m_vld[i]) return i;
    return -1;
  endfunction

  task automatic compare(input string tag);
    for (int i = 0; i < N; i++) begin
      rd_pos = AW'(i);
      #1;
      check(rd_valid == m_vld[i], $sformatf("%s valid[%0d]", tag, i));
      if (m_vld[i]) check(int'(rd_ref) == m_ref[i], $sformatf("%s ref[%0d]=%0d exp %0d", tag, i, rd_ref, m_ref[i]));
    end
    check(int'(count) == m_alloc, $sformatf("%s count", tag));
  endtask

  task automatic do_insert();
    int s = m_ins_pos();
    int h = m_free(s);
    int a;
    bit ev = (h < 0);
    #1;
    check(int'(ins_pos) == s, "insert position");
    check(ins_evict == ev, "forget prediction");
    if (ev) begin a = m_ref[N-1]; h = N - 1; n_evict++; end
    else begin a = m_alloc; m_alloc++; end
    check(int'(ins_addr) == a, $sformatf("insert address %0d exp %0d", ins_addr, a));
    if (s == 0 && boundary != 0) n_lt_ins++; else n_st_ins++;
    for (int i = h; i > s; i--) begin m_ref[i] = m_ref[i-1]; m_vld[i] = m_vld[i-1]; end
    m_ref[s] = a; m_vld[s] = 1;
    insert = 1;
    @(negedge clk);
    insert = 0;
  endtask

  task automatic do_jump(input int ref_a);
    int p = -1, q, t;
    for (int i = 0; i < N; i++) if (m_vld[i] && m_ref[i] == ref_a && p < 0) p = i;
    jump_ref = AW'(ref_a);
    #1;
    check(jump_hit == (p >= 0), "jump hit");
    if (p >= 0) begin
      q = (p >= int'(jump_val)) ? p - int'(jump_val) : 0;
      check(int'(jump_from) == p && int'(jump_to) == q, "jump positions");
      if (p >= int'(boundary) && q < int'(boundary)) n_cross++;
      if (p < int'(jump_val)) n_clamp++;
      n_jump++;
      t = m_ref[p];
      for (int i = p; i > q; i--) begin m_ref[i] = m_ref[i-1]; m_vld[i] = m_vld[i-1]; end
      m_ref[q] = t; m_vld[q] = 1;
    end
    jump = 1;
    @(negedge clk);
    jump = 0;
  endtask

  initial begin
    #1000000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    insert = 0; jump = 0; jump_ref = '0; jump_val = 4'd3; rd_pos = '0;
    boundary = 5'd8; ins_mode = INS_SHORT_TERM;
    for (int i = 0; i < N; i++) begin m_ref[i] = 0; m_vld[i] = 0; end
    m_alloc = 0;
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    compare("reset");

    for (int round = 0; round < 6; round++) begin
      // fresh list for each configuration
      rst_n = 0; @(negedge clk); rst_n = 1;
      for (int i = 0; i < N; i++) begin m_ref[i] = 0; m_vld[i] = 0; end
      m_alloc = 0;
      boundary = CW'($urandom_range(0, N));
      ins_mode = (round % 2 == 1) ? INS_LONG_FIRST : INS_SHORT_TERM;
      jump_val = AW'($urandom_range(1, 6));
      for (int op = 0; op < 120; op++) begin
        if ($urandom_range(0, 2) != 0 || m_alloc == 0) do_insert();
        else do_jump($urandom_range(0, N - 1));
        compare($sformatf("r%0d op%0d", round, op));
      end
    end

    check(n_evict > 0,  "forgetting happened");
    check(n_cross > 0,  "jump across the boundary happened");
    check(n_clamp > 0,  "jump clamped at the top happened");
    check(n_lt_ins > 0, "long-term insert happened");
    check(n_st_ins > 0, "short-term insert happened");
    $display("events: forget=%0d cross=%0d clamp=%0d lt_ins=%0d st_ins=%0d jumps=%0d",
             n_evict, n_cross, n_clamp, n_lt_ins, n_st_ins, n_jump);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
