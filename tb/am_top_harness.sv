// am_top_harness: stimulus and reference model for the whole learner.
//
// Drives am_learning_top through its ports and checks every query against a
// model kept here: the stored reference vectors, the rank list (insert with
// move-down and forgetting, jump up by the jump value) and the nearest-
// neighbour decision against the threshold. Queries are a mix of new random
// vectors, near copies and exact repeats of stored references (host path)
// and 16x16 images (feature-extractor path; the extracted words are read
// from the query buffer once the search runs and checked against Sobel/arctan computed here).
// After every query it compares the result fields, the search-to-result
// cycle count and the whole rank list. Halfway it switches to the Manhattan
// metric and to long-term-first insertion. It counts how often each
// mechanism happened and, with CHECK_EVENTS, fails any that never did.
module am_top_harness
  import am_pkg::*;
#(
  parameter int unsigned N_BLK        = N_BLOCKS,
  parameter int unsigned ROWS_N       = ROWS,
  parameter int unsigned N_QUERIES    = 60,
  parameter bit          CHECK_EVENTS = 1'b1,
  parameter int unsigned NEW_TENTHS   = 4,     // share of new random queries, in tenths
  localparam int unsigned N      = N_BLK * ROWS_N,
  localparam int unsigned AW     = $clog2(N_BLK) + $clog2(ROWS_N),
  localparam int unsigned CW     = $clog2(N + 1),
  localparam int unsigned BW     = $clog2(N_BLK)
) (
  input  logic               clk,
  output logic               rst_n,
  output metric_e            metric,
  output ins_mode_e          ins_mode,
  output logic [CW-1:0]      boundary,
  output logic [AW-1:0]      jump_val,
  output logic [ACC_W-1:0]   threshold,
  output logic               q_wr_en,
  output logic [5:0]         q_wr_dim,
  output logic [FEAT_W-1:0]  q_wr_data,
  output logic               go,
  output logic               img_start,
  output logic [255:0]       img,
  input  logic               busy,
  input  logic               res_valid,
  input  logic               res_matched,
  input  logic               res_found,
  input  logic               res_evicted,
  input  logic [AW-1:0]      res_addr,
  input  logic [ACC_W-1:0]   res_dist,
  output logic [AW-1:0]      rank_rd_pos,
  input  logic [AW-1:0]      rank_rd_ref,
  input  logic               rank_rd_valid,
  input  logic [CW-1:0]      ref_count,
  output logic [AW-1:0]      sum_rd_addr,
  input  logic [ACC_W-1:0]   sum_rd_data,
  output logic [BW-1:0]      min_rd_blk,
  input  logic [ACC_W-1:0]   min_rd_dist,
  input  logic [AW-1:0]      min_rd_addr,
  input  logic               min_rd_found,
  input  logic               rank_insert,
  input  logic               rank_jump,
  input  logic [AW-1:0]      rank_ins_pos,
  input  logic [AW-1:0]      rank_jump_from,
  input  logic [AW-1:0]      rank_jump_to,
  input  logic [FEAT_W-1:0]  qbuf [DIMS],    // query buffer contents
  input  logic               dut_searching   // a search is running
);

  localparam int SEARCH = DIMS * CYC_PER_DIM + ROWS_N + N_BLK;

  int checks = 0, failures = 0;

  // model state
  logic [15:0] m_vec [N][DIMS];
  int          m_ref [N];
  bit          m_vld [N];
  int          m_alloc;
  logic [15:0] q [DIMS];

  // mechanism counters
  int n_learn_empty = 0, n_learn = 0, n_forget = 0, n_match = 0, n_cross = 0;
  int n_lt_ins = 0, n_st_ins = 0, n_manh = 0, n_eucl = 0, n_image = 0, n_host = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic longint vdist(input int a, input bit man);
    longint s = 0;
    for (int d = 0; d < DIMS; d++) begin
      longint df = longint'(q[d]) - longint'(m_vec[a][d]);
      if (df < 0) df = -df;
      s += man ? df : df * df;
    end
    return s;
  endfunction

  function automatic int px(input logic [255:0] im, input int r, input int c);
    if (r < 0 || c < 0 || r > 15 || c > 15) return 0;
    return int'(im[r*16 + c]);
  endfunction

  function automatic real feat_model(input logic [255:0] im, input int k);
    int gx = 0, gy = 0;
    real th;
    for (int a = 0; a < 2; a++)
      for (int b = 0; b < 2; b++) begin
        int i = 2 * (k / 8) + a;
        int j = 2 * (k % 8) + b;
        gx += px(im, i-1, j+1) + 2*px(im, i, j+1) + px(im, i+1, j+1)
            - px(im, i-1, j-1) - 2*px(im, i, j-1) - px(im, i+1, j-1);
        gy += px(im, i-1, j-1) + 2*px(im, i-1, j) + px(im, i-1, j+1)
            - px(im, i+1, j-1) - 2*px(im, i+1, j) - px(im, i+1, j+1);
      end
    if (gx == 0 && gy == 0) return 16384.0;
    if (gx == 0) th = (gy > 0) ? 90.0 : -90.0;
    else th = $atan(real'(gy) / real'(gx)) * 180.0 / 3.14159265358979;
    return 16384.0 + th * 65536.0 / 360.0;
  endfunction

  task automatic compare_ranks(input string tag);
    int bad = 0;
    for (int i = 0; i < N; i++) begin
      rank_rd_pos = AW'(i);
      #1;
      if (rank_rd_valid != m_vld[i] || (m_vld[i] && int'(rank_rd_ref) != m_ref[i])) bad++;
    end
    check(bad == 0, $sformatf("%s rank list (%0d positions differ)", tag, bad));
    check(int'(ref_count) == m_alloc, $sformatf("%s reference count", tag));
  endtask

  // wait for the result, then compare with the model
  task automatic finish_query(input string tag, input bit chk_lat);
    bit man = (metric == METRIC_MANHATTAN);
    bit e_found = 0, e_match, ev;
    int e_addr = 0, s, h, a, cyc = 0, p, qq, tmp;
    longint e_d = 0;
    bit saw_ins = 0, saw_jump = 0;
    int ins_pos_seen = 0, jf = 0, jt = 0;
    while (!res_valid && cyc < 100000) begin
      if (rank_insert) begin saw_ins = 1; ins_pos_seen = int'(rank_ins_pos); end
      if (rank_jump) begin saw_jump = 1; jf = int'(rank_jump_from); jt = int'(rank_jump_to); end
      @(negedge clk); cyc++;
    end
    check(res_valid, $sformatf("%s result", tag));
    for (int i = 0; i < N; i++) begin
      if (m_vld[i]) begin
        int ad = m_ref[i];
        longint dd = vdist(ad, man);
        if (!e_found || dd < e_d || (dd == e_d && ad < e_addr)) begin
          e_found = 1; e_addr = ad; e_d = dd;
        end
      end
    end
    e_match = e_found && (e_d <= longint'(threshold));
    if (man) n_manh++; else n_eucl++;
    check(res_found == e_found, $sformatf("%s found", tag));
    check(res_matched == e_match, $sformatf("%s matched %0d exp %0d (d=%0d thr=%0d)",
                                            tag, res_matched, e_match, e_d, threshold));
    if (e_found) check(longint'(res_dist) == e_d, $sformatf("%s distance %0d exp %0d", tag, res_dist, e_d));
    if (e_match) begin
      n_match++;
      check(res_addr == AW'(e_addr), $sformatf("%s winner %0d exp %0d", tag, res_addr, e_addr));
      if (chk_lat) check(cyc == SEARCH + 3, $sformatf("%s match latency %0d", tag, cyc));
      p = -1;
      for (int i = 0; i < N; i++) if (m_vld[i] && m_ref[i] == e_addr && p < 0) p = i;
      qq = (p >= int'(jump_val)) ? p - int'(jump_val) : 0;
      check(saw_jump && jf == p && jt == qq, $sformatf("%s jump %0d->%0d exp %0d->%0d", tag, jf, jt, p, qq));
      if (p >= int'(boundary) && qq < int'(boundary)) n_cross++;
      tmp = m_ref[p];
      for (int i = p; i > qq; i--) begin m_ref[i] = m_ref[i-1]; m_vld[i] = m_vld[i-1]; end
      m_ref[qq] = tmp; m_vld[qq] = 1;
    end else begin
      n_learn++;
      if (!e_found) n_learn_empty++;
      if (chk_lat) check(cyc == SEARCH + DIMS + 4, $sformatf("%s learn latency %0d", tag, cyc));
      s = (int'(boundary) >= N) ? N - 1 : int'(boundary);
      if (ins_mode == INS_LONG_FIRST)
        for (int i = 0; i < int'(boundary) && i < N; i++) if (!m_vld[i]) begin s = 0; break; end
      h = -1;
      for (int i = s; i < N; i++) if (!m_vld[i]) begin h = i; break; end
      ev = (h < 0);
      if (ev) begin a = m_ref[N-1]; h = N - 1; n_forget++; end
      else begin a = m_alloc; m_alloc++; end
      if (s == 0 && boundary != 0) n_lt_ins++; else n_st_ins++;
      check(saw_ins && ins_pos_seen == s, $sformatf("%s insert position", tag));
      check(res_evicted == ev, $sformatf("%s forgetting flag", tag));
      check(res_addr == AW'(a), $sformatf("%s new address %0d exp %0d", tag, res_addr, a));
      for (int i = h; i > s; i--) begin m_ref[i] = m_ref[i-1]; m_vld[i] = m_vld[i-1]; end
      m_ref[s] = a; m_vld[s] = 1;
      for (int d = 0; d < DIMS; d++) m_vec[a][d] = q[d];
    end
    @(negedge clk);
    compare_ranks(tag);
  endtask

  task automatic host_query(input string tag);
    n_host++;
    for (int d = 0; d < DIMS; d++) begin
      @(negedge clk);
      q_wr_en = 1; q_wr_dim = 6'(d); q_wr_data = q[d];
    end
    @(negedge clk);
    q_wr_en = 0; go = 1;
    @(negedge clk);
    go = 0;
    finish_query(tag, 1'b1);
  endtask

  task automatic image_query(input logic [255:0] im, input string tag);
    int bad = 0;
    n_image++;
    @(negedge clk);
    img = im; img_start = 1;
    @(negedge clk);
    img_start = 0;
    // the query vector is complete once the search has been started
    while (!dut_searching) @(negedge clk);
    for (int d = 0; d < DIMS; d++) q[d] = qbuf[d];
    finish_query(tag, 1'b0);
    for (int d = 0; d < DIMS; d++) begin
      real e = feat_model(im, d);
      real g = real'(q[d]);
      if (g - e >= 4.0 || e - g >= 4.0) bad++;
    end
    check(bad == 0, $sformatf("%s features (%0d off)", tag, bad));
  endtask

  logic [255:0] images [4];

  initial begin
    metric = METRIC_EUCLID; ins_mode = INS_SHORT_TERM;
    boundary = CW'(N / 2); jump_val = AW'(2); threshold = ACC_W'(64 * 100);
    q_wr_en = 0; q_wr_dim = '0; q_wr_data = '0; go = 0; img_start = 0; img = '0;
    rank_rd_pos = '0; sum_rd_addr = '0; min_rd_blk = '0;
    m_alloc = 0;
    for (int i = 0; i < N; i++) begin m_ref[i] = 0; m_vld[i] = 0; end
    for (int k = 0; k < 4; k++) for (int w = 0; w < 8; w++) images[k][w*32 +: 32] = $urandom;
    rst_n = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    compare_ranks("reset");

    for (int t = 0; t < N_QUERIES; t++) begin
      int kind;
      kind = $urandom_range(0, 9);
      if (t == N_QUERIES / 2) begin
        metric = METRIC_MANHATTAN; threshold = ACC_W'(64 * 8);
        ins_mode = INS_LONG_FIRST; jump_val = AW'(3);
      end
      if (m_alloc == 0 || kind < int'(NEW_TENTHS)) begin
        for (int d = 0; d < DIMS; d++) q[d] = 16'($urandom_range(0, 4095));
        host_query($sformatf("q%0d new", t));
      end else if (kind < 9) begin
        // near copy of a stored reference
        int a;
        a = $urandom_range(0, m_alloc - 1);
        for (int d = 0; d < DIMS; d++) q[d] = m_vec[a][d] + 16'($urandom_range(0, 5));
        host_query($sformatf("q%0d near", t));
      end else begin
        int k;
        k = $urandom_range(0, 3);
        image_query(images[k], $sformatf("q%0d image%0d", t, k));
      end
    end

    $display("events: learn=%0d learn_empty=%0d forget=%0d match=%0d cross=%0d lt_ins=%0d st_ins=%0d euclid=%0d manhattan=%0d image=%0d host=%0d",
             n_learn, n_learn_empty, n_forget, n_match, n_cross, n_lt_ins, n_st_ins,
             n_eucl, n_manh, n_image, n_host);
    if (CHECK_EVENTS) begin
      check(n_learn_empty > 0, "learning into an empty memory happened");
      check(n_learn > 0,  "learning happened");
      check(n_forget > 0, "forgetting happened");
      check(n_match > 0,  "match with jump-up happened");
      check(n_cross > 0,  "jump into the long-term part happened");
      check(n_lt_ins > 0, "long-term-first insertion happened");
      check(n_st_ins > 0, "short-term insertion happened");
      check(n_eucl > 0 && n_manh > 0, "both metrics used");
      check(n_image > 0 && n_host > 0, "both query paths used");
    end else begin
      check(n_learn > 0 && n_match > 0, "learning and matching happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
