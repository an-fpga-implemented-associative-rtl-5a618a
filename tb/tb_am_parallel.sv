// tb_am_parallel: self-checking test of the two-stage associative memory.
//
// Runs at 8 blocks of 4 rows (32 references) to stay short. Loads random
// references into random rows, searches with random queries and both
// metrics, and checks against a testbench model: the global nearest valid
// address (ties to the lower address) and distance, found = 0 when nothing
// is stored, every block's entry in the Min_value and Address-of-Min_value
// RAMs, every row's Sum RAM entry, and the latency DIMS*4 + ROWS + BLOCKS.
module tb_am_parallel;
  import am_pkg::*;

  localparam int unsigned NB = 8;
  localparam int unsigned R  = 4;
  localparam int unsigned D  = DIMS;
  localparam int unsigned N  = NB * R;
  localparam int unsigned AW = $clog2(N);

  logic clk = 1'b0;
  logic rst_n;
  always #500 clk = ~clk;

  logic          start, busy, done;
  metric_e       metric;
  logic [5:0]    smp_dim;
  logic [15:0]   smp_data;
  logic          wr_en, set_valid, clr_valid;
  logic [AW-1:0] wr_addr, sum_rd_addr, min_rd_addr, win_addr;
  logic [5:0]    wr_dim;
  logic [15:0]   wr_data;
  logic [39:0]   sum_rd_data, min_rd_dist, win_dist;
  logic [2:0]    min_rd_blk;
  logic          min_rd_found, found;

  am_parallel #(.N_BLK(NB), .ROWS_N(R)) dut (.*);

  logic [15:0] refs [N][D];
  bit          vld  [N];
  logic [15:0] q    [D];

  assign smp_data = q[smp_dim];

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic write_ref(input int a);
    @(negedge clk); clr_valid = 1; wr_addr = AW'(a);
    @(negedge clk); clr_valid = 0;
    for (int d = 0; d < D; d++) begin
      wr_en = 1; wr_dim = 6'(d); wr_data = refs[a][d];
      @(negedge clk);
    end
    wr_en = 0;
    if (vld[a]) begin
      set_valid = 1;
      @(negedge clk);
      set_valid = 0;
    end
  endtask

  function automatic longint ref_dist(input int a, input bit man);
    longint s = 0;
    for (int d = 0; d < D; d++) begin
      longint df = longint'(q[d]) - longint'(refs[a][d]);
      if (df < 0) df = -df;
      s += man ? df : df * df;
    end
    return s;
  endfunction

  task automatic search_and_check(input string tag);
    int cyc;
    bit man = (metric == METRIC_MANHATTAN);
    bit     e_found = 0;
    int     e_addr = 0;
    longint e_d = 0;
    for (int a = 0; a < N; a++) begin
      if (vld[a] && (!e_found || ref_dist(a, man) < e_d)) begin
        e_found = 1; e_addr = a; e_d = ref_dist(a, man);
      end
    end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; cyc = 0;
    while (!done) begin
      @(negedge clk); cyc++;
    end
    check(cyc == D * CYC_PER_DIM + R + NB, $sformatf("%s latency %0d", tag, cyc));
    check(found == e_found, $sformatf("%s found", tag));
    if (e_found) begin
      check(win_addr == AW'(e_addr), $sformatf("%s addr %0d exp %0d", tag, win_addr, e_addr));
      check(longint'(win_dist) == e_d, $sformatf("%s dist", tag));
    end
    for (int b = 0; b < NB; b++) begin
      bit     bf = 0;
      int     ba = 0;
      longint bd = 0;
      for (int r = 0; r < R; r++) begin
        int a = b * R + r;
        if (vld[a] && (!bf || ref_dist(a, man) < bd)) begin bf = 1; ba = a; bd = ref_dist(a, man); end
      end
      min_rd_blk = 3'(b);
      #1;
      check(min_rd_found == bf, $sformatf("%s min ram found blk %0d", tag, b));
      if (bf) check(min_rd_addr == AW'(ba) && longint'(min_rd_dist) == bd,
                    $sformatf("%s min ram blk %0d", tag, b));
    end
    for (int a = 0; a < N; a++) begin
      sum_rd_addr = AW'(a);
      #1;
      check(longint'(sum_rd_data) == ref_dist(a, man), $sformatf("%s sum ram %0d", tag, a));
    end
  endtask

  initial begin
    #500000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; wr_en = 0; set_valid = 0; clr_valid = 0;
    wr_addr = '0; wr_dim = '0; wr_data = '0; sum_rd_addr = '0; min_rd_blk = '0;
    metric = METRIC_EUCLID;
    for (int d = 0; d < D; d++) q[d] = '0;
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int a = 0; a < N; a++) begin
      vld[a] = 0;
      for (int d = 0; d < D; d++) refs[a][d] = 16'($urandom);
      write_ref(a);
    end
    search_and_check("empty");

    for (int t = 0; t < 8; t++) begin
      for (int a = 0; a < N; a++) begin
        vld[a] = ($urandom_range(0, 2) != 0);
        for (int d = 0; d < D; d++) refs[a][d] = 16'($urandom_range(0, 1023));
        write_ref(a);
      end
      for (int d = 0; d < D; d++) q[d] = 16'($urandom_range(0, 1023));
      if (t >= 3) begin
        int a0;
        a0 = $urandom_range(0, N - 1);
        vld[a0] = 1;
        for (int d = 0; d < D; d++) refs[a0][d] = q[d] ^ 16'($urandom_range(0, 1));
        write_ref(a0);
      end
      if (t == 5) begin
        // identical references in two different blocks: lower address wins
        for (int d = 0; d < D; d++) begin refs[29][d] = q[d]; refs[6][d] = q[d]; end
        vld[29] = 1; vld[6] = 1;
        write_ref(29); write_ref(6);
      end
      metric = (t % 2 == 1) ? METRIC_MANHATTAN : METRIC_EUCLID;
      search_and_check($sformatf("t%0d", t));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
