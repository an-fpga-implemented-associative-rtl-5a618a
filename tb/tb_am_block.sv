// tb_am_block: self-checking test of one 32-row block at its default size.
//
// Loads random reference vectors into random subsets of rows, runs searches
// with random queries and both metrics, and checks against a model computed
// in the testbench: the nearest valid row (ties to the lower row), its
// distance, every row's entry in the Sum RAM, found = 0 with no valid row,
// and the search latency of 64*4 + 32 = 288 cycles from start to done.
module tb_am_block;
  import am_pkg::*;

  localparam int unsigned R = ROWS;
  localparam int unsigned D = DIMS;

  logic clk = 1'b0;
  logic rst_n;
  always #500 clk = ~clk;

  logic        start, busy, done;
  metric_e     metric;
  logic [5:0]  smp_dim;
  logic [15:0] smp_data;
  logic        wr_en, set_valid, clr_valid;
  logic [4:0]  wr_row, sum_rd_row;
  logic [5:0]  wr_dim;
  logic [15:0] wr_data;
  logic [39:0] sum_rd_data;
  logic        found;
  logic [4:0]  min_row;
  logic [39:0] min_dist;

  am_block dut (.*);

  logic [15:0] refs [R][D];
  bit          vld  [R];
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

  task automatic write_row(input int r);
    @(negedge clk); clr_valid = 1; wr_row = 5'(r);
    @(negedge clk); clr_valid = 0;
    for (int d = 0; d < D; d++) begin
      wr_en = 1; wr_dim = 6'(d); wr_data = refs[r][d];
      @(negedge clk);
    end
    wr_en = 0;
    if (vld[r]) begin
      set_valid = 1;
      @(negedge clk);
      set_valid = 0;
    end
  endtask

  function automatic longint ref_dist(input int r, input bit man);
    longint s = 0;
    for (int d = 0; d < D; d++) begin
      longint df = longint'(q[d]) - longint'(refs[r][d]);
      if (df < 0) df = -df;
      s += man ? df : df * df;
    end
    return s;
  endfunction

  task automatic search_and_check(input string tag);
    int cyc = 0;
    bit     e_found = 0;
    int     e_row = 0;
    longint e_d = 0;
    bit man = (metric == METRIC_MANHATTAN);
    for (int r = 0; r < R; r++) begin
      if (vld[r] && (!e_found || ref_dist(r, man) < e_d)) begin
        e_found = 1; e_row = r; e_d = ref_dist(r, man);
      end
    end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; cyc = 0;
    while (!done) begin
      @(negedge clk); cyc++;
    end
    check(cyc == D * CYC_PER_DIM + R, $sformatf("%s latency %0d", tag, cyc));
    check(found == e_found, $sformatf("%s found", tag));
    if (e_found) begin
      check(min_row == 5'(e_row), $sformatf("%s row %0d exp %0d", tag, min_row, e_row));
      check(longint'(min_dist) == e_d, $sformatf("%s dist %0d exp %0d", tag, min_dist, e_d));
    end
    for (int r = 0; r < R; r++) begin
      sum_rd_row = 5'(r);
      #1;
      check(longint'(sum_rd_data) == ref_dist(r, man), $sformatf("%s sum ram row %0d", tag, r));
    end
  endtask

  initial begin
    #200000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; wr_en = 0; set_valid = 0; clr_valid = 0;
    wr_row = '0; wr_dim = '0; wr_data = '0; sum_rd_row = '0;
    metric = METRIC_EUCLID;
    for (int d = 0; d < D; d++) q[d] = '0;
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // no valid row
    for (int r = 0; r < R; r++) begin
      vld[r] = 0;
      for (int d = 0; d < D; d++) refs[r][d] = 16'($urandom);
      write_row(r);
    end
    search_and_check("empty");

    for (int t = 0; t < 6; t++) begin
      for (int r = 0; r < R; r++) begin
        vld[r] = ($urandom_range(0, 3) != 0);
        for (int d = 0; d < D; d++) refs[r][d] = 16'($urandom_range(0, 4095));
        write_row(r);
      end
      for (int d = 0; d < D; d++) q[d] = 16'($urandom_range(0, 4095));
      // make one row a near copy of the query
      if (t >= 2) begin
        int r0;
        r0 = $urandom_range(0, R - 1);
        vld[r0] = 1;
        for (int d = 0; d < D; d++) refs[r0][d] = q[d] + 16'($urandom_range(0, 3));
        write_row(r0);
      end
      // a tie: two identical valid rows
      if (t == 4) begin
        for (int d = 0; d < D; d++) begin refs[20][d] = q[d]; refs[9][d] = q[d]; end
        vld[20] = 1; vld[9] = 1;
        write_row(20); write_row(9);
      end
      metric = (t % 2 == 1) ? METRIC_MANHATTAN : METRIC_EUCLID;
      search_and_check($sformatf("t%0d", t));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
