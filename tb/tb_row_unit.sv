// tb_row_unit: self-checking test of one reference row.
//
// Writes random 16-bit reference vectors into the Row RAM, then drives the
// four-phase strobe sequence (read, difference, square, accumulate) for every
// dimension with random query elements, and compares the accumulated sum
// with a reference computed in the testbench, for both the squared
// (Euclidean) and the absolute (Manhattan) metric. Also checks the valid
// flag, the per-dimension cycle count (4) and the 40-bit accumulator width
// with extreme values.
module tb_row_unit;
  import am_pkg::*;

  localparam int unsigned DIM_N = 64;

  logic clk = 1'b0;
  logic rst_n;
  always #500 clk = ~clk;

  logic              wr_en, set_valid, clr_valid;
  logic [5:0]        wr_dim, rd_dim;
  logic [15:0]       wr_data, sample;
  metric_e           metric;
  logic              rd_en, diff_en, sq_en, acc_clr, acc_en;
  logic [39:0]       acc;
  logic              valid;

  int checks = 0, failures = 0;

  row_unit #(.DIM_N(DIM_N)) dut (.*);

  logic [15:0] ref_v [DIM_N];
  logic [15:0] q_v   [DIM_N];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic idle_strobes();
    wr_en = 0; set_valid = 0; clr_valid = 0; rd_en = 0; diff_en = 0;
    sq_en = 0; acc_clr = 0; acc_en = 0;
  endtask

  task automatic load_ref();
    for (int d = 0; d < DIM_N; d++) begin
      @(negedge clk);
      wr_en = 1; wr_dim = 6'(d); wr_data = ref_v[d];
    end
    @(negedge clk);
    wr_en = 0;
  endtask

  // one distance computation: 4 cycles per dimension
  task automatic run(output int cycles);
    @(negedge clk);
    acc_clr = 1;
    @(negedge clk);
    acc_clr = 0;
    cycles = 0;
    for (int d = 0; d < DIM_N; d++) begin
      rd_en = 1; rd_dim = 6'(d);
      @(negedge clk); cycles++;
      rd_en = 0; diff_en = 1; sample = q_v[d];
      @(negedge clk); cycles++;
      diff_en = 0; sq_en = 1;
      @(negedge clk); cycles++;
      sq_en = 0; acc_en = 1;
      @(negedge clk); cycles++;
      acc_en = 0;
    end
  endtask

  function automatic longint model(input bit manhattan);
    longint s = 0;
    for (int d = 0; d < DIM_N; d++) begin
      longint df = (q_v[d] >= ref_v[d]) ? longint'(q_v[d]) - longint'(ref_v[d])
                                        : longint'(ref_v[d]) - longint'(q_v[d]);
      s += manhattan ? df : df * df;
    end
    return s;
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    idle_strobes();
    metric = METRIC_EUCLID;
    sample = '0; wr_dim = '0; wr_data = '0; rd_dim = '0;
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(valid == 1'b0, "valid after reset");
    check(acc == '0, "acc after reset");

    for (int t = 0; t < 12; t++) begin
      for (int d = 0; d < DIM_N; d++) begin
        if (t == 0) begin ref_v[d] = 16'hFFFF; q_v[d] = 16'h0000; end
        else if (t == 1) begin ref_v[d] = 16'h0000; q_v[d] = 16'hFFFF; end
        else begin ref_v[d] = 16'($urandom); q_v[d] = 16'($urandom); end
      end
      load_ref();
      metric = (t % 3 == 2) ? METRIC_MANHATTAN : METRIC_EUCLID;
      run(cyc);
      check(cyc == DIM_N * CYC_PER_DIM, "cycles per search");
      check(longint'(acc) == model(metric == METRIC_MANHATTAN),
            $sformatf("t=%0d acc=%0d model=%0d", t, acc, model(metric == METRIC_MANHATTAN)));
    end

    @(negedge clk); set_valid = 1;
    @(negedge clk); set_valid = 0;
    check(valid == 1'b1, "valid set");
    @(negedge clk); clr_valid = 1;
    @(negedge clk); clr_valid = 0;
    check(valid == 1'b0, "valid cleared");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
