// tb_learn_ctrl: self-checking test of the classification / learning
// sequencer, with the associative memory and the rank list replaced by
// simple responders in the testbench.
//
// For random winner distances around the threshold (including equal to it)
// and for "nothing stored", checks that the controller starts exactly one
// search, then either pulses the rank jump for the winner (match) or inserts
// a new entry, clears and rewrites the chosen reference row with the query
// words in order and marks it valid (learn); checks the reported result and
// the cycle counts: 2 cycles after the search for a match, DIMS + 3 for a
// learned query.
module tb_learn_ctrl;
  import am_pkg::*;

  localparam int unsigned AW = 10;

  logic clk = 1'b0;
  logic rst_n;
  always #500 clk = ~clk;

  logic           go, busy, am_start, am_done, am_found;
  logic [39:0]    threshold, am_dist, res_dist;
  logic [AW-1:0]  am_addr, rk_ins_addr, rk_jump_ref, wr_addr, res_addr;
  logic           rk_insert, rk_ins_evict, rk_jump;
  logic           wr_en, set_valid, clr_valid;
  logic [5:0]     wr_dim, q_dim;
  logic [15:0]    wr_data, q_data;
  logic           res_valid, res_matched, res_found, res_evicted;

  learn_ctrl dut (.*);

  logic [15:0] q [DIMS];
  assign q_data = q[q_dim];

  int checks = 0, failures = 0;
  int n_match = 0, n_learn = 0, n_empty = 0, n_equal = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // one query: the memory answers after `lat` cycles
  task automatic query(input bit found, input logic [39:0] d, input logic [AW-1:0] win,
                       input logic [AW-1:0] new_a, input bit ev, input int lat);
    bit exp_match = found && (d <= threshold);
    int starts = 0, jumps = 0, inserts = 0, writes = 0, clrs = 0, sets = 0, cyc = 0;
    bit order_ok = 1;
    for (int k = 0; k < DIMS; k++) q[k] = 16'($urandom);
    rk_ins_addr = new_a; rk_ins_evict = ev;
    @(negedge clk); go = 1;
    @(negedge clk); go = 0;
    // wait for the search request
    while (!am_start && cyc < 10) begin @(negedge clk); cyc++; end
    check(am_start, "search started");
    @(negedge clk);
    check(!am_start, "single start pulse");
    repeat (lat) @(negedge clk);
    am_done = 1; am_found = found; am_dist = d; am_addr = win;
    @(negedge clk);
    am_done = 0; am_found = $urandom; am_dist = $urandom; am_addr = '0;
    cyc = 1;  // cycles since the done cycle
    while (!res_valid && cyc < 200) begin
      if (am_start) starts++;
      if (rk_jump) begin jumps++; check(rk_jump_ref == win, "jump reference"); end
      if (rk_insert) inserts++;
      if (clr_valid) begin clrs++; check(wr_addr == new_a, "clear address"); check(writes == 0, "clear before writes"); end
      if (wr_en) begin
        if (wr_addr != new_a || wr_dim != 6'(writes) || wr_data != q[writes]) order_ok = 0;
        writes++;
      end
      if (set_valid) begin sets++; check(wr_addr == new_a, "set address"); check(writes == DIMS, "set after writes"); end
      @(negedge clk); cyc++;
    end
    check(res_valid, "result reported");
    check(starts == 0, "no second search");
    check(res_matched == exp_match, "matched flag");
    check(res_found == found, "found flag");
    if (found) check(res_dist == d, "result distance");
    if (exp_match) begin
      n_match++;
      if (d == threshold) n_equal++;
      check(jumps == 1 && inserts == 0 && writes == 0 && clrs == 0 && sets == 0, "match does only a jump");
      check(res_addr == win && !res_evicted, "match result");
      check(cyc == 2, $sformatf("match cycles %0d", cyc));
    end else begin
      n_learn++;
      if (!found) n_empty++;
      check(jumps == 0 && inserts == 1 && clrs == 1 && sets == 1, "learn sequence");
      check(writes == DIMS && order_ok, "query copied into the new row");
      check(res_addr == new_a && res_evicted == ev, "learn result");
      check(cyc == DIMS + 3, $sformatf("learn cycles %0d", cyc));
    end
    @(negedge clk);
    check(!busy, "idle after result");
  endtask

  initial begin
    #100000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    go = 0; am_done = 0; am_found = 0; am_dist = '0; am_addr = '0;
    rk_ins_addr = '0; rk_ins_evict = 0; threshold = 40'd5000;
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(!busy && !res_valid, "idle after reset");

    query(0, 40'd0, 10'd0, 10'd0, 0, 5);           // nothing stored
    query(1, 40'd5000, 10'd7, 10'd1, 0, 3);        // equal to threshold: match
    query(1, 40'd5001, 10'd7, 10'd2, 0, 3);        // just above: learn
    query(1, 40'd4999, 10'd513, 10'd3, 0, 1);      // just below: match
    for (int t = 0; t < 20; t++) begin
      threshold = 40'($urandom_range(0, 100000));
      query($urandom_range(0, 5) != 0, 40'($urandom_range(0, 200000)), 10'($urandom),
            10'($urandom), $urandom_range(0, 1), $urandom_range(0, 20));
    end
    check(n_match > 0 && n_learn > 0 && n_empty > 0 && n_equal > 0, "all branches taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
