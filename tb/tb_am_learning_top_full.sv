// tb_am_learning_top_full: the learner at its default size (32 blocks x 32
// rows = 1024 references of 64 16-bit features).
//
// Runs 1400 queries, mostly new ones so that the 512-entry short-term part
// fills and forgetting starts, through the full-size design with the same
// stimulus, model and checks as the reduced end-to-end test
// (am_top_harness), including the 320-cycle search latency.
module tb_am_learning_top_full;
  import am_pkg::*;

  localparam int unsigned N  = N_BLOCKS * ROWS;
  localparam int unsigned AW = 10;
  localparam int unsigned CW = 11;

  logic clk = 1'b0;
  always #1500 clk = ~clk;

  logic              rst_n, q_wr_en, go, img_start, busy;
  metric_e           metric;
  ins_mode_e         ins_mode;
  logic [CW-1:0]     boundary, ref_count;
  logic [AW-1:0]     jump_val, res_addr, rank_rd_pos, rank_rd_ref, sum_rd_addr, min_rd_addr;
  logic [AW-1:0]     rank_ins_pos, rank_jump_from, rank_jump_to;
  logic [ACC_W-1:0]  threshold, res_dist, sum_rd_data, min_rd_dist;
  logic [5:0]        q_wr_dim;
  logic [FEAT_W-1:0] q_wr_data;
  logic [255:0]      img;
  logic              res_valid, res_matched, res_found, res_evicted, rank_rd_valid;
  logic [4:0]        min_rd_blk;
  logic              min_rd_found, rank_insert, rank_jump;

  am_learning_top dut (.*);

  am_top_harness #(.N_QUERIES(1400), .NEW_TENTHS(8), .CHECK_EVENTS(1'b1)) harness (
    .*,
    .qbuf          (dut.u_qbuf.mem_q),
    .dut_searching (dut.u_am.busy)
  );

  initial begin
    repeat (4000000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", harness.checks, harness.failures + 1);
    $finish;
  end
endmodule
