// tb_am_learning_top: end-to-end test of the learner at 4 blocks x 4 rows.
//
// The small size lets 16 references fill up quickly so that forgetting,
// jumps into the long-term part and both insertion modes all occur within a
// short run. Stimulus, model and checks are in am_top_harness.
module tb_am_learning_top;
  import am_pkg::*;

  localparam int unsigned NB = 4;
  localparam int unsigned R  = 4;
  localparam int unsigned N  = NB * R;
  localparam int unsigned AW = 4;
  localparam int unsigned CW = 5;

  logic clk = 1'b0;
  always #500 clk = ~clk;

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
  logic [1:0]        min_rd_blk;
  logic              min_rd_found, rank_insert, rank_jump;

  am_learning_top #(.N_BLK(NB), .ROWS_N(R)) dut (.*);

  am_top_harness #(.N_BLK(NB), .ROWS_N(R), .N_QUERIES(160)) harness (
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
