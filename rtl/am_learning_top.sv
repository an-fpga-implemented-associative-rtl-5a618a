// am_learning_top: associative-memory based online lazy learner.
//
// A query is a DIMS-element feature vector. It is written word by word
// through the host port (q_wr_*), or computed from a 16x16 binary character
// image by the gradient feature extractor (img_start). The query is then
// classified and learned:
//   - am_parallel finds the nearest stored reference (sum of squared
//     differences, or of absolute differences when metric = Manhattan) over
//     N_BLK blocks of ROWS_N rows in two stages;
//   - learn_ctrl compares the winner distance with `threshold`: a match makes
//     the winner jump up `jump_val` places in rank_memory; a miss stores the
//     query as a new reference, at the top of the short-term part (or of the
//     long-term part first, ins_mode), forgetting the lowest-ranked reference
//     when the short-term part is full.
// res_valid pulses once per query with the outcome. A query started with go
// (after host writes) or automatically when feature extraction finishes.
//
// Timing with the default sizes: search 320 cycles (64 dims x 4 + 32 rows
// + 32 blocks), then 2 cycles for a match or 67 for a learned query, plus 2
// cycles of start-up; feature extraction adds 1152 cycles before that.
// All sizes default to the published configuration (32 x 32 = 1024
// references of 64 x 16-bit features). The host link that drives these
// ports in the published setup (a PC over PCI Express) is not part of this
// design, nor is the image preprocessing that produces the 16x16 image.
module am_learning_top
  import am_pkg::*;
#(
  parameter int unsigned N_BLK   = N_BLOCKS,
  parameter int unsigned ROWS_N  = ROWS,
  localparam int unsigned DIM_AW = $clog2(DIMS),
  localparam int unsigned N_REF  = N_BLK * ROWS_N,
  localparam int unsigned ADDR_W = $clog2(N_BLK) + $clog2(ROWS_N),
  localparam int unsigned CNT_W  = $clog2(N_REF + 1),
  localparam int unsigned BLK_AW = $clog2(N_BLK)
) (
  input  logic               clk,
  input  logic               rst_n,
  // configuration
  input  metric_e            metric,
  input  ins_mode_e          ins_mode,
  input  logic [CNT_W-1:0]   boundary,
  input  logic [ADDR_W-1:0]  jump_val,
  input  logic [ACC_W-1:0]   threshold,
  // query input: feature words from the host, or a binary image
  input  logic               q_wr_en,
  input  logic [DIM_AW-1:0]  q_wr_dim,
  input  logic [FEAT_W-1:0]  q_wr_data,
  input  logic               go,
  input  logic               img_start,
  input  logic [255:0]       img,
  output logic               busy,
  // result of one query
  output logic               res_valid,
  output logic               res_matched,
  output logic               res_found,
  output logic               res_evicted,
  output logic [ADDR_W-1:0]  res_addr,
  output logic [ACC_W-1:0]   res_dist,
  // read-back ports for the host
  input  logic [ADDR_W-1:0]  rank_rd_pos,
  output logic [ADDR_W-1:0]  rank_rd_ref,
  output logic               rank_rd_valid,
  output logic [CNT_W-1:0]   ref_count,
  input  logic [ADDR_W-1:0]  sum_rd_addr,
  output logic [ACC_W-1:0]   sum_rd_data,
  input  logic [BLK_AW-1:0]  min_rd_blk,
  output logic [ACC_W-1:0]   min_rd_dist,
  output logic [ADDR_W-1:0]  min_rd_addr,
  output logic               min_rd_found,
  // rank-list events (valid in the cycle of the strobe)
  output logic               rank_insert,
  output logic               rank_jump,
  output logic [ADDR_W-1:0]  rank_ins_pos,
  output logic [ADDR_W-1:0]  rank_jump_from,
  output logic [ADDR_W-1:0]  rank_jump_to
);

  // ---------------- query path ----------------
  logic              fe_busy, fe_valid, fe_done;
  logic [5:0]        fe_dim;
  logic [FEAT_W-1:0] fe_data;

  feature_extractor u_fe (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (img_start),
    .img     (img),
    .busy    (fe_busy),
    .f_valid (fe_valid),
    .f_dim   (fe_dim),
    .f_data  (fe_data),
    .done    (fe_done)
  );

  logic [DIM_AW-1:0] am_smp_dim, lc_q_dim;
  logic [FEAT_W-1:0] am_smp_data, lc_q_data;

  query_buffer #(.DIM_N(DIMS), .DATA_W(FEAT_W)) u_qbuf (
    .clk       (clk),
    .rst_n     (rst_n),
    .wr_en     (fe_valid || q_wr_en),
    .wr_dim    (fe_valid ? DIM_AW'(fe_dim) : q_wr_dim),
    .wr_data   (fe_valid ? fe_data : q_wr_data),
    .rd_dim_a  (am_smp_dim),
    .rd_data_a (am_smp_data),
    .rd_dim_b  (lc_q_dim),
    .rd_data_b (lc_q_data)
  );

  // ---------------- classification and learning ----------------
  logic              am_start, am_busy, am_done, am_found;
  logic [ADDR_W-1:0] am_addr;
  logic [ACC_W-1:0]  am_dist;
  logic              ref_wr_en, ref_set_valid, ref_clr_valid;
  logic [ADDR_W-1:0] ref_wr_addr;
  logic [DIM_AW-1:0] ref_wr_dim;
  logic [FEAT_W-1:0] ref_wr_data;
  logic              rk_insert, rk_ins_evict, rk_jump, rk_jump_hit, lc_busy;
  logic [ADDR_W-1:0] rk_ins_addr, rk_ins_pos, rk_jump_ref, rk_from, rk_to;

  am_parallel #(.N_BLK(N_BLK), .ROWS_N(ROWS_N), .DIM_N(DIMS), .DATA_W(FEAT_W),
                .SUM_W(ACC_W)) u_am (
    .clk          (clk),
    .rst_n        (rst_n),
    .start        (am_start),
    .metric       (metric),
    .busy         (am_busy),
    .done         (am_done),
    .smp_dim      (am_smp_dim),
    .smp_data     (am_smp_data),
    .wr_en        (ref_wr_en),
    .wr_addr      (ref_wr_addr),
    .wr_dim       (ref_wr_dim),
    .wr_data      (ref_wr_data),
    .set_valid    (ref_set_valid),
    .clr_valid    (ref_clr_valid),
    .sum_rd_addr  (sum_rd_addr),
    .sum_rd_data  (sum_rd_data),
    .min_rd_blk   (min_rd_blk),
    .min_rd_dist  (min_rd_dist),
    .min_rd_addr  (min_rd_addr),
    .min_rd_found (min_rd_found),
    .found        (am_found),
    .win_addr     (am_addr),
    .win_dist     (am_dist)
  );

  learn_ctrl #(.ADDR_W(ADDR_W), .DIM_N(DIMS), .DATA_W(FEAT_W), .SUM_W(ACC_W)) u_lc (
    .clk          (clk),
    .rst_n        (rst_n),
    .go           (go || fe_done),
    .threshold    (threshold),
    .busy         (lc_busy),
    .am_start     (am_start),
    .am_done      (am_done),
    .am_found     (am_found),
    .am_addr      (am_addr),
    .am_dist      (am_dist),
    .rk_insert    (rk_insert),
    .rk_ins_addr  (rk_ins_addr),
    .rk_ins_evict (rk_ins_evict),
    .rk_jump      (rk_jump),
    .rk_jump_ref  (rk_jump_ref),
    .wr_en        (ref_wr_en),
    .wr_addr      (ref_wr_addr),
    .wr_dim       (ref_wr_dim),
    .wr_data      (ref_wr_data),
    .set_valid    (ref_set_valid),
    .clr_valid    (ref_clr_valid),
    .q_dim        (lc_q_dim),
    .q_data       (lc_q_data),
    .res_valid    (res_valid),
    .res_matched  (res_matched),
    .res_found    (res_found),
    .res_evicted  (res_evicted),
    .res_addr     (res_addr),
    .res_dist     (res_dist)
  );

  rank_memory #(.N_ENT(N_REF)) u_rank (
    .clk       (clk),
    .rst_n     (rst_n),
    .ins_mode  (ins_mode),
    .boundary  (boundary),
    .insert    (rk_insert),
    .ins_addr  (rk_ins_addr),
    .ins_evict (rk_ins_evict),
    .ins_pos   (rk_ins_pos),
    .jump      (rk_jump),
    .jump_ref  (rk_jump_ref),
    .jump_val  (jump_val),
    .jump_hit  (rk_jump_hit),
    .jump_from (rk_from),
    .jump_to   (rk_to),
    .rd_pos    (rank_rd_pos),
    .rd_ref    (rank_rd_ref),
    .rd_valid  (rank_rd_valid),
    .count     (ref_count)
  );

  assign rank_insert    = rk_insert;
  assign rank_jump      = rk_jump;
  assign rank_ins_pos   = rk_ins_pos;
  assign rank_jump_from = rk_from;
  assign rank_jump_to   = rk_to;

  assign busy = fe_busy || lc_busy || am_busy;

  // a matched winner is always a stored reference of the rank list
  a_jump_hits: assert property (@(posedge clk) disable iff (!rst_n) rk_jump |-> rk_jump_hit);

endmodule
