// row_unit: one reference row of the associative memory.
//
// The row holds one reference feature vector in a small Row RAM (DIMS words
// of FEAT_W bits) and computes its distance to the query one dimension at a
// time through three registered stages, as in the per-row datapath of the
// published architecture:
//   rd_en   : Row RAM read of element rd_dim          -> ref_q
//   diff_en : |sample - ref_q| (FEAT_W bits)          -> diff_q
//   sq_en   : diff_q squared (2*FEAT_W bits), or the
//             difference itself in Manhattan mode     -> sq_q
//   acc_en  : acc_q + sq_q (ACC_W bits)               -> acc_q
// The block controller drives these strobes; acc_clr zeroes the accumulator
// before a search. The subtractor forms the absolute difference, so the
// 16-bit width after it (as published) holds it exactly for unsigned
// features; squaring it then gives the same value as squaring a signed
// difference.
//
// A valid flag marks a row that holds a learned reference; rows that are not
// valid are skipped by the nearest search. The flag, the write port and the
// Manhattan option are this design's own additions to the datapath.
module row_unit
  import am_pkg::*;
#(
  parameter int unsigned DIM_N   = DIMS,
  parameter int unsigned DATA_W  = FEAT_W,
  parameter int unsigned SUM_W   = ACC_W,
  localparam int unsigned DIM_AW = (DIM_N > 1) ? $clog2(DIM_N) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // reference write port
  input  logic                wr_en,
  input  logic [DIM_AW-1:0]   wr_dim,
  input  logic [DATA_W-1:0]   wr_data,
  input  logic                set_valid,
  input  logic                clr_valid,
  // distance datapath control (shared by all rows of a block)
  input  metric_e             metric,
  input  logic                rd_en,
  input  logic [DIM_AW-1:0]   rd_dim,
  input  logic [DATA_W-1:0]   sample,
  input  logic                diff_en,
  input  logic                sq_en,
  input  logic                acc_clr,
  input  logic                acc_en,
  // results
  output logic [SUM_W-1:0]    acc,
  output logic                valid
);

  logic [DATA_W-1:0]   ram [DIM_N];
  logic [DATA_W-1:0]   ref_q;
  logic [DATA_W-1:0]   diff_q;
  logic [2*DATA_W-1:0] sq_q;
  logic [SUM_W-1:0]    acc_q;
  logic                valid_q;

  always_ff @(posedge clk) begin
    if (wr_en) ram[wr_dim] <= wr_data;
    if (rd_en) ref_q <= ram[rd_dim];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      diff_q  <= '0;
      sq_q    <= '0;
      acc_q   <= '0;
      valid_q <= 1'b0;
    end else begin
      if (diff_en) diff_q <= (sample >= ref_q) ? sample - ref_q : ref_q - sample;
      if (sq_en) begin
        if (metric == METRIC_MANHATTAN) sq_q <= {{DATA_W{1'b0}}, diff_q};
        else                            sq_q <= diff_q * diff_q;
      end
      if (acc_clr)     acc_q <= '0;
      else if (acc_en) acc_q <= acc_q + SUM_W'(sq_q);
      if (clr_valid)      valid_q <= 1'b0;
      else if (set_valid) valid_q <= 1'b1;
    end
  end

  assign acc   = acc_q;
  assign valid = valid_q;

endmodule
