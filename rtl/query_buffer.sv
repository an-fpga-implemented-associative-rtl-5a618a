// query_buffer: holds the feature vector of the current query.
//
// DIM_N words of DATA_W bits in registers, one write port and two
// combinational read ports: one for the associative memory, which reads one
// element per dimension step during a search, and one for the learning
// controller, which copies the vector into a reference row when the query is
// learned. The register implementation and the two ports are this design's
// choice; the query is broadcast to all rows as in the published datapath.
module query_buffer
  import am_pkg::*;
#(
  parameter int unsigned DIM_N   = DIMS,
  parameter int unsigned DATA_W  = FEAT_W,
  localparam int unsigned DIM_AW = (DIM_N > 1) ? $clog2(DIM_N) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               wr_en,
  input  logic [DIM_AW-1:0]  wr_dim,
  input  logic [DATA_W-1:0]  wr_data,
  input  logic [DIM_AW-1:0]  rd_dim_a,
  output logic [DATA_W-1:0]  rd_data_a,
  input  logic [DIM_AW-1:0]  rd_dim_b,
  output logic [DATA_W-1:0]  rd_data_b
);

  logic [DATA_W-1:0] mem_q [DIM_N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DIM_N; i++) mem_q[i] <= '0;
    end else if (wr_en) begin
      mem_q[wr_dim] <= wr_data;
    end
  end

  assign rd_data_a = mem_q[rd_dim_a];
  assign rd_data_b = mem_q[rd_dim_b];

endmodule
