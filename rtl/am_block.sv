// am_block: one block of the associative memory (ROWS_N reference rows).
//
// All rows compute their distance to the query in parallel; the block then
// finds the nearest valid row. A search, started by a one-cycle start pulse,
// has two phases:
//   CALC   : for each of the DIM_N dimensions, CYC_PER_DIM (=4) cycles:
//            read Row RAMs and the query element, form |difference|, square,
//            accumulate. DIM_N*4 cycles (256 for 64 dimensions).
//   SEARCH : the selection multiplexer steps through the rows, one per cycle,
//            writing each row's sum into the Sum RAM while the search unit
//            keeps the smallest sum of a valid row. ROWS_N cycles (32).
// done pulses for one cycle DIM_N*4 + ROWS_N cycles after the start cycle
// (288 with the published sizes, 2.51 us at the reported 114.81 MHz), and
// min_dist / min_row / found hold the result until the next start. Ties go to
// the lowest row. found is low when no row is valid.
//
// The query element is requested on smp_dim and must be returned on smp_data
// in the same cycle (combinational read of the query buffer). The phase
// layout of the 4 cycles per dimension, the tie rule and the valid flags are
// this design's choices; the stage widths, the cycle counts and the
// selection / Sum RAM / search structure follow the published block.
module am_block
  import am_pkg::*;
#(
  parameter int unsigned ROWS_N  = ROWS,
  parameter int unsigned DIM_N   = DIMS,
  parameter int unsigned DATA_W  = FEAT_W,
  parameter int unsigned SUM_W   = ACC_W,
  localparam int unsigned DIM_AW = (DIM_N  > 1) ? $clog2(DIM_N)  : 1,
  localparam int unsigned ROW_AW = (ROWS_N > 1) ? $clog2(ROWS_N) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  metric_e             metric,
  output logic                busy,
  output logic                done,
  // query buffer read
  output logic [DIM_AW-1:0]   smp_dim,
  input  logic [DATA_W-1:0]   smp_data,
  // reference write port
  input  logic                wr_en,
  input  logic [ROW_AW-1:0]   wr_row,
  input  logic [DIM_AW-1:0]   wr_dim,
  input  logic [DATA_W-1:0]   wr_data,
  input  logic                set_valid,
  input  logic                clr_valid,
  // Sum RAM read port
  input  logic [ROW_AW-1:0]   sum_rd_row,
  output logic [SUM_W-1:0]    sum_rd_data,
  // local winner
  output logic                found,
  output logic [ROW_AW-1:0]   min_row,
  output logic [SUM_W-1:0]    min_dist
);

  typedef enum logic [1:0] {S_IDLE, S_CALC, S_SEARCH} state_e;

  state_e             state_q;
  logic [1:0]         phase_q;
  logic [DIM_AW-1:0]  dim_q;
  logic [ROW_AW-1:0]  sel_q;
  logic [DATA_W-1:0]  sample_q;
  logic               done_q;
  logic               found_q;
  logic [ROW_AW-1:0]  min_row_q;
  logic [SUM_W-1:0]   min_q;

  logic [SUM_W-1:0]   acc   [ROWS_N];
  logic [ROWS_N-1:0]  valid;
  logic [SUM_W-1:0]   sum_ram [ROWS_N];

  // strobes of the row datapaths
  logic rd_en, diff_en, sq_en, acc_en, acc_clr;
  assign acc_clr = (state_q == S_IDLE) && start;
  assign rd_en   = (state_q == S_CALC) && (phase_q == 2'd0);
  assign diff_en = (state_q == S_CALC) && (phase_q == 2'd1);
  assign sq_en   = (state_q == S_CALC) && (phase_q == 2'd2);
  assign acc_en  = (state_q == S_CALC) && (phase_q == 2'd3);
  assign smp_dim = dim_q;

  for (genvar r = 0; r < ROWS_N; r++) begin : g_row
    logic row_wr;
    assign row_wr = (wr_row == ROW_AW'(r));
    row_unit #(.DIM_N(DIM_N), .DATA_W(DATA_W), .SUM_W(SUM_W)) u_row (
      .clk       (clk),
      .rst_n     (rst_n),
      .wr_en     (wr_en && row_wr),
      .wr_dim    (wr_dim),
      .wr_data   (wr_data),
      .set_valid (set_valid && row_wr),
      .clr_valid (clr_valid && row_wr),
      .metric    (metric),
      .rd_en     (rd_en),
      .rd_dim    (dim_q),
      .sample    (sample_q),
      .diff_en   (diff_en),
      .sq_en     (sq_en),
      .acc_clr   (acc_clr),
      .acc_en    (acc_en),
      .acc       (acc[r]),
      .valid     (valid[r])
    );
  end

  // selection multiplexer
  logic [SUM_W-1:0] sel_sum;
  logic             sel_valid;
  assign sel_sum   = acc[sel_q];
  assign sel_valid = valid[sel_q];

  always_ff @(posedge clk) begin
    if (state_q == S_SEARCH) sum_ram[sel_q] <= sel_sum;
  end
  assign sum_rd_data = sum_ram[sum_rd_row];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      phase_q   <= '0;
      dim_q     <= '0;
      sel_q     <= '0;
      sample_q  <= '0;
      done_q    <= 1'b0;
      found_q   <= 1'b0;
      min_row_q <= '0;
      min_q     <= '0;
    end else begin
      done_q <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (start) begin
            state_q <= S_CALC;
            phase_q <= '0;
            dim_q   <= '0;
            found_q <= 1'b0;
          end
        end
        S_CALC: begin
          if (phase_q == 2'd0) sample_q <= smp_data;
          phase_q <= phase_q + 2'd1;
          if (phase_q == 2'(CYC_PER_DIM - 1)) begin
            if (dim_q == DIM_AW'(DIM_N - 1)) begin
              state_q <= S_SEARCH;
              sel_q   <= '0;
            end else begin
              dim_q <= dim_q + 1'b1;
            end
          end
        end
        S_SEARCH: begin
          if (sel_valid && (!found_q || sel_sum < min_q)) begin
            found_q   <= 1'b1;
            min_q     <= sel_sum;
            min_row_q <= sel_q;
          end
          if (sel_q == ROW_AW'(ROWS_N - 1)) begin
            state_q <= S_IDLE;
            done_q  <= 1'b1;
          end else begin
            sel_q <= sel_q + 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy     = (state_q != S_IDLE);
  assign done     = done_q;
  assign found    = found_q;
  assign min_row  = min_row_q;
  assign min_dist = min_q;

endmodule
