// am_parallel: two-stage parallel nearest-distance associative memory.
//
// N_BLK blocks (am_block) of ROWS_N rows each search their rows in parallel
// (first stage). When they finish, a selection multiplexer steps through the
// blocks, one per cycle, copying each block's local minimum into the
// Min_value RAM and its full row address into the Address-of-Min_value RAM,
// while the second-stage search keeps the smallest valid one. The result is
// the address of the nearest stored reference and its distance.
//
// Reference address = {block index, row index}. A search takes
// DIM_N*4 + ROWS_N + N_BLK cycles from the start cycle to the done pulse
// (256 + 32 + 32 = 320 with the published sizes); the second stage begins in
// the cycle the blocks report done. Ties go to the lower address; found is
// low when no reference is stored.
//
// The two-stage split, the RAM names and the sizes (32 blocks of 32 rows)
// follow the published architecture; the cycle-by-cycle handoff between the
// stages, the write/valid ports and the RAM read ports are this design's own.
module am_parallel
  import am_pkg::*;
#(
  parameter int unsigned N_BLK   = N_BLOCKS,
  parameter int unsigned ROWS_N  = ROWS,
  parameter int unsigned DIM_N   = DIMS,
  parameter int unsigned DATA_W  = FEAT_W,
  parameter int unsigned SUM_W   = ACC_W,
  localparam int unsigned DIM_AW = (DIM_N  > 1) ? $clog2(DIM_N)  : 1,
  localparam int unsigned ROW_AW = (ROWS_N > 1) ? $clog2(ROWS_N) : 1,
  localparam int unsigned BLK_AW = (N_BLK  > 1) ? $clog2(N_BLK)  : 1,
  localparam int unsigned ADDR_W = BLK_AW + ROW_AW
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  metric_e            metric,
  output logic               busy,
  output logic               done,
  // query buffer read
  output logic [DIM_AW-1:0]  smp_dim,
  input  logic [DATA_W-1:0]  smp_data,
  // reference memory write port
  input  logic               wr_en,
  input  logic [ADDR_W-1:0]  wr_addr,
  input  logic [DIM_AW-1:0]  wr_dim,
  input  logic [DATA_W-1:0]  wr_data,
  input  logic               set_valid,
  input  logic               clr_valid,
  // Sum RAM read port (distance of every row after a search)
  input  logic [ADDR_W-1:0]  sum_rd_addr,
  output logic [SUM_W-1:0]   sum_rd_data,
  // Min_value / Address-of-Min_value RAM read port
  input  logic [BLK_AW-1:0]  min_rd_blk,
  output logic [SUM_W-1:0]   min_rd_dist,
  output logic [ADDR_W-1:0]  min_rd_addr,
  output logic               min_rd_found,
  // global winner
  output logic               found,
  output logic [ADDR_W-1:0]  win_addr,
  output logic [SUM_W-1:0]   win_dist
);

  logic [N_BLK-1:0]   blk_done, blk_busy, blk_found;
  logic [ROW_AW-1:0]  blk_row  [N_BLK];
  logic [SUM_W-1:0]   blk_dist [N_BLK];
  logic [SUM_W-1:0]   blk_sum  [N_BLK];
  logic [DIM_AW-1:0]  blk_smp_dim [N_BLK];

  logic [BLK_AW-1:0]  wr_blk;
  logic [ROW_AW-1:0]  wr_row;
  assign wr_blk = wr_addr[ADDR_W-1:ROW_AW];
  assign wr_row = wr_addr[ROW_AW-1:0];

  for (genvar b = 0; b < N_BLK; b++) begin : g_blk
    logic blk_sel;
    assign blk_sel = (wr_blk == BLK_AW'(b));
    am_block #(.ROWS_N(ROWS_N), .DIM_N(DIM_N), .DATA_W(DATA_W), .SUM_W(SUM_W)) u_blk (
      .clk         (clk),
      .rst_n       (rst_n),
      .start       (start),
      .metric      (metric),
      .busy        (blk_busy[b]),
      .done        (blk_done[b]),
      .smp_dim     (blk_smp_dim[b]),
      .smp_data    (smp_data),
      .wr_en       (wr_en && blk_sel),
      .wr_row      (wr_row),
      .wr_dim      (wr_dim),
      .wr_data     (wr_data),
      .set_valid   (set_valid && blk_sel),
      .clr_valid   (clr_valid && blk_sel),
      .sum_rd_row  (sum_rd_addr[ROW_AW-1:0]),
      .sum_rd_data (blk_sum[b]),
      .found       (blk_found[b]),
      .min_row     (blk_row[b]),
      .min_dist    (blk_dist[b])
    );
  end

  // every block runs in lock step, so block 0 drives the query buffer address
  assign smp_dim     = blk_smp_dim[0];
  assign sum_rd_data = blk_sum[sum_rd_addr[ADDR_W-1:ROW_AW]];

  // ---------------- second stage ----------------
  typedef enum logic [1:0] {P_IDLE, P_FIRST, P_SEARCH} pstate_e;

  pstate_e            state_q;
  logic [BLK_AW-1:0]  sel_q;
  logic               found_q, done_q;
  logic [ADDR_W-1:0]  win_addr_q;
  logic [SUM_W-1:0]   win_dist_q;

  logic [SUM_W-1:0]   minval_ram  [N_BLK];
  logic [ADDR_W-1:0]  minaddr_ram [N_BLK];
  logic [N_BLK-1:0]   minfound_q;

  // selection multiplexer
  logic [BLK_AW-1:0]  sel;
  logic               sel_active;
  logic [SUM_W-1:0]   sel_dist;
  logic [ADDR_W-1:0]  sel_addr;
  logic               sel_found;
  assign sel        = (state_q == P_SEARCH) ? sel_q : '0;
  assign sel_active = (state_q == P_SEARCH) || (state_q == P_FIRST && blk_done[0]);
  assign sel_dist   = blk_dist[sel];
  assign sel_addr   = {sel, blk_row[sel]};
  assign sel_found  = blk_found[sel];

  always_ff @(posedge clk) begin
    if (sel_active) begin
      minval_ram[sel]  <= sel_dist;
      minaddr_ram[sel] <= sel_addr;
    end
  end
  assign min_rd_dist  = minval_ram[min_rd_blk];
  assign min_rd_addr  = minaddr_ram[min_rd_blk];
  assign min_rd_found = minfound_q[min_rd_blk];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= P_IDLE;
      sel_q      <= '0;
      found_q    <= 1'b0;
      done_q     <= 1'b0;
      win_addr_q <= '0;
      win_dist_q <= '0;
      minfound_q <= '0;
    end else begin
      done_q <= 1'b0;
      if (sel_active) begin
        minfound_q[sel] <= sel_found;
        if (sel_found && (!found_q || sel_dist < win_dist_q)) begin
          found_q    <= 1'b1;
          win_dist_q <= sel_dist;
          win_addr_q <= sel_addr;
        end
      end
      unique case (state_q)
        P_IDLE: begin
          if (start) begin
            state_q <= P_FIRST;
            found_q <= 1'b0;
          end
        end
        P_FIRST: begin
          if (blk_done[0]) begin
            if (N_BLK == 1) begin
              state_q <= P_IDLE;
              done_q  <= 1'b1;
            end else begin
              state_q <= P_SEARCH;
              sel_q   <= BLK_AW'(1);
            end
          end
        end
        P_SEARCH: begin
          if (sel_q == BLK_AW'(N_BLK - 1)) begin
            state_q <= P_IDLE;
            done_q  <= 1'b1;
          end else begin
            sel_q <= sel_q + 1'b1;
          end
        end
        default: state_q <= P_IDLE;
      endcase
    end
  end

  // the blocks share one controller timing: they start and finish together
  a_done_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                                    blk_done[0] |-> &blk_done);
  a_busy_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                                    blk_busy[0] |-> &blk_busy);

  assign busy     = (state_q != P_IDLE);
  assign done     = done_q;
  assign found    = found_q;
  assign win_addr = win_addr_q;
  assign win_dist = win_dist_q;

endmodule
