// learn_ctrl: classification and learning sequence of the online learner.
//
// For every query (go pulse, query vector already in the query buffer):
//   1. start a nearest-distance search in the associative memory and wait
//      for its done pulse;
//   2. if a reference was found and the winner distance is <= threshold the
//      query matches it: the winner's rank jumps up (rank memory `jump`);
//   3. otherwise the query is learned: the rank memory inserts a new entry
//      (forgetting the lowest rank when the short-term part is full), the
//      chosen reference row is marked invalid, the DIM_N query words are
//      copied into it, one per cycle, and it is marked valid again.
// A one-cycle res_valid pulse then reports the outcome: matched, the winner
// (or, when learned, the new reference address), the winner distance and
// whether a reference was forgotten.
//
// res_valid is high 2 cycles after the am_done cycle for a match and
// DIM_N + 3 cycles after it for a learned query. The match rule (distance equal to the threshold still matches) and
// the two branches follow the published flow chart; the exact sequencing,
// handshakes and cycle counts are this design's own.
module learn_ctrl
  import am_pkg::*;
#(
  parameter int unsigned ADDR_W  = 10,
  parameter int unsigned DIM_N   = DIMS,
  parameter int unsigned DATA_W  = FEAT_W,
  parameter int unsigned SUM_W   = ACC_W,
  localparam int unsigned DIM_AW = (DIM_N > 1) ? $clog2(DIM_N) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               go,
  input  logic [SUM_W-1:0]   threshold,
  output logic               busy,
  // associative memory
  output logic               am_start,
  input  logic               am_done,
  input  logic               am_found,
  input  logic [ADDR_W-1:0]  am_addr,
  input  logic [SUM_W-1:0]   am_dist,
  // rank memory
  output logic               rk_insert,
  input  logic [ADDR_W-1:0]  rk_ins_addr,
  input  logic               rk_ins_evict,
  output logic               rk_jump,
  output logic [ADDR_W-1:0]  rk_jump_ref,
  // reference memory write and query buffer read
  output logic               wr_en,
  output logic [ADDR_W-1:0]  wr_addr,
  output logic [DIM_AW-1:0]  wr_dim,
  output logic [DATA_W-1:0]  wr_data,
  output logic               set_valid,
  output logic               clr_valid,
  output logic [DIM_AW-1:0]  q_dim,
  input  logic [DATA_W-1:0]  q_data,
  // result
  output logic               res_valid,
  output logic               res_matched,
  output logic               res_found,
  output logic               res_evicted,
  output logic [ADDR_W-1:0]  res_addr,
  output logic [SUM_W-1:0]   res_dist
);

  typedef enum logic [2:0] {
    L_IDLE, L_START, L_WAIT, L_DECIDE, L_WRITE, L_VALID, L_DONE
  } lstate_e;

  lstate_e            state_q;
  logic [DIM_AW-1:0]  dim_q;
  logic               found_q, matched_q, evicted_q;
  logic [ADDR_W-1:0]  win_q, new_q;
  logic [SUM_W-1:0]   dist_q;

  logic is_match;
  assign is_match = found_q && (dist_q <= threshold);

  assign busy        = (state_q != L_IDLE);
  assign am_start    = (state_q == L_START);
  assign rk_jump     = (state_q == L_DECIDE) && is_match;
  assign rk_jump_ref = win_q;
  assign rk_insert   = (state_q == L_DECIDE) && !is_match;
  assign clr_valid   = rk_insert;
  assign set_valid   = (state_q == L_VALID);
  assign wr_en       = (state_q == L_WRITE);
  assign wr_addr     = (state_q == L_DECIDE) ? rk_ins_addr : new_q;
  assign wr_dim      = dim_q;
  assign wr_data     = q_data;
  assign q_dim       = dim_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= L_IDLE;
      dim_q     <= '0;
      found_q   <= 1'b0;
      matched_q <= 1'b0;
      evicted_q <= 1'b0;
      win_q     <= '0;
      new_q     <= '0;
      dist_q    <= '0;
    end else begin
      unique case (state_q)
        L_IDLE:  if (go) state_q <= L_START;
        L_START: state_q <= L_WAIT;
        L_WAIT: begin
          if (am_done) begin
            found_q <= am_found;
            win_q   <= am_addr;
            dist_q  <= am_dist;
            state_q <= L_DECIDE;
          end
        end
        L_DECIDE: begin
          matched_q <= is_match;
          if (is_match) begin
            evicted_q <= 1'b0;
            state_q   <= L_DONE;
          end else begin
            new_q     <= rk_ins_addr;
            evicted_q <= rk_ins_evict;
            dim_q     <= '0;
            state_q   <= L_WRITE;
          end
        end
        L_WRITE: begin
          if (dim_q == DIM_AW'(DIM_N - 1)) state_q <= L_VALID;
          else                             dim_q   <= dim_q + 1'b1;
        end
        L_VALID: state_q <= L_DONE;
        L_DONE:  state_q <= L_IDLE;
        default: state_q <= L_IDLE;
      endcase
    end
  end

  assign res_valid   = (state_q == L_DONE);
  assign res_matched = matched_q;
  assign res_found   = found_q;
  assign res_evicted = evicted_q;
  assign res_addr    = matched_q ? win_q : new_q;
  assign res_dist    = dist_q;

endmodule
