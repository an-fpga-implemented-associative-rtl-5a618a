// rank_memory: short/long-term rank list of the online learner.
//
// The list has N_ENT positions ("ranks"); position 0 is the highest rank.
// Each position holds the address of one stored reference and a valid flag.
// Positions below `boundary` form the long-term part, the rest the
// short-term part. Two single-cycle operations change the list:
//
//   insert : a new reference enters at position s and the entries below move
//            down by one. s is the top of the short-term part (boundary), or,
//            in INS_LONG_FIRST mode while the long-term part still has a free
//            position, the top of the list. The move-down stops at the first
//            free position at or below s; if there is none the short-term part
//            is full and the lowest rank (position N_ENT-1) falls out: that
//            reference is forgotten and its address is reused for the new
//            one. Otherwise the new reference gets the next never-used
//            address. ins_addr / ins_evict show, before the pulse, which
//            address an insert will use and whether it forgets one.
//   jump   : the entry holding reference jump_ref moves from position p to
//            q = max(p - jump_val, 0); the entries between q and p-1 move
//            down by one. An entry can cross the boundary this way and so
//            become long-term. jump_hit is low if jump_ref is not stored.
//
// Insert and jump must not be pulsed in the same cycle. The list semantics
// (insertion points, move-down, forgetting, jump = index - jump value) follow
// the published learning model; stopping the move-down at a free position,
// the address allocation and the lookup of a reference by parallel compare
// are this design's own.
module rank_memory
  import am_pkg::*;
#(
  parameter int unsigned N_ENT    = N_BLOCKS * ROWS,
  localparam int unsigned ADDR_W  = (N_ENT > 1) ? $clog2(N_ENT) : 1,
  localparam int unsigned CNT_W   = $clog2(N_ENT + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  ins_mode_e          ins_mode,
  input  logic [CNT_W-1:0]   boundary,   // size of the long-term part
  // insert
  input  logic               insert,
  output logic [ADDR_W-1:0]  ins_addr,
  output logic               ins_evict,
  output logic [ADDR_W-1:0]  ins_pos,
  // jump up
  input  logic               jump,
  input  logic [ADDR_W-1:0]  jump_ref,
  input  logic [ADDR_W-1:0]  jump_val,
  output logic               jump_hit,
  output logic [ADDR_W-1:0]  jump_from,
  output logic [ADDR_W-1:0]  jump_to,
  // read port
  input  logic [ADDR_W-1:0]  rd_pos,
  output logic [ADDR_W-1:0]  rd_ref,
  output logic               rd_valid,
  output logic [CNT_W-1:0]   count
);

  logic [ADDR_W-1:0] ref_q [N_ENT];
  logic [N_ENT-1:0]  vld_q;
  logic [CNT_W-1:0]  n_alloc_q;  // addresses handed out = stored references

  // ---------------- insert position and free slot ----------------
  logic [ADDR_W-1:0] b_pos;      // top of the short-term part
  logic              lt_free;
  logic [ADDR_W-1:0] s_pos;
  logic              has_free;
  logic [ADDR_W-1:0] h_pos;      // last position touched by the move-down

  always_comb begin
    b_pos = (boundary >= CNT_W'(N_ENT)) ? ADDR_W'(N_ENT - 1) : ADDR_W'(boundary);
    lt_free = 1'b0;
    for (int i = 0; i < N_ENT; i++) begin
      if (CNT_W'(i) < boundary && !vld_q[i]) lt_free = 1'b1;
    end
    s_pos = (ins_mode == INS_LONG_FIRST && lt_free) ? '0 : b_pos;
    has_free = 1'b0;
    h_pos    = ADDR_W'(N_ENT - 1);
    for (int i = N_ENT - 1; i >= 0; i--) begin
      if (ADDR_W'(i) >= s_pos && !vld_q[i]) begin
        has_free = 1'b1;
        h_pos    = ADDR_W'(i);
      end
    end
  end

  assign ins_evict = !has_free;
  assign ins_addr  = has_free ? n_alloc_q[ADDR_W-1:0] : ref_q[N_ENT-1];
  assign ins_pos   = s_pos;

  // ---------------- jump lookup ----------------
  logic [ADDR_W-1:0] p_pos, q_pos;
  logic              hit;
  always_comb begin
    hit   = 1'b0;
    p_pos = '0;
    for (int i = N_ENT - 1; i >= 0; i--) begin
      if (vld_q[i] && ref_q[i] == jump_ref) begin
        hit   = 1'b1;
        p_pos = ADDR_W'(i);
      end
    end
    q_pos = (p_pos >= jump_val) ? p_pos - jump_val : '0;
  end
  assign jump_hit  = hit;
  assign jump_from = p_pos;
  assign jump_to   = q_pos;

  // ---------------- list update ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q     <= '0;
      n_alloc_q <= '0;
      for (int i = 0; i < N_ENT; i++) ref_q[i] <= '0;
    end else if (insert) begin
      for (int i = 0; i < N_ENT; i++) begin
        if (ADDR_W'(i) == s_pos) begin
          ref_q[i] <= ins_addr;
          vld_q[i] <= 1'b1;
        end else if (ADDR_W'(i) > s_pos && ADDR_W'(i) <= h_pos) begin
          ref_q[i] <= ref_q[i-1];
          vld_q[i] <= vld_q[i-1];
        end
      end
      if (has_free) n_alloc_q <= n_alloc_q + 1'b1;
    end else if (jump && hit) begin
      for (int i = 0; i < N_ENT; i++) begin
        if (ADDR_W'(i) == q_pos) begin
          ref_q[i] <= ref_q[p_pos];
          vld_q[i] <= 1'b1;
        end else if (ADDR_W'(i) > q_pos && ADDR_W'(i) <= p_pos) begin
          ref_q[i] <= ref_q[i-1];
          vld_q[i] <= vld_q[i-1];
        end
      end
    end
  end

  assign rd_ref   = ref_q[rd_pos];
  assign rd_valid = vld_q[rd_pos];
  assign count    = n_alloc_q;

  a_one_op: assert property (@(posedge clk) disable iff (!rst_n) !(insert && jump));

endmodule
