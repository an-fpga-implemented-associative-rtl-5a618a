// feature_extractor: gradient-direction features of a 16x16 binary image.
//
// The normalized character image is cut into an 8x8 grid of 2x2-pixel cells.
// For every pixel the horizontal and vertical Sobel derivatives are formed,
//   Sx(i,j) = I(i-1,j+1) + 2 I(i,j+1) + I(i+1,j+1)
//           - I(i-1,j-1) - 2 I(i,j-1) - I(i+1,j-1)
//   Sy(i,j) = I(i-1,j-1) + 2 I(i-1,j) + I(i-1,j+1)
//           - I(i+1,j-1) - 2 I(i+1,j) - I(i+1,j+1)
// (i = row, j = column, pixels outside the image read as 0), the four
// pixels of a cell are summed, and the cell's feature is the direction
// theta = arctan(sum Sy / sum Sx). These steps follow the published method.
//
// Implementation (this design's own): one cell at a time, the Sobel sums are
// formed combinationally from the captured image and the arctangent is
// computed by an 18-step vectoring CORDIC (angle kept with 4 fraction bits,
// then rounded). The vector is first folded into
// the right half-plane (negating both sums when sum Sx < 0), which gives the
// arctan range -90..+90 degrees. The result is coded as an unsigned 16-bit
// number: code = 16384 + theta * 65536 / 360, so -90 deg -> 0, 0 -> 16384,
// +90 deg -> 32768. A cell with both sums zero gets code 16384; sum Sx = 0
// gives exactly -90 or +90 degrees; other results are clamped to 0..32768.
//
// Interface: start (one cycle, img valid) captures img (bit 16*row+col).
// Each cell then takes 20 cycles: the features come out in raster order of
// the grid (dim = 8*cell_row + cell_col) as one-cycle f_valid pulses; done
// pulses with the last one. 64 cells -> 1280 cycles.
module feature_extractor
  import am_pkg::*;
#(
  localparam int unsigned IMG     = 16,  // image side in pixels
  localparam int unsigned GRID    = 8,   // cells per side
  localparam int unsigned N_ITER  = 18,  // CORDIC steps
  localparam int unsigned CW      = 24,  // CORDIC x/y width
  localparam int unsigned ZW      = 22   // CORDIC angle width (4 fraction bits)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [IMG*IMG-1:0]     img,
  output logic                   busy,
  output logic                   f_valid,
  output logic [5:0]             f_dim,
  output logic [FEAT_W-1:0]      f_data,
  output logic                   done
);

  // atan(2^-i) in units of 360/2^20 degrees (1/16 of an output code),
  // i.e. round(atan(2^-i) * 2^20 / (2*pi))
  function automatic logic signed [ZW-1:0] atan_tab(input logic [4:0] i);
    unique case (i)
      0: return 22'sd131072;  1: return 22'sd77376;  2: return 22'sd40884;
      3: return 22'sd20753;   4: return 22'sd10417;  5: return 22'sd5213;
      6: return 22'sd2607;    7: return 22'sd1304;   8: return 22'sd652;
      9: return 22'sd326;    10: return 22'sd163;   11: return 22'sd81;
     12: return 22'sd41;     13: return 22'sd20;    14: return 22'sd10;
     15: return 22'sd5;      16: return 22'sd3;     17: return 22'sd1;
      default: return 22'sd0;
    endcase
  endfunction

  logic [IMG*IMG-1:0] img_q;

  function automatic int pix(input logic [IMG*IMG-1:0] im, input int r, input int c);
    if (r < 0 || c < 0 || r >= int'(IMG) || c >= int'(IMG)) return 0;
    return im[r*IMG + c] ? 1 : 0;
  endfunction

  typedef enum logic [1:0] {F_IDLE, F_LOAD, F_ITER, F_OUT} fstate_e;

  fstate_e                 state_q;
  logic [5:0]              cell_q;
  logic [4:0]              it_q;
  logic signed [CW-1:0]    x_q, y_q;
  logic signed [ZW-1:0]    z_q;
  logic                    zero_q;   // no gradient
  logic                    vert_q;   // sum Sx = 0: theta = +-90 degrees
  logic                    neg_q;    // sum Sy < 0

  // Sobel sums of the current cell
  logic signed [7:0] gx, gy;
  always_comb begin
    int sx, sy, r0, c0;
    sx = 0;
    sy = 0;
    r0 = 2 * int'(cell_q[5:3]);
    c0 = 2 * int'(cell_q[2:0]);
    for (int a = 0; a < 2; a++) begin
      for (int b = 0; b < 2; b++) begin
        int i, j;
        i = r0 + a;
        j = c0 + b;
        sx += pix(img_q, i-1, j+1) + 2*pix(img_q, i, j+1) + pix(img_q, i+1, j+1)
            - pix(img_q, i-1, j-1) - 2*pix(img_q, i, j-1) - pix(img_q, i+1, j-1);
        sy += pix(img_q, i-1, j-1) + 2*pix(img_q, i-1, j) + pix(img_q, i-1, j+1)
            - pix(img_q, i+1, j-1) - 2*pix(img_q, i+1, j) - pix(img_q, i+1, j+1);
      end
    end
    gx = 8'(sx);
    gy = 8'(sy);
  end

  logic signed [CW-1:0] x_sh, y_sh;
  assign x_sh = x_q >>> it_q;
  assign y_sh = y_q >>> it_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= F_IDLE;
      img_q   <= '0;
      cell_q  <= '0;
      it_q    <= '0;
      x_q     <= '0;
      y_q     <= '0;
      z_q     <= '0;
      zero_q  <= 1'b0;
      vert_q  <= 1'b0;
      neg_q   <= 1'b0;
    end else begin
      unique case (state_q)
        F_IDLE: begin
          if (start) begin
            img_q   <= img;
            cell_q  <= '0;
            state_q <= F_LOAD;
          end
        end
        F_LOAD: begin
          // fold into the right half-plane, scale up by 2^14
          if (gx < 0) begin
            x_q <= CW'(-gx) <<< 14;
            y_q <= CW'(-gy) <<< 14;
          end else begin
            x_q <= CW'(gx) <<< 14;
            y_q <= CW'(gy) <<< 14;
          end
          zero_q  <= (gx == 0) && (gy == 0);
          vert_q  <= (gx == 0) && (gy != 0);
          neg_q   <= (gy < 0);
          z_q     <= '0;
          it_q    <= '0;
          state_q <= F_ITER;
        end
        F_ITER: begin
          if (y_q > 0) begin
            x_q <= x_q + y_sh;
            y_q <= y_q - x_sh;
            z_q <= z_q + atan_tab(it_q);
          end else if (y_q < 0) begin
            x_q <= x_q - y_sh;
            y_q <= y_q + x_sh;
            z_q <= z_q - atan_tab(it_q);
          end
          if (it_q == 5'(N_ITER - 1)) state_q <= F_OUT;
          else                        it_q    <= it_q + 1'b1;
        end
        F_OUT: begin
          if (cell_q == 6'(GRID*GRID - 1)) begin
            state_q <= F_IDLE;
          end else begin
            cell_q  <= cell_q + 1'b1;
            state_q <= F_LOAD;
          end
        end
        default: state_q <= F_IDLE;
      endcase
    end
  end

  // round to whole codes, offset by 90 degrees, clamp to the arctan range
  logic signed [ZW-1:0] z_rnd;
  logic [FEAT_W-1:0]    code;
  assign z_rnd = (z_q + ZW'(8)) >>> 4;
  always_comb begin
    if (zero_q)                     code = 16'd16384;
    else if (vert_q)                code = neg_q ? 16'd0 : 16'd32768;
    else if (z_rnd <= -ZW'(16384))  code = 16'd0;
    else if (z_rnd >= ZW'(16384))   code = 16'd32768;
    else                            code = FEAT_W'(z_rnd + ZW'(16384));
  end
  assign busy    = (state_q != F_IDLE);
  assign f_valid = (state_q == F_OUT);
  assign f_dim   = cell_q;
  assign f_data  = code;
  assign done    = (state_q == F_OUT) && (cell_q == 6'(GRID*GRID - 1));

endmodule
