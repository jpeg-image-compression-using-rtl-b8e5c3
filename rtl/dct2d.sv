// dct2d -- 8x8 two-dimensional forward DCT (DCT-II as used by JPEG).
//
//   F(v,u) = 1/4 C(u) C(v) sum_y sum_x f(y,x) cos((2x+1)u pi/16) cos((2y+1)v pi/16)
//
// computed separably as F = A * f * A^T with the scaled basis matrix
// A[u][x] = round(2^12 * C(u)/2 * cos((2x+1)u pi/16)) from jpeg_pkg.
// One shared eight-term dot-product unit (eight multipliers and an adder tree)
// produces one coefficient per cycle:
//   row pass    t[y][u] = round( sum_x A[u][x] f[y][x] / 2^9 )   (3 fraction bits)
//   column pass F[v][u] = round( sum_y A[v][y] t[y][u] / 2^15 )
// Rounding is half-up (add half, arithmetic shift). Results are 12-bit signed.
//
// Interface: block-level valid/ready. A block is taken when in_valid and
// in_ready are both high (in_ready is high only while idle). 64 cycles of row
// pass and 64 cycles of column pass follow; out_valid then rises and holds
// out_blk/out_meta until out_ready. Latency from the accepting clock edge to out_valid: 128
// cycles; one block every 130 cycles when the output is drained at once.
// The document asks for a 2D DCT on 8x8 blocks; the separable
// one-coefficient-per-cycle structure and the fixed-point widths are this
// design's choices.
module dct2d
  import jpeg_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  sample_blk_t  in_blk,
  input  blk_meta_t    in_meta,
  output logic         out_valid,
  input  logic         out_ready,
  output coef_blk_t    out_blk,
  output blk_meta_t    out_meta
);

  typedef enum logic [1:0] {S_IDLE, S_ROW, S_COL, S_HOLD} state_e;
  state_e state;

  sample_blk_t f;                    // input samples, row-major f[y*8+x]
  row_t        t [BLK_SZ];           // row-pass result t[y*8+u]
  logic [5:0]  cnt;                  // {row, col} of the coefficient produced

  // basis matrix as a constant table
  localparam int SUM_W = 32;
  basis_t A [BLK_N][BLK_N];
  always_comb
    for (int u = 0; u < BLK_N; u++)
      for (int x = 0; x < BLK_N; x++)
        A[u][x] = dct_basis(u, x);

  // shared dot product: row pass uses f[y][k] and A[u][k];
  // column pass uses t[k][u] and A[v][k], with {y|v, u} = cnt
  logic [2:0] hi, lo;
  assign hi = cnt[5:3];
  assign lo = cnt[2:0];

  logic signed [SUM_W-1:0] prod [BLK_N];
  logic signed [SUM_W-1:0] acc;
  always_comb begin
    acc = '0;
    for (int k = 0; k < BLK_N; k++) begin
      if (state == S_COL)
        prod[k] = SUM_W'(t[k*BLK_N + int'(lo)]) * SUM_W'(A[hi][k]);
      else
        prod[k] = SUM_W'($signed(f[int'(hi)*BLK_N + k])) * SUM_W'(A[lo][k]);
      acc = acc + prod[k];
    end
  end

  localparam int ROW_SH = DCT_FRAC - ROW_FRAC;   // 9
  localparam int COL_SH = DCT_FRAC + ROW_FRAC;   // 15
  localparam logic signed [SUM_W-1:0] ROW_HALF = SUM_W'(1) <<< (ROW_SH - 1);
  localparam logic signed [SUM_W-1:0] COL_HALF = SUM_W'(1) <<< (COL_SH - 1);

  assign in_ready  = (state == S_IDLE);
  assign out_valid = (state == S_HOLD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cnt      <= '0;
      out_meta <= '0;
    end else begin
      case (state)
        S_IDLE: if (in_valid) begin
          f        <= in_blk;
          out_meta <= in_meta;
          cnt      <= '0;
          state    <= S_ROW;
        end
        S_ROW: begin
          t[cnt] <= row_t'((acc + ROW_HALF) >>> ROW_SH);
          cnt    <= cnt + 6'd1;
          if (cnt == 6'd63) state <= S_COL;
        end
        S_COL: begin
          out_blk[cnt] <= coef_t'((acc + COL_HALF) >>> COL_SH);
          cnt          <= cnt + 6'd1;
          if (cnt == 6'd63) state <= S_HOLD;
        end
        S_HOLD: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
