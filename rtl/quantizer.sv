// quantizer -- divides each DCT coefficient by its quantization table entry.
//
//   q[i] = sign(F[i]) * floor( (|F[i]| + Q[i]/2) / Q[i] )
//
// i.e. division rounded to the nearest integer, halves away from zero. The
// luminance table is used for Y blocks and the chrominance table for Cb and
// Cr blocks; both come from the control registers (natural row-major order).
// A table entry of 0 is treated as 1.
//
// One divider is shared: the block is taken in one cycle, then one
// coefficient is quantized per cycle for 64 cycles, after which out_valid is
// held until out_ready. Interface is block-level valid/ready like dct2d.
// Latency from accept to out_valid: 65 cycles. The operation follows the
// document (divide by the table value and round to an integer); the rounding
// rule, the serial schedule and the table source are this design's choices.
module quantizer
  import jpeg_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  qtab_t      qtab_luma,
  input  qtab_t      qtab_chroma,
  input  logic       in_valid,
  output logic       in_ready,
  input  coef_blk_t  in_blk,
  input  blk_meta_t  in_meta,
  output logic       out_valid,
  input  logic       out_ready,
  output coef_blk_t  out_blk,
  output blk_meta_t  out_meta
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_HOLD} state_e;
  state_e     state;
  coef_blk_t  c;
  logic [5:0] cnt;

  // one coefficient per cycle
  coef_t       cur;
  qval_t       qv;
  logic [11:0] mag, qdiv;
  logic [12:0] num;
  coef_t       qres;
  always_comb begin
    cur  = c[cnt];
    qv   = (out_meta.comp == COMP_Y) ? qtab_luma[cnt] : qtab_chroma[cnt];
    if (qv == '0) qv = 8'd1;
    mag  = cur[11] ? 12'(-cur) : 12'(cur);
    num  = {1'b0, mag} + 13'(qv >> 1);
    qdiv = 12'(num / 13'(qv));
    qres = cur[11] ? coef_t'(-$signed(qdiv)) : coef_t'(qdiv);
  end

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
          c        <= in_blk;
          out_meta <= in_meta;
          cnt      <= '0;
          state    <= S_RUN;
        end
        S_RUN: begin
          out_blk[cnt] <= qres;
          cnt          <= cnt + 6'd1;
          if (cnt == 6'd63) state <= S_HOLD;
        end
        S_HOLD: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
