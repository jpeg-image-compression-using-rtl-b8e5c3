// zigzag_scan -- reorders a quantized 8x8 block into zigzag order.
//
// out_blk[k] = in_blk[zigzag_index(k)], where zigzag_index walks the
// anti-diagonals of the block alternately up and down (0, 1, 8, 16, 9, 2, ...),
// so the sequence runs from the lowest to the highest spatial frequency and
// the zeros left by quantization gather at its tail.
//
// The reorder is pure wiring; the block is registered once. Interface is
// block-level valid/ready with a one-entry output register: in_ready is high
// when the register is empty or being drained, so a block passes in one cycle
// and the stage sustains one block per cycle. The scan order is the JPEG
// standard's; registering the stage is this design's choice.
module zigzag_scan
  import jpeg_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  coef_blk_t  in_blk,
  input  blk_meta_t  in_meta,
  output logic       out_valid,
  input  logic       out_ready,
  output coef_blk_t  out_blk,
  output blk_meta_t  out_meta
);

  coef_blk_t zz;
  always_comb
    for (int k = 0; k < BLK_SZ; k++)
      zz[k] = in_blk[zigzag_index(k)];

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_meta  <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_blk  <= zz;
        out_meta <= in_meta;
      end
    end
  end

endmodule
