// block_buffer -- 8x8 block buffer at the input of the JPEG accelerator.
//
// Receives the pixel stream from the DMA (AXI-Stream, one pixel per beat,
// tdata = {Cr, Cb, Y}, Y in bits 7:0). The stream is already ordered by block:
// 64 consecutive beats form one 8x8 pixel block, row-major inside the block.
// The buffer has two banks (ping-pong): one fills from the stream while the
// other hands its three component blocks - Y, then Cb, then Cr - to the DCT,
// each as 64 parallel samples level-shifted by -128. When both banks are full
// s_tready drops (back-pressure toward the DMA).
//
// A run is started by a one-cycle start pulse together with num_blocks, the
// number of pixel blocks in the image. The buffer then accepts exactly
// num_blocks*64 beats; tlast of the input stream is not needed and ignored.
// The Cr block of the final pixel block carries meta.last.
//
// Timing: a bank becomes readable the cycle after its 64th pixel is taken;
// out_valid then stays high until out_ready is seen, one component per
// handshake. The stage in front of the DCT is named in the document's block
// diagram only; the ping-pong organisation, the beat format and the
// component order are this design's choices.
module block_buffer
  import jpeg_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // run control
  input  logic              start,
  input  logic [23:0]       num_blocks,
  // pixel stream in
  input  logic [23:0]       s_tdata,
  input  logic              s_tvalid,
  output logic              s_tready,
  // component blocks out
  output logic              out_valid,
  input  logic              out_ready,
  output sample_blk_t       out_blk,
  output blk_meta_t         out_meta
);

  logic [7:0]  pix [2][3][BLK_SZ];   // [bank][component][sample]
  logic [1:0]  full;                 // bank holds a complete pixel block
  logic        wr_bank, rd_bank;
  logic [5:0]  wr_pos;
  logic [23:0] in_left;              // pixel blocks still to accept
  logic [23:0] out_idx;              // number of the block being read out
  logic [23:0] total;
  comp_e       rd_comp;

  logic take, give;
  assign s_tready  = (in_left != '0) && !full[wr_bank];
  assign take      = s_tvalid && s_tready;
  assign out_valid = full[rd_bank];
  assign give      = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full    <= '0;
      wr_bank <= 1'b0;
      rd_bank <= 1'b0;
      wr_pos  <= '0;
      in_left <= '0;
      out_idx <= '0;
      total   <= '0;
      rd_comp <= COMP_Y;
    end else begin
      if (start) begin
        in_left <= num_blocks;
        total   <= num_blocks;
        out_idx <= '0;
      end
      if (take) begin
        pix[wr_bank][0][wr_pos] <= s_tdata[7:0];
        pix[wr_bank][1][wr_pos] <= s_tdata[15:8];
        pix[wr_bank][2][wr_pos] <= s_tdata[23:16];
        wr_pos <= wr_pos + 6'd1;
        if (wr_pos == 6'd63) begin
          wr_bank <= ~wr_bank;
          in_left <= in_left - 24'd1;
        end
      end
      if (give) begin
        if (rd_comp == COMP_CR) begin
          rd_comp <= COMP_Y;
          rd_bank <= ~rd_bank;
          out_idx <= out_idx + 24'd1;
        end else begin
          rd_comp <= comp_e'(rd_comp + 2'd1);
        end
      end
      // bank flags: set by the last pixel, cleared after the Cr block
      for (int b = 0; b < 2; b++) begin
        if (take && wr_pos == 6'd63 && wr_bank == b[0])
          full[b] <= 1'b1;
        else if (give && rd_comp == COMP_CR && rd_bank == b[0])
          full[b] <= 1'b0;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < BLK_SZ; i++)
      out_blk[i] = sample_t'($signed({1'b0, pix[rd_bank][rd_comp][i]}) - 9'sd128);
    out_meta.idx  = out_idx;
    out_meta.comp = rd_comp;
    out_meta.last = (rd_comp == COMP_CR) && (out_idx == total - 24'd1);
  end

endmodule
