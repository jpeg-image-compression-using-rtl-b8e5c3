// jpeg_accel_top -- JPEG compression accelerator (DCT, quantization, zigzag
// scan and run-length encoding of 8x8 blocks) for a processor + DMA system.
//
// Data path, one pipeline stage per block, each holding its own block so that
// up to five component blocks are in flight (RLE of one block, quantization of
// the next and DCT of the one after that run at the same time):
//
//   pix stream -> block_buffer -> dct2d -> quantizer -> zigzag_scan
//              -> rle_encoder -> comp stream
//
// Interfaces (all synchronous to clk, active-low asynchronous reset rstn):
//   * s_axil_*  AXI4-Lite slave for the control/status registers (axil_regs);
//   * pix_*     AXI-Stream input from the DMA read channel (memory to
//               stream): one pixel per beat, tdata = {Cr, Cb, Y}, 64 beats per
//               8x8 block, blocks in order, row-major inside a block;
//   * comp_*    AXI-Stream output to the DMA write channel (stream to memory):
//               one 48-bit run-length tuple per beat, comp_tlast on the end of
//               the image's last block.
// Software sequence: write the quantization tables if the defaults are not
// wanted, write NUM_BLOCKS, write CTRL.START, run both DMA channels, poll
// STATUS.DONE. Colour conversion and the JPEG header stay in software.
//
// Throughput: the DCT is the slowest stage at 130 cycles per component block,
// so a pixel block costs about 390 cycles in steady state. The stage split
// follows the document; the stream formats, the register map and the
// stage-level handshake are this design's choices.
module jpeg_accel_top
  import jpeg_pkg::*;
(
  input  logic        clk,
  input  logic        rstn,
  // AXI4-Lite control
  input  logic [11:0] s_axil_awaddr,
  input  logic        s_axil_awvalid,
  output logic        s_axil_awready,
  input  logic [31:0] s_axil_wdata,
  input  logic [3:0]  s_axil_wstrb,
  input  logic        s_axil_wvalid,
  output logic        s_axil_wready,
  output logic [1:0]  s_axil_bresp,
  output logic        s_axil_bvalid,
  input  logic        s_axil_bready,
  input  logic [11:0] s_axil_araddr,
  input  logic        s_axil_arvalid,
  output logic        s_axil_arready,
  output logic [31:0] s_axil_rdata,
  output logic [1:0]  s_axil_rresp,
  output logic        s_axil_rvalid,
  input  logic        s_axil_rready,
  // pixel stream in (from DMA memory-to-stream)
  input  logic [23:0] pix_tdata,
  input  logic        pix_tvalid,
  output logic        pix_tready,
  // compressed stream out (to DMA stream-to-memory)
  output logic [47:0] comp_tdata,
  output logic        comp_tvalid,
  input  logic        comp_tready,
  output logic        comp_tlast
);

  logic        start;
  logic [23:0] num_blocks;
  qtab_t       qtab_luma, qtab_chroma;
  logic        blk_done;
  logic [6:0]  blk_tuples;

  // stage links
  logic        bb_v, bb_r;  sample_blk_t bb_blk;  blk_meta_t bb_meta;
  logic        dc_v, dc_r;  coef_blk_t   dc_blk;  blk_meta_t dc_meta;
  logic        qz_v, qz_r;  coef_blk_t   qz_blk;  blk_meta_t qz_meta;
  logic        zz_v, zz_r;  coef_blk_t   zz_blk;  blk_meta_t zz_meta;

  axil_regs u_regs (
    .clk, .rst_n(rstn),
    .s_awaddr(s_axil_awaddr), .s_awvalid(s_axil_awvalid), .s_awready(s_axil_awready),
    .s_wdata(s_axil_wdata), .s_wstrb(s_axil_wstrb), .s_wvalid(s_axil_wvalid),
    .s_wready(s_axil_wready), .s_bresp(s_axil_bresp), .s_bvalid(s_axil_bvalid),
    .s_bready(s_axil_bready), .s_araddr(s_axil_araddr), .s_arvalid(s_axil_arvalid),
    .s_arready(s_axil_arready), .s_rdata(s_axil_rdata), .s_rresp(s_axil_rresp),
    .s_rvalid(s_axil_rvalid), .s_rready(s_axil_rready),
    .start, .num_blocks, .qtab_luma, .qtab_chroma,
    .blk_done, .blk_tuples,
    .tuple_sent(comp_tvalid && comp_tready),
    .run_done(comp_tvalid && comp_tready && comp_tlast)
  );

  block_buffer u_buf (
    .clk, .rst_n(rstn), .start, .num_blocks,
    .s_tdata(pix_tdata), .s_tvalid(pix_tvalid), .s_tready(pix_tready),
    .out_valid(bb_v), .out_ready(bb_r), .out_blk(bb_blk), .out_meta(bb_meta)
  );

  dct2d u_dct (
    .clk, .rst_n(rstn),
    .in_valid(bb_v), .in_ready(bb_r), .in_blk(bb_blk), .in_meta(bb_meta),
    .out_valid(dc_v), .out_ready(dc_r), .out_blk(dc_blk), .out_meta(dc_meta)
  );

  quantizer u_quant (
    .clk, .rst_n(rstn), .qtab_luma, .qtab_chroma,
    .in_valid(dc_v), .in_ready(dc_r), .in_blk(dc_blk), .in_meta(dc_meta),
    .out_valid(qz_v), .out_ready(qz_r), .out_blk(qz_blk), .out_meta(qz_meta)
  );

  zigzag_scan u_zz (
    .clk, .rst_n(rstn),
    .in_valid(qz_v), .in_ready(qz_r), .in_blk(qz_blk), .in_meta(qz_meta),
    .out_valid(zz_v), .out_ready(zz_r), .out_blk(zz_blk), .out_meta(zz_meta)
  );

  rle_encoder u_rle (
    .clk, .rst_n(rstn),
    .in_valid(zz_v), .in_ready(zz_r), .in_blk(zz_blk), .in_meta(zz_meta),
    .m_tdata(comp_tdata), .m_tvalid(comp_tvalid), .m_tready(comp_tready),
    .m_tlast(comp_tlast), .blk_done, .blk_tuples
  );

endmodule
