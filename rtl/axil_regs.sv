// axil_regs -- AXI4-Lite control and status registers of the JPEG accelerator.
//
// The processor configures and starts the accelerator through this slave.
// Register map (byte addresses, 32-bit registers):
//   0x000 CTRL        W: bit 0 = START (one-cycle pulse, reads 0)
//   0x004 STATUS      R: bit 0 = BUSY, bit 1 = DONE (sticky, cleared by START)
//   0x008 NUM_BLOCKS  RW: 8x8 pixel blocks in the image, bits 23:0
//   0x00C BLOCKS_OUT  R: component blocks encoded since START
//   0x010 TUPLES_OUT  R: RLE tuples sent on the output stream since START
//   0x014 CYCLES      R: clock cycles from START to DONE
//   0x018 BLK_TUPLES  R: tuples of the most recently encoded block, bits 6:0
//   0x100+4*i         RW: luminance quantization entry i (bits 7:0), i = 0..63
//   0x200+4*i         RW: chrominance quantization entry i (bits 7:0)
// Unmapped addresses read 0 and ignore writes; all responses are OKAY.
// wstrb is honoured on bytes of NUM_BLOCKS and on byte 0 of table entries.
//
// Handshake: a write is taken in the cycle both AWVALID and WVALID are high
// and no response is pending (AWREADY = WREADY in that cycle); BVALID follows
// one cycle later. A read is taken when ARVALID is high and no read data is
// pending; RVALID follows one cycle later. The tables reset to the standard
// example tables in jpeg_pkg. The document says only that the accelerator is
// configured through memory-mapped AXI-Lite registers; this map is this
// design's own.
module axil_regs
  import jpeg_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite slave
  input  logic [11:0] s_awaddr,
  input  logic        s_awvalid,
  output logic        s_awready,
  input  logic [31:0] s_wdata,
  input  logic [3:0]  s_wstrb,
  input  logic        s_wvalid,
  output logic        s_wready,
  output logic [1:0]  s_bresp,
  output logic        s_bvalid,
  input  logic        s_bready,
  input  logic [11:0] s_araddr,
  input  logic        s_arvalid,
  output logic        s_arready,
  output logic [31:0] s_rdata,
  output logic [1:0]  s_rresp,
  output logic        s_rvalid,
  input  logic        s_rready,
  // to the pipeline
  output logic        start,
  output logic [23:0] num_blocks,
  output qtab_t       qtab_luma,
  output qtab_t       qtab_chroma,
  // from the pipeline
  input  logic        blk_done,     // one component block finished
  input  logic [6:0]  blk_tuples,   // its tuple count, valid with blk_done
  input  logic        tuple_sent,   // one output beat accepted
  input  logic        run_done      // last beat of the image accepted
);

  localparam logic [11:0] A_CTRL   = 12'h000;
  localparam logic [11:0] A_STATUS = 12'h004;
  localparam logic [11:0] A_NBLK   = 12'h008;
  localparam logic [11:0] A_BLKOUT = 12'h00C;
  localparam logic [11:0] A_TUPOUT = 12'h010;
  localparam logic [11:0] A_CYCLES = 12'h014;
  localparam logic [11:0] A_BLKTUP = 12'h018;

  logic        busy, done;
  logic [31:0] blocks_out, tuples_out, cycles;
  logic [6:0]  last_tuples;

  logic wr_en, rd_en;
  assign wr_en     = s_awvalid && s_wvalid && !s_bvalid;
  assign s_awready = wr_en;
  assign s_wready  = wr_en;
  assign rd_en     = s_arvalid && !s_rvalid;
  assign s_arready = rd_en;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;

  logic [5:0] wi, ri;
  assign wi = s_awaddr[7:2];
  assign ri = s_araddr[7:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_bvalid    <= 1'b0;
      s_rvalid    <= 1'b0;
      s_rdata     <= '0;
      start       <= 1'b0;
      num_blocks  <= '0;
      busy        <= 1'b0;
      done        <= 1'b0;
      blocks_out  <= '0;
      tuples_out  <= '0;
      cycles      <= '0;
      last_tuples <= '0;
      for (int i = 0; i < BLK_SZ; i++) begin
        qtab_luma[i]   <= QLUMA_DEF[i];
        qtab_chroma[i] <= QCHROMA_DEF[i];
      end
    end else begin
      start <= 1'b0;
      // status and counters
      if (busy) cycles <= cycles + 32'd1;
      if (blk_done) begin
        blocks_out  <= blocks_out + 32'd1;
        last_tuples <= blk_tuples;
      end
      if (tuple_sent) tuples_out <= tuples_out + 32'd1;
      if (run_done) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
      // write channel
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (wr_en) begin
        s_bvalid <= 1'b1;
        case (s_awaddr[11:8])
          4'h0: begin
            if (s_awaddr == A_CTRL && s_wstrb[0] && s_wdata[0] && !busy) begin
              start      <= 1'b1;
              busy       <= 1'b1;
              done       <= 1'b0;
              blocks_out <= '0;
              tuples_out <= '0;
              cycles     <= '0;
            end
            if (s_awaddr == A_NBLK)
              for (int b = 0; b < 3; b++)
                if (s_wstrb[b]) num_blocks[8*b +: 8] <= s_wdata[8*b +: 8];
          end
          4'h1: if (s_wstrb[0]) qtab_luma[wi]   <= s_wdata[7:0];
          4'h2: if (s_wstrb[0]) qtab_chroma[wi] <= s_wdata[7:0];
          default: ;
        endcase
      end
      // read channel
      if (s_rvalid && s_rready) s_rvalid <= 1'b0;
      if (rd_en) begin
        s_rvalid <= 1'b1;
        case (s_araddr[11:8])
          4'h0: case (s_araddr)
                  A_STATUS: s_rdata <= {30'd0, done, busy};
                  A_NBLK:   s_rdata <= {8'd0, num_blocks};
                  A_BLKOUT: s_rdata <= blocks_out;
                  A_TUPOUT: s_rdata <= tuples_out;
                  A_CYCLES: s_rdata <= cycles;
                  A_BLKTUP: s_rdata <= {25'd0, last_tuples};
                  default:  s_rdata <= '0;
                endcase
          4'h1:    s_rdata <= {24'd0, qtab_luma[ri]};
          4'h2:    s_rdata <= {24'd0, qtab_chroma[ri]};
          default: s_rdata <= '0;
        endcase
      end
    end
  end

  // AXI-Lite rule: a response once raised stays until accepted
  a_bhold: assert property (@(posedge clk) disable iff (!rst_n)
    (s_bvalid && !s_bready) |=> s_bvalid);
  a_rhold: assert property (@(posedge clk) disable iff (!rst_n)
    (s_rvalid && !s_rready) |=> (s_rvalid && $stable(s_rdata)));

endmodule
