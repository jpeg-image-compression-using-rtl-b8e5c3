// rle_encoder -- run-length encoder and AXI-Stream master of the accelerator.
//
// Takes one zigzag-ordered quantized block and emits it as (run, value)
// tuples on the 48-bit compressed stream (layout: jpeg_pkg::rle_tuple_t):
//   * the first tuple carries the DC coefficient with run 0, even when zero;
//   * every non-zero AC coefficient gives one tuple whose run is the number of
//     zero coefficients skipped since the previous tuple;
//   * an end-of-block tuple (eob=1, value 0) closes the block; its run is the
//     number of trailing zeros, so all runs plus the value tuples add up to 64.
// m_tlast is set on the end-of-block tuple of the image's last block.
//
// The encoder looks at one coefficient per cycle; a cycle with a zero
// coefficient emits nothing. Tuples are sent only when m_tvalid and m_tready
// are both high; while m_tready is low the encoder stalls and holds its
// output. A block keeps the encoder busy for 65 cycles after the accepting
// edge plus stall cycles (one block per 66 cycles back to back); in_ready is high only
// while idle. blk_done pulses with blk_tuples (tuples of that block,
// end-of-block included) when the end-of-block tuple is loaded.
// The (run_length, value) tuple form follows the document; DC handling, the
// end-of-block tuple and the word layout are this design's choices.
module rle_encoder
  import jpeg_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  coef_blk_t   in_blk,
  input  blk_meta_t   in_meta,
  output logic [47:0] m_tdata,
  output logic        m_tvalid,
  input  logic        m_tready,
  output logic        m_tlast,
  output logic        blk_done,
  output logic [6:0]  blk_tuples
);

  typedef enum logic [1:0] {S_IDLE, S_SCAN, S_EOB} state_e;
  state_e     state;
  coef_blk_t  c;
  blk_meta_t  meta;
  logic [5:0] k;
  logic [5:0] run;
  logic [6:0] ntup;
  rle_tuple_t tup;

  logic adv;
  assign adv      = !m_tvalid || m_tready;
  assign in_ready = (state == S_IDLE);
  assign m_tdata  = tup;

  function automatic rle_tuple_t make_tuple(logic [23:0] blk, comp_e comp,
                                            logic eob, logic [5:0] r, coef_t v);
    rle_tuple_t t;
    t.blk   = blk;
    t.rsvd  = '0;
    t.eob   = eob;
    t.comp  = comp;
    t.run   = r;
    t.value = v;
    return t;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      k          <= '0;
      run        <= '0;
      ntup       <= '0;
      meta       <= '0;
      tup        <= '0;
      m_tvalid   <= 1'b0;
      m_tlast    <= 1'b0;
      blk_done   <= 1'b0;
      blk_tuples <= '0;
    end else begin
      blk_done <= 1'b0;
      case (state)
        S_IDLE: begin
          if (m_tvalid && m_tready) m_tvalid <= 1'b0;
          if (in_valid) begin
            c     <= in_blk;
            meta  <= in_meta;
            k     <= '0;
            run   <= '0;
            ntup  <= '0;
            state <= S_SCAN;
          end
        end
        S_SCAN: if (adv) begin
          if (k == 6'd0 || c[k] != '0) begin
            tup      <= make_tuple(meta.idx, meta.comp, 1'b0, run, c[k]);
            m_tvalid <= 1'b1;
            m_tlast  <= 1'b0;
            run      <= '0;
            ntup     <= ntup + 7'd1;
          end else begin
            m_tvalid <= 1'b0;
            run      <= run + 6'd1;
          end
          k <= k + 6'd1;
          if (k == 6'd63) state <= S_EOB;
        end
        S_EOB: if (adv) begin
          tup        <= make_tuple(meta.idx, meta.comp, 1'b1, run, '0);
          m_tvalid   <= 1'b1;
          m_tlast    <= meta.last;
          blk_done   <= 1'b1;
          blk_tuples <= ntup + 7'd1;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // AXI-Stream rule: a tuple once offered stays unchanged until accepted
  a_stream_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (m_tvalid && !m_tready) |=> (m_tvalid && $stable(m_tdata) && $stable(m_tlast)));

endmodule
