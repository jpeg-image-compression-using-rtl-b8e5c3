// tb_block_buffer -- self-checking testbench for block_buffer.
//
// Streams NB random pixel blocks ({Cr, Cb, Y} per beat) with random gaps while
// the consumer takes component blocks with random delays. Every component
// block must come out in the order Y, Cb, Cr with samples equal to the pixel
// component minus 128, the right block number, and meta.last only on the Cr
// block of the final pixel block. The input must be back-pressured when both
// banks are full, and must accept no beat beyond NB*64.
module tb_block_buffer;
  import jpeg_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start;
  logic [23:0] num_blocks;
  logic [23:0] s_tdata;
  logic        s_tvalid, s_tready;
  logic        out_valid, out_ready;
  sample_blk_t out_blk;
  blk_meta_t   out_meta;

  block_buffer dut (.*);

  localparam int NB = 12;
  logic [23:0] img [NB*64];
  int checks = 0, failures = 0;
  int n_in = 0, n_out = 0, bp = 0;
  bit slow_sink = 1'b1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // source: drives at the clock edge, beats counted when taken
  always @(posedge clk) if (rst_n) begin
    if (s_tvalid && s_tready) n_in <= n_in + 1;
    if (s_tvalid && !s_tready) bp <= bp + 1;
  end
  always_comb s_tdata = img[n_in % (NB*64)];

  // sink
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      int b, c;
      b = n_out / 3;
      c = n_out % 3;
      for (int i = 0; i < 64; i++)
        check($signed(out_blk[i]) == int'(img[b*64+i][8*c +: 8]) - 128,
              $sformatf("block %0d comp %0d sample %0d", b, c, i));
      check(out_meta.idx == 24'(b) && out_meta.comp == comp_e'(c),
            $sformatf("meta of block %0d comp %0d", b, c));
      check(out_meta.last == (n_out == 3*NB - 1), $sformatf("last flag at %0d", n_out));
      n_out <= n_out + 1;
    end
    out_ready <= slow_sink ? ($urandom_range(0, 15) == 0) : 1'b1;
  end

  initial begin
    foreach (img[i]) img[i] = 24'($urandom);
    start = 1'b0; num_blocks = '0; s_tvalid = 1'b0; out_ready = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    check(!s_tready, "ready before start");
    #1 start = 1'b1; num_blocks = 24'(NB);
    @(posedge clk); #1 start = 1'b0;
    // random valid gaps on the source
    while (n_in < NB * 64) begin
      s_tvalid = 1'($urandom_range(0, 3) != 0);
      @(posedge clk); #1;
      if (n_in >= NB * 32) slow_sink = 1'b0;
    end
    // extra beats offered after the image must not be taken
    s_tvalid = 1'b1;
    while (n_out < 3 * NB) begin @(posedge clk); #1; end
    repeat (5) @(posedge clk);
    check(n_in == NB * 64, $sformatf("accepted %0d beats", n_in));
    check(bp > 0, "input never back-pressured");
    $display("back-pressure cycles: %0d", bp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
