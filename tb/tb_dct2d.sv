// tb_dct2d -- self-checking testbench for dct2d.
//
// Sends constant, extreme, checkerboard and random 8x8 blocks. Each result is
// compared bit-exactly with the fixed-point reference (tb_ref_pkg::dct_int)
// and within +-2 of the exact real-valued DCT. The accept-to-valid latency
// must be 128 cycles, and the output must hold while out_ready is low.
module tb_dct2d;
  import jpeg_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid, in_ready, out_valid, out_ready;
  sample_blk_t in_blk;
  blk_meta_t   in_meta, out_meta;
  coef_blk_t   out_blk;

  dct2d dut (.*);

  int checks = 0, failures = 0;

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

  task automatic run_block(blk_t f, int id);
    blk_t ref_i;
    int lat;
    for (int i = 0; i < 64; i++) in_blk[i] = 9'(f[i]);
    in_meta  = '{idx: 24'(id), comp: COMP_CB, last: 1'b1};
    in_valid = 1'b1;
    do @(posedge clk); while (!in_ready);
    #1 in_valid = 1'b0;
    lat = 0;
    while (!out_valid) begin
      @(posedge clk); #1;
      lat++;
    end
    check(lat == 128, $sformatf("block %0d latency %0d, expected 128", id, lat));
    // hold out_ready low a few cycles: result must stay
    out_ready = 1'b0;
    repeat ($urandom_range(0, 3)) begin
      @(posedge clk); #1;
      check(out_valid, "out_valid dropped while not ready");
    end
    ref_i = dct_int(f);
    for (int i = 0; i < 64; i++) begin
      real r, d;
      check($signed(out_blk[i]) == ref_i[i],
            $sformatf("block %0d coef %0d: got %0d ref %0d", id, i, $signed(out_blk[i]), ref_i[i]));
      r = dct_real(f, i / 8, i % 8);
      d = real'($signed(out_blk[i])) - r;
      check(d < 2.0 && d > -2.0,
            $sformatf("block %0d coef %0d: got %0d real %f", id, i, $signed(out_blk[i]), r));
    end
    check(out_meta.idx == 24'(id) && out_meta.comp == COMP_CB && out_meta.last,
          "metadata not carried");
    out_ready = 1'b1;
    @(posedge clk); #1;
    out_ready = 1'b0;
    check(!out_valid, "out_valid still high after handshake");
  endtask

  initial begin
    blk_t f;
    in_valid = 1'b0; out_ready = 1'b0; in_blk = '0; in_meta = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    foreach (f[i]) f[i] = 127;            run_block(f, 0);
    foreach (f[i]) f[i] = -128;           run_block(f, 1);
    foreach (f[i]) f[i] = 0;              run_block(f, 2);
    foreach (f[i]) f[i] = (((i / 8) + (i % 8)) % 2) ? 127 : -128;
                                           run_block(f, 3);
    foreach (f[i]) f[i] = (i % 8) * 32 - 128; run_block(f, 4);
    for (int n = 5; n < 25; n++) begin
      foreach (f[i]) f[i] = int'($urandom_range(0, 255)) - 128;
      run_block(f, n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
