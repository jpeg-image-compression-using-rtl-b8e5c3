// tb_quantizer -- self-checking testbench for quantizer.
//
// Random coefficient blocks (including +-1024 and values on the rounding
// halfway points) are quantized with the standard tables and with random
// tables; Y blocks must use the luminance table and Cb/Cr blocks the
// chrominance table. Results are compared with tb_ref_pkg::quant. The
// accept-to-valid latency must be 64 cycles.
module tb_quantizer;
  import jpeg_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  qtab_t      qtab_luma, qtab_chroma;
  logic       in_valid, in_ready, out_valid, out_ready;
  coef_blk_t  in_blk, out_blk;
  blk_meta_t  in_meta, out_meta;

  quantizer dut (.*);

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

  task automatic run_block(blk_t c, comp_e comp, int id);
    int lat, q;
    for (int i = 0; i < 64; i++) in_blk[i] = 12'(c[i]);
    in_meta  = '{idx: 24'(id), comp: comp, last: 1'b0};
    in_valid = 1'b1;
    do @(posedge clk); while (!in_ready);
    #1 in_valid = 1'b0;
    lat = 0;
    while (!out_valid) begin
      @(posedge clk); #1;
      lat++;
    end
    check(lat == 64, $sformatf("block %0d latency %0d, expected 64", id, lat));
    for (int i = 0; i < 64; i++) begin
      q = (comp == COMP_Y) ? int'(qtab_luma[i]) : int'(qtab_chroma[i]);
      check($signed(out_blk[i]) == quant(c[i], q),
            $sformatf("block %0d coef %0d: %0d / %0d got %0d ref %0d", id, i,
                      c[i], q, $signed(out_blk[i]), quant(c[i], q)));
    end
    check(out_meta.idx == 24'(id) && out_meta.comp == comp, "metadata not carried");
    out_ready = 1'b1;
    @(posedge clk); #1;
    out_ready = 1'b0;
  endtask

  initial begin
    blk_t c;
    int   lum [64] = '{16,11,10,16,24,40,51,61, 12,12,14,19,26,58,60,55,
                       14,13,16,24,40,57,69,56, 14,17,22,29,51,87,80,62,
                       18,22,37,56,68,109,103,77, 24,35,55,64,81,104,113,92,
                       49,64,78,87,103,121,120,101, 72,92,95,98,112,100,103,99};
    in_valid = 1'b0; out_ready = 1'b0; in_blk = '0; in_meta = '0;
    foreach (lum[i]) begin
      qtab_luma[i]   = 8'(lum[i]);
      qtab_chroma[i] = (i < 4) ? 8'(17 + i) : 8'd99;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    // halfway points: +-(k*q + q/2) and extremes
    foreach (c[i]) c[i] = (i % 2 ? -1 : 1) * (3 * lum[i] + lum[i] / 2);
    run_block(c, COMP_Y, 0);
    foreach (c[i]) c[i] = (i % 2) ? 1024 : -1024;
    run_block(c, COMP_Y, 1);
    run_block(c, COMP_CR, 2);
    for (int n = 3; n < 23; n++) begin
      foreach (c[i]) c[i] = int'($urandom_range(0, 2047)) - 1024;
      run_block(c, (n % 3 == 0) ? COMP_Y : ((n % 3 == 1) ? COMP_CB : COMP_CR), n);
    end
    // random tables, including 1 and 255
    foreach (lum[i]) begin
      qtab_luma[i]   = (i == 0) ? 8'd1 : 8'($urandom_range(1, 255));
      qtab_chroma[i] = (i == 0) ? 8'd255 : 8'($urandom_range(1, 255));
    end
    for (int n = 23; n < 33; n++) begin
      foreach (c[i]) c[i] = int'($urandom_range(0, 2047)) - 1024;
      run_block(c, (n % 2) ? COMP_Y : COMP_CB, n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
