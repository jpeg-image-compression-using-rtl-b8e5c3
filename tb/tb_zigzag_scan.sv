// tb_zigzag_scan -- self-checking testbench for zigzag_scan.
//
// Streams random blocks through the stage with random gaps on the input and
// random back-pressure on the output. Every output block must equal its input
// reordered by the standard zigzag sequence (tb_ref_pkg::ZZ), in order, with
// its metadata. Also checks that one block per cycle passes when the output
// is always ready.
module tb_zigzag_scan;
  import jpeg_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic       in_valid, in_ready, out_valid, out_ready;
  coef_blk_t  in_blk, out_blk;
  blk_meta_t  in_meta, out_meta;

  zigzag_scan dut (.*);

  int checks = 0, failures = 0;
  localparam int NBLK = 60;
  coef_blk_t sent [NBLK];
  int n_out = 0;
  bit stall_mode = 1'b1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #200_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sink
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      for (int k = 0; k < 64; k++)
        check(out_blk[k] == sent[n_out][ZZ[k]],
              $sformatf("block %0d position %0d", n_out, k));
      check(out_meta.idx == 24'(n_out), $sformatf("block %0d metadata", n_out));
      n_out <= n_out + 1;
    end
    out_ready <= stall_mode ? 1'($urandom_range(0, 1)) : 1'b1;
  end

  initial begin
    int t0;
    in_valid = 1'b0; out_ready = 1'b0; in_blk = '0; in_meta = '0;
    foreach (sent[n]) foreach (sent[n][i]) sent[n][i] = 12'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    // every iteration starts 1 ns after a clock edge
    for (int n = 0; n < NBLK; n++) begin
      if (n == NBLK / 2) begin
        stall_mode = 1'b0;
        while (n_out != n) begin @(posedge clk); #1; end
        t0 = cyc;
      end
      while (n < NBLK / 2 && $urandom_range(0, 1)) begin @(posedge clk); #1; end
      in_valid = 1'b1;
      in_blk   = sent[n];
      in_meta  = '{idx: 24'(n), comp: COMP_Y, last: 1'b0};
      while (!in_ready) begin @(posedge clk); #1; end
      @(posedge clk); #1;               // taken at this edge
      in_valid = 1'b0;
    end
    // the second half went through back to back
    check((cyc - t0) == NBLK / 2, $sformatf("no 1 block/cycle: %0d cycles", cyc - t0));
    wait (n_out == NBLK);
    check(n_out == NBLK, "blocks lost");
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
