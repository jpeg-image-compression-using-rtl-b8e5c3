// tb_jpeg_accel_top -- end-to-end testbench of the JPEG accelerator.
//
// Plays the processor (AXI4-Lite master) and both DMA channels: a source
// streams the pixel blocks of a generated image with random gaps, and a sink
// takes the run-length tuples with random back-pressure. Every output beat is
// compared with a reference chain built from tb_ref_pkg (fixed-point DCT,
// quantization, zigzag, run-length code), with comp_tlast expected only on
// the image's last beat. Three runs:
//   1. default tables, a mixed image (smooth gradients, edges, noise);
//   2. all-ones tables written over AXI-Lite (dense blocks), noise image;
//   3. a pure white image (Y=0xFF, Cb=Cr=0x80): each Y block must be the
//      tuples (0,64),(EOB,63) and each chroma block (0,0),(EOB,63).
// Each mechanism must occur at least once: input back-pressure, output
// stall, stage overlap (a run takes fewer cycles than DCT + quantizer + RLE
// of every block one after the other), table
// reprogramming, an end-of-block with zero trailing run, and the DONE flag.
module tb_jpeg_accel_top;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rstn = 1'b0;
  always #5 clk = ~clk;

  logic [11:0] s_axil_awaddr, s_axil_araddr;
  logic        s_axil_awvalid, s_axil_awready, s_axil_wvalid, s_axil_wready;
  logic        s_axil_bvalid, s_axil_bready, s_axil_arvalid, s_axil_arready;
  logic        s_axil_rvalid, s_axil_rready;
  logic [31:0] s_axil_wdata, s_axil_rdata;
  logic [3:0]  s_axil_wstrb;
  logic [1:0]  s_axil_bresp, s_axil_rresp;
  logic [23:0] pix_tdata;
  logic        pix_tvalid, pix_tready;
  logic [47:0] comp_tdata;
  logic        comp_tvalid, comp_tready, comp_tlast;

  jpeg_accel_top dut (.*);

  localparam int MAXB = 16;
  logic [23:0] img [MAXB*64];
  int          nbeats = 0;            // beats the source must send
  int          n_in = 0;
  bit          src_gaps = 1'b1;
  logic [47:0] expq [$];
  int          n_beats_out = 0;

  int checks = 0, failures = 0;
  int ev_backpressure = 0, ev_stall = 0, ev_overlap = 0, ev_tables = 0;
  int ev_eob0 = 0, ev_done = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- DMA source (memory to stream) ----------------
  always_comb pix_tdata = img[n_in];
  always @(posedge clk) if (rstn) begin
    if (pix_tvalid && pix_tready) n_in <= n_in + 1;
    if (pix_tvalid && !pix_tready) ev_backpressure <= ev_backpressure + 1;
  end
  always @(negedge clk)
    pix_tvalid <= (n_in < nbeats) && (!src_gaps || $urandom_range(0, 4) != 0);

  // ---------------- DMA sink (stream to memory) ----------------
  always @(posedge clk) if (rstn) begin
    if (comp_tvalid && !comp_tready) ev_stall <= ev_stall + 1;
    if (comp_tvalid && comp_tready) begin
      check(expq.size() > 0, "beat beyond the expected stream");
      if (expq.size() > 0) begin
        logic [47:0] e;
        e = expq.pop_front();
        check(comp_tdata == e, $sformatf("beat %0d: got %h expected %h",
                                         n_beats_out, comp_tdata, e));
        check(comp_tlast == (expq.size() == 0), $sformatf("tlast at beat %0d", n_beats_out));
        if (comp_tdata[20] && comp_tdata[17:12] == 6'd0) ev_eob0 <= ev_eob0 + 1;
      end
      n_beats_out <= n_beats_out + 1;
    end
  end
  always @(negedge clk) comp_tready <= ($urandom_range(0, 3) != 0);

  // ---------------- AXI4-Lite master ----------------
  task automatic wr(logic [11:0] a, logic [31:0] d);
    s_axil_awaddr = a; s_axil_awvalid = 1'b1;
    s_axil_wdata = d; s_axil_wstrb = 4'hF; s_axil_wvalid = 1'b1;
    #1;
    while (!s_axil_awready) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    s_axil_awvalid = 1'b0; s_axil_wvalid = 1'b0;
    s_axil_bready = 1'b1;
    while (!s_axil_bvalid) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    s_axil_bready = 1'b0;
  endtask

  task automatic rd(logic [11:0] a, output logic [31:0] d);
    s_axil_araddr = a; s_axil_arvalid = 1'b1;
    #1;
    while (!s_axil_arready) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    s_axil_arvalid = 1'b0;
    s_axil_rready = 1'b1;
    while (!s_axil_rvalid) begin @(posedge clk); #1; end
    d = s_axil_rdata;
    @(posedge clk); #1;
    s_axil_rready = 1'b0;
  endtask

  // ---------------- reference ----------------
  int qlum [64], qchr [64];

  function automatic void expect_image(int nb);
    for (int b = 0; b < nb; b++)
      for (int c = 0; c < 3; c++) begin
        blk_t f, F, z;
        for (int i = 0; i < 64; i++) f[i] = int'(img[b*64+i][8*c +: 8]) - 128;
        F = dct_int(f);
        for (int k = 0; k < 64; k++)
          z[k] = quant(F[ZZ[k]], (c == 0) ? qlum[ZZ[k]] : qchr[ZZ[k]]);
        rle(z, b, c, expq);
      end
  endfunction

  task automatic run_image(int nb, string name);
    logic [31:0] d;
    int ntup;
    expect_image(nb);
    ntup = expq.size();
    n_in = 0; n_beats_out = 0;
    wr(12'h008, 32'(nb));
    wr(12'h000, 32'h1);
    nbeats = nb * 64;
    d = 0;
    while (!d[1]) begin
      repeat (50) @(posedge clk);
      #1 rd(12'h004, d);
    end
    ev_done++;
    check(expq.size() == 0, $sformatf("%s: %0d beats missing", name, expq.size()));
    check(n_in == nb * 64, $sformatf("%s: %0d pixels taken", name, n_in));
    rd(12'h00C, d);  check(d == 32'(3 * nb), $sformatf("%s: BLOCKS_OUT %0d", name, d));
    rd(12'h010, d);  check(d == 32'(ntup), $sformatf("%s: TUPLES_OUT %0d", name, d));
    rd(12'h014, d);
    $display("%s: %0d pixel blocks, %0d tuples, %0d cycles", name, nb, ntup, d);
    // without overlap every component block would cost at least
    // 128 (DCT) + 64 (quantizer) + 65 (RLE) cycles one after the other
    if (d < 32'(3 * nb * (128 + 64 + 65))) ev_overlap++;
    nbeats = 0;
  endtask

  initial begin
    static int lum [64] = '{16,11,10,16,24,40,51,61, 12,12,14,19,26,58,60,55,
                            14,13,16,24,40,57,69,56, 14,17,22,29,51,87,80,62,
                            18,22,37,56,68,109,103,77, 24,35,55,64,81,104,113,92,
                            49,64,78,87,103,121,120,101, 72,92,95,98,112,100,103,99};
    static int chr [64] = '{17,18,24,47,99,99,99,99, 18,21,26,66,99,99,99,99,
                            24,26,56,99,99,99,99,99, 47,66,99,99,99,99,99,99,
                            99,99,99,99,99,99,99,99, 99,99,99,99,99,99,99,99,
                            99,99,99,99,99,99,99,99, 99,99,99,99,99,99,99,99};
    s_axil_awvalid = 0; s_axil_wvalid = 0; s_axil_bready = 0;
    s_axil_arvalid = 0; s_axil_rready = 0;
    s_axil_awaddr = 0; s_axil_araddr = 0; s_axil_wdata = 0; s_axil_wstrb = 0;
    foreach (qlum[i]) begin
      qlum[i] = lum[i];
      qchr[i] = chr[i];
    end
    repeat (3) @(posedge clk);
    rstn = 1'b1;
    repeat (2) @(posedge clk); #1;

    // 1: mixed image, default tables
    for (int b = 0; b < 8; b++)
      for (int i = 0; i < 64; i++) begin
        int y = i / 8, x = i % 8;
        case (b % 4)
          0: img[b*64+i] = {8'(128 + 4*x), 8'(120 - 3*y), 8'(16*x + 8*y)};
          1: img[b*64+i] = {8'(x < 4 ? 40 : 200), 8'(128), 8'(y < 4 ? 30 : 220)};
          2: img[b*64+i] = 24'($urandom);
          default: img[b*64+i] = {8'(128 + $urandom_range(0, 8)), 8'(128),
                                  8'(100 + 10*y + $urandom_range(0, 20))};
        endcase
      end
    run_image(8, "mixed");

    // 2: all-ones tables, noise
    foreach (qlum[i]) begin
      qlum[i] = 1; qchr[i] = 1;
      wr(12'h100 + 12'(4*i), 32'd1);
      wr(12'h200 + 12'(4*i), 32'd1);
    end
    ev_tables++;
    for (int i = 0; i < 4*64; i++) img[i] = 24'($urandom);
    src_gaps = 1'b0;
    run_image(4, "unit tables");

    // 3: white image, standard tables again
    foreach (qlum[i]) begin
      qlum[i] = lum[i];
      qchr[i] = chr[i];
      wr(12'h100 + 12'(4*i), 32'(lum[i]));
      wr(12'h200 + 12'(4*i), 32'(chr[i]));
    end
    for (int i = 0; i < 3*64; i++) img[i] = 24'h8080FF;
    begin
      logic [47:0] lit [$];
      for (int b = 0; b < 3; b++) begin
        lit.push_back(tuple(b, 0, 0, 0, 64));  lit.push_back(tuple(b, 0, 1, 63, 0));
        lit.push_back(tuple(b, 1, 0, 0, 0));   lit.push_back(tuple(b, 1, 1, 63, 0));
        lit.push_back(tuple(b, 2, 0, 0, 0));   lit.push_back(tuple(b, 2, 1, 63, 0));
      end
      expect_image(3);
      check(expq == lit, "reference chain disagrees with the hand-worked white blocks");
      expq.delete();
    end
    run_image(3, "white");

    $display("events: backpressure=%0d stall=%0d overlap=%0d tables=%0d eob0=%0d done=%0d",
             ev_backpressure, ev_stall, ev_overlap, ev_tables, ev_eob0, ev_done);
    check(ev_backpressure > 0, "input back-pressure never happened");
    check(ev_stall > 0, "output stall never happened");
    check(ev_overlap == 3, "pipeline stages did not overlap in every run");
    check(ev_tables > 0, "tables never reprogrammed");
    check(ev_eob0 > 0, "no end-of-block with zero trailing run");
    check(ev_done == 3, "DONE not seen for every run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
