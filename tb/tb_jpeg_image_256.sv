// tb_jpeg_image_256 -- full-size run of the JPEG accelerator: one 256x256
// image, 1024 blocks of 8x8 pixels, with the accelerator at its defaults.
//
// The picture is generated here: a diagonal colour gradient, a bright disc
// with a hard edge, a striped band and a noisy quarter. A DMA model reads it
// in block order (the order the software is expected to lay the image out
// in) and streams it without gaps; the sink drops ready one cycle in eight.
// Every output tuple is checked against the tb_ref_pkg reference chain, the
// status registers are checked at the end, and the cycle count must stay
// within the DCT-bound rate of 130 cycles per component block plus a fixed
// fill/drain allowance. The run prints the size of the tuple stream against
// the raw image. A second run sends the same number of pure white blocks
// (Y=0xFF, Cb=Cr=0x80) and checks them against hand-worked tuples.
module tb_jpeg_image_256;
  import tb_ref_pkg::*;

  localparam int W = 256, H = 256, NB = (W / 8) * (H / 8);

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

  logic [23:0] img [NB*64];          // block order
  int          n_in = 0, nbeats = 0;
  logic [47:0] expq [$];
  int checks = 0, failures = 0, n_out = 0, stalls = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #40_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_comb pix_tdata = img[n_in];
  always @(posedge clk) if (rstn && pix_tvalid && pix_tready) n_in <= n_in + 1;
  always @(negedge clk) pix_tvalid <= (n_in < nbeats);

  always @(posedge clk) if (rstn) begin
    if (comp_tvalid && !comp_tready) stalls <= stalls + 1;
    if (comp_tvalid && comp_tready) begin
      logic [47:0] e;
      check(expq.size() > 0, "beat beyond the expected stream");
      e = (expq.size() > 0) ? expq.pop_front() : '0;
      check(comp_tdata == e, $sformatf("beat %0d: got %h expected %h", n_out, comp_tdata, e));
      check(comp_tlast == (expq.size() == 0), $sformatf("tlast at beat %0d", n_out));
      n_out <= n_out + 1;
    end
  end
  always @(negedge clk) comp_tready <= ($urandom_range(0, 7) != 0);

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

  // pixel (x, y) of the generated picture as {Cr, Cb, Y}
  function automatic logic [23:0] pixel(int x, int y);
    int yy, cb, cr, dx, dy;
    yy = (x + y) / 2;
    cb = 128 + (x - 128) / 4;
    cr = 128 + (y - 128) / 4;
    dx = x - 96; dy = y - 96;
    if (dx * dx + dy * dy < 40 * 40) begin yy = 235; cb = 100; cr = 180; end
    if (y >= 192 && y < 224) yy = ((x / 4) % 2) ? 200 : 40;
    if (x >= 160 && y >= 160 && y < 192) yy = yy / 2 + int'($urandom_range(0, 100));
    return {8'(cr), 8'(cb), 8'(yy)};
  endfunction

  initial begin
    static int lum [64] = '{16,11,10,16,24,40,51,61, 12,12,14,19,26,58,60,55,
                            14,13,16,24,40,57,69,56, 14,17,22,29,51,87,80,62,
                            18,22,37,56,68,109,103,77, 24,35,55,64,81,104,113,92,
                            49,64,78,87,103,121,120,101, 72,92,95,98,112,100,103,99};
    static int chr [64] = '{17,18,24,47,99,99,99,99, 18,21,26,66,99,99,99,99,
                            24,26,56,99,99,99,99,99, 47,66,99,99,99,99,99,99,
                            99,99,99,99,99,99,99,99, 99,99,99,99,99,99,99,99,
                            99,99,99,99,99,99,99,99, 99,99,99,99,99,99,99,99};
    logic [31:0] d;
    int ntup;
    s_axil_awvalid = 0; s_axil_wvalid = 0; s_axil_bready = 0;
    s_axil_arvalid = 0; s_axil_rready = 0;
    s_axil_awaddr = 0; s_axil_araddr = 0; s_axil_wdata = 0; s_axil_wstrb = 0;
    // image in block order, and the expected stream
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < 64; i++)
        img[b*64+i] = pixel((b % (W/8)) * 8 + i % 8, (b / (W/8)) * 8 + i / 8);
    for (int b = 0; b < NB; b++)
      for (int c = 0; c < 3; c++) begin
        blk_t f, F, z;
        for (int i = 0; i < 64; i++) f[i] = int'(img[b*64+i][8*c +: 8]) - 128;
        F = dct_int(f);
        for (int k = 0; k < 64; k++)
          z[k] = quant(F[ZZ[k]], (c == 0) ? lum[ZZ[k]] : chr[ZZ[k]]);
        rle(z, b, c, expq);
      end
    ntup = expq.size();
    repeat (3) @(posedge clk);
    rstn = 1'b1;
    repeat (2) @(posedge clk); #1;
    wr(12'h008, 32'(NB));
    wr(12'h000, 32'h1);
    nbeats = NB * 64;
    d = 0;
    while (!d[1]) begin
      repeat (500) @(posedge clk);
      #1 rd(12'h004, d);
    end
    check(expq.size() == 0, $sformatf("%0d beats missing", expq.size()));
    check(n_in == NB * 64, "pixels taken");
    rd(12'h00C, d);  check(d == 32'(3 * NB), $sformatf("BLOCKS_OUT %0d", d));
    rd(12'h010, d);  check(d == 32'(ntup), $sformatf("TUPLES_OUT %0d", d));
    rd(12'h014, d);
    check(d <= 32'(3 * NB * 130 + 1000), $sformatf("%0d cycles, over the DCT-bound rate", d));
    $display("%0dx%0d image: %0d blocks, %0d cycles (%0d per block), %0d tuples",
             W, H, NB, d, d / NB, ntup);
    $display("raw %0d bytes, tuples %0d bytes at 6 bytes each, stalls %0d",
             W * H * 3, ntup * 6, stalls);

    // second run: the same 1024 blocks all white ({Cr,Cb,Y} = 8080FF);
    // worked by hand: Y block -> DC 1016/16 = 63.5 -> 64, chroma all zero
    for (int i = 0; i < NB * 64; i++) img[i] = 24'h8080FF;
    for (int b = 0; b < NB; b++) begin
      expq.push_back(tuple(b, 0, 0, 0, 64));  expq.push_back(tuple(b, 0, 1, 63, 0));
      expq.push_back(tuple(b, 1, 0, 0, 0));   expq.push_back(tuple(b, 1, 1, 63, 0));
      expq.push_back(tuple(b, 2, 0, 0, 0));   expq.push_back(tuple(b, 2, 1, 63, 0));
    end
    n_in = 0;
    nbeats = 0;
    wr(12'h000, 32'h1);
    nbeats = NB * 64;
    d = 0;
    while (!d[1]) begin
      repeat (500) @(posedge clk);
      #1 rd(12'h004, d);
    end
    check(expq.size() == 0, $sformatf("white: %0d beats missing", expq.size()));
    rd(12'h010, d);  check(d == 32'(6 * NB), $sformatf("white: TUPLES_OUT %0d", d));
    rd(12'h014, d);
    check(d <= 32'(3 * NB * 130 + 1000), $sformatf("white: %0d cycles", d));
    $display("white %0dx%0d image: %0d cycles", W, H, d);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
