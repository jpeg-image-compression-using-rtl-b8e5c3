// tb_ref_pkg -- reference models for the JPEG accelerator testbenches.
//
// Written independently of the RTL: the DCT basis is computed here with $cos,
// the zigzag order is the literal sequence from the JPEG standard, and the
// quantizer and run-length coder are plain loops. dct_int reproduces the
// accelerator's documented fixed-point arithmetic (basis scaled by 2^12 and
// rounded, row pass rounded to 3 fraction bits, column pass rounded to an
// integer, half-up); dct_real is the exact transform for tolerance checks.
package tb_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  localparam int ZZ [64] = '{
     0,  1,  8, 16,  9,  2,  3, 10, 17, 24, 32, 25, 18, 11,  4,  5,
    12, 19, 26, 33, 40, 48, 41, 34, 27, 20, 13,  6,  7, 14, 21, 28,
    35, 42, 49, 56, 57, 50, 43, 36, 29, 22, 15, 23, 30, 37, 44, 51,
    58, 59, 52, 45, 38, 31, 39, 46, 53, 60, 61, 54, 47, 55, 62, 63
  };

  typedef int blk_t [64];

  function automatic real cu(int u);
    return (u == 0) ? 1.0 / $sqrt(2.0) : 1.0;
  endfunction

  function automatic int basis(int u, int x);
    real a;
    a = 4096.0 * cu(u) / 2.0 * $cos(real'((2 * x + 1) * u) * PI / 16.0);
    return int'($floor(a + 0.5));
  endfunction

  // f: level-shifted samples, row-major
  function automatic blk_t dct_int(blk_t f);
    blk_t t, r;
    for (int y = 0; y < 8; y++)
      for (int u = 0; u < 8; u++) begin
        longint s = 0;
        for (int x = 0; x < 8; x++) s += longint'(basis(u, x)) * f[y*8+x];
        t[y*8+u] = int'((s + 256) >>> 9);
      end
    for (int v = 0; v < 8; v++)
      for (int u = 0; u < 8; u++) begin
        longint s = 0;
        for (int y = 0; y < 8; y++) s += longint'(basis(v, y)) * t[y*8+u];
        r[v*8+u] = int'((s + 16384) >>> 15);
      end
    return r;
  endfunction

  function automatic real dct_real(blk_t f, int v, int u);
    real s = 0.0;
    for (int y = 0; y < 8; y++)
      for (int x = 0; x < 8; x++)
        s += f[y*8+x] * $cos(real'((2*x+1)*u) * PI / 16.0)
                      * $cos(real'((2*y+1)*v) * PI / 16.0);
    return 0.25 * cu(u) * cu(v) * s;
  endfunction

  function automatic int quant(int c, int q);
    int m;
    if (q == 0) q = 1;
    m = (c < 0) ? -c : c;
    m = (m + q / 2) / q;
    return (c < 0) ? -m : m;
  endfunction

  // 48-bit tuple: {blk[23:0], 3'b0, eob, comp[1:0], run[5:0], value[11:0]}
  function automatic logic [47:0] tuple(int blk, int comp, bit eob, int run, int val);
    return {24'(blk), 3'b000, eob, 2'(comp), 6'(run), 12'(val)};
  endfunction

  // Run-length code of a block given in zigzag order; appends to q.
  function automatic void rle(blk_t z, int blk, int comp, ref logic [47:0] q[$]);
    int run = 0;
    q.push_back(tuple(blk, comp, 1'b0, 0, z[0]));
    for (int k = 1; k < 64; k++) begin
      if (z[k] != 0) begin
        q.push_back(tuple(blk, comp, 1'b0, run, z[k]));
        run = 0;
      end else run++;
    end
    q.push_back(tuple(blk, comp, 1'b1, run, 0));
  endfunction

endpackage
