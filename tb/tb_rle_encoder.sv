// tb_rle_encoder -- self-checking testbench for rle_encoder.
//
// Feeds zigzag-ordered blocks of several densities (all zero, DC only, last
// coefficient non-zero, dense, random sparse) and compares every output beat
// with tb_ref_pkg::rle. The sink drops m_tready at random, so the encoder
// must stall; the stream-hold assertion in the RTL checks that the beat does
// not change meanwhile. Also checks m_tlast (only on the end-of-block tuple of
// a block marked last), the blk_tuples count and, with the sink always ready,
// the block period: 66 cycles (64 scan, end-of-block, accept).
module tb_rle_encoder;
  import jpeg_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic        in_valid, in_ready;
  coef_blk_t   in_blk;
  blk_meta_t   in_meta;
  logic [47:0] m_tdata;
  logic        m_tvalid, m_tready, m_tlast;
  logic        blk_done;
  logic [6:0]  blk_tuples;

  rle_encoder dut (.*);

  int checks = 0, failures = 0;
  logic [47:0] expq [$];
  bit          lastq [$];
  int          tupq [$];
  bit          rand_ready = 1'b1;
  int          stalls = 0;

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

  // sink and checker
  always @(posedge clk) if (rst_n) begin
    if (m_tvalid && !m_tready) stalls <= stalls + 1;
    if (m_tvalid && m_tready) begin
      logic [47:0] e;
      bit          l;
      check(expq.size() > 0, "unexpected beat");
      if (expq.size() > 0) begin
        e = expq.pop_front();
        l = lastq.pop_front();
        check(m_tdata == e, $sformatf("beat %h, expected %h", m_tdata, e));
        check(m_tlast == l, $sformatf("tlast %b, expected %b", m_tlast, l));
      end
    end
    if (blk_done) begin
      check(tupq.size() > 0 && blk_tuples == 7'(tupq[0]),
            $sformatf("blk_tuples %0d", blk_tuples));
      if (tupq.size() > 0) void'(tupq.pop_front());
    end
    m_tready <= rand_ready ? 1'($urandom_range(0, 2) != 0) : 1'b1;
  end

  task automatic send(blk_t z, int id, bit last);
    int n0;
    n0 = expq.size();
    rle(z, id, 1, expq);
    for (int i = n0; i < expq.size(); i++) lastq.push_back(last && i == expq.size() - 1);
    tupq.push_back(expq.size() - n0);
    for (int i = 0; i < 64; i++) in_blk[i] = 12'(z[i]);
    in_meta  = '{idx: 24'(id), comp: COMP_CB, last: last};
    in_valid = 1'b1;
    while (!in_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    in_valid = 1'b0;
  endtask

  initial begin
    blk_t z;
    int t0;
    in_valid = 1'b0; in_blk = '0; in_meta = '0; m_tready = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    foreach (z[i]) z[i] = 0;                        send(z, 0, 0);
    foreach (z[i]) z[i] = (i == 0) ? -37 : 0;       send(z, 1, 0);
    foreach (z[i]) z[i] = (i == 63) ? 5 : 0;        send(z, 2, 0);
    foreach (z[i]) z[i] = i - 2048 + 2047 * (i % 2); send(z, 3, 0);
    for (int n = 4; n < 40; n++) begin
      foreach (z[i]) z[i] = ($urandom_range(0, 9) < 2) ? int'($urandom_range(0, 4095)) - 2048 : 0;
      send(z, n, n == 39);
    end
    while (expq.size() > 0) begin @(posedge clk); #1; end
    check(stalls > 0, "output never stalled");
    // timing with the sink always ready
    rand_ready = 1'b0;
    repeat (3) @(posedge clk); #1;
    foreach (z[i]) z[i] = (i % 5 == 0) ? 3 : 0;
    t0 = cyc;
    send(z, 40, 1);
    foreach (z[i]) z[i] = (i % 7 == 0) ? -2 : 0;
    send(z, 41, 1);
    // accept edges 66 cycles apart, measured from the cycle before the first
    check((cyc - t0) == 67, $sformatf("block period %0d cycles", cyc - t0));
    while (expq.size() > 0) begin @(posedge clk); #1; end
    repeat (3) @(posedge clk);
    check(tupq.size() == 0, "blk_done count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
