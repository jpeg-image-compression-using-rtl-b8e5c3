// tb_axil_regs -- self-checking testbench for axil_regs.
//
// An AXI4-Lite master task pair writes and reads the registers, with address
// and data phases presented in different cycles and random response delays.
// Checks: standard table reset values, table write/read-back and the table
// outputs, NUM_BLOCKS byte strobes, the START pulse and BUSY/DONE flags, the
// event counters, the cycle counter, and that START is ignored while busy.
module tb_axil_regs;
  import jpeg_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [11:0] s_awaddr, s_araddr;
  logic        s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic        s_arvalid, s_arready, s_rvalid, s_rready;
  logic [31:0] s_wdata, s_rdata;
  logic [3:0]  s_wstrb;
  logic [1:0]  s_bresp, s_rresp;
  logic        start;
  logic [23:0] num_blocks;
  qtab_t       qtab_luma, qtab_chroma;
  logic        blk_done, tuple_sent, run_done;
  logic [6:0]  blk_tuples;

  axil_regs dut (.*);

  int checks = 0, failures = 0, starts = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (start) starts <= starts + 1;

  task automatic wr(logic [11:0] a, logic [31:0] d, logic [3:0] strb = 4'hF);
    s_awaddr = a; s_awvalid = 1'b1;
    @(posedge clk); #1;                 // data one cycle after address
    s_wdata = d; s_wstrb = strb; s_wvalid = 1'b1;
    #1;                                 // let the ready settle
    while (!(s_awready && s_wready)) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    s_awvalid = 1'b0; s_wvalid = 1'b0;
    repeat ($urandom_range(0, 2)) begin
      @(posedge clk); #1;
      check(s_bvalid, "bvalid dropped before bready");
    end
    s_bready = 1'b1;
    while (!s_bvalid) begin @(posedge clk); #1; end
    check(s_bresp == 2'b00, "bresp");
    @(posedge clk); #1;
    s_bready = 1'b0;
  endtask

  task automatic rd(logic [11:0] a, output logic [31:0] d);
    s_araddr = a; s_arvalid = 1'b1;
    #1;
    while (!s_arready) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    s_arvalid = 1'b0;
    repeat ($urandom_range(0, 2)) begin @(posedge clk); #1; end
    s_rready = 1'b1;
    while (!s_rvalid) begin @(posedge clk); #1; end
    d = s_rdata;
    check(s_rresp == 2'b00, "rresp");
    @(posedge clk); #1;
    s_rready = 1'b0;
  endtask

  initial begin
    logic [31:0] d;
    static int lum [64] = '{16,11,10,16,24,40,51,61, 12,12,14,19,26,58,60,55,
                     14,13,16,24,40,57,69,56, 14,17,22,29,51,87,80,62,
                     18,22,37,56,68,109,103,77, 24,35,55,64,81,104,113,92,
                     49,64,78,87,103,121,120,101, 72,92,95,98,112,100,103,99};
    static int chr_row0 [4] = '{17, 18, 24, 47};
    s_awvalid = 0; s_wvalid = 0; s_bready = 0; s_arvalid = 0; s_rready = 0;
    s_awaddr = 0; s_araddr = 0; s_wdata = 0; s_wstrb = 0;
    blk_done = 0; tuple_sent = 0; run_done = 0; blk_tuples = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    // reset values of the tables
    for (int i = 0; i < 64; i++) begin
      rd(12'h100 + 12'(4*i), d);
      check(d == 32'(lum[i]), $sformatf("luma[%0d] reset %0d", i, d));
      check(qtab_luma[i] == 8'(lum[i]), "luma output");
    end
    for (int i = 0; i < 64; i++) begin
      rd(12'h200 + 12'(4*i), d);
      check(d == ((i < 4) ? 32'(chr_row0[i]) : (i == 8) ? 32'd18 : (i >= 32) ? 32'd99 : d),
            $sformatf("chroma[%0d] reset %0d", i, d));
    end
    // table writes
    for (int i = 0; i < 64; i += 9) begin
      wr(12'h100 + 12'(4*i), 32'(i + 1));
      wr(12'h200 + 12'(4*i), 32'(200 - i));
    end
    for (int i = 0; i < 64; i += 9) begin
      rd(12'h100 + 12'(4*i), d);  check(d == 32'(i + 1), "luma write");
      rd(12'h200 + 12'(4*i), d);  check(d == 32'(200 - i), "chroma write");
      check(qtab_luma[i] == 8'(i + 1) && qtab_chroma[i] == 8'(200 - i), "table outputs");
    end
    // NUM_BLOCKS with strobes
    wr(12'h008, 32'h00ABCDEF);
    rd(12'h008, d);  check(d == 32'h00ABCDEF, "num_blocks");
    wr(12'h008, 32'h00000400, 4'b0011);
    rd(12'h008, d);  check(d == 32'h00AB0400, $sformatf("num_blocks strobe %h", d));
    check(num_blocks == 24'hAB0400, "num_blocks output");
    wr(12'h008, 32'h00000400);
    // start
    rd(12'h004, d);  check(d == 32'h0, "status idle");
    wr(12'h000, 32'h1);
    check(starts == 1, "one start pulse");
    rd(12'h004, d);  check(d == 32'h1, "status busy");
    wr(12'h000, 32'h1);                 // ignored while busy
    check(starts == 1, "start while busy ignored");
    // pipeline events
    for (int i = 0; i < 5; i++) begin
      blk_done = 1; blk_tuples = 7'(10 + i); tuple_sent = 1; @(posedge clk); #1;
      blk_done = 0; tuple_sent = (i % 2 == 0); @(posedge clk); #1;
    end
    tuple_sent = 0;
    rd(12'h00C, d);  check(d == 5, $sformatf("blocks_out %0d", d));
    rd(12'h010, d);  check(d == 8, $sformatf("tuples_out %0d", d));
    rd(12'h018, d);  check(d == 14, $sformatf("blk_tuples %0d", d));
    run_done = 1; @(posedge clk); #1; run_done = 0;
    rd(12'h004, d);  check(d == 32'h2, "status done");
    rd(12'h014, d);  check(d > 20 && d < 200, $sformatf("cycles %0d", d));
    begin
      logic [31:0] d2;
      repeat (10) @(posedge clk); #1;
      rd(12'h014, d2); check(d2 == d, "cycle counter stops at done");
    end
    // restart clears
    wr(12'h000, 32'h1);
    check(starts == 2, "second start");
    rd(12'h00C, d);  check(d == 0, "blocks_out cleared");
    rd(12'h004, d);  check(d == 32'h1, "done cleared by start");
    rd(12'h3F0, d);  check(d == 0, "unmapped reads 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
