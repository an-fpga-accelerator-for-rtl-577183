// jp2k_workload_tb: the compression IP core at its default parameters on
// image-like data. The harness tiles code blocks from a synthetic
// 1920 x 1080 wavelet-transformed band (all four subbands, ending with the
// partial bottom-right block, whose rows past the image edge are zero),
// checks every block against the reference models as in the other core
// tests, and measures the cycles from start to interrupt. The testbench
// turns them into cycles per sample, samples per second at a 320 MHz clock,
// the time for a whole band and the number of coder instances a sensor
// delivering 30 to 72 Msample/s would need, and checks that the cost per
// sample stays in the documented range and that such data compresses.
module jp2k_workload_tb;
  localparam int NBLK = 8;
  localparam real F_MHZ = 320.0;   // clock the throughput is quoted at
  logic clk = 0, rst_n = 0;
  int extra_checks = 0, extra_fail = 0;

  task automatic xcheck(bit ok, string what);
    extra_checks++;
    if (!ok) begin extra_fail++; $display("FAIL: %s", what); end
  endtask

  // throughput of one coder instance on the image-like blocks, the time for
  // a whole 1920 x 1080 band (60 x 34 code blocks of 32 x 32) and the number
  // of instances a 30 or 72 Msample/s sensor would need
  task automatic report();
    real cps, msps, band_ms;
    int blocks;
    cps = real'(ha.cyc_total) / real'(ha.samp_total);
    msps = F_MHZ / cps;
    blocks = ((1920 + 31) / 32) * ((1080 + 31) / 32);
    band_ms = real'(blocks) * 1024.0 * cps / (F_MHZ * 1000.0);
    $display("workload: %0d blocks, %0d cycles, %.2f cycles/sample, worst block %0d cycles",
             NBLK, ha.cyc_total, cps, ha.cyc_max);
    $display("workload: %.2f Msample/s per coder at %.0f MHz; 1920x1080 band (%0d blocks) in %.1f ms",
             msps, F_MHZ, blocks, band_ms);
    $display("workload: coders needed for 30 Msample/s: %0d, for 72 Msample/s: %0d",
             int'($ceil(30.0 / msps)), int'($ceil(72.0 / msps)));
    xcheck(ha.samp_total == longint'(NBLK) * 1024, "all blocks coded");
    // every block of the band must fit the 16-bit payload field and the
    // fixed block RAM; the per-sample cost must stay near the one pair per
    // cycle rate of the MQ coder (about 9 cycles per sample on such data)
    xcheck(ha.cyc_max < 64 * 1024, "block time");
    xcheck(cps > 2.0 && cps < 12.0, $sformatf("cycles per sample %.2f", cps));
    xcheck(ha.n_coded == NBLK, "image-like blocks compress (no raw fallback)");
  endtask
  logic fin_a;
  always #5 clk = ~clk;

  logic        a_reg_wr, a_irq;
  logic [2:0]  a_reg_addr;
  logic [31:0] a_reg_wdata, a_reg_rdata;
  logic [31:0] a_araddr, a_awaddr, a_rdata, a_wdata;
  logic [7:0]  a_arlen, a_awlen;
  logic [2:0]  a_arsize, a_awsize;
  logic [1:0]  a_arburst, a_awburst;
  logic        a_arvalid, a_arready, a_rlast, a_rvalid, a_rready;
  logic        a_awvalid, a_awready, a_wlast, a_wvalid, a_wready, a_bvalid, a_bready;
  logic [3:0]  a_wstrb;
  jp2k_ip_core dut_a (
    .clk(clk), .rst_n(rst_n), .reg_wr(a_reg_wr), .reg_addr(a_reg_addr), .reg_wdata(a_reg_wdata),
    .reg_rdata(a_reg_rdata), .irq(a_irq),
    .m_araddr(a_araddr), .m_arlen(a_arlen), .m_arsize(a_arsize), .m_arburst(a_arburst),
    .m_arvalid(a_arvalid), .m_arready(a_arready), .m_rdata(a_rdata), .m_rlast(a_rlast),
    .m_rvalid(a_rvalid), .m_rready(a_rready),
    .m_awaddr(a_awaddr), .m_awlen(a_awlen), .m_awsize(a_awsize), .m_awburst(a_awburst),
    .m_awvalid(a_awvalid), .m_awready(a_awready), .m_wdata(a_wdata), .m_wstrb(a_wstrb),
    .m_wlast(a_wlast), .m_wvalid(a_wvalid), .m_wready(a_wready), .m_bvalid(a_bvalid), .m_bready(a_bready));
  ip_core_harness #(.NBLK(NBLK), .WORKLOAD(1)) ha (
    .clk(clk), .rst_n(rst_n), .reg_wr(a_reg_wr), .reg_addr(a_reg_addr), .reg_wdata(a_reg_wdata),
    .reg_rdata(a_reg_rdata), .irq(a_irq),
    .m_araddr(a_araddr), .m_arlen(a_arlen), .m_arsize(a_arsize), .m_arburst(a_arburst),
    .m_arvalid(a_arvalid), .m_arready(a_arready), .m_rdata(a_rdata), .m_rlast(a_rlast),
    .m_rvalid(a_rvalid), .m_rready(a_rready),
    .m_awaddr(a_awaddr), .m_awlen(a_awlen), .m_awsize(a_awsize), .m_awburst(a_awburst),
    .m_awvalid(a_awvalid), .m_awready(a_awready), .m_wdata(a_wdata), .m_wstrb(a_wstrb),
    .m_wlast(a_wlast), .m_wvalid(a_wvalid), .m_wready(a_wready), .m_bvalid(a_bvalid), .m_bready(a_bready),
    .finished(fin_a),
    .ev_stall(dut_a.u_t1.ev_stall), .ev_run(dut_a.u_t1.ev_run), .ev_lps(dut_a.u_t1.ev_lps),
    .ev_switch(dut_a.u_t1.ev_switch), .ev_carry(dut_a.u_t1.ev_carry), .ev_stuff(dut_a.u_t1.ev_stuff),
    .cxd_full(dut_a.u_t1.cxd_full), .col_acc(dut_a.u_t1.st_wr && dut_a.u_t1.res.npairs != 0),
    .pass(dut_a.u_t1.pass));

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (fin_a);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", ha.checks + extra_checks, ha.failures + extra_fail);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", ha.checks, ha.failures + 1);
    $finish;
  end
endmodule
