// jp2k_ip_core_tb: end-to-end test of the compression IP core.
//
// Two harnesses run side by side: one with the core's default parameters
// (32 x 32 block, 9 magnitude planes, 2-byte samples) and one with 1-byte
// samples and 7 magnitude planes, where dense random blocks code to more
// bytes than the original and the raw fallback must be taken. Every
// mechanism of the design has to occur at least once: the three coding
// passes, run mode, controller pauses, CX/D FIFO full, LPS, MPS switch,
// carry, bit stuffing, coded and raw blocks, single and multi-burst writes.
module jp2k_ip_core_tb;
  logic clk = 0, rst_n = 0;
  logic fin_a, fin_b;
  int checks, failures;
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
  logic        b_reg_wr, b_irq;
  logic [2:0]  b_reg_addr;
  logic [31:0] b_reg_wdata, b_reg_rdata;
  logic [31:0] b_araddr, b_awaddr, b_rdata, b_wdata;
  logic [7:0]  b_arlen, b_awlen;
  logic [2:0]  b_arsize, b_awsize;
  logic [1:0]  b_arburst, b_awburst;
  logic        b_arvalid, b_arready, b_rlast, b_rvalid, b_rready;
  logic        b_awvalid, b_awready, b_wlast, b_wvalid, b_wready, b_bvalid, b_bready;
  logic [3:0]  b_wstrb;
  jp2k_ip_core dut_a (
    .clk(clk), .rst_n(rst_n), .reg_wr(a_reg_wr), .reg_addr(a_reg_addr), .reg_wdata(a_reg_wdata),
    .reg_rdata(a_reg_rdata), .irq(a_irq),
    .m_araddr(a_araddr), .m_arlen(a_arlen), .m_arsize(a_arsize), .m_arburst(a_arburst),
    .m_arvalid(a_arvalid), .m_arready(a_arready), .m_rdata(a_rdata), .m_rlast(a_rlast),
    .m_rvalid(a_rvalid), .m_rready(a_rready),
    .m_awaddr(a_awaddr), .m_awlen(a_awlen), .m_awsize(a_awsize), .m_awburst(a_awburst),
    .m_awvalid(a_awvalid), .m_awready(a_awready), .m_wdata(a_wdata), .m_wstrb(a_wstrb),
    .m_wlast(a_wlast), .m_wvalid(a_wvalid), .m_wready(a_wready), .m_bvalid(a_bvalid), .m_bready(a_bready));
  jp2k_ip_core #(.W(32), .H(32), .NBP(7), .SAMPLE_BYTES(1)) dut_b (
    .clk(clk), .rst_n(rst_n), .reg_wr(b_reg_wr), .reg_addr(b_reg_addr), .reg_wdata(b_reg_wdata),
    .reg_rdata(b_reg_rdata), .irq(b_irq),
    .m_araddr(b_araddr), .m_arlen(b_arlen), .m_arsize(b_arsize), .m_arburst(b_arburst),
    .m_arvalid(b_arvalid), .m_arready(b_arready), .m_rdata(b_rdata), .m_rlast(b_rlast),
    .m_rvalid(b_rvalid), .m_rready(b_rready),
    .m_awaddr(b_awaddr), .m_awlen(b_awlen), .m_awsize(b_awsize), .m_awburst(b_awburst),
    .m_awvalid(b_awvalid), .m_awready(b_awready), .m_wdata(b_wdata), .m_wstrb(b_wstrb),
    .m_wlast(b_wlast), .m_wvalid(b_wvalid), .m_wready(b_wready), .m_bvalid(b_bvalid), .m_bready(b_bready));
  ip_core_harness #(.NBLK(4)) ha (
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
  ip_core_harness #(.W(32), .H(32), .NBP(7), .SB(1), .NBLK(3)) hb (
    .clk(clk), .rst_n(rst_n), .reg_wr(b_reg_wr), .reg_addr(b_reg_addr), .reg_wdata(b_reg_wdata),
    .reg_rdata(b_reg_rdata), .irq(b_irq),
    .m_araddr(b_araddr), .m_arlen(b_arlen), .m_arsize(b_arsize), .m_arburst(b_arburst),
    .m_arvalid(b_arvalid), .m_arready(b_arready), .m_rdata(b_rdata), .m_rlast(b_rlast),
    .m_rvalid(b_rvalid), .m_rready(b_rready),
    .m_awaddr(b_awaddr), .m_awlen(b_awlen), .m_awsize(b_awsize), .m_awburst(b_awburst),
    .m_awvalid(b_awvalid), .m_awready(b_awready), .m_wdata(b_wdata), .m_wstrb(b_wstrb),
    .m_wlast(b_wlast), .m_wvalid(b_wvalid), .m_wready(b_wready), .m_bvalid(b_bvalid), .m_bready(b_bready),
    .finished(fin_b),
    .ev_stall(dut_b.u_t1.ev_stall), .ev_run(dut_b.u_t1.ev_run), .ev_lps(dut_b.u_t1.ev_lps),
    .ev_switch(dut_b.u_t1.ev_switch), .ev_carry(dut_b.u_t1.ev_carry), .ev_stuff(dut_b.u_t1.ev_stuff),
    .cxd_full(dut_b.u_t1.cxd_full), .col_acc(dut_b.u_t1.st_wr && dut_b.u_t1.res.npairs != 0),
    .pass(dut_b.u_t1.pass));

  task automatic need(int n, string what);
    checks++;
    if (n == 0) begin failures++; $display("FAIL: %s never happened", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (fin_a && fin_b);
    checks = ha.checks + hb.checks;
    failures = ha.failures + hb.failures;
    $display("events: spp=%0d mrp=%0d cup=%0d run=%0d stall=%0d cxd_full=%0d lps=%0d switch=%0d carry=%0d stuff=%0d coded=%0d raw=%0d multi_burst=%0d",
             ha.n_spp + hb.n_spp, ha.n_mrp + hb.n_mrp, ha.n_cup + hb.n_cup, ha.n_run + hb.n_run,
             ha.n_stall + hb.n_stall, ha.n_cxdfull + hb.n_cxdfull, ha.n_lps + hb.n_lps,
             ha.n_switch + hb.n_switch, ha.n_carry + hb.n_carry, ha.n_stuff + hb.n_stuff,
             ha.n_coded + hb.n_coded, ha.n_raw + hb.n_raw, ha.n_multi_burst + hb.n_multi_burst);
    need(ha.n_spp + hb.n_spp, "SPP");
    need(ha.n_mrp + hb.n_mrp, "MRP");
    need(ha.n_cup + hb.n_cup, "CUP");
    need(ha.n_run + hb.n_run, "run mode");
    need(ha.n_stall + hb.n_stall, "controller pause");
    need(ha.n_cxdfull + hb.n_cxdfull, "CX/D FIFO full");
    need(ha.n_lps + hb.n_lps, "LPS");
    need(ha.n_switch + hb.n_switch, "MPS switch");
    need(ha.n_carry + hb.n_carry, "carry");
    need(ha.n_stuff + hb.n_stuff, "bit stuffing");
    need(ha.n_coded + hb.n_coded, "coded block");
    need(hb.n_raw, "raw fallback");
    need(ha.n_multi_burst + hb.n_multi_burst, "multi-burst write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", ha.checks + hb.checks, ha.failures + hb.failures + 1);
    $finish;
  end
endmodule
