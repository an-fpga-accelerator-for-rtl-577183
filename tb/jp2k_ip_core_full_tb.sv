// jp2k_ip_core_full_tb: the compression IP core at its default parameters
// (32 x 32 code block, 9 magnitude bit planes, 2-byte samples), with no
// parameter overridden: four code blocks of different statistics and
// subbands go from DDR through the tier-1 coder back to DDR and are
// compared with the reference models (see ip_core_harness).
module jp2k_ip_core_full_tb;
  logic clk = 0, rst_n = 0;
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

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (fin_a);
    $display("TB_RESULT checks=%0d failures=%0d", ha.checks, ha.failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", ha.checks, ha.failures + 1);
    $finish;
  end
endmodule
