// axi_burst_master_tb: runs read and write transfers of 0 to 5 bursts
// against a memory slave with random ready/valid delays. Checks burst
// shape and addresses (base + 64 per burst), the read beats handed to the
// block RAM side (index and data), the written bytes under the strobes, the
// WLAST position and a single done pulse per transfer.
module axi_burst_master_tb;
  logic clk = 0, rst_n = 0, start = 0, write = 0;
  logic [31:0] base = '0;
  logic [15:0] nbursts = '0;
  logic busy, done, rd_beat_valid;
  logic [19:0] rd_beat_idx, wr_beat_idx;
  logic [31:0] rd_beat_data, wr_beat_data;
  logic [3:0]  wr_beat_strb;
  logic [31:0] m_araddr, m_awaddr, m_rdata, m_wdata;
  logic [7:0]  m_arlen, m_awlen;
  logic [2:0]  m_arsize, m_awsize;
  logic [1:0]  m_arburst, m_awburst;
  logic        m_arvalid, m_arready = 0, m_rlast = 0, m_rvalid = 0, m_rready;
  logic        m_awvalid, m_awready = 0, m_wlast, m_wvalid, m_wready = 0, m_bvalid = 0, m_bready;
  logic [3:0]  m_wstrb;
  int checks = 0, failures = 0, ndone = 0, exp_addr, nbeats;
  byte unsigned mem [int];
  int rd_addr, rd_left, wr_addr, wr_beat;
  bit rd_act = 0, wr_act = 0, b_pend = 0;

  always #5 clk = ~clk;
  axi_burst_master #(.ADDR_W(32)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // data pattern of a read address, and the beat data the writer supplies
  function automatic logic [31:0] pat(int a);
    return a * 32'h9E37_79B1 + 32'h1234;
  endfunction
  assign wr_beat_data = pat(int'(wr_beat_idx) + 7);
  assign wr_beat_strb = 4'(wr_beat_idx * 5 + 1);

  always @(posedge clk) if (rst_n) begin
    ndone += done;
    if (m_arvalid && m_arready) begin
      check(m_araddr == 32'(exp_addr) && m_arlen == 15 && m_arsize == 2 && m_arburst == 1, "AR");
      exp_addr += 64; rd_addr = int'(m_araddr); rd_left = 16; rd_act = 1;
    end
    m_arready <= !rd_act && !(m_arvalid && m_arready) && ($urandom % 2);
    if (rd_beat_valid) begin
      check(int'(rd_beat_idx) == nbeats && rd_beat_data == pat(int'(base) + 4 * nbeats), "read beat");
      nbeats++;
    end
    if (m_rvalid && m_rready) begin
      rd_addr += 4; rd_left--;
      if (rd_left == 0) rd_act = 0;
    end
    if (rd_act && ($urandom % 3) != 0) begin
      m_rdata <= pat(rd_addr); m_rvalid <= 1; m_rlast <= (rd_left == 1);
    end else begin m_rvalid <= 0; m_rlast <= 0; end
    if (m_awvalid && m_awready) begin
      check(m_awaddr == 32'(exp_addr) && m_awlen == 15 && m_awsize == 2 && m_awburst == 1, "AW");
      exp_addr += 64; wr_addr = int'(m_awaddr); wr_beat = 0; wr_act = 1;
    end
    m_awready <= !wr_act && !b_pend && !(m_awvalid && m_awready) && ($urandom % 2);
    if (m_wvalid && m_wready) begin
      check(m_wlast == (wr_beat == 15), "WLAST");
      for (int b = 0; b < 4; b++) if (m_wstrb[b]) mem[wr_addr + b] = m_wdata[8*b +: 8];
      wr_addr += 4; wr_beat++; nbeats++;
      if (wr_beat == 16) begin wr_act = 0; b_pend = 1; end
    end
    m_wready <= wr_act && ($urandom % 3) != 0;
    if (m_bvalid && m_bready) begin b_pend = 0; m_bvalid <= 0; end
    else if (b_pend && ($urandom % 2)) m_bvalid <= 1;
  end

  task automatic xfer(bit wr, int nb);
    int d0;
    mem.delete();
    base = 32'h0004_0000 + 32'(($urandom % 64) * 64);
    exp_addr = int'(base); nbeats = 0; d0 = ndone;
    @(negedge clk);
    write = wr; nbursts = 16'(nb); start = 1;
    @(negedge clk);
    start = 0;
    while (busy) @(negedge clk);
    repeat (2) @(negedge clk);
    check(ndone - d0 == 1, "one done pulse");
    check(nbeats == 16 * nb, $sformatf("%0d beats for %0d bursts", nbeats, nb));
    check(exp_addr == int'(base) + 64 * nb, "burst count");
    if (wr)
      for (int k = 0; k < 16 * nb; k++) begin
        logic [31:0] w = pat(k + 7);
        logic [3:0] sb = 4'(k * 5 + 1);
        for (int b = 0; b < 4; b++)
          check(sb[b] ? (mem.exists(int'(base) + 4 * k + b) && mem[int'(base) + 4 * k + b] == w[8*b +: 8])
                      : !mem.exists(int'(base) + 4 * k + b), "written byte");
      end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 12; it++) xfer(it % 2, it % 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
