// ip_core_harness: test harness for jp2k_ip_core.
//
// Holds one IP core, a behavioural AXI4 DDR slave with random ready and
// valid delays, and a CPU-like driver. For each of NBLK code blocks it
// writes a random original block into the DDR model, programs the
// registers, waits for the interrupt and then reads back the header and
// payload the core wrote. The expected header, raw flag and payload come
// from the reference models of t1_ref_pkg (or the original bytes when the
// coded stream is larger than the block). It also checks the AXI burst
// shape (16 beats of 4 bytes, WLAST on beat 16), the number of read and
// write bursts for the block size, that no byte past the payload is
// written, and counts the coder's mechanisms from the monitor inputs. The
// core itself is instantiated by the testbench and connected to the ports.
module ip_core_harness
  import jp2k_pkg::*;
  import t1_ref_pkg::*;
#(
  parameter int W = 32,
  parameter int H = 32,
  parameter int NBP = 9,
  parameter int SB = 2,
  parameter int NBLK = 4,
  // 0: the four random block kinds in turn; 1: code blocks tiled from a
  // synthetic 1920 x 1080 wavelet-transformed band (see run_block kind 4)
  parameter int WORKLOAD = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        finished,
  // register bus
  output logic        reg_wr,
  output logic [2:0]  reg_addr,
  output logic [31:0] reg_wdata,
  input  logic [31:0] reg_rdata,
  input  logic        irq,
  // AXI4 slave side of the DDR model
  input  logic [31:0] m_araddr,
  input  logic [7:0]  m_arlen,
  input  logic [2:0]  m_arsize,
  input  logic [1:0]  m_arburst,
  input  logic        m_arvalid,
  output logic        m_arready,
  output logic [31:0] m_rdata,
  output logic        m_rlast,
  output logic        m_rvalid,
  input  logic        m_rready,
  input  logic [31:0] m_awaddr,
  input  logic [7:0]  m_awlen,
  input  logic [2:0]  m_awsize,
  input  logic [1:0]  m_awburst,
  input  logic        m_awvalid,
  output logic        m_awready,
  input  logic [31:0] m_wdata,
  input  logic [3:0]  m_wstrb,
  input  logic        m_wlast,
  input  logic        m_wvalid,
  output logic        m_wready,
  output logic        m_bvalid,
  input  logic        m_bready,
  // monitor taps inside the core
  input  logic        ev_stall,
  input  logic        ev_run,
  input  logic        ev_lps,
  input  logic        ev_switch,
  input  logic        ev_carry,
  input  logic        ev_stuff,
  input  logic        cxd_full,
  input  logic        col_acc,      // column accepted with at least one pair
  input  pass_e       pass
);
  localparam int ORIG_B = W * H * SB;

  int checks = 0, failures = 0;
  int n_raw = 0, n_coded = 0, n_rd_bursts = 0, n_wr_bursts = 0, n_multi_burst = 0;
  int n_stall = 0, n_run = 0, n_lps = 0, n_switch = 0, n_carry = 0, n_stuff = 0, n_cxdfull = 0;
  int n_spp = 0, n_mrp = 0, n_cup = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------------ DDR model
  byte unsigned ddr [int];
  int rd_addr, rd_left, wr_addr, wr_beat;
  bit rd_act = 0, wr_act = 0, b_pend = 0;

  always @(posedge clk) begin
    if (!rst_n) begin
      m_arready <= 0; m_rvalid <= 0; m_awready <= 0; m_wready <= 0; m_bvalid <= 0; m_rlast <= 0;
      m_rdata <= '0;
    end else begin
      // read address
      if (m_arvalid && m_arready) begin
        check(m_arlen == 8'd15 && m_arsize == 3'd2 && m_arburst == 2'b01, "read burst shape");
        rd_addr = int'(m_araddr); rd_left = 16; rd_act = 1;
        n_rd_bursts++;
      end
      m_arready <= !rd_act && !(m_arvalid && m_arready) && ($urandom % 2);
      // read data
      if (m_rvalid && m_rready) begin
        rd_addr += 4; rd_left--;
        if (rd_left == 0) rd_act = 0;
      end
      if (rd_act && ($urandom % 4) != 0) begin
        for (int b = 0; b < 4; b++)
          m_rdata[8*b +: 8] <= ddr.exists(rd_addr + b) ? ddr[rd_addr + b] : 8'h00;
        m_rvalid <= 1; m_rlast <= (rd_left == 1);
      end else begin
        m_rvalid <= 0; m_rlast <= 0;
      end
      // write address / data / response
      if (m_awvalid && m_awready) begin
        check(m_awlen == 8'd15 && m_awsize == 3'd2 && m_awburst == 2'b01, "write burst shape");
        wr_addr = int'(m_awaddr); wr_beat = 0; wr_act = 1;
        n_wr_bursts++;
      end
      m_awready <= !wr_act && !b_pend && !(m_awvalid && m_awready) && ($urandom % 2);
      if (m_wvalid && m_wready) begin
        for (int b = 0; b < 4; b++) if (m_wstrb[b]) ddr[wr_addr + b] = m_wdata[8*b +: 8];
        check(m_wlast == (wr_beat == 15), "WLAST");
        wr_addr += 4; wr_beat++;
        if (wr_beat == 16) begin wr_act = 0; b_pend = 1; end
      end
      m_wready <= wr_act && ($urandom % 3) != 0;
      if (m_bvalid && m_bready) begin b_pend = 0; m_bvalid <= 0; end
      else if (b_pend && ($urandom % 2)) m_bvalid <= 1;
    end
  end

  // ------------------------------------------------------------ monitors
  always @(posedge clk) if (rst_n) begin
    n_stall   += ev_stall;
    n_run     += ev_run;
    n_lps     += ev_lps;
    n_switch  += ev_switch;
    n_carry   += ev_carry;
    n_stuff   += ev_stuff;
    n_cxdfull += cxd_full;
    if (col_acc) begin
      if (pass == PASS_SPP) n_spp++;
      if (pass == PASS_MRP) n_mrp++;
      if (pass == PASS_CUP) n_cup++;
    end
  end

  // ------------------------------------------------------------ CPU
  task automatic reg_write(int a, int d);
    @(negedge clk);
    reg_wr = 1; reg_addr = 3'(a); reg_wdata = d;
    @(negedge clk);
    reg_wr = 0;
  endtask

  task automatic reg_read(int a, output int d);
    @(negedge clk);
    reg_addr = 3'(a);
    #1 d = reg_rdata;
  endtask

  // cycles from the start register write to the interrupt, summed over
  // blocks, and the samples coded in that time
  longint cyc_total = 0, cyc_max = 0;
  longint samp_total = 0;

  // Synthetic subband coefficient for image position (x, y): a one-level
  // wavelet subband of a 1920 x 1080 band, modelled as a Laplacian-like
  // magnitude whose scale depends on the subband (LL large, HH small) and
  // on a slowly varying scene texture. Positions outside the image are 0
  // (the CPU pads partial code blocks with zeros).
  function automatic int synth_coef(int x, int y, int band);
    int scale, u, m;
    if (x >= 1920 || y >= 1080) return 0;
    case (band)
      0: scale = 180 + ((x * 3 + y * 5) % 200);
      1, 2: scale = 6 + ((x / 16 + y / 16) % 24);
      default: scale = 3 + ((x / 32) % 8);
    endcase
    // exponential-ish magnitude: halve the range a random number of times
    u = $urandom % 16;
    m = scale;
    while (u > 0 && m > 0) begin
      if ($urandom % 2) m = m / 2;
      u--;
    end
    m = (m == 0) ? 0 : int'($urandom % (m + 1));
    return m % (1 << NBP);
  endfunction

  task automatic run_block(int kind, int blk);
    ebcot_ref er;
    mq_ref mr;
    int src, dst, m, hdr, st, plen, clen, rb0, wb0, exp_len, cyc;
    bit exp_raw;
    byte unsigned orig[$];
    src = 'h1000_0000 + blk * 'h1_0000;
    dst = 'h2000_0000 + blk * 'h1_0000;
    er = new(W, H, blk % 4);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        case (kind)
          // tile blk of the band: blocks walk down the right image edge so
          // that the last one is the partial bottom-right block
          4: m = synth_coef(1920 - W + c, 1080 - 24 - (NBLK - 1 - blk) * H + r, blk % 4);
          0: m = $urandom % (1 << ($urandom % (NBP + 1)));
          1: m = (($urandom % 4) == 0) ? $urandom % 64 : 0;
          2: m = $urandom % (1 << NBP);
          default: m = (($urandom % 16) == 0) ? 1 << ($urandom % NBP) : 0;
        endcase
        m = m % (1 << NBP);
        er.mag[r][c] = m;
        er.sgn[r][c] = (m != 0) ? int'($urandom % 2) : 0;
        // sample container: sign in the top bit, magnitude in the low bits,
        // junk-free padding in between
        for (int b = 0; b < SB; b++) begin
          int v;
          v = m | (er.sgn[r][c] << (8 * SB - 1));
          ddr[src + (r * W + c) * SB + b] = byte'(v >> (8 * b));
          orig.push_back(byte'(v >> (8 * b)));
        end
      end
    er.run();
    mr = new();
    foreach (er.out[i]) mr.encode(er.out[i].cx, er.out[i].d);
    mr.flush();
    exp_raw = mr.bytes.size() > ORIG_B;
    exp_len = exp_raw ? ORIG_B : mr.bytes.size();
    // poison the destination so that stray writes show
    for (int i = 0; i < exp_len + 4 + 64; i++) ddr[dst + i] = 8'hA5;

    rb0 = n_rd_bursts; wb0 = n_wr_bursts;
    reg_write(2, src);
    reg_write(3, dst);
    reg_write(4, blk % 4);
    reg_write(0, 1);
    cyc = 0;
    while (!irq) begin @(negedge clk); cyc++; end
    cyc_total += cyc; samp_total += W * H;
    if (cyc > cyc_max) cyc_max = cyc;
    reg_read(1, st);
    reg_read(5, plen);
    reg_read(6, clen);
    check(st[1] == 1 && st[0] == 0, "status done");
    check(st[2] == exp_raw, $sformatf("raw flag %0d expected %0d", st[2], exp_raw));
    check(clen == mr.bytes.size(), $sformatf("coded length %0d expected %0d", clen, mr.bytes.size()));
    check(plen == exp_len, $sformatf("payload length %0d expected %0d", plen, exp_len));
    hdr = {ddr[dst + 3], ddr[dst + 2], ddr[dst + 1], ddr[dst]};
    check(hdr == ((int'(exp_raw) << 31) | exp_len), $sformatf("header %08x", hdr));
    for (int i = 0; i < exp_len; i++) begin
      byte unsigned e;
      e = exp_raw ? orig[i] : mr.bytes[i];
      if (ddr[dst + 4 + i] != e) begin
        check(0, $sformatf("block %0d payload byte %0d: %02x expected %02x", blk, i, ddr[dst + 4 + i], e));
        break;
      end
    end
    check(1, "payload");
    check(ddr[dst + 4 + exp_len] == 8'hA5, "byte written past the payload");
    check(n_rd_bursts - rb0 == (ORIG_B + 63) / 64, "read burst count");
    check(n_wr_bursts - wb0 == (exp_len + 4 + 63) / 64,
          $sformatf("%0d write bursts for %0d bytes", n_wr_bursts - wb0, exp_len + 4));
    if (n_wr_bursts - wb0 > 1) n_multi_burst++;
    if (exp_raw) n_raw++; else n_coded++;
    $display("block %0d kind %0d band %0d: coded %0d bytes of %0d, raw=%0d, %0d write bursts, %0d cycles",
             blk, kind, blk % 4, mr.bytes.size(), ORIG_B, exp_raw, n_wr_bursts - wb0, cyc);
  endtask

  initial begin
    finished = 0;
    reg_wr = 0; reg_addr = '0; reg_wdata = '0;
    @(posedge rst_n);
    repeat (2) @(negedge clk);
    for (int k = 0; k < NBLK; k++) run_block(WORKLOAD == 1 ? 4 : k % 4, k);
    finished = 1;
  end
endmodule
