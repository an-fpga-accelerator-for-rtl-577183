// tier1_coder_tb: end-to-end test of the tier-1 coder at its default size
// (32 x 32 code block, 9 magnitude bit planes).
//
// Several code blocks with different subbands and coefficient statistics are
// loaded, coded and read out through a randomly stalling byte reader. The
// CX/D pairs entering the CX/D FIFO and the bytes leaving the byte FIFO are
// compared with the sample-sequential reference models of t1_ref_pkg. The
// test also counts the mechanisms of the design (the three passes, run
// mode, controller pauses, CX/D FIFO full, byte FIFO full, LPS, MPS switch,
// carry, bit stuffing) and fails if one of them never happened. The cycles
// per block are printed and checked against the column-scan lower bound.
module tier1_coder_tb;
  import jp2k_pkg::*;
  import t1_ref_pkg::*;

  localparam int W = 32, H = 32, NBP = 9;
  localparam int NBLK = 7;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                  blk_clear, ld_en, ld_sign, start, busy, done;
  logic [$clog2(H)-1:0]  ld_row;
  logic [$clog2(W)-1:0]  ld_col;
  logic [NBP-1:0]        ld_mag;
  band_e                 band;
  logic                  out_valid, out_rd;
  logic [7:0]            out_byte;
  logic ev_stall, ev_run, ev_lps, ev_switch, ev_carry, ev_stuff;

  tier1_coder dut (.*);

  int checks = 0, failures = 0;
  int cnt_stall, cnt_run, cnt_lps, cnt_switch, cnt_carry, cnt_stuff;
  int cnt_spp, cnt_mrp, cnt_cup, cnt_cxdfull, cnt_bytefull;
  int cycle = 0;
  bit rd_stall_mode;

  pair_t   got_pairs[$];
  logic [7:0] got_bytes[$];

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      cnt_stall  += ev_stall;
      cnt_run    += ev_run;
      cnt_lps    += ev_lps;
      cnt_switch += ev_switch;
      cnt_carry  += ev_carry;
      cnt_stuff  += ev_stuff;
      cnt_cxdfull  += dut.cxd_full;
      cnt_bytefull += dut.byte_full;
      if (dut.col_valid && dut.col_ready && dut.res.npairs != 0) begin
        if (dut.pass == PASS_SPP) cnt_spp++;
        if (dut.pass == PASS_MRP) cnt_mrp++;
        if (dut.pass == PASS_CUP) cnt_cup++;
      end
      if (dut.seq_wr && !dut.cxd_full) begin
        pair_t p;
        p.cx = int'(dut.seq_pair.cx);
        p.d  = int'(dut.seq_pair.d);
        got_pairs.push_back(p);
      end
      if (out_valid && out_rd) got_bytes.push_back(out_byte);
    end
  end

  // byte reader: in some blocks it reads only in short windows, so that the
  // byte FIFO fills up and the MQ coder has to wait
  always_ff @(negedge clk) out_rd <= rd_stall_mode ? ((cycle % 2048) >= 2000) : 1'b1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic run_block(input int kind, input band_e b);
    ebcot_ref er;
    mq_ref    mr;
    int t0, t1, m;
    er = new(W, H, int'(b));
    // coefficient statistics by kind
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        case (kind)
          0: m = $urandom % (1 << ($urandom % 10));                 // wide spread
          1: m = (($urandom % 4) == 0) ? $urandom % 64 : 0;         // sparse
          2: m = (r < 8 && c < 8) ? $urandom % 512 : 0;             // energy in a corner
          3: m = 0;                                                 // empty block
          4: m = $urandom % 512;                                    // dense, full range
          default: m = (($urandom % 16) == 0) ? 1 << ($urandom % 9) : 0;  // isolated peaks
        endcase
        er.mag[r][c] = m;
        er.sgn[r][c] = (m != 0) ? int'($urandom % 2) : 0;
      end
    er.run();
    mr = new();
    foreach (er.out[i]) mr.encode(er.out[i].cx, er.out[i].d);
    mr.flush();

    got_pairs.delete();
    got_bytes.delete();
    @(negedge clk);
    blk_clear = 1;
    @(negedge clk);
    blk_clear = 0;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        ld_en = 1; ld_row = r[$clog2(H)-1:0]; ld_col = c[$clog2(W)-1:0];
        ld_mag = er.mag[r][c][NBP-1:0]; ld_sign = er.sgn[r][c][0];
        @(negedge clk);
      end
    ld_en = 0;
    band  = b;
    start = 1;
    t0 = cycle;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    t1 = cycle;
    // let the byte FIFO drain
    while (out_valid) @(negedge clk);
    repeat (3) @(negedge clk);

    check(got_pairs.size() == er.out.size(),
          $sformatf("block %0d: %0d pairs, expected %0d", kind, got_pairs.size(), er.out.size()));
    for (int i = 0; i < er.out.size() && i < got_pairs.size(); i++) begin
      if (got_pairs[i] != er.out[i]) begin
        check(0, $sformatf("block %0d pair %0d: cx=%0d d=%0d, expected cx=%0d d=%0d",
              kind, i, got_pairs[i].cx, got_pairs[i].d, er.out[i].cx, er.out[i].d));
        break;
      end
    end
    check(1, "pairs");
    check(got_bytes.size() == mr.bytes.size(),
          $sformatf("block %0d: %0d bytes, expected %0d", kind, got_bytes.size(), mr.bytes.size()));
    for (int i = 0; i < mr.bytes.size() && i < got_bytes.size(); i++)
      if (got_bytes[i] != mr.bytes[i]) begin
        check(0, $sformatf("block %0d byte %0d: %02x expected %02x", kind, i, got_bytes[i], mr.bytes[i]));
        break;
      end
    // the column scan alone needs one cycle per column and pass
    if (kind != 3) begin
      check((t1 - t0) >= (W * H / 4), $sformatf("block %0d: %0d cycles is below the scan bound", kind, t1 - t0));
    end
    $display("block kind %0d band %0d: %0d pairs, %0d bytes, %0d cycles (%0d cycles/pair)",
             kind, int'(b), er.out.size(), mr.bytes.size(), t1 - t0,
             (er.out.size() > 0) ? (t1 - t0) / er.out.size() : 0);
  endtask

  initial begin
    blk_clear = 0; ld_en = 0; ld_sign = 0; ld_row = '0; ld_col = '0; ld_mag = '0;
    band = BAND_LL; start = 0; rd_stall_mode = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    run_block(0, BAND_LL);
    run_block(1, BAND_HL);
    rd_stall_mode = 1;
    run_block(2, BAND_LH);
    rd_stall_mode = 0;
    run_block(3, BAND_HH);
    rd_stall_mode = 1;
    run_block(4, BAND_HH);
    run_block(5, BAND_LL);
    rd_stall_mode = 0;
    run_block(0, BAND_HH);
    $display("events: spp=%0d mrp=%0d cup=%0d run=%0d stall=%0d cxd_full=%0d byte_full=%0d lps=%0d switch=%0d carry=%0d stuff=%0d",
             cnt_spp, cnt_mrp, cnt_cup, cnt_run, cnt_stall, cnt_cxdfull, cnt_bytefull,
             cnt_lps, cnt_switch, cnt_carry, cnt_stuff);
    check(cnt_spp > 0, "no SPP column");
    check(cnt_mrp > 0, "no MRP column");
    check(cnt_cup > 0, "no CUP column");
    check(cnt_run > 0, "no run-mode column");
    check(cnt_stall > 0, "controller never paused");
    check(cnt_cxdfull > 0, "CX/D FIFO never full");
    check(cnt_bytefull > 0, "byte FIFO never full");
    check(cnt_lps > 0, "no LPS");
    check(cnt_switch > 0, "no MPS switch");
    check(cnt_carry > 0, "no carry");
    check(cnt_stuff > 0, "no bit stuffing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
