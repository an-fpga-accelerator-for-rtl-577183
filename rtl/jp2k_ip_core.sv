// jp2k_ip_core: compression IP core around the tier-1 coder.
//
// The CPU writes the source and destination DDR addresses and the subband
// into the register file and sets the start bit. The core then
//   1. reads the original code block from DDR with 16-beat x 4-byte AXI
//      bursts into the input block RAM (W*H samples of SAMPLE_BYTES bytes,
//      little endian, sign in the top bit of each sample, magnitude in its
//      low NBP bits);
//   2. copies the samples into the tier-1 coder's code block memory;
//   3. runs the tier-1 coder and packs its bytes into the output block RAM;
//   4. compares the coded size with the original size: if the coded block
//      is larger, the original block is sent instead (raw flag);
//   5. writes a 4-byte header {raw, 15'b0, payload length in bytes} followed
//      by the payload to DDR, again in 16-beat bursts, with as many bursts
//      as header plus payload need (byte strobes mask the tail);
//   6. raises done (and a one-cycle irq) and reports raw flag, payload
//      length and coded length in the status registers.
// Register bus: one write or read per cycle, word registers, read data is
// combinational. Map (word address): 0 CTRL (bit 0 start, write only),
// 1 STATUS (bit 0 busy, bit 1 done, bit 2 raw), 2 SRC, 3 DST, 4 BAND,
// 5 PAYLOAD_LEN, 6 CODED_LEN.
// The two block RAMs, the raw fallback with the size in the header, the
// burst shape and the size-dependent burst count follow the published
// architecture; the register map, the header layout and the sample format
// are this implementation's choices.
// Lint notes: the tier-1 event strobes (ev_*) and the burst engine's busy
// are left unconnected inside the core on purpose; they are observed by
// the testbench only. AxLEN, AxSIZE and AxBURST are constant by design
// (every burst is 16 x 4 bytes, INCR).
module jp2k_ip_core
  import jp2k_pkg::*;
#(
  parameter int unsigned W            = 32,
  parameter int unsigned H            = 32,
  parameter int unsigned NBP          = 9,
  parameter int unsigned SAMPLE_BYTES = 2,
  parameter int unsigned ADDR_W       = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  // register bus from the CPU
  input  logic               reg_wr,
  input  logic [2:0]         reg_addr,
  input  logic [31:0]        reg_wdata,
  output logic [31:0]        reg_rdata,
  output logic               irq,
  // AXI4 master to DDR
  output logic [ADDR_W-1:0]  m_araddr,
  output logic [7:0]         m_arlen,
  output logic [2:0]         m_arsize,
  output logic [1:0]         m_arburst,
  output logic               m_arvalid,
  input  logic               m_arready,
  input  logic [31:0]        m_rdata,
  input  logic               m_rlast,
  input  logic               m_rvalid,
  output logic               m_rready,
  output logic [ADDR_W-1:0]  m_awaddr,
  output logic [7:0]         m_awlen,
  output logic [2:0]         m_awsize,
  output logic [1:0]         m_awburst,
  output logic               m_awvalid,
  input  logic               m_awready,
  output logic [31:0]        m_wdata,
  output logic [3:0]         m_wstrb,
  output logic               m_wlast,
  output logic               m_wvalid,
  input  logic               m_wready,
  input  logic               m_bvalid,
  output logic               m_bready
);
  localparam int unsigned NS       = W * H;                  // samples
  localparam int unsigned ORIG_B   = NS * SAMPLE_BYTES;      // original bytes
  localparam int unsigned WORDS    = (ORIG_B + 3) / 4;       // block RAM words
  localparam int unsigned SPW      = 4 / SAMPLE_BYTES;       // samples per word
  localparam int unsigned IN_BURST = (ORIG_B + 63) / 64;

  typedef enum logic [2:0] {S_IDLE, S_READ, S_LOAD, S_CODE, S_DECIDE, S_WRITE, S_DONE} state_e;
  state_e st;

  // registers
  logic [ADDR_W-1:0] src_q, dst_q;
  band_e             band_q;
  logic              raw_q, done_q;
  logic [31:0]       coded_len_q;        // bytes produced by the MQ coder
  logic [31:0]       pay_len;

  // block RAMs
  logic [31:0] in_ram  [WORDS];
  logic [31:0] out_ram [WORDS];

  // burst engine
  logic        dma_start, dma_write, dma_busy, dma_done;
  logic [15:0] dma_nbursts;
  logic        rd_beat_valid;
  logic [19:0] rd_beat_idx, wr_beat_idx;
  logic [31:0] rd_beat_data, wr_beat_data;
  logic [3:0]  wr_beat_strb;

  // tier-1 coder
  logic                 t1_clear, t1_ld_en, t1_start, t1_busy, t1_done;
  logic [$clog2(H)-1:0] t1_row;
  logic [$clog2(W)-1:0] t1_col;
  logic                 t1_sign;
  logic [NBP-1:0]       t1_mag;
  logic                 t1_out_valid;
  logic [7:0]           t1_out_byte;
  logic                 ev_stall, ev_run, ev_lps, ev_switch, ev_carry, ev_stuff;

  logic [$clog2(NS):0]  ld_idx;          // sample being loaded
  logic                 ld_phase;        // load port driven this cycle
  logic [8*SAMPLE_BYTES-1:0] sample;

  // ------------------------------------------------------------ registers
  always_comb begin
    unique case (reg_addr)
      3'd1:    reg_rdata = {29'd0, raw_q, done_q, (st != S_IDLE) && (st != S_DONE)};
      3'd2:    reg_rdata = 32'(src_q);
      3'd3:    reg_rdata = 32'(dst_q);
      3'd4:    reg_rdata = {30'd0, band_q};
      3'd5:    reg_rdata = pay_len;
      3'd6:    reg_rdata = coded_len_q;
      default: reg_rdata = '0;
    endcase
  end

  assign pay_len = raw_q ? 32'(ORIG_B) : coded_len_q;

  // ------------------------------------------------------------ sample fetch
  always_comb begin
    sample = '0;
    for (int b = 0; b < int'(SAMPLE_BYTES); b++)
      sample[8*b +: 8] = in_ram[int'(ld_idx) / SPW][8 * ((int'(ld_idx) % SPW) * SAMPLE_BYTES + b) +: 8];
  end

  assign t1_ld_en = (st == S_LOAD) && (ld_idx < ($clog2(NS)+1)'(NS));
  assign t1_row   = ($clog2(H))'(ld_idx / W);
  assign t1_col   = ($clog2(W))'(ld_idx % W);
  assign t1_sign  = sample[8*SAMPLE_BYTES-1];
  assign t1_mag   = sample[NBP-1:0];
  assign ld_phase = t1_ld_en;

  // ------------------------------------------------------------ output data
  // beat 0 carries the header, beat k>0 payload word k-1
  logic [31:0] pay_word;
  logic [31:0] beat_byte0;           // byte offset of the beat in the stream
  always_comb begin
    pay_word   = '0;
    if (wr_beat_idx != 20'd0 && int'(wr_beat_idx) - 1 < int'(WORDS))
      pay_word = raw_q ? in_ram[int'(wr_beat_idx) - 1] : out_ram[int'(wr_beat_idx) - 1];
    wr_beat_data = (wr_beat_idx == 20'd0) ? {raw_q, 15'd0, pay_len[15:0]} : pay_word;
    beat_byte0   = 32'(wr_beat_idx) * 4;
    for (int b = 0; b < 4; b++)
      wr_beat_strb[b] = (beat_byte0 + 32'(b)) < (pay_len + 32'd4);
  end

  // ------------------------------------------------------------ control
  always_comb begin
    dma_start   = 1'b0;
    dma_write   = 1'b0;
    dma_nbursts = 16'(IN_BURST);
    t1_clear    = 1'b0;
    unique case (st)
      S_IDLE, S_DONE: begin
        dma_start = reg_wr && reg_addr == 3'd0 && reg_wdata[0];
        t1_clear  = dma_start;
      end
      S_DECIDE: begin
        dma_start   = 1'b1;
        dma_write   = 1'b1;
        dma_nbursts = 16'((pay_len + 32'd4 + 32'd63) / 32'd64);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= S_IDLE;
      src_q       <= '0;
      dst_q       <= '0;
      band_q      <= BAND_LL;
      raw_q       <= 1'b0;
      done_q      <= 1'b0;
      coded_len_q <= '0;
      ld_idx      <= '0;
      irq         <= 1'b0;
    end else begin
      irq <= 1'b0;
      if (reg_wr && (st == S_IDLE || st == S_DONE)) begin
        unique case (reg_addr)
          3'd2: src_q  <= reg_wdata[ADDR_W-1:0];
          3'd3: dst_q  <= reg_wdata[ADDR_W-1:0];
          3'd4: band_q <= band_e'(reg_wdata[1:0]);
          default: ;
        endcase
      end
      unique case (st)
        S_IDLE, S_DONE: if (dma_start) begin
          st          <= S_READ;
          done_q      <= 1'b0;
          raw_q       <= 1'b0;
          coded_len_q <= '0;
          ld_idx      <= '0;
        end
        S_READ: if (dma_done) st <= S_LOAD;
        S_LOAD: begin
          if (ld_phase) ld_idx <= ld_idx + 1'b1;
          else          st     <= S_CODE;
        end
        S_CODE: begin
          if (t1_out_valid) coded_len_q <= coded_len_q + 32'd1;
          if (t1_done && !t1_out_valid && !t1_busy) st <= S_DECIDE;
        end
        S_DECIDE: begin
          st <= S_WRITE;
        end
        S_WRITE: if (dma_done) begin
          st     <= S_DONE;
          done_q <= 1'b1;
          irq    <= 1'b1;
        end
        default: st <= S_IDLE;
      endcase
      // raw fallback decided as soon as the coded stream outgrows the block
      if (st == S_CODE && t1_out_valid && coded_len_q + 32'd1 > 32'(ORIG_B)) raw_q <= 1'b1;
    end
  end

  // tier-1 start one cycle after the last sample is loaded
  assign t1_start = (st == S_LOAD) && !ld_phase;

  // block RAM writes
  always_ff @(posedge clk) begin
    if (rd_beat_valid && int'(rd_beat_idx) < int'(WORDS)) in_ram[rd_beat_idx[$clog2(WORDS)-1:0]] <= rd_beat_data;
    if (st == S_CODE && t1_out_valid && coded_len_q < 32'(ORIG_B))
      out_ram[coded_len_q / 4][8 * (coded_len_q % 4) +: 8] <= t1_out_byte;
  end

  axi_burst_master #(.ADDR_W(ADDR_W)) u_dma (
    .clk(clk), .rst_n(rst_n), .start(dma_start), .write(dma_write),
    .base(dma_write ? dst_q : src_q), .nbursts(dma_nbursts), .busy(dma_busy), .done(dma_done),
    .rd_beat_valid(rd_beat_valid), .rd_beat_idx(rd_beat_idx), .rd_beat_data(rd_beat_data),
    .wr_beat_idx(wr_beat_idx), .wr_beat_data(wr_beat_data), .wr_beat_strb(wr_beat_strb),
    .m_araddr(m_araddr), .m_arlen(m_arlen), .m_arsize(m_arsize), .m_arburst(m_arburst),
    .m_arvalid(m_arvalid), .m_arready(m_arready), .m_rdata(m_rdata), .m_rlast(m_rlast),
    .m_rvalid(m_rvalid), .m_rready(m_rready),
    .m_awaddr(m_awaddr), .m_awlen(m_awlen), .m_awsize(m_awsize), .m_awburst(m_awburst),
    .m_awvalid(m_awvalid), .m_awready(m_awready), .m_wdata(m_wdata), .m_wstrb(m_wstrb),
    .m_wlast(m_wlast), .m_wvalid(m_wvalid), .m_wready(m_wready),
    .m_bvalid(m_bvalid), .m_bready(m_bready));

  tier1_coder #(.W(W), .H(H), .NBP(NBP)) u_t1 (
    .clk(clk), .rst_n(rst_n),
    .blk_clear(t1_clear), .ld_en(t1_ld_en), .ld_row(t1_row), .ld_col(t1_col),
    .ld_sign(t1_sign), .ld_mag(t1_mag),
    .band(band_q), .start(t1_start), .busy(t1_busy), .done(t1_done),
    .out_valid(t1_out_valid), .out_byte(t1_out_byte), .out_rd(st == S_CODE),
    .ev_stall(ev_stall), .ev_run(ev_run), .ev_lps(ev_lps), .ev_switch(ev_switch),
    .ev_carry(ev_carry), .ev_stuff(ev_stuff));
endmodule
