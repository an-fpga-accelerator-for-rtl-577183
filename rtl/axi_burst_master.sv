// axi_burst_master: AXI4 burst engine moving a block between DDR and the
// IP core's block RAMs.
//
// Every burst is 16 beats (ARLEN/AWLEN = 15) of 4 bytes (ARSIZE/AWSIZE = 2),
// incrementing. A transfer of nbursts bursts starts at base and advances 64
// bytes per burst, so the caller sets the number of bursts from the size of
// the block. One burst is outstanding at a time: address, then the 16 data
// beats, then (for writes) the response. Read beats are handed out on
// rd_beat_valid with their running index; for writes the caller supplies the
// data and byte strobes of beat wr_beat_idx combinationally. done pulses for
// one cycle at the end. base must be 64-byte aligned so that no burst
// crosses a 4 KiB boundary. Error responses are not checked.
// Burst length and beat size follow the design; the rest is this
// implementation's choice.
module axi_burst_master #(
  parameter int unsigned ADDR_W = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               write,          // 1: BRAM -> DDR, 0: DDR -> BRAM
  input  logic [ADDR_W-1:0]  base,
  input  logic [15:0]        nbursts,
  output logic               busy,
  output logic               done,
  // block RAM side
  output logic               rd_beat_valid,
  output logic [19:0]        rd_beat_idx,
  output logic [31:0]        rd_beat_data,
  output logic [19:0]        wr_beat_idx,
  input  logic [31:0]        wr_beat_data,
  input  logic [3:0]         wr_beat_strb,
  // AXI4 read address / data
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
  // AXI4 write address / data / response
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
  localparam logic [7:0] BURST_LEN   = 8'd15;   // 16 beats
  localparam logic [2:0] BURST_SIZE  = 3'd2;    // 4 bytes per beat
  localparam int unsigned BURST_BYTES = 64;

  typedef enum logic [2:0] {S_IDLE, S_AR, S_R, S_AW, S_W, S_B} state_e;
  state_e st;

  logic [ADDR_W-1:0] addr_q;
  logic [15:0]       left_q;       // bursts still to start
  logic [3:0]        beat_q;       // beat inside the burst
  logic [19:0]       idx_q;        // beat index over the whole transfer

  assign busy          = (st != S_IDLE);
  assign m_araddr      = addr_q;
  assign m_awaddr      = addr_q;
  assign m_arlen       = BURST_LEN;
  assign m_awlen       = BURST_LEN;
  assign m_arsize      = BURST_SIZE;
  assign m_awsize      = BURST_SIZE;
  assign m_arburst     = 2'b01;
  assign m_awburst     = 2'b01;
  assign m_arvalid     = (st == S_AR);
  assign m_rready      = (st == S_R);
  assign m_awvalid     = (st == S_AW);
  assign m_wvalid      = (st == S_W);
  assign m_wdata       = wr_beat_data;
  assign m_wstrb       = wr_beat_strb;
  assign m_wlast       = (st == S_W) && (beat_q == 4'd15);
  assign m_bready      = (st == S_B);
  assign rd_beat_valid = (st == S_R) && m_rvalid;
  assign rd_beat_idx   = idx_q;
  assign rd_beat_data  = m_rdata;
  assign wr_beat_idx   = idx_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= S_IDLE;
      addr_q <= '0;
      left_q <= '0;
      beat_q <= '0;
      idx_q  <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          addr_q <= base;
          left_q <= nbursts;
          beat_q <= '0;
          idx_q  <= '0;
          if (nbursts == 16'd0) done <= 1'b1;
          else                  st   <= write ? S_AW : S_AR;
        end
        S_AR: if (m_arready) begin
          st     <= S_R;
          left_q <= left_q - 16'd1;
        end
        S_R: if (m_rvalid) begin
          idx_q  <= idx_q + 20'd1;
          beat_q <= beat_q + 4'd1;
          if (m_rlast) begin
            addr_q <= addr_q + ADDR_W'(BURST_BYTES);
            beat_q <= '0;
            if (left_q == 16'd0) begin st <= S_IDLE; done <= 1'b1; end
            else                 st <= S_AR;
          end
        end
        S_AW: if (m_awready) begin
          st     <= S_W;
          left_q <= left_q - 16'd1;
        end
        S_W: if (m_wready) begin
          idx_q  <= idx_q + 20'd1;
          beat_q <= beat_q + 4'd1;
          if (beat_q == 4'd15) st <= S_B;
        end
        S_B: if (m_bvalid) begin
          addr_q <= addr_q + ADDR_W'(BURST_BYTES);
          beat_q <= '0;
          if (left_q == 16'd0) begin st <= S_IDLE; done <= 1'b1; end
          else                 st <= S_AW;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // AXI: a valid address stays valid and stable until accepted
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                m_arvalid && !m_arready |=> m_arvalid && $stable(m_araddr));
  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                m_awvalid && !m_awready |=> m_awvalid && $stable(m_awaddr));
  a_w_stable:  assert property (@(posedge clk) disable iff (!rst_n)
                                m_wvalid && !m_wready |=> m_wvalid);
endmodule
