// sync_fifo: single-clock first-in first-out buffer.
//
// Used twice in the tier-1 coder: as the CX/D buffer between the context
// sequencer and the MQ coder, and as the byte-out FIFO after the MQ coder.
// A write when full and a read when empty are ignored. Read data is the
// head entry, available combinationally while empty is low (first-word
// fall-through); rd_en pops it at the clock edge. Simultaneous read and write
// are allowed in any state. count gives the fill level. Depth must be a
// power of two. The storage is a plain array; a block RAM can take its place.
module sync_fifo #(
  parameter int unsigned WIDTH = 6,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             full,
  output logic             empty,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wp, rp;
  logic             do_wr, do_rd;

  assign full    = (wp[AW] != rp[AW]) && (wp[AW-1:0] == rp[AW-1:0]);
  assign empty   = (wp == rp);
  assign count   = wp - rp;
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else if (clear) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
    end
  end

  // the producers in this design never push into a full FIFO
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full));
endmodule
