// bpc_controller: controller of the bit-plane coder.
//
// After start it clears the state memories and, if the block holds any
// non-zero sample, codes the bit planes from the most significant non-zero
// one (msb_plane) down to plane 0. The first plane gets only the cleanup
// pass; every later plane gets significance propagation, magnitude
// refinement and cleanup, in that order. Each pass walks the stripes top to
// bottom and, inside a stripe, the columns left to right. One column is
// offered per cycle (col_valid); when the context sequencer takes it
// (col_ready) the column's new state bits are written back (st_wr) and the
// controller moves on, otherwise it pauses on the same column. Between bit
// planes one cycle clears the visited flags. When all passes are done, done
// is raised and held until the next start.
module bpc_controller
  import jp2k_pkg::*;
#(
  parameter int unsigned W   = 32,
  parameter int unsigned H   = 32,
  parameter int unsigned NBP = 9
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic                      nonzero,
  input  logic [$clog2(NBP)-1:0]    msb_plane,
  output pass_e                     pass,
  output logic [$clog2(NBP)-1:0]    plane,
  output logic [$clog2(H)-3:0]      stripe,
  output logic [$clog2(W)-1:0]      col,
  output logic                      col_valid,
  input  logic                      col_ready,
  output logic                      st_wr,
  output logic                      clear_all,
  output logic                      clear_eta,
  output logic                      busy,
  output logic                      done
);
  localparam int unsigned NSTRIPES = (H + 3) / 4;

  typedef enum logic [2:0] {S_IDLE, S_CLEAR, S_RUN, S_NEXT_PLANE, S_DONE} state_e;
  state_e st;

  logic last_col;

  assign col_valid = (st == S_RUN);
  assign st_wr     = col_valid && col_ready;
  assign clear_all = (st == S_CLEAR);
  assign clear_eta = (st == S_NEXT_PLANE);
  assign busy      = (st != S_IDLE) && (st != S_DONE);
  assign done      = (st == S_DONE);
  assign last_col  = (int'(col) == W - 1) && (int'(stripe) == NSTRIPES - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= S_IDLE;
      pass   <= PASS_CUP;
      plane  <= '0;
      stripe <= '0;
      col    <= '0;
    end else begin
      unique case (st)
        S_IDLE, S_DONE: if (start) st <= S_CLEAR;
        S_CLEAR: begin
          pass   <= PASS_CUP;
          plane  <= msb_plane;
          stripe <= '0;
          col    <= '0;
          st     <= nonzero ? S_RUN : S_DONE;
        end
        S_RUN: if (col_ready) begin
          if (int'(col) == W - 1) begin
            col    <= '0;
            stripe <= (int'(stripe) == NSTRIPES - 1) ? '0 : stripe + 1'b1;
          end else begin
            col <= col + 1'b1;
          end
          if (last_col) begin
            unique case (pass)
              PASS_SPP: pass <= PASS_MRP;
              PASS_MRP: pass <= PASS_CUP;
              default: begin
                if (plane == '0) st <= S_DONE;
                else             st <= S_NEXT_PLANE;
              end
            endcase
          end
        end
        S_NEXT_PLANE: begin
          plane <= plane - 1'b1;
          pass  <= PASS_SPP;
          st    <= S_RUN;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
