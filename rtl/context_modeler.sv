// context_modeler: column-parallel context modeller.
//
// Holds the three pass units (SPP, MRP, CUP) side by side and forwards the
// result of the one selected by the pass the controller is running: the
// column's CX/D pairs in coding order and the new state bits (significance,
// visited, refined) to be written back. Combinational: one column per cycle.
// run_used flags a cleanup column coded in run mode.
module context_modeler
  import jp2k_pkg::*;
(
  input  pass_e       pass,
  input  band_e       band,
  input  col_info_t   ci,
  output col_result_t res,
  output logic        run_used
);
  col_result_t r_spp, r_mrp, r_cup;
  logic        cup_run;

  spp_unit u_spp (.band(band), .ci(ci), .res(r_spp));
  mrp_unit u_mrp (.ci(ci), .res(r_mrp));
  cup_unit u_cup (.band(band), .ci(ci), .res(r_cup), .run_used(cup_run));

  always_comb begin
    unique case (pass)
      PASS_SPP: res = r_spp;
      PASS_MRP: res = r_mrp;
      default:  res = r_cup;
    endcase
    run_used = (pass == PASS_CUP) && cup_run;
  end
endmodule
