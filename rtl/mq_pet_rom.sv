// mq_pet_rom: probability estimation table (PET) ROM of the MQ coder.
//
// Four read-only tables indexed by the probability state I (0..46): Qe, the
// LPS probability as a 16-bit interval fraction; NMPS and NLPS, the next
// state after coding an MPS or an LPS; and Switch, set where an LPS swaps
// the meaning of MPS. The contents are the 47-entry JPEG2000 MQ table.
// Combinational.
module mq_pet_rom (
  input  logic [5:0]  idx,
  output logic [15:0] qe,
  output logic [5:0]  nmps,
  output logic [5:0]  nlps,
  output logic        switch_o
);
  always_comb begin
    unique case (idx)
      6'd0 : {qe, nmps, nlps, switch_o} = {16'h5601, 6'd1 , 6'd1 , 1'b1};
      6'd1 : {qe, nmps, nlps, switch_o} = {16'h3401, 6'd2 , 6'd6 , 1'b0};
      6'd2 : {qe, nmps, nlps, switch_o} = {16'h1801, 6'd3 , 6'd9 , 1'b0};
      6'd3 : {qe, nmps, nlps, switch_o} = {16'h0AC1, 6'd4 , 6'd12, 1'b0};
      6'd4 : {qe, nmps, nlps, switch_o} = {16'h0521, 6'd5 , 6'd29, 1'b0};
      6'd5 : {qe, nmps, nlps, switch_o} = {16'h0221, 6'd38, 6'd33, 1'b0};
      6'd6 : {qe, nmps, nlps, switch_o} = {16'h5601, 6'd7 , 6'd6 , 1'b1};
      6'd7 : {qe, nmps, nlps, switch_o} = {16'h5401, 6'd8 , 6'd14, 1'b0};
      6'd8 : {qe, nmps, nlps, switch_o} = {16'h4801, 6'd9 , 6'd14, 1'b0};
      6'd9 : {qe, nmps, nlps, switch_o} = {16'h3801, 6'd10, 6'd14, 1'b0};
      6'd10: {qe, nmps, nlps, switch_o} = {16'h3001, 6'd11, 6'd17, 1'b0};
      6'd11: {qe, nmps, nlps, switch_o} = {16'h2401, 6'd12, 6'd18, 1'b0};
      6'd12: {qe, nmps, nlps, switch_o} = {16'h1C01, 6'd13, 6'd20, 1'b0};
      6'd13: {qe, nmps, nlps, switch_o} = {16'h1601, 6'd29, 6'd21, 1'b0};
      6'd14: {qe, nmps, nlps, switch_o} = {16'h5601, 6'd15, 6'd14, 1'b1};
      6'd15: {qe, nmps, nlps, switch_o} = {16'h5401, 6'd16, 6'd14, 1'b0};
      6'd16: {qe, nmps, nlps, switch_o} = {16'h5101, 6'd17, 6'd15, 1'b0};
      6'd17: {qe, nmps, nlps, switch_o} = {16'h4801, 6'd18, 6'd16, 1'b0};
      6'd18: {qe, nmps, nlps, switch_o} = {16'h3801, 6'd19, 6'd17, 1'b0};
      6'd19: {qe, nmps, nlps, switch_o} = {16'h3401, 6'd20, 6'd18, 1'b0};
      6'd20: {qe, nmps, nlps, switch_o} = {16'h3001, 6'd21, 6'd19, 1'b0};
      6'd21: {qe, nmps, nlps, switch_o} = {16'h2801, 6'd22, 6'd19, 1'b0};
      6'd22: {qe, nmps, nlps, switch_o} = {16'h2401, 6'd23, 6'd20, 1'b0};
      6'd23: {qe, nmps, nlps, switch_o} = {16'h2201, 6'd24, 6'd21, 1'b0};
      6'd24: {qe, nmps, nlps, switch_o} = {16'h1C01, 6'd25, 6'd22, 1'b0};
      6'd25: {qe, nmps, nlps, switch_o} = {16'h1801, 6'd26, 6'd23, 1'b0};
      6'd26: {qe, nmps, nlps, switch_o} = {16'h1601, 6'd27, 6'd24, 1'b0};
      6'd27: {qe, nmps, nlps, switch_o} = {16'h1401, 6'd28, 6'd25, 1'b0};
      6'd28: {qe, nmps, nlps, switch_o} = {16'h1201, 6'd29, 6'd26, 1'b0};
      6'd29: {qe, nmps, nlps, switch_o} = {16'h1101, 6'd30, 6'd27, 1'b0};
      6'd30: {qe, nmps, nlps, switch_o} = {16'h0AC1, 6'd31, 6'd28, 1'b0};
      6'd31: {qe, nmps, nlps, switch_o} = {16'h09C1, 6'd32, 6'd29, 1'b0};
      6'd32: {qe, nmps, nlps, switch_o} = {16'h08A1, 6'd33, 6'd30, 1'b0};
      6'd33: {qe, nmps, nlps, switch_o} = {16'h0521, 6'd34, 6'd31, 1'b0};
      6'd34: {qe, nmps, nlps, switch_o} = {16'h0441, 6'd35, 6'd32, 1'b0};
      6'd35: {qe, nmps, nlps, switch_o} = {16'h02A1, 6'd36, 6'd33, 1'b0};
      6'd36: {qe, nmps, nlps, switch_o} = {16'h0221, 6'd37, 6'd34, 1'b0};
      6'd37: {qe, nmps, nlps, switch_o} = {16'h0141, 6'd38, 6'd35, 1'b0};
      6'd38: {qe, nmps, nlps, switch_o} = {16'h0111, 6'd39, 6'd36, 1'b0};
      6'd39: {qe, nmps, nlps, switch_o} = {16'h0085, 6'd40, 6'd37, 1'b0};
      6'd40: {qe, nmps, nlps, switch_o} = {16'h0049, 6'd41, 6'd38, 1'b0};
      6'd41: {qe, nmps, nlps, switch_o} = {16'h0025, 6'd42, 6'd39, 1'b0};
      6'd42: {qe, nmps, nlps, switch_o} = {16'h0015, 6'd43, 6'd40, 1'b0};
      6'd43: {qe, nmps, nlps, switch_o} = {16'h0009, 6'd44, 6'd41, 1'b0};
      6'd44: {qe, nmps, nlps, switch_o} = {16'h0005, 6'd45, 6'd42, 1'b0};
      6'd45: {qe, nmps, nlps, switch_o} = {16'h0001, 6'd45, 6'd43, 1'b0};
      6'd46: {qe, nmps, nlps, switch_o} = {16'h5601, 6'd46, 6'd46, 1'b0};
      default: {qe, nmps, nlps, switch_o} = {16'h5601, 6'd46, 6'd46, 1'b0};
    endcase
  end
endmodule
