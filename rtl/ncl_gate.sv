// ncl_gate - one NCL threshold gate with hysteresis, any of the 27 fundamental gates.
//
// FN selects the gate (THmn, weighted THmnWw.., THxor0, THand0, TH24comp). The output asserts when the
// gate's set function of its inputs A..D (in[0]..in[3]) is true, and de-asserts only once every input is
// 0; otherwise it holds. That hysteresis is what makes NCL gates state-holding. RESET_VAL gives the gate's
// reset value: 0 for the "N" (reset-to-NULL) gates and 1 for the "D" gates.
//
// Timing: a unit-delay model. The output is a flip-flop updated on clk, so the gate has a delay of one
// cycle; rst is synchronous and active high. The gate set and the Boolean functions follow the document's
// gate table; clocking the gate is this code base's modelling choice.
module ncl_gate
  import ncl_pkg::*;
#(
  parameter gate_e FN        = TH22,
  parameter bit    RESET_VAL = 1'b0
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic [gate_inputs(FN)-1:0] in,
  output logic                       z
);
  localparam int N = gate_inputs(FN);

  logic [3:0] v;
  always_comb begin
    v = '0;
    v[N-1:0] = in;
  end

  always_ff @(posedge clk) begin
    if (rst)                  z <= RESET_VAL;
    else if (gate_set(FN, v)) z <= 1'b1;
    else if (v == '0)         z <= 1'b0;
  end
endmodule
