// ncl_reg - NCL register for one dual-rail or quad-rail signal.
//
// Each rail passes through a TH22 gate whose second input is Ki: with Ki = rfd (1) a DATA rail is let
// through, with Ki = rfn (0) the register returns to NULL once its input is NULL. Ko is the NOR of the
// output rails: rfd (1) while the output is NULL, rfn (0) while it holds DATA. Adjacent registers thus
// keep two DATA wavefronts apart by a NULL wavefront.
//
// RESET_DATA0 = 0 resets every rail to 0 (NULL). RESET_DATA0 = 1 resets rail 0 to 1 (DATA0), the
// document's "one TH22n replaced by a TH22d", and Ko to rfn accordingly.
//
// Timing: every gate, the NOR included, is a unit-delay element on clk, so DATA or NULL reaches q one
// cycle after d and Ki allow it, and Ko follows one cycle later. rst is synchronous, active high.
module ncl_reg
  import ncl_pkg::*;
#(
  parameter int RAILS       = 4,
  parameter bit RESET_DATA0 = 1'b0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [RAILS-1:0] d,
  input  logic             ki,
  output logic [RAILS-1:0] q,
  output logic             ko
);
  for (genvar r = 0; r < RAILS; r++) begin : g_rail
    ncl_gate #(.FN(TH22), .RESET_VAL(RESET_DATA0 && r == 0)) u_th22 (
      .clk(clk), .rst(rst), .in({ki, d[r]}), .z(q[r]));
  end

  // NOR completion of the register's own rails.
  always_ff @(posedge clk) begin
    if (rst) ko <= !RESET_DATA0;
    else     ko <= ~|q;
  end
endmodule
