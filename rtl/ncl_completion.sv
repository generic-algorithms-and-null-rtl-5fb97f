// ncl_completion - full-word completion detection for an NCL register stage.
//
// The Ko lines of all N registers of a stage are combined by a tree of TH44 gates (4-input C-elements):
// the result becomes rfd (1) only when every register has gone NULL, and rfn (0) only when every register
// holds DATA; in between it holds. Groups of four use TH44; a last group of two or three inputs uses TH22
// or TH33, and a single leftover line passes to the next level through a register stage of one TH12
// (buffer) so that all paths have the same depth. The tree has ceil(log4 N) levels.
//
// Timing: each level is one gate delay (one clk cycle). RESET_VAL is the output's reset value and should
// match the registers it watches: 1 when they reset to NULL.
module ncl_completion
  import ncl_pkg::*;
#(
  parameter int N         = 8,
  parameter bit RESET_VAL = 1'b1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] ko_in,
  output logic         ko
);
  // Number of signals at tree level l (level 0 = the inputs).
  function automatic int width_at(int l);
    int w = N;
    for (int i = 0; i < l; i++) w = (w + 3) / 4;
    return w;
  endfunction

  function automatic int depth();
    int l = 0;
    while (width_at(l) > 1) l++;
    return l;
  endfunction

  localparam int DEPTH = depth();

  logic [DEPTH:0][N-1:0] lvl;
  assign lvl[0] = ko_in;

  for (genvar l = 1; l <= DEPTH; l++) begin : g_lvl
    localparam int NI = width_at(l - 1);
    localparam int NG = width_at(l);
    for (genvar g = 0; g < NG; g++) begin : g_gate
      localparam int K = (NI - 4 * g >= 4) ? 4 : NI - 4 * g;
      if (K == 4) begin : g4
        ncl_gate #(.FN(TH44), .RESET_VAL(RESET_VAL)) u (.clk, .rst, .in(lvl[l-1][4*g +: 4]), .z(lvl[l][g]));
      end else if (K == 3) begin : g3
        ncl_gate #(.FN(TH33), .RESET_VAL(RESET_VAL)) u (.clk, .rst, .in(lvl[l-1][4*g +: 3]), .z(lvl[l][g]));
      end else if (K == 2) begin : g2
        ncl_gate #(.FN(TH22), .RESET_VAL(RESET_VAL)) u (.clk, .rst, .in(lvl[l-1][4*g +: 2]), .z(lvl[l][g]));
      end else begin : g1
        ncl_gate #(.FN(TH12), .RESET_VAL(RESET_VAL)) u (.clk, .rst, .in({1'b0, lvl[l-1][4*g]}), .z(lvl[l][g]));
      end
    end
    if (NG < N) begin : g_pad
      assign lvl[l][N-1:NG] = '0;
    end
  end

  assign ko = lvl[DEPTH][0];
endmodule
