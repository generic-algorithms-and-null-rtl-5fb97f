// q322dadd - NCL quad-rail adder Q322Dadd: adds quad-rail, three-rail, three-rail, dual-rail.
//
// Sum is the total modulo 4 on a quad-rail output; Carry is the total divided by 4, on a three-rail output
// (the largest total is 8). It is used in the top column of the second carry-save level.
// The operands, their value sets and the carry width follow the document's description of the adder;
// the insides are this library's generic minterm form (ncl_dims): one C-element per combination of
// operand rails and an OR per output rail, instead of the document's hand-optimised gate network.
//
// Timing: Sum and Carry turn DATA two clk cycles (gate delays) after the last operand turns DATA, and
// NULL two cycles after the last operand turns NULL. rst clears the outputs to NULL.
module q322dadd
  import ncl_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  qr_t a,   // quad-rail, value 0..3
  input  tr_t b,   // three-rail, value 0..2
  input  tr_t c,   // three-rail, value 0..2
  input  dr_t d,   // dual-rail, value 0..1
  output qr_t  s,    // Sum
  output tr_t  co    // Carry
);
  localparam int NIN   = 4;
  localparam int CONST = 0;
  localparam int RAILS  [4] = '{4, 3, 3, 2};
  localparam int OFFSET [4] = '{0, 0, 0, 0};
  localparam int STEP   [4] = '{1, 1, 1, 1};

  // Value table: for each combination of operand rails, the sum digit and the carry.
  function automatic logic [2047:0] add_table();
    logic [2047:0] t = '0;
    int nm = 1;
    for (int k = 0; k < NIN; k++) nm *= RAILS[k];
    for (int m = 0; m < nm; m++) begin
      int v = CONST;
      int rest = m;
      for (int k = 0; k < NIN; k++) begin
        v += OFFSET[k] + STEP[k] * (rest % RAILS[k]);
        rest /= RAILS[k];
      end
      t[8*m +: 4]     = 4'(v % 4);
      t[8*m + 4 +: 4] = 4'(v / 4);
    end
    return t;
  endfunction

  logic [3:0] y0, y1;
  ncl_dims #(
    .NIN(NIN), .IR0(RAILS[0]), .IR1(RAILS[1]), .IR2(RAILS[2]), .IR3(RAILS[3]),
    .OR0(4), .OR1(3), .OTAB(add_table())
  ) u_core (
    .clk, .rst, .a(a), .b(4'(b)), .c(4'(c)), .d(4'(d)), .y0, .y1);

  assign s  = y0;
  assign co = y1[2:0];

  logic unused;
  assign unused = ^y1[3:3];
endmodule
