// mspp - most significant partial product of a row of the 2's complement quad-rail multiplier.
//
// In the modified Baugh-Wooley scheme the most significant bit of every binary partial-product row but the
// last is complemented. One quad-rail row holds two binary rows, so its most significant digit sums four
// binary terms: with multiplicand digit md = (y1 y0) and multiplier digit mr = (x1 x0) it is
//   v = y0 x0 + 2 not(y1 x0) + 2 y0 x1 + 4 not(y1 x1)      (0..9)
// which leaves as PPL = v mod 4 (quad-rail) and PPH = v div 4 (three-rail), like q33mul's outputs.
// The function and the table of values follow the document; the insides are the library's generic
// minterm form (ncl_dims), not the document's gate network.
//
// Timing: both outputs two gate delays (clk cycles) after the later input; NULL likewise.
module mspp
  import ncl_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  qr_t  md,      // multiplicand digit
  input  qr_t  mr,      // multiplier digit
  output tr_t  pph,
  output qr_t  ppl
);
  // Output values for every combination of input digits; output 0 in bits [8m+3:8m], output 1 above.
  function automatic logic [2047:0] pp_table();
    logic [2047:0] t = '0;
    for (int m = 0; m < 16; m++) begin
      logic [1:0] y, x;
      int v;
      y = 2'(m % 4); x = 2'(m / 4);
      v = int'(y[0] && x[0]) + 2 * int'(!(y[1] && x[0])) + 2 * int'(y[0] && x[1]) + 4 * int'(!(y[1] && x[1]));
      t[8*m +: 4] = 4'(v % 4);      // PPL
      t[8*m + 4 +: 4] = 4'(v / 4);  // PPH
    end
    return t;
  endfunction

  logic [3:0] y0, y1;
  ncl_dims #(.NIN(2), .IR0(4), .IR1(4), .IR2(1), .IR3(1), .OR0(4), .OR1(3), .OTAB(pp_table())) u_core (
    .clk, .rst, .a(md), .b(mr), .c(4'b0), .d(4'b0), .y0, .y1);
  assign ppl = y0;
  assign pph = y1[2:0];
  logic unused;
  assign unused = ^y1[3:3];
endmodule
