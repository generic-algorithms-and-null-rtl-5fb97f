// mslrpp - most significant partial product of the last row of the 2's complement quad-rail multiplier.
//
// The last quad-rail row holds binary row N-2 (normal, its MSB complemented) and row N-1 (complemented
// except its MSB). Its most significant digit, with md = (y1 y0) and mr = (x1 x0), is
//   PPL = y0 x0 + 2 not(y1 x0)        (quad-rail, 0..3)
//   PPH = 2 + y1 x1                    (dual-rail: rail0 = 2, rail1 = 3)
// where the constant 2 in PPH is the logic 1 added at bit M+N-1 of the Baugh-Wooley scheme.
// The function follows the document; the insides are the library's generic minterm form (ncl_dims).
//
// Timing: two gate delays (clk cycles) from the later input to both outputs.
module mslrpp
  import ncl_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  qr_t  md,      // multiplicand digit
  input  qr_t  mr,      // multiplier digit
  output dr_t  pph,     // rail0 = 2, rail1 = 3
  output qr_t  ppl
);
  // Output values for every combination of input digits; output 0 in bits [8m+3:8m], output 1 above.
  function automatic logic [2047:0] pp_table();
    logic [2047:0] t = '0;
    for (int m = 0; m < 16; m++) begin
      logic [1:0] y, x;
      int v;
      y = 2'(m % 4); x = 2'(m / 4);
      v = int'(y[0] && x[0]) + 2 * int'(!(y[1] && x[0]));
      t[8*m +: 4] = 4'(v);                       // PPL
      t[8*m + 4 +: 4] = 4'(int'(y[1] && x[1]));     // PPH rail: 0 -> value 2, 1 -> value 3
    end
    return t;
  endfunction

  logic [3:0] y0, y1;
  ncl_dims #(.NIN(2), .IR0(4), .IR1(4), .IR2(1), .IR3(1), .OR0(4), .OR1(2), .OTAB(pp_table())) u_core (
    .clk, .rst, .a(md), .b(mr), .c(4'b0), .d(4'b0), .y0, .y1);
  assign ppl = y0;
  assign pph = y1[1:0];
  logic unused;
  assign unused = ^y1[3:2];
endmodule
