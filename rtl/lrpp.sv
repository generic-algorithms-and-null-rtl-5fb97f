// lrpp - inner partial products of the last row of the 2's complement quad-rail multiplier.
//
// For multiplicand digit position i of the last row (mr = (x1 x0) is the multiplier's top digit):
//   PPL = x0 * MD_i                                           (quad-rail, weight of digit i)
//   PPH = not(x1 * MD_i bit1) + 2 not(x1 * MD_i+1 bit0)       (quad-rail, weight of digit i+1)
// The complemented binary row N-1 is shifted by one bit against the quad-rail digits, so its bits straddle
// two multiplicand digits; PPH therefore reads MD_i and MD_i+1. The function follows the document; the
// insides are the library's generic minterm form (ncl_dims), three operands, 64 minterms.
//
// Timing: two gate delays (clk cycles) from the last input to both outputs.
module lrpp
  import ncl_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  qr_t  md_i,    // multiplicand digit i
  input  qr_t  md_i1,   // multiplicand digit i+1
  input  qr_t  mr,      // multiplier top digit
  output qr_t  pph,
  output qr_t  ppl
);
  // Output values for every combination of input digits; output 0 in bits [8m+3:8m], output 1 above.
  function automatic logic [2047:0] pp_table();
    logic [2047:0] t = '0;
    for (int m = 0; m < 64; m++) begin
      logic [1:0] mdi, mdi1, r;
      logic [3:0] lo, hi;
      mdi = 2'(m % 4); mdi1 = 2'((m / 4) % 4); r = 2'(m / 16);
      lo = r[0] ? 4'(mdi) : 4'd0;
      hi = 4'(!(r[1] && mdi[1])) + 4'(2 * int'(!(r[1] && mdi1[0])));
      t[8*m +: 4] = lo;
      t[8*m + 4 +: 4] = hi;
    end
    return t;
  endfunction

  logic [3:0] y0, y1;
  ncl_dims #(.NIN(3), .IR0(4), .IR1(4), .IR2(4), .IR3(1), .OR0(4), .OR1(4), .OTAB(pp_table())) u_core (
    .clk, .rst, .a(md_i), .b(md_i1), .c(mr), .d(4'b0), .y0, .y1);
  assign ppl = y0;
  assign pph = y1;
endmodule
