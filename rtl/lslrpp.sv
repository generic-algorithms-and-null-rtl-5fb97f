// lslrpp - least significant partial product of the last row of the 2's complement quad-rail multiplier.
//
// The lowest bit of the complemented binary row N-1 lies one bit above the last row's base, so it is
// carried as a dual-rail signal of value 0 or 2:  C = 2 not(x1 y0), with md = (y1 y0), mr = (x1 x0).
// Rail 0 of c means 0 and rail 1 means 2. The function follows the document; the insides are the
// library's generic minterm form (ncl_dims).
//
// Timing: two gate delays (clk cycles) from the later input to c.
module lslrpp
  import ncl_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  qr_t  md,      // multiplicand digit
  input  qr_t  mr,      // multiplier digit
  output dr_t  c        // rail0 = 0, rail1 = 2
);
  // Output values for every combination of input digits; output 0 in bits [8m+3:8m], output 1 above.
  function automatic logic [2047:0] pp_table();
    logic [2047:0] t = '0;
    for (int m = 0; m < 16; m++) begin
      logic [1:0] y, x;
      int v;
      y = 2'(m % 4); x = 2'(m / 4);
      v = 2 * int'(!(x[1] && y[0]));
      t[8*m +: 4] = 4'(v / 2);                 // rail: 0 -> value 0, 1 -> value 2
    end
    return t;
  endfunction

  logic [3:0] y0, y1;
  ncl_dims #(.NIN(2), .IR0(4), .IR1(4), .IR2(1), .IR3(1), .OR0(2), .OR1(0), .OTAB(pp_table())) u_core (
    .clk, .rst, .a(md), .b(mr), .c(4'b0), .d(4'b0), .y0, .y1);
  assign c = y0[1:0];
  logic unused;
  assign unused = ^{y0[3:2], y1};
endmodule
