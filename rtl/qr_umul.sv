// qr_umul - generic unsigned quad-rail NCL array multiplier (combinational NCL, no registers).
//
// The multiplicand y has C = M_W/2 quad-rail digits and the multiplier x has R = N_W/2. Each digit pair is
// multiplied by a q33mul, giving PPL (quad-rail, weight of digit i+j) and PPH (three-rail, weight i+j+1).
// One quad-rail partial-product row thus stands for two binary rows, so only R-1 carry-save levels are
// needed (a binary array needs N_W-1). Level i (1..R-1), column j adds, at digit i+j:
//   PPL(i,j), PPH(i,j-1), the sum of level i-1 at that digit, and the carry of level i-1 into that digit,
// with q3322add inside the row, q332add in column 0, and in the top column q322add (level 1), q322dadd
// (level 2) or q3222add (level 3 and up), which also take the leftover PPH of the row above. Digits 0..R-1
// leave the array directly; digits R..R+C-1 come from a ripple-carry adder of q32add, q32dadd and, on top,
// q2ddadd (R = 2) or q22dadd (R > 2). The product has (M_W+N_W)/2 digits.
// The algorithm (digit products, carry-save array, ripple-carry adder, the list of adders) follows the
// document; the placement of each adder in the array is this design's own.
//
// Timing: every adder and q33mul is two gate delays deep, so a DATA or NULL wavefront crosses the array in
// about 2 * (1 + R - 1 + C) clk cycles in the worst case; fewer when carries stop early.
// Requires M_W and N_W even and at least 4.
module qr_umul
  import ncl_pkg::*;
#(
  parameter int M_W = 8,   // multiplicand width in bits
  parameter int N_W = 8    // multiplier width in bits
) (
  input  logic                         clk,
  input  logic                         rst,
  input  qr_t [M_W/2-1:0]              y,
  input  qr_t [N_W/2-1:0]              x,
  output qr_t [(M_W+N_W)/2-1:0]        p
);
  localparam int C = M_W / 2;
  localparam int R = N_W / 2;

  if (M_W % 2 != 0 || N_W % 2 != 0 || C < 2 || R < 2) begin : g_bad_size
    $error("qr_umul: M_W and N_W must be even and at least 4");
  end

  qr_t ppl [R][C];
  tr_t pph [R][C];
  qr_t s   [R][C];   // level i, column j: sum digit at weight i+j
  tr_t c   [R][C];   // level i, column j: carry into weight i+j+1 (dual-rail carries use rails 1:0)
  tr_t rip [C];      // ripple carry of the final adder (dual-rail in rails 1:0)

  // Partial products
  for (genvar i = 0; i < R; i++) begin : g_row
    for (genvar j = 0; j < C; j++) begin : g_col
      q33mul u_pp (.clk, .rst, .a(y[j]), .b(x[i]), .ppl(ppl[i][j]), .pph(pph[i][j]));
    end
  end

  // Level 0 is the first row itself.
  for (genvar j = 0; j < C; j++) begin : g_l0
    assign s[0][j] = ppl[0][j];
    assign c[0][j] = pph[0][j];
  end

  // Carry-save levels
  for (genvar i = 1; i < R; i++) begin : g_lvl
    for (genvar j = 0; j < C; j++) begin : g_cell
      if (j == 0) begin : g_first
        q332add u_add (.clk, .rst, .a(ppl[i][0]), .b(s[i-1][1]), .c(c[i-1][0]), .s(s[i][0]), .co(c[i][0]));
      end else if (j < C - 1) begin : g_mid
        q3322add u_add (.clk, .rst, .a(ppl[i][j]), .b(s[i-1][j+1]), .c(pph[i][j-1]), .d(c[i-1][j]),
                        .s(s[i][j]), .co(c[i][j]));
      end else if (i == 1) begin : g_top1
        dr_t co;
        q322add u_add (.clk, .rst, .a(ppl[i][j]), .b(pph[i][j-1]), .c(c[i-1][j]), .s(s[i][j]), .co(co));
        assign c[i][j] = {1'b0, co};
      end else if (i == 2) begin : g_top2
        q322dadd u_add (.clk, .rst, .a(ppl[i][j]), .b(pph[i][j-1]), .c(pph[i-1][j]), .d(c[i-1][j][1:0]),
                        .s(s[i][j]), .co(c[i][j]));
      end else begin : g_topn
        q3222add u_add (.clk, .rst, .a(ppl[i][j]), .b(pph[i][j-1]), .c(pph[i-1][j]), .d(c[i-1][j]),
                        .s(s[i][j]), .co(c[i][j]));
      end
    end
  end

  // Digits 0..R-1
  for (genvar i = 0; i < R; i++) begin : g_low
    assign p[i] = s[i][0];
  end

  // Ripple-carry adder for digits R..R+C-1
  assign rip[0] = '0;
  for (genvar j = 1; j < C; j++) begin : g_rca
    dr_t co;
    if (j == 1) begin : g_first
      q32add u_add (.clk, .rst, .a(s[R-1][j]), .b(c[R-1][j-1]), .s(p[R-1+j]), .co(co));
    end else begin : g_next
      q32dadd u_add (.clk, .rst, .a(s[R-1][j]), .b(c[R-1][j-1]), .c(rip[j-1][1:0]), .s(p[R-1+j]), .co(co));
    end
    assign rip[j] = {1'b0, co};
  end

  // Top digit: leftover PPH of the last row + last carry + ripple. Its carry-out is always 0.
  dr_t top_co;
  if (R == 2) begin : g_top_d
    q2ddadd u_add (.clk, .rst, .a(pph[R-1][C-1]), .b(c[R-1][C-1][1:0]), .c(rip[C-1][1:0]),
                   .s(p[R+C-1]), .co(top_co));
  end else begin : g_top_t
    q22dadd u_add (.clk, .rst, .a(pph[R-1][C-1]), .b(c[R-1][C-1]), .c(rip[C-1][1:0]),
                   .s(p[R+C-1]), .co(top_co));
  end

  logic unused;
  assign unused = ^{top_co, rip[0], rip[C-1][2]};
endmodule
