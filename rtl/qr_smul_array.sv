// qr_smul_array - generic 2's complement quad-rail NCL array multiplier (combinational NCL, no registers).
//
// Built on the modified Baugh-Wooley scheme: in the binary partial-product array the MSB of every row but
// the last is complemented, every bit of the last row but its MSB is complemented, and a logic 1 is added
// at bits M_W-1, N_W-1 and M_W+N_W-1 (at bit M_W instead of the first two when M_W = N_W). Each quad-rail
// row packs two binary rows (C = M_W/2 multiplicand digits, R = N_W/2 multiplier digits):
//   rows 0..R-2: q33mul for digits 0..C-2 and mspp for the complemented top digit;
//   row R-1:     lrpp for digits 0..C-2 (its PPH is quad-rail and weighs one digit more), mslrpp for the
//                top digit (PPH = 2 or 3, including the logic 1 at bit M_W+N_W-1), and lslrpp for the lowest
//                bit of the complemented row, C = 0 or 2 at digit R-1.
// The carry-save levels are those of qr_umul; the last level uses q3332add inside the row (its PPH is
// quad-rail) and q332add, q332dadd or q3322add in its top column. The ripple-carry adder starts one digit
// lower, at digit R-1, where q3d02add (M_W = N_W) or q3d02cadd (M_W > N_W, adding the logic 1 at bit N_W-1)
// adds C. At digit C-1 q32d02add adds the logic 1 at bit M_W-1 (M_W > N_W) and is followed by a q322add
// that takes its three-rail carry; at digit C q32d01add adds the logic 1 at bit M_W (M_W = N_W). q2dd23add
// adds mslrpp's PPH at the top digit. The product is taken modulo 2^(M_W+N_W).
// The scheme, the components and their roles follow the document; the placement of each adder is this
// design's own. M_W >= N_W is required; a narrower multiplicand is handled by swapping the operands.
//
// Timing: two gate delays per component; about 2 * (R + C + 1) clk cycles in the worst case.
module qr_smul_array
  import ncl_pkg::*;
#(
  parameter int M_W = 8,   // multiplicand width in bits (2's complement)
  parameter int N_W = 8    // multiplier width in bits (2's complement)
) (
  input  logic                   clk,
  input  logic                   rst,
  input  qr_t [M_W/2-1:0]        y,
  input  qr_t [N_W/2-1:0]        x,
  output qr_t [(M_W+N_W)/2-1:0]  p
);
  localparam int C = M_W / 2;
  localparam int R = N_W / 2;

  if (M_W % 2 != 0 || N_W % 2 != 0 || R < 2 || M_W < N_W) begin : g_bad_size
    $error("qr_smul_array: M_W and N_W must be even, N_W >= 4 and M_W >= N_W");
  end

  qr_t ppl [R][C];
  tr_t pph [R][C];      // rows 0..R-2 (three-rail)
  qr_t lr_pph [C];      // last row, lrpp PPH of digit j (weight R-1+j+1); index C-1 unused
  dr_t top_pph;         // mslrpp PPH, values 2/3, weight R-1+C
  dr_t lsc;             // lslrpp C, values 0/2, weight R-1
  qr_t s   [R][C];
  tr_t c   [R][C];
  tr_t rip [C];

  // ---------------- partial products ----------------
  for (genvar i = 0; i < R - 1; i++) begin : g_row
    for (genvar j = 0; j < C; j++) begin : g_col
      if (j < C - 1) begin : g_u
        q33mul u_pp (.clk, .rst, .a(y[j]), .b(x[i]), .ppl(ppl[i][j]), .pph(pph[i][j]));
      end else begin : g_ms
        mspp u_pp (.clk, .rst, .md(y[j]), .mr(x[i]), .pph(pph[i][j]), .ppl(ppl[i][j]));
      end
    end
  end
  for (genvar j = 0; j < C - 1; j++) begin : g_last
    lrpp u_pp (.clk, .rst, .md_i(y[j]), .md_i1(y[j+1]), .mr(x[R-1]), .pph(lr_pph[j]), .ppl(ppl[R-1][j]));
    assign pph[R-1][j] = '0;
  end
  assign lr_pph[C-1] = '0;
  assign pph[R-1][C-1] = '0;
  mslrpp u_mslrpp (.clk, .rst, .md(y[C-1]), .mr(x[R-1]), .pph(top_pph), .ppl(ppl[R-1][C-1]));
  lslrpp u_lslrpp (.clk, .rst, .md(y[0]), .mr(x[R-1]), .c(lsc));

  // ---------------- carry-save levels ----------------
  for (genvar j = 0; j < C; j++) begin : g_l0
    assign s[0][j] = ppl[0][j];
    assign c[0][j] = pph[0][j];
  end

  for (genvar i = 1; i < R; i++) begin : g_lvl
    for (genvar j = 0; j < C; j++) begin : g_cell
      if (j == 0) begin : g_first
        q332add u_add (.clk, .rst, .a(ppl[i][0]), .b(s[i-1][1]), .c(c[i-1][0]), .s(s[i][0]), .co(c[i][0]));
      end else if (i < R - 1) begin : g_inner_row
        if (j < C - 1) begin : g_mid
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
      end else begin : g_last_row
        if (j < C - 1) begin : g_mid
          q3332add u_add (.clk, .rst, .a(ppl[i][j]), .b(s[i-1][j+1]), .c(lr_pph[j-1]), .d(c[i-1][j]),
                          .s(s[i][j]), .co(c[i][j]));
        end else if (i == 1) begin : g_top1
          q332add u_add (.clk, .rst, .a(ppl[i][j]), .b(lr_pph[j-1]), .c(c[i-1][j]), .s(s[i][j]), .co(c[i][j]));
        end else if (i == 2) begin : g_top2
          q332dadd u_add (.clk, .rst, .a(ppl[i][j]), .b(lr_pph[j-1]), .c(pph[i-1][j]), .d(c[i-1][j][1:0]),
                          .s(s[i][j]), .co(c[i][j]));
        end else begin : g_topn
          q3322add u_add (.clk, .rst, .a(ppl[i][j]), .b(lr_pph[j-1]), .c(pph[i-1][j]), .d(c[i-1][j]),
                          .s(s[i][j]), .co(c[i][j]));
        end
      end
    end
  end

  for (genvar i = 0; i < R - 1; i++) begin : g_low
    assign p[i] = s[i][0];
  end

  // ---------------- ripple-carry adder, digits R-1 .. R+C-1 ----------------
  // Digit R-1: last level's column-0 sum + C (+ the logic 1 at bit N_W-1 when M_W > N_W).
  begin : g_rca0
    dr_t co;
    if (M_W > N_W) begin : g_c
      q3d02cadd u_add (.clk, .rst, .a(s[R-1][0]), .b(lsc), .s(p[R-1]), .co(co));
    end else begin : g_n
      q3d02add u_add (.clk, .rst, .a(s[R-1][0]), .b(lsc), .s(p[R-1]), .co(co));
    end
    assign rip[0] = {1'b0, co};
  end

  for (genvar j = 1; j < C; j++) begin : g_rca
    localparam int DIG = R - 1 + j;
    if (M_W > N_W && DIG == C - 1) begin : g_one_m
      q32d02add u_add (.clk, .rst, .a(s[R-1][j]), .b(c[R-1][j-1]), .c(rip[j-1][1:0]), .s(p[DIG]), .co(rip[j]));
    end else if (M_W > N_W && DIG == C) begin : g_after
      dr_t co;
      q322add u_add (.clk, .rst, .a(s[R-1][j]), .b(c[R-1][j-1]), .c(rip[j-1]), .s(p[DIG]), .co(co));
      assign rip[j] = {1'b0, co};
    end else if (M_W == N_W && DIG == C) begin : g_one_mn
      dr_t co;
      q32d01add u_add (.clk, .rst, .a(s[R-1][j]), .b(c[R-1][j-1]), .c(rip[j-1][1:0]), .s(p[DIG]), .co(co));
      assign rip[j] = {1'b0, co};
    end else begin : g_plain
      dr_t co;
      q32dadd u_add (.clk, .rst, .a(s[R-1][j]), .b(c[R-1][j-1]), .c(rip[j-1][1:0]), .s(p[DIG]), .co(co));
      assign rip[j] = {1'b0, co};
    end
  end

  // Top digit: last carry + ripple + mslrpp's PPH (2 or 3). The carry out is bit M_W+N_W and is dropped.
  dr_t top_co;
  q2dd23add u_top (.clk, .rst, .a(c[R-1][C-1]), .b(rip[C-1][1:0]), .c(top_pph), .s(p[R+C-1]), .co(top_co));

  logic unused;
  assign unused = ^{top_co, rip[C-1][2], lr_pph[C-1], pph[R-1][C-1], c[R-1][C-1][2]};
endmodule
