// q33mul - unsigned quad-rail partial-product generator.
//
// Multiplies two quad-rail digits a and b (0..3). The product (0..9) leaves as PPL = a*b mod 4 on a
// quad-rail signal and PPH = a*b div 4 on a three-rail signal (PPH never exceeds 2, so one wire is saved).
// It is a network of NCL threshold gates (ncl_gate) taken from the document's gate-level diagram of this
// component: TH33w2 / TH24comp gates feeding a TH13 for PPL0, TH24comp for PPL1 and PPL3, TH33w2 into a
// TH34w32 for PPL2, TH14 for PPH0, THand0 for PPH1 and TH22 for PPH2. Where the diagram wires one input to
// two gate pins, that input is read as having weight 2.
//
// Timing: PPL is two gate delays (clk cycles) deep and PPH one, as in the document's delay table. PPL
// waits for both digits; PPH may assert early (e.g. PPH0 as soon as either digit is 0 or 1), which the
// NCL weak conditions allow because the complete output set still waits for both inputs.
module q33mul
  import ncl_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  qr_t  a,     // multiplicand digit
  input  qr_t  b,     // multiplier digit
  output qr_t  ppl,   // partial product low
  output tr_t  pph    // partial product high
);
  logic g_a0b, g_b0a, g_even, g_a2b;

  // PPL0: a*b mod 4 == 0
  ncl_gate #(.FN(TH33W2))   u_a0b  (.clk, .rst, .in({b[3], b[1], a[0]}), .z(g_a0b));        // a0 (b1 + b3)
  ncl_gate #(.FN(TH33W2))   u_b0a  (.clk, .rst, .in({a[3], a[1], b[0]}), .z(g_b0a));        // b0 (a1 + a3)
  ncl_gate #(.FN(TH24COMP)) u_even (.clk, .rst, .in({b[2], b[0], a[2], a[0]}), .z(g_even)); // (a0 + a2)(b0 + b2)
  ncl_gate #(.FN(TH13))     u_ppl0 (.clk, .rst, .in({g_even, g_b0a, g_a0b}), .z(ppl[0]));

  // PPL1: (1,1) or (3,3)
  ncl_gate #(.FN(TH24COMP)) u_ppl1 (.clk, .rst, .in({a[3], b[1], b[3], a[1]}), .z(ppl[1]));

  // PPL2: a2 (b1 + b3) + b2 (a1 + a3)
  ncl_gate #(.FN(TH33W2))   u_a2b  (.clk, .rst, .in({b[3], b[1], a[2]}), .z(g_a2b));
  ncl_gate #(.FN(TH34W32))  u_ppl2 (.clk, .rst, .in({a[3], a[1], b[2], g_a2b}), .z(ppl[2]));

  // PPL3: (1,3) or (3,1)
  ncl_gate #(.FN(TH24COMP)) u_ppl3 (.clk, .rst, .in({a[3], b[3], b[1], a[1]}), .z(ppl[3]));

  // PPH
  ncl_gate #(.FN(TH14))     u_pph0 (.clk, .rst, .in({b[1], b[0], a[1], a[0]}), .z(pph[0]));
  ncl_gate #(.FN(THAND0))   u_pph1 (.clk, .rst, .in({b[3], a[3], b[2], a[2]}), .z(pph[1]));
  ncl_gate #(.FN(TH22))     u_pph2 (.clk, .rst, .in({b[3], a[3]}), .z(pph[2]));
endmodule
