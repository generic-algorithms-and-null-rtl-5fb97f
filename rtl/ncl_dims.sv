// ncl_dims - generic two-level NCL realisation of a function of up to four 1-of-n operands.
//
// For every combination of one rail from each operand (a "minterm") there is one C-element (a THnn gate,
// n = number of operands, n <= 4): it asserts when all of its rails are asserted and releases when all are
// low. Each output rail is a TH1n gate (an OR with hysteresis) over the minterms that map to that output
// value. Every output transition therefore waits for a complete DATA or a complete NULL set on all
// operands: the circuit is input-complete and observable by construction (delay-insensitive minterm
// synthesis). The quad-rail adders and partial-product generators of this library use it with their own
// value tables.
//
// Operand k has IRk rails (1..4) and uses the low IRk bits of its port; unused operands are ignored.
// OTAB holds, for minterm m = i0 + IR0*(i1 + IR1*(i2 + IR2*i3)) (ik = asserted rail of operand k), the
// value of output 0 in bits [8m+3:8m] and of output 1 in bits [8m+7:8m+4]. Output k has ORk rails
// (0 = output unused) and drives the low ORk bits of yk.
//
// Timing: two gate delays, i.e. an output rail rises (or falls) two clk cycles after the last operand
// rail does. rst (synchronous, active high) clears every gate to NULL.
module ncl_dims #(
  parameter int           NIN  = 2,
  parameter int           IR0  = 4,
  parameter int           IR1  = 4,
  parameter int           IR2  = 1,
  parameter int           IR3  = 1,
  parameter int           OR0  = 4,
  parameter int           OR1  = 2,
  parameter logic [2047:0] OTAB = '0
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic [3:0] c,
  input  logic [3:0] d,
  output logic [3:0] y0,
  output logic [3:0] y1
);
  localparam int R0 = IR0;
  localparam int R1 = (NIN > 1) ? IR1 : 1;
  localparam int R2 = (NIN > 2) ? IR2 : 1;
  localparam int R3 = (NIN > 3) ? IR3 : 1;
  localparam int NM = R0 * R1 * R2 * R3;

  // Minterm mask of output o, rail r.
  function automatic logic [255:0] rail_mask(int o, int r);
    logic [255:0] m = '0;
    for (int i = 0; i < NM; i++)
      if (int'(OTAB[8*i + 4*o +: 4]) == r) m[i] = 1'b1;
    return m;
  endfunction

  logic [3:0] av, bv, cv, dv;   // operands with the unused ones forced to "no rail"
  assign av = a;
  assign bv = (NIN > 1) ? b : 4'b0;
  assign cv = (NIN > 2) ? c : 4'b0;
  assign dv = (NIN > 3) ? d : 4'b0;

  logic [255:0] mt;   // minterm C-elements
  for (genvar m = 0; m < 256; m++) begin : g_mt
    if (m < NM) begin : g_used
      localparam int I0 = m % R0;
      localparam int I1 = (m / R0) % R1;
      localparam int I2 = (m / (R0 * R1)) % R2;
      localparam int I3 = m / (R0 * R1 * R2);
      logic all_on, all_off;
      assign all_on  = av[I0] && (NIN < 2 || bv[I1]) && (NIN < 3 || cv[I2]) && (NIN < 4 || dv[I3]);
      assign all_off = !av[I0] && !bv[I1] && !cv[I2] && !dv[I3];
      always_ff @(posedge clk) begin
        if (rst)          mt[m] <= 1'b0;
        else if (all_on)  mt[m] <= 1'b1;
        else if (all_off) mt[m] <= 1'b0;
      end
    end else begin : g_unused
      assign mt[m] = 1'b0;
    end
  end

  // Output rails: TH1n over their minterms.
  for (genvar r = 0; r < 4; r++) begin : g_out
    if (r < OR0) begin : g_y0
      localparam logic [255:0] M0 = rail_mask(0, r);
      always_ff @(posedge clk) begin
        if (rst) y0[r] <= 1'b0;
        else     y0[r] <= |(mt & M0);
      end
    end else begin : g_y0_unused
      assign y0[r] = 1'b0;
    end
    if (r < OR1) begin : g_y1
      localparam logic [255:0] M1 = rail_mask(1, r);
      always_ff @(posedge clk) begin
        if (rst) y1[r] <= 1'b0;
        else     y1[r] <= |(mt & M1);
      end
    end else begin : g_y1_unused
      assign y1[r] = 1'b0;
    end
  end
endmodule
