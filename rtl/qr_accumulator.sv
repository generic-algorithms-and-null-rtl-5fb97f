// qr_accumulator - quad-rail NCL ripple-carry accumulator adder of the MAC (combinational NCL).
//
// Adds the P_Q-digit product p to the A_Q-digit previous value acc_in: q33add in the least significant
// digit, q33dadd in digits 1..P_Q-1 (both operands plus the ripple carry), and q3dadd above the product
// width (previous value plus carry). The carry out of the top digit is the overflow flag ov (dual-rail:
// DATA1 when the sum exceeded 4^A_Q - 1); the sum wraps modulo 4^A_Q. The cell sequence follows the
// document's accumulator drawing (12 cells for the 24+8x8 MAC); reading the last carry as the overflow
// flag is this design's interpretation of "if the accumulator exceeds its maximum value, OV is asserted".
//
// Timing: two gate delays (clk cycles) per digit on the carry path; at most 2 * A_Q cycles. Requires
// A_Q >= P_Q >= 2.
module qr_accumulator
  import ncl_pkg::*;
#(
  parameter int P_Q = 8,    // product digits
  parameter int A_Q = 12    // accumulator digits
) (
  input  logic            clk,
  input  logic            rst,
  input  qr_t [P_Q-1:0]   p,
  input  qr_t [A_Q-1:0]   acc_in,
  output qr_t [A_Q-1:0]   acc_out,
  output dr_t             ov
);
  if (A_Q < P_Q || P_Q < 2) begin : g_bad_size
    $error("qr_accumulator: need A_Q >= P_Q >= 2");
  end

  dr_t cy [A_Q];   // carry out of each digit

  q33add u_lsd (.clk, .rst, .a(p[0]), .b(acc_in[0]), .s(acc_out[0]), .co(cy[0]));

  for (genvar k = 1; k < A_Q; k++) begin : g_digit
    if (k < P_Q) begin : g_both
      q33dadd u_add (.clk, .rst, .a(p[k]), .b(acc_in[k]), .c(cy[k-1]), .s(acc_out[k]), .co(cy[k]));
    end else begin : g_acc
      q3dadd u_add (.clk, .rst, .a(acc_in[k]), .b(cy[k-1]), .s(acc_out[k]), .co(cy[k]));
    end
  end

  assign ov = cy[A_Q-1];
endmodule
