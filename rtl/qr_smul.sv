// qr_smul - generic non-pipelined 2's complement quad-rail NCL multiplier: p = y * x.
//
// An input register holds the multiplicand y (M_W bits, M_W/2 quad-rail digits) and the multiplier x
// (N_W bits); qr_smul_array forms the (M_W+N_W)-bit product modulo 2^(M_W+N_W), which an output register
// holds. Both register stages reset to NULL and use full-word completion.
//
// Handshake (1 = rfd, 0 = rfn): ko is the input register's request to the producer (DATA on x, y while
// ko = 1, NULL while ko = 0); ki is the consumer's request to the output register. The input register's Ki
// is the output register's completion, as in a two-register NCL system.
//
// Timing: one DATA/NULL cycle takes about 2 * (2 * (R + C + 1) + 6) clk cycles. M_W >= N_W is required.
module qr_smul
  import ncl_pkg::*;
#(
  parameter int M_W = 8,
  parameter int N_W = 8
) (
  input  logic                   clk,
  input  logic                   rst,
  input  qr_t [M_W/2-1:0]        y,
  input  qr_t [N_W/2-1:0]        x,
  output logic                   ko,
  input  logic                   ki,
  output qr_t [(M_W+N_W)/2-1:0]  p
);
  localparam int C   = M_W / 2;
  localparam int R   = N_W / 2;
  localparam int P_Q = C + R;

  qr_t [C-1:0]    y_r;
  qr_t [R-1:0]    x_r;
  logic [P_Q-1:0] in_ko;
  logic [P_Q-1:0] out_kos;
  logic           out_ko;
  qr_t [P_Q-1:0]  prod;

  for (genvar k = 0; k < C; k++) begin : g_in_y
    ncl_reg #(.RAILS(4)) u_reg (.clk, .rst, .d(y[k]), .ki(out_ko), .q(y_r[k]), .ko(in_ko[k]));
  end
  for (genvar k = 0; k < R; k++) begin : g_in_x
    ncl_reg #(.RAILS(4)) u_reg (.clk, .rst, .d(x[k]), .ki(out_ko), .q(x_r[k]), .ko(in_ko[C+k]));
  end
  ncl_completion #(.N(P_Q), .RESET_VAL(1'b1)) u_in_cd (.clk, .rst, .ko_in(in_ko), .ko(ko));

  qr_smul_array #(.M_W(M_W), .N_W(N_W)) u_mul (.clk, .rst, .y(y_r), .x(x_r), .p(prod));

  for (genvar k = 0; k < P_Q; k++) begin : g_out
    ncl_reg #(.RAILS(4)) u_reg (.clk, .rst, .d(prod[k]), .ki(ki), .q(p[k]), .ko(out_kos[k]));
  end
  ncl_completion #(.N(P_Q), .RESET_VAL(1'b1)) u_out_cd (.clk, .rst, .ko_in(out_kos), .ko(out_ko));
endmodule
