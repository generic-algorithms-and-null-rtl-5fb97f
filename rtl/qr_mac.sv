// qr_mac - generic unsigned quad-rail NCL multiply-and-accumulate unit: acc <= acc + y * x.
//
// Datapath: an input register holds the multiplicand y (M_W bits, M_W/2 quad-rail digits) and the
// multiplier x (N_W bits); qr_umul forms the product and qr_accumulator adds it to the fed-back value; an
// output register holds the new value (A_W bits) and the overflow flag ov. The value returns to the
// accumulator through two more registers, so that the feedback ring holds three registers and cannot
// deadlock; the last of them resets to DATA0 (value 0), all other registers to NULL. Each register stage
// has full-word completion (ncl_completion over the Ko of its registers).
//
// Handshake (NCL four-phase, 1 = request for data "rfd", 0 = request for NULL "rfn"):
//   ko - the input register's request to the producer: present DATA on x and y while ko = 1, then NULL
//        while ko = 0.
//   ki - the consumer's request: acc/ov turn DATA while ki = 1, and the consumer returns ki = 0 once it
//        has taken them, after which they go NULL.
// Ring wiring (this design's choice; the document gives the register count and reset values only):
// output register Ki = TH22(ki, Ko of feedback register 1); feedback register 1 Ki = Ko of feedback
// register 2; feedback register 2 and input register Ki = Ko of the output register.
//
// Timing: one operation (DATA then NULL) takes on the order of 2 * (R + C + A_W/2) + 20 clk cycles,
// dominated by the two ripple-carry adders.
module qr_mac
  import ncl_pkg::*;
#(
  parameter int A_W = 24,   // accumulator width in bits
  parameter int M_W = 8,    // multiplicand (y) width in bits
  parameter int N_W = 8     // multiplier (x) width in bits
) (
  input  logic                 clk,
  input  logic                 rst,
  input  qr_t [M_W/2-1:0]      y,
  input  qr_t [N_W/2-1:0]      x,
  output logic                 ko,
  input  logic                 ki,
  output qr_t [A_W/2-1:0]      acc,
  output dr_t                  ov
);
  localparam int C   = M_W / 2;
  localparam int R   = N_W / 2;
  localparam int A_Q = A_W / 2;
  localparam int P_Q = C + R;

  if (A_W % 2 != 0 || A_W < M_W + N_W) begin : g_bad_size
    $error("qr_mac: A_W must be even and at least M_W + N_W");
  end

  // ---------------- input register ----------------
  qr_t [C-1:0]   y_r;
  qr_t [R-1:0]   x_r;
  logic [P_Q-1:0] in_ko;
  logic          out_ko;   // output register stage completion

  for (genvar k = 0; k < C; k++) begin : g_in_y
    ncl_reg #(.RAILS(4)) u_reg (.clk, .rst, .d(y[k]), .ki(out_ko), .q(y_r[k]), .ko(in_ko[k]));
  end
  for (genvar k = 0; k < R; k++) begin : g_in_x
    ncl_reg #(.RAILS(4)) u_reg (.clk, .rst, .d(x[k]), .ki(out_ko), .q(x_r[k]), .ko(in_ko[C+k]));
  end
  ncl_completion #(.N(P_Q), .RESET_VAL(1'b1)) u_in_cd (.clk, .rst, .ko_in(in_ko), .ko(ko));

  // ---------------- multiplier and accumulator ----------------
  qr_t [P_Q-1:0] prod;
  qr_t [A_Q-1:0] fb2_q;
  qr_t [A_Q-1:0] sum;
  dr_t           sum_ov;

  qr_umul #(.M_W(M_W), .N_W(N_W)) u_mul (.clk, .rst, .y(y_r), .x(x_r), .p(prod));
  qr_accumulator #(.P_Q(P_Q), .A_Q(A_Q)) u_acc (.clk, .rst, .p(prod), .acc_in(fb2_q), .acc_out(sum), .ov(sum_ov));

  // ---------------- output register ----------------
  logic             out_ki;
  logic [A_Q:0]     out_kos;
  logic             fb1_ko;

  ncl_gate #(.FN(TH22), .RESET_VAL(1'b1)) u_out_ki (.clk, .rst, .in({fb1_ko, ki}), .z(out_ki));
  for (genvar k = 0; k < A_Q; k++) begin : g_out
    ncl_reg #(.RAILS(4)) u_reg (.clk, .rst, .d(sum[k]), .ki(out_ki), .q(acc[k]), .ko(out_kos[k]));
  end
  ncl_reg #(.RAILS(2)) u_out_ov (.clk, .rst, .d(sum_ov), .ki(out_ki), .q(ov), .ko(out_kos[A_Q]));
  ncl_completion #(.N(A_Q + 1), .RESET_VAL(1'b1)) u_out_cd (.clk, .rst, .ko_in(out_kos), .ko(out_ko));

  // ---------------- feedback registers ----------------
  qr_t [A_Q-1:0]  fb1_q;
  logic [A_Q-1:0] fb1_kos, fb2_kos;
  logic           fb2_ko;

  for (genvar k = 0; k < A_Q; k++) begin : g_fb
    ncl_reg #(.RAILS(4), .RESET_DATA0(1'b0)) u_fb1 (.clk, .rst, .d(acc[k]), .ki(fb2_ko), .q(fb1_q[k]), .ko(fb1_kos[k]));
    ncl_reg #(.RAILS(4), .RESET_DATA0(1'b1)) u_fb2 (.clk, .rst, .d(fb1_q[k]), .ki(out_ko), .q(fb2_q[k]), .ko(fb2_kos[k]));
  end
  ncl_completion #(.N(A_Q), .RESET_VAL(1'b1)) u_fb1_cd (.clk, .rst, .ko_in(fb1_kos), .ko(fb1_ko));
  ncl_completion #(.N(A_Q), .RESET_VAL(1'b0)) u_fb2_cd (.clk, .rst, .ko_in(fb2_kos), .ko(fb2_ko));
endmodule
