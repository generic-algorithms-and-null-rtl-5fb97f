// tb_smul_harness - plays producer and consumer around one qr_smul and checks each product against
// 2's complement integer multiplication modulo 2^(M_W+N_W).
//
// Handshake per operation as for the MAC: wait ko = rfd, DATA in, wait for a complete product, check,
// ki = rfn, wait ko = rfn, NULL in, wait for a NULL product, ki = rfd. In about one operation in three
// the consumer stalls and the product must hold (n_stall). Negative products are counted (n_neg).
// EXHAUSTIVE runs every operand pair, otherwise NRAND random pairs plus the extreme values. With
// DOC_EXAMPLE (6x4 only) the document's example 27 x -7 = -189 is run first.
module tb_smul_harness
  import ncl_pkg::*;
#(
  parameter int M_W         = 8,
  parameter int N_W         = 8,
  parameter bit EXHAUSTIVE  = 1'b0,
  parameter int NRAND       = 100,
  parameter bit DOC_EXAMPLE = 1'b0
) (
  input  logic clk,
  input  logic rst,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_neg,
  output int   n_stall,
  output int   max_latency
);
  localparam int P_Q = (M_W + N_W) / 2;
  localparam int P_W = M_W + N_W;

  qr_t [M_W/2-1:0] y;
  qr_t [N_W/2-1:0] x;
  logic            ko;
  logic            ki;
  qr_t [P_Q-1:0]   p;

  qr_smul #(.M_W(M_W), .N_W(N_W)) dut (.clk, .rst, .y, .x, .ko, .ki, .p);

  function automatic bit out_data();
    for (int k = 0; k < P_Q; k++) if ($countones(p[k]) != 1) return 1'b0;
    return 1'b1;
  endfunction
  function automatic logic [127:0] p_value();
    logic [127:0] v = '0;
    for (int k = 0; k < P_Q; k++) v[2*k +: 2] = 2'(mv_value(p[k]));
    return v;
  endfunction
  function automatic logic [127:0] expected(logic [127:0] a, logic [127:0] b);
    logic signed [127:0] sa, sb;
    sa = $signed(a << (128 - M_W)) >>> (128 - M_W);
    sb = $signed(b << (128 - N_W)) >>> (128 - N_W);
    return 128'(sa * sb) & ((128'd1 << P_W) - 1);
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %m: %s", what);
    end
  endtask

  task automatic wait_for(ref logic sig, input logic val, input string what);
    int n = 0;
    while (sig !== val && n < 300) begin
      @(posedge clk); #1;
      n++;
    end
    check(sig === val, what);
  endtask

  task automatic op(logic [127:0] a, logic [127:0] b);
    logic [127:0] e = expected(a, b);
    int lat = 0;
    bit stall = ($urandom_range(2) == 0);
    wait_for(ko, 1'b1, "ko never requested DATA");
    for (int k = 0; k < M_W / 2; k++) y[k] = qr_t'(1 << a[2*k +: 2]);
    for (int k = 0; k < N_W / 2; k++) x[k] = qr_t'(1 << b[2*k +: 2]);
    while (!out_data() && lat < 300) begin
      @(posedge clk); #1;
      lat++;
    end
    if (lat > max_latency) max_latency = lat;
    check(out_data() && p_value() == e, $sformatf("%0d x %0d: got %h, expected %h", a, b, p_value(), e));
    if (e[P_W-1]) n_neg++;
    if (stall) begin
      qr_t [P_Q-1:0] held = p;
      n_stall++;
      repeat (2 + $urandom_range(10)) begin
        @(posedge clk); #1;
        check(p == held, "product changed while the consumer stalled");
      end
    end
    ki = 1'b0;
    wait_for(ko, 1'b0, "ko never requested NULL");
    y = '0;
    x = '0;
    lat = 0;
    while (p != '0 && lat < 300) begin
      @(posedge clk); #1;
      lat++;
    end
    check(p == '0, "product did not return to NULL");
    ki = 1'b1;
  endtask

  initial begin
    automatic logic [127:0] ym = (128'd1 << M_W) - 1;
    automatic logic [127:0] xm = (128'd1 << N_W) - 1;
    done = 1'b0;
    checks = 0;
    failures = 0;
    n_neg = 0;
    n_stall = 0;
    max_latency = 0;
    y = '0;
    x = '0;
    ki = 1'b1;
    @(negedge rst);
    @(posedge clk); #1;
    if (DOC_EXAMPLE) begin
      // 27 x -7 = -189, which is 835 = 31003 in base 4 in a 10-bit product
      check(expected(128'd27, 128'd9) == 128'd835, "document example model");
      op(128'd27, 128'd9);
    end
    if (EXHAUSTIVE) begin
      for (longint a = 0; a < (longint'(1) << M_W); a++)
        for (longint b = 0; b < (longint'(1) << N_W); b++)
          op(128'(a), 128'(b));
    end else begin
      op(ym >> 1, xm >> 1);                               // most positive x most positive
      op(128'd1 << (M_W - 1), 128'd1 << (N_W - 1));       // most negative x most negative
      op(128'd1 << (M_W - 1), xm >> 1);
      op(ym, xm);                                         // -1 x -1
      for (int i = 0; i < NRAND; i++) begin
        automatic logic [127:0] a = {$urandom, $urandom, $urandom, $urandom};
        automatic logic [127:0] b = {$urandom, $urandom, $urandom, $urandom};
        op(a & ym, b & xm);
      end
    end
    done = 1'b1;
  end
endmodule
