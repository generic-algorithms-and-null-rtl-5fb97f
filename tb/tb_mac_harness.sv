// tb_mac_harness - plays producer and consumer around one qr_mac and checks every accumulator value and
// overflow flag against an integer model (acc = (acc + y*x) mod 2^A_W, ov = carry out of that addition).
//
// Each operation: wait for ko = rfd, present y and x as DATA, wait for the output register to hold
// DATA, check it, answer rfn on ki, wait for ko = rfn, present NULL, wait for the outputs to return to
// NULL, answer rfd. In about one operation in three the consumer stalls: it keeps its request
// unchanged for some cycles while the outputs must hold their value (counted in n_stall). Operands are
// random, with runs of maximum operands to force overflow (counted in n_ov). With DOC_EXAMPLE the
// first operations reproduce the document's 12+6x4 example, 2879 + 43 x 9 = 3266.
module tb_mac_harness
  import ncl_pkg::*;
#(
  parameter int A_W         = 24,
  parameter int M_W         = 8,
  parameter int N_W         = 8,
  parameter int NOPS        = 100,
  parameter bit DOC_EXAMPLE = 1'b0
) (
  input  logic clk,
  input  logic rst,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_ov,
  output int   n_stall,
  output int   max_latency
);
  localparam int A_Q = A_W / 2;

  qr_t [M_W/2-1:0] y;
  qr_t [N_W/2-1:0] x;
  logic            ko;
  logic            ki;
  qr_t [A_Q-1:0]   acc;
  dr_t             ov;

  qr_mac #(.A_W(A_W), .M_W(M_W), .N_W(N_W)) dut (.clk, .rst, .y, .x, .ko, .ki, .acc, .ov);

  logic [127:0] model;

  function automatic bit out_data();
    for (int k = 0; k < A_Q; k++) if ($countones(acc[k]) != 1) return 1'b0;
    return $countones(ov) == 1;
  endfunction
  function automatic logic [127:0] acc_value();
    logic [127:0] v = '0;
    for (int k = 0; k < A_Q; k++) v[2*k +: 2] = 2'(mv_value(acc[k]));
    return v;
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
    logic [127:0] sum;
    int lat = 0;
    bit stall = ($urandom_range(2) == 0);
    sum = model + a * b;
    wait_for(ko, 1'b1, "ko never requested DATA");
    for (int k = 0; k < M_W / 2; k++) y[k] = qr_t'(1 << a[2*k +: 2]);
    for (int k = 0; k < N_W / 2; k++) x[k] = qr_t'(1 << b[2*k +: 2]);
    while (!out_data() && lat < 300) begin
      @(posedge clk); #1;
      lat++;
    end
    if (lat > max_latency) max_latency = lat;
    check(out_data() && acc_value() == (sum & ((128'd1 << A_W) - 1)) && ov[1] == sum[A_W],
          $sformatf("%0d + %0d x %0d: got %0d ov %b", model, a, b, acc_value(), ov));
    if (ov[1]) n_ov++;
    model = sum & ((128'd1 << A_W) - 1);
    if (stall) begin
      // consumer is slow to take the result: the output register must hold it
      qr_t [A_Q-1:0] held = acc;
      n_stall++;
      repeat (2 + $urandom_range(10)) begin
        @(posedge clk); #1;
        check(acc == held, "output changed while the consumer stalled");
      end
    end
    ki = 1'b0;
    wait_for(ko, 1'b0, "ko never requested NULL");
    y = '0;
    x = '0;
    lat = 0;
    while ((acc != '0 || ov != '0) && lat < 300) begin
      @(posedge clk); #1;
      lat++;
    end
    check(acc == '0 && ov == '0, "outputs did not return to NULL");
    ki = 1'b1;
  endtask

  initial begin
    automatic logic [127:0] ym = (128'd1 << M_W) - 1;
    automatic logic [127:0] xm = (128'd1 << N_W) - 1;
    done = 1'b0;
    checks = 0;
    failures = 0;
    n_ov = 0;
    n_stall = 0;
    max_latency = 0;
    model = '0;
    y = '0;
    x = '0;
    ki = 1'b1;
    @(negedge rst);
    @(posedge clk); #1;
    if (DOC_EXAMPLE) begin
      repeat (3) op(128'd63, 128'd15);
      op(128'd4, 128'd11);
      check(model == 128'd2879, $sformatf("document example start value %0d", model));
      op(128'd43, 128'd9);
      check(model == 128'd3266, $sformatf("document example result %0d", model));
    end
    for (int i = 0; i < NOPS; i++) begin
      automatic logic [127:0] a = {$urandom, $urandom, $urandom, $urandom};
      automatic logic [127:0] b = {$urandom, $urandom, $urandom, $urandom};
      // every fourth block of 8 operations uses maximum operands to drive the accumulator to overflow
      if ((i / 8) % 4 == 3) op(ym, xm);
      else op(a & ym, b & xm);
    end
    done = 1'b1;
  end
endmodule
