// tb_arr_harness - drives one quad-rail array multiplier (qr_umul when SIGNED = 0, qr_smul_array when
// SIGNED = 1) through DATA/NULL cycles and checks every product against integer multiplication done here.
//
// Vectors: all operand pairs when EXHAUSTIVE is set, otherwise NRAND random pairs plus the extreme values.
// In each cycle one random input digit arrives a few cycles after the others; the outputs must not all be
// DATA before it has arrived (input completeness). The cycles from the last input to a complete product
// are measured; done rises at the end. checks/failures are read by the enclosing testbench.
module tb_arr_harness
  import ncl_pkg::*;
#(
  parameter int M_W        = 4,
  parameter int N_W        = 4,
  parameter bit SIGNED     = 1'b0,
  parameter bit EXHAUSTIVE = 1'b1,
  parameter int NRAND      = 100
) (
  input  logic clk,
  input  logic rst,
  output logic done,
  output int   checks,
  output int   failures,
  output int   max_latency
);
  localparam int C = M_W / 2;
  localparam int R = N_W / 2;
  localparam int P_Q = C + R;

  qr_t [C-1:0]   y;
  qr_t [R-1:0]   x;
  qr_t [P_Q-1:0] p;

  if (SIGNED) begin : g_s
    qr_smul_array #(.M_W(M_W), .N_W(N_W)) dut (.clk, .rst, .y, .x, .p);
  end else begin : g_u
    qr_umul #(.M_W(M_W), .N_W(N_W)) dut (.clk, .rst, .y, .x, .p);
  end

  function automatic logic [127:0] expected(logic [127:0] a, logic [127:0] b);
    logic [127:0] r;
    if (SIGNED) begin
      logic signed [127:0] sa, sb;
      sa = $signed(a << (128 - M_W)) >>> (128 - M_W);
      sb = $signed(b << (128 - N_W)) >>> (128 - N_W);
      r = 128'(sa * sb);
    end else begin
      r = a * b;
    end
    return r & ((128'd1 << (M_W + N_W)) - 1);
  endfunction

  function automatic bit all_data();
    for (int k = 0; k < P_Q; k++) if ($countones(p[k]) != 1) return 1'b0;
    return 1'b1;
  endfunction
  function automatic bit all_null();
    return p == '0;
  endfunction
  function automatic logic [127:0] value();
    logic [127:0] v = '0;
    for (int k = 0; k < P_Q; k++) v[2*k +: 2] = 2'(mv_value(p[k]));
    return v;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %m: %s", what);
    end
  endtask

  task automatic run(logic [127:0] a, logic [127:0] b);
    int late = $urandom_range(P_Q - 1);
    int gap = 1 + $urandom_range(4);
    int lat = 0;
    qr_t [C-1:0] yd;
    qr_t [R-1:0] xd;
    for (int k = 0; k < C; k++) yd[k] = qr_t'(1 << a[2*k +: 2]);
    for (int k = 0; k < R; k++) xd[k] = qr_t'(1 << b[2*k +: 2]);
    // DATA, one digit late
    for (int k = 0; k < C; k++) if (k != late) y[k] = yd[k];
    for (int k = 0; k < R; k++) if (k + C != late) x[k] = xd[k];
    repeat (gap) begin
      @(posedge clk); #1;
      check(!all_data(), "product complete before all inputs arrived");
    end
    if (late < C) y[late] = yd[late]; else x[late - C] = xd[late - C];
    while (!all_data() && lat < 200) begin
      @(posedge clk); #1;
      lat++;
    end
    if (lat > max_latency) max_latency = lat;
    check(all_data() && value() == expected(a, b),
          $sformatf("%0d x %0d: got %h, expected %h", a, b, value(), expected(a, b)));
    // NULL
    y = '0;
    x = '0;
    lat = 0;
    while (!all_null() && lat < 200) begin
      @(posedge clk); #1;
      lat++;
    end
    check(all_null(), "product did not return to NULL");
  endtask

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
    max_latency = 0;
    y = '0;
    x = '0;
    @(negedge rst);
    @(posedge clk); #1;
    if (EXHAUSTIVE) begin
      for (longint a = 0; a < (longint'(1) << M_W); a++)
        for (longint b = 0; b < (longint'(1) << N_W); b++)
          run(128'(a), 128'(b));
    end else begin
      automatic logic [127:0] ones = (128'd1 << M_W) - 1;
      automatic logic [127:0] onesn = (128'd1 << N_W) - 1;
      run(ones, onesn);
      run('0, '0);
      run(128'd1 << (M_W - 1), 128'd1 << (N_W - 1));
      run(ones, 128'd1 << (N_W - 1));
      for (int i = 0; i < NRAND; i++) begin
        automatic logic [127:0] a = {$urandom, $urandom, $urandom, $urandom};
        automatic logic [127:0] b = {$urandom, $urandom, $urandom, $urandom};
        run(a & ones, b & onesn);
      end
    end
    done = 1'b1;
  end
endmodule
