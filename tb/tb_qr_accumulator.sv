// tb_qr_accumulator - self-checking testbench for qr_accumulator, the MAC's ripple-carry adder.
//
// Default size (8 product digits, 12 accumulator digits). Random products and previous values, half of
// them with the previous value close to 4^12 so that the overflow flag is exercised, plus the extremes.
// Inputs arrive with one random digit late; the outputs must not all be DATA before it arrives. Sum and
// overflow are compared with integer addition, and the return to NULL is checked.
module tb_qr_accumulator;
  import ncl_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  localparam int P_Q = 8;
  localparam int A_Q = 12;

  qr_t [P_Q-1:0] p;
  qr_t [A_Q-1:0] acc_in, acc_out;
  dr_t           ov;

  qr_accumulator #(.P_Q(P_Q), .A_Q(A_Q)) dut (.clk, .rst, .p, .acc_in, .acc_out, .ov);

  int checks = 0;
  int failures = 0;
  int n_ov = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic bit complete();
    for (int k = 0; k < A_Q; k++) if ($countones(acc_out[k]) != 1) return 1'b0;
    return $countones(ov) == 1;
  endfunction

  task automatic run(logic [2*P_Q-1:0] pv, logic [2*A_Q-1:0] av);
    logic [2*A_Q:0] sum = {1'b0, av} + (2*A_Q+1)'(pv);
    logic [2*A_Q-1:0] got;
    int late = $urandom_range(P_Q + A_Q - 1);
    int n = 0;
    for (int k = 0; k < P_Q; k++) if (k != late) p[k] = mv_enc(int'(pv[2*k +: 2]));
    for (int k = 0; k < A_Q; k++) if (k + P_Q != late) acc_in[k] = mv_enc(int'(av[2*k +: 2]));
    repeat (1 + $urandom_range(3)) begin
      @(posedge clk); #1;
      check(!complete(), "sum complete before all inputs arrived");
    end
    if (late < P_Q) p[late] = mv_enc(int'(pv[2*late +: 2]));
    else acc_in[late - P_Q] = mv_enc(int'(av[2*(late - P_Q) +: 2]));
    while (!complete() && n < 200) begin @(posedge clk); #1; n++; end
    for (int k = 0; k < A_Q; k++) got[2*k +: 2] = 2'(mv_value(acc_out[k]));
    check(complete() && got == sum[2*A_Q-1:0] && ov[1] == sum[2*A_Q],
          $sformatf("%0d + %0d gave %0d ov %b", av, pv, got, ov));
    check(n <= 2 * A_Q + 2, $sformatf("latency %0d cycles", n));
    if (ov[1]) n_ov++;
    p = '0;
    acc_in = '0;
    n = 0;
    while ((acc_out != '0 || ov != '0) && n < 200) begin @(posedge clk); #1; n++; end
    check(acc_out == '0 && ov == '0, "outputs did not return to NULL");
  endtask

  initial begin
    p = '0;
    acc_in = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    run('1, '1);
    run('0, '0);
    run(16'd1, '1);
    for (int i = 0; i < 3000; i++) begin
      automatic logic [2*A_Q-1:0] av = 24'($urandom);
      if (i % 2 == 1) av = '1 - 24'($urandom_range(100000));
      run(16'($urandom), av);
    end
    check(n_ov > 0, "overflow never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end
endmodule
