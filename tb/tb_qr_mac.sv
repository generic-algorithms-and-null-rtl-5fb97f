// tb_qr_mac - self-checking testbench for the quad-rail multiply-and-accumulate unit qr_mac.
//
// Five units run in parallel, at the sizes the document tests or draws: 12+6x4 (its worked example
// 2879 + 43 x 9 = 3266 first, then random and maximum operands so the 12-bit accumulator overflows
// often), 8+4x4, the default 24+8x8 with enough maximum-operand runs to overflow 24 bits, 22+10x8 and
// 16+8x8. Every result,
// the overflow flag, consumer stalls and the return to NULL are checked against an integer model.
module tb_qr_mac;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  localparam int NH = 5;
  logic [NH-1:0] done;
  int chk [NH];
  int fl [NH];
  int nov [NH];
  int nst [NH];
  int lat [NH];

  tb_mac_harness #(.A_W(12), .M_W(6), .N_W(4), .NOPS(300), .DOC_EXAMPLE(1)) h0 (.clk, .rst, .done(done[0]),
    .checks(chk[0]), .failures(fl[0]), .n_ov(nov[0]), .n_stall(nst[0]), .max_latency(lat[0]));
  tb_mac_harness #(.A_W(8), .M_W(4), .N_W(4), .NOPS(300)) h1 (.clk, .rst, .done(done[1]),
    .checks(chk[1]), .failures(fl[1]), .n_ov(nov[1]), .n_stall(nst[1]), .max_latency(lat[1]));
  tb_mac_harness #(.A_W(24), .M_W(8), .N_W(8), .NOPS(1200)) h2 (.clk, .rst, .done(done[2]),
    .checks(chk[2]), .failures(fl[2]), .n_ov(nov[2]), .n_stall(nst[2]), .max_latency(lat[2]));
  tb_mac_harness #(.A_W(22), .M_W(10), .N_W(8), .NOPS(300)) h3 (.clk, .rst, .done(done[3]),
    .checks(chk[3]), .failures(fl[3]), .n_ov(nov[3]), .n_stall(nst[3]), .max_latency(lat[3]));
  tb_mac_harness #(.A_W(16), .M_W(8), .N_W(8), .NOPS(300)) h4 (.clk, .rst, .done(done[4]),
    .checks(chk[4]), .failures(fl[4]), .n_ov(nov[4]), .n_stall(nst[4]), .max_latency(lat[4]));

  initial begin
    automatic int checks = 0;
    automatic int failures = 0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    wait (&done);
    for (int i = 0; i < NH; i++) begin
      checks += chk[i] + 2;
      failures += fl[i];
      if (nov[i] == 0) begin
        failures++;
        $display("FAIL unit %0d never overflowed", i);
      end
      if (nst[i] == 0) begin
        failures++;
        $display("FAIL unit %0d never stalled", i);
      end
      $display("INFO unit %0d: overflows %0d, stalls %0d, worst latency %0d cycles", i, nov[i], nst[i], lat[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end
endmodule
