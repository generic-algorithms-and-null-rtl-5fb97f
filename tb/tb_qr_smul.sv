// tb_qr_smul - self-checking testbench for the registered 2's complement quad-rail multiplier qr_smul.
//
// Four multipliers run in parallel: 6x4 (the document's example 27 x -7 = -189 first, then all 1024
// operand pairs), 4x4 (all 256 pairs), the default 8x8 and 10x8 with random and extreme operands. Products,
// consumer stalls and the return to NULL are checked; negative products and stalls must both occur.
module tb_qr_smul;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  localparam int NH = 4;
  logic [NH-1:0] done;
  int chk [NH];
  int fl [NH];
  int nneg [NH];
  int nst [NH];
  int lat [NH];

  tb_smul_harness #(.M_W(6), .N_W(4), .EXHAUSTIVE(1), .DOC_EXAMPLE(1)) h0 (.clk, .rst, .done(done[0]),
    .checks(chk[0]), .failures(fl[0]), .n_neg(nneg[0]), .n_stall(nst[0]), .max_latency(lat[0]));
  tb_smul_harness #(.M_W(4), .N_W(4), .EXHAUSTIVE(1)) h1 (.clk, .rst, .done(done[1]),
    .checks(chk[1]), .failures(fl[1]), .n_neg(nneg[1]), .n_stall(nst[1]), .max_latency(lat[1]));
  tb_smul_harness #(.M_W(8), .N_W(8), .NRAND(1500)) h2 (.clk, .rst, .done(done[2]),
    .checks(chk[2]), .failures(fl[2]), .n_neg(nneg[2]), .n_stall(nst[2]), .max_latency(lat[2]));
  tb_smul_harness #(.M_W(10), .N_W(8), .NRAND(500)) h3 (.clk, .rst, .done(done[3]),
    .checks(chk[3]), .failures(fl[3]), .n_neg(nneg[3]), .n_stall(nst[3]), .max_latency(lat[3]));

  initial begin
    automatic int checks = 0;
    automatic int failures = 0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    wait (&done);
    for (int i = 0; i < NH; i++) begin
      checks += chk[i] + 2;
      failures += fl[i];
      if (nneg[i] == 0) begin
        failures++;
        $display("FAIL unit %0d never produced a negative product", i);
      end
      if (nst[i] == 0) begin
        failures++;
        $display("FAIL unit %0d never stalled", i);
      end
      $display("INFO unit %0d: negative products %0d, stalls %0d, worst latency %0d cycles", i, nneg[i], nst[i], lat[i]);
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
