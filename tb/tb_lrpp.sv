// tb_lrpp - exhaustive self-checking testbench for lrpp.
//
// Every combination of input digits is applied with the operands arriving at random times. The outputs
// must stay NULL until all inputs have arrived and be DATA exactly two cycles later; the values are
// compared with the document's value table (PPL) and with the Baugh-Wooley bit terms (PPH).
module tb_lrpp;
  import ncl_pkg::*;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;
  localparam int NIN = 3;
  qr_t op [3];
  // Document table for PPL, index md_i*4 + mr.
  localparam int EXP_LO [16] = '{0, 0, 0, 0, 0, 1, 0, 1, 0, 2, 0, 2, 0, 3, 0, 3};
  qr_t ppl;
  qr_t pph;
  lrpp dut (.clk, .rst, .md_i(op[0]), .md_i1(op[1]), .mr(op[2]), .pph, .ppl);
  function automatic bit all_null(); return ppl == '0 && pph == '0; endfunction
  function automatic bit all_data(); return $countones(ppl) == 1 && $countones(pph) == 1; endfunction
  function automatic bit lo_null(); return all_null(); endfunction
  function automatic bit lo_data(); return all_data(); endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic wave(input int dv [3], input bit data);
    int first = $urandom_range(NIN - 1);
    int gap = $urandom_range(3);
    for (int k = 0; k < NIN; k++)
      if (k == first) op[k] = data ? qr_t'(1 << dv[k]) : '0;
    repeat (gap) begin
      @(posedge clk); #1;
      check(data ? lo_null() : lo_data(), "output moved before its inputs were complete");
    end
    for (int k = 0; k < NIN; k++)
      if (k != first) op[k] = data ? qr_t'(1 << dv[k]) : '0;
    @(posedge clk); #1;
    check(data ? all_null() : all_data(), "outputs after one gate delay");
    @(posedge clk); #1;
    check(data ? all_data() : all_null(), "outputs not complete after two gate delays");
  endtask

  initial begin
    for (int k = 0; k < 3; k++) op[k] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int m = 0; m < 64; m++) begin
      automatic int dv [3] = '{m % 4, (m / 4) % 4, m / 16};
      wave(dv, 1'b1);
      begin
        automatic logic [1:0] mdi = 2'(dv[0]), mdi1 = 2'(dv[1]), r = 2'(dv[2]);
        automatic int hi = (r[1] && mdi[1] ? 0 : 1) + (r[1] && mdi1[0] ? 0 : 2);
        check(mv_value(ppl) == EXP_LO[dv[0] * 4 + dv[2]], $sformatf("PPL md=%0d mr=%0d", dv[0], dv[2]));
        check(mv_value(pph) == hi, $sformatf("PPH md_i=%0d md_i1=%0d mr=%0d", dv[0], dv[1], dv[2]));
      end
      wave(dv, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
