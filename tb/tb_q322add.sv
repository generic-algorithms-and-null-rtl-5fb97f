// tb_q322add - exhaustive self-checking testbench for q322add (Q322add).
//
// For every combination of operand values it runs one NCL cycle: the operands turn DATA one by one in
// a random order and at random gaps, the outputs are checked to stay NULL until the last operand has
// arrived and to turn DATA exactly two cycles later with the expected sum and carry (worked out here
// from the operand values); then the operands return to NULL one by one and the outputs are checked
// to hold DATA until the last one is NULL and to be NULL two cycles after.
module tb_q322add;
  import ncl_pkg::*;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;
  localparam int NIN = 3;
  localparam int CONST = 0;
  localparam int RAILS  [4] = '{4, 3, 3, 2};
  localparam int OFFSET [4] = '{0, 0, 0, 0};
  localparam int STEP   [4] = '{1, 1, 1, 1};
  logic [3:0] op [4];
  qr_t a;
  assign a = op[0][3:0];
  tr_t b;
  assign b = op[1][2:0];
  tr_t c;
  assign c = op[2][2:0];
  qr_t s;
  dr_t co;
  q322add dut (.clk, .rst, .a, .b, .c, .s, .co);

  function automatic bit out_null();
    return s == '0 && co == '0;
  endfunction
  function automatic bit out_data();
    return $countones(s) == 1 && $countones(co) == 1;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Apply the operands (DATA rails in rv, or NULL) one at a time in a random order.
  task automatic wave(input int rv [4], input bit data);
    int order [4] = '{0, 1, 2, 3};
    for (int i = NIN - 1; i > 0; i--) begin
      int j = $urandom_range(i);
      int t = order[i];
      order[i] = order[j];
      order[j] = t;
    end
    for (int i = 0; i < NIN; i++) begin
      int gap = $urandom_range(3);
      repeat (gap) begin
        @(posedge clk);
        #1;
        if (i > 0) check(data ? out_null() : out_data(), "output moved before its inputs were complete");
      end
      op[order[i]] = data ? 4'(1 << rv[order[i]]) : 4'b0;
    end
    @(posedge clk); #1;
    check(data ? out_null() : out_data(), "output after one gate delay");
    @(posedge clk); #1;
    check(data ? out_data() : out_null(), "output not complete after two gate delays");
  endtask

  initial begin
    automatic int nm = 1;
    for (int k = 0; k < 4; k++) op[k] = 4'b0;
    for (int k = 0; k < NIN; k++) nm *= RAILS[k];
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int m = 0; m < nm; m++) begin
      automatic int rv [4];
      automatic int v = CONST;
      automatic int rest = m;
      for (int k = 0; k < 4; k++) rv[k] = 0;
      for (int k = 0; k < NIN; k++) begin
        rv[k] = rest % RAILS[k];
        rest /= RAILS[k];
        v += OFFSET[k] + STEP[k] * rv[k];
      end
      wave(rv, 1'b1);
      check(mv_value(s) == v % 4, $sformatf("sum of value %0d: got rails %b", v, s));
      check(mv_value(4'(co)) == v / 4, $sformatf("carry of value %0d: got rails %b", v, co));
      wave(rv, 1'b0);
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
