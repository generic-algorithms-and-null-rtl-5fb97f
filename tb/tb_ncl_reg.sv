// tb_ncl_reg - self-checking testbench for ncl_reg, the NCL register (one TH22 per rail with Ki, NOR Ko).
//
// A quad-rail register resetting to NULL and a dual-rail register resetting to DATA0 get random legal
// inputs (NULL or one asserted rail) and random Ki each cycle. They are compared cycle by cycle with a
// model: rail r sets when d[r] and Ki are both 1, clears when both are 0, otherwise holds; Ko is the NOR
// of the outputs one cycle later. The reset values are checked too.
module tb_ncl_reg;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [3:0] d4, q4, m4;
  logic [1:0] d2, q2, m2;
  logic       ki4, ki2, ko4, ko2, mko4, mko2;

  ncl_reg #(.RAILS(4))                    u4 (.clk, .rst, .d(d4), .ki(ki4), .q(q4), .ko(ko4));
  ncl_reg #(.RAILS(2), .RESET_DATA0(1'b1)) u2 (.clk, .rst, .d(d2), .ki(ki2), .q(q2), .ko(ko2));

  int checks = 0;
  int failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    d4 = '0; d2 = '0; ki4 = 1'b1; ki2 = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    check(q4 == 4'b0000 && ko4 == 1'b1, "quad-rail register reset to NULL with Ko = rfd");
    check(q2 == 2'b01 && ko2 == 1'b0, "dual-rail register reset to DATA0 with Ko = rfn");
    m4 = q4; m2 = q2; mko4 = ko4; mko2 = ko2;
    rst = 1'b0;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      d4 = ($urandom_range(2) == 0) ? 4'b0 : 4'b0001 << $urandom_range(3);
      d2 = ($urandom_range(2) == 0) ? 2'b0 : 2'b01 << $urandom_range(1);
      ki4 = 1'($urandom);
      ki2 = 1'($urandom);
      @(posedge clk);
      mko4 = ~|m4;
      mko2 = ~|m2;
      for (int r = 0; r < 4; r++) m4[r] = (d4[r] & ki4) | (m4[r] & (d4[r] | ki4));
      for (int r = 0; r < 2; r++) m2[r] = (d2[r] & ki2) | (m2[r] & (d2[r] | ki2));
      #1;
      check(q4 == m4 && ko4 == mko4, $sformatf("quad-rail q %b ko %b, expected %b %b", q4, ko4, m4, mko4));
      check(q2 == m2 && ko2 == mko2, $sformatf("dual-rail q %b ko %b, expected %b %b", q2, ko2, m2, mko2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end
endmodule
