// tb_ncl_completion - self-checking testbench for ncl_completion, the TH44 completion tree.
//
// Trees of 1, 3, 5, 8, 13 and 16 inputs are checked together. In each round the inputs rise one at a
// time in random order with random gaps (a register stage becoming NULL); the output must stay 0 until the
// last input has risen and then reach 1 within the tree depth. The inputs then fall one at a time the same
// way and the output must stay 1 until the last has fallen, then reach 0.
module tb_ncl_completion;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  localparam int NT = 6;
  localparam int SIZES [NT] = '{1, 3, 5, 8, 13, 16};
  logic [15:0]   ko_in [NT];
  logic [NT-1:0] ko;

  for (genvar t = 0; t < NT; t++) begin : g_tree
    ncl_completion #(.N(SIZES[t]), .RESET_VAL(1'b0)) dut (.clk, .rst, .ko_in(ko_in[t][SIZES[t]-1:0]), .ko(ko[t]));
  end

  int checks = 0;
  int failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // one phase: every input of every tree moves to val; output must not move before the last input has
  task automatic phase(logic val);
    int order [NT][16];
    int pos [NT];
    bit busy = 1'b1;
    for (int t = 0; t < NT; t++) begin
      for (int i = 0; i < 16; i++) order[t][i] = i;
      for (int i = SIZES[t] - 1; i > 0; i--) begin
        int j = $urandom_range(i);
        int tmp = order[t][i];
        order[t][i] = order[t][j];
        order[t][j] = tmp;
      end
      pos[t] = 0;
    end
    while (busy) begin
      busy = 1'b0;
      for (int t = 0; t < NT; t++) begin
        if (pos[t] < SIZES[t] && $urandom_range(1) == 1) begin
          ko_in[t][order[t][pos[t]]] = val;
          pos[t]++;
        end
        if (pos[t] < SIZES[t]) busy = 1'b1;
      end
      @(posedge clk); #1;
      for (int t = 0; t < NT; t++)
        if (pos[t] < SIZES[t]) check(ko[t] == !val, $sformatf("tree %0d switched early", t));
    end
    repeat (4) @(posedge clk);
    #1;
    for (int t = 0; t < NT; t++) check(ko[t] == val, $sformatf("tree %0d did not switch to %b", t, val));
  endtask

  initial begin
    for (int t = 0; t < NT; t++) ko_in[t] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int r = 0; r < 500; r++) begin
      phase(1'b1);
      phase(1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end
endmodule
