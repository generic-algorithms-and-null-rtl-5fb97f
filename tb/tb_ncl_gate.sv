// tb_ncl_gate - self-checking testbench for ncl_gate: all 27 fundamental gates side by side.
//
// Each gate gets random inputs every cycle (biased towards all-zero so the gates also reset). The
// expected output is computed here from the threshold/weight description of each gate (THmnWw..: assert
// when the weighted sum of asserted inputs reaches m) and from the three special gates' equations, with
// hysteresis: set -> 1, all inputs 0 -> 0, otherwise hold. One cycle of delay is expected.
module tb_ncl_gate;
  import ncl_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  localparam int NG = 27;
  logic [3:0]    in [NG];
  logic [NG-1:0] z;
  logic [NG-1:0] model;

  for (genvar g = 0; g < NG; g++) begin : g_dut
    localparam gate_e FN = gate_e'(g);
    ncl_gate #(.FN(FN)) dut (.clk, .rst, .in(in[g][gate_inputs(FN)-1:0]), .z(z[g]));
  end

  // threshold and weights of inputs A..D; threshold 0 marks the three special gates
  function automatic int thr(int g);
    int t [NG] = '{1, 2, 1, 2, 3, 2, 3, 1, 2, 3, 4, 2, 3, 4, 3, 4, 2, 3, 4, 5, 3, 5, 4, 5, 0, 0, 0};
    return t[g];
  endfunction
  function automatic int wt(int g, int i);
    int w [NG][4] = '{'{1,1,0,0}, '{1,1,0,0}, '{1,1,1,0}, '{1,1,1,0}, '{1,1,1,0}, '{2,1,1,0}, '{2,1,1,0},
                      '{1,1,1,1}, '{1,1,1,1}, '{1,1,1,1}, '{1,1,1,1}, '{2,1,1,1}, '{2,1,1,1}, '{2,1,1,1},
                      '{3,1,1,1}, '{3,1,1,1}, '{2,2,1,1}, '{2,2,1,1}, '{2,2,1,1}, '{2,2,1,1}, '{3,2,1,1},
                      '{3,2,1,1}, '{3,2,2,1}, '{3,2,2,1}, '{0,0,0,0}, '{0,0,0,0}, '{0,0,0,0}};
    return w[g][i];
  endfunction

  function automatic bit set_fn(int g, logic [3:0] v);
    int s = 0;
    case (g)
      24: return (v[0] & v[1]) | (v[2] & v[3]);                                   // THxor0
      25: return (v[0] & v[1]) | (v[1] & v[2]) | (v[0] & v[3]);                   // THand0
      26: return (v[0] | v[1]) & (v[2] | v[3]);                                   // TH24comp
      default: begin
        for (int i = 0; i < 4; i++) if (v[i]) s += wt(g, i);
        return s >= thr(g);
      end
    endcase
  endfunction

  int checks = 0;
  int failures = 0;
  int sets = 0;
  int holds = 0;

  initial begin
    for (int g = 0; g < NG; g++) in[g] = '0;
    model = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      for (int g = 0; g < NG; g++) begin
        automatic int n = (g < 2) ? 2 : (g < 7) ? 3 : 4;
        in[g] = ($urandom_range(3) == 0) ? 4'b0 : 4'($urandom) & 4'((1 << n) - 1);
      end
      @(posedge clk);
      for (int g = 0; g < NG; g++) begin
        if (set_fn(g, in[g])) begin
          model[g] = 1'b1;
          sets++;
        end else if (in[g] == '0) begin
          model[g] = 1'b0;
        end else begin
          holds++;
        end
      end
      #1;
      for (int g = 0; g < NG; g++) begin
        checks++;
        if (z[g] !== model[g]) begin
          failures++;
          if (failures < 10) $display("FAIL gate %0d inputs %b: z %b expected %b", g, in[g], z[g], model[g]);
        end
      end
    end
    checks++;
    if (sets == 0 || holds == 0) begin
      failures++;
      $display("FAIL set or hold never exercised");
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
