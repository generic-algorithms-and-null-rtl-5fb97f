// tb_ncl_quad_arith_top - end-to-end testbench of ncl_quad_arith_top at its default sizes (24+8x8 MAC,
// 8x8 2's complement multiplier), with both units running at the same time.
//
// A producer/consumer process per unit follows the NCL handshake (ko = rfd: DATA in; output complete:
// check, ki = rfn; ko = rfn: NULL in; output NULL: ki = rfd). Results are compared with integer models.
// Mechanisms are counted and each must occur at least once: MAC overflow (ov = DATA1), accumulation
// onto a non-zero accumulator, MAC consumer stall, multiplier consumer stall, negative product, and the
// output register refusing waiting DATA while its consumer still requests NULL.
module tb_ncl_quad_arith_top;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [3:0][3:0]  mac_y, mac_x, mul_y, mul_x;
  logic             mac_ko, mac_ki, mul_ko, mul_ki;
  logic [11:0][3:0] mac_acc;
  logic [1:0]       mac_ov;
  logic [7:0][3:0]  mul_p;

  ncl_quad_arith_top dut (.clk, .rst, .mac_y, .mac_x, .mac_ko, .mac_ki, .mac_acc, .mac_ov,
                          .mul_y, .mul_x, .mul_ko, .mul_ki, .mul_p);

  int checks = 0;
  int failures = 0;
  int n_ov = 0, n_accum = 0, n_mac_stall = 0, n_mul_stall = 0, n_neg = 0, n_hold_off = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic int digit(logic [3:0] r);
    case (r)
      4'b0001: return 0;
      4'b0010: return 1;
      4'b0100: return 2;
      4'b1000: return 3;
      default: return -1;
    endcase
  endfunction

  function automatic logic [3:0][3:0] enc8(logic [7:0] v);
    logic [3:0][3:0] r;
    for (int k = 0; k < 4; k++) r[k] = 4'b0001 << v[2*k +: 2];
    return r;
  endfunction

  function automatic bit acc_complete();
    for (int k = 0; k < 12; k++) if (digit(mac_acc[k]) < 0) return 1'b0;
    return digit({2'b00, mac_ov}) >= 0;
  endfunction
  function automatic logic [23:0] acc_val();
    logic [23:0] v;
    for (int k = 0; k < 12; k++) v[2*k +: 2] = 2'(digit(mac_acc[k]));
    return v;
  endfunction
  function automatic bit p_complete();
    for (int k = 0; k < 8; k++) if (digit(mul_p[k]) < 0) return 1'b0;
    return 1'b1;
  endfunction
  function automatic logic [15:0] p_val();
    logic [15:0] v;
    for (int k = 0; k < 8; k++) v[2*k +: 2] = 2'(digit(mul_p[k]));
    return v;
  endfunction

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  task automatic mac_run(int nops);
    logic [24:0] model = '0;
    for (int i = 0; i < nops; i++) begin
      logic [7:0] a = 8'($urandom);
      logic [7:0] b = 8'($urandom);
      logic [24:0] sum;
      int n = 0;
      if ((i / 16) % 2 == 1) begin
        a = 8'hff;
        b = 8'hff;
      end
      sum = {1'b0, model[23:0]} + 25'(a) * 25'(b);
      while (!mac_ko && n < 2000) begin tick(); n++; end
      mac_y = enc8(a);
      mac_x = enc8(b);
      n = 0;
      while (!acc_complete() && n < 2000) begin tick(); n++; end
      check(acc_complete() && acc_val() == sum[23:0] && mac_ov[1] == sum[24],
            $sformatf("MAC %0d + %0d x %0d gave %0d ov %b", model, a, b, acc_val(), mac_ov));
      if (mac_ov[1]) n_ov++;
      if (model[23:0] != 0) n_accum++;
      model = {1'b0, sum[23:0]};
      if ($urandom_range(3) == 0) begin
        // stall: the consumer keeps requesting DATA; the result must hold
        logic [11:0][3:0] held = mac_acc;
        n_mac_stall++;
        repeat (3 + $urandom_range(8)) begin
          tick();
          check(mac_acc == held, "MAC result changed during a stall");
        end
      end
      mac_ki = 1'b0;
      n = 0;
      while (mac_ko && n < 2000) begin tick(); n++; end
      mac_y = '0;
      mac_x = '0;
      n = 0;
      while ((mac_acc != '0 || mac_ov != '0) && n < 2000) begin tick(); n++; end
      check(mac_acc == '0 && mac_ov == '0, "MAC outputs did not return to NULL");
      mac_ki = 1'b1;
    end
  endtask

  task automatic mul_run(int nops);
    logic [7:0] a = 8'($urandom);
    logic [7:0] b = 8'($urandom);
    bit presented = 1'b0;
    for (int i = 0; i < nops; i++) begin
      logic [15:0] e = 16'($signed(a) * $signed(b));
      int n = 0;
      if (!presented) begin
        while (!mul_ko && n < 2000) begin tick(); n++; end
        mul_y = enc8(a);
        mul_x = enc8(b);
      end
      n = 0;
      while (!p_complete() && n < 2000) begin tick(); n++; end
      check(p_complete() && p_val() == e, $sformatf("MUL %0d x %0d gave %h, expected %h",
            $signed(a), $signed(b), p_val(), e));
      if (e[15]) n_neg++;
      mul_ki = 1'b0;
      n = 0;
      while (mul_ko && n < 2000) begin tick(); n++; end
      mul_y = '0;
      mul_x = '0;
      n = 0;
      while (mul_p != '0 && n < 2000) begin tick(); n++; end
      check(mul_p == '0, "product did not return to NULL");
      a = 8'($urandom);
      b = 8'($urandom);
      presented = 1'b0;
      if ($urandom_range(3) == 0) begin
        // stall on NULL: the next operands wait at the inputs while the consumer still requests NULL;
        // the output register may not take them
        n_mul_stall++;
        n = 0;
        while (!mul_ko && n < 2000) begin tick(); n++; end
        mul_y = enc8(a);
        mul_x = enc8(b);
        presented = 1'b1;
        repeat (3 + $urandom_range(8)) begin
          tick();
          check(mul_p == '0, "product left NULL during a stall");
        end
        n_hold_off++;
      end
      mul_ki = 1'b1;
    end
  endtask

  initial begin
    mac_y = '0;
    mac_x = '0;
    mul_y = '0;
    mul_x = '0;
    mac_ki = 1'b1;
    mul_ki = 1'b1;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    tick();
    fork
      mac_run(600);
      mul_run(600);
    join
    check(n_ov > 0, "MAC overflow never happened");
    check(n_accum > 0, "accumulation onto a non-zero value never happened");
    check(n_mac_stall > 0, "MAC consumer never stalled");
    check(n_mul_stall > 0, "multiplier consumer never stalled");
    check(n_neg > 0, "no negative product");
    check(n_hold_off > 0, "waiting DATA was never held off");
    $display("INFO overflow %0d, accumulate %0d, MAC stall %0d, MUL stall %0d, negative %0d, hold-off %0d",
             n_ov, n_accum, n_mac_stall, n_mul_stall, n_neg, n_hold_off);
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
