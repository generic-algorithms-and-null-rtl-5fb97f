// tb_qr_umul - self-checking testbench for the unsigned quad-rail array multiplier qr_umul.
//
// Runs the 8x8 default with 600 random products plus extremes, 4x4 and 6x4 exhaustively (sizes the document
// tested exhaustively), and 12x6 and 8x10 with random vectors, so that every adder placement
// (top column on level 1, 2 and 3+, both top cells of the ripple-carry adder) is exercised. Each product is
// compared with integer multiplication; the worst latency in clk cycles is printed and bounded.
module tb_qr_umul;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  localparam int NH = 5;
  logic [NH-1:0] done;
  int chk [NH];
  int fl [NH];
  int lat [NH];

  tb_arr_harness #(.M_W(8),  .N_W(8),  .SIGNED(0), .EXHAUSTIVE(0), .NRAND(600)) h0 (.clk, .rst, .done(done[0]), .checks(chk[0]), .failures(fl[0]), .max_latency(lat[0]));
  tb_arr_harness #(.M_W(4),  .N_W(4),  .SIGNED(0), .EXHAUSTIVE(1)) h1 (.clk, .rst, .done(done[1]), .checks(chk[1]), .failures(fl[1]), .max_latency(lat[1]));
  tb_arr_harness #(.M_W(6),  .N_W(4),  .SIGNED(0), .EXHAUSTIVE(1)) h2 (.clk, .rst, .done(done[2]), .checks(chk[2]), .failures(fl[2]), .max_latency(lat[2]));
  tb_arr_harness #(.M_W(12), .N_W(6),  .SIGNED(0), .EXHAUSTIVE(0), .NRAND(150)) h3 (.clk, .rst, .done(done[3]), .checks(chk[3]), .failures(fl[3]), .max_latency(lat[3]));
  tb_arr_harness #(.M_W(8),  .N_W(10), .SIGNED(0), .EXHAUSTIVE(0), .NRAND(150)) h4 (.clk, .rst, .done(done[4]), .checks(chk[4]), .failures(fl[4]), .max_latency(lat[4]));

  initial begin
    automatic int checks = 0;
    automatic int failures = 0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    wait (&done);
    for (int i = 0; i < NH; i++) begin
      checks += chk[i];
      failures += fl[i];
    end
    // Latency bound: two gate delays per q33mul, carry-save level and ripple cell.
    checks++;
    if (lat[0] > 2 * (1 + 3 + 4) + 2) begin
      failures++;
      $display("FAIL 8x8 latency %0d cycles", lat[0]);
    end
    $display("INFO worst latency 8x8 %0d cycles", lat[0]);
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
