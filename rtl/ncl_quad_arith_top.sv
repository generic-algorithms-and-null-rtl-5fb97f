// ncl_quad_arith_top - top level of the quad-rail NCL arithmetic library: an unsigned multiply-and-
// accumulate unit and a 2's complement multiplier, side by side, each with its own handshake.
//
// mac_*: qr_mac, new accumulator = (accumulator + mac_y * mac_x) mod 2^A_W, with overflow flag mac_ov
//        (dual-rail, DATA1 when the addition carried out of bit A_W-1). The accumulator starts at DATA0.
// mul_*: qr_smul, mul_p = mul_y * mul_x in 2's complement, modulo 2^(MUL_M_W+MUL_N_W).
// All data ports are quad-rail digits, least significant first: port[k] = rails of digit k, rail r asserted
// means value r, all rails low means NULL. *_ko (to the producer) and *_ki (from the consumer) are
// 1 = request for DATA, 0 = request for NULL.
// Timing: one clk cycle is one threshold-gate delay of the modelled asynchronous circuit; rst (active
// high, synchronous) clears every gate, puts all registers to NULL and the accumulator to DATA0.
// Defaults follow the document's 24+8x8 MAC and 8x8 multiplier systems.
module ncl_quad_arith_top #(
  parameter int MAC_A_W = 24,
  parameter int MAC_M_W = 8,
  parameter int MAC_N_W = 8,
  parameter int MUL_M_W = 8,
  parameter int MUL_N_W = 8
) (
  input  logic                                   clk,
  input  logic                                   rst,
  input  logic [MAC_M_W/2-1:0][3:0]              mac_y,
  input  logic [MAC_N_W/2-1:0][3:0]              mac_x,
  output logic                                   mac_ko,
  input  logic                                   mac_ki,
  output logic [MAC_A_W/2-1:0][3:0]              mac_acc,
  output logic [1:0]                             mac_ov,
  input  logic [MUL_M_W/2-1:0][3:0]              mul_y,
  input  logic [MUL_N_W/2-1:0][3:0]              mul_x,
  output logic                                   mul_ko,
  input  logic                                   mul_ki,
  output logic [(MUL_M_W+MUL_N_W)/2-1:0][3:0]    mul_p
);
  qr_mac #(.A_W(MAC_A_W), .M_W(MAC_M_W), .N_W(MAC_N_W)) u_mac (
    .clk, .rst, .y(mac_y), .x(mac_x), .ko(mac_ko), .ki(mac_ki), .acc(mac_acc), .ov(mac_ov)
  );

  qr_smul #(.M_W(MUL_M_W), .N_W(MUL_N_W)) u_mul (
    .clk, .rst, .y(mul_y), .x(mul_x), .ko(mul_ko), .ki(mul_ki), .p(mul_p)
  );
endmodule
