// qrns2rns: conversion of a QRNS pair (z1, z2) back to the residues of the
// real and imaginary parts of the complex integer it stands for:
//   re = |2^-1 * (z1 + z2)|_M,   im = |(2R)^-1 * (z1 - z2)|_M.
// One modular adder, one modular subtractor and a constant LUT multiplier
// per output, as in the document's QRNS-to-RNS converter. With NEG_IM set
// the subtractor operands are swapped so that im carries -Im instead, which
// is what the DCT output mapping Re Z(8-m) = -Im Z(m) needs, at no cost.
// Timing: add/subtract registered, then multiply registered: 2 cycles.
module qrns2rns #(
  parameter int unsigned M = 221,
  parameter int unsigned R = 47,
  parameter bit NEG_IM     = 1'b0,
  localparam int unsigned N = $clog2(M)
) (
  input  logic         clk,
  input  logic [N-1:0] z1, z2,
  output logic [N-1:0] re, im
);
  localparam int unsigned INV2  = qrns_pkg::mod_inv(2 % M, M);
  localparam int unsigned INV2R = qrns_pkg::mod_inv((2 * R) % M, M);

  logic [N-1:0] s, d, sr, dr, pre, pim;

  mod_add #(.M(M)) u_add (.a(z1), .b(z2), .s(s));
  if (NEG_IM) begin : g_neg
    mod_sub #(.M(M)) u_sub (.a(z2), .b(z1), .d(d));
  end else begin : g_pos
    mod_sub #(.M(M)) u_sub (.a(z1), .b(z2), .d(d));
  end

  always_ff @(posedge clk) begin
    sr <= s;
    dr <= d;
  end

  lut_mul #(.M(M), .C(INV2))  u_lre (.u(sr), .y(pre));
  lut_mul #(.M(M), .C(INV2R)) u_lim (.u(dr), .y(pim));

  always_ff @(posedge clk) begin
    re <= pre;
    im <= pim;
  end
endmodule
