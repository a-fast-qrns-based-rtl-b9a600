// bin2rns: conversion of an unsigned 8-bit input sample to its residue
// modulo M, registered (one cycle of latency).
//
// A real integer x maps to the QRNS pair (|x|_M, |x|_M), so converting an
// input sample only needs its residue. Two structures, as in the document:
//   M >= 128  (8-bit moduli): x < 2M, so |x|_M = (x >= M) ? x - M : x, one
//             comparator and one subtractor;
//   M <  128  (moduli up to 6 bits): input-block decomposition in 4-bit
//             blocks, |x|_M = | |x[3:0]|_M + |16*x[7:4]|_M |_M, two 16-entry
//             tables and one modular adder.
module bin2rns #(
  parameter int unsigned M = 221,
  localparam int unsigned N = $clog2(M)
) (
  input  logic                   clk,
  input  qrns_pkg::sample_t      x,
  output logic [N-1:0]           r
);
  logic [N-1:0] res;

  if (M >= 128) begin : g_cmp
    always_comb begin
      if (x >= qrns_pkg::sample_t'(M)) res = N'(x - qrns_pkg::sample_t'(M));
      else                             res = N'(x);
    end
  end else begin : g_blk
    logic [N-1:0] lo_tbl [16];
    logic [N-1:0] hi_tbl [16];
    for (genvar i = 0; i < 16; i++) begin : g_tbl
      assign lo_tbl[i] = N'(i % M);
      assign hi_tbl[i] = N'((16 * i) % M);
    end
    mod_add #(.M(M)) u_add (.a(lo_tbl[x[3:0]]), .b(hi_tbl[x[7:4]]), .s(res));
  end

  always_ff @(posedge clk) r <= res;
endmodule
