// lut_mul: multiplication of a residue by a constant, y = |u * C|_M, as a
// table look-up.
//
// The table holds |i * C|_M for every n-bit address i (n = ceil(log2 M)).
// How it is organised follows the document's FPL-oriented multiplier:
//   n <= 4      one 2^n x n table;
//   n == 5      two 2^4 x 5 tables addressed by u[3:0], a multiplexer on u[4];
//   n == 6      four 2^4 x 6 tables addressed by u[3:0], two multiplexers on
//               u[4] and a final multiplexer on u[5];
//   n >= 7      one 2^n x n table (an embedded memory block in an FPGA).
// Addresses at or above M never occur in a channel; their entries are filled
// with the same formula. The contents are computed at elaboration from M and
// C. Combinational; the enclosing QRNS element registers the result.
module lut_mul #(
  parameter int unsigned M = 221,
  parameter int unsigned C = 1,
  localparam int unsigned N = $clog2(M)
) (
  input  logic [N-1:0] u,
  output logic [N-1:0] y
);
  localparam int unsigned CM = C % M;

  // Full table contents; sub-tables below are slices of 16 entries.
  logic [N-1:0] tbl [2**N];
  for (genvar i = 0; i < 2**N; i++) begin : g_tbl
    assign tbl[i] = N'((i * CM) % M);
  end

  if (N == 5) begin : g_n5
    logic [N-1:0] t0, t1;
    assign t0 = tbl[{1'b0, u[3:0]}];
    assign t1 = tbl[{1'b1, u[3:0]}];
    assign y  = u[4] ? t1 : t0;
  end else if (N == 6) begin : g_n6
    logic [N-1:0] t0, t1, t2, t3, m0, m1;
    assign t0 = tbl[{2'd0, u[3:0]}];
    assign t1 = tbl[{2'd1, u[3:0]}];
    assign t2 = tbl[{2'd2, u[3:0]}];
    assign t3 = tbl[{2'd3, u[3:0]}];
    assign m0 = u[4] ? t1 : t0;
    assign m1 = u[4] ? t3 : t2;
    assign y  = u[5] ? m1 : m0;
  end else begin : g_flat
    assign y = tbl[u];
  end
endmodule
