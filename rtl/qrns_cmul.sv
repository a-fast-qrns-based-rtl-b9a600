// qrns_cmul: registered multiplication of a QRNS value by a constant
// coefficient, given by its QRNS components (C1, C2):
//   y1 = |a1 * C1|_M,  y2 = |a2 * C2|_M.
// Each component is one lut_mul table. If the input is real (a1 == a2) both
// tables are addressed by a1; if in addition the coefficient is real
// (C1 == C2) the product is real and one table serves both components, as the
// document prescribes for real twiddle factors on real paths. A real input
// times a complex coefficient in a 7- or 8-bit channel reads both products
// from one 2^n x 2n table: the document packs such pairs, which share an
// address, into one double-width embedded memory (19 multipliers in 14
// memories per channel). The result is registered: one cycle of latency.
module qrns_cmul #(
  parameter int unsigned M  = 221,
  parameter int unsigned C1 = 1,
  parameter int unsigned C2 = 1,
  parameter bit IN_REAL     = 1'b0,
  localparam int unsigned N = $clog2(M)
) (
  input  logic         clk,
  input  logic [N-1:0] a1, a2,
  output logic [N-1:0] y1, y2
);
  logic [N-1:0] p1, p2;

  if (IN_REAL && (C1 == C2)) begin : g_real
    lut_mul #(.M(M), .C(C1)) u_lut1 (.u(a1), .y(p1));
    assign p2 = p1;
  end else if (IN_REAL && (N >= 7)) begin : g_pair
    // {|i*C2|_M, |i*C1|_M} at address i
    logic [2*N-1:0] tbl [2**N];
    for (genvar i = 0; i < 2**N; i++) begin : g_tbl
      assign tbl[i] = {N'((i * (C2 % M)) % M), N'((i * (C1 % M)) % M)};
    end
    assign {p2, p1} = tbl[a1];
  end else begin : g_cplx
    lut_mul #(.M(M), .C(C1)) u_lut1 (.u(a1), .y(p1));
    lut_mul #(.M(M), .C(C2)) u_lut2 (.u(IN_REAL ? a1 : a2), .y(p2));
  end

  always_ff @(posedge clk) begin
    y1 <= p1;
    y2 <= p2;
  end
endmodule
