// qrns_addsub: registered QRNS adder or subtractor, y = a +/- b (mod M).
//
// A QRNS value is the pair (c1, c2). Addition and subtraction act on each
// component on its own, so a complex operation is two modular units. When
// both operands are real (c1 == c2 by construction) a single modular unit
// suffices and its result is copied to both components, as the document does
// for the real-input nodes of the FFT. A real operand feeds its c1 to both
// components. The result is registered: one cycle of latency.
module qrns_addsub #(
  parameter int unsigned M = 221,
  parameter bit SUB    = 1'b0,   // 0: a + b, 1: a - b
  parameter bit A_REAL = 1'b0,
  parameter bit B_REAL = 1'b0,
  localparam int unsigned N = $clog2(M)
) (
  input  logic         clk,
  input  logic [N-1:0] a1, a2,
  input  logic [N-1:0] b1, b2,
  output logic [N-1:0] y1, y2
);
  logic [N-1:0] r1, r2;

  if (SUB) begin : g_sub
    mod_sub #(.M(M)) u_c1 (.a(a1), .b(b1), .d(r1));
    if (A_REAL && B_REAL) begin : g_real
      assign r2 = r1;
    end else begin : g_cplx
      mod_sub #(.M(M)) u_c2 (.a(A_REAL ? a1 : a2), .b(B_REAL ? b1 : b2), .d(r2));
    end
  end else begin : g_add
    mod_add #(.M(M)) u_c1 (.a(a1), .b(b1), .s(r1));
    if (A_REAL && B_REAL) begin : g_real
      assign r2 = r1;
    end else begin : g_cplx
      mod_add #(.M(M)) u_c2 (.a(A_REAL ? a1 : a2), .b(B_REAL ? b1 : b2), .s(r2));
    end
  end

  always_ff @(posedge clk) begin
    y1 <= r1;
    y2 <= r2;
  end
endmodule
