// qrns_butterfly: radix-2 decimation-in-frequency butterfly in QRNS form,
//   r = p + q,   s = (p - q) * w   (all modulo M, component by component).
//
// It is made of an adder, a subtractor and a constant-coefficient LUT
// multiplier per QRNS component, as in the document's butterfly. The twiddle
// factor w is given by its QRNS components (W1, W2). P_REAL / Q_REAL mark
// real inputs, which shrink the adder, subtractor and multiplier to a single
// modular unit where the result stays real (see qrns_addsub, qrns_cmul).
//
// Timing: the sum and difference are registered (cycle 1), the product is
// registered (cycle 2); the sum passes a matching register so that r and s
// leave together two cycles after p and q enter. One butterfly per clock.
module qrns_butterfly #(
  parameter int unsigned M  = 221,
  parameter int unsigned W1 = 1,
  parameter int unsigned W2 = 1,
  parameter bit P_REAL      = 1'b0,
  parameter bit Q_REAL      = 1'b0,
  localparam int unsigned N = $clog2(M)
) (
  input  logic         clk,
  input  logic [N-1:0] p1, p2,
  input  logic [N-1:0] q1, q2,
  output logic [N-1:0] r1, r2,
  output logic [N-1:0] s1, s2
);
  localparam bit D_REAL = P_REAL && Q_REAL;

  logic [N-1:0] sum1, sum2, dif1, dif2;

  qrns_addsub #(.M(M), .SUB(1'b0), .A_REAL(P_REAL), .B_REAL(Q_REAL)) u_add (
    .clk, .a1(p1), .a2(p2), .b1(q1), .b2(q2), .y1(sum1), .y2(sum2));

  qrns_addsub #(.M(M), .SUB(1'b1), .A_REAL(P_REAL), .B_REAL(Q_REAL)) u_sub (
    .clk, .a1(p1), .a2(p2), .b1(q1), .b2(q2), .y1(dif1), .y2(dif2));

  qrns_cmul #(.M(M), .C1(W1), .C2(W2), .IN_REAL(D_REAL)) u_mul (
    .clk, .a1(dif1), .a2(dif2), .y1(s1), .y2(s2));

  always_ff @(posedge clk) begin
    r1 <= sum1;
    r2 <= sum2;
  end
endmodule
