// mod_add: modulo-M adder built from two carry-propagate adders.
//
// For residues a, b < M with n = ceil(log2 M) bits, the first adder forms
// s1 = a + b with carry c1; the second adds the correction 2^n - M to the low
// n bits of s1, giving carry c2. If either carry is set, a + b >= M and the
// corrected sum is the result, otherwise s1 is. This is the two-stage CPA
// structure of the document's modular adder (its printed correction term is
// 2^n - m and n = ceil(log2 m)); the output multiplexer is selected by the OR
// of the two carries. Purely combinational; registers are placed by the
// enclosing QRNS elements.
module mod_add #(
  parameter int unsigned M = 221,
  localparam int unsigned N = $clog2(M)
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s
);
  localparam logic [N:0] CORR = (N+1)'((1 << N) - M);

  logic [N:0] s1, s2;
  logic       c1, c2;

  always_comb begin
    s1 = {1'b0, a} + {1'b0, b};
    c1 = s1[N];
    s2 = {1'b0, s1[N-1:0]} + CORR;
    c2 = s2[N];
    s  = (c1 | c2) ? s2[N-1:0] : s1[N-1:0];
  end
endmodule
