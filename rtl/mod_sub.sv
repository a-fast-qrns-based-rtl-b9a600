// mod_sub: modulo-M subtractor built from two carry-propagate subtractors.
//
// The first stage forms d1 = a - b as a + ~b + 1 with carry-out c1 (c1 = 1
// means no borrow, a >= b). The second stage subtracts 2^n - M from the low
// n bits of d1, which modulo 2^n equals a - b + M. An inverted c1 selects the
// corrected difference when the first subtraction borrowed. This follows the
// document's modular subtractor (two subtractors, correction 2^n - m, the
// first carry inverted into the output multiplexer). Combinational.
module mod_sub #(
  parameter int unsigned M = 221,
  localparam int unsigned N = $clog2(M)
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] d
);
  localparam logic [N-1:0] CORR = N'((1 << N) - M);

  logic [N:0]   d1;
  logic [N-1:0] d2;
  logic         c1;

  always_comb begin
    d1 = {1'b0, a} + {1'b0, ~b} + (N+1)'(1);
    c1 = d1[N];
    d2 = d1[N-1:0] - CORR;
    d  = (!c1) ? d2 : d1[N-1:0];
  end
endmodule
