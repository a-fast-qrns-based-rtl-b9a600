// qrns_fct_channel: one modulus channel of the QRNS fast cosine transform.
//
// Computes, modulo M and in QRNS form, the five scaled DFT values
// Z(m) = H_m * Y(m), m in {0, 1, 2, 4, 5}, of the reordered real sequence
// y(0..7) (Y is the 8-point DFT of y). From these the full 8-point DCT is
// read off using Re Z(8-m) = -Im Z(m). The datapath is the radix-2
// decimation-in-frequency flow graph of the document, with the branches that
// only feed Z(3), Z(6), Z(7) removed:
//   stage 1  four butterflies (y(n), y(n+4)), twiddles W8^0..W8^3, real inputs
//   stage 2  butterflies (a0,a2) with W8^0 and (a1,a3) with W8^2; on the odd
//            half only the two sums b0+b2 and b1+b3 are kept
//   stage 3  Y(0) = a'0+a'1, Y(4) = a'0-a'1, Y(2) = a''0+a''1,
//            Y(1) = b'0+b'1, Y(5) = b'0-b'1, each followed by a LUT multiply
//            by its H_m.
// Real nodes use a single modular unit (thin paths in the flow graph),
// complex nodes use two (thick paths). Each stage is two registers deep, so
// z* follow y by 6 clock cycles, one full transform per clock.
//
// Scaling (this design's choice, consistent across paths): every twiddle is
// scaled by 2^9 and every H_m by 2^10. The sums a'0, a'1 that reach Y(0) and
// Y(4) never cross a twiddle multiplier, so H_0 and H_4 carry an extra exact
// factor 2^9; all outputs are then 2^19 times the true values.
//
// Ports: y[n] are residues of the reordered real inputs; z0 is real (one
// residue); z1/z2/z4/z5 are QRNS pairs (_1, _2).
module qrns_fct_channel
  import qrns_pkg::*;
#(
  parameter int unsigned M = 221,
  parameter int unsigned R = 47,     // square root of -1 modulo M
  localparam int unsigned N = $clog2(M)
) (
  input  logic         clk,
  input  logic [N-1:0] y [NPTS],
  output logic [N-1:0] z0,
  output logic [N-1:0] z4_1, z4_2,
  output logic [N-1:0] z2_1, z2_2,
  output logic [N-1:0] z1_1, z1_2,
  output logic [N-1:0] z5_1, z5_2
);
  if (((R * R) + 1) % M != 0) begin : g_bad_root
    $error("qrns_fct_channel: R is not a square root of -1 modulo M");
  end

  // Scale-factor constants in QRNS form.
  localparam int H0_RE = H_RE[0] <<< TW_SH;
  localparam int H4_RE = H_RE[4] <<< TW_SH;
  localparam int H4_IM = H_IM[4] <<< TW_SH;
  localparam int unsigned H0C  = modp(longint'(H0_RE), M);
  localparam int unsigned H4C1 = qrns_c1(H4_RE, H4_IM, M, R);
  localparam int unsigned H4C2 = qrns_c2(H4_RE, H4_IM, M, R);
  localparam int unsigned H2C1 = qrns_c1(H_RE[2], H_IM[2], M, R);
  localparam int unsigned H2C2 = qrns_c2(H_RE[2], H_IM[2], M, R);
  localparam int unsigned H1C1 = qrns_c1(H_RE[1], H_IM[1], M, R);
  localparam int unsigned H1C2 = qrns_c2(H_RE[1], H_IM[1], M, R);
  localparam int unsigned H5C1 = qrns_c1(H_RE[5], H_IM[5], M, R);
  localparam int unsigned H5C2 = qrns_c2(H_RE[5], H_IM[5], M, R);

  // ---------------- stage 1 ----------------
  logic [N-1:0] a1 [4], a2 [4];   // sums (real)
  logic [N-1:0] b1 [4], b2 [4];   // differences times W8^n
  for (genvar n = 0; n < 4; n++) begin : g_s1
    localparam int unsigned W1 = qrns_c1(TW_RE[n], TW_IM[n], M, R);
    localparam int unsigned W2 = qrns_c2(TW_RE[n], TW_IM[n], M, R);
    qrns_butterfly #(.M(M), .W1(W1), .W2(W2), .P_REAL(1'b1), .Q_REAL(1'b1)) u_bf (
      .clk, .p1(y[n]), .p2(y[n]), .q1(y[n+4]), .q2(y[n+4]),
      .r1(a1[n]), .r2(a2[n]), .s1(b1[n]), .s2(b2[n]));
  end

  // ---------------- stage 2 ----------------
  logic [N-1:0] ap0_1, ap0_2, ap1_1, ap1_2;     // a'0, a'1 (real)
  logic [N-1:0] app0_1, app0_2, app1_1, app1_2; // a''0 (real), a''1
  logic [N-1:0] bs0_1, bs0_2, bs1_1, bs1_2;     // b0+b2, b1+b3 (registered)
  logic [N-1:0] bp0_1, bp0_2, bp1_1, bp1_2;     // b'0, b'1 (aligned)

  qrns_butterfly #(.M(M),
    .W1(qrns_c1(TW_RE[0], TW_IM[0], M, R)), .W2(qrns_c2(TW_RE[0], TW_IM[0], M, R)),
    .P_REAL(1'b1), .Q_REAL(1'b1)) u_bf_a0 (
    .clk, .p1(a1[0]), .p2(a2[0]), .q1(a1[2]), .q2(a2[2]),
    .r1(ap0_1), .r2(ap0_2), .s1(app0_1), .s2(app0_2));

  qrns_butterfly #(.M(M),
    .W1(qrns_c1(TW_RE[2], TW_IM[2], M, R)), .W2(qrns_c2(TW_RE[2], TW_IM[2], M, R)),
    .P_REAL(1'b1), .Q_REAL(1'b1)) u_bf_a1 (
    .clk, .p1(a1[1]), .p2(a2[1]), .q1(a1[3]), .q2(a2[3]),
    .r1(ap1_1), .r2(ap1_2), .s1(app1_1), .s2(app1_2));

  // b0 is real (W8^0), b2 is complex (W8^2)
  qrns_addsub #(.M(M), .SUB(1'b0), .A_REAL(1'b1), .B_REAL(1'b0)) u_add_b0 (
    .clk, .a1(b1[0]), .a2(b2[0]), .b1(b1[2]), .b2(b2[2]), .y1(bs0_1), .y2(bs0_2));
  qrns_addsub #(.M(M), .SUB(1'b0), .A_REAL(1'b0), .B_REAL(1'b0)) u_add_b1 (
    .clk, .a1(b1[1]), .a2(b2[1]), .b1(b1[3]), .b2(b2[3]), .y1(bs1_1), .y2(bs1_2));

  always_ff @(posedge clk) begin
    bp0_1 <= bs0_1;  bp0_2 <= bs0_2;
    bp1_1 <= bs1_1;  bp1_2 <= bs1_2;
  end

  // ---------------- stage 3 ----------------
  logic [N-1:0] y0_1, y0_2, y4_1, y4_2, y2_1, y2_2, y1_1, y1_2, y5_1, y5_2;

  qrns_addsub #(.M(M), .SUB(1'b0), .A_REAL(1'b1), .B_REAL(1'b1)) u_y0 (
    .clk, .a1(ap0_1), .a2(ap0_2), .b1(ap1_1), .b2(ap1_2), .y1(y0_1), .y2(y0_2));
  qrns_addsub #(.M(M), .SUB(1'b1), .A_REAL(1'b1), .B_REAL(1'b1)) u_y4 (
    .clk, .a1(ap0_1), .a2(ap0_2), .b1(ap1_1), .b2(ap1_2), .y1(y4_1), .y2(y4_2));
  qrns_addsub #(.M(M), .SUB(1'b0), .A_REAL(1'b1), .B_REAL(1'b0)) u_y2 (
    .clk, .a1(app0_1), .a2(app0_2), .b1(app1_1), .b2(app1_2), .y1(y2_1), .y2(y2_2));
  qrns_addsub #(.M(M), .SUB(1'b0), .A_REAL(1'b0), .B_REAL(1'b0)) u_y1 (
    .clk, .a1(bp0_1), .a2(bp0_2), .b1(bp1_1), .b2(bp1_2), .y1(y1_1), .y2(y1_2));
  qrns_addsub #(.M(M), .SUB(1'b1), .A_REAL(1'b0), .B_REAL(1'b0)) u_y5 (
    .clk, .a1(bp0_1), .a2(bp0_2), .b1(bp1_1), .b2(bp1_2), .y1(y5_1), .y2(y5_2));

  logic [N-1:0] z0_2;
  qrns_cmul #(.M(M), .C1(H0C), .C2(H0C), .IN_REAL(1'b1)) u_h0 (
    .clk, .a1(y0_1), .a2(y0_2), .y1(z0), .y2(z0_2));
  qrns_cmul #(.M(M), .C1(H4C1), .C2(H4C2), .IN_REAL(1'b1)) u_h4 (
    .clk, .a1(y4_1), .a2(y4_2), .y1(z4_1), .y2(z4_2));
  qrns_cmul #(.M(M), .C1(H2C1), .C2(H2C2), .IN_REAL(1'b0)) u_h2 (
    .clk, .a1(y2_1), .a2(y2_2), .y1(z2_1), .y2(z2_2));
  qrns_cmul #(.M(M), .C1(H1C1), .C2(H1C2), .IN_REAL(1'b0)) u_h1 (
    .clk, .a1(y1_1), .a2(y1_2), .y1(z1_1), .y2(z1_2));
  qrns_cmul #(.M(M), .C1(H5C1), .C2(H5C2), .IN_REAL(1'b0)) u_h5 (
    .clk, .a1(y5_1), .a2(y5_2), .y1(z5_1), .y2(z5_2));
endmodule
