// qrns_dct8: fully pipelined 8-point DCT processor in QRNS arithmetic.
//
// The N = 8 point DCT X(m) = sqrt(2/N) K_m sum x(n) cos((2n+1) m pi / 2N) is
// computed as the real part of Z(m) = H_m Y(m), where Y is the 8-point DFT of
// the reordered sequence y(n) = x(2n), y(7-n) = x(2n+1). Only Z(0), Z(1),
// Z(2), Z(4), Z(5) are formed; the rest follow from Re Z(8-m) = -Im Z(m):
//   X = { Re Z0, Re Z1, Re Z2, -Im Z5, Re Z4, Re Z5, -Im Z2, -Im Z1 }.
// All arithmetic runs in L independent residue channels, one per modulus;
// complex values use the QRNS pair representation, so a complex multiply is
// two small table look-ups and no channel carries information to another.
//
// Datapath per channel: bin2rns (x -> residues, 1 cycle), qrns_fct_channel
// (FFT + H_m scaling, 6 cycles), qrns2rns (QRNS -> residues of Re / -Im,
// 2 cycles). The residues of the eight outputs (X * 2^19) appear on dct_res
// with res_valid. Eight ecrt_conv converters (one per output, in parallel)
// then give y = X * 2^19 * 2^OUT_W / M as OUT_W-bit two's complement numbers
// on dct_out with out_valid, 1 + ceil(OUT_W/8) cycles later.
//
// Default parameters: the document's 8-bit modulus set {221, 229, 233, 241}
// with the roots {47, 107, 89, 177} and a 24-bit converter output. The
// document's alternative, all-logic set of moduli up to 6 bits is selected
// with L = 7, MODS = '{53, 41, 29, 25, 17, 13, 37, 0},
// ROOTS = '{23, 9, 12, 7, 4, 5, 6, 0}. That set is listed in the document
// with 5 as its last modulus, which shares a factor with 25; 37 (of the form
// 4k+1, coprime with the others) is used instead. The roots of this set are
// this design's own (r*r = -1 mod m).
//
// Output conversion (CRT_SERIAL): by default eight ecrt_conv converters work
// in parallel and dct_out / out_valid carry all eight results at once. With
// CRT_SERIAL = 1 a single ecrt_serial converter takes the eight residue sets
// and delivers them one per clock on ser_out / ser_idx / ser_valid; vectors
// must then be at least 8 clocks apart (crt_busy, asserted in ecrt_serial),
// and dct_out / out_valid stay 0. In the parallel mode the ser_* and crt_busy
// outputs stay 0. The document gives resource costs for both kinds of output
// converter; making the parallel one the default, to keep one vector per
// clock, is this design's choice.
//
// Interface: one 8-sample vector x (unsigned 8-bit) per clock when in_valid
// is high; no back-pressure. Valid flags are reset by the active-low rst_n;
// the data pipeline is not reset.
module qrns_dct8
  import qrns_pkg::*;
#(
  parameter int unsigned L = 4,
  parameter mod_set_t MODS  = '{221, 229, 233, 241, 0, 0, 0, 0},
  parameter mod_set_t ROOTS = '{47, 107, 89, 177, 0, 0, 0, 0},
  parameter int unsigned OUT_W = 24,
  parameter bit CRT_SERIAL = 1'b0   // 0: eight parallel converters, 1: one serial
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  sample_t                 x       [NPTS],
  output logic                    res_valid,
  output res_t                    dct_res [NPTS][L],
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] dct_out [NPTS],
  output logic                    crt_busy,
  output logic                    ser_valid,
  output logic [2:0]              ser_idx,
  output logic signed [OUT_W-1:0] ser_out
);
  localparam int unsigned LAT_RES = 1 + 6 + 2;
  localparam int unsigned LAT_OUT = LAT_RES + ecrt_latency(OUT_W);

  // y(n) = x(2n), y(7-n) = x(2n+1)
  localparam int unsigned PERM [NPTS] = '{0, 2, 4, 6, 7, 5, 3, 1};

  for (genvar c = 0; c < L; c++) begin : g_chan
    localparam int unsigned M = MODS[c];
    localparam int unsigned R = ROOTS[c];
    localparam int unsigned N = $clog2(M);

    logic [N-1:0] yr [NPTS];
    for (genvar n = 0; n < NPTS; n++) begin : g_in
      bin2rns #(.M(M)) u_b2r (.clk, .x(x[PERM[n]]), .r(yr[n]));
    end

    logic [N-1:0] z0, z4_1, z4_2, z2_1, z2_2, z1_1, z1_2, z5_1, z5_2;
    qrns_fct_channel #(.M(M), .R(R)) u_fct (
      .clk, .y(yr), .z0,
      .z4_1, .z4_2, .z2_1, .z2_2, .z1_1, .z1_2, .z5_1, .z5_2);

    logic [N-1:0] x0_d1, x0, x1, x2, x3, x4, x5, x6, x7, unused_im4;
    always_ff @(posedge clk) begin
      x0_d1 <= z0;
      x0    <= x0_d1;
    end
    qrns2rns #(.M(M), .R(R), .NEG_IM(1'b1)) u_q1 (.clk, .z1(z1_1), .z2(z1_2), .re(x1), .im(x7));
    qrns2rns #(.M(M), .R(R), .NEG_IM(1'b1)) u_q2 (.clk, .z1(z2_1), .z2(z2_2), .re(x2), .im(x6));
    qrns2rns #(.M(M), .R(R), .NEG_IM(1'b1)) u_q5 (.clk, .z1(z5_1), .z2(z5_2), .re(x5), .im(x3));
    qrns2rns #(.M(M), .R(R), .NEG_IM(1'b0)) u_q4 (.clk, .z1(z4_1), .z2(z4_2), .re(x4), .im(unused_im4));

    assign dct_res[0][c] = res_t'(x0);
    assign dct_res[1][c] = res_t'(x1);
    assign dct_res[2][c] = res_t'(x2);
    assign dct_res[3][c] = res_t'(x3);
    assign dct_res[4][c] = res_t'(x4);
    assign dct_res[5][c] = res_t'(x5);
    assign dct_res[6][c] = res_t'(x6);
    assign dct_res[7][c] = res_t'(x7);
  end

  if (!CRT_SERIAL) begin : g_par
    for (genvar m = 0; m < NPTS; m++) begin : g_out
      logic [OUT_W-1:0] yb;
      ecrt_conv #(.L(L), .MODS(MODS), .OUT_W(OUT_W)) u_crt (
        .clk, .r(dct_res[m]), .y(yb));
      assign dct_out[m] = signed'(yb);
    end
    assign crt_busy  = 1'b0;
    assign ser_valid = 1'b0;
    assign ser_idx   = '0;
    assign ser_out   = '0;
  end else begin : g_ser
    logic [OUT_W-1:0] yb;
    ecrt_serial #(.L(L), .MODS(MODS), .OUT_W(OUT_W), .NOUT(NPTS)) u_crt (
      .clk, .rst_n, .load(res_valid), .r_vec(dct_res),
      .busy(crt_busy), .y_valid(ser_valid), .y_idx(ser_idx), .y(yb));
    assign ser_out = signed'(yb);
    for (genvar m = 0; m < NPTS; m++) begin : g_zero
      assign dct_out[m] = '0;
    end
  end

  logic [LAT_OUT-1:0] vpipe;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[LAT_OUT-2:0], in_valid};
  end
  assign res_valid = vpipe[LAT_RES-1];
  assign out_valid = CRT_SERIAL ? 1'b0 : vpipe[LAT_OUT-1];
endmodule
