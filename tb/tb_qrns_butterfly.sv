// tb_qrns_butterfly: random complex (and real) integers p, q are QRNS-encoded
// and streamed into butterflies, one pair per clock; two cycles later r must
// encode p + q and s must encode (p - q) * w for the twiddle w. Covers a
// complex-input butterfly with W8^1 and a real-input one with W8^2 (real
// inputs, complex product) and W8^0 (all real), for an 8-bit and a 6-bit
// modulus.
module tb_qrns_butterfly;
  import qrns_ref_pkg::*;
  localparam int NB = 6;
  localparam int unsigned MS [NB] = '{221, 221, 221, 53, 53, 53};
  localparam int unsigned RS [NB] = '{ 47,  47,  47, 23, 23, 23};
  localparam int          KS [NB] = '{  1,   2,   0,  3,  2,  0};
  localparam bit          RL [NB] = '{  0,   1,   1,  0,  1,  1};
  localparam int NV  = 400;
  localparam int LAT = 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  cplx_t pv [NV], qv [NV];

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    for (int i = 0; i < NV; i++) begin
      pv[i][0] = longint'($urandom_range(600)) - 300;
      qv[i][0] = longint'($urandom_range(600)) - 300;
      pv[i][1] = longint'($urandom_range(600)) - 300;
      qv[i][1] = longint'($urandom_range(600)) - 300;
    end
  end

  for (genvar b = 0; b < NB; b++) begin : g_b
    localparam int unsigned M = MS[b];
    localparam int unsigned R = RS[b];
    localparam int unsigned N = $clog2(M);
    localparam cplx_t W = twiddle(KS[b]);
    logic [N-1:0] p1, p2, q1, q2, r1, r2, s1, s2;
    cplx_t pc, qc;

    qrns_butterfly #(.M(M), .W1(enc1(W, M, R)), .W2(enc2(W, M, R)),
                     .P_REAL(RL[b]), .Q_REAL(RL[b])) dut (
      .clk, .p1, .p2, .q1, .q2, .r1, .r2, .s1, .s2);

    always @(negedge clk) begin
      int k;
      k = cyc - 1;
      if (k < NV) begin
        pc = pv[k]; qc = qv[k];
        if (RL[b]) begin pc[1] = 0; qc[1] = 0; end
        p1 <= N'(enc1(pc, M, R)); p2 <= N'(enc2(pc, M, R));
        q1 <= N'(enc1(qc, M, R)); q2 <= N'(enc2(qc, M, R));
      end
      if (k >= LAT && k < NV + LAT) begin
        cplx_t pe, qe, re, se;
        pe = pv[k - LAT]; qe = qv[k - LAT];
        if (RL[b]) begin pe[1] = 0; qe[1] = 0; end
        re = cadd(pe, qe);
        se = cmul(csub(pe, qe), W);
        checks += 2;
        if (32'(r1) != enc1(re, M, R) || 32'(r2) != enc2(re, M, R)) begin
          failures++;
          if (failures < 10) $display("FAIL r bf%0d k=%0d", b, k);
        end
        if (32'(s1) != enc1(se, M, R) || 32'(s2) != enc2(se, M, R)) begin
          failures++;
          if (failures < 10) $display("FAIL s bf%0d k=%0d", b, k);
        end
      end
    end
  end

  initial begin
    wait (cyc == NV + LAT + 4);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
