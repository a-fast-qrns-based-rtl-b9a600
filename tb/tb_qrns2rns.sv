// tb_qrns2rns: random complex integers a + jb are QRNS-encoded and streamed,
// one per clock, into converters for an 8-bit, a 5-bit and a 3-bit modulus,
// with and without NEG_IM; two cycles later re must equal a mod M and im
// must equal b mod M (or -b mod M with NEG_IM).
module tb_qrns2rns;
  import qrns_ref_pkg::*;
  localparam int NB = 6;
  localparam int unsigned MS [NB] = '{221, 221, 25, 25, 5, 241};
  localparam int unsigned RS [NB] = '{ 47,  47,  7,  7, 2, 177};
  localparam bit          NG [NB] = '{  0,   1,  0,  1, 1,   0};
  localparam int NV  = 300;
  localparam int LAT = 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  cplx_t zv [NV];

  always @(posedge clk) cyc <= cyc + 1;

  initial
    for (int i = 0; i < NV; i++) begin
      zv[i][0] = longint'($urandom_range(200000)) - 100000;
      zv[i][1] = longint'($urandom_range(200000)) - 100000;
    end

  for (genvar b = 0; b < NB; b++) begin : g_b
    localparam int unsigned M = MS[b];
    localparam int unsigned R = RS[b];
    localparam int unsigned N = $clog2(M);
    logic [N-1:0] z1, z2, re, im;

    qrns2rns #(.M(M), .R(R), .NEG_IM(NG[b])) dut (.clk, .z1, .z2, .re, .im);

    always @(negedge clk) begin
      int k;
      k = cyc - 1;
      if (k >= 0 && k < NV) begin
        z1 <= N'(enc1(zv[k], M, R));
        z2 <= N'(enc2(zv[k], M, R));
      end
      if (k >= LAT && k < NV + LAT) begin
        longint ere, eim;
        ere = pmod(zv[k-LAT][0], M);
        eim = pmod(NG[b] ? -zv[k-LAT][1] : zv[k-LAT][1], M);
        checks += 2;
        if (longint'(re) != ere) begin
          failures++;
          if (failures < 10) $display("FAIL re M=%0d k=%0d got %0d exp %0d", M, k, re, ere);
        end
        if (longint'(im) != eim) begin
          failures++;
          if (failures < 10) $display("FAIL im M=%0d k=%0d got %0d exp %0d", M, k, im, eim);
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
