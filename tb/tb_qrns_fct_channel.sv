// tb_qrns_fct_channel: random 8-sample vectors (plus all-zero and all-255
// vectors) are reordered, reduced modulo M and streamed, one per clock, into
// channels for M = 221 and M = 29. Six cycles later each output must be the
// QRNS encoding of the scaled DFT value Z(m) computed by the reference model
// in exact complex integers (real Z(0) as a single residue).
module tb_qrns_fct_channel;
  import qrns_ref_pkg::*;
  localparam int NB = 3;
  localparam int unsigned MS [NB] = '{221, 29, 241};
  localparam int unsigned RS [NB] = '{ 47, 12, 177};
  localparam int NV  = 300;
  localparam int LAT = 6;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  smp8_t xv [NV];
  zvec_t zr [NV];

  always @(posedge clk) cyc <= cyc + 1;

  initial
    for (int i = 0; i < NV; i++) begin
      for (int n = 0; n < 8; n++)
        xv[i][n] = (i == 0) ? 0 : (i == 1) ? 255 : $urandom_range(255);
      zr[i] = zvals(xv[i]);
    end

  for (genvar b = 0; b < NB; b++) begin : g_b
    localparam int unsigned M = MS[b];
    localparam int unsigned R = RS[b];
    localparam int unsigned N = $clog2(M);
    logic [N-1:0] y [8];
    logic [N-1:0] z0, z4_1, z4_2, z2_1, z2_2, z1_1, z1_2, z5_1, z5_2;

    qrns_fct_channel #(.M(M), .R(R)) dut (.clk, .y, .z0, .z4_1, .z4_2,
      .z2_1, .z2_2, .z1_1, .z1_2, .z5_1, .z5_2);

    task automatic chk(string nm, int k, int m, logic [N-1:0] g1, logic [N-1:0] g2);
      checks++;
      if (32'(g1) != enc1(zr[k][m], M, R) || 32'(g2) != enc2(zr[k][m], M, R)) begin
        failures++;
        if (failures < 10) $display("FAIL M=%0d %s k=%0d", M, nm, k);
      end
    endtask

    always @(negedge clk) begin
      int k;
      k = cyc - 1;
      if (k >= 0 && k < NV) begin
        for (int n = 0; n < 4; n++) begin
          y[n]   <= N'(xv[k][2*n] % M);
          y[7-n] <= N'(xv[k][2*n+1] % M);
        end
      end
      if (k >= LAT && k < NV + LAT) begin
        chk("Z0", k - LAT, 0, z0, z0);
        chk("Z4", k - LAT, 4, z4_1, z4_2);
        chk("Z2", k - LAT, 2, z2_1, z2_2);
        chk("Z1", k - LAT, 1, z1_1, z1_2);
        chk("Z5", k - LAT, 5, z5_1, z5_2);
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
