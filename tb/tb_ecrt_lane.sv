// tb_ecrt_lane: one checked epsilon-CRT converter for tb_ecrt_conv. Streams
// NV signed values X (0, +-1, then random with |X| < 0.45 M) as residues,
// one per clock, and compares each output with X * 2^OW / M, allowing the
// L/2 LSB error of the table rounding. Reports its counts on its ports.
module tb_ecrt_lane #(
  parameter int L = 4,
  parameter qrns_pkg::mod_set_t MODS = '{221, 229, 233, 241, 0, 0, 0, 0},
  parameter int OW = 24,
  parameter int NV = 400
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  import qrns_ref_pkg::*;
  localparam int LAT = int'(qrns_pkg::ecrt_latency(OW));

  qrns_pkg::res_t r [L];
  logic [OW-1:0] y;
  longint mtot;
  longint xv [NV];
  int cyc = 0;

  ecrt_conv #(.L(L), .MODS(MODS), .OUT_W(OW)) dut (.clk, .r, .y);

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    mtot = 1;
    for (int i = 0; i < L; i++) mtot *= longint'(MODS[i]);
    for (int i = 0; i < NV; i++) begin
      real f;
      f = ((real'($urandom_range(1000000)) / 1000000.0) - 0.5) * 0.9;
      xv[i] = (i == 0) ? 0 : (i == 1) ? 1 : (i == 2) ? -1 : longint'(f * real'(mtot));
    end
  end

  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    int k;
    k = cyc - 1;
    if (k >= 0 && k < NV)
      for (int i = 0; i < L; i++) r[i] <= qrns_pkg::res_t'(pmod(xv[k], longint'(MODS[i])));
    if (k >= LAT && k < NV + LAT) begin
      real e, g;
      e = real'(xv[k-LAT]) * (2.0 ** OW) / real'(mtot);
      g = real'($signed(y));
      checks++;
      if (g - e > L / 2.0 + 1e-6 || e - g > L / 2.0 + 1e-6) begin
        failures++;
        if (failures < 5) $display("FAIL L=%0d W=%0d X=%0d got %0d exp %f", L, OW, xv[k-LAT], $signed(y), e);
      end
    end
    if (k == NV + LAT) done <= 1'b1;
  end
endmodule
