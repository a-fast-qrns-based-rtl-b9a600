// tb_qrns_dct8_set6: end-to-end test of the processor with the seven moduli of at most 6 bits
// {53, 41, 29, 25, 17, 13, 37} (all-logic tables), 24-bit converter outputs.
//
// Streams NV eight-sample vectors (all 0, all 255, alternating 0/255, then
// random) with random idle cycles between them. For every vector it checks
//  - the reference integer transform against the DCT definition (|error| of
//    X/2^19 below 0.5, which also validates the fixed-point algorithm);
//  - each output residue on dct_res against (2^19 X) mod m_i, exactly;
//  - each converter output on dct_out against 2^19 X 2^OUT_W / M within L/2
//    LSB, and the value it stands for against the true DCT within 0.5 plus
//    those L/2 LSB (M / 2^(OUT_W+19) per LSB);
//  - the latency: residues 9 and converter outputs 9 + 1 + ceil(OUT_W/8)
//    clocks after the vector entered, one vector accepted per clock.
// It counts how often the design's mechanisms occur (input samples above the
// smallest modulus, i.e. an actual input reduction; negative and positive
// outputs; back-to-back vectors; idle gaps) and fails if one never does.
module tb_qrns_dct8_set6;
  import qrns_pkg::*;
  import qrns_ref_pkg::*;

  localparam int unsigned L = 7;
  localparam mod_set_t MODS  = '{53, 41, 29, 25, 17, 13, 37, 0};
  localparam mod_set_t ROOTS = '{23, 9, 12, 7, 4, 5, 6, 0};
  localparam int unsigned OUT_W = 24;
  localparam int NV = 400;
  localparam int LAT_RES = 9;
  localparam int LAT_OUT = LAT_RES + int'(ecrt_latency(OUT_W));

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  sample_t x [NPTS];
  logic res_valid, out_valid;
  res_t dct_res [NPTS][L];
  logic signed [OUT_W-1:0] dct_out [NPTS];
  logic crt_busy, ser_valid;
  logic [2:0] ser_idx;
  logic signed [OUT_W-1:0] ser_out;

  qrns_dct8 #(.L(L), .MODS(MODS), .ROOTS(ROOTS), .OUT_W(OUT_W)) dut (
    .clk, .rst_n, .in_valid, .x, .res_valid, .dct_res, .out_valid, .dct_out,
    .crt_busy, .ser_valid, .ser_idx, .ser_out);

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_big = 0, n_neg = 0, n_pos = 0, n_b2b = 0, n_gap = 0;
  longint mtot, mmin;
  real dtol;  // DCT tolerance: 0.5 plus L/2 converter LSB

  typedef struct {
    vec8_t  xi;
    rvec8_t xr;
    int     c0;
  } item_t;
  item_t q_res [$], q_out [$];

  always @(posedge clk) cyc <= cyc + 1;

  task automatic fail(string msg);
    failures++;
    if (failures < 12) $display("FAIL @%0d: %s", cyc, msg);
  endtask

  function automatic smp8_t stimulus(int i);
    smp8_t s;
    for (int n = 0; n < 8; n++)
      case (i)
        0: s[n] = 0;
        1: s[n] = 255;
        2: s[n] = (n % 2 == 0) ? 255 : 0;
        3: s[n] = (n < 4) ? 0 : 255;
        default: s[n] = $urandom_range(255);
      endcase
    return s;
  endfunction

  // Output side: compare what the pipeline delivers now.
  always @(negedge clk) if (rst_n) begin
    if (res_valid) begin
      if (q_res.size() == 0) fail("unexpected res_valid");
      else begin
        item_t it;
        it = q_res.pop_front();
        checks++;
        if (cyc - it.c0 != LAT_RES) fail($sformatf("residue latency %0d", cyc - it.c0));
        for (int m = 0; m < 8; m++)
          for (int c = 0; c < int'(L); c++) begin
            checks++;
            if (longint'(dct_res[m][c]) != pmod(it.xi[m], longint'(MODS[c])))
              fail($sformatf("residue X%0d mod %0d: got %0d exp %0d", m, MODS[c],
                             dct_res[m][c], pmod(it.xi[m], longint'(MODS[c]))));
          end
      end
    end
    checks++;
    if (ser_valid || crt_busy) fail("serial converter outputs active in parallel mode");
    if (out_valid) begin
      if (q_out.size() == 0) fail("unexpected out_valid");
      else begin
        item_t it;
        it = q_out.pop_front();
        checks++;
        if (cyc - it.c0 != LAT_OUT) fail($sformatf("output latency %0d", cyc - it.c0));
        for (int m = 0; m < 8; m++) begin
          real e, g, v;
          e = real'(it.xi[m]) * (2.0 ** OUT_W) / real'(mtot);
          g = real'(dct_out[m]);
          checks++;
          if (g - e > L / 2.0 + 1e-6 || e - g > L / 2.0 + 1e-6)
            fail($sformatf("dct_out[%0d] got %0d exp %f", m, dct_out[m], e));
          v = g * real'(mtot) / (2.0 ** (OUT_W + 19));
          checks++;
          if (v - it.xr[m] > dtol || it.xr[m] - v > dtol)
            fail($sformatf("DCT[%0d] = %f, definition gives %f", m, v, it.xr[m]));
          if (dct_out[m] < 0) n_neg++;
          if (dct_out[m] > 0) n_pos++;
        end
      end
    end
  end

  // Input side.
  initial begin
    logic prev_valid;
    mtot = 1;
    mmin = 1 << 20;
    for (int c = 0; c < int'(L); c++) begin
      mtot *= longint'(MODS[c]);
      if (longint'(MODS[c]) < mmin) mmin = longint'(MODS[c]);
    end
    dtol = 0.5 + (L / 2.0) * real'(mtot) / (2.0 ** (OUT_W + 19));
    foreach (x[n]) x[n] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    prev_valid = 1'b0;
    for (int i = 0; i < NV; i++) begin
      item_t it;
      smp8_t s;
      // idle cycles between some vectors
      while (i > 4 && $urandom_range(4) == 0) begin
        @(negedge clk);
        in_valid = 1'b0;
        if (prev_valid) n_gap++;
        prev_valid = 1'b0;
      end
      @(negedge clk);
      s = stimulus(i);
      foreach (x[n]) begin
        x[n] = sample_t'(s[n]);
        if (longint'(s[n]) >= mmin) n_big++;
      end
      in_valid = 1'b1;
      if (prev_valid) n_b2b++;
      prev_valid = 1'b1;
      it.xi = dct_int(s);
      it.xr = dct_real(s);
      it.c0 = cyc;
      for (int m = 0; m < 8; m++) begin
        real d;
        d = real'(it.xi[m]) / real'(1 << 19) - it.xr[m];
        checks++;
        if (d > 0.5 || d < -0.5) fail($sformatf("reference model DCT[%0d] off by %f", m, d));
      end
      q_res.push_back(it);
      q_out.push_back(it);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT_OUT + 3) @(negedge clk);
    checks++;
    if (q_res.size() != 0 || q_out.size() != 0) fail("vectors lost in the pipeline");
    $display("mechanisms: inputs>=min modulus %0d, negative outputs %0d, positive outputs %0d, back-to-back %0d, gaps %0d",
             n_big, n_neg, n_pos, n_b2b, n_gap);
    checks += 5;
    if (n_big == 0) fail("no input needed reduction");
    if (n_neg == 0) fail("no negative output");
    if (n_pos == 0) fail("no positive output");
    if (n_b2b == 0) fail("no back-to-back vectors");
    if (n_gap == 0) fail("no idle gap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
