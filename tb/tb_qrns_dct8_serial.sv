// tb_qrns_dct8_serial: end-to-end test of the processor with its single
// serial output converter (CRT_SERIAL = 1, default modulus set, 24-bit
// output). Vectors enter every 8 clocks (the fastest the serial converter
// allows) or after longer gaps. Each vector's eight results must leave on
// ser_out in index order 0..7, one per clock, the first 14 clocks after the
// vector entered, within L/2 LSB of 2^19 X 2^24 / M and within 0.5 of the DCT
// definition once scaled back. The parallel outputs must stay idle. Counts
// back-to-back vectors, gaps and negative/positive results, and fails if
// any never occurs.
module tb_qrns_dct8_serial;
  import qrns_pkg::*;
  import qrns_ref_pkg::*;

  localparam int unsigned L = 4;
  localparam mod_set_t MODS  = '{221, 229, 233, 241, 0, 0, 0, 0};
  localparam mod_set_t ROOTS = '{47, 107, 89, 177, 0, 0, 0, 0};
  localparam int unsigned OUT_W = 24;
  localparam int NV = 80;
  localparam int LAT_FIRST = 9 + 1 + int'(ecrt_latency(OUT_W));

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  sample_t x [NPTS];
  logic res_valid, out_valid, crt_busy, ser_valid;
  res_t dct_res [NPTS][L];
  logic signed [OUT_W-1:0] dct_out [NPTS];
  logic [2:0] ser_idx;
  logic signed [OUT_W-1:0] ser_out;

  qrns_dct8 #(.L(L), .MODS(MODS), .ROOTS(ROOTS), .OUT_W(OUT_W), .CRT_SERIAL(1'b1)) dut (
    .clk, .rst_n, .in_valid, .x, .res_valid, .dct_res, .out_valid, .dct_out,
    .crt_busy, .ser_valid, .ser_idx, .ser_out);

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_neg = 0, n_pos = 0, n_b2b = 0, n_gap = 0;
  longint mtot;

  typedef struct { longint xi; real xr; int idx; int due; } ent_t;
  ent_t q [$];

  always @(posedge clk) cyc <= cyc + 1;

  task automatic fail(string msg);
    failures++;
    if (failures < 12) $display("FAIL @%0d: %s", cyc, msg);
  endtask

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (out_valid) fail("parallel outputs active in serial mode");
    if (ser_valid) begin
      if (q.size() == 0) fail("unexpected ser_valid");
      else begin
        ent_t e; real ex, v;
        e = q.pop_front();
        ex = real'(e.xi) * (2.0 ** OUT_W) / real'(mtot);
        v  = real'(ser_out) * real'(mtot) / (2.0 ** (OUT_W + 19));
        checks += 4;
        if (int'(ser_idx) != e.idx) fail($sformatf("index %0d exp %0d", ser_idx, e.idx));
        if (cyc != e.due) fail($sformatf("timing %0d exp %0d", cyc, e.due));
        if (real'(ser_out) - ex > L / 2.0 || ex - real'(ser_out) > L / 2.0)
          fail($sformatf("ser_out got %0d exp %f", ser_out, ex));
        if (v - e.xr > 0.5 || e.xr - v > 0.5) fail($sformatf("DCT %f vs %f", v, e.xr));
        if (ser_out < 0) n_neg++;
        if (ser_out > 0) n_pos++;
      end
    end
  end

  initial begin
    mtot = 1;
    for (int c = 0; c < int'(L); c++) mtot *= longint'(MODS[c]);
    foreach (x[n]) x[n] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NV; i++) begin
      smp8_t s;
      vec8_t xi;
      rvec8_t xr;
      if (i > 0) begin
        int gap;
        gap = ($urandom_range(3) == 0) ? $urandom_range(5) + 1 : 0;
        in_valid = 1'b0;
        repeat (7 + gap) @(negedge clk);
        if (gap > 0) n_gap++; else n_b2b++;
      end
      for (int n = 0; n < 8; n++) s[n] = (i == 0) ? 255 : $urandom_range(255);
      foreach (x[n]) x[n] = sample_t'(s[n]);
      in_valid = 1'b1;
      xi = dct_int(s);
      xr = dct_real(s);
      for (int k = 0; k < 8; k++) begin
        ent_t e;
        e.xi = xi[k]; e.xr = xr[k]; e.idx = k; e.due = cyc + LAT_FIRST + k;
        q.push_back(e);
      end
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (40) @(negedge clk);
    checks += 5;
    if (q.size() != 0) fail("results lost");
    if (n_neg == 0) fail("no negative result");
    if (n_pos == 0) fail("no positive result");
    if (n_b2b == 0) fail("no vectors 8 clocks apart");
    if (n_gap == 0) fail("no longer gap");
    $display("mechanisms: negative %0d, positive %0d, back-to-back %0d, gaps %0d", n_neg, n_pos, n_b2b, n_gap);
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
