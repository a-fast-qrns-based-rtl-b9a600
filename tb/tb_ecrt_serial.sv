// tb_ecrt_serial: vectors of eight random signed values are loaded as
// residues into the serial converter, mostly back to back every 8 clocks
// (load on the last issuing cycle) and sometimes after idle gaps. Every
// converted entry must arrive in index order, within L/2 LSB of
// X * 2^OUT_W / M, at its expected cycle; busy must be low whenever a load is
// accepted. Runs for the default 8-bit set and for the 7-modulus set.
module tb_ecrt_serial;
  import qrns_pkg::*;
  import qrns_ref_pkg::*;

  localparam int NVEC = 60;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // lane A: 4 x 8-bit moduli, 24-bit output; lane B: 7 moduli, 16-bit output
  localparam mod_set_t MA = '{221, 229, 233, 241, 0, 0, 0, 0};
  localparam mod_set_t MB = '{53, 41, 29, 25, 17, 13, 37, 0};
  localparam int LA = 4, LB = 7, WA = 24, WB = 16;

  logic load;
  res_t ra [8][LA];
  res_t rb [8][LB];
  logic busy_a, busy_b, va, vb;
  logic [2:0] ia, ib;
  logic [WA-1:0] ya;
  logic [WB-1:0] yb;

  ecrt_serial #(.L(LA), .MODS(MA), .OUT_W(WA)) dut_a (.clk, .rst_n, .load, .r_vec(ra),
    .busy(busy_a), .y_valid(va), .y_idx(ia), .y(ya));
  ecrt_serial #(.L(LB), .MODS(MB), .OUT_W(WB)) dut_b (.clk, .rst_n, .load, .r_vec(rb),
    .busy(busy_b), .y_valid(vb), .y_idx(ib), .y(yb));

  typedef struct { longint xa; longint xb; int idx; int due_a; int due_b; } exp_t;
  exp_t qa [$], qb [$];
  longint mta, mtb;

  task automatic fail(string msg);
    failures++;
    if (failures < 12) $display("FAIL @%0d: %s", cyc, msg);
  endtask

  always @(negedge clk) if (rst_n) begin
    if (va) begin
      if (qa.size() == 0) fail("unexpected output A");
      else begin
        exp_t e; real ex;
        e = qa.pop_front();
        ex = real'(e.xa) * (2.0 ** WA) / real'(mta);
        checks += 3;
        if (int'(ia) != e.idx) fail("index A");
        if (cyc != e.due_a) fail($sformatf("timing A: %0d vs %0d", cyc, e.due_a));
        if (real'($signed(ya)) - ex > LA / 2.0 || ex - real'($signed(ya)) > LA / 2.0)
          fail($sformatf("value A got %0d exp %f", $signed(ya), ex));
      end
    end
    if (vb) begin
      if (qb.size() == 0) fail("unexpected output B");
      else begin
        exp_t e; real ex;
        e = qb.pop_front();
        ex = real'(e.xb) * (2.0 ** WB) / real'(mtb);
        checks += 3;
        if (int'(ib) != e.idx) fail("index B");
        if (cyc != e.due_b) fail($sformatf("timing B: %0d vs %0d", cyc, e.due_b));
        if (real'($signed(yb)) - ex > LB / 2.0 || ex - real'($signed(yb)) > LB / 2.0)
          fail($sformatf("value B got %0d exp %f", $signed(yb), ex));
      end
    end
  end

  initial begin
    int n_b2b, n_gap;
    n_b2b = 0; n_gap = 0;
    mta = 1; mtb = 1;
    for (int c = 0; c < LA; c++) mta *= longint'(MA[c]);
    for (int c = 0; c < LB; c++) mtb *= longint'(MB[c]);
    load = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int v = 0; v < NVEC; v++) begin
      int gap;
      gap = ($urandom_range(3) == 0) ? $urandom_range(6) + 1 : 0;
      if (v > 0) begin
        repeat (7) @(negedge clk);
        if (gap > 0) n_gap++; else n_b2b++;
        repeat (gap) @(negedge clk);
      end
      checks += 2;
      if (busy_a) fail("busy A when a load is due");
      if (busy_b) fail("busy B when a load is due");
      for (int k = 0; k < 8; k++) begin
        exp_t e; real f;
        f = (real'($urandom_range(1000000)) / 1000000.0) - 0.5;
        e.xa = longint'(f * 0.9 * real'(mta));
        e.xb = longint'(f * 0.9 * real'(mtb));
        e.idx = k;
        // loaded at this negedge -> captured at the next posedge (cyc+1),
        // entry k issued in cycle cyc+1+k, visible LAT clocks later
        e.due_a = cyc + 1 + k + int'(ecrt_latency(WA));
        e.due_b = cyc + 1 + k + int'(ecrt_latency(WB));
        for (int c = 0; c < LA; c++) ra[k][c] = res_t'(pmod(e.xa, longint'(MA[c])));
        for (int c = 0; c < LB; c++) rb[k][c] = res_t'(pmod(e.xb, longint'(MB[c])));
        qa.push_back(e);
        qb.push_back(e);
      end
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      checks += 2;
      if (!busy_a || !busy_b) fail("not busy after a load");
    end
    repeat (20) @(negedge clk);
    checks += 3;
    if (qa.size() != 0 || qb.size() != 0) fail("entries lost");
    if (n_b2b == 0) fail("no back-to-back load");
    if (n_gap == 0) fail("no idle gap");
    $display("back-to-back loads %0d, gaps %0d", n_b2b, n_gap);
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
