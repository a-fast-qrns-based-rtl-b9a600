// tb_ecrt_conv: epsilon-CRT converters for both modulus sets with 24-, 16-
// and 8-bit outputs (five lanes, see tb_ecrt_lane). Each lane streams signed
// values as residues, one per clock, and checks every scaled output, with
// the pipeline latency of 1 + ceil(OUT_W/8) cycles.
module tb_ecrt_conv;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks, failures;
  int ck [5], fl [5];
  logic dn [5];

  tb_ecrt_lane #(.L(4), .MODS('{221, 229, 233, 241, 0, 0, 0, 0}), .OW(24)) u_l0 (.clk, .checks(ck[0]), .failures(fl[0]), .done(dn[0]));
  tb_ecrt_lane #(.L(4), .MODS('{221, 229, 233, 241, 0, 0, 0, 0}), .OW(16)) u_l1 (.clk, .checks(ck[1]), .failures(fl[1]), .done(dn[1]));
  tb_ecrt_lane #(.L(4), .MODS('{221, 229, 233, 241, 0, 0, 0, 0}), .OW(8))  u_l2 (.clk, .checks(ck[2]), .failures(fl[2]), .done(dn[2]));
  tb_ecrt_lane #(.L(7), .MODS('{53, 41, 29, 25, 17, 13, 37, 0}), .OW(24)) u_l3 (.clk, .checks(ck[3]), .failures(fl[3]), .done(dn[3]));
  tb_ecrt_lane #(.L(7), .MODS('{53, 41, 29, 25, 17, 13, 37, 0}), .OW(16)) u_l4 (.clk, .checks(ck[4]), .failures(fl[4]), .done(dn[4]));

  function automatic void report();
    checks = 0; failures = 0;
    for (int i = 0; i < 5; i++) begin checks += ck[i]; failures += fl[i]; end
  endfunction

  initial begin
    wait (dn[0] && dn[1] && dn[2] && dn[3] && dn[4]);
    @(posedge clk);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    report();
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
