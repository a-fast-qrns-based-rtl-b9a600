// tb_mod_sub: exhaustive check of mod_sub for every modulus of both modulus
// sets: all operand pairs a, b < M are applied and compared with (a-b) mod M.
module tb_mod_sub;
  localparam int NM = 12;
  localparam int unsigned MS [NM] = '{221, 229, 233, 241, 53, 41, 29, 25, 17, 13, 5, 37};

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int done = 0;

  for (genvar i = 0; i < NM; i++) begin : g_m
    localparam int unsigned M = MS[i];
    localparam int unsigned N = $clog2(M);
    logic [N-1:0] a, b, s;
    mod_sub #(.M(M)) dut (.a, .b, .d(s));
    initial begin
      for (int unsigned x = 0; x < M; x++)
        for (int unsigned y = 0; y < M; y++) begin
          a = N'(x); b = N'(y);
          #1;
          checks++;
          if (32'(s) != (x + M - y) % M) begin
            failures++;
            if (failures < 10) $display("FAIL M=%0d %0d-%0d -> %0d", M, x, y, s);
          end
        end
      done++;
    end
  end

  initial begin
    wait (done == NM);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
