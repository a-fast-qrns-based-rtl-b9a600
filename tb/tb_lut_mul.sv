// tb_lut_mul: exhaustive check of lut_mul for residue widths 3 to 8 bits,
// covering the flat table, the two-table (5-bit) and the four-table (6-bit)
// organisations: every u < M is applied and y compared with (u*C) mod M.
module tb_lut_mul;
  localparam int NM = 10;
  localparam int unsigned MS [NM] = '{221, 241, 53, 41, 29, 25, 17, 13, 5, 233};
  localparam int unsigned CS [NM] = '{ 47, 200, 23,  9, 12,  7, 16, 11, 3, 232};

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int done = 0;

  for (genvar i = 0; i < NM; i++) begin : g_m
    localparam int unsigned M = MS[i];
    localparam int unsigned C = CS[i];
    localparam int unsigned N = $clog2(M);
    logic [N-1:0] u, y;
    lut_mul #(.M(M), .C(C)) dut (.u, .y);
    initial begin
      for (int unsigned x = 0; x < M; x++) begin
        u = N'(x);
        #1;
        checks++;
        if (32'(y) != (x * C) % M) begin
          failures++;
          if (failures < 10) $display("FAIL M=%0d C=%0d u=%0d -> %0d", M, C, x, y);
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
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
