// tb_bin2rns: every 8-bit input value is streamed, one per clock, into a
// converter for each modulus of both sets (comparator form for 8-bit moduli,
// 4-bit block decomposition for the others); each output is compared with
// x mod M one clock later.
module tb_bin2rns;
  localparam int NM = 12;
  localparam int unsigned MS [NM] = '{221, 229, 233, 241, 53, 41, 29, 25, 17, 13, 5, 37};

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  qrns_pkg::sample_t x = '0, x_d = '0;
  logic run = 1'b0, run_d = 1'b0;

  for (genvar i = 0; i < NM; i++) begin : g_m
    localparam int unsigned M = MS[i];
    localparam int unsigned N = $clog2(M);
    logic [N-1:0] r;
    bin2rns #(.M(M)) dut (.clk, .x, .r);
    always @(negedge clk) if (run_d) begin
      checks++;
      if (32'(r) != 32'(x_d) % M) begin
        failures++;
        if (failures < 10) $display("FAIL M=%0d x=%0d -> %0d", M, x_d, r);
      end
    end
  end

  always @(posedge clk) begin
    x_d   <= x;
    run_d <= run;
  end

  initial begin
    @(negedge clk);
    run = 1'b1;
    for (int v = 0; v < 256; v++) begin
      x = 8'(v);
      @(negedge clk);
    end
    run = 1'b0;
    repeat (3) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
