// ecrt_conv: auto-scaling RNS-to-binary converter (epsilon-CRT).
//
// For a value X with residues x_i modulo m_i (i = 0..L-1, M = prod m_i) the
// Chinese remainder theorem gives
//   X / M = frac( sum_i |x_i * M_i^-1|_{m_i} / m_i ),   M_i = M / m_i.
// Each channel therefore has one table of 2^k entries of OUT_W bits,
//   T_i[v] = round( 2^OUT_W * |v * M_i^-1|_{m_i} / m_i )  mod 2^OUT_W,
// and an OUT_W-bit binary adder tree sums the table outputs modulo 2^OUT_W.
// The result y is X scaled by 2^OUT_W / M, read as an OUT_W-bit two's
// complement number (X in [-M/2, M/2)); its error is at most L/2 LSB from the
// table rounding. Table size (one 2^k x n table per modulus) and the n-bit
// adder tree follow the document; the table formula is the standard
// epsilon-CRT one. Table contents are computed at elaboration.
//
// Timing: table outputs are registered. The multi-operand adder is then
// pipelined in 8-bit slices, one register stage per slice, each stage adding
// its slice of all L table outputs and the carry of the slice below; lower
// result slices ride along to the end. That gives the 3-, 2- and 1-stage
// adders the document reports for 24-, 16- and 8-bit outputs. The way the
// stages are cut is this design's reading. y follows r by
// ecrt_latency(OUT_W) = 1 + ceil(OUT_W/8) cycles, one conversion per clock.
module ecrt_conv
  import qrns_pkg::*;
#(
  parameter int unsigned L = 4,
  parameter mod_set_t MODS = '{221, 229, 233, 241, 0, 0, 0, 0},
  parameter int unsigned OUT_W = 24
) (
  input  logic                clk,
  input  res_t                r [L],
  output logic [OUT_W-1:0]    y
);

  // |prod_{j != i} m_j|_{m_i}
  function automatic int unsigned mi_mod(int unsigned i);
    longint acc;
    acc = 1;
    for (int unsigned j = 0; j < L; j++)
      if (j != i) acc = (acc * longint'(MODS[j])) % longint'(MODS[i]);
    return 32'(acc);
  endfunction

  function automatic logic [OUT_W-1:0] entry(int unsigned v, int unsigned m,
                                             int unsigned inv);
    longint t, num;
    t   = (longint'(v) * longint'(inv)) % longint'(m);
    num = (t <<< (OUT_W + 1)) + longint'(m);
    return OUT_W'(num / (2 * longint'(m)));
  endfunction

  localparam int unsigned S  = (OUT_W + ECRT_SEG_W - 1) / ECRT_SEG_W;
  localparam int unsigned CW = (L > 1) ? $clog2(L) : 1;
  localparam int unsigned SW = ECRT_SEG_W + CW;

  logic [OUT_W-1:0] opd [S][L];  // table outputs, delayed to reach stage s
  logic [OUT_W-1:0] acc [S];     // result slices 0..s after stage s
  logic [CW-1:0]    cy  [S];     // carry out of stage s

  for (genvar i = 0; i < L; i++) begin : g_ch
    localparam int unsigned MI  = MODS[i];
    localparam int unsigned INV = mod_inv(mi_mod(i), MI);
    if (INV == 0) begin : g_not_coprime
      $error("ecrt_conv: the moduli are not pairwise coprime");
    end
    logic [OUT_W-1:0] tbl [2**RES_W];
    for (genvar v = 0; v < 2**RES_W; v++) begin : g_tbl
      assign tbl[v] = entry(v, MI, INV);
    end
    always_ff @(posedge clk) opd[0][i] <= tbl[r[i]];
  end

  // Stage s adds slice s of all L operands and the carry of stage s-1.
  // The slice sum is below 2^ECRT_SEG_W * L, so the carry stays below L.
  for (genvar s = 0; s < S; s++) begin : g_seg
    localparam int unsigned LO = s * ECRT_SEG_W;
    localparam int unsigned WS = (OUT_W - LO < ECRT_SEG_W) ? OUT_W - LO : ECRT_SEG_W;
    logic [SW-1:0]    cin;
    logic [OUT_W-1:0] prev;
    logic [SW-1:0]    sum;
    if (s == 0) begin : g_first
      assign cin  = '0;
      assign prev = '0;
    end else begin : g_next
      assign cin  = SW'(cy[s-1]);
      assign prev = acc[s-1];
      always_ff @(posedge clk) opd[s] <= opd[s-1];
    end
    always_comb begin
      sum = cin;
      for (int i = 0; i < int'(L); i++) sum = sum + SW'(opd[s][i][LO +: WS]);
    end
    always_ff @(posedge clk) begin
      cy[s]  <= sum[SW-1:ECRT_SEG_W];
      acc[s] <= prev;
      acc[s][LO +: WS] <= sum[WS-1:0];
    end
  end

  assign y = acc[S-1];
endmodule
