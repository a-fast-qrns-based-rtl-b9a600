// ecrt_serial: serial output converter. One ecrt_conv is shared by the NOUT
// outputs of a transform: a vector of NOUT residue sets is captured on load
// and its entries are converted one per clock, in index order.
//
// Interface: load captures r_vec; busy is high while a later load would
// overwrite entries not yet issued (a load is accepted when the converter is
// idle or issuing its last entry, so vectors may follow every NOUT clocks).
// y / y_idx appear with y_valid ecrt_latency(OUT_W) = 1 + ceil(OUT_W/8)
// clocks after each entry is issued; entry k of a vector loaded at cycle t
// leaves at t + 1 + k + ecrt_latency(OUT_W). Loading while busy is a protocol error (asserted).
// The document lists serial output converters only by their resource use;
// this organisation (hold register, index counter, one shared converter) is
// the simplest one that converts the outputs serially.
module ecrt_serial
  import qrns_pkg::*;
#(
  parameter int unsigned L = 4,
  parameter mod_set_t MODS = '{221, 229, 233, 241, 0, 0, 0, 0},
  parameter int unsigned OUT_W = 24,
  parameter int unsigned NOUT = NPTS,
  localparam int unsigned IW = (NOUT > 1) ? $clog2(NOUT) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  res_t             r_vec [NOUT][L],
  output logic             busy,
  output logic             y_valid,
  output logic [IW-1:0]    y_idx,
  output logic [OUT_W-1:0] y
);
  localparam int unsigned LAT = ecrt_latency(OUT_W);

  res_t          hold [NOUT][L];
  logic          active;
  logic [IW-1:0] cnt;
  logic          last;

  assign last = active && (cnt == IW'(NOUT - 1));
  assign busy = active && !last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      cnt    <= '0;
    end else if (load) begin
      active <= 1'b1;
      cnt    <= '0;
    end else if (last) begin
      active <= 1'b0;
    end else if (active) begin
      cnt <= cnt + IW'(1);
    end
  end

  always_ff @(posedge clk) if (load) hold <= r_vec;

  ecrt_conv #(.L(L), .MODS(MODS), .OUT_W(OUT_W)) u_crt (
    .clk, .r(hold[cnt]), .y);

  // valid / index travel alongside the converter pipeline
  logic          vq [LAT];
  logic [IW-1:0] iq [LAT];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(LAT); i++) begin
        vq[i] <= 1'b0;
        iq[i] <= '0;
      end
    end else begin
      vq[0] <= active;
      iq[0] <= cnt;
      for (int i = 1; i < int'(LAT); i++) begin
        vq[i] <= vq[i-1];
        iq[i] <= iq[i-1];
      end
    end
  end
  assign y_valid = vq[LAT-1];
  assign y_idx   = iq[LAT-1];

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) !(load && busy))
    else $error("ecrt_serial: load while busy");
endmodule
