// mcm_block: the multiplier block of the transposed-form FIR filter.
//
// Multiplies every input digit stream by all filter constants at once and
// hands the products to the structural adders, all on one word frame. The
// constants 29 and 43 come from the graph-based MCM (shared 7x); 2813 comes
// from the minimum-adder-graph multiplier. Each sub-block's output is delayed
// by the difference between its latency and the slowest one (LAT_MCM), so
// every product frame starts LAT_MCM clocks after the input frame (3 clocks
// here). Products are indexed by ds_pkg::prod_e. Six digit-serial adders in
// total. Putting the constants in one block follows the transposed form with
// a multiplier block; the choice of constants is this design's.
module mcm_block
  import ds_pkg::*;
#(
  parameter int unsigned D = D_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         x_start,
  input  logic [D-1:0] x,
  output logic         p_start,
  output logic [D-1:0] p [NPROD]
);

  logic         gb_s, mag_s;
  logic [D-1:0] gb29, gb43, mag;

  gb_mcm_29_43  #(.D(D)) u_gb  (.clk, .rst_n, .x_start, .x,
                                .p_start(gb_s), .p29(gb29), .p43(gb43));
  mag_mult_2813 #(.D(D)) u_mag (.clk, .rst_n, .x_start, .x,
                                .p_start(mag_s), .p(mag));

  logic gb29_s, gb43_s, mag_al_s;
  ds_delay #(.D(D), .N(LAT_MCM - LAT_GB))  u_al29   (.clk, .rst_n, .in_start(gb_s), .din(gb29),
                                                     .out_start(gb29_s), .dout(p[PROD_29]));
  ds_delay #(.D(D), .N(LAT_MCM - LAT_GB))  u_al43   (.clk, .rst_n, .in_start(gb_s), .din(gb43),
                                                     .out_start(gb43_s), .dout(p[PROD_43]));
  ds_delay #(.D(D), .N(LAT_MCM - LAT_MAG)) u_al2813 (.clk, .rst_n, .in_start(mag_s), .din(mag),
                                                     .out_start(mag_al_s), .dout(p[PROD_2813]));

  assign p_start = mag_al_s;

  p_aligned : assert property (@(posedge clk) disable iff (!rst_n)
                               (gb29_s == mag_al_s) && (gb43_s == mag_al_s))
    else $error("mcm_block: product frames are not aligned");

endmodule
