// mag_mult_2813: minimum-adder-graph digit-serial multiplier for 2813.
//
// The canonic signed-digit form of 2813 (4096 - 1024 - 256 - 4 + 1) has five
// nonzero digits and so needs four adders; a minimum adder graph needs only
// three, by reusing the partial product 3x twice:
//
//   3x    = (x << 1) + x          level 1
//   11x   = (x << 3) + 3x         level 2
//   2813x = (11x << 8) - 3x       level 3   (2816x - 3x)
//
// Adders register their outputs (one clock each). Operands from an earlier
// level pass through a one-clock pipelining register: x before the level-2
// adder and 3x before the level-3 subtractor. The product frame starts
// LAT_MAG = 3 clocks after the input frame. Flip-flops: shifts 1+3+8 = 12,
// pipelining 2 digits. The adder cost of 3 follows the minimum-adder-graph
// multiplier; the particular graph and the pipelining are this design's.
module mag_mult_2813
  import ds_pkg::*;
#(
  parameter int unsigned D = D_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         x_start,
  input  logic [D-1:0] x,
  output logic         p_start,
  output logic [D-1:0] p
);

  // level 1: 3x = 2x + x
  logic         x2_s, a3_s;
  logic [D-1:0] x2,   a3;
  ds_lshift  #(.D(D), .K(1))   u_x2   (.clk, .rst_n, .in_start(x_start), .din(x),
                                       .out_start(x2_s), .dout(x2));
  ds_add_sub #(.D(D), .SUB(0)) u_a3   (.clk, .rst_n, .a_start(x2_s), .a(x2),
                                       .b_start(x_start), .b(x), .y_start(a3_s), .y(a3));

  // level 2: 11x = 8x + 3x (x pipelined by one clock)
  logic         x_d_s, x8_s, a11_s;
  logic [D-1:0] x_d,   x8,   a11;
  ds_delay   #(.D(D), .N(1))   u_xd   (.clk, .rst_n, .in_start(x_start), .din(x),
                                       .out_start(x_d_s), .dout(x_d));
  ds_lshift  #(.D(D), .K(3))   u_x8   (.clk, .rst_n, .in_start(x_d_s), .din(x_d),
                                       .out_start(x8_s), .dout(x8));
  ds_add_sub #(.D(D), .SUB(0)) u_a11  (.clk, .rst_n, .a_start(x8_s), .a(x8),
                                       .b_start(a3_s), .b(a3), .y_start(a11_s), .y(a11));

  // level 3: 2813x = 256*11x - 3x (3x pipelined by one clock)
  logic         a3_d_s, a2816_s;
  logic [D-1:0] a3_d,   a2816;
  ds_delay   #(.D(D), .N(1))   u_a3d  (.clk, .rst_n, .in_start(a3_s), .din(a3),
                                       .out_start(a3_d_s), .dout(a3_d));
  ds_lshift  #(.D(D), .K(8))   u_a2816(.clk, .rst_n, .in_start(a11_s), .din(a11),
                                       .out_start(a2816_s), .dout(a2816));
  ds_add_sub #(.D(D), .SUB(1)) u_p    (.clk, .rst_n, .a_start(a2816_s), .a(a2816),
                                       .b_start(a3_d_s), .b(a3_d), .y_start(p_start), .y(p));

endmodule
