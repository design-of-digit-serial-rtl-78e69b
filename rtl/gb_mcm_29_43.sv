// gb_mcm_29_43: graph-based multiple constant multiplication of x by 29 and 43.
//
// Three digit-serial operations compute both products by sharing the
// partial product 7x, which cannot be read off the binary form of 43 and is
// therefore out of reach of subexpression elimination on binary digits:
//
//   7x  = (x << 3) - x          level 1
//   29x = (7x << 2) + x         level 2
//   43x = 29x + (7x << 1)       level 3
//
// Each adder registers its output (one clock), so an operand taken from an
// earlier level passes through a one-clock pipelining register (ds_delay)
// before it meets an operand of a later level. 29x is delayed by one more
// clock so that both products leave on the same frame, LAT_GB = 3 clocks
// after the input frame. Flip-flops: shifts 3+2+1, pipelining 3 digits.
// The sharing of 7x and the three-operation count follow the graph-based
// solution for this constant pair; the exact graph (43x built from 29x and
// 7x) and the pipelining are this design's.
module gb_mcm_29_43
  import ds_pkg::*;
#(
  parameter int unsigned D = D_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         x_start,
  input  logic [D-1:0] x,
  output logic         p_start,  // frame start of both products
  output logic [D-1:0] p29,
  output logic [D-1:0] p43
);

  // level 1: 7x = 8x - x
  logic         x8_s,  a7_s;
  logic [D-1:0] x8,    a7;
  ds_lshift  #(.D(D), .K(3))   u_x8  (.clk, .rst_n, .in_start(x_start), .din(x),
                                      .out_start(x8_s), .dout(x8));
  ds_add_sub #(.D(D), .SUB(1)) u_a7  (.clk, .rst_n, .a_start(x8_s), .a(x8),
                                      .b_start(x_start), .b(x), .y_start(a7_s), .y(a7));

  // level 2: 29x = 4*7x + x (x pipelined by one clock)
  logic         x_d_s, a28_s, a29_s;
  logic [D-1:0] x_d,   a28,   a29;
  ds_delay   #(.D(D), .N(1))   u_xd  (.clk, .rst_n, .in_start(x_start), .din(x),
                                      .out_start(x_d_s), .dout(x_d));
  ds_lshift  #(.D(D), .K(2))   u_a28 (.clk, .rst_n, .in_start(a7_s), .din(a7),
                                      .out_start(a28_s), .dout(a28));
  ds_add_sub #(.D(D), .SUB(0)) u_a29 (.clk, .rst_n, .a_start(a28_s), .a(a28),
                                      .b_start(x_d_s), .b(x_d), .y_start(a29_s), .y(a29));

  // level 3: 43x = 29x + 2*7x (7x pipelined by one clock)
  logic         a7_d_s, a14_s, a43_s;
  logic [D-1:0] a7_d,   a14,   a43;
  ds_delay   #(.D(D), .N(1))   u_a7d (.clk, .rst_n, .in_start(a7_s), .din(a7),
                                      .out_start(a7_d_s), .dout(a7_d));
  ds_lshift  #(.D(D), .K(1))   u_a14 (.clk, .rst_n, .in_start(a7_d_s), .din(a7_d),
                                      .out_start(a14_s), .dout(a14));
  ds_add_sub #(.D(D), .SUB(0)) u_a43 (.clk, .rst_n, .a_start(a29_s), .a(a29),
                                      .b_start(a14_s), .b(a14), .y_start(a43_s), .y(a43));

  // align 29x with 43x
  logic a29_d_s;
  ds_delay   #(.D(D), .N(1))   u_o29 (.clk, .rst_n, .in_start(a29_s), .din(a29),
                                      .out_start(a29_d_s), .dout(p29));

  assign p_start = a43_s;
  assign p43     = a43;

  o_aligned : assert property (@(posedge clk) disable iff (!rst_n) a29_d_s == a43_s)
    else $error("gb_mcm_29_43: product frames are not aligned");

endmodule
