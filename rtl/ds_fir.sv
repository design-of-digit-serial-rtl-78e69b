// ds_fir: digit-serial transposed-form FIR filter with a shift-adds
// multiplier block.
//
// y(n) = sum_k h[k] * x(n-k), h = {29, 43, 2813, 43, 29} (ds_pkg::TAP_PROD).
// Samples enter as WL-bit two's-complement words (sign-extended by the
// sender), streamed D bits per clock, least significant digit first, words
// back to back: a word every WL/D clocks, x_start high on each first digit.
// The multiplier block (mcm_block) forms every h[k]*x(n) without
// multipliers. In the transposed form the last tap's product goes straight
// into a delay line; every other tap adds its product to the delayed partial
// sum of the tap after it:
//
//   s[NTAPS-1] = h[NTAPS-1] x(n)
//   s[k]       = h[k] x(n) + s[k+1](n-1)       y(n) = s[0]
//
// The sample delay z^-1 is a digit delay line of WL/D clocks for the last
// tap and WL/D - 1 clocks after each structural adder, since that adder's
// output register already supplies one clock. The output word y(n) starts
// LAT_FIR = 4 clocks after x(n) starts; one output word per input word.
// Arithmetic wraps modulo 2^WL; with the defaults (D = 4, WL = 24) any 12-bit
// input is filtered exactly. The words must stream without gaps, since the
// delay lines count clocks, not words.
//
// The transposed form with a multiplier block and digit-serial arithmetic
// follow the filter architecture being implemented; the tap values, digit
// size, word length and framing are this design's choices.
module ds_fir
  import ds_pkg::*;
#(
  parameter int unsigned D  = D_DEFAULT,
  parameter int unsigned WL = WL_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         x_start,  // first digit of an input word
  input  logic [D-1:0] x,        // input digit, LSD first
  output logic         y_start,  // first digit of an output word
  output logic [D-1:0] y         // output digit, LSD first
);

  localparam int unsigned NW = WL / D;  // clocks per word

  if (WL % D != 0) begin : g_bad_wl
    $error("ds_fir: WL must be a multiple of D");
  end

  // multiplier block
  logic         p_start;
  logic [D-1:0] p [NPROD];
  mcm_block #(.D(D)) u_mcm (.clk, .rst_n, .x_start, .x, .p_start, .p);

  // structural adders and delays: s[k] is the partial sum leaving tap k
  logic         s_start [NTAPS];
  logic [D-1:0] s       [NTAPS];
  logic         sd_start[NTAPS];  // s[k] after its sample delay
  logic [D-1:0] sd      [NTAPS];

  assign s_start[NTAPS-1] = p_start;
  assign s[NTAPS-1]       = p[TAP_PROD[NTAPS-1]];

  for (genvar k = 0; k < int'(NTAPS); k++) begin : g_tap
    if (k == int'(NTAPS) - 1) begin : g_last
      if (k > 0) begin : g_dl
        ds_delay #(.D(D), .N(NW)) u_z (.clk, .rst_n, .in_start(s_start[k]), .din(s[k]),
                                       .out_start(sd_start[k]), .dout(sd[k]));
      end else begin : g_nodl
        assign sd_start[k] = 1'b0;
        assign sd[k]       = '0;
      end
    end else begin : g_mid
      ds_add_sub #(.D(D), .SUB(0)) u_add (.clk, .rst_n,
                                          .a_start(p_start), .a(p[TAP_PROD[k]]),
                                          .b_start(p_start), .b(sd[k+1]),
                                          .y_start(s_start[k]), .y(s[k]));
      if (k > 0) begin : g_dl
        ds_delay #(.D(D), .N(NW - LAT_ADD)) u_z (.clk, .rst_n, .in_start(s_start[k]), .din(s[k]),
                                                 .out_start(sd_start[k]), .dout(sd[k]));
      end else begin : g_nodl
        assign sd_start[k] = 1'b0;
        assign sd[k]       = '0;
      end
    end
  end

  assign y_start = s_start[0];
  assign y       = s[0];

endmodule
