// ds_lshift: digit-serial left shift by K bit positions.
//
// In bit-parallel hardware a shift is only wiring; in digit-serial hardware a
// left shift by K delays the bit stream by K bit positions, which costs K
// flip-flops. This block keeps the K most recent input bits in a register.
// The output digit is the low D bits of {current digit, K stored bits}, so
// output bit j of digit p is input bit p*D + j - K of the same word. At a
// frame start the stored bits belong to the previous word and are replaced by
// zeros, so K zeros enter at the bottom of every word and the top K bits of
// the word fall off (the result is (x << K) mod 2^WL).
//
// The output stays on the input's frame: zero latency, out_start equals
// in_start. K = 0 is a plain wire. Shifts costing flip-flops follow the
// digit-serial arithmetic this design uses; the masking at the frame start is
// this design's way of keeping back-to-back words apart.
module ds_lshift #(
  parameter int unsigned D = 4,
  parameter int unsigned K = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_start,
  input  logic [D-1:0] din,
  output logic         out_start,
  output logic [D-1:0] dout
);

  assign out_start = in_start;

  if (K == 0) begin : g_wire
    assign dout = din;
  end else begin : g_shift
    logic [K-1:0]   hist_q;  // the K bits just before the current digit
    logic [K+D-1:0] v;

    always_comb v = {din, (in_start ? {K{1'b0}} : hist_q)};
    assign dout = v[D-1:0];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) hist_q <= '0;
      else        hist_q <= v[K+D-1:D];
    end
  end

endmodule
