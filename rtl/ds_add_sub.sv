// ds_add_sub: digit-serial adder or subtractor.
//
// Adds (SUB = 0) or subtracts (SUB = 1, y = a - b) two digit streams that are
// aligned on the same word frame. Digits arrive least significant first, D
// bits per clock. A D-bit ripple adder handles one digit per clock and a
// carry flip-flop carries into the next digit. At a frame start the carry-in
// is forced to 0 for addition, or to 1 for subtraction, where b is inverted
// (two's complement a + ~b + 1), so consecutive words never leak carries into
// each other. The sum digit is registered: the output frame starts one clock
// after the input frame (latency 1). This output register is the pipelining
// register of the shift-adds network. The result wraps modulo 2^WL, where WL
// is the frame length in bits; the word length must be chosen so that it
// holds every result.
//
// Cost: D full adders plus D+2 flip-flops (sum, carry, frame marker). The
// adder/subtractor and its use of flip-flops follow the digit-serial
// arithmetic the filter is built from; the output register, the carry
// initialisation and the active-low asynchronous reset are this design's
// choices. The carry flip-flop resets to the value it is given at a frame
// start, so an idle subtractor fed with zeros outputs zeros (0 + ~0 + 1)
// rather than a stream of ones that would fill downstream delay lines.
module ds_add_sub #(
  parameter int unsigned D   = 4,
  parameter bit          SUB = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         a_start,  // first digit of a word on a and b
  input  logic [D-1:0] a,
  input  logic         b_start,  // must equal a_start (streams aligned)
  input  logic [D-1:0] b,
  output logic         y_start,  // first digit of the result word
  output logic [D-1:0] y
);

  logic         carry_q;
  logic         cin;
  logic [D-1:0] b_op;
  logic [D:0]   sum;

  always_comb begin
    cin  = a_start ? SUB : carry_q;
    b_op = SUB ? ~b : b;
    sum  = {1'b0, a} + {1'b0, b_op} + {{D{1'b0}}, cin};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      carry_q <= SUB;
      y       <= '0;
      y_start <= 1'b0;
    end else begin
      carry_q <= sum[D];
      y       <= sum[D-1:0];
      y_start <= a_start;
    end
  end

  // Both operands must be on the same word frame.
  a_aligned : assert property (@(posedge clk) disable iff (!rst_n) a_start == b_start)
    else $error("ds_add_sub: operand frames are not aligned");

endmodule
