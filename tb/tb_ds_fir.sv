// tb_ds_fir: end-to-end self-checking testbench of the digit-serial FIR
// filter at its default size (4-bit digits, 24-bit words, 5 taps).
//
// 12-bit signed samples, sign-extended to 24 bits, stream back to back
// through the filter. The sample sequence has several parts: impulses (the
// output must be the tap values 29, 43, 2813, 43, 29), steps and runs of the
// most negative and most positive sample (largest output magnitude,
// 2957 * 2048), alternating signs, and random samples. The expected output
// y(n) = sum_k h[k] x(n-k) is computed here from an independent tap list and
// compared word by word, and every output frame must start 4 clocks after
// its input frame. The testbench also counts the situations the
// design has to get right: impulse responses, negative and positive outputs,
// full-scale outputs, and negative words followed directly by another word
// (where a shift or a subtractor would leak sign bits or a borrow into the
// next word if its frame-start handling failed). Each must happen at least
// once.
module tb_ds_fir;
  localparam int unsigned D    = 4;
  localparam int unsigned WL   = 24;
  localparam int unsigned NW   = WL / D;
  localparam int          LAT  = 4;
  localparam int          NT   = 5;
  localparam int          H [NT] = '{29, 43, 2813, 43, 29};
  localparam int          NFR  = 600;
  localparam int          XMAX = 2047;
  localparam int          XMIN = -2048;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          x_start = 1'b0;
  logic [D-1:0]  x = '0;
  logic          y_start;
  logic [D-1:0]  y;
  logic [WL-1:0] exp_y = '0;

  int c_chk, c_fail, c_pend;

  ds_fir dut (.clk, .rst_n, .x_start, .x, .y_start, .y);

  ds_frame_checker #(.D(D), .WL(WL), .LAT(LAT), .NAME("y")) chk (
    .clk, .rst_n, .in_start(x_start), .exp_word(exp_y), .out_start(y_start), .out_dig(y),
    .checks(c_chk), .failures(c_fail), .pending(c_pend));

  int hist [NT];  // x(n), x(n-1), ...
  int n_impulse = 0, n_neg_out = 0, n_pos_out = 0, n_fullscale = 0, n_neg_follow = 0;

  function automatic int sample(int f);
    if (f < 20)       return (f % 10 == 0) ? 1 : 0;        // impulses
    else if (f < 40)  return XMIN;                         // negative full scale
    else if (f < 60)  return XMAX;                         // positive full scale
    else if (f < 80)  return (f % 2 == 0) ? XMAX : XMIN;   // alternating
    else if (f < 100) return (f % 10 < 5) ? -1 : 1;        // small steps
    else              return $signed(12'($urandom));       // random
  endfunction

  initial begin : drive
    longint acc;
    int     xs;
    int     prev_neg;
    int     failures;
    for (int k = 0; k < NT; k++) hist[k] = 0;
    prev_neg = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    for (int f = 0; f < NFR; f++) begin
      xs = sample(f);
      for (int k = NT - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = xs;
      acc = 0;
      for (int k = 0; k < NT; k++) acc += longint'(H[k]) * longint'(hist[k]);
      if (f >= 0 && f < 20 && f % 10 < NT) n_impulse += (acc == longint'(H[f % 10])) ? 1 : 0;
      if (acc < 0) n_neg_out++;
      if (acc > 0) n_pos_out++;
      if (acc == longint'(XMIN) * 2957 || acc == longint'(XMAX) * 2957) n_fullscale++;
      if (prev_neg != 0) n_neg_follow++;
      prev_neg = (xs < 0);
      for (int p = 0; p < int'(NW); p++) begin
        @(negedge clk);
        x_start = (p == 0);
        if (p == 0) exp_y = WL'(acc);
        x = WL'(xs) >> (p * D);
      end
    end
    @(negedge clk);
    x_start = 1'b0;
    repeat (NW + LAT + 5) @(negedge clk);
    failures = c_fail + c_pend;
    $display("mechanisms: impulse taps %0d, negative outputs %0d, positive outputs %0d, full-scale outputs %0d, words after a negative word %0d",
             n_impulse, n_neg_out, n_pos_out, n_fullscale, n_neg_follow);
    if (n_impulse != 2 * NT) failures++;
    if (n_neg_out == 0) failures++;
    if (n_pos_out == 0) failures++;
    if (n_fullscale == 0) failures++;
    if (n_neg_follow == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", c_chk, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (NFR * NW + 500) @(posedge clk);
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c_chk, c_fail + 1);
    $finish;
  end
endmodule
