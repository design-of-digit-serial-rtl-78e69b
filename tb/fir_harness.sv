// fir_harness: testbench helper that runs one ds_fir instance of a given
// digit size D and word length WL on NFR random 12-bit samples (plus a few
// impulses and full-scale runs), checks every output word against
// y(n) = sum_k h[k] x(n-k) mod 2^WL and the 4-clock frame latency, and
// raises done when the last output word has been checked.
module fir_harness #(
  parameter int unsigned D   = 1,
  parameter int unsigned WL  = 24,
  parameter int          NFR = 100
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned NW  = WL / D;
  localparam int          LAT = 4;
  localparam int          NT  = 5;
  localparam int          H [NT] = '{29, 43, 2813, 43, 29};

  logic          x_start = 1'b0;
  logic [D-1:0]  x = '0;
  logic          y_start;
  logic [D-1:0]  y;
  logic [WL-1:0] exp_y = '0;
  int            c_fail, c_pend;
  int            extra = 0;

  ds_fir #(.D(D), .WL(WL)) dut (.clk, .rst_n, .x_start, .x, .y_start, .y);

  ds_frame_checker #(.D(D), .WL(WL), .LAT(LAT), .NAME("y")) chk (
    .clk, .rst_n, .in_start(x_start), .exp_word(exp_y), .out_start(y_start), .out_dig(y),
    .checks(checks), .failures(c_fail), .pending(c_pend));

  assign failures = c_fail + extra;

  initial begin : drive
    int     hist [NT];
    int     xs;
    longint acc;
    logic [WL-1:0] wx;
    done = 1'b0;
    for (int k = 0; k < NT; k++) hist[k] = 0;
    @(posedge rst_n);
    repeat (2) @(negedge clk);
    for (int f = 0; f < NFR; f++) begin
      if (f < 10)      xs = (f == 0) ? 1 : 0;
      else if (f < 18) xs = -2048;
      else if (f < 26) xs = 2047;
      else             xs = $signed(12'($urandom));
      for (int k = NT - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = xs;
      acc = 0;
      for (int k = 0; k < NT; k++) acc += longint'(H[k]) * longint'(hist[k]);
      wx = WL'(xs);
      for (int p = 0; p < int'(NW); p++) begin
        @(negedge clk);
        x_start = (p == 0);
        if (p == 0) exp_y = WL'(acc);
        x = wx[p*D +: D];
      end
    end
    @(negedge clk);
    x_start = 1'b0;
    repeat (NW + LAT + 5) @(negedge clk);
    if (c_pend != 0) extra++;
    if (checks != 2 * NFR) extra++;
    done = 1'b1;
  end
endmodule
