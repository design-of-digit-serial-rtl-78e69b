// tb_ds_fir_digits: the FIR filter across digit sizes.
//
// The same 5-tap filter with 24-bit words is built for digit sizes of 1
// (bit-serial), 2, 3, 8, 12 and 24 bits (24 = bit-parallel, one word per
// clock) and each instance filters its own sample stream, checked word by
// word against the direct-form sum. A smaller digit takes more clocks per
// word (24/D) with the same 4-clock frame latency.
module tb_ds_fir_digits;
  localparam int ND = 6;
  localparam int NFR = 120;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic done [ND];
  int   c_chk [ND], c_fail [ND];

  fir_harness #(.D(1),  .NFR(NFR)) h1  (.clk, .rst_n, .done(done[0]), .checks(c_chk[0]), .failures(c_fail[0]));
  fir_harness #(.D(2),  .NFR(NFR)) h2  (.clk, .rst_n, .done(done[1]), .checks(c_chk[1]), .failures(c_fail[1]));
  fir_harness #(.D(3),  .NFR(NFR)) h3  (.clk, .rst_n, .done(done[2]), .checks(c_chk[2]), .failures(c_fail[2]));
  fir_harness #(.D(8),  .NFR(NFR)) h8  (.clk, .rst_n, .done(done[3]), .checks(c_chk[3]), .failures(c_fail[3]));
  fir_harness #(.D(12), .NFR(NFR)) h12 (.clk, .rst_n, .done(done[4]), .checks(c_chk[4]), .failures(c_fail[4]));
  fir_harness #(.D(24), .NFR(NFR)) h24 (.clk, .rst_n, .done(done[5]), .checks(c_chk[5]), .failures(c_fail[5]));

  initial begin : run
    int checks, failures;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5]);
    checks = 0;
    failures = 0;
    for (int i = 0; i < ND; i++) begin
      checks += c_chk[i];
      failures += c_fail[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (NFR * 24 + 500) @(posedge clk);
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
