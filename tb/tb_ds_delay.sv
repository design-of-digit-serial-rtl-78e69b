// tb_ds_delay: self-checking testbench of the digit-stream delay.
//
// Delays of 1, 3 and 6 clocks (6 = one whole 24-bit word at 4 bits per
// clock) run on the same stream. Each must hand back every word unchanged,
// with its frame starting exactly N clocks after the input frame.
module tb_ds_delay;
  localparam int unsigned D   = 4;
  localparam int unsigned WL  = 24;
  localparam int unsigned NW  = WL / D;
  localparam int          NFR = 300;
  localparam int          NC  = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          in_start = 1'b0;
  logic [D-1:0]  x = '0;
  logic [WL-1:0] wx = '0;

  int c_chk[NC], c_fail[NC], c_pend[NC];

  logic s1, s3, s6;
  logic [D-1:0] d1, d3, d6;
  ds_delay #(.D(D), .N(1)) dut1 (.clk, .rst_n, .in_start, .din(x), .out_start(s1), .dout(d1));
  ds_delay #(.D(D), .N(3)) dut3 (.clk, .rst_n, .in_start, .din(x), .out_start(s3), .dout(d3));
  ds_delay #(.D(D), .N(6)) dut6 (.clk, .rst_n, .in_start, .din(x), .out_start(s6), .dout(d6));
  ds_frame_checker #(.D(D), .WL(WL), .LAT(1), .NAME("n1")) chk_n1 (
    .clk, .rst_n, .in_start, .exp_word(wx), .out_start(s1), .out_dig(d1),
    .checks(c_chk[0]), .failures(c_fail[0]), .pending(c_pend[0]));
  ds_frame_checker #(.D(D), .WL(WL), .LAT(3), .NAME("n3")) chk_n3 (
    .clk, .rst_n, .in_start, .exp_word(wx), .out_start(s3), .out_dig(d3),
    .checks(c_chk[1]), .failures(c_fail[1]), .pending(c_pend[1]));
  ds_frame_checker #(.D(D), .WL(WL), .LAT(6), .NAME("n6")) chk_n6 (
    .clk, .rst_n, .in_start, .exp_word(wx), .out_start(s6), .out_dig(d6),
    .checks(c_chk[2]), .failures(c_fail[2]), .pending(c_pend[2]));
  // Words: corner cases, small signed samples and full-width random words,
  // back to back or separated by gaps of junk digits.
  initial begin : drive
    int checks, failures;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NFR; f++) begin
      case (f % 6)
        0: wx = '1;
        1: wx = {1'b1, {(WL-1){1'b0}}};
        2: wx = WL'(1);
        3: wx = WL'($signed(12'($urandom)));
        default: wx = WL'({$urandom, $urandom});
      endcase
      for (int p = 0; p < int'(NW); p++) begin
        @(negedge clk);
        in_start = (p == 0);
        x = wx[p*D +: D];
      end
      if ($urandom_range(0, 2) == 0) begin
        repeat ($urandom_range(1, 4)) begin
          @(negedge clk);
          in_start = 1'b0;
          x = D'($urandom);
        end
      end
    end
    @(negedge clk);
    in_start = 1'b0;
    repeat (NW + 10) @(negedge clk);
    checks = 0;
    failures = 0;
    for (int i = 0; i < NC; i++) begin
      checks += c_chk[i];
      failures += c_fail[i] + c_pend[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (NFR * (NW + 5) + 200) @(posedge clk);
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
