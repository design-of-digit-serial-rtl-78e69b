// tb_ds_lshift: self-checking testbench of the digit-serial left shift.
//
// Shifts by K = 0, 1, 3, 4, 5 and 8 bit positions (below, equal to and above
// the 4-bit digit) run side by side on the same stream of 24-bit words.
// Words come back to back or with idle gaps full of junk digits, so bits of
// a previous word or of a gap would show up if the frame-start masking
// failed. Each output word must equal (x << K) mod 2^24 and start in the
// same clock as its input word (zero latency).
module tb_ds_lshift;
  localparam int unsigned D   = 4;
  localparam int unsigned WL  = 24;
  localparam int unsigned NW  = WL / D;
  localparam int          NFR = 300;
  localparam int          NK  = 6;
  localparam int unsigned KS [NK] = '{0, 1, 3, 4, 5, 8};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          in_start = 1'b0;
  logic [D-1:0]  x = '0;
  logic [WL-1:0] wx = '0;

  int c_chk[NK], c_fail[NK], c_pend[NK];

  for (genvar i = 0; i < NK; i++) begin : g_k
    logic         o_s;
    logic [D-1:0] o_d;
    ds_lshift #(.D(D), .K(KS[i])) dut (.clk, .rst_n, .in_start, .din(x),
                                       .out_start(o_s), .dout(o_d));
    ds_frame_checker #(.D(D), .WL(WL), .LAT(0), .NAME("lshift")) chk (
      .clk, .rst_n, .in_start, .exp_word(wx << KS[i]), .out_start(o_s), .out_dig(o_d),
      .checks(c_chk[i]), .failures(c_fail[i]), .pending(c_pend[i]));
  end

  initial begin : drive
    int checks, failures;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NFR; f++) begin
      case (f % 5)
        0: wx = '1;
        1: wx = {1'b1, {(WL-1){1'b0}}};
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
          x = '1;
        end
      end
    end
    @(negedge clk);
    in_start = 1'b0;
    repeat (NW + 5) @(negedge clk);
    checks = 0;
    failures = 0;
    for (int i = 0; i < NK; i++) begin
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
