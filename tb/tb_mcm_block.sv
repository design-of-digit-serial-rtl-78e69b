// tb_mcm_block: self-checking testbench of the FIR multiplier block.
//
// Streams 24-bit words (4 bits per clock) into the block and checks the
// three products 29x, 43x and 2813x (indices 0, 1, 2) modulo 2^24. All
// three frames must start together, 3 clocks after the input frame.
module tb_mcm_block;
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

  logic ps;
  logic [D-1:0] p [3];
  mcm_block #(.D(D)) dut (.clk, .rst_n, .x_start(in_start), .x, .p_start(ps), .p);
  ds_frame_checker #(.D(D), .WL(WL), .LAT(3), .NAME("m29")) chk_m29 (
    .clk, .rst_n, .in_start, .exp_word(wx * WL'(29)), .out_start(ps), .out_dig(p[0]),
    .checks(c_chk[0]), .failures(c_fail[0]), .pending(c_pend[0]));
  ds_frame_checker #(.D(D), .WL(WL), .LAT(3), .NAME("m43")) chk_m43 (
    .clk, .rst_n, .in_start, .exp_word(wx * WL'(43)), .out_start(ps), .out_dig(p[1]),
    .checks(c_chk[1]), .failures(c_fail[1]), .pending(c_pend[1]));
  ds_frame_checker #(.D(D), .WL(WL), .LAT(3), .NAME("m2813")) chk_m2813 (
    .clk, .rst_n, .in_start, .exp_word(wx * WL'(2813)), .out_start(ps), .out_dig(p[2]),
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
