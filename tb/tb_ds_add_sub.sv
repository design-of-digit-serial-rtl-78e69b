// tb_ds_add_sub: self-checking testbench of the digit-serial adder/subtractor.
//
// Streams random 24-bit word pairs, 4 bits per clock, through an adder and a
// subtractor side by side. Words come back to back or with idle gaps (with
// junk digits on the bus during a gap); corner words (0, -1, most positive,
// most negative) are mixed in. Each result word is rebuilt from its digits
// and compared with (a + b) mod 2^24 and (a - b) mod 2^24, and every result
// frame must start exactly one clock after its input frame.
module tb_ds_add_sub;
  localparam int unsigned D   = 4;
  localparam int unsigned WL  = 24;
  localparam int unsigned NW  = WL / D;
  localparam int          NFR = 300;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic         in_start = 1'b0;
  logic [D-1:0] a = '0, b = '0;
  logic         add_s, sub_s;
  logic [D-1:0] add_y, sub_y;

  ds_add_sub #(.D(D), .SUB(1'b0)) dut_add (.clk, .rst_n, .a_start(in_start), .a,
                                           .b_start(in_start), .b, .y_start(add_s), .y(add_y));
  ds_add_sub #(.D(D), .SUB(1'b1)) dut_sub (.clk, .rst_n, .a_start(in_start), .a,
                                           .b_start(in_start), .b, .y_start(sub_s), .y(sub_y));

  logic [WL-1:0] exp_add[$], exp_sub[$];
  int            t_in[$];

  function automatic logic [WL-1:0] pick_word(int f);
    case (f % 7)
      0: return '0;
      1: return '1;
      2: return {1'b0, {(WL-1){1'b1}}};
      3: return {1'b1, {(WL-1){1'b0}}};
      default: return WL'({$urandom, $urandom});
    endcase
  endfunction

  // driver
  initial begin : drive
    logic [WL-1:0] wa, wb;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NFR; f++) begin
      wa = pick_word(f);
      wb = pick_word(f / 7 + 3 * f);
      exp_add.push_back(wa + wb);
      exp_sub.push_back(wa - wb);
      for (int p = 0; p < int'(NW); p++) begin
        @(negedge clk);
        if (p == 0) t_in.push_back(cycle);
        in_start = (p == 0);
        a = wa[p*D +: D];
        b = wb[p*D +: D];
      end
      if ($urandom_range(0, 2) == 0) begin
        repeat ($urandom_range(1, 5)) begin
          @(negedge clk);
          in_start = 1'b0;
          a = D'($urandom);
          b = D'($urandom);
        end
      end
    end
    @(negedge clk);
    in_start = 1'b0;
    repeat (NW + 5) @(negedge clk);
    if (exp_add.size() != 0 || exp_sub.size() != 0) begin
      failures++;
      $display("ERROR: %0d add / %0d sub results never appeared", exp_add.size(), exp_sub.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor: rebuild result words and check them and their latency
  int            na = -1, ns = -1;
  logic [WL-1:0] wadd, wsub;
  always @(negedge clk) if (rst_n) begin
    if (add_s) begin
      na = 0;
      checks++;
      if (t_in.size() == 0 || cycle - t_in[0] != 1) begin
        failures++;
        $display("ERROR: adder frame latency wrong at cycle %0d", cycle);
      end
      if (t_in.size() != 0) void'(t_in.pop_front());
    end
    if (sub_s) ns = 0;
    if (na >= 0) begin
      wadd[na*D +: D] = add_y;
      na++;
      if (na == int'(NW)) begin
        na = -1;
        checks++;
        if (exp_add.size() == 0) failures++;
        else begin
          if (wadd !== exp_add[0]) begin
            failures++;
            $display("ERROR: add got %h expected %h", wadd, exp_add[0]);
          end
          void'(exp_add.pop_front());
        end
      end
    end
    if (ns >= 0) begin
      wsub[ns*D +: D] = sub_y;
      ns++;
      if (ns == int'(NW)) begin
        ns = -1;
        checks++;
        if (exp_sub.size() == 0) failures++;
        else begin
          if (wsub !== exp_sub[0]) begin
            failures++;
            $display("ERROR: sub got %h expected %h", wsub, exp_sub[0]);
          end
          void'(exp_sub.pop_front());
        end
      end
    end
  end

  initial begin : watchdog
    repeat (NFR * (NW + 6) + 200) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
