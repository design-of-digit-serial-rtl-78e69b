// ds_frame_checker: testbench helper that checks one digit-serial output.
//
// Every clock in which in_start is high, the expected result word exp_word
// and the clock number are queued. Every clock in which out_start is high, a
// new output word begins; its D-bit digits (LSD first) are gathered into a
// WL-bit word and compared with the oldest queued word. The output frame
// must start exactly LAT clocks after the matching input frame. Inputs and
// outputs are sampled on the rising edge, before that edge's register
// updates, so a registered stage shows up as one clock of latency.
module ds_frame_checker #(
  parameter int unsigned D    = 4,
  parameter int unsigned WL   = 24,
  parameter int          LAT  = 0,
  parameter string       NAME = "out"
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_start,
  input  logic [WL-1:0] exp_word,
  input  logic          out_start,
  input  logic [D-1:0]  out_dig,
  output int            checks,
  output int            failures,
  output int            pending
);
  localparam int NW = int'(WL / D);

  int            n_checks = 0, n_fail = 0, n_pend = 0;
  int            cyc = 0;
  int            idx = -1;
  logic [WL-1:0] q[$];
  int            tq[$];
  logic [WL-1:0] w;

  assign checks   = n_checks;
  assign failures = n_fail;
  assign pending  = n_pend;

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_start) begin
        q.push_back(exp_word);
        tq.push_back(cyc);
      end
      if (out_start) begin
        if (idx >= 0) begin
          n_fail++;
          $display("ERROR %s: new frame after %0d of %0d digits", NAME, idx, NW);
        end
        idx = 0;
        n_checks++;
        if (tq.size() == 0) begin
          n_fail++;
          $display("ERROR %s: output frame without input frame at clock %0d", NAME, cyc);
        end else begin
          if (cyc - tq[0] != LAT) begin
            n_fail++;
            $display("ERROR %s: latency %0d, expected %0d", NAME, cyc - tq[0], LAT);
          end
          void'(tq.pop_front());
        end
      end
      if (idx >= 0) begin
        w[idx*int'(D) +: D] = out_dig;
        idx++;
        if (idx == NW) begin
          idx = -1;
          n_checks++;
          if (q.size() == 0) n_fail++;
          else begin
            if (w !== q[0]) begin
              n_fail++;
              $display("ERROR %s: got %h expected %h", NAME, w, q[0]);
            end
            void'(q.pop_front());
          end
        end
      end
    end
    n_pend = q.size();
    cyc++;
  end
endmodule
