// ds_delay: delays a digit stream, with its frame marker, by N clocks.
//
// Used twice in the filter: as a pipelining register that balances the
// paths into a digit-serial adder (N = 1), and as the sample delay z^-1 of
// the transposed-form filter (N = clocks per word, less the latency of the
// adder that follows). Delaying a stream together with its start marker does
// not change the word it carries, only when its frame starts. N = 0 is a
// wire. Reset clears the pipeline, so no start marker is seen until a real
// one has passed through.
module ds_delay #(
  parameter int unsigned D = 4,
  parameter int unsigned N = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_start,
  input  logic [D-1:0] din,
  output logic         out_start,
  output logic [D-1:0] dout
);

  if (N == 0) begin : g_wire
    assign out_start = in_start;
    assign dout      = din;
  end else begin : g_delay
    logic         st_q [N];
    logic [D-1:0] dg_q [N];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(N); i++) begin
          st_q[i] <= 1'b0;
          dg_q[i] <= '0;
        end
      end else begin
        st_q[0] <= in_start;
        dg_q[0] <= din;
        for (int i = 1; i < int'(N); i++) begin
          st_q[i] <= st_q[i-1];
          dg_q[i] <= dg_q[i-1];
        end
      end
    end

    assign out_start = st_q[N-1];
    assign dout      = dg_q[N-1];
  end

endmodule
