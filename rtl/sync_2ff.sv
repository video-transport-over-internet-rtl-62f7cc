// Two-stage synchronizer: a bus is registered twice in the destination clock
// domain. Used only for values of which at most one bit changes per source
// clock edge (Gray-coded pointers and counters), so every sampled word is
// either the old or the new value. Latency: two destination clock edges.
//
// The two-stage synchronizer is the one the original design names for
// Gray-coded values.
module sync_2ff #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
