// Two flip-flop synchronizer.
//
// Brings a level (or a gray-coded count, where only one bit changes at a time)
// into the clock domain of clk. The output follows the input two rising edges
// of clk later. Reset clears both stages. The network uses it for every
// control signal and every credit count that crosses a clock boundary, as the
// document prescribes ("standard two flip-flop synchronizer").
module abc_sync2 #(
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
