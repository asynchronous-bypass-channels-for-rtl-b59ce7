// Gray-coded event counter for credit return.
//
// Counts inc pulses on clk and presents the running count in gray code from a
// register, so the receiving clock domain can synchronize it with two
// flip-flops and never read a half-changed value.
module abc_gray_cnt #(
  parameter int unsigned W = abc_pkg::CNT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         inc,
  output logic [W-1:0] gray
);
  logic [W-1:0] bin, nb;

  assign nb = bin + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bin  <= '0;
      gray <= '0;
    end else if (inc) begin
      bin  <= nb;
      gray <= nb ^ (nb >> 1);
    end
  end
endmodule
