// weight_adder: the adder that follows each cascade cell.
//
// Adds the edge weight (Arail) read from a cell to the sum of the weights of
// the cells before it and registers the result, one clock of latency, as a
// DSP block with its output register would. Addition is modulo 2^W, so the
// host may store negative edge weights in two's complement as long as every
// complete path sums to the wanted index in 0..2^W-1.
module weight_adder #(
  parameter int unsigned W = 10
) (
  input  logic         clk,
  input  logic         en,
  input  logic [W-1:0] sum_in,
  input  logic [W-1:0] weight,
  output logic [W-1:0] sum_out
);

  always_ff @(posedge clk) begin
    if (en) sum_out <= sum_in + weight;
  end

endmodule
