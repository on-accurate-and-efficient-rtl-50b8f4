// perceptron_sum: weighted-sum unit and sign decision of one perceptron.
//
// Computes y = w0 + sum_i x_i * w_i over N binary inputs, where an input bit
// of 1 counts as +1 and a 0 counts as -1, and w0 is the bias weight (its input
// is always +1). The prediction is "taken" when the sum is greater than zero,
// "not taken" otherwise. Purely combinational; a hardware implementation would
// use a carry-save (Wallace) tree, written here as a plain sum that synthesis
// maps to adders.
//
// Interface: w[0] is the bias weight, w[i+1] is the weight of input x[i].
module perceptron_sum
  import perceptron_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter int unsigned SUM_W = sum_width(N)
) (
  input  logic [N-1:0]              x,
  input  logic [N:0][WEIGHT_W-1:0]  w,
  output logic signed [SUM_W-1:0]   sum,
  output logic                      taken
);
  always_comb begin
    logic signed [SUM_W-1:0] acc;
    acc = SUM_W'(signed'(w[0]));
    for (int unsigned i = 0; i < N; i++) begin
      if (x[i]) acc = acc + SUM_W'(signed'(w[i+1]));
      else      acc = acc - SUM_W'(signed'(w[i+1]));
    end
    sum   = acc;
    taken = (acc > 0);
  end
endmodule
