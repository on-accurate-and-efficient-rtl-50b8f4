// perceptron_train: training rule of one perceptron.
//
// Given the inputs x the prediction was made with, the weighted sum it
// produced and the resolved outcome, decides whether to train and returns the
// new weights. Training happens when the prediction was wrong or the magnitude
// of the sum was at most the threshold THETA. When training, each weight whose
// input agreed with the outcome is incremented and each whose input disagreed
// is decremented (input 1 = taken, 0 = not taken); the bias weight moves
// towards the outcome. All steps saturate at the weight range.
// Combinational.
//
// Interface: w[0] is the bias weight, w[i+1] belongs to x[i]. When
// `do_train` is low, `w_new` equals `w`.
module perceptron_train
  import perceptron_pkg::*;
#(
  parameter int unsigned N      = 8,
  parameter int unsigned SUM_W  = sum_width(N),
  parameter int signed   THRESH = THETA
) (
  input  logic [N-1:0]              x,
  input  logic                      outcome,  // 1 = taken
  input  logic signed [SUM_W-1:0]   sum,
  input  logic [N:0][WEIGHT_W-1:0]  w,
  output logic                      do_train,
  output logic [N:0][WEIGHT_W-1:0]  w_new
);
  logic predicted;
  logic signed [SUM_W:0] mag;

  always_comb begin
    predicted = (sum > 0);
    mag       = (sum < 0) ? -(SUM_W+1)'(sum) : (SUM_W+1)'(sum);
    do_train  = (predicted != outcome) || (mag <= (SUM_W+1)'(THRESH));
    w_new     = w;
    if (do_train) begin
      w_new[0] = sat_step(weight_t'(w[0]), outcome);
      for (int unsigned i = 0; i < N; i++)
        w_new[i+1] = sat_step(weight_t'(w[i+1]), x[i] == outcome);
    end
  end
endmodule
