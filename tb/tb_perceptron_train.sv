// tb_perceptron_train: checks the training decision (misprediction or
// |sum| <= 15) and the saturating weight steps against an integer reference.
module tb_perceptron_train;
  import perceptron_pkg::*;
  localparam int unsigned N = 8;
  localparam int unsigned SW = sum_width(N);
  logic [N-1:0] x;
  logic outcome;
  logic signed [SW-1:0] sum;
  logic [N:0][WEIGHT_W-1:0] w, w_new;
  logic do_train;
  int checks = 0, failures = 0, trained = 0, saturated = 0;

  perceptron_train #(.N(N)) dut (.x, .outcome, .sum, .w, .do_train, .w_new);

  function automatic int step(int v, bit up);
    if (up) return (v >= 127) ? 127 : v + 1;
    return (v <= -128) ? -128 : v - 1;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int s; bit exp_train;
      x = N'($urandom);
      outcome = 1'($urandom);
      s = int'($urandom_range(0, 80)) - 40;
      sum = SW'(s);
      for (int i = 0; i <= N; i++)
        w[i] = (t % 3 == 0) ? WEIGHT_W'(($urandom % 2) ? 127 : -128) : WEIGHT_W'($urandom);
      #1;
      exp_train = ((s > 0) != outcome) || (s <= 15 && s >= -15);
      checks++;
      if (do_train != exp_train) failures++;
      if (exp_train) trained++;
      for (int i = 0; i <= N; i++) begin
        int ov, nv;
        bit up;
        ov = int'(signed'(w[i]));
        up = (i == 0) ? outcome : (x[i-1] == outcome);
        nv = exp_train ? step(ov, up) : ov;
        if (exp_train && nv == ov) saturated++;
        checks++;
        if (int'(signed'(w_new[i])) != nv) begin
          failures++;
          if (failures < 5) $display("w[%0d] %0d -> %0d, expected %0d", i, ov, signed'(w_new[i]), nv);
        end
      end
    end
    if (trained == 0 || saturated == 0) failures++;
    $display("trained=%0d saturated steps=%0d", trained, saturated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
