// tb_perceptron_sum: checks the weighted sum and the sign decision against an
// integer reference over random and extreme inputs (17 inputs + bias).
module tb_perceptron_sum;
  import perceptron_pkg::*;
  localparam int unsigned N = 17;
  localparam int unsigned SW = sum_width(N);
  logic [N-1:0] x;
  logic [N:0][WEIGHT_W-1:0] w;
  logic signed [SW-1:0] sum;
  logic taken;
  int checks = 0, failures = 0;

  perceptron_sum #(.N(N)) dut (.x, .w, .sum, .taken);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int ref_sum;
      x = N'($urandom);
      for (int i = 0; i <= N; i++) begin
        case (t % 4)
          0: w[i] = WEIGHT_W'(127);
          1: w[i] = WEIGHT_W'(-128);
          default: w[i] = WEIGHT_W'($urandom);
        endcase
      end
      #1;
      ref_sum = int'(signed'(w[0]));
      for (int i = 0; i < N; i++)
        ref_sum += x[i] ? int'(signed'(w[i+1])) : -int'(signed'(w[i+1]));
      checks++;
      if (int'(sum) != ref_sum || taken != (ref_sum > 0)) begin
        failures++;
        if (failures < 5) $display("mismatch: sum=%0d ref=%0d taken=%b", sum, ref_sum, taken);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
