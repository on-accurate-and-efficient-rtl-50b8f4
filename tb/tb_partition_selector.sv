// tb_partition_selector: every select value must forward exactly the line of
// that partition.
module tb_partition_selector;
  import perceptron_pkg::*;
  localparam int unsigned NPART = 16, NW = 9;
  logic [NPART-1:0][NW-1:0][WEIGHT_W-1:0] lines;
  logic [3:0] sel;
  logic [NW-1:0][WEIGHT_W-1:0] w;
  int checks = 0, failures = 0;

  partition_selector #(.NPART(NPART), .NW(NW)) dut (.lines, .sel, .w);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int p = 0; p < NPART; p++)
        for (int k = 0; k < NW; k++) lines[p][k] = WEIGHT_W'($urandom);
      sel = 4'(t % NPART);
      #1;
      checks++;
      if (w != lines[t % NPART]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
