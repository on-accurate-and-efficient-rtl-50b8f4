// tb_weight_table: random writes and reads on both ports of a 64-line,
// 9-weight table, compared with a reference array. Checks that lines never
// written read as zero after reset, and that a read in the cycle of a write
// to the same line returns the old contents.
module tb_weight_table;
  import perceptron_pkg::*;
  localparam int unsigned LINES = 64, NW = 9;
  typedef logic [NW-1:0][WEIGHT_W-1:0] line_t;
  logic clk = 0, rst_n = 0, we = 0;
  logic [5:0] rd_a_idx = 0, rd_b_idx = 0, wr_idx = 0;
  line_t rd_a_w, rd_b_w, wr_w = 0;
  line_t model [LINES];
  int checks = 0, failures = 0, n_zero = 0, n_same = 0;

  weight_table #(.LINES(LINES), .NW(NW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < LINES; l++) model[l] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      rd_a_idx = 6'($urandom); rd_b_idx = 6'($urandom);
      we = (t > 100) && ($urandom % 3 == 0);
      wr_idx = ($urandom % 4 == 0) ? rd_a_idx : 6'($urandom);
      for (int i = 0; i < NW; i++) wr_w[i] = WEIGHT_W'($urandom);
      #1;
      checks += 2;
      if (rd_a_w != model[rd_a_idx]) failures++;
      if (rd_b_w != model[rd_b_idx]) failures++;
      if (model[rd_a_idx] == '0) n_zero++;
      if (we && wr_idx == rd_a_idx) n_same++;
      if (we) model[wr_idx] = wr_w;
    end
    $display("reads of unwritten lines=%0d read-during-write=%0d", n_zero, n_same);
    if (n_zero == 0 || n_same == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
