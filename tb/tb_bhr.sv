// tb_bhr: shifts random outcomes into a 12-bit history, with random idle
// cycles, and compares the register and its next value with a reference.
module tb_bhr;
  localparam int unsigned LEN = 12;
  logic clk = 0, rst_n = 0, push = 0, outcome = 0;
  logic [LEN-1:0] hist, hist_next, ref_h;
  int checks = 0, failures = 0;

  bhr #(.LEN(LEN)) dut (.clk, .rst_n, .push, .outcome, .hist, .hist_next);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_h = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      checks++;
      if (hist != ref_h) failures++;
      push = 1'($urandom % 4 != 0);
      outcome = 1'($urandom);
      #1;
      checks++;
      if (hist_next != (push ? {ref_h[LEN-2:0], outcome} : ref_h)) failures++;
      if (push) ref_h = {ref_h[LEN-2:0], outcome};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
