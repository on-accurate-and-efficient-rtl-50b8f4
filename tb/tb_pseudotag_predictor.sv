// tb_pseudotag_predictor: drives a branch stream whose branches collide in
// the weight table (same index bits, different address bits above them) and
// compares every weighted sum with a reference model of the pseudotagged
// perceptron (128 lines; inputs: 19 history bits and the 4 address bits above
// the index). Also checks that the predictor learns: in the last quarter
// of the run, two aliasing branches with opposite fixed directions must both
// be predicted correctly most of the time, which needs the address inputs.
module tb_pseudotag_predictor;
  import perceptron_pkg::*;
  localparam int unsigned LINES = 128, NHIST = 19, NPC = 4;
  localparam int unsigned N = NHIST + NPC, NW = N + 1, SW = sum_width(N);
  localparam int unsigned IDX_W = $clog2(LINES);
  localparam int NSTEPS = 20000;

  logic clk = 0, rst_n = 0;
  logic upd_valid = 0, upd_taken = 0, pred_taken;
  logic [31:0] pred_pc = 0, upd_pc = 0;
  logic signed [SW-1:0] pred_sum, upd_sum = 0;
  logic [NHIST-1:0] pred_hist, upd_hist = 0;

  pseudotag_predictor #(.LINES(LINES), .NHIST(NHIST), .NPC(NPC)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_train = 0, late = 0, late_ok = 0;
  int m_w [LINES][NW];
  int m_hist;

  function automatic int sat(int v);
    return (v > 127) ? 127 : (v < -128) ? -128 : v;
  endfunction
  function automatic int xin(int pc, int h, int i);  // input i as 0/1
    return (i < NPC) ? (pc >> (2 + IDX_W + i)) & 1 : (h >> (i - NPC)) & 1;
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < LINES; l++) for (int i = 0; i < NW; i++) m_w[l][i] = 0;
    m_hist = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NSTEPS; t++) begin
      int b, pc, line, es, o;
      bit busy;
      @(negedge clk);
      busy = ($urandom % 4) != 0;
      b = $urandom % 6;
      // branches 0 and 1 share line 5 but differ in address bit 7+0;
      // 0 is always taken, 1 never taken; others are random or history-driven.
      case (b)
        0: pc = (5 << 2) | (1 << (2 + IDX_W));
        1: pc = (5 << 2);
        default: pc = (b << 2) | (b << (2 + IDX_W));
      endcase
      pred_pc = pc;
      #1;
      line = (pc >> 2) % LINES;
      es = m_w[line][0];
      for (int i = 0; i < N; i++) es += xin(pc, m_hist, i) ? m_w[line][i+1] : -m_w[line][i+1];
      checks++;
      if (int'(pred_sum) != es || pred_taken != (es > 0) || int'(pred_hist) != m_hist) begin
        failures++;
        if (failures < 5) $display("t=%0d sum %0d/%0d", t, pred_sum, es);
      end
      case (b)
        0: o = 1;
        1: o = 0;
        2: o = (m_hist >> 3) & 1;
        default: o = $urandom % 2;
      endcase
      if (busy && b < 2 && t > 3 * NSTEPS / 4) begin
        late++;
        if (pred_taken == o[0]) late_ok++;
      end
      upd_valid = busy; upd_pc = pc; upd_taken = o[0]; upd_hist = pred_hist; upd_sum = pred_sum;
      if (busy) begin
        if (((es > 0) != o) || (es <= 15 && es >= -15)) begin
          n_train++;
          m_w[line][0] = sat(m_w[line][0] + (o ? 1 : -1));
          for (int i = 0; i < N; i++)
            m_w[line][i+1] = sat(m_w[line][i+1] + ((xin(pc, m_hist, i) == o) ? 1 : -1));
        end
        m_hist = ((m_hist << 1) | o) & ((1 << NHIST) - 1);
      end
      @(posedge clk);
    end
    @(negedge clk);
    upd_valid = 0;
    $display("trainings=%0d aliased branches correct %0d/%0d", n_train, late_ok, late);
    checks++;
    if (n_train == 0 || late == 0 || late_ok * 100 < late * 90) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
