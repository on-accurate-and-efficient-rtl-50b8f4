// tb_inverted_predictor: checks the inverted, pipelined perceptron predictor
// (2K lines indexed by the 11 history bits older than the 8 newest, 8-cycle
// table access, 8 history + 9 address inputs + bias) against a reference
// model that reads its table immediately. Because of the queue and the
// write bypass, every prediction must equal the model's, whatever the
// spacing of the branches: the stream has back-to-back branches as well as
// idle gaps of up to 20 cycles. Also checks that weights are always ready
// when a branch arrives, that training writes hit lines still queued or in
// flight (the bypass is exercised), and that a periodic branch is learnt.
module tb_inverted_predictor;
  import perceptron_pkg::*;
  localparam int unsigned LINES = 2048, NHIST = 8, NPC = 9, LAT = 8;
  localparam int unsigned M = $clog2(LINES), HLEN = NHIST + M;
  localparam int unsigned N = NHIST + NPC, NW = N + 1, SW = sum_width(N);
  localparam int NSTEPS = 20000;

  logic clk = 0, rst_n = 0;
  logic upd_valid = 0, upd_taken = 0, pred_taken, pred_ready;
  logic [31:0] pred_pc = 0, upd_pc = 0;
  logic signed [SW-1:0] pred_sum, upd_sum = 0;
  logic [HLEN-1:0] pred_hist, upd_hist = 0;

  inverted_predictor #(.LINES(LINES), .NHIST(NHIST), .NPC(NPC), .LAT(LAT)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_train = 0, n_bypass = 0, n_gap = 0, n_b2b = 0;
  int late = 0, late_ok = 0;
  int m_w [LINES][NW];
  int m_hist;
  int recent [$];   // indices formed by the last NHIST+1 pushes

  function automatic int sat(int v);
    return (v > 127) ? 127 : (v < -128) ? -128 : v;
  endfunction
  function automatic int xin(int pc, int h, int i);
    return (i < NHIST) ? (h >> i) & 1 : (pc >> (2 + i - NHIST)) & 1;
  endfunction

  initial begin
    #20000000;
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
      int b, pc, line, es, o, gap;
      @(negedge clk);
      // idle gap before this branch: none most of the time, sometimes long
      gap = ($urandom % 10 == 0) ? $urandom % 20 : 0;
      if (gap > 0) begin
        n_gap++;
        upd_valid = 0;
        repeat (gap) @(negedge clk);
      end else n_b2b++;
      b = t % 4;               // a loop body with four branches
      pc = (b * 37) << 2;
      pred_pc = pc;
      #1;
      line = (m_hist >> NHIST) & (LINES - 1);
      es = m_w[line][0];
      for (int i = 0; i < N; i++) es += xin(pc, m_hist, i) ? m_w[line][i+1] : -m_w[line][i+1];
      checks++;
      if (!pred_ready || int'(pred_sum) != es || pred_taken != (es > 0) || int'(pred_hist) != m_hist) begin
        failures++;
        if (failures < 5) $display("t=%0d ready=%b sum %0d/%0d", t, pred_ready, pred_sum, es);
      end
      case (b)
        0: o = (t / 3) % 2;        // slow square wave
        1: o = 1;
        2: o = (m_hist >> 2) & 1;
        default: o = ($urandom % 8) != 0;
      endcase
      if (b == 2 && t > 3 * NSTEPS / 4) begin
        late++;
        if (pred_taken == o[0]) late_ok++;
      end
      upd_valid = 1; upd_pc = pc; upd_taken = o[0]; upd_hist = pred_hist; upd_sum = pred_sum;
      if (((es > 0) != o) || (es <= 15 && es >= -15)) begin
        n_train++;
        foreach (recent[k]) if (recent[k] == line) begin n_bypass++; break; end
        m_w[line][0] = sat(m_w[line][0] + (o ? 1 : -1));
        for (int i = 0; i < N; i++)
          m_w[line][i+1] = sat(m_w[line][i+1] + ((xin(pc, m_hist, i) == o) ? 1 : -1));
      end
      m_hist = ((m_hist << 1) | o) & ((1 << HLEN) - 1);
      recent.push_back(m_hist & (LINES - 1));
      if (recent.size() > NHIST + 1) void'(recent.pop_front());
      @(posedge clk);
    end
    @(negedge clk);
    upd_valid = 0;
    $display("trainings=%0d bypassed=%0d gaps=%0d back-to-back=%0d history branch correct %0d/%0d",
             n_train, n_bypass, n_gap, n_b2b, late_ok, late);
    checks++;
    if (n_train == 0 || n_bypass == 0 || n_gap == 0 || n_b2b == 0 || late == 0 || late_ok * 100 < late * 95)
      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
