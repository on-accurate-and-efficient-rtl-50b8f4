// tb_partitioned_predictor: compares every weighted sum of the partitioned
// predictor (16 partitions x 64 lines, 8 history inputs, partition chosen by
// history bits 11..8) with a reference model, with random idle cycles. It
// checks that only the selected partition trains and that a branch whose
// direction is the XOR of two old history bits (not linearly separable over
// the 8 inputs, but constant within each partition) is learnt: in the last
// quarter of the run it must be predicted correctly nearly always.
module tb_partitioned_predictor;
  import perceptron_pkg::*;
  localparam int unsigned NPART = 16, LINES = 64, NHIST = 8;
  localparam int unsigned HLEN = NHIST + 4, NW = NHIST + 1, SW = sum_width(NHIST);
  localparam int NSTEPS = 20000;

  logic clk = 0, rst_n = 0;
  logic upd_valid = 0, upd_taken = 0, pred_taken;
  logic [31:0] pred_pc = 0, upd_pc = 0;
  logic signed [SW-1:0] pred_sum, upd_sum = 0;
  logic [HLEN-1:0] pred_hist, upd_hist = 0;

  partitioned_predictor #(.NPART(NPART), .LINES(LINES), .NHIST(NHIST)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_train = 0, late = 0, late_ok = 0;
  int m_w [NPART][LINES][NW];
  int m_hist;
  bit part_used [NPART];
  int np;

  function automatic int sat(int v);
    return (v > 127) ? 127 : (v < -128) ? -128 : v;
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NPART; p++) begin
      part_used[p] = 0;
      for (int l = 0; l < LINES; l++) for (int i = 0; i < NW; i++) m_w[p][l][i] = 0;
    end
    m_hist = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NSTEPS; t++) begin
      int b, pc, line, part, es, o;
      bit busy;
      @(negedge clk);
      busy = ($urandom % 4) != 0;
      b = $urandom % 4;
      pc = (b << 2) | ($urandom % 2 == 0 && b == 3 ? (1 << 8) : 0);
      pred_pc = pc;
      #1;
      line = (pc >> 2) % LINES;
      part = (m_hist >> NHIST) & (NPART - 1);
      es = m_w[part][line][0];
      for (int i = 0; i < NHIST; i++) es += ((m_hist >> i) & 1) ? m_w[part][line][i+1] : -m_w[part][line][i+1];
      checks++;
      if (int'(pred_sum) != es || pred_taken != (es > 0) || int'(pred_hist) != m_hist) begin
        failures++;
        if (failures < 5) $display("t=%0d sum %0d/%0d", t, pred_sum, es);
      end
      case (b)
        0: o = ((m_hist >> 8) ^ (m_hist >> 10)) & 1;
        1: o = 1;
        default: o = $urandom % 2;
      endcase
      if (busy && b == 0 && t > 3 * NSTEPS / 4) begin
        late++;
        if (pred_taken == o[0]) late_ok++;
      end
      upd_valid = busy; upd_pc = pc; upd_taken = o[0]; upd_hist = pred_hist; upd_sum = pred_sum;
      if (busy) begin
        if (((es > 0) != o) || (es <= 15 && es >= -15)) begin
          n_train++;
          part_used[part] = 1;
          m_w[part][line][0] = sat(m_w[part][line][0] + (o ? 1 : -1));
          for (int i = 0; i < NHIST; i++)
            m_w[part][line][i+1] = sat(m_w[part][line][i+1] + ((((m_hist >> i) & 1) == o) ? 1 : -1));
        end
        m_hist = ((m_hist << 1) | o) & ((1 << HLEN) - 1);
      end
      @(posedge clk);
    end
    @(negedge clk);
    upd_valid = 0;
    np = 0;
    for (int p = 0; p < NPART; p++) np += part_used[p];
    $display("trainings=%0d partitions trained=%0d xor branch correct %0d/%0d", n_train, np, late_ok, late);
    checks++;
    if (n_train == 0 || np < NPART || late == 0 || late_ok * 100 < late * 95) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
