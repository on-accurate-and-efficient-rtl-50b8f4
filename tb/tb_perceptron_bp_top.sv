// tb_perceptron_bp_top: end-to-end run of all five predictor organisations at
// their full default sizes on one branch stream.
//
// The stream alternates between three loops of four branches each, 200
// branches at a time. The three loops use the same first-level table lines
// with different address tags, and the second loop's branches go the opposite
// way, so the weight-caching organisations must swap perceptrons with their
// weight caches at every change of loop. Each branch's direction is a fixed
// function of the iteration count or of recent history, so a perceptron
// that keeps its own weights can learn it. Random idle cycles are inserted.
// Checks:
//   * every predictor's misprediction rate in the last quarter is below 10 %
//     and below its rate in the first quarter (they learn);
//   * the inverted predictor always has its weights ready;
//   * each mechanism happened: tag misses, writebacks, fills from the weight
//     cache and weight-cache misses, in both weight-caching organisations;
//     idle gaps and back-to-back branches.
module tb_perceptron_bp_top;
  localparam int NSTEPS = 40000;

  logic clk = 0, rst_n = 0;
  logic pred_valid = 0, upd_valid = 0, upd_taken = 0;
  logic [31:0] pred_pc = 0, upd_pc = 0;
  logic wc_pred_taken, wc_tag_hit, pwc_pred_taken, pwc_tag_hit;
  logic par_pred_taken, inv_pred_ready, inv_pred_taken, pt_pred_taken;
  logic signed [11:0] wc_pred_sum, pwc_pred_sum, par_pred_sum;
  logic signed [11:0] wc_upd_sum = 0, pwc_upd_sum = 0, par_upd_sum = 0;
  logic signed [12:0] inv_pred_sum, pt_pred_sum, inv_upd_sum = 0, pt_upd_sum = 0;
  logic [7:0]  wc_pred_hist, wc_upd_hist = 0;
  logic [11:0] pwc_pred_hist, pwc_upd_hist = 0, par_pred_hist, par_upd_hist = 0;
  logic [18:0] inv_pred_hist, inv_upd_hist = 0, pt_pred_hist, pt_upd_hist = 0;
  logic [2:0]  wc_events, pwc_events;

  perceptron_bp_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int miss_early [5], miss_late [5], n_early = 0, n_late = 0;
  int ev_wc [3], ev_pwc [3], tagmiss_wc = 0, tagmiss_pwc = 0, n_gap = 0, n_b2b = 0;
  int ghist = 0;
  string names [5] = '{"weight caching", "partitioned + WC", "partitioned", "inverted", "pseudotag"};

  initial begin
    #50000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5; i++) begin miss_early[i] = 0; miss_late[i] = 0; end
    for (int i = 0; i < 3; i++) begin ev_wc[i] = 0; ev_pwc[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NSTEPS; t++) begin
      int b, pc, o, it, lp;
      bit p [5];
      @(negedge clk);
      if ($urandom % 8 == 0) begin
        n_gap++;
        pred_valid = 0; upd_valid = 0;
        repeat (1 + $urandom % 12) begin
          @(negedge clk);
          for (int i = 0; i < 3; i++) begin ev_wc[i] += wc_events[i]; ev_pwc[i] += pwc_events[i]; end
        end
      end else n_b2b++;
      lp = (t / 200) % 3;
      b  = t % 4;
      it = t / 4;
      // line b of the first-level tables, tag depends on the loop
      pc = (b << 2) | ((lp + 1) << 8) | (lp << 14);
      pred_valid = 1; pred_pc = pc;
      #1;
      case (b % 4)
        0: o = 1;
        1: o = it % 2;
        2: o = (ghist >> 1) & 1;
        default: o = (it % 3) != 0;
      endcase
      if (lp == 1) o = !o;
      p[0] = wc_pred_taken; p[1] = pwc_pred_taken; p[2] = par_pred_taken;
      p[3] = inv_pred_taken; p[4] = pt_pred_taken;
      if (t < NSTEPS / 4) n_early++;
      if (t >= 3 * NSTEPS / 4) n_late++;
      for (int i = 0; i < 5; i++) begin
        if (p[i] != o[0] && t < NSTEPS / 4) miss_early[i]++;
        if (p[i] != o[0] && t >= 3 * NSTEPS / 4) miss_late[i]++;
      end
      checks++;
      if (!inv_pred_ready) failures++;
      tagmiss_wc += !wc_tag_hit; tagmiss_pwc += !pwc_tag_hit;
      for (int i = 0; i < 3; i++) begin ev_wc[i] += wc_events[i]; ev_pwc[i] += pwc_events[i]; end
      upd_valid = 1; upd_pc = pc; upd_taken = o[0];
      wc_upd_hist = wc_pred_hist;   wc_upd_sum = wc_pred_sum;
      pwc_upd_hist = pwc_pred_hist; pwc_upd_sum = pwc_pred_sum;
      par_upd_hist = par_pred_hist; par_upd_sum = par_pred_sum;
      inv_upd_hist = inv_pred_hist; inv_upd_sum = inv_pred_sum;
      pt_upd_hist = pt_pred_hist;   pt_upd_sum = pt_pred_sum;
      ghist = (ghist << 1) | o;
      @(posedge clk);
    end
    @(negedge clk);
    pred_valid = 0; upd_valid = 0;
    for (int i = 0; i < 5; i++) begin
      $display("%-18s mispredicted first quarter %0d/%0d, last quarter %0d/%0d",
               names[i], miss_early[i], n_early, miss_late[i], n_late);
      checks++;
      if (miss_late[i] * 10 >= n_late || miss_late[i] >= miss_early[i]) failures++;
    end
    $display("weight caching:   tag misses=%0d writebacks=%0d fills=%0d wc misses=%0d",
             tagmiss_wc, ev_wc[0], ev_wc[1], ev_wc[2]);
    $display("partitioned + WC: tag misses=%0d writebacks=%0d fills=%0d wc misses=%0d",
             tagmiss_pwc, ev_pwc[0], ev_pwc[1], ev_pwc[2]);
    $display("idle gaps=%0d back-to-back branches=%0d", n_gap, n_b2b);
    checks++;
    if (tagmiss_wc == 0 || tagmiss_pwc == 0 || n_gap == 0 || n_b2b == 0) failures++;
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (ev_wc[i] == 0 || ev_pwc[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
