// tb_design_space: runs the other configurations of the design-space study
// on one synthetic branch stream, to show that the parameterised modules work
// away from their defaults:
//   pt1k   pseudotag, 1K lines, 19 history + 4 address bits
//   par16  partitioned, 128 lines, 24 history bits: 4 select 16 partitions,
//          20 are inputs
//   par32  partitioned, 1K lines, 24 history bits: 5 select 32 partitions,
//          19 are inputs
//   wc2w   weight caching, 128-line x 8-input WT, 2048-set 2-way cache
//   wc1w   weight caching, 128-line x 24-input WT, 4096-set direct-mapped
//          cache with a 10-cycle latency (the faster-clock latency)
// The stream alternates among three loops of four branches that share table
// lines under different address tags (the second loop goes the opposite
// way). Each configuration must end the run below 10 % mispredictions and
// better than in its first quarter; both weight caches must have returned
// perceptrons (fills) and the checkpoint protocol is as in the other tests.
module tb_design_space;
  localparam int NSTEPS = 24000;
  localparam int NP = 5;

  logic clk = 0, rst_n = 0;
  logic valid = 0, taken = 0;
  logic [31:0] pc = 0;

  always #5 clk = ~clk;

  // pt1k
  logic pt_t;  logic signed [12:0] pt_s, pt_us = 0;  logic [18:0] pt_h, pt_uh = 0;
  pseudotag_predictor #(.LINES(1024), .NHIST(19), .NPC(4)) u_pt (
    .clk, .rst_n, .pred_pc(pc), .pred_taken(pt_t), .pred_sum(pt_s), .pred_hist(pt_h),
    .upd_valid(valid), .upd_pc(pc), .upd_taken(taken), .upd_hist(pt_uh), .upd_sum(pt_us));
  // par16
  logic p16_t; logic signed [12:0] p16_s, p16_us = 0; logic [23:0] p16_h, p16_uh = 0;
  partitioned_predictor #(.NPART(16), .LINES(128), .NHIST(20)) u_p16 (
    .clk, .rst_n, .pred_pc(pc), .pred_taken(p16_t), .pred_sum(p16_s), .pred_hist(p16_h),
    .upd_valid(valid), .upd_pc(pc), .upd_taken(taken), .upd_hist(p16_uh), .upd_sum(p16_us));
  // par32
  logic p32_t; logic signed [12:0] p32_s, p32_us = 0; logic [23:0] p32_h, p32_uh = 0;
  partitioned_predictor #(.NPART(32), .LINES(1024), .NHIST(19)) u_p32 (
    .clk, .rst_n, .pred_pc(pc), .pred_taken(p32_t), .pred_sum(p32_s), .pred_hist(p32_h),
    .upd_valid(valid), .upd_pc(pc), .upd_taken(taken), .upd_hist(p32_uh), .upd_sum(p32_us));
  // wc2w
  logic w2_t, w2_hit, w2_wb, w2_fill, w2_miss;
  logic signed [11:0] w2_s, w2_us = 0; logic [7:0] w2_h, w2_uh = 0;
  wc_predictor #(.LINES(128), .NHIST(8), .WC_SETS(2048), .WC_WAYS(2), .WC_LAT(8)) u_w2 (
    .clk, .rst_n, .pred_valid(valid), .pred_pc(pc), .pred_taken(w2_t), .pred_sum(w2_s),
    .pred_hist(w2_h), .pred_tag_hit(w2_hit), .upd_valid(valid), .upd_pc(pc), .upd_taken(taken),
    .upd_hist(w2_uh), .upd_sum(w2_us), .ev_writeback(w2_wb), .ev_fill(w2_fill), .ev_wc_miss(w2_miss));
  // wc1w
  logic w1_t, w1_hit, w1_wb, w1_fill, w1_miss;
  logic signed [12:0] w1_s, w1_us = 0; logic [23:0] w1_h, w1_uh = 0;
  wc_predictor #(.LINES(128), .NHIST(24), .WC_SETS(4096), .WC_WAYS(1), .WC_LAT(10)) u_w1 (
    .clk, .rst_n, .pred_valid(valid), .pred_pc(pc), .pred_taken(w1_t), .pred_sum(w1_s),
    .pred_hist(w1_h), .pred_tag_hit(w1_hit), .upd_valid(valid), .upd_pc(pc), .upd_taken(taken),
    .upd_hist(w1_uh), .upd_sum(w1_us), .ev_writeback(w1_wb), .ev_fill(w1_fill), .ev_wc_miss(w1_miss));

  int checks = 0, failures = 0;
  int miss_early [NP], miss_late [NP], n_early = 0, n_late = 0, fills2 = 0, fills1 = 0;
  int ghist = 0;
  string names [NP] = '{"pt1k", "par16", "par32", "wc2w", "wc1w"};

  // weight-cache fills can land in idle cycles too
  always @(posedge clk) begin
    fills2 += int'(w2_fill);
    fills1 += int'(w1_fill);
  end

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NP; i++) begin miss_early[i] = 0; miss_late[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NSTEPS; t++) begin
      int b, o, it, lp;
      bit p [NP];
      @(negedge clk);
      if ($urandom % 8 == 0) begin
        valid = 0;
        repeat (1 + $urandom % 12) @(negedge clk);
      end
      lp = (t / 200) % 3;
      b  = t % 4;
      it = t / 4;
      pc = (b << 2) | ((lp + 1) << 9) | (lp << 16);
      valid = 1;
      #1;
      case (b)
        0: o = 1;
        1: o = it % 2;
        2: o = (ghist >> 1) & 1;
        default: o = (it % 3) != 0;
      endcase
      if (lp == 1) o = !o;
      p[0] = pt_t; p[1] = p16_t; p[2] = p32_t; p[3] = w2_t; p[4] = w1_t;
      if (t < NSTEPS / 4) n_early++;
      if (t >= 3 * NSTEPS / 4) n_late++;
      for (int i = 0; i < NP; i++) begin
        if (p[i] != o[0] && t < NSTEPS / 4) miss_early[i]++;
        if (p[i] != o[0] && t >= 3 * NSTEPS / 4) miss_late[i]++;
      end
      taken = o[0];
      pt_uh = pt_h;   pt_us = pt_s;
      p16_uh = p16_h; p16_us = p16_s;
      p32_uh = p32_h; p32_us = p32_s;
      w2_uh = w2_h;   w2_us = w2_s;
      w1_uh = w1_h;   w1_us = w1_s;
      ghist = (ghist << 1) | o;
      @(posedge clk);
    end
    @(negedge clk);
    valid = 0;
    for (int i = 0; i < NP; i++) begin
      $display("%-6s mispredicted first quarter %0d/%0d, last quarter %0d/%0d",
               names[i], miss_early[i], n_early, miss_late[i], n_late);
      checks++;
      if (miss_late[i] * 10 >= n_late || miss_late[i] >= miss_early[i]) failures++;
    end
    $display("fills: 2-way cache %0d, direct-mapped 10-cycle cache %0d", fills2, fills1);
    checks++;
    if (fills2 == 0 || fills1 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
