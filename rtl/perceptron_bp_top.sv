// perceptron_bp_top: the four perceptron predictor organisations of this
// library side by side, fed by one branch stream.
//
// The organisations are alternatives, not stages of one predictor; a core
// would use one of them. The top lets them be compared on the same stream:
// every branch is presented to all of them on the shared prediction port
// (pred_valid, pred_pc), and each returns its own prediction together with
// the checkpoint (history snapshot and weighted sum) it needs back at update
// time. The shared update port carries the branch address and outcome; each
// organisation takes its own checkpoint on its own inputs.
//
//   wc_*   weight caching: 64-line tagged WT + 1024-set 4-way weight cache
//   pwc_*  partitioned WT (16 partitions) sharing one weight cache
//   par_*  partitioned WT, 16 partitions of 64 lines
//   inv_*  inverted, pipelined 2K-line WT (8-cycle access)
//   pt_*   pseudotag perceptron, 128 lines, 19 history + 4 address bits
//
// Timing: predictions are combinational from pred_pc in the cycle of the
// request; updates take effect at the next clock edge. At most one branch
// per cycle, updates in program order.
module perceptron_bp_top
  import perceptron_pkg::*;
#(
  parameter int unsigned PC_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // shared branch stream
  input  logic              pred_valid,
  input  logic [PC_W-1:0]   pred_pc,
  input  logic              upd_valid,
  input  logic [PC_W-1:0]   upd_pc,
  input  logic              upd_taken,
  // weight caching
  output logic              wc_pred_taken,
  output logic signed [11:0] wc_pred_sum,
  output logic [7:0]        wc_pred_hist,
  output logic              wc_tag_hit,
  input  logic [7:0]        wc_upd_hist,
  input  logic signed [11:0] wc_upd_sum,
  output logic [2:0]        wc_events,    // {wc_miss, fill, writeback}
  // partitioned + shared weight cache
  output logic              pwc_pred_taken,
  output logic signed [11:0] pwc_pred_sum,
  output logic [11:0]       pwc_pred_hist,
  output logic              pwc_tag_hit,
  input  logic [11:0]       pwc_upd_hist,
  input  logic signed [11:0] pwc_upd_sum,
  output logic [2:0]        pwc_events,
  // partitioned
  output logic              par_pred_taken,
  output logic signed [11:0] par_pred_sum,
  output logic [11:0]       par_pred_hist,
  input  logic [11:0]       par_upd_hist,
  input  logic signed [11:0] par_upd_sum,
  // inverted, pipelined
  output logic              inv_pred_ready,
  output logic              inv_pred_taken,
  output logic signed [12:0] inv_pred_sum,
  output logic [18:0]       inv_pred_hist,
  input  logic [18:0]       inv_upd_hist,
  input  logic signed [12:0] inv_upd_sum,
  // pseudotag
  output logic              pt_pred_taken,
  output logic signed [12:0] pt_pred_sum,
  output logic [18:0]       pt_pred_hist,
  input  logic [18:0]       pt_upd_hist,
  input  logic signed [12:0] pt_upd_sum
);
  wc_predictor #(.PC_W(PC_W), .NPART(1)) u_wc (
    .clk, .rst_n,
    .pred_valid, .pred_pc,
    .pred_taken(wc_pred_taken), .pred_sum(wc_pred_sum),
    .pred_hist(wc_pred_hist), .pred_tag_hit(wc_tag_hit),
    .upd_valid, .upd_pc, .upd_taken,
    .upd_hist(wc_upd_hist), .upd_sum(wc_upd_sum),
    .ev_writeback(wc_events[0]), .ev_fill(wc_events[1]), .ev_wc_miss(wc_events[2])
  );

  wc_predictor #(.PC_W(PC_W), .NPART(16)) u_pwc (
    .clk, .rst_n,
    .pred_valid, .pred_pc,
    .pred_taken(pwc_pred_taken), .pred_sum(pwc_pred_sum),
    .pred_hist(pwc_pred_hist), .pred_tag_hit(pwc_tag_hit),
    .upd_valid, .upd_pc, .upd_taken,
    .upd_hist(pwc_upd_hist), .upd_sum(pwc_upd_sum),
    .ev_writeback(pwc_events[0]), .ev_fill(pwc_events[1]), .ev_wc_miss(pwc_events[2])
  );

  partitioned_predictor #(.PC_W(PC_W)) u_par (
    .clk, .rst_n, .pred_pc,
    .pred_taken(par_pred_taken), .pred_sum(par_pred_sum), .pred_hist(par_pred_hist),
    .upd_valid, .upd_pc, .upd_taken,
    .upd_hist(par_upd_hist), .upd_sum(par_upd_sum)
  );

  inverted_predictor #(.PC_W(PC_W)) u_inv (
    .clk, .rst_n, .pred_pc,
    .pred_ready(inv_pred_ready),
    .pred_taken(inv_pred_taken), .pred_sum(inv_pred_sum), .pred_hist(inv_pred_hist),
    .upd_valid, .upd_pc, .upd_taken,
    .upd_hist(inv_upd_hist), .upd_sum(inv_upd_sum)
  );

  pseudotag_predictor #(.PC_W(PC_W)) u_pt (
    .clk, .rst_n, .pred_pc,
    .pred_taken(pt_pred_taken), .pred_sum(pt_pred_sum), .pred_hist(pt_pred_hist),
    .upd_valid, .upd_pc, .upd_taken,
    .upd_hist(pt_upd_hist), .upd_sum(pt_upd_sum)
  );
endmodule
