// partitioned_predictor: perceptron predictor with a statically partitioned
// weight table.
//
// NPART weight tables of LINES perceptrons each are read in parallel with the
// low branch-address bits. Global-history bits that are not perceptron inputs
// (the SEL_W bits just older than the NHIST input bits) select which
// partition's perceptron makes the prediction, so one static branch gets a
// separate linear classifier for each value of that older history. Only the
// partition that made a prediction is trained. Defaults: 16 partitions of 64
// lines with nine weights (8 history inputs + bias), selected by 4 history
// bits, the design's main partitioned configuration.
//
// Interface and timing: the prediction is combinational; `pred_hist` (all
// NHIST+SEL_W history bits) and `pred_sum` are handed back with the outcome on
// the update port, which trains at the next clock edge and shifts the outcome
// into the history. Address bits below PC_LSB are ignored.
module partitioned_predictor
  import perceptron_pkg::*;
#(
  parameter int unsigned PC_W   = 32,
  parameter int unsigned PC_LSB = 2,
  parameter int unsigned NPART  = 16,
  parameter int unsigned LINES  = 64,
  parameter int unsigned NHIST  = 8,
  localparam int unsigned SEL_W = $clog2(NPART),
  localparam int unsigned HLEN  = NHIST + SEL_W,
  localparam int unsigned SUM_W = sum_width(NHIST)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [PC_W-1:0]         pred_pc,
  output logic                    pred_taken,
  output logic signed [SUM_W-1:0] pred_sum,
  output logic [HLEN-1:0]         pred_hist,
  input  logic                    upd_valid,
  input  logic [PC_W-1:0]         upd_pc,
  input  logic                    upd_taken,
  input  logic [HLEN-1:0]         upd_hist,
  input  logic signed [SUM_W-1:0] upd_sum
);
  localparam int unsigned IDX_W = $clog2(LINES);
  localparam int unsigned NW    = NHIST + 1;

  logic [HLEN-1:0]                        hist, hist_next;
  logic [IDX_W-1:0]                       pidx, uidx;
  logic [SEL_W-1:0]                       psel, usel;
  logic [NPART-1:0][NW-1:0][WEIGHT_W-1:0] plines, ulines;
  logic [NW-1:0][WEIGHT_W-1:0]            pw, uw, uw_new;
  logic                                   do_train;

  bhr #(.LEN(HLEN)) u_bhr (
    .clk, .rst_n, .push(upd_valid), .outcome(upd_taken),
    .hist, .hist_next
  );

  assign pidx = pred_pc[PC_LSB +: IDX_W];
  assign uidx = upd_pc[PC_LSB +: IDX_W];
  assign psel = hist[NHIST +: SEL_W];
  assign usel = upd_hist[NHIST +: SEL_W];

  for (genvar p = 0; p < NPART; p++) begin : g_part
    weight_table #(.LINES(LINES), .NW(NW)) u_wt (
      .clk, .rst_n,
      .rd_a_idx(pidx), .rd_a_w(plines[p]),
      .rd_b_idx(uidx), .rd_b_w(ulines[p]),
      .we(upd_valid && do_train && (usel == SEL_W'(p))),
      .wr_idx(uidx), .wr_w(uw_new)
    );
  end

  partition_selector #(.NPART(NPART), .NW(NW)) u_psel (
    .lines(plines), .sel(psel), .w(pw)
  );
  partition_selector #(.NPART(NPART), .NW(NW)) u_usel (
    .lines(ulines), .sel(usel), .w(uw)
  );

  perceptron_sum #(.N(NHIST), .SUM_W(SUM_W)) u_sum (
    .x(hist[NHIST-1:0]), .w(pw), .sum(pred_sum), .taken(pred_taken)
  );

  perceptron_train #(.N(NHIST), .SUM_W(SUM_W)) u_train (
    .x(upd_hist[NHIST-1:0]), .outcome(upd_taken), .sum(upd_sum), .w(uw),
    .do_train, .w_new(uw_new)
  );

  assign pred_hist = hist;
endmodule
