// pseudotag_predictor: perceptron predictor that learns branch-address bits.
//
// The weight table is indexed by the low IDX_W bits of the (word) branch
// address, as in a global perceptron predictor, but the perceptron's input
// vector is made of NHIST global-history bits plus NPC further address bits
// taken just above the index. Because the perceptron also learns weights for
// those address ("pseudotag") bits, branches that alias in the table can
// still be told apart. Defaults: 128 lines, 19 history bits + 4 address bits
// + bias = 24 weights, as in the design's main pseudotag configuration.
//
// Interface and timing: the prediction is combinational from `pred_pc` and
// the current history. `pred_hist` and `pred_sum` are the checkpoint the
// caller hands back with the outcome on the update port; the update trains
// the line at the next clock edge and shifts the outcome into the history.
// Address bits below PC_LSB (byte offset of 4-byte instructions) are ignored.
module pseudotag_predictor
  import perceptron_pkg::*;
#(
  parameter int unsigned PC_W   = 32,
  parameter int unsigned PC_LSB = 2,
  parameter int unsigned LINES  = 128,
  parameter int unsigned NHIST  = 19,
  parameter int unsigned NPC    = 4,
  localparam int unsigned N     = NHIST + NPC,
  localparam int unsigned SUM_W = sum_width(N)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [PC_W-1:0]         pred_pc,
  output logic                    pred_taken,
  output logic signed [SUM_W-1:0] pred_sum,
  output logic [NHIST-1:0]        pred_hist,
  input  logic                    upd_valid,
  input  logic [PC_W-1:0]         upd_pc,
  input  logic                    upd_taken,
  input  logic [NHIST-1:0]        upd_hist,
  input  logic signed [SUM_W-1:0] upd_sum
);
  localparam int unsigned IDX_W = $clog2(LINES);

  logic [NHIST-1:0]           hist, hist_next;
  logic [N-1:0]               px, ux;
  logic [IDX_W-1:0]           pidx, uidx;
  logic [N:0][WEIGHT_W-1:0]   pw, uw, uw_new;
  logic                       do_train;

  bhr #(.LEN(NHIST)) u_bhr (
    .clk, .rst_n, .push(upd_valid), .outcome(upd_taken),
    .hist, .hist_next
  );

  // Input vector: x[NPC-1:0] are address bits, x[N-1:NPC] history bits.
  assign pidx = pred_pc[PC_LSB +: IDX_W];
  assign uidx = upd_pc[PC_LSB +: IDX_W];
  assign px   = {hist,     pred_pc[PC_LSB+IDX_W +: NPC]};
  assign ux   = {upd_hist, upd_pc[PC_LSB+IDX_W +: NPC]};

  weight_table #(.LINES(LINES), .NW(N+1)) u_wt (
    .clk, .rst_n,
    .rd_a_idx(pidx), .rd_a_w(pw),
    .rd_b_idx(uidx), .rd_b_w(uw),
    .we(upd_valid && do_train), .wr_idx(uidx), .wr_w(uw_new)
  );

  perceptron_sum #(.N(N), .SUM_W(SUM_W)) u_sum (
    .x(px), .w(pw), .sum(pred_sum), .taken(pred_taken)
  );

  perceptron_train #(.N(N), .SUM_W(SUM_W)) u_train (
    .x(ux), .outcome(upd_taken), .sum(upd_sum), .w(uw),
    .do_train, .w_new(uw_new)
  );

  assign pred_hist = hist;
endmodule
