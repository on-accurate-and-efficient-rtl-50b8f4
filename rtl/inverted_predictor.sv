// inverted_predictor: pipelined perceptron predictor with an inverted weight
// table.
//
// A conventional perceptron predictor indexes its weight table with the
// branch address, which is known only in the cycle of the prediction, so the
// table access cannot be started early. Here the roles are swapped: the table
// is indexed with M-bit global history that is already NHIST branches old,
// and the branch address becomes part of the perceptron's input vector. The
// table read can therefore start NHIST branches ahead, be pipelined over
// several cycles, and the prediction cycle only has to form the weighted sum.
//
// Operation, one entry per branch outcome shifted into the history:
//   1. When an outcome is pushed, the low M bits of the new history are the
//      index of a table read; the index is also put into a queue of
//      NHIST+1 entries.
//   2. The read returns LAT cycles later and its weights are stored in that
//      index's queue entry.
//   3. The oldest queue entry (pushed NHIST outcomes ago) supplies the weights
//      of the prediction; the inputs are the NHIST newest history bits
//      (pushed since that index was formed) and NPC low branch-address bits.
// The queue guarantees that exactly NHIST new history bits have been pushed
// when an entry is used, whatever the spacing of branches. With at most one
// outcome per cycle and LAT <= NHIST, the weights are always back in time;
// `pred_ready` shows that they are.
//
// Training reads the current weights of the line again (second read port),
// trains and writes them back. Reads in flight and queue entries with the
// same index are patched with the written weights (a bypass), so a
// prediction always sees the table as it is in that cycle. The bypass, the
// zero initial state and the non-speculative history are this library's
// choices.
//
// Defaults follow the design's main configuration: a 2K-line table, 8-cycle
// access, 17 inputs formed from the 8 newest history bits and 9 address bits,
// plus a bias weight (18 weights per line).
module inverted_predictor
  import perceptron_pkg::*;
#(
  parameter int unsigned PC_W   = 32,
  parameter int unsigned PC_LSB = 2,
  parameter int unsigned LINES  = 2048,
  parameter int unsigned NHIST  = 8,
  parameter int unsigned NPC    = 9,
  parameter int unsigned LAT    = 8,
  localparam int unsigned M     = $clog2(LINES),
  localparam int unsigned HLEN  = NHIST + M,
  localparam int unsigned N     = NHIST + NPC,
  localparam int unsigned SUM_W = sum_width(N)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [PC_W-1:0]         pred_pc,
  output logic                    pred_ready,
  output logic                    pred_taken,
  output logic signed [SUM_W-1:0] pred_sum,
  output logic [HLEN-1:0]         pred_hist,
  input  logic                    upd_valid,
  input  logic [PC_W-1:0]         upd_pc,
  input  logic                    upd_taken,
  input  logic [HLEN-1:0]         upd_hist,
  input  logic signed [SUM_W-1:0] upd_sum
);
  localparam int unsigned NW    = N + 1;
  localparam int unsigned Q     = NHIST + 1;
  localparam int unsigned SLOT_W = $clog2(Q);

  typedef logic [NW-1:0][WEIGHT_W-1:0] line_w_t;

  typedef struct packed {
    logic              valid;
    logic [SLOT_W-1:0] slot;
    logic [M-1:0]      idx;
    line_w_t           w;
  } rd_t;

  typedef struct packed {
    logic         valid;   // weights have arrived
    logic [M-1:0] idx;
    line_w_t      w;
  } qent_t;

  // ---- history ---------------------------------------------------------
  logic [HLEN-1:0] hist, hist_next;
  bhr #(.LEN(HLEN)) u_bhr (
    .clk, .rst_n, .push(upd_valid), .outcome(upd_taken),
    .hist, .hist_next
  );
  assign pred_hist = hist;

  // ---- table -----------------------------------------------------------
  logic [M-1:0] ridx, uidx;
  line_w_t      rw, uw, uw_new;
  logic         we, do_train;

  assign ridx = hist_next[M-1:0];
  assign uidx = upd_hist[NHIST +: M];
  assign we   = upd_valid && do_train;

  weight_table #(.LINES(LINES), .NW(NW)) u_wt (
    .clk, .rst_n,
    .rd_a_idx(ridx), .rd_a_w(rw),
    .rd_b_idx(uidx), .rd_b_w(uw),
    .we, .wr_idx(uidx), .wr_w(uw_new)
  );

  // Replace weights read for index i by the weights being written to i.
  function automatic line_w_t patch(logic [M-1:0] i, line_w_t w);
    return (we && i == uidx) ? uw_new : w;
  endfunction

  // ---- pipelined read and queue ----------------------------------------
  rd_t              pipe [LAT];
  qent_t            queue [Q];
  logic [SLOT_W-1:0] wp;
  rd_t              rdone;

  assign rdone = pipe[LAT-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < LAT; i++) pipe[i] <= '0;
      // After reset the history is all zero and every weight is zero, so
      // each queue entry already holds the right perceptron for index 0.
      for (int unsigned i = 0; i < Q; i++) queue[i] <= '{valid: 1'b1, idx: '0, w: '0};
      wp <= '0;
    end else begin
      pipe[0] <= '{valid: upd_valid, slot: wp, idx: ridx, w: patch(ridx, rw)};
      for (int unsigned i = 1; i < LAT; i++) begin
        pipe[i]   <= pipe[i-1];
        pipe[i].w <= patch(pipe[i-1].idx, pipe[i-1].w);
      end
      for (int unsigned i = 0; i < Q; i++)
        queue[i].w <= patch(queue[i].idx, queue[i].w);
      if (rdone.valid) begin
        queue[rdone.slot].valid <= 1'b1;
        queue[rdone.slot].w     <= patch(rdone.idx, rdone.w);
      end
      if (upd_valid) begin
        queue[wp].valid <= 1'b0;
        queue[wp].idx   <= ridx;
        wp <= (wp == SLOT_W'(Q-1)) ? '0 : wp + SLOT_W'(1);
      end
    end
  end

  // ---- prediction from the oldest queue entry ----------------------------
  qent_t        head;
  logic [N-1:0] px, ux;

  assign head       = queue[wp];
  assign pred_ready = head.valid;
  assign px         = {pred_pc[PC_LSB +: NPC], hist[NHIST-1:0]};
  assign ux         = {upd_pc[PC_LSB +: NPC], upd_hist[NHIST-1:0]};

  perceptron_sum #(.N(N), .SUM_W(SUM_W)) u_sum (
    .x(px), .w(head.w), .sum(pred_sum), .taken(pred_taken)
  );

  perceptron_train #(.N(N), .SUM_W(SUM_W)) u_train (
    .x(ux), .outcome(upd_taken), .sum(upd_sum), .w(uw),
    .do_train, .w_new(uw_new)
  );

  // The oldest entry was formed from the history NHIST outcomes ago.
  a_head_index : assert property (@(posedge clk) disable iff (!rst_n)
    head.idx == hist[NHIST +: M]);
  a_lat : assert property (@(posedge clk) disable iff (!rst_n)
    LAT <= NHIST);
endmodule
