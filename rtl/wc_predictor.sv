// wc_predictor: weight-caching perceptron predictor, optionally partitioned.
//
// A small, fast first-level Weight Table (WT) of tagged perceptrons makes
// every prediction; a much larger, slower Weight Cache (WC) behind it keeps
// the perceptrons of branches that were pushed out of the WT, so that two
// static branches never train the same weights.
//
// Prediction (combinational): the WT line chosen by the low branch-address
// bits (and, with NPART > 1, by older history bits that pick a partition) is
// summed against the NHIST newest history bits. At the same time the line's
// partial address tag is compared. The prediction is always the weighted sum,
// whether the tag matches or not, so the WC never lengthens the prediction
// path. On a tag mismatch, at the clock edge:
//   * the old perceptron, if the line held one, is written back to the WC,
//   * the line takes the new tag and its weights are set to zero,
//   * the WC is queried for the new branch's perceptron.
// Until the WC answers (WC_LAT cycles later) the line predicts and trains
// with its current (zeroed) contents. On a WC hit whose line still carries
// the requesting tag, the returned weights overwrite the line; on a WC miss
// the line keeps what it has learnt meanwhile.
//
// Update (next clock edge): the caller hands back the checkpoint of the
// prediction (`upd_hist`, `upd_sum`) with the outcome. The line is trained
// only if it still carries the branch's tag, which keeps every perceptron
// alias-free. The outcome is shifted into the global history.
//
// Defaults follow the design's main configuration: 64-line WT with nine
// weights (8 history inputs + bias) and 16-bit (two-byte) tags, backed by a
// 1024-set, 4-way WC with an 8-cycle latency. NPART = 16 gives the combined
// partitioned + weight-caching organisation in which all partitions share
// one WC; the partition number is then part of the WC key. Same-cycle
// priority on one WT line (tag-miss reset over WC fill over training), the
// zero initial state and the non-speculative history are this library's
// choices. Address bits below PC_LSB are ignored.
module wc_predictor
  import perceptron_pkg::*;
#(
  parameter int unsigned PC_W    = 32,
  parameter int unsigned PC_LSB  = 2,
  parameter int unsigned NPART   = 1,
  parameter int unsigned LINES   = 64,
  parameter int unsigned NHIST   = 8,
  parameter int unsigned TAG_W   = 16,
  parameter int unsigned WC_SETS = 1024,
  parameter int unsigned WC_WAYS = 4,
  parameter int unsigned WC_LAT  = 8,
  localparam int unsigned PB     = (NPART > 1) ? $clog2(NPART) : 0,
  localparam int unsigned HLEN   = NHIST + PB,
  localparam int unsigned SUM_W  = sum_width(NHIST)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    pred_valid,
  input  logic [PC_W-1:0]         pred_pc,
  output logic                    pred_taken,
  output logic signed [SUM_W-1:0] pred_sum,
  output logic [HLEN-1:0]         pred_hist,
  output logic                    pred_tag_hit,
  input  logic                    upd_valid,
  input  logic [PC_W-1:0]         upd_pc,
  input  logic                    upd_taken,
  input  logic [HLEN-1:0]         upd_hist,
  input  logic signed [SUM_W-1:0] upd_sum,
  // Events, one-cycle pulses: a writeback to the WC, a WC result that hit
  // and was loaded into the WT, a WC result that missed.
  output logic                    ev_writeback,
  output logic                    ev_fill,
  output logic                    ev_wc_miss
);
  localparam int unsigned IDX_W = $clog2(LINES);
  localparam int unsigned PBW   = (PB > 0) ? PB : 1;    // partition field
  localparam int unsigned LA_W  = PB + IDX_W;           // WT line address
  localparam int unsigned NWL   = NPART * LINES;        // WT lines in total
  localparam int unsigned KEY_W = PB + TAG_W + IDX_W;   // WC key
  localparam int unsigned NW    = NHIST + 1;

  typedef logic [NW-1:0][WEIGHT_W-1:0] line_w_t;

  // WT storage: weights without reset, tags and valid bits.
  line_w_t          wt_w   [NWL];
  logic [TAG_W-1:0] wt_tag [NWL];
  logic [NWL-1:0]   wt_vld;

  logic [HLEN-1:0]  hist, hist_next;
  bhr #(.LEN(HLEN)) u_bhr (
    .clk, .rst_n, .push(upd_valid), .outcome(upd_taken),
    .hist, .hist_next
  );

  // Partition of a prediction and of an update: the history bits just
  // older than the perceptron inputs (always 0 when NPART = 1).
  logic             r_valid, r_hit;
  logic [KEY_W-1:0] r_key;
  line_w_t          r_w;
  logic [PBW-1:0]   ppart, upart;
  logic [LA_W-1:0] pline, uline, rline;
  logic [PBW-1:0]  rpart;
  if (PB > 0) begin : g_part
    assign ppart = hist[HLEN-1 -: PBW];
    assign upart = upd_hist[HLEN-1 -: PBW];
    assign rpart = r_key[KEY_W-1 -: PBW];
    assign pline = {ppart, pred_pc[PC_LSB +: IDX_W]};
    assign uline = {upart, upd_pc[PC_LSB +: IDX_W]};
    assign rline = {rpart, r_key[IDX_W-1:0]};
  end else begin : g_nopart
    assign ppart = '0;
    assign upart = '0;
    assign rpart = '0;
    assign pline = pred_pc[PC_LSB +: IDX_W];
    assign uline = upd_pc[PC_LSB +: IDX_W];
    assign rline = r_key[IDX_W-1:0];
  end

  function automatic logic [TAG_W-1:0] tag_of(logic [PC_W-1:0] pc);
    return pc[PC_LSB+IDX_W +: TAG_W];
  endfunction

  // ---- prediction side --------------------------------------------------
  logic [TAG_W-1:0] ptag;
  line_w_t          pw;

  assign ptag         = tag_of(pred_pc);
  assign pw           = wt_vld[pline] ? wt_w[pline] : '0;
  assign pred_tag_hit = wt_vld[pline] && (wt_tag[pline] == ptag);
  assign pred_hist    = hist;

  perceptron_sum #(.N(NHIST), .SUM_W(SUM_W)) u_sum (
    .x(hist[NHIST-1:0]), .w(pw), .sum(pred_sum), .taken(pred_taken)
  );

  // Tag miss: write back the old perceptron, reset the line, query the WC.
  logic             miss;
  logic             wb_valid, q_valid;
  logic [KEY_W-1:0] wb_key, q_key;
  line_w_t          wb_w;

  assign miss     = pred_valid && !pred_tag_hit;
  assign wb_valid = miss && wt_vld[pline];
  assign wb_key   = KEY_W'({ppart, wt_tag[pline], pline[IDX_W-1:0]});
  assign q_valid  = miss;
  assign q_key    = KEY_W'({ppart, ptag, pline[IDX_W-1:0]});

  // ---- weight cache ----------------------------------------------------

  weight_cache #(
    .NW(NW), .KEY_W(KEY_W), .SETS(WC_SETS), .WAYS(WC_WAYS), .LAT(WC_LAT)
  ) u_wc (
    .clk, .rst_n,
    .q_valid, .q_key, .r_valid, .r_key, .r_hit, .r_w,
    .wb_valid, .wb_key, .wb_w
  );

  logic [TAG_W-1:0] rtag;
  logic             fill;
  assign rtag  = r_key[IDX_W +: TAG_W];
  assign fill  = r_valid && r_hit && wt_vld[rline] && (wt_tag[rline] == rtag);

  // A line evicted in the cycle its own WC result arrives is written back
  // with the returned weights, not with the zeroed ones it still holds.
  assign wb_w  = (fill && rline == pline) ? r_w : wt_w[pline];

  // ---- update side -----------------------------------------------------
  logic            utag_ok, do_train;
  line_w_t         uw, uw_new;

  assign utag_ok = wt_vld[uline] && (wt_tag[uline] == tag_of(upd_pc));
  assign uw      = wt_vld[uline] ? wt_w[uline] : '0;

  perceptron_train #(.N(NHIST), .SUM_W(SUM_W)) u_train (
    .x(upd_hist[NHIST-1:0]), .outcome(upd_taken), .sum(upd_sum), .w(uw),
    .do_train, .w_new(uw_new)
  );

  // ---- WT writes: training, then WC fill, then tag-miss reset (last wins)
  always_ff @(posedge clk) begin
    if (upd_valid && utag_ok && do_train) wt_w[uline] <= uw_new;
    if (fill)                             wt_w[rline] <= r_w;
    if (miss) begin
      wt_w[pline]   <= '0;
      wt_tag[pline] <= ptag;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    wt_vld <= '0;
    else if (miss) wt_vld[pline] <= 1'b1;
  end

  assign ev_writeback = wb_valid;
  assign ev_fill      = fill;
  assign ev_wc_miss   = r_valid && !r_hit;
endmodule
