// weight_cache: second-level Weight Cache (WC) holding evicted perceptrons.
//
// A SETS x WAYS set-associative store of perceptrons (NW weights each), keyed
// by a KEY_W-bit branch key. The low SET_W key bits pick the set, the rest is
// stored as the line's tag, so every line in the cache belongs to exactly one
// branch.
//
//   Query port:     q_valid/q_key start a lookup. The result (r_valid, r_key,
//                   r_hit, r_w) appears exactly LAT cycles later; one query
//                   can start every cycle (the lookup is pipelined).
//   Writeback port: wb_valid/wb_key/wb_w store a perceptron at the clock edge.
//                   A line with the same key is overwritten; otherwise an
//                   invalid way is filled, otherwise the set's round-robin
//                   victim is replaced.
//
// The organisation (1024 sets x 4 ways, 8-cycle latency) follows the design's
// main configuration. The tag width, the round-robin replacement, keeping a
// line in the cache after it is returned on a hit, and the lookup being done
// in the first cycle with the result then delayed are this library's choices.
// A query and a writeback in the same cycle are independent; the query sees
// the contents from before the writeback.
module weight_cache
  import perceptron_pkg::*;
#(
  parameter int unsigned NW    = 9,
  parameter int unsigned KEY_W = 22,
  parameter int unsigned SETS  = 1024,
  parameter int unsigned WAYS  = 4,
  parameter int unsigned LAT   = 8,
  localparam int unsigned SET_W = $clog2(SETS),
  localparam int unsigned TAG_W = KEY_W - SET_W,
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         q_valid,
  input  logic [KEY_W-1:0]             q_key,
  output logic                         r_valid,
  output logic [KEY_W-1:0]             r_key,
  output logic                         r_hit,
  output logic [NW-1:0][WEIGHT_W-1:0]  r_w,
  input  logic                         wb_valid,
  input  logic [KEY_W-1:0]             wb_key,
  input  logic [NW-1:0][WEIGHT_W-1:0]  wb_w
);
  typedef struct packed {
    logic                        valid;
    logic [KEY_W-1:0]            key;
    logic                        hit;
    logic [NW-1:0][WEIGHT_W-1:0] w;
  } resp_t;

  logic [WAYS-1:0][SETS-1:0]   vld;
  logic [SETS-1:0][WAY_W-1:0]  rr;

  logic [SET_W-1:0] qset, wset;
  logic [TAG_W-1:0] qtag, wtag;
  resp_t            lookup;
  resp_t            pipe [LAT];

  assign qset = q_key[SET_W-1:0];
  assign qtag = q_key[KEY_W-1:SET_W];
  assign wset = wb_key[SET_W-1:0];
  assign wtag = wb_key[KEY_W-1:SET_W];

  // Each way is one tag memory and one weight memory, read at the query's
  // set and at the writeback's set.
  logic [WAYS-1:0][TAG_W-1:0]                  q_tag, w_tag_rd;
  logic [WAYS-1:0][NW-1:0][WEIGHT_W-1:0]       q_w;
  logic [WAY_W-1:0]                            wway;

  for (genvar k = 0; k < WAYS; k++) begin : g_way
    logic [TAG_W-1:0]            tag_mem [SETS];
    logic [NW-1:0][WEIGHT_W-1:0] w_mem   [SETS];

    assign q_tag[k]    = tag_mem[qset];
    assign q_w[k]      = w_mem[qset];
    assign w_tag_rd[k] = tag_mem[wset];

    always_ff @(posedge clk) begin
      if (wb_valid && wway == WAY_W'(k)) begin
        tag_mem[wset] <= wtag;
        w_mem[wset]   <= wb_w;
      end
    end
  end

  // Lookup of a query: compare the tags of all ways of the set.
  always_comb begin
    lookup       = '0;
    lookup.valid = q_valid;
    lookup.key   = q_key;
    for (int unsigned k = 0; k < WAYS; k++) begin
      if (vld[k][qset] && q_tag[k] == qtag) begin
        lookup.hit = 1'b1;
        lookup.w   = q_w[k];
      end
    end
  end

  // Way chosen for a writeback: same key, else a free way, else the victim.
  logic             whit, wfree;
  always_comb begin
    whit  = 1'b0;
    wfree = 1'b0;
    wway  = rr[wset];
    for (int unsigned k = 0; k < WAYS; k++) begin
      if (!whit && vld[k][wset] && w_tag_rd[k] == wtag) begin
        whit = 1'b1;
        wway = WAY_W'(k);
      end
    end
    if (!whit) begin
      for (int unsigned k = 0; k < WAYS; k++) begin
        if (!wfree && !vld[k][wset]) begin
          wfree = 1'b1;
          wway  = WAY_W'(k);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0;
      rr  <= '0;
    end else if (wb_valid) begin
      for (int unsigned k = 0; k < WAYS; k++)
        if (wway == WAY_W'(k)) vld[k][wset] <= 1'b1;
      if (!whit && !wfree)
        rr[wset] <= (rr[wset] == WAY_W'(WAYS-1)) ? '0 : rr[wset] + WAY_W'(1);
    end
  end

  // Result delay line: LAT cycles from query to result.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < LAT; i++) pipe[i] <= '0;
    end else begin
      pipe[0] <= lookup;
      for (int unsigned i = 1; i < LAT; i++) pipe[i] <= pipe[i-1];
    end
  end

  assign r_valid = pipe[LAT-1].valid;
  assign r_key   = pipe[LAT-1].key;
  assign r_hit   = pipe[LAT-1].hit;
  assign r_w     = pipe[LAT-1].w;
endmodule
