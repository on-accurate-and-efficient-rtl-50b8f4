// tb_weight_cache: random writebacks and queries against a small weight cache
// (16 sets x 4 ways, latency 8), compared with a reference model of the same
// set-associative store with round-robin replacement. Checks hit/miss, the
// returned weights, and that every result comes exactly LAT cycles after its
// query. Counts hits, misses, overwrites of a present key and evictions.
module tb_weight_cache;
  import perceptron_pkg::*;
  localparam int unsigned NW = 9, KEY_W = 22, SETS = 16, WAYS = 4, LAT = 8;
  localparam int unsigned SET_W = $clog2(SETS);
  typedef logic [NW-1:0][WEIGHT_W-1:0] line_t;

  logic clk = 0, rst_n = 0;
  logic q_valid = 0, wb_valid = 0, r_valid, r_hit;
  logic [KEY_W-1:0] q_key = 0, wb_key = 0, r_key;
  line_t r_w, wb_w = 0;

  weight_cache #(.NW(NW), .KEY_W(KEY_W), .SETS(SETS), .WAYS(WAYS), .LAT(LAT)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_hit = 0, n_miss = 0, n_over = 0, n_evict = 0;
  line_t  c_w   [WAYS][SETS];
  longint c_tag [WAYS][SETS];
  bit     c_vld [WAYS][SETS];
  int     c_rr  [SETS];
  typedef struct { longint due; logic [KEY_W-1:0] key; bit hit; line_t w; } resp_s;
  resp_s pend[$];
  longint cyc = 0;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < WAYS; k++) for (int s = 0; s < SETS; s++) c_vld[k][s] = 0;
    for (int s = 0; s < SETS; s++) c_rr[s] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      resp_s q;
      @(negedge clk);
      // keys drawn from a pool of 96 so that sets overflow
      q_valid  = 1'($urandom % 2);
      q_key    = KEY_W'((($urandom % 6) << SET_W) | ($urandom % SETS));
      wb_valid = 1'($urandom % 2);
      wb_key   = KEY_W'((($urandom % 6) << SET_W) | ($urandom % SETS));
      for (int i = 0; i < NW; i++) wb_w[i] = WEIGHT_W'($urandom);
      #1;
      // result due now?
      if (pend.size() > 0 && pend[0].due == cyc) begin
        q = pend.pop_front();
        checks++;
        if (!r_valid || r_key != q.key || r_hit != q.hit || (q.hit && r_w != q.w)) begin
          failures++;
          if (failures < 5) $display("t=%0d key %h/%h hit %b/%b", t, r_key, q.key, r_hit, q.hit);
        end
        if (q.hit) n_hit++; else n_miss++;
      end else begin
        checks++;
        if (r_valid) failures++;
      end
      // model: query sees the state before this edge's writeback
      if (q_valid) begin
        automatic int qs = int'(q_key % SETS);
        q.due = cyc + LAT; q.key = q_key; q.hit = 0; q.w = '0;
        for (int k = 0; k < WAYS; k++)
          if (c_vld[k][qs] && c_tag[k][qs] == longint'(q_key >> SET_W)) begin
            q.hit = 1; q.w = c_w[k][qs];
          end
        pend.push_back(q);
      end
      if (wb_valid) begin
        automatic int ws = int'(wb_key % SETS), way = -1;
        for (int k = 0; k < WAYS; k++) if (way < 0 && c_vld[k][ws] && c_tag[k][ws] == longint'(wb_key >> SET_W)) way = k;
        if (way >= 0) n_over++;
        if (way < 0) for (int k = 0; k < WAYS; k++) if (way < 0 && !c_vld[k][ws]) way = k;
        if (way < 0) begin way = c_rr[ws]; c_rr[ws] = (c_rr[ws] + 1) % WAYS; n_evict++; end
        c_vld[way][ws] = 1; c_tag[way][ws] = longint'(wb_key >> SET_W); c_w[way][ws] = wb_w;
      end
      @(posedge clk);
      cyc++;
    end
    $display("hits=%0d misses=%0d overwrites=%0d evictions=%0d", n_hit, n_miss, n_over, n_evict);
    if (n_hit == 0 || n_miss == 0 || n_over == 0 || n_evict == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
