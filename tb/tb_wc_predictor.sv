// tb_wc_predictor: runs a synthetic branch stream through the weight-caching
// predictor and compares, cycle by cycle, its weighted sum, tag-hit flag and
// weight-cache events with an independent behavioural model of the same
// organisation (tagged first-level table, set-associative weight cache with
// round-robin replacement and a fixed result latency).
//
// The stream mixes always-taken, alternating, history-copying and random
// branches at addresses chosen to collide in the first-level table, with
// random idle cycles. The weight cache is made small (16 sets) so that
// evictions happen. It also checks that a result comes exactly WC_LAT cycles
// after its query, and that every mechanism (tag miss, writeback, fill from
// the weight cache, weight-cache miss, training) happened.
module tb_wc_predictor;
  import perceptron_pkg::*;
  localparam int unsigned NPART   = 1;
  localparam int unsigned LINES   = 64;
  localparam int unsigned NHIST   = 8;
  localparam int unsigned TAG_W   = 16;
  localparam int unsigned WC_SETS = 16;
  localparam int unsigned WC_WAYS = 4;
  localparam int unsigned WC_LAT  = 8;
  localparam int unsigned NSTEPS  = 20000;

  localparam int unsigned PB    = (NPART > 1) ? $clog2(NPART) : 0;
  localparam int unsigned HLEN  = NHIST + PB;
  localparam int unsigned SW    = sum_width(NHIST);
  localparam int unsigned IDX_W = $clog2(LINES);
  localparam int unsigned NW    = NHIST + 1;
  localparam int unsigned NWL   = NPART * LINES;
  localparam int unsigned SET_W = $clog2(WC_SETS);

  logic clk = 0, rst_n = 0;
  logic pred_valid = 0, upd_valid = 0, upd_taken = 0, pred_taken, pred_tag_hit;
  logic [31:0] pred_pc = 0, upd_pc = 0;
  logic signed [SW-1:0] pred_sum, upd_sum = 0;
  logic [HLEN-1:0] pred_hist, upd_hist = 0;
  logic ev_writeback, ev_fill, ev_wc_miss;

  wc_predictor #(
    .NPART(NPART), .LINES(LINES), .NHIST(NHIST), .TAG_W(TAG_W),
    .WC_SETS(WC_SETS), .WC_WAYS(WC_WAYS), .WC_LAT(WC_LAT)
  ) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_miss = 0, n_wb = 0, n_fill = 0, n_wcmiss = 0, n_train = 0, n_lat = 0;

  // ---- reference model --------------------------------------------------
  int  m_w   [NWL][NW];
  int  m_tag [NWL];
  bit  m_vld [NWL];
  int  c_w   [WC_WAYS][WC_SETS][NW];
  longint c_tag [WC_WAYS][WC_SETS];
  bit  c_vld [WC_WAYS][WC_SETS];
  int  c_rr  [WC_SETS];
  int  m_hist;
  longint edge_no = 0;

  typedef struct { longint due; longint key; bit hit; int w[NW]; longint issued; } resp_s;
  resp_s pend[$];

  function automatic int m_line(int pc, int h);
    int part = (PB > 0) ? (h >> NHIST) & (NPART - 1) : 0;
    return part * LINES + ((pc >> 2) & (LINES - 1));
  endfunction
  function automatic int m_tagof(int pc);
    return (pc >> (2 + IDX_W)) & ((1 << TAG_W) - 1);
  endfunction
  function automatic longint m_key(int line, int tag);
    return (longint'(line / LINES) << (TAG_W + IDX_W)) | (longint'(tag) << IDX_W) | longint'(line % LINES);
  endfunction
  function automatic int m_sum(int line, int h);
    int s = m_w[line][0];
    for (int i = 0; i < NHIST; i++) s += ((h >> i) & 1) ? m_w[line][i+1] : -m_w[line][i+1];
    return s;
  endfunction
  function automatic int sat(int v);
    return (v > 127) ? 127 : (v < -128) ? -128 : v;
  endfunction

  // ---- branch stream --------------------------------------------------
  localparam int NB = 24;
  int  br_pc [NB];
  bit  br_last [NB];
  int  actual_hist;  // outcome history for the generator

  function automatic bit outcome_of(int b);
    case (b % 4)
      0: return 1'b1;
      1: return !br_last[b];
      2: return actual_hist[1];
      default: return 1'($urandom);
    endcase
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < NB; b++) begin
      // groups of three branches share a first-level line, with different tags
      br_pc[b] = ((b % 8) << 2) | ((b / 8 + 1) << (2 + IDX_W)) | ((b % 3) << (2 + IDX_W + 4));
      br_last[b] = 0;
    end
    for (int l = 0; l < NWL; l++) m_vld[l] = 0;
    for (int k = 0; k < WC_WAYS; k++) for (int s = 0; s < WC_SETS; s++) c_vld[k][s] = 0;
    for (int s = 0; s < WC_SETS; s++) c_rr[s] = 0;
    m_hist = 0; actual_hist = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int t = 0; t < NSTEPS; t++) begin
      int b, pc, line, ptag, es, ehit, t_out;
      bit busy, emiss, ewb, efill, ewcmiss, rfill;
      resp_s r;
      bit have_r;
      @(negedge clk);
      busy = ($urandom % 5) != 0;
      b = $urandom % NB;
      if (t > NSTEPS / 2) b = b % 8;   // second half: fewer branches, must be learnt
      pc = br_pc[b];
      pred_valid = busy; pred_pc = pc;
      #1;
      // model: prediction side
      line = m_line(pc, m_hist);
      ptag = m_tagof(pc);
      es   = m_vld[line] ? m_sum(line, m_hist) : 0;
      ehit = m_vld[line] && m_tag[line] == ptag;
      emiss = busy && !ehit;
      ewb   = emiss && m_vld[line];
      have_r = (pend.size() > 0) && (pend[0].due == edge_no);
      if (have_r) r = pend.pop_front();
      rfill = 0; ewcmiss = 0;
      if (have_r) begin
        automatic int rl = int'((r.key >> (TAG_W + IDX_W)) * LINES + (r.key % LINES));
        automatic int rt = int'((r.key >> IDX_W) & ((1 << TAG_W) - 1));
        rfill = r.hit && m_vld[rl] && m_tag[rl] == rt;
        ewcmiss = !r.hit;
        if (r.due - r.issued == WC_LAT) n_lat++;
        else failures++;
      end
      if (busy) begin
        checks++;
        if (int'(pred_sum) != es || pred_tag_hit != ehit || pred_hist != HLEN'(m_hist)) begin
          failures++;
          if (failures < 6) $display("t=%0d sum %0d/%0d hit %b/%b", t, pred_sum, es, pred_tag_hit, ehit);
        end
      end
      checks++;
      if (ev_writeback != ewb || ev_fill != rfill || ev_wc_miss != ewcmiss) begin
        failures++;
        if (failures < 6) $display("t=%0d events wb %b/%b fill %b/%b wcmiss %b/%b", t,
                                   ev_writeback, ewb, ev_fill, rfill, ev_wc_miss, ewcmiss);
      end
      n_miss += emiss; n_wb += ewb; n_fill += rfill; n_wcmiss += ewcmiss;

      // update port: same branch, same cycle
      t_out = outcome_of(b);
      upd_valid = busy; upd_pc = pc; upd_taken = 1'(t_out);
      upd_hist = pred_hist; upd_sum = pred_sum;

      // model: apply the edge (training, fill, reset; WC writeback and query)
      if (busy) begin
        automatic int ul = line;
        if (m_vld[ul] && m_tag[ul] == ptag) begin
          automatic bit tr = ((es > 0) != t_out) || (es <= 15 && es >= -15);
          if (tr) begin
            n_train++;
            m_w[ul][0] = sat(m_w[ul][0] + (t_out ? 1 : -1));
            for (int i = 0; i < NHIST; i++)
              m_w[ul][i+1] = sat(m_w[ul][i+1] + ((((m_hist >> i) & 1) == t_out) ? 1 : -1));
          end
        end
      end
      if (have_r && rfill) begin
        automatic int rl = int'((r.key >> (TAG_W + IDX_W)) * LINES + (r.key % LINES));
        for (int i = 0; i < NW; i++) m_w[rl][i] = r.w[i];
      end
      if (emiss) begin
        automatic longint qk = m_key(line, ptag);
        resp_s q;
        automatic int qs = int'(qk % WC_SETS);
        automatic longint qt = qk >> SET_W;
        // query sees the contents before the writeback
        q.due = edge_no + WC_LAT; q.issued = edge_no; q.key = qk; q.hit = 0;
        for (int i = 0; i < NW; i++) q.w[i] = 0;
        for (int k = 0; k < WC_WAYS; k++)
          if (c_vld[k][qs] && c_tag[k][qs] == qt) begin
            q.hit = 1;
            for (int i = 0; i < NW; i++) q.w[i] = c_w[k][qs][i];
          end
        if (ewb) begin
          automatic longint wk = m_key(line, m_tag[line]);
          automatic int ws = int'(wk % WC_SETS);
          automatic longint wt = wk >> SET_W;
          automatic int way = -1;
          for (int k = 0; k < WC_WAYS; k++) if (way < 0 && c_vld[k][ws] && c_tag[k][ws] == wt) way = k;
          if (way < 0) for (int k = 0; k < WC_WAYS; k++) if (way < 0 && !c_vld[k][ws]) way = k;
          if (way < 0) begin way = c_rr[ws]; c_rr[ws] = (c_rr[ws] + 1) % WC_WAYS; end
          c_vld[way][ws] = 1; c_tag[way][ws] = wt;
          for (int i = 0; i < NW; i++) c_w[way][ws][i] = m_w[line][i];
        end
        pend.push_back(q);
        m_vld[line] = 1; m_tag[line] = ptag;
        for (int i = 0; i < NW; i++) m_w[line][i] = 0;
      end
      if (busy) begin
        m_hist = ((m_hist << 1) | t_out) & ((1 << HLEN) - 1);
        actual_hist = (actual_hist << 1) | t_out;
        br_last[b] = 1'(t_out);
      end
      @(posedge clk);
      edge_no++;
    end
    @(negedge clk);
    pred_valid = 0; upd_valid = 0;
    $display("tag misses=%0d writebacks=%0d fills=%0d wc misses=%0d trainings=%0d latency ok=%0d",
             n_miss, n_wb, n_fill, n_wcmiss, n_train, n_lat);
    if (n_miss == 0 || n_wb == 0 || n_fill == 0 || n_wcmiss == 0 || n_train == 0 || n_lat == 0)
      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
