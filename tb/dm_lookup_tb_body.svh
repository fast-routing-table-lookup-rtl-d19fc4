// Shared body of the end-to-end lookup testbenches (tb_dm_lookup_top, tb_dm_lookup_full).
//
// The including module defines P_PFX_LEN, P_IDX_ENTRIES, P_BUCKET_AW, P_OMEGA,
// N_ROUTES, N_LOOKUPS, N_BURST, SRAM_LAT, TCAM_LAT, MAX_CYCLES, USE_SETUP and SEED
// (0: the simulator's seed, else a fixed seed for the stimulus process), then
// instantiates dm_lookup_top as `dut` with .* after this file and ends the simulation
// when test_done is set. The body:
//   - plays the control plane. With USE_SETUP = 0 it fills the index table with random
//     values and places random hash-table routes (length P_PFX_LEN..24) into the
//     bucket each one maps to (XOR of its two index entries), skipping routes whose
//     bucket is full. With USE_SETUP = 1 it runs the DM-hash setup algorithm on
//     N_ROUTES routes: progressive ordering of the index entries (always taking the
//     entry with the smallest remaining group as the next-to-last), then assignment of
//     each entry in that order to the value whose bucket-load vector is the min-max
//     one; every route must then fit in a bucket of P_OMEGA slots. Either way the index
//     table is loaded through the cfg port and the bucket images are written into a
//     model of the off-chip SRAM;
//   - models the QDR SRAM (fixed read latency SRAM_LAT, 72-bit words) and the TCAM
//     (prefixes of length 8..18 and 25..32, longest match, latency TCAM_LAT);
//   - sends addresses, first with random gaps, then back to back, and compares every
//     result with a longest-prefix match over the flat list of all routes;
//   - checks that back-to-back addresses are accepted one per bucket fetch (WPB
//     cycles), and that each way of resolving a lookup happened.

  import dm_pkg::*;

  localparam int unsigned IDX_AW  = $clog2(P_IDX_ENTRIES);
  localparam int unsigned WPB     = words_per_bucket(P_OMEGA, P_PFX_LEN);
  localparam int unsigned FW      = flag_w(P_PFX_LEN);
  localparam int unsigned SRAM_AW = P_BUCKET_AW + ((WPB > 1) ? $clog2(WPB) : 0);
  localparam int unsigned BKT_W   = WPB * SRAM_W;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #1 clk = ~clk;

  logic                in_valid = 1'b0;
  logic                in_ready;
  logic [ADDR_W-1:0]   in_dst = '0;
  logic                cfg_we = 1'b0;
  logic [IDX_AW-1:0]   cfg_addr = '0;
  logic [23:0]         cfg_data = '0;
  logic                sram_rd_en;
  logic [SRAM_AW-1:0]  sram_rd_addr;
  logic                sram_rd_valid;
  logic [SRAM_W-1:0]   sram_rd_data;
  logic                tcam_req;
  logic [ADDR_W-1:0]   tcam_key;
  logic                tcam_rsp_valid;
  logic                tcam_rsp_hit;
  logic [LEN_W-1:0]    tcam_rsp_len;
  logic [PORT_W-1:0]   tcam_rsp_port;
  logic                out_valid;
  logic [ADDR_W-1:0]   out_dst;
  logic                out_hit;
  logic [PORT_W-1:0]   out_port;
  src_e                out_src;

  int checks = 0;
  int failures = 0;
  bit test_done = 1'b0;   // set once TB_RESULT is printed; the including module finishes
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ------------------------------------------------------------ route tables
  typedef struct {
    logic [31:0] pfx;   // left-aligned, bits below len are zero
    int          len;
    logic [15:0] port;
  } route_t;

  route_t all_routes[$];     // every route, for the reference match
  route_t tcam_routes[$];    // TCAM part
  logic [23:0] idx_val [P_IDX_ENTRIES];
  logic [BKT_W-1:0] bkt_img [int unsigned];
  int   bkt_cnt [int unsigned];
  bit   seen [longint];

  function automatic logic [31:0] lmask(int len);
    return (len == 0) ? 32'd0 : ~(32'hffff_ffff >> len);
  endfunction

  function automatic bit route_exists(logic [31:0] pfx, int len);
    return seen.exists({32'(len), pfx});
  endfunction

  function automatic void note_route(logic [31:0] pfx, int len);
    seen[{32'(len), pfx}] = 1'b1;
  endfunction

  // reference longest-prefix match over all routes
  function automatic void ref_lookup(input logic [31:0] a, output bit hit,
                                     output logic [15:0] port, output src_e src);
    int best;
    best = -1; hit = 0; port = '0; src = SRC_NONE;
    foreach (all_routes[r])
      if (((a ^ all_routes[r].pfx) & lmask(all_routes[r].len)) == 0 && all_routes[r].len > best) begin
        best = all_routes[r].len;
        port = all_routes[r].port;
      end
    if (best >= 0) begin
      hit = 1;
      if (best >= 25)                          src = SRC_TCAM_LONG;
      else if (best == 24)                     src = SRC_HASH_24;
      else if (best >= P_PFX_LEN)              src = SRC_HASH_SHORT;
      else                                     src = SRC_TCAM_SHORT;
    end
  endfunction

  // bucket a hash-table prefix maps to: XOR of the entries at its two hash addresses
  function automatic int unsigned bucket_of(logic [31:0] a);
    logic [31:0] p;
    int unsigned i1, i2;
    p  = a >> (32 - P_PFX_LEN);
    i1 = p % P_IDX_ENTRIES;
    i2 = i1 ^ ((p / P_IDX_ENTRIES) % P_IDX_ENTRIES);
    return (idx_val[i1] ^ idx_val[i2]) % (1 << P_BUCKET_AW);
  endfunction

  function automatic bit place_hash_route(logic [31:0] pfx, int len, logic [15:0] port);
    int unsigned b;
    int j;
    logic [BKT_W-1:0] img;
    logic [7:0] flag;
    if (route_exists(pfx, len)) return 0;
    b = bucket_of(pfx);
    if (!bkt_cnt.exists(b)) begin bkt_cnt[b] = 0; bkt_img[b] = '0; end
    if (bkt_cnt[b] >= P_OMEGA) return 0;
    j = bkt_cnt[b];
    img = bkt_img[b];
    img[j*40 +: 40] = {pfx[31:8], port};
    flag = 8'(24 - len);        // length offset in the low FW-1 bits
    flag[FW-1] = 1'b1;          // valid
    img[P_OMEGA*40 + j*FW +: FW] = flag[FW-1:0];
    bkt_img[b] = img;
    bkt_cnt[b] = j + 1;
    all_routes.push_back('{pfx, len, port});
    note_route(pfx, len);
    return 1;
  endfunction

  // ---------------------------------------------------------- SRAM model
  logic [SRAM_W-1:0] sram_mem [int unsigned];
  logic              rp_v [SRAM_LAT];
  logic [SRAM_W-1:0] rp_d [SRAM_LAT];

  always @(posedge clk) begin
    rp_v[0] <= rst_n && sram_rd_en;
    rp_d[0] <= sram_mem.exists(32'(sram_rd_addr)) ? sram_mem[32'(sram_rd_addr)] : '0;
    for (int s = 1; s < SRAM_LAT; s++) begin
      rp_v[s] <= rp_v[s-1];
      rp_d[s] <= rp_d[s-1];
    end
  end
  initial foreach (rp_v[s]) rp_v[s] = 1'b0;
  assign sram_rd_valid = rp_v[SRAM_LAT-1];
  assign sram_rd_data  = rp_d[SRAM_LAT-1];

  // ---------------------------------------------------------- TCAM model
  logic              tp_v [TCAM_LAT];
  logic              tp_h [TCAM_LAT];
  logic [LEN_W-1:0]  tp_l [TCAM_LAT];
  logic [PORT_W-1:0] tp_p [TCAM_LAT];

  always @(posedge clk) begin
    int best;
    logic [15:0] bp;
    best = -1; bp = '0;
    foreach (tcam_routes[r])
      if (((tcam_key ^ tcam_routes[r].pfx) & lmask(tcam_routes[r].len)) == 0 && tcam_routes[r].len > best) begin
        best = tcam_routes[r].len;
        bp   = tcam_routes[r].port;
      end
    tp_v[0] <= rst_n && tcam_req;
    tp_h[0] <= best >= 0;
    tp_l[0] <= (best >= 0) ? LEN_W'(best) : '0;
    tp_p[0] <= bp;
    for (int s = 1; s < TCAM_LAT; s++) begin
      tp_v[s] <= tp_v[s-1]; tp_h[s] <= tp_h[s-1]; tp_l[s] <= tp_l[s-1]; tp_p[s] <= tp_p[s-1];
    end
  end
  initial foreach (tp_v[s]) tp_v[s] = 1'b0;
  assign tcam_rsp_valid = tp_v[TCAM_LAT-1];
  assign tcam_rsp_hit   = tp_h[TCAM_LAT-1];
  assign tcam_rsp_len   = tp_l[TCAM_LAT-1];
  assign tcam_rsp_port  = tp_p[TCAM_LAT-1];

  // ---------------------------------------------------------- scoreboard
  typedef struct { logic [31:0] dst; bit hit; logic [15:0] port; src_e src; } exp_t;
  exp_t exp_q[$];
  bit   accepted = 0;
  int   n_acc = 0, n_out = 0, n_stall = 0;
  int   n_src [5];
  bit   in_burst = 0;
  longint last_acc_cycle = -1;
  int   burst_idx = 0;  // accepts so far in this burst; the first gap may be 1 cycle
                        // because stage 1 buffers one address while the fetch unit is idle
  int   burst_gaps = 0, burst_gap_bad = 0;

  always @(posedge clk) begin
    accepted = in_valid && in_ready && rst_n;
    if (rst_n && in_valid && !in_ready) n_stall++;
    if (accepted) begin
      exp_t e;
      e.dst = in_dst;
      ref_lookup(in_dst, e.hit, e.port, e.src);
      exp_q.push_back(e);
      n_acc++;
      if (in_burst && burst_idx >= 2) begin
        burst_gaps++;
        if (cycle - last_acc_cycle != WPB) begin
          burst_gap_bad++;
          $display("burst gap of %0d cycles at cycle %0d", cycle - last_acc_cycle, cycle);
        end
      end
      last_acc_cycle = in_burst ? cycle : -1;
      burst_idx = in_burst ? burst_idx + 1 : 0;
    end
    if (rst_n && out_valid) begin
      exp_t e;
      n_out++;
      if (exp_q.size() == 0) begin
        failures++; checks++;
        $display("ERROR: unexpected result for %h", out_dst);
      end else begin
        e = exp_q.pop_front();
        checks++;
        if (out_dst !== e.dst || out_hit !== e.hit || (e.hit && out_port !== e.port) || out_src !== e.src) begin
          failures++;
          if (failures < 10)
            $display("ERROR: dst %h got hit=%0d port=%h src=%s, expected hit=%0d port=%h src=%s (dst %h)",
                     out_dst, out_hit, out_port, out_src.name(), e.hit, e.port, e.src.name(), e.dst);
        end
        n_src[int'(e.src)]++;
      end
    end
  end


  // ---------------------------------------------------------- DM-hash setup
  route_t items[$];
  localparam int HMAX = 64;
  typedef int hist_t [HMAX];

  function automatic void entries_of(logic [31:0] a, output int unsigned i1, output int unsigned i2);
    logic [31:0] p;
    p  = a >> (32 - P_PFX_LEN);
    i1 = p % P_IDX_ENTRIES;
    i2 = i1 ^ ((p / P_IDX_ENTRIES) % P_IDX_ENTRIES);
  endfunction

  // sorted load vector a is smaller than b (compared from the largest load down)
  function automatic bit minmax_better(const ref hist_t a, const ref hist_t b);
    int ca, cb;
    ca = 0; cb = 0;
    for (int l = HMAX - 1; l >= 0; l--) begin
      ca += a[l]; cb += b[l];
      if (ca != cb) return ca < cb;
    end
    return 0;
  endfunction

  int dm_omega = 0;

  function automatic void dm_setup();
    int unsigned e1 [], e2 [];
    int          owner [];
    int          grp_cnt [P_IDX_ENTRIES];
    bit          sel [P_IDX_ENTRIES];
    int          order [P_IDX_ENTRIES];
    int          lists [P_IDX_ENTRIES][$];
    int          members [P_IDX_ENTRIES][$];
    int          load [];
    hist_t       hist, cand, best;
    int          m;
    m = 1 << P_BUCKET_AW;
    e1 = new[items.size()]; e2 = new[items.size()]; owner = new[items.size()];
    load = new[m];
    foreach (grp_cnt[e]) begin grp_cnt[e] = 0; sel[e] = 0; end
    foreach (items[it]) begin
      entries_of(items[it].pfx, e1[it], e2[it]);
      owner[it] = -1;
      lists[e1[it]].push_back(it); grp_cnt[e1[it]]++;
      if (e2[it] != e1[it]) begin lists[e2[it]].push_back(it); grp_cnt[e2[it]]++; end
    end
    // progressive order, built from the last position down
    for (int pos = P_IDX_ENTRIES - 1; pos >= 0; pos--) begin
      int e;
      e = -1;
      for (int c = 0; c < P_IDX_ENTRIES; c++)
        if (!sel[c] && (e < 0 || grp_cnt[c] < grp_cnt[e])) e = c;
      sel[e] = 1;
      order[pos] = e;
      foreach (lists[e][k]) begin
        int it;
        it = lists[e][k];
        if (owner[it] < 0) begin
          owner[it] = e;
          members[e].push_back(it);
          if (e1[it] != e2[it]) grp_cnt[(e1[it] == e) ? e2[it] : e1[it]]--;
        end
      end
    end
    // value assignment in progressive order
    foreach (load[b]) load[b] = 0;
    foreach (hist[l]) hist[l] = 0;
    hist[0] = m;
    for (int pos = 0; pos < P_IDX_ENTRIES; pos++) begin
      int e, g, bestv;
      int unsigned base [$];
      bit          self [$];
      e = order[pos];
      g = members[e].size();
      if (g == 0) begin
        idx_val[e] = 24'($urandom_range(m - 1));
        continue;
      end
      foreach (members[e][k]) begin
        int it, other;
        it = members[e][k];
        other = (e1[it] == e) ? e2[it] : e1[it];
        self.push_back(other == e);
        base.push_back((other == e) ? 0 : int'(idx_val[other]));
      end
      bestv = -1;
      for (int v = 0; v < m; v++) begin
        int unsigned bk [$];
        int          add [$];
        cand = hist;
        foreach (base[k]) begin
          int unsigned b;
          int f;
          b = self[k] ? 0 : ((v ^ base[k]) % m);
          f = -1;
          foreach (bk[q]) if (bk[q] == b) f = q;
          if (f < 0) begin bk.push_back(b); add.push_back(1); end
          else add[f]++;
        end
        foreach (bk[q]) begin
          cand[load[bk[q]]]--;
          cand[load[bk[q]] + add[q]]++;
        end
        if (bestv < 0 || minmax_better(cand, best)) begin best = cand; bestv = v; end
      end
      idx_val[e] = 24'(bestv);
      hist = best;
      foreach (base[k]) load[self[k] ? 0 : ((bestv ^ base[k]) % m)]++;
    end
    foreach (load[b]) if (load[b] > dm_omega) dm_omega = load[b];
  endfunction

  // largest bucket load when the routes go straight to buckets through one hash
  function automatic int single_hash_omega();
    int load [int unsigned];
    int mx;
    mx = 0;
    foreach (items[it]) begin
      logic [31:0] p;
      int unsigned b;
      p = items[it].pfx >> (32 - P_PFX_LEN);
      b = (p ^ (p >> P_BUCKET_AW)) % (1 << P_BUCKET_AW);
      if (!load.exists(b)) load[b] = 0;
      load[b]++;
      if (load[b] > mx) mx = load[b];
    end
    return mx;
  endfunction

  // ---------------------------------------------------------- stimulus
  function automatic logic [31:0] pick_dst();
    int r;
    if ($urandom_range(9) == 0) return $urandom;
    r = $urandom_range(all_routes.size() - 1);
    return all_routes[r].pfx | ($urandom & ~lmask(all_routes[r].len));
  endfunction

  task automatic send(int n, bit burst);
    int sent = 0;
    in_burst = burst;
    last_acc_cycle = -1;
    burst_idx = 0;
    while (sent < n || (in_valid && !accepted)) begin
      @(negedge clk);
      if (!in_valid || accepted) begin
        if (sent < n && (burst || $urandom_range(2) != 0)) begin
          in_valid = 1'b1;
          in_dst   = pick_dst();
          sent++;
        end else begin
          in_valid = 1'b0;
        end
      end
    end
    @(negedge clk);
    if (accepted) in_valid = 1'b0;
    while (in_valid) begin
      @(negedge clk);
      if (accepted) in_valid = 1'b0;
    end
    in_burst = 0;
  endtask

  initial begin
    int placed, tries, tr;
    logic [31:0] p;
    if (SEED != 0) process::self().srandom(SEED);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    if (USE_SETUP) begin
      // distinct routes of length P_PFX_LEN and 24, then the DM-hash setup
      int sh, dropped;
      int unsigned i1, i2;
      while (items.size() < N_ROUTES) begin
        route_t t;
        p = $urandom;
        if (p[31:24] == 0) p[31] = 1'b1;
        t.len  = ($urandom_range(2) == 0 || P_PFX_LEN >= 24) ? 24 : P_PFX_LEN + $urandom_range(23 - P_PFX_LEN);
        t.pfx  = p & lmask(t.len);
        t.port = 16'($urandom);
        entries_of(t.pfx, i1, i2);
        // a prefix whose two hash addresses coincide always lands in bucket 0; the
        // control plane leaves such prefixes to the TCAM, so none is generated here
        if (i1 != i2 && !route_exists(t.pfx, t.len)) begin items.push_back(t); note_route(t.pfx, t.len); end
      end
      seen.delete();
      dm_setup();
      sh = single_hash_omega();
      dropped = 0;
      foreach (items[it])
        if (!place_hash_route(items[it].pfx, items[it].len, items[it].port)) dropped++;
      $display("setup: n=%0d m=%0d x=%0d average=%0.2f DM-hash Omega=%0d single-hash Omega=%0d",
               items.size(), 1 << P_BUCKET_AW, P_IDX_ENTRIES,
               real'(items.size()) / real'(1 << P_BUCKET_AW), dm_omega, sh);
      checks++;
      if (dropped != 0 || dm_omega > P_OMEGA) begin
        failures++;
        $display("ERROR: setup reached Omega=%0d, %0d routes do not fit %0d slots", dm_omega, dropped, P_OMEGA);
      end
      checks++;
      if (dm_omega > sh) begin
        failures++;
        $display("ERROR: DM-hash Omega %0d above single-hash Omega %0d", dm_omega, sh);
      end
    end else begin
      foreach (idx_val[i]) idx_val[i] = 24'($urandom);
      // hash-table routes of length P_PFX_LEN..24; some get a longer route below them
      placed = 0; tries = 0;
      while (placed < N_ROUTES && tries < 20 * N_ROUTES) begin
        int len;
        tries++;
        p = $urandom;
        if (p[31:24] == 0) p[31] = 1'b1;
        len = ($urandom_range(2) == 0) ? 24 : P_PFX_LEN + $urandom_range(23 - P_PFX_LEN);
        if (P_PFX_LEN >= 24) len = 24;
        p &= lmask(len);
        if (place_hash_route(p, len, 16'($urandom))) begin
          placed++;
          if (len < 24 && $urandom_range(3) == 0)
            if (place_hash_route(p | (32'h1 << (31 - len)), len + 1, 16'($urandom))) placed++;
        end
      end
    end

    // index table through the cfg port
    for (int i = 0; i < P_IDX_ENTRIES; i++) begin
      @(negedge clk);
      cfg_we = 1'b1; cfg_addr = IDX_AW'(i); cfg_data = idx_val[i];
    end
    @(negedge clk);
    cfg_we = 1'b0;

    foreach (bkt_img[b])
      for (int w = 0; w < WPB; w++)
        sram_mem[b * WPB + w] = bkt_img[b][w*SRAM_W +: SRAM_W];

    // TCAM routes: long ones below hash routes, short ones anywhere
    tr = all_routes.size();
    for (int i = 0; i < N_ROUTES / 8 + 2; i++) begin
      route_t t;
      int r;
      r = $urandom_range(tr - 1);
      t.len  = 25 + $urandom_range(7);
      t.pfx  = (all_routes[r].pfx | 32'($urandom)) & lmask(t.len);
      t.port = 16'($urandom);
      if (!route_exists(t.pfx, t.len)) begin
        tcam_routes.push_back(t); all_routes.push_back(t); note_route(t.pfx, t.len);
      end
      t.len  = 8 + $urandom_range(10);
      t.pfx  = $urandom & lmask(t.len);
      t.port = 16'($urandom);
      if (t.pfx[31:24] != 0 && !route_exists(t.pfx, t.len)) begin
        tcam_routes.push_back(t); all_routes.push_back(t); note_route(t.pfx, t.len);
      end
    end
    $display("routes: %0d total, %0d in TCAM, %0d buckets used", all_routes.size(),
             tcam_routes.size(), bkt_img.size());

    send(N_LOOKUPS, 1'b0);
    send(N_BURST, 1'b1);
    repeat (200) @(negedge clk);

    checks++;
    if (exp_q.size() != 0 || n_out != n_acc) begin
      failures++;
      $display("ERROR: %0d lookups accepted, %0d results", n_acc, n_out);
    end
    checks++;
    if (burst_gaps == 0 || burst_gap_bad != 0) begin
      failures++;
      $display("ERROR: back-to-back accept interval differs from %0d cycles in %0d of %0d gaps",
               WPB, burst_gap_bad, burst_gaps);
    end
    checks++;
    if (n_stall == 0) begin failures++; $display("ERROR: no input stall happened"); end
    for (int s = 0; s < 5; s++) begin
      checks++;
      if (n_src[s] == 0 && !(s == int'(SRC_HASH_SHORT) && P_PFX_LEN >= 24)) begin
        failures++;
        $display("ERROR: no lookup was resolved as %s", src_e'(s));
      end
    end
    $display("results by source: none=%0d tcam_short=%0d hash_short=%0d hash_24=%0d tcam_long=%0d; stalls=%0d, burst gaps=%0d",
             n_src[0], n_src[1], n_src[2], n_src[3], n_src[4], n_stall, burst_gaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    test_done = 1'b1;
  end

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    test_done = 1'b1;
  end
