// dm_lookup_top: routing-table lookup engine based on deterministic multi-hashing.
//
// For every destination address the engine fetches exactly one bucket from off-chip
// SRAM. The first PFX_LEN bits of the address are hashed by two simple functions
// (dm_hash_fn) to two entries of a small on-die index table (dm_index_table); the XOR of
// the two entries is the bucket ID (dm_bucket_id). The bucket, OMEGA <prefix, port>
// slots, is read from the SRAM as WPB consecutive 72-bit words (dm_bucket_fetch) and
// searched in parallel (dm_bucket_search). At the same time the address is sent to an
// external TCAM holding the prefixes the hash table does not cover (lengths 8..18 and
// 25..32); the two answers are merged by prefix length (dm_result_select).
//
// Pipeline and timing: cycle 0 accepts an address (in_valid & in_ready) and reads the
// index table; cycle 1 forms the bucket ID and hands it to the fetch unit, which issues
// WPB reads on consecutive cycles. Read data returns after the SRAM's latency; the
// bucket is searched in the cycle after its last word arrives and the result waits in
// a queue for the matching TCAM answer. out_valid pulses one cycle after both answers
// are present. With addresses offered back to back the engine accepts one every WPB
// cycles (2 cycles for OMEGA = 3, i.e. 250 M lookups/s with a 500 MHz SRAM), limited
// by SRAM bandwidth; in_ready drops while the fetch unit is busy and while
// MAX_INFLIGHT lookups are unfinished. Results leave in arrival order and are never
// stalled. The SRAM and the TCAM must answer in request order. tcam_key is in_dst
// itself (a wire, no logic), so the TCAM sees the address in the cycle it is accepted.
//
// The index table is loaded by the control plane through cfg_we/cfg_addr/cfg_data;
// the bucket contents are written into the SRAM by the control plane directly. Both
// come from the setup algorithm (prefix expansion, progressive order, min-max value
// assignment), which runs in software and is not part of this block.
//
// Defaults follow the main configuration of the scheme: expansion to 23 bits, a 16K x
// 24-bit index table, m = 512K buckets and 3 prefixes per bucket. The handshakes, the
// in-flight limit and the result merge are this implementation's choices.
module dm_lookup_top #(
  parameter int unsigned PFX_LEN      = 23,
  parameter int unsigned IDX_ENTRIES  = 16384,
  parameter int unsigned IDX_W        = 24,
  parameter int unsigned BUCKET_AW    = 19,
  parameter int unsigned OMEGA        = 3,
  parameter int unsigned MAX_INFLIGHT = 8,
  localparam int unsigned IDX_AW      = $clog2(IDX_ENTRIES),
  localparam int unsigned WPB         = dm_pkg::words_per_bucket(OMEGA, PFX_LEN),
  localparam int unsigned SRAM_AW     = BUCKET_AW + ((WPB > 1) ? $clog2(WPB) : 0)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // destination addresses to look up
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic [dm_pkg::ADDR_W-1:0] in_dst,
  // index-table load port
  input  logic                      cfg_we,
  input  logic [IDX_AW-1:0]         cfg_addr,
  input  logic [IDX_W-1:0]          cfg_data,
  // off-chip bucket SRAM, read side
  output logic                      sram_rd_en,
  output logic [SRAM_AW-1:0]        sram_rd_addr,
  input  logic                      sram_rd_valid,
  input  logic [dm_pkg::SRAM_W-1:0] sram_rd_data,
  // external TCAM
  output logic                      tcam_req,
  output logic [dm_pkg::ADDR_W-1:0] tcam_key,
  input  logic                      tcam_rsp_valid,
  input  logic                      tcam_rsp_hit,
  input  logic [dm_pkg::LEN_W-1:0]  tcam_rsp_len,
  input  logic [dm_pkg::PORT_W-1:0] tcam_rsp_port,
  // results, in arrival order
  output logic                      out_valid,
  output logic [dm_pkg::ADDR_W-1:0] out_dst,
  output logic                      out_hit,
  output logic [dm_pkg::PORT_W-1:0] out_port,
  output dm_pkg::src_e              out_src
);
  import dm_pkg::*;

  localparam int unsigned K     = 2;
  localparam int unsigned BKT_W = WPB * SRAM_W;
  localparam int unsigned CNT_W = $clog2(MAX_INFLIGHT + 1);

  // ---------------------------------------------------------------- stage 0: hash
  logic              accept;
  logic [IDX_AW-1:0] h [K];
  logic [IDX_W-1:0]  ent [K];
  logic [CNT_W-1:0]  inflight;
  logic              s1_valid, s1_ready;
  logic [ADDR_W-1:0] s1_dst;
  logic              out_pop;

  assign in_ready = s1_ready && (inflight < CNT_W'(MAX_INFLIGHT));
  assign accept   = in_valid && in_ready;
  assign tcam_req = accept;
  assign tcam_key = in_dst;

  dm_hash_fn #(.PFX_LEN(PFX_LEN), .IDX_AW(IDX_AW)) u_hash (
    .dst(in_dst), .h1(h[0]), .h2(h[1])
  );

  dm_index_table #(.ENTRIES(IDX_ENTRIES), .W(IDX_W), .K(K)) u_index (
    .clk,
    .rd_en  (accept),
    .rd_addr(h),
    .rd_data(ent),
    .wr_en  (cfg_we),
    .wr_addr(cfg_addr),
    .wr_data(cfg_data)
  );

  // ---------------------------------------------------------- stage 1: bucket ID
  logic [BUCKET_AW-1:0] s1_bucket;
  logic                 f_ready;

  dm_bucket_id #(.K(K), .IDX_W(IDX_W), .BUCKET_AW(BUCKET_AW)) u_bid (
    .entry(ent), .bucket(s1_bucket)
  );

  assign s1_ready = !s1_valid || f_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
    end else if (s1_ready) begin
      s1_valid <= accept;
    end
  end

  always_ff @(posedge clk) begin
    if (accept) s1_dst <= in_dst;
  end

  // --------------------------------------------------------- fetch and search
  logic              f_rsp_valid;
  logic [BKT_W-1:0]  f_rsp_bucket;
  logic [ADDR_W-1:0] f_rsp_dst;
  logic              s_hit;
  logic [LEN_W-1:0]  s_len;
  logic [PORT_W-1:0] s_port;

  dm_bucket_fetch #(
    .BUCKET_AW(BUCKET_AW), .OMEGA(OMEGA), .PFX_LEN(PFX_LEN), .META_W(ADDR_W), .INFLIGHT(MAX_INFLIGHT)
  ) u_fetch (
    .clk, .rst_n,
    .req_valid    (s1_valid),
    .req_ready    (f_ready),
    .req_bucket   (s1_bucket),
    .req_meta     (s1_dst),
    .sram_rd_en,
    .sram_rd_addr,
    .sram_rd_valid,
    .sram_rd_data,
    .rsp_valid    (f_rsp_valid),
    .rsp_bucket   (f_rsp_bucket),
    .rsp_meta     (f_rsp_dst)
  );

  dm_bucket_search #(.PFX_LEN(PFX_LEN), .OMEGA(OMEGA)) u_search (
    .bucket(f_rsp_bucket), .dst(f_rsp_dst), .hit(s_hit), .len(s_len), .port(s_port)
  );

  // ------------------------------------------ result queues and merge with TCAM
  typedef struct packed {
    logic [ADDR_W-1:0] dst;
    logic              hit;
    logic [LEN_W-1:0]  len;
    logic [PORT_W-1:0] port;
  } hres_t;

  typedef struct packed {
    logic              hit;
    logic [LEN_W-1:0]  len;
    logic [PORT_W-1:0] port;
  } tres_t;

  hres_t hq_din, hq_dout;
  tres_t tq_din, tq_dout;
  logic  hq_empty, hq_full, tq_empty, tq_full;
  logic [$clog2(MAX_INFLIGHT):0] hq_count, tq_count;

  assign hq_din = '{dst: f_rsp_dst, hit: s_hit, len: s_len, port: s_port};
  assign tq_din = '{hit: tcam_rsp_hit, len: tcam_rsp_len, port: tcam_rsp_port};

  dm_fifo #(.W($bits(hres_t)), .DEPTH(MAX_INFLIGHT)) u_hq (
    .clk, .rst_n, .push(f_rsp_valid), .din(hq_din), .pop(out_pop),
    .dout(hq_dout), .empty(hq_empty), .full(hq_full), .count(hq_count)
  );

  dm_fifo #(.W($bits(tres_t)), .DEPTH(MAX_INFLIGHT)) u_tq (
    .clk, .rst_n, .push(tcam_rsp_valid), .din(tq_din), .pop(out_pop),
    .dout(tq_dout), .empty(tq_empty), .full(tq_full), .count(tq_count)
  );

  assign out_pop = !hq_empty && !tq_empty;

  logic              m_hit;
  logic [PORT_W-1:0] m_port;
  src_e              m_src;

  dm_result_select u_sel (
    .tcam_hit (tq_dout.hit),
    .tcam_len (tq_dout.len),
    .tcam_port(tq_dout.port),
    .hash_hit (hq_dout.hit),
    .hash_len (hq_dout.len),
    .hash_port(hq_dout.port),
    .hit      (m_hit),
    .port     (m_port),
    .src      (m_src)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      inflight  <= '0;
    end else begin
      out_valid <= out_pop;
      inflight  <= inflight + CNT_W'(accept) - CNT_W'(out_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (out_pop) begin
      out_dst  <= hq_dout.dst;
      out_hit  <= m_hit;
      out_port <= m_port;
      out_src  <= m_src;
    end
  end

  a_tcam_in_order: assert property (@(posedge clk) disable iff (!rst_n)
    tcam_rsp_valid |-> (tq_count < ($clog2(MAX_INFLIGHT)+1)'(inflight)));

endmodule
