// dm_bucket_fetch: reads one hash bucket per lookup from the off-chip QDR SRAM.
//
// A bucket occupies WPB consecutive 72-bit SRAM words starting at word address
// bucket*WPB (WPB = dm_pkg::words_per_bucket, 2 words for OMEGA = 3). For each
// accepted request (req_valid & req_ready) the unit issues WPB read commands on consecutive cycles, so
// with requests waiting it keeps the SRAM busy every cycle and finishes one lookup
// every WPB cycles: the fetch of one packet's bucket overlaps the hashing of the next
// and the search of the previous one. req_ready is high while the unit is idle or is
// issuing the last word of the current bucket, and while the queue of in-flight
// requests has room. Read data must come back in order on sram_rd_valid/sram_rd_data
// (any fixed or variable latency); the unit gathers WPB words (word 0 in the low bits)
// and presents the whole bucket for one cycle on rsp_valid together with the request's
// side information (meta). The SRAM layout and the handshakes are this
// implementation's choices; one bucket per lookup is the DM-hash scheme's.
module dm_bucket_fetch #(
  parameter int unsigned BUCKET_AW = 19,
  parameter int unsigned OMEGA     = 3,
  parameter int unsigned PFX_LEN   = 23,
  parameter int unsigned META_W    = 32,
  parameter int unsigned INFLIGHT  = 8,
  localparam int unsigned WPB      = dm_pkg::words_per_bucket(OMEGA, PFX_LEN),
  localparam int unsigned CW       = (WPB > 1) ? $clog2(WPB) : 1,
  localparam int unsigned SRAM_AW  = BUCKET_AW + ((WPB > 1) ? $clog2(WPB) : 0),
  localparam int unsigned BKT_W    = WPB * dm_pkg::SRAM_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // request: one bucket to fetch
  input  logic                       req_valid,
  output logic                       req_ready,
  input  logic [BUCKET_AW-1:0]       req_bucket,
  input  logic [META_W-1:0]          req_meta,
  // SRAM read port
  output logic                       sram_rd_en,
  output logic [SRAM_AW-1:0]         sram_rd_addr,
  input  logic                       sram_rd_valid,
  input  logic [dm_pkg::SRAM_W-1:0]  sram_rd_data,
  // gathered bucket
  output logic                       rsp_valid,
  output logic [BKT_W-1:0]           rsp_bucket,
  output logic [META_W-1:0]          rsp_meta
);
  import dm_pkg::*;

  // issue side
  logic               busy;
  logic [CW-1:0]      iss_cnt;
  logic [SRAM_AW-1:0] base;
  logic               last_issue;
  logic               accept;

  // return side
  logic [CW-1:0]      ret_cnt;
  logic [BKT_W-1:0]   gather;
  logic               ret_last;

  logic               q_empty, q_full;
  logic [META_W-1:0]  q_dout;
  logic [$clog2(INFLIGHT):0] q_count;

  assign last_issue = busy && (iss_cnt == CW'(WPB - 1));
  assign req_ready  = (!busy || last_issue) && !q_full;
  assign accept     = req_valid && req_ready;

  assign sram_rd_en   = busy;
  assign sram_rd_addr = base + SRAM_AW'(iss_cnt);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      iss_cnt <= '0;
      base    <= '0;
    end else if (accept) begin
      busy    <= 1'b1;
      iss_cnt <= '0;
      base    <= SRAM_AW'(req_bucket) * SRAM_AW'(WPB);
    end else if (last_issue) begin
      busy    <= 1'b0;
      iss_cnt <= '0;
    end else if (busy) begin
      iss_cnt <= iss_cnt + 1'b1;
    end
  end

  dm_fifo #(.W(META_W), .DEPTH(INFLIGHT)) u_meta_q (
    .clk, .rst_n,
    .push (accept),
    .din  (req_meta),
    .pop  (sram_rd_valid && ret_last),
    .dout (q_dout),
    .empty(q_empty),
    .full (q_full),
    .count(q_count)
  );

  assign ret_last = (ret_cnt == CW'(WPB - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ret_cnt   <= '0;
      rsp_valid <= 1'b0;
    end else begin
      rsp_valid <= sram_rd_valid && ret_last;
      if (sram_rd_valid) ret_cnt <= ret_last ? '0 : ret_cnt + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (sram_rd_valid) begin
      gather[ret_cnt*SRAM_W +: SRAM_W] <= sram_rd_data;
      if (ret_last) begin
        rsp_bucket <= gather;
        rsp_bucket[ret_cnt*SRAM_W +: SRAM_W] <= sram_rd_data;
        rsp_meta   <= q_dout;
      end
    end
  end

  a_rd_in_order: assert property (@(posedge clk) disable iff (!rst_n) sram_rd_valid |-> !q_empty);

endmodule
