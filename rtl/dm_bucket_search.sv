// dm_bucket_search: searches one fetched bucket for the destination address.
//
// A bucket holds OMEGA slots of 40 bits, slot j at bits [40*j +: 40] as
// {prefix[23:0], port[15:0]}, followed by one flag field {valid, len_off} per slot at
// bit 40*OMEGA + j*FW (layout in dm_pkg). After prefix expansion every prefix kept in
// the hash table is PFX_LEN to 24 bits long, left-aligned in the 24-bit field; its
// length is 24 - len_off. A slot matches when it is valid, its length is in that range
// and its prefix equals the same number of leading address bits. All slots are
// compared in parallel; the longest match wins, and among equal lengths the lowest
// slot (the setup never stores a prefix twice). Purely combinational. The 24+16-bit
// slot follows the design; the flag field and the tie rule are this implementation's.
module dm_bucket_search #(
  parameter int unsigned PFX_LEN = 23,
  parameter int unsigned OMEGA   = 3,
  localparam int unsigned LOW    = dm_pkg::len_off_w(PFX_LEN),
  localparam int unsigned FW     = dm_pkg::flag_w(PFX_LEN),
  localparam int unsigned BKT_W  = dm_pkg::words_per_bucket(OMEGA, PFX_LEN) * dm_pkg::SRAM_W
) (
  input  logic [BKT_W-1:0]          bucket,
  input  logic [dm_pkg::ADDR_W-1:0] dst,
  output logic                      hit,
  output logic [dm_pkg::LEN_W-1:0]  len,    // length of the matching prefix
  output logic [dm_pkg::PORT_W-1:0] port
);
  import dm_pkg::*;

  slot_t                 slot [OMEGA];
  logic [OMEGA-1:0]      match;
  logic [LOW-1:0]        off [OMEGA];
  logic [SLOT_PFX_W-1:0] key24, mask;
  logic [LOW-1:0]        best_off;

  always_comb begin
    key24 = dst[ADDR_W-1 -: SLOT_PFX_W];
    for (int unsigned j = 0; j < OMEGA; j++) begin
      slot[j]  = slot_t'(bucket[j*SLOT_W +: SLOT_W]);
      off[j]   = bucket[OMEGA*SLOT_W + j*FW +: LOW];
      mask     = {SLOT_PFX_W{1'b1}} << off[j];
      match[j] = bucket[OMEGA*SLOT_W + j*FW + LOW]
                 && (32'(off[j]) <= SLOT_PFX_W - PFX_LEN)
                 && (((slot[j].pfx ^ key24) & mask) == '0);
    end

    hit      = 1'b0;
    best_off = '0;
    port     = '0;
    for (int j = OMEGA - 1; j >= 0; j--) begin
      if (match[j] && (!hit || off[j] <= best_off)) begin
        hit      = 1'b1;
        best_off = off[j];
        port     = slot[j].port;
      end
    end
    len = hit ? LEN_W'(SLOT_PFX_W) - LEN_W'(best_off) : '0;
  end

endmodule
