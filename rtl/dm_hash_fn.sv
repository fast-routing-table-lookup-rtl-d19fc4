// dm_hash_fn: the two hash functions of the DM-hash lookup (k = 2).
//
// The lookup uses only the first PFX_LEN bits of the destination address (all hashed
// prefixes were expanded to at least that length), p = dst[31 -: PFX_LEN]. The first
// hash is the IDX_AW low-order bits of p. The second is those low-order bits XOR the
// adjacent IDX_AW higher-order bits of p; when p is shorter than 2*IDX_AW bits the
// missing high bits are taken as zero. Both outputs address the index table.
// Purely combinational, no gates on h1: it is a plain selection of address bits by
// definition, so a synthesis tool sees its bits as wires only. The two functions follow the design's description; the
// zero-fill of a short high-order part is this implementation's reading.
module dm_hash_fn #(
  parameter int unsigned PFX_LEN = 23,   // expansion length i
  parameter int unsigned IDX_AW  = 14    // log2 of index-table entries (16K)
) (
  input  logic [dm_pkg::ADDR_W-1:0] dst,
  output logic [IDX_AW-1:0]         h1,
  output logic [IDX_AW-1:0]         h2
);
  import dm_pkg::*;

  logic [PFX_LEN-1:0] p;
  logic [IDX_AW-1:0]  lo, hi;

  always_comb begin
    p  = dst[ADDR_W-1 -: PFX_LEN];
    lo = '0;
    hi = '0;
    for (int unsigned b = 0; b < IDX_AW; b++) begin
      if (b < PFX_LEN)          lo[b] = p[b];
      if (b + IDX_AW < PFX_LEN) hi[b] = p[b + IDX_AW];
    end
    h1 = lo;
    h2 = lo ^ hi;
  end

endmodule
