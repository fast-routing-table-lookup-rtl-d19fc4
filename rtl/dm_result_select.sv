// dm_result_select: longest-prefix choice between the TCAM and the hash table.
//
// The prefixes of a routing table are split by length: lengths 8..18 and 25..32 sit in
// a TCAM, the lengths in between are expanded and stored in the hash buckets. Both are
// searched in parallel for every packet. Since every TCAM prefix is either shorter or
// longer than every hash-table prefix, the longest match is: a TCAM hit of length >= 25,
// else a hash-table hit, else a TCAM hit of length <= 18, else no route. The split of
// lengths is the design's; this merge rule follows from longest-prefix matching.
// Purely combinational; src tells which case applied (a hash hit is reported as
// SRC_HASH_24 for a /24 prefix and as SRC_HASH_SHORT for a shorter, expanded one).
module dm_result_select (
  input  logic                      tcam_hit,
  input  logic [dm_pkg::LEN_W-1:0]  tcam_len,
  input  logic [dm_pkg::PORT_W-1:0] tcam_port,
  input  logic                      hash_hit,
  input  logic [dm_pkg::LEN_W-1:0]  hash_len,
  input  logic [dm_pkg::PORT_W-1:0] hash_port,
  output logic                      hit,
  output logic [dm_pkg::PORT_W-1:0] port,
  output dm_pkg::src_e              src
);
  import dm_pkg::*;

  always_comb begin
    hit  = 1'b1;
    port = '0;
    src  = SRC_NONE;
    if (tcam_hit && tcam_len > LEN_W'(24)) begin
      port = tcam_port;
      src  = SRC_TCAM_LONG;
    end else if (hash_hit) begin
      port = hash_port;
      src  = (hash_len == LEN_W'(24)) ? SRC_HASH_24 : SRC_HASH_SHORT;
    end else if (tcam_hit) begin
      port = tcam_port;
      src  = SRC_TCAM_SHORT;
    end else begin
      hit  = 1'b0;
    end
  end

endmodule
