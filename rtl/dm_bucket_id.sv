// dm_bucket_id: turns the k index-table entries of a prefix into its bucket ID.
//
// The bucket ID is the XOR of the k entries, cut to the BUCKET_AW = log2(m) low bits
// (the entries are IDX_W = 24 bits wide, enough for up to 2^24 buckets). This is the
// mapping of the DM-hash scheme; the optional extra hash of the XOR result that the
// scheme allows is not used. Purely combinational.
module dm_bucket_id #(
  parameter int unsigned K         = 2,
  parameter int unsigned IDX_W     = 24,
  parameter int unsigned BUCKET_AW = 19    // m = 512K buckets
) (
  input  logic [IDX_W-1:0]     entry [K],
  output logic [BUCKET_AW-1:0] bucket
);

  logic [IDX_W-1:0] acc;

  always_comb begin
    acc = '0;
    for (int unsigned j = 0; j < K; j++) acc ^= entry[j];
    bucket = acc[BUCKET_AW-1:0];
  end

endmodule
