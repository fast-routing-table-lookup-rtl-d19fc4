// dm_pkg: constants, types and layout helpers shared by the deterministic
// multi-hashing (DM-hash) routing lookup engine.
//
// A routing entry in a bucket is a <prefix, output port> pair of 40 bits: a 24-bit
// prefix field and a 16-bit port, as in the throughput model of the design. After
// prefix expansion to PFX_LEN bits, every prefix kept in the hash table is PFX_LEN to
// 24 bits long. A bucket holds OMEGA slots and is read from a 72-bit wide QDR SRAM as
// consecutive words. The slots come first (slot j at bits [40*j +: 40]); after them
// each slot has a flag field {valid, len_off} at bit 40*OMEGA + j*flag_w(PFX_LEN),
// where the prefix length is 24 - len_off. The flags sit in the padding of the last
// word (for OMEGA = 3 the 120 data bits leave 24 spare bits of the two words); this
// flag field is this design's own choice, the 40-bit slot is unchanged.
package dm_pkg;

  localparam int unsigned ADDR_W     = 32;  // IPv4 destination address
  localparam int unsigned SLOT_PFX_W = 24;  // prefix field of a slot
  localparam int unsigned PORT_W     = 16;  // output-port field of a slot
  localparam int unsigned SLOT_W     = SLOT_PFX_W + PORT_W;  // 40 bits = 5 bytes
  localparam int unsigned SRAM_W     = 72;  // QDR-III data width
  localparam int unsigned LEN_W      = 6;   // prefix length 0..32

  // width of the length offset (24 - length) for lengths PFX_LEN..24
  function automatic int unsigned len_off_w(int unsigned pfx_len);
    return (pfx_len >= SLOT_PFX_W) ? 1 : $clog2(SLOT_PFX_W - pfx_len + 1);
  endfunction

  // width of a slot's flag field {valid, len_off}
  function automatic int unsigned flag_w(int unsigned pfx_len);
    return 1 + len_off_w(pfx_len);
  endfunction

  // SRAM words per bucket of omega slots: ceil(omega*(40 + flags)/72). For omega = 3
  // this equals ceil(40*omega/72) = 2; for some larger omega the flags cost a word.
  function automatic int unsigned words_per_bucket(int unsigned omega, int unsigned pfx_len);
    return (omega * (SLOT_W + flag_w(pfx_len)) + SRAM_W - 1) / SRAM_W;
  endfunction

  typedef struct packed {
    logic [SLOT_PFX_W-1:0] pfx;   // prefix left-aligned, bits below its length are 0
    logic [PORT_W-1:0]     port;
  } slot_t;

  // Which table supplied the final answer.
  typedef enum logic [2:0] {
    SRC_NONE       = 3'd0,  // no prefix matched
    SRC_TCAM_SHORT = 3'd1,  // TCAM prefix of length 8..18
    SRC_HASH_SHORT = 3'd2,  // hash-table prefix of length PFX_LEN..23 (expanded)
    SRC_HASH_24    = 3'd3,  // hash-table prefix of length 24
    SRC_TCAM_LONG  = 3'd4   // TCAM prefix of length 25..32
  } src_e;

endpackage
