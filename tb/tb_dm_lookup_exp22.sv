// tb_dm_lookup_exp22: end-to-end test of the lookup engine configured for prefix
// expansion to 22 bits with 5 slots per bucket (3 SRAM words), at reduced table size.
// Buckets then hold /22, /23 and /24 prefixes, and back-to-back lookups are accepted
// every 3 cycles. See dm_lookup_tb_body.svh for what it does.
module tb_dm_lookup_exp22;
  localparam int unsigned P_PFX_LEN     = 22;
  localparam int unsigned P_IDX_ENTRIES = 256;
  localparam int unsigned P_BUCKET_AW   = 8;
  localparam int unsigned P_OMEGA       = 5;
  localparam int          N_ROUTES      = 600;
  localparam int          N_LOOKUPS     = 1500;
  localparam int          N_BURST       = 300;
  localparam int          SRAM_LAT      = 4;
  localparam int          TCAM_LAT      = 3;
  localparam int          MAX_CYCLES    = 200000;
  localparam bit          USE_SETUP     = 1'b0;
  localparam int          SEED          = 0;

  `include "dm_lookup_tb_body.svh"

  dm_lookup_top #(
    .PFX_LEN(P_PFX_LEN), .IDX_ENTRIES(P_IDX_ENTRIES), .IDX_W(24),
    .BUCKET_AW(P_BUCKET_AW), .OMEGA(P_OMEGA), .MAX_INFLIGHT(8)
  ) dut (.*);

  initial begin
    wait (test_done);
    $finish;
  end
endmodule
