// tb_dm_setup_small_index: the setup workload of tb_dm_setup_workload with an index
// table 8 times smaller (64 entries instead of 512), same routes (fixed seed) and the
// same 1024 buckets. With fewer entries each entry's group is larger, so one value
// choice has to place more routes at once and buckets come out less even: with this seed the largest bucket holds 5
// routes instead of 3 (128 and 256 entries give 3), still below the 7 of a single
// hash function. The engine is therefore built with OMEGA = 5, i.e. 3 SRAM words per
// bucket and one lookup every 3 cycles, and every route must fit. Lookups through the
// engine are checked against a longest-prefix match as in the other end-to-end tests.
// See dm_lookup_tb_body.svh for the details.
module tb_dm_setup_small_index;
  localparam int unsigned P_PFX_LEN     = 23;
  localparam int unsigned P_IDX_ENTRIES = 64;
  localparam int unsigned P_BUCKET_AW   = 10;
  localparam int unsigned P_OMEGA       = 5;
  localparam int          N_ROUTES      = 1536;
  localparam int          N_LOOKUPS     = 3000;
  localparam int          N_BURST       = 1000;
  localparam int          SRAM_LAT      = 4;
  localparam int          TCAM_LAT      = 3;
  localparam int          MAX_CYCLES    = 400000;
  localparam bit          USE_SETUP     = 1'b1;
  localparam int          SEED          = 1;

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
