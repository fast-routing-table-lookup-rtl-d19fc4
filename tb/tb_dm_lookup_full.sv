// tb_dm_lookup_full: end-to-end test of the lookup engine at its default size (16K x
// 24-bit index table, 512K buckets of 3 slots, expansion to 23 bits). The whole index
// table is loaded, a few thousand routes are placed, and lookups are checked against a
// longest-prefix match. See dm_lookup_tb_body.svh for what it does.
module tb_dm_lookup_full;
  localparam int unsigned P_PFX_LEN     = 23;
  localparam int unsigned P_IDX_ENTRIES = 16384;
  localparam int unsigned P_BUCKET_AW   = 19;
  localparam int unsigned P_OMEGA       = 3;
  localparam int          N_ROUTES      = 4000;
  localparam int          N_LOOKUPS     = 3000;
  localparam int          N_BURST       = 1000;
  localparam int          SRAM_LAT      = 4;
  localparam int          TCAM_LAT      = 3;
  localparam int          MAX_CYCLES    = 400000;
  localparam bit          USE_SETUP     = 1'b0;
  localparam int          SEED          = 0;

  `include "dm_lookup_tb_body.svh"

  dm_lookup_top dut (.*);

  initial begin
    wait (test_done);
    $finish;
  end
endmodule
