// tb_dm_setup_workload: the DM-hash scheme end to end at reduced size. The control
// plane runs the setup algorithm (progressive order, min-max value assignment) to
// place 1536 routes into m = 1024 buckets through a 512-entry index table, checks that
// no bucket needs more than 3 slots and that the largest bucket is no larger than
// with a single hash function, then loads the engine and checks lookups through it
// against a longest-prefix match, including a TCAM part and back-to-back traffic.
// See dm_lookup_tb_body.svh for the details.
module tb_dm_setup_workload;
  localparam int unsigned P_PFX_LEN     = 23;
  localparam int unsigned P_IDX_ENTRIES = 512;
  localparam int unsigned P_BUCKET_AW   = 10;
  localparam int unsigned P_OMEGA       = 3;
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
