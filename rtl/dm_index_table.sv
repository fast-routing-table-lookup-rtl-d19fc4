// dm_index_table: the on-die index table of the DM-hash scheme.
//
// ENTRIES words of W bits (16K x 24 bits = 48 KB by default). Every cycle in which
// rd_en is high, both read ports (one per hash function, k = 2) are read and the
// words appear on rd_data one cycle later; with rd_en low rd_data holds its value,
// which lets the lookup pipeline stall. One write port (wr_en, wr_addr, wr_data) lets
// the control plane load the values chosen by the setup algorithm; a read of an
// address written in the same cycle returns the old word. The table is a plain array
// the synthesis tool maps to on-chip RAM. Size and entry width follow the design's
// index-table sizing; the one-cycle synchronous read is this implementation's choice.
module dm_index_table #(
  parameter int unsigned ENTRIES = 16384,
  parameter int unsigned W       = 24,
  parameter int unsigned K       = 2,
  localparam int unsigned AW     = $clog2(ENTRIES)
) (
  input  logic                clk,
  input  logic                rd_en,
  input  logic [AW-1:0]       rd_addr [K],
  output logic [W-1:0]        rd_data [K],
  input  logic                wr_en,
  input  logic [AW-1:0]       wr_addr,
  input  logic [W-1:0]        wr_data
);

  logic [W-1:0] mem [ENTRIES];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  for (genvar g = 0; g < K; g++) begin : g_rd
    always_ff @(posedge clk) begin
      if (rd_en) rd_data[g] <= mem[rd_addr[g]];
    end
  end

endmodule
