// ss_table: on-chip shift-signature table of the filtering engine.
//
// A single-port-read, single-port-write RAM of 2**AW entries of DW bits
// (default 16384 x 16 bit = 32 KB, the on-chip budget of the source design).
// Each entry is an rfts_pkg::sst_entry_t: an S-flag and a carry that is
// either a shift value (S-flag set) or a Bloom signature (S-flag clear).
// The table is written at run time through the configuration port, which is
// what makes the fault database reconfigurable without changing the logic.
//
// Timing: rd_data is registered, valid the cycle after rd_en. A write and a
// read of the same address in one cycle return the old contents.
module ss_table #(
  parameter int unsigned AW = rfts_pkg::SST_AW,
  parameter int unsigned DW = rfts_pkg::SST_DW
) (
  input  logic          clk,
  // configuration write port
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  // lookup port
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [DW-1:0] rd_data
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
