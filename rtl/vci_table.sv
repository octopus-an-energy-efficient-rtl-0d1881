// vci_table: the MIC's VCI mapping table.
//
// Indexed by the low IDX_BITS bits of a cell's 16-bit VCI, each entry holds a
// valid bit and the destination MIC (port) address. A lookup is
// combinational. A VCI that is not known - its entry is invalid, or its upper
// bits are not zero so it lies outside the table - maps to DEFAULT_PORT, the
// CPU module that holds the connection manager; hit tells which case
// applied. Entries are written one at a time through the write port, which
// the MIC drives from management cells; reset invalidates all entries.
// The table size is this design's choice; the default destination for
// unknown VCIs follows the architecture.
module vci_table
  import octopus_pkg::*;
#(
  parameter int unsigned IDX_BITS = 6
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  // write port
  input  logic                we,
  input  logic [15:0]         wvci,
  input  logic                wvalid,
  input  logic [2:0]          wdest,
  // lookup
  input  logic [15:0]         vci,
  output logic [2:0]          dest,
  output logic                hit
);

  localparam int unsigned ENTRIES = 1 << IDX_BITS;

  logic [ENTRIES-1:0] valid_q;
  logic [2:0]         dest_q [ENTRIES];
  logic               in_range;

  assign in_range = (vci >> IDX_BITS) == '0;
  assign hit      = in_range && valid_q[vci[IDX_BITS-1:0]];
  assign dest     = hit ? dest_q[vci[IDX_BITS-1:0]] : 3'(DEFAULT_PORT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
    end else if (en && we && (wvci >> IDX_BITS) == '0) begin
      valid_q[wvci[IDX_BITS-1:0]] <= wvalid;
    end
  end

  always_ff @(posedge clk) begin
    if (en && we && (wvci >> IDX_BITS) == '0) dest_q[wvci[IDX_BITS-1:0]] <= wdest;
  end

endmodule
