// cell_queue: a small FIFO of whole ATM cells, used as the MIC's
// transmission queue and as its reception queue.
//
// Storage is CELLS slots of CELL_BYTES (53) bytes. Bytes are written one per
// cycle into the current write slot; the slot becomes readable only when its
// last byte is written, and then only if wr_drop is low on that last byte
// (the reception queue uses this to swallow management cells). Bytes are
// read one per cycle from the oldest complete cell; the slot is freed with
// its last byte. wr_ready is high while a slot is free for writing;
// rd_valid while a complete cell is stored. head_vci gives the VCI of the
// oldest cell without reading it, for the VCI mapping table.
// With cut_through high the reader does not wait for a whole cell: once the
// first 4 bytes (which carry the VCI) of the cell being written are in, and
// unless wr_hold marks that cell as one to be dropped, its bytes become
// readable as soon as they are written. The slot stays reserved, so a reader
// that falls behind loses nothing. The MIC uses this as the
// buffer bypass for modules that keep up with the switch.
// The architecture only calls the queues small and allows buffering to be
// omitted for fast modules; two cells, the slot organisation, the drop input
// and cut-through as the form of the bypass are this design's choice.
module cell_queue
  import octopus_pkg::*;
#(
  parameter int unsigned CELLS = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,          // clock enable of the owning MIC
  // write side
  input  logic [7:0]  wr_data,
  input  logic        wr_valid,
  output logic        wr_ready,
  input  logic        wr_drop,     // on the last byte: discard this cell
  input  logic        wr_hold,     // cell being written must not be read early
  input  logic        cut_through, // read the cell being written (bypass)
  // read side
  output logic [7:0]  rd_data,
  output logic        rd_valid,
  input  logic        rd_ready,
  output logic [15:0] head_vci,
  // state
  output logic        empty,       // no stored and no partly written cell
  output logic        space        // a whole free slot exists
);

  localparam int unsigned SLOT_W = (CELLS > 1) ? $clog2(CELLS) : 1;
  localparam int unsigned CNT_W  = $clog2(CELLS + 1);
  localparam int unsigned ADDR_W = $clog2(CELLS * CELL_BYTES);

  logic [7:0]        mem [CELLS*CELL_BYTES];
  logic [SLOT_W-1:0] wr_slot_q, rd_slot_q;
  logic [5:0]        wr_idx_q,  rd_idx_q;
  logic [CNT_W-1:0]  count_q;

  logic wr_fire, rd_fire, wr_last, rd_last, commit, early;

  function automatic logic [ADDR_W-1:0] addr(input logic [SLOT_W-1:0] slot,
                                             input logic [5:0] idx);
    return ADDR_W'(slot) * ADDR_W'(CELL_BYTES) + ADDR_W'(idx);
  endfunction

  function automatic logic [SLOT_W-1:0] next_slot(input logic [SLOT_W-1:0] slot);
    return (int'(slot) == CELLS - 1) ? '0 : slot + 1'b1;
  endfunction

  assign wr_ready = (int'(count_q) < CELLS);
  // early: with no complete cell stored, the read and write slots coincide
  assign early    = cut_through && !wr_hold && (count_q == '0) &&
                    (wr_idx_q >= 6'd4) && (rd_idx_q < wr_idx_q);
  assign rd_valid = (count_q != '0) || early;
  assign wr_fire  = en && wr_valid && wr_ready;
  assign rd_fire  = en && rd_ready && rd_valid;
  assign wr_last  = (int'(wr_idx_q) == CELL_BYTES - 1);
  assign rd_last  = (int'(rd_idx_q) == CELL_BYTES - 1);
  assign commit   = wr_fire && wr_last && !wr_drop;
  assign empty    = (count_q == '0) && (wr_idx_q == '0);
  assign space    = wr_ready && (wr_idx_q == '0);

  assign rd_data  = mem[addr(rd_slot_q, rd_idx_q)];
  assign head_vci = hdr_vci(mem[addr(rd_slot_q, 6'd1)], mem[addr(rd_slot_q, 6'd2)],
                            mem[addr(rd_slot_q, 6'd3)]);

  always_ff @(posedge clk) begin
    if (wr_fire) mem[addr(wr_slot_q, wr_idx_q)] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_slot_q <= '0;
      rd_slot_q <= '0;
      wr_idx_q  <= '0;
      rd_idx_q  <= '0;
      count_q   <= '0;
    end else begin
      if (wr_fire) begin
        if (wr_last) begin
          wr_idx_q <= '0;
          if (!wr_drop) wr_slot_q <= next_slot(wr_slot_q);
        end else begin
          wr_idx_q <= wr_idx_q + 1'b1;
        end
      end
      if (rd_fire) begin
        if (rd_last) begin
          rd_idx_q  <= '0;
          rd_slot_q <= next_slot(rd_slot_q);
        end else begin
          rd_idx_q <= rd_idx_q + 1'b1;
        end
      end
      count_q <= count_q + CNT_W'(commit) - CNT_W'(rd_fire && rd_last);
    end
  end

endmodule
