// mic_arbiter: decides which connection request a destination MIC honours.
//
// Guaranteed connections are scheduled statically: a slot table of SLOTS
// entries names, per slot, the source that owns it. The current slot's
// owner is granted first if it requests. If the slot has no owner or the
// owner has announced no transfer, the slot's bandwidth goes to the ad-hoc
// traffic, which is scheduled dynamically by round robin starting after the
// last source served. The slot pointer moves on with every connection that
// is actually set up (advance), so one slot is one cell; the round robin
// restarts after the source of that connection. The choice is
// combinational from req_vec; slot writes come from management cells.
// Static slots for guaranteed and dynamic scheduling for ad-hoc traffic
// follow the architecture; slot count, slot length and round robin are this
// design's choice.
module mic_arbiter
  import octopus_pkg::*;
#(
  parameter int unsigned SLOTS = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic [N_PORTS-1:0] req_vec,
  output logic               grant_valid,
  output logic [2:0]         grant_src,
  output logic               grant_guaranteed,
  input  logic               advance,      // a granted connection was set up ...
  input  logic [2:0]         advance_src,  // ... with this source
  // slot table write port
  input  logic               slot_we,
  input  logic [7:0]         slot_idx,
  input  logic               slot_valid,
  input  logic [2:0]         slot_src
);

  localparam int unsigned PTR_W = (SLOTS > 1) ? $clog2(SLOTS) : 1;

  logic [SLOTS-1:0] slot_valid_q;
  logic [2:0]       slot_src_q [SLOTS];
  logic [PTR_W-1:0] slot_ptr_q;
  logic [2:0]       rr_ptr_q;

  always_comb begin
    logic [2:0] s;
    s                = '0;
    grant_valid      = 1'b0;
    grant_src        = '0;
    grant_guaranteed = 1'b0;
    if (slot_valid_q[slot_ptr_q] && req_vec[slot_src_q[slot_ptr_q]]) begin
      grant_valid      = 1'b1;
      grant_src        = slot_src_q[slot_ptr_q];
      grant_guaranteed = 1'b1;
    end else begin
      for (int k = N_PORTS - 1; k >= 0; k--) begin
        s = rr_ptr_q + 3'(k);
        if (req_vec[s]) begin
          grant_valid = 1'b1;
          grant_src   = s;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_valid_q <= '0;
      slot_ptr_q   <= '0;
      rr_ptr_q     <= '0;
    end else if (en) begin
      if (slot_we && int'(slot_idx) < SLOTS) slot_valid_q[slot_idx[PTR_W-1:0]] <= slot_valid;
      if (advance) begin
        slot_ptr_q <= (int'(slot_ptr_q) == SLOTS - 1) ? '0 : slot_ptr_q + 1'b1;
        rr_ptr_q   <= advance_src + 3'd1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (en && slot_we && int'(slot_idx) < SLOTS) slot_src_q[slot_idx[PTR_W-1:0]] <= slot_src;
  end

endmodule
