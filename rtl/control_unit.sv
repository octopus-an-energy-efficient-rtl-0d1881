// control_unit: per-port clock and attention logic of the Octopus fabric,
// shared by the port's input and output section.
//
// The attention signal tells the attached MIC that it has work: a request
// is waiting in the output section's status register, the input section
// reports ack or done, or the functional module has data for the MIC
// (wake_req). The MIC clock is given as a clock enable, mic_clk_en: it is
// high while the MIC has not asked to sleep, and also whenever attention is
// raised, so attention wakes a sleeping MIC in the same cycle. A clock gate
// (latch plus AND) would turn the enable into a gated clock in silicon; the
// enable form keeps the whole switch in one clock domain. The unit is
// purely combinational. The choice of events that raise attention and the
// enable form of the clock are this design's own.
module control_unit
  import octopus_pkg::*;
(
  input  logic               sleep,       // control register bit of the input section
  input  logic [N_PORTS-1:0] req_vec,     // output-section status: pending requests
  input  logic               port_busy,   // port is in a connection
  input  in_status_t         in_status,   // input-section status
  input  logic               wake_req,    // functional module has data for the MIC
  output logic               attention,
  output logic               mic_clk_en
);

  always_comb begin
    attention = wake_req || in_status.ack || in_status.done ||
                ((|req_vec) && !port_busy);
    mic_clk_en = !sleep || attention;
  end

endmodule
