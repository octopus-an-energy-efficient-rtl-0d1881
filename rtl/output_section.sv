// output_section: the receiving side of one Octopus fabric port.
//
// Following the architecture it has a control register, a status register
// and a synchroniser:
//   * control register - the MIC's arbiter writes an acknowledge naming the
//     requester it accepts (connection set-up) or "done" once the cell has
//     arrived (release). A command is held for one cycle, during which the
//     interconnection network acts on it, and then clears itself.
//   * status register  - stores every pending request for this output (one
//     bit per input port), together with the current connection (valid and
//     source) and whether this port is busy in any connection; the busy bit
//     is the part shared with the input section.
//   * synchroniser     - one register stage on data and valid, so that the
//     receiving MIC samples the stream on its own clock edge.
// Timing: a control write at cycle t reaches the network in cycle t+1; the
// connection state it causes is visible in status from cycle t+2. Request
// bits appear one cycle after the network presents them. Data leaves the
// synchroniser one cycle after it entered the network. The one-stage
// synchroniser and the self-clearing commands are this design's choice.
module output_section
  import octopus_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // MIC side
  input  logic               ctrl_we,
  input  out_ctrl_t          ctrl_wdata,
  output out_status_t        status,
  output logic [7:0]         rx_data,
  output logic               rx_valid,
  // interconnection network side
  input  logic [N_PORTS-1:0] req_in,
  input  logic               conn_valid,
  input  logic [2:0]         conn_src,
  input  logic               busy,
  input  logic [7:0]         net_data,
  input  logic               net_valid,
  output logic               ack_cmd,
  output logic [2:0]         ack_src,
  output logic               done_cmd
);

  out_ctrl_t          ctrl_q;
  logic [N_PORTS-1:0] req_q;
  logic [7:0]         sync_data_q;
  logic               sync_valid_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_q       <= '0;
      req_q        <= '0;
      sync_data_q  <= '0;
      sync_valid_q <= 1'b0;
    end else begin
      ctrl_q       <= ctrl_we ? ctrl_wdata : '0;
      req_q        <= req_in;
      sync_data_q  <= net_data;
      sync_valid_q <= net_valid;
    end
  end

  assign ack_cmd  = ctrl_q.ack;
  assign ack_src  = ctrl_q.ack_src;
  assign done_cmd = ctrl_q.done;

  assign status.req_vec    = req_q;
  assign status.conn_valid = conn_valid;
  assign status.conn_src   = conn_src;
  assign status.busy       = busy;

  assign rx_data  = sync_data_q;
  assign rx_valid = sync_valid_q;

endmodule
