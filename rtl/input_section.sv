// input_section: the sending side of one Octopus fabric port.
//
// It holds the three registers the architecture gives an input section:
//   * address register - the output section (port) this input wants to reach;
//   * control register - a connection request bit and a sleep bit for energy
//     management; the request bit decides when a request is made;
//   * status register  - ack (connection established) and done (receiver
//     acknowledged the cell and the connection was released).
// Cell data is not stored: tx_data/tx_valid pass through to the
// interconnection network combinationally.
//
// The MIC writes the address and control registers with one-cycle write
// strobes; writes take effect at the next clock edge. ack_set/done_set are
// one-cycle pulses from the interconnection network. The request leaving
// the section is held back while the status shows ack or done, so a served
// request is not seen twice; writing the control register with req=0 clears
// done. Register layout and this clearing rule are this design's choice.
module input_section
  import octopus_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // MIC side
  input  logic        addr_we,
  input  logic [2:0]  addr_wdata,
  input  logic        ctrl_we,
  input  in_ctrl_t    ctrl_wdata,
  output in_status_t  status,
  input  logic [7:0]  tx_data,
  input  logic        tx_valid,
  // interconnection network side
  output logic        req,
  output logic [2:0]  req_addr,
  output logic [7:0]  net_data,
  output logic        net_valid,
  input  logic        ack_set,
  input  logic        done_set,
  // control unit
  output logic        sleep
);

  logic [2:0] addr_q;
  in_ctrl_t   ctrl_q;
  in_status_t status_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q   <= '0;
      ctrl_q   <= '0;
      status_q <= '0;
    end else begin
      if (addr_we) addr_q <= addr_wdata;
      if (ctrl_we) ctrl_q <= ctrl_wdata;
      // status: ack set when connected, replaced by done on release,
      // both cleared when the MIC withdraws its request.
      if (ctrl_we && !ctrl_wdata.req) begin
        status_q <= '0;
      end else if (done_set) begin
        status_q.ack  <= 1'b0;
        status_q.done <= 1'b1;
      end else if (ack_set) begin
        status_q.ack  <= 1'b1;
      end
    end
  end

  assign status    = status_q;
  assign req       = ctrl_q.req && !status_q.ack && !status_q.done;
  assign req_addr  = addr_q;
  assign net_data  = tx_data;
  assign net_valid = tx_valid;
  assign sleep     = ctrl_q.sleep;

endmodule
