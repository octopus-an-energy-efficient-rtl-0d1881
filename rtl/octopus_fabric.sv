// octopus_fabric: the Octopus switching fabric.
//
// Eight ports. Each port has an input section (address, control and status
// registers; data passes through), an output section (control and status
// registers and a data synchroniser) and a control unit (MIC clock enable
// and attention). The interconnection network, a fully connected 8x8
// crossbar, joins them and keeps the connection state. The fabric routes a
// cell purely on the address a MIC wrote into its input section; VCI mapping
// and scheduling are left to the MICs.
//
// Per port p the MIC side is a register interface (write strobes for the
// input section's address and control registers and the output section's
// control register, the two status words back) plus an 8-bit data path in
// each direction. Data entering at a connected input appears at the output
// one clock later. The division into sections, registers and control unit
// follows the architecture; the signal-level protocol is this design's.
module octopus_fabric
  import octopus_pkg::*;
(
  input  logic                             clk,
  input  logic                             rst_n,
  // input-section side of each port
  input  logic        [N_PORTS-1:0]        in_addr_we,
  input  logic        [N_PORTS-1:0][2:0]   in_addr,
  input  logic        [N_PORTS-1:0]        in_ctrl_we,
  input  in_ctrl_t    [N_PORTS-1:0]        in_ctrl,
  output in_status_t  [N_PORTS-1:0]        in_status,
  input  logic        [N_PORTS-1:0][7:0]   tx_data,
  input  logic        [N_PORTS-1:0]        tx_valid,
  // output-section side of each port
  input  logic        [N_PORTS-1:0]        out_ctrl_we,
  input  out_ctrl_t   [N_PORTS-1:0]        out_ctrl,
  output out_status_t [N_PORTS-1:0]        out_status,
  output logic        [N_PORTS-1:0][7:0]   rx_data,
  output logic        [N_PORTS-1:0]        rx_valid,
  // control units
  input  logic        [N_PORTS-1:0]        wake_req,
  output logic        [N_PORTS-1:0]        attention,
  output logic        [N_PORTS-1:0]        mic_clk_en
);

  logic [N_PORTS-1:0]              net_req, ack_set, done_set, busy, sleep;
  logic [N_PORTS-1:0][2:0]         net_addr;
  logic [N_PORTS-1:0][7:0]         net_in_data, net_out_data;
  logic [N_PORTS-1:0]              net_in_valid, net_out_valid;
  logic [N_PORTS-1:0][N_PORTS-1:0] out_req;
  logic [N_PORTS-1:0]              conn_valid;
  logic [N_PORTS-1:0][2:0]         conn_src;
  logic [N_PORTS-1:0]              ack_cmd, done_cmd;
  logic [N_PORTS-1:0][2:0]         ack_src;

  for (genvar p = 0; p < N_PORTS; p++) begin : g_port
    input_section u_in (
      .clk, .rst_n,
      .addr_we(in_addr_we[p]), .addr_wdata(in_addr[p]),
      .ctrl_we(in_ctrl_we[p]), .ctrl_wdata(in_ctrl[p]),
      .status(in_status[p]),
      .tx_data(tx_data[p]), .tx_valid(tx_valid[p]),
      .req(net_req[p]), .req_addr(net_addr[p]),
      .net_data(net_in_data[p]), .net_valid(net_in_valid[p]),
      .ack_set(ack_set[p]), .done_set(done_set[p]),
      .sleep(sleep[p])
    );

    output_section u_out (
      .clk, .rst_n,
      .ctrl_we(out_ctrl_we[p]), .ctrl_wdata(out_ctrl[p]),
      .status(out_status[p]),
      .rx_data(rx_data[p]), .rx_valid(rx_valid[p]),
      .req_in(out_req[p]), .conn_valid(conn_valid[p]), .conn_src(conn_src[p]),
      .busy(busy[p]),
      .net_data(net_out_data[p]), .net_valid(net_out_valid[p]),
      .ack_cmd(ack_cmd[p]), .ack_src(ack_src[p]), .done_cmd(done_cmd[p])
    );

    control_unit u_cu (
      .sleep(sleep[p]),
      .req_vec(out_status[p].req_vec),
      .port_busy(busy[p]),
      .in_status(in_status[p]),
      .wake_req(wake_req[p]),
      .attention(attention[p]),
      .mic_clk_en(mic_clk_en[p])
    );
  end

  xbar_network u_net (
    .clk, .rst_n,
    .in_req(net_req), .in_addr(net_addr), .in_data(net_in_data), .in_valid(net_in_valid),
    .ack_set, .done_set,
    .out_req, .out_conn_valid(conn_valid), .out_conn_src(conn_src),
    .out_data(net_out_data), .out_valid(net_out_valid),
    .ack_cmd, .ack_src, .done_cmd,
    .busy
  );

endmodule
