// octopus_switch: the Octopus switch, top level of the design.
//
// Eight functional modules (processor, network, display, camera, audio and
// others) connect to eight Module Interface Controllers, which connect to
// the Octopus switching fabric. Modules exchange 53-byte ATM cells. A cell
// written by module p is queued by MIC p, routed by its VCI through MIC p's
// mapping table to a destination port, carried over a connection set up
// between the two MICs through the fabric, queued in the destination MIC
// and read out by the destination module. Port DEFAULT_PORT (0) is the CPU
// module: cells with unknown VCIs go there, and it configures the other MICs
// with management cells.
//
// Module interface of port p: mod_in_* is a byte stream into the switch,
// mod_out_* a byte stream out of it, both valid/ready, a cell being 53
// consecutive bytes. mod_out_bypass[p] lets module p read each cell as it
// arrives instead of after it is stored whole; mod_in_bypass[p] lets MIC p
// start sending a cell before module p has written all of it. A byte moves on a clock edge when valid and ready are
// both high. Up to four connections (eight ports, half duplex) carry one
// byte per clock each. mic_awake shows which MICs are clocked (the others
// sleep to save energy).
module octopus_switch
  import octopus_pkg::*;
#(
  parameter int unsigned QUEUE_CELLS  = 2,
  parameter int unsigned VCI_IDX_BITS = 6,
  parameter int unsigned SLOTS        = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [N_PORTS-1:0][7:0]  mod_in_data,
  input  logic [N_PORTS-1:0]       mod_in_valid,
  input  logic [N_PORTS-1:0]       mod_in_bypass,
  output logic [N_PORTS-1:0]       mod_in_ready,
  output logic [N_PORTS-1:0][7:0]  mod_out_data,
  output logic [N_PORTS-1:0]       mod_out_valid,
  input  logic [N_PORTS-1:0]       mod_out_ready,
  input  logic [N_PORTS-1:0]       mod_out_bypass,
  output logic [N_PORTS-1:0]       mic_awake
);

  logic        [N_PORTS-1:0]      in_addr_we, in_ctrl_we, out_ctrl_we;
  logic        [N_PORTS-1:0][2:0] in_addr;
  in_ctrl_t    [N_PORTS-1:0]      in_ctrl;
  in_status_t  [N_PORTS-1:0]      in_status;
  out_ctrl_t   [N_PORTS-1:0]      out_ctrl;
  out_status_t [N_PORTS-1:0]      out_status;
  logic        [N_PORTS-1:0][7:0] tx_data, rx_data;
  logic        [N_PORTS-1:0]      tx_valid, rx_valid;
  logic        [N_PORTS-1:0]      attention, mic_clk_en;

  octopus_fabric u_fabric (
    .clk, .rst_n,
    .in_addr_we, .in_addr, .in_ctrl_we, .in_ctrl, .in_status, .tx_data, .tx_valid,
    .out_ctrl_we, .out_ctrl, .out_status, .rx_data, .rx_valid,
    .wake_req(mod_in_valid), .attention, .mic_clk_en
  );

  for (genvar p = 0; p < N_PORTS; p++) begin : g_mic
    mic #(
      .PORT_ID(3'(p)), .QUEUE_CELLS(QUEUE_CELLS), .VCI_IDX_BITS(VCI_IDX_BITS), .SLOTS(SLOTS)
    ) u_mic (
      .clk, .rst_n, .clk_en(mic_clk_en[p]), .attention(attention[p]),
      .mod_in_data(mod_in_data[p]), .mod_in_valid(mod_in_valid[p]), .mod_in_bypass(mod_in_bypass[p]), .mod_in_ready(mod_in_ready[p]),
      .mod_out_data(mod_out_data[p]), .mod_out_valid(mod_out_valid[p]),
      .mod_out_ready(mod_out_ready[p]), .mod_out_bypass(mod_out_bypass[p]),
      .in_addr_we(in_addr_we[p]), .in_addr(in_addr[p]), .in_ctrl_we(in_ctrl_we[p]),
      .in_ctrl(in_ctrl[p]), .in_status(in_status[p]), .tx_data(tx_data[p]),
      .tx_valid(tx_valid[p]),
      .out_ctrl_we(out_ctrl_we[p]), .out_ctrl(out_ctrl[p]), .out_status(out_status[p]),
      .rx_data(rx_data[p]), .rx_valid(rx_valid[p])
    );
  end

  assign mic_awake = mic_clk_en;

endmodule
