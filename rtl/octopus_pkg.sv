// octopus_pkg: constants and register types shared by the Octopus switch.
//
// The switch carries ATM cells (5-byte header, 48-byte payload) over an
// 8-bit datapath between eight ports. The register layouts below describe
// what a Module Interface Controller (MIC) writes into and reads from the
// input and output section of its fabric port. The cell format and the
// eight ports follow the architecture; the bit layout of the registers,
// the management-cell format and the VCI numbers used for management are
// this design's own choices.
package octopus_pkg;

  // ATM cell geometry
  localparam int unsigned HDR_BYTES  = 5;
  localparam int unsigned PAY_BYTES  = 48;
  localparam int unsigned CELL_BYTES = HDR_BYTES + PAY_BYTES;  // 53

  // Number of switch ports in the architecture, and the port that holds the
  // CPU module (default destination of cells with an unknown VCI).
  localparam int unsigned N_PORTS      = 8;
  localparam int unsigned DEFAULT_PORT = 0;

  // Management cells: a cell whose VCI is MGMT_VCI_BASE + k is consumed by
  // the MIC of port k instead of being handed to its module. The range lies
  // in the VCIs 0..31 that ATM keeps for signalling and management.
  localparam logic [15:0] MGMT_VCI_BASE = 16'd24;

  // Management opcodes (first payload byte of a management cell)
  localparam logic [7:0] OP_SET_VCI  = 8'h01;  // payload[1:2]=VCI, payload[3]={valid,4'b0,dest}
  localparam logic [7:0] OP_SET_SLOT = 8'h02;  // payload[1]=slot, payload[2]={valid,4'b0,src}

  // Input-section control register: request a connection, or let the
  // attached MIC sleep.
  typedef struct packed {
    logic sleep;
    logic req;
  } in_ctrl_t;

  // Output-section control register write: acknowledge one requester
  // (establish a connection) or signal that the cell arrived (release).
  typedef struct packed {
    logic       ack;
    logic [2:0] ack_src;
    logic       done;
  } out_ctrl_t;

  // Status seen by the sending side of a port.
  typedef struct packed {
    logic ack;   // connection to the addressed output established
    logic done;  // receiver acknowledged the cell, connection released
  } in_status_t;

  // Status seen by the receiving side of a port. The request vector is
  // the "status register" that holds all requests for this output.
  typedef struct packed {
    logic [N_PORTS-1:0] req_vec;
    logic               conn_valid;
    logic [2:0]         conn_src;
    logic               busy;        // port takes part in a connection (either side)
  } out_status_t;

  // Extract the 16-bit VCI from the second to fourth header byte (UNI format:
  // GFC[4] VPI[8] VCI[16] PTI[3] CLP[1] HEC[8]).
  function automatic logic [15:0] hdr_vci(input logic [7:0] b1, input logic [7:0] b2,
                                          input logic [7:0] b3);
    return {b1[3:0], b2, b3[7:4]};
  endfunction

endpackage
