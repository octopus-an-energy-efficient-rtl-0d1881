// mic: Module Interface Controller of one Octopus port.
//
// The MIC sits between a functional module and its port of the switching
// fabric. It holds a transmission queue and a reception queue of ATM cells,
// the VCI mapping table and the arbiter, and runs the transfer of a cell in
// four phases:
//   module I/O    - the module writes a cell byte by byte into the
//                   transmission queue (or reads one from the reception queue);
//   arbitration   - the VCI of the oldest queued cell is looked up, the
//                   destination port is written into the input section's
//                   address register and a request is set in its control
//                   register; the cell waits until the destination acks;
//   data transfer - the 53 bytes go out, one per cycle (with the transmit
//                   bypass, as the module delivers them);
//   release       - the destination reports done, the request is withdrawn.
// As destination, the MIC's arbiter picks one of the requests in its output
// section's status register when the reception queue has room for a cell
// and the port is free, writes an acknowledge, checks two cycles later that
// the fabric set the connection up (a refused acknowledge is simply retried),
// receives 53 bytes into the reception queue and writes done.
//
// Cells with VCI MGMT_VCI_BASE+k are management cells for port k. They are
// routed to port k without the table, and the receiving MIC executes and
// drops them instead of passing them on: opcode OP_SET_VCI writes a VCI
// table entry, OP_SET_SLOT an arbiter slot. Unknown VCIs go to DEFAULT_PORT.
// A management cell the module addresses to its own MIC is executed from the
// transmission queue without entering the fabric; any other cell whose
// destination is this port itself is discarded, since a port cannot connect
// to itself.
//
// Module interfaces are byte streams with valid/ready; a cell is 53
// consecutive bytes, with no framing signal. A module that keeps up with the
// switch sets mod_out_bypass: it then gets each received byte one cycle
// after it arrives instead of after the whole cell is stored (management
// cells are still held back and dropped). Likewise mod_in_bypass lets the
// MIC look up and request a connection as soon as the first 4 bytes of a
// cell are in, and send bytes on as the module delivers them; the fabric
// transfer then has gaps wherever the module has them. All state advances only when
// clk_en (the control unit's clock) is high. The MIC asks to sleep when both
// queues and both phase machines are idle and no attention is pending.
// The units and phases follow the architecture; register protocol, framing,
// management-cell format and the self-addressed rule are this design's.
module mic
  import octopus_pkg::*;
#(
  parameter logic [2:0]  PORT_ID      = 3'd0,
  parameter int unsigned QUEUE_CELLS  = 2,
  parameter int unsigned VCI_IDX_BITS = 6,
  parameter int unsigned SLOTS        = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clk_en,
  input  logic        attention,
  // module interface
  input  logic [7:0]  mod_in_data,
  input  logic        mod_in_valid,
  input  logic        mod_in_bypass,  // module keeps up: send cells while they arrive
  output logic        mod_in_ready,
  output logic [7:0]  mod_out_data,
  output logic        mod_out_valid,
  input  logic        mod_out_ready,
  input  logic        mod_out_bypass, // module keeps up: pass cells on as they arrive
  // switching fabric interface: input section
  output logic        in_addr_we,
  output logic [2:0]  in_addr,
  output logic        in_ctrl_we,
  output in_ctrl_t    in_ctrl,
  input  in_status_t  in_status,
  output logic [7:0]  tx_data,
  output logic        tx_valid,
  // switching fabric interface: output section
  output logic        out_ctrl_we,
  output out_ctrl_t   out_ctrl,
  input  out_status_t out_status,
  input  logic [7:0]  rx_data,
  input  logic        rx_valid
);

  typedef enum logic [2:0] {T_IDLE, T_WAIT, T_XFER, T_REL, T_DROP} tx_state_t;
  typedef enum logic [2:0] {R_IDLE, R_WAIT1, R_CHECK, R_RECV, R_DONE} rx_state_t;

  tx_state_t tx_q;
  rx_state_t rx_q;

  // ---------------------------------------------------------------- queues
  logic [7:0]  txq_rd_data;
  logic        txq_rd_valid, txq_rd_ready, txq_empty, txq_space;
  logic [15:0] txq_vci;
  logic        rxq_wr_ready, rxq_wr_drop, rxq_empty, rxq_space, rx_is_mgmt;
  logic [15:0] rxq_vci_unused;

  cell_queue #(.CELLS(QUEUE_CELLS)) u_txq (
    .clk, .rst_n, .en(clk_en),
    .wr_data(mod_in_data), .wr_valid(mod_in_valid), .wr_ready(mod_in_ready),
    .wr_drop(1'b0), .wr_hold(1'b0), .cut_through(mod_in_bypass),
    .rd_data(txq_rd_data), .rd_valid(txq_rd_valid), .rd_ready(txq_rd_ready),
    .head_vci(txq_vci), .empty(txq_empty), .space(txq_space)
  );

  cell_queue #(.CELLS(QUEUE_CELLS)) u_rxq (
    .clk, .rst_n, .en(clk_en),
    .wr_data(rx_data), .wr_valid(rx_valid && rx_q == R_RECV), .wr_ready(rxq_wr_ready),
    .wr_drop(rxq_wr_drop), .wr_hold(rx_is_mgmt), .cut_through(mod_out_bypass),
    .rd_data(mod_out_data), .rd_valid(mod_out_valid), .rd_ready(mod_out_ready),
    .head_vci(rxq_vci_unused), .empty(rxq_empty), .space(rxq_space)
  );

  // ------------------------------------------------------ VCI mapping table
  logic        tbl_we;
  logic [15:0] tbl_wvci;
  logic        tbl_wvalid;
  logic [2:0]  tbl_wdest;
  logic [2:0]  tbl_dest;
  logic        tbl_hit;

  vci_table #(.IDX_BITS(VCI_IDX_BITS)) u_vci (
    .clk, .rst_n, .en(clk_en),
    .we(tbl_we), .wvci(tbl_wvci), .wvalid(tbl_wvalid), .wdest(tbl_wdest),
    .vci(txq_vci), .dest(tbl_dest), .hit(tbl_hit)
  );

  // --------------------------------------------------------------- arbiter
  logic       arb_valid, arb_guaranteed, arb_advance;
  logic [2:0] arb_src;
  logic       slot_we;
  logic [7:0] slot_idx;
  logic       slot_valid;
  logic [2:0] slot_src;

  mic_arbiter #(.SLOTS(SLOTS)) u_arb (
    .clk, .rst_n, .en(clk_en),
    .req_vec(out_status.req_vec),
    .grant_valid(arb_valid), .grant_src(arb_src), .grant_guaranteed(arb_guaranteed),
    .advance(arb_advance), .advance_src(out_status.conn_src),
    .slot_we, .slot_idx, .slot_valid, .slot_src
  );

  // -------------------------------------------------- transmit phase machine
  logic       head_is_mgmt;
  logic [2:0] head_dest;
  logic [5:0] tx_cnt_q;
  logic       req_d, req_q, sleep_d, sleep_q;

  always_comb begin
    logic [15:0] off;
    off          = txq_vci - MGMT_VCI_BASE;
    head_is_mgmt = (txq_vci >= MGMT_VCI_BASE) && (off < 16'(N_PORTS));
    head_dest    = head_is_mgmt ? off[2:0] : tbl_dest;
  end

  // a management cell for this MIC found in its own transmission queue is
  // executed locally; its last byte waits one clock if a received management
  // cell uses the table write ports in the same clock
  logic       local_mgmt_q, drop_last, drop_stall, rx_exec;
  logic [7:0] t0_q, t1_q, t2_q, t3_q;  // first payload bytes of a local management cell
  assign drop_last    = (tx_q == T_DROP) && txq_rd_valid && (int'(tx_cnt_q) == CELL_BYTES - 1);
  assign drop_stall   = drop_last && local_mgmt_q && rx_exec;
  assign txq_rd_ready = (tx_q == T_XFER) || ((tx_q == T_DROP) && !drop_stall);
  assign tx_data      = txq_rd_data;
  assign tx_valid     = clk_en && (tx_q == T_XFER) && txq_rd_valid;
  assign in_addr_we   = clk_en && (tx_q == T_IDLE) && txq_rd_valid && (head_dest != PORT_ID);
  assign in_addr      = head_dest;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_q         <= T_IDLE;
      tx_cnt_q     <= '0;
      local_mgmt_q <= 1'b0;
    end else if (clk_en) begin
      unique case (tx_q)
        T_IDLE: if (txq_rd_valid) begin
          tx_cnt_q     <= '0;
          local_mgmt_q <= head_is_mgmt;
          tx_q         <= (head_dest == PORT_ID) ? T_DROP : T_WAIT;
        end
        T_WAIT: if (in_status.ack) tx_q <= T_XFER;
        T_DROP: if (txq_rd_valid && !drop_stall) begin
          tx_cnt_q <= tx_cnt_q + 1'b1;
          if (drop_last) tx_q <= T_IDLE;
        end
        T_XFER: if (txq_rd_valid) begin
          tx_cnt_q <= tx_cnt_q + 1'b1;
          if (int'(tx_cnt_q) == CELL_BYTES - 1) tx_q <= T_REL;
        end
        T_REL: if (in_status.done) tx_q <= T_IDLE;
        default: tx_q <= T_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------- receive phase machine
  logic [5:0] rx_cnt_q;
  logic       rx_last;
  logic [7:0] b1_q, b2_q, b3_q;       // header bytes 1..3 (carry the VCI)
  logic [7:0] p0_q, p1_q, p2_q, p3_q; // first payload bytes (management command)
  logic [2:0] ack_src_q;
  logic       ack_guar_q;     // the pending acknowledge uses a guaranteed slot

  assign rx_last     = (rx_q == R_RECV) && rx_valid && (int'(rx_cnt_q) == CELL_BYTES - 1);
  // the VCI is complete long before the last byte, where the decision is used
  assign rx_is_mgmt  = (hdr_vci(b1_q, b2_q, b3_q) == MGMT_VCI_BASE + 16'(PORT_ID));
  assign rxq_wr_drop = rx_is_mgmt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_q      <= R_IDLE;
      rx_cnt_q  <= '0;
      ack_src_q <= '0;
      ack_guar_q <= 1'b0;
    end else if (clk_en) begin
      unique case (rx_q)
        R_IDLE: if (arb_valid && rxq_space && !out_status.busy && tx_q != T_XFER) begin
          ack_src_q  <= arb_src;
          ack_guar_q <= arb_guaranteed;
          rx_q      <= R_WAIT1;
        end
        R_WAIT1: rx_q <= R_CHECK;
        R_CHECK: begin
          rx_cnt_q <= '0;
          rx_q     <= (out_status.conn_valid && out_status.conn_src == ack_src_q) ? R_RECV : R_IDLE;
        end
        R_RECV: if (rx_valid) begin
          rx_cnt_q <= rx_cnt_q + 1'b1;
          if (rx_last) rx_q <= R_DONE;
        end
        R_DONE: rx_q <= R_IDLE;
        default: rx_q <= R_IDLE;
      endcase
    end
  end

  // capture the header and management payload bytes as they arrive
  always_ff @(posedge clk) begin
    if (clk_en && rx_q == R_RECV && rx_valid) begin
      unique case (int'(rx_cnt_q))
        1: b1_q     <= rx_data;
        2: b2_q     <= rx_data;
        3: b3_q     <= rx_data;
        5: p0_q     <= rx_data;
        6: p1_q     <= rx_data;
        7: p2_q     <= rx_data;
        8: p3_q     <= rx_data;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (clk_en && tx_q == T_DROP && txq_rd_valid) begin
      unique case (int'(tx_cnt_q))
        5: t0_q <= txq_rd_data;
        6: t1_q <= txq_rd_data;
        7: t2_q <= txq_rd_data;
        8: t3_q <= txq_rd_data;
        default: ;
      endcase
    end
  end

  // management cell execution on its last byte, received or local
  always_comb begin
    logic       tx_exec;
    logic [7:0] c0, c1, c2, c3;
    rx_exec = rx_last && rx_is_mgmt;
    tx_exec = drop_last && local_mgmt_q && !rx_exec;
    {c0, c1, c2, c3} = rx_exec ? {p0_q, p1_q, p2_q, p3_q} : {t0_q, t1_q, t2_q, t3_q};
    tbl_we     = clk_en && (rx_exec || tx_exec) && (c0 == OP_SET_VCI);
    tbl_wvci   = {c1, c2};
    tbl_wvalid = c3[7];
    tbl_wdest  = c3[2:0];
    slot_we    = clk_en && (rx_exec || tx_exec) && (c0 == OP_SET_SLOT);
    slot_idx   = c1;
    slot_valid = c2[7];
    slot_src   = c2[2:0];
  end

  assign arb_advance = (rx_q == R_CHECK) && out_status.conn_valid &&
                       out_status.conn_src == ack_src_q;

  assign out_ctrl_we      = clk_en && ((rx_q == R_IDLE && arb_valid && rxq_space &&
                                        !out_status.busy && tx_q != T_XFER) ||
                                       rx_q == R_DONE);
  assign out_ctrl.ack     = (rx_q == R_IDLE);
  assign out_ctrl.ack_src = arb_src;
  assign out_ctrl.done    = (rx_q == R_DONE);

  // ------------------------------------------- control register (req, sleep)
  always_comb begin
    unique case (tx_q)
      T_IDLE:  req_d = txq_rd_valid && (head_dest != PORT_ID);
      T_WAIT,
      T_XFER:  req_d = 1'b1;
      T_REL:   req_d = !in_status.done;
      default: req_d = 1'b0;
    endcase
    sleep_d = tx_q == T_IDLE && rx_q == R_IDLE && txq_empty && rxq_empty && !attention;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_q   <= 1'b0;
      sleep_q <= 1'b0;
    end else if (clk_en) begin
      req_q   <= req_d;
      sleep_q <= sleep_d;
    end
  end

  assign in_ctrl_we    = clk_en && (req_d != req_q || sleep_d != sleep_q);
  assign in_ctrl.req   = req_d;
  assign in_ctrl.sleep = sleep_d;

endmodule
