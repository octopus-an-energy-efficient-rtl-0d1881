// tb_mic: self-checking test of one Module Interface Controller (port 3).
// The testbench models the functional module on one side and the fabric's
// input and output sections on the other (acknowledge reaches the source
// two cycles after a request, connection state two cycles after an ack
// write, data through a one-cycle synchroniser). It checks:
//   * a management cell received from the fabric is executed (VCI table
//     entries and a slot) and not passed to the module;
//   * a data cell received from the fabric reaches the module intact;
//   * cells from the module are routed by the table (known VCI), to the
//     default port (unknown VCI), straight to port k (management VCI), or
//     discarded (VCI mapped to the MIC's own port); a management cell the
//     module addresses to its own MIC is executed without leaving it;
//   * every transfer is 53 consecutive bytes and the request is withdrawn
//     after done;
//   * a refused acknowledge is retried; a full reception queue holds off
//     acknowledges;
//   * with the bypass on, a data cell reaches the module while it is still
//     arriving, and a management cell still does not reach it;
//   * with the transmit bypass on and a module that pauses, the request goes
//     out before the cell is written whole, the transfer has gaps, and data
//     and management cells still arrive intact;
//   * the MIC asks to sleep when idle.
module tb_mic;
  import octopus_pkg::*;
  typedef logic [CELL_BYTES*8-1:0] cell_t;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        clk_en, attention;
  logic [7:0]  mod_in_data, mod_out_data, tx_data, rx_data;
  logic        mod_in_valid, mod_in_ready, mod_out_valid, mod_out_ready, mod_out_bypass;
  logic        mod_in_bypass;
  bit          mod_gaps = 0;   // the module pauses now and then
  int          n_gapped = 0;   // transfers interrupted by the module
  logic        in_addr_we, in_ctrl_we, tx_valid, out_ctrl_we, rx_valid;
  logic [2:0]  in_addr;
  in_ctrl_t    in_ctrl;
  in_status_t  in_status;
  out_ctrl_t   out_ctrl;
  out_status_t out_status;

  mic #(.PORT_ID(3'd3)) dut (.*);

  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  function automatic cell_t make_cell(input logic [15:0] vci, input logic [7:0] b5,
                                      input logic [7:0] b6, input logic [7:0] b7,
                                      input logic [7:0] b8, input logic [7:0] seed);
    cell_t c;
    c = '0;
    c[1*8 +: 8] = {4'h0, vci[15:12]};
    c[2*8 +: 8] = vci[11:4];
    c[3*8 +: 8] = {vci[3:0], 4'h0};
    c[4*8 +: 8] = 8'h5A;
    c[5*8 +: 8] = b5; c[6*8 +: 8] = b6; c[7*8 +: 8] = b7; c[8*8 +: 8] = b8;
    for (int i = 9; i < CELL_BYTES; i++) c[i*8 +: 8] = 8'(seed + 8'(i) * 8'd3);
    return c;
  endfunction

  // ------------------------------------------------------- fabric model
  bit    refuse = 0;           // do not set up the next connection
  int    n_refused = 0, n_acks = 0;
  logic  ack_p1; logic [2:0] ack_p1_src;
  int    req_timer = -1;
  cell_t tx_cell; int tx_n = 0; int tx_run = 0; int run_start = 0;
  cell_t sent [$];
  logic [2:0] sent_addr [$];
  logic [2:0] addr_q;
  bit    conn_seen = 0;

  always @(posedge clk) begin
    if (!rst_n) begin
      out_status.conn_valid <= 0; out_status.conn_src <= 0; out_status.busy <= 0;
      in_status <= '0; ack_p1 <= 0; ack_p1_src <= 0; addr_q <= 0;
    end else begin
      // output side
      ack_p1 <= out_ctrl_we && out_ctrl.ack;
      ack_p1_src <= out_ctrl.ack_src;
      if (out_ctrl_we && out_ctrl.ack) n_acks++;
      if (ack_p1) begin
        if (refuse) begin refuse = 0; n_refused++; end
        else begin
          out_status.conn_valid <= 1; out_status.conn_src <= ack_p1_src; out_status.busy <= 1;
          conn_seen = 1;
        end
      end
      if (out_ctrl_we && out_ctrl.done) begin
        out_status.conn_valid <= 0; out_status.busy <= 0;
      end
      // input side
      if (in_addr_we) addr_q <= in_addr;
      if (in_ctrl_we && in_ctrl.req && !in_status.ack && !in_status.done) req_timer = 2;
      if (in_ctrl_we && !in_ctrl.req) in_status <= '0;
      if (req_timer > 0) req_timer--;
      else if (req_timer == 0) begin in_status.ack <= 1; req_timer = -1; end
      if (tx_valid && tx_run == 0) run_start = tx_n;
      if (tx_valid) begin
        check(in_status.ack, "data only while connected");
        tx_cell[tx_n*8 +: 8] = tx_data;
        tx_n++;
        if (tx_n == CELL_BYTES) begin
          sent.push_back(tx_cell); sent_addr.push_back(addr_q); tx_n = 0;
          in_status.ack <= 0; in_status.done <= 1;
        end
      end
      if (tx_valid) tx_run++;
      else if (tx_run != 0) begin
        // a run that does not cover a whole cell is only allowed with the bypass
        if (run_start != 0 || tx_n != 0) begin
          n_gapped++;
          check(mod_in_bypass, "gap in a transfer without the bypass");
        end else check(tx_run == CELL_BYTES, $sformatf("transfer of %0d bytes", tx_run));
        tx_run = 0;
      end
    end
  end

  // fabric -> MIC data (after the synchroniser)
  task automatic fabric_send(input int src, input cell_t c);
    int guard;
    out_status.req_vec = 8'(1 << src);
    guard = 0;
    while (!(out_status.conn_valid && int'(out_status.conn_src) == src) && guard < 200) begin
      @(negedge clk); guard++;
    end
    check(guard < 200, "connection set up");
    out_status.req_vec = '0;
    repeat (2) @(negedge clk);
    for (int i = 0; i < CELL_BYTES; i++) begin
      rx_valid = 1; rx_data = c[i*8 +: 8];
      @(negedge clk);
    end
    rx_valid = 0;
    repeat (4) @(negedge clk);
    check(!out_status.conn_valid, "done written after the cell");
  endtask

  // module side
  cell_t mod_tx [$];
  int    mi = 0;
  always @(posedge clk) begin
    if (rst_n && mod_in_valid && mod_in_ready) begin
      mi++;
      if (mi == CELL_BYTES) begin mi = 0; void'(mod_tx.pop_front()); end
    end
  end
  always @(negedge clk) begin
    mod_in_valid = mod_tx.size() > 0 && !(mod_gaps && $urandom_range(0, 2) == 0);
    mod_in_data  = mod_tx.size() > 0 ? mod_tx[0][mi*8 +: 8] : 8'h00;
  end

  cell_t mod_rx [$]; cell_t rc; int ri = 0;
  always @(posedge clk) begin
    if (rst_n && mod_out_valid && mod_out_ready) begin
      rc[ri*8 +: 8] = mod_out_data;
      ri++;
      if (ri == CELL_BYTES) begin ri = 0; mod_rx.push_back(rc); end
    end
  end

  task automatic wait_sent(input int n);
    int guard = 0;
    while (sent.size() < n && guard < 2000) begin @(negedge clk); guard++; end
    check(sent.size() >= n, $sformatf("%0d cells sent", n));
  endtask

  initial begin
    cell_t c, d;
    clk_en = 1; attention = 0; mod_out_ready = 1; rx_valid = 0; rx_data = 0;
    mod_out_bypass = 0; mod_in_bypass = 0;
    out_status.req_vec = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    check(dut.sleep_q, "idle MIC asks to sleep");
    attention = 1;
    @(negedge clk);
    attention = 0;
    // management cells from the CPU port: VCI 50 -> 6, VCI 52 -> 3 (self), slot 0 -> src 2
    fabric_send(0, make_cell(MGMT_VCI_BASE + 16'd3, OP_SET_VCI, 8'h00, 8'd50, 8'h86, 8'h00));
    fabric_send(0, make_cell(MGMT_VCI_BASE + 16'd3, OP_SET_VCI, 8'h00, 8'd52, 8'h83, 8'h00));
    fabric_send(0, make_cell(MGMT_VCI_BASE + 16'd3, OP_SET_SLOT, 8'd0, 8'h82, 8'h00, 8'h00));
    check(dut.u_arb.slot_valid_q[0] && dut.u_arb.slot_src_q[0] == 3'd2, "slot written");
    check(mod_rx.size() == 0 && !mod_out_valid, "management cells not passed to the module");
    // data cell from port 2
    c = make_cell(16'd77, 8'h11, 8'h22, 8'h33, 8'h44, 8'h9);
    fabric_send(2, c);
    repeat (60) @(negedge clk);
    check(mod_rx.size() == 1 && mod_rx[0] == c, "data cell delivered to the module");
    // cells from the module
    mod_tx.push_back(make_cell(16'd50, 1, 2, 3, 4, 8'h20));                 // -> 6
    mod_tx.push_back(make_cell(16'd51, 1, 2, 3, 4, 8'h21));                 // unknown -> 0
    mod_tx.push_back(make_cell(16'd52, 1, 2, 3, 4, 8'h22));                 // self -> dropped
    mod_tx.push_back(make_cell(MGMT_VCI_BASE + 16'd5, 1, 2, 3, 4, 8'h23));  // -> 5
    wait_sent(3);
    repeat (100) @(negedge clk);
    check(sent.size() == 3, $sformatf("three cells left the MIC (%0d)", sent.size()));
    if (sent.size() == 3) begin
      check(sent[0] == make_cell(16'd50, 1, 2, 3, 4, 8'h20) && sent_addr[0] == 3'd6, "VCI 50 to port 6");
      check(sent[1] == make_cell(16'd51, 1, 2, 3, 4, 8'h21) && sent_addr[1] == 3'd0, "unknown VCI to port 0");
      check(sent[2] == make_cell(MGMT_VCI_BASE + 16'd5, 1, 2, 3, 4, 8'h23) && sent_addr[2] == 3'd5,
            "management VCI to port 5");
    end
    check(in_status == '0, "request withdrawn after done");
    // a management cell from the module for its own MIC is executed locally
    mod_tx.push_back(make_cell(MGMT_VCI_BASE + 16'd3, OP_SET_VCI, 8'h00, 8'd53, 8'h81, 8'h00));
    mod_tx.push_back(make_cell(16'd53, 9, 9, 9, 9, 8'h24));
    wait_sent(4);
    if (sent.size() == 4)
      check(sent[3] == make_cell(16'd53, 9, 9, 9, 9, 8'h24) && sent_addr[3] == 3'd1,
            "locally configured VCI 53 to port 1");
    repeat (20) @(negedge clk);
    // refused acknowledge is retried
    refuse = 1;
    d = make_cell(16'd78, 8'h55, 8'h66, 8'h77, 8'h88, 8'h1);
    fabric_send(1, d);
    check(n_refused == 1, "one acknowledge refused");
    repeat (60) @(negedge clk);
    // full reception queue: module stops reading, two cells fill the queue
    mod_out_ready = 0;
    fabric_send(4, make_cell(16'd79, 1, 1, 1, 1, 8'h2));
    fabric_send(4, make_cell(16'd80, 1, 1, 1, 1, 8'h3));
    begin
      int a0;
      a0 = n_acks;
      out_status.req_vec = 8'h10;
      repeat (50) @(negedge clk);
      check(n_acks == a0, "no acknowledge while the reception queue is full");
      out_status.req_vec = 8'h00;
    end
    mod_out_ready = 1;
    repeat (200) @(negedge clk);
    check(mod_rx.size() == 4 && mod_rx[1] == d, "all received cells delivered");
    check(dut.sleep_q, "MIC asleep again when idle");
    // bypass: the cell is at the module 4 cycles after its last byte arrived
    mod_out_bypass = 1;
    attention = 1;
    @(negedge clk);
    attention = 0;
    fabric_send(0, make_cell(MGMT_VCI_BASE + 16'd3, OP_SET_SLOT, 8'd1, 8'h85, 8'h00, 8'h00));
    check(dut.u_arb.slot_valid_q[1] && dut.u_arb.slot_src_q[1] == 3'd5, "slot written with bypass on");
    check(mod_rx.size() == 4 && ri == 0, "management cell held back with bypass on");
    d = make_cell(16'd81, 8'h12, 8'h34, 8'h56, 8'h78, 8'h5);
    fabric_send(6, d);
    check(mod_rx.size() == 5 && mod_rx[4] == d, "bypassed cell delivered while arriving");
    repeat (20) @(negedge clk);
    check(dut.sleep_q, "MIC asleep after the bypassed cell");
    // transmit bypass with a pausing module
    mod_in_bypass = 1;
    mod_gaps = 1;
    d = make_cell(16'd50, 8'h70, 8'h71, 8'h72, 8'h73, 8'h30);
    mod_tx.push_back(d);
    begin
      int guard = 0;
      while (!in_addr_we && guard < 200) begin @(negedge clk); guard++; end
      check(in_addr_we && in_addr == 3'd6 && mod_tx.size() == 1,
            "request made before the cell was written whole");
    end
    wait_sent(5);
    if (sent.size() == 5) check(sent[4] == d && sent_addr[4] == 3'd6, "bypassed cell sent intact");
    check(n_gapped > 0, "transfer followed the module's pauses");
    mod_tx.push_back(make_cell(MGMT_VCI_BASE + 16'd3, OP_SET_VCI, 8'h00, 8'd54, 8'h82, 8'h00));
    d = make_cell(16'd54, 8'h74, 8'h75, 8'h76, 8'h77, 8'h31);
    mod_tx.push_back(d);
    wait_sent(6);
    if (sent.size() == 6)
      check(sent[5] == d && sent_addr[5] == 3'd2, "local management cell executed with bypass on");
    repeat (2) @(negedge clk);
    mod_gaps = 0;
    mod_in_bypass = 0;
    repeat (20) @(negedge clk);
    check(dut.sleep_q, "MIC asleep after the transmit bypass");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
