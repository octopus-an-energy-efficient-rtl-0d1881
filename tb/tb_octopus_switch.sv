// tb_octopus_switch: end-to-end test of the Octopus switch at its default
// parameters (eight ports, two-cell queues, 64-entry VCI tables, 8 slots).
//
// The testbench plays the eight functional modules. Port 0 acts as the CPU
// module with the connection manager: it configures every MIC, its own
// included, with management cells (VCI table entries VCI 40+d -> port d,
// and two guaranteed slots at port 2). Then it runs traffic phases:
//   1. the CPU port sends data through its own, locally configured table,
//      then four disjoint connections run at once (1->2, 3->4, 5->6, 7->0);
//   2. three sources (1, 3, 5) contending for port 2, source 5 owning a slot;
//   3. ports 1 and 2 sending to each other at the same moment (half duplex);
//   4. a stalled receiver (port 4) so its reception queue fills;
//   5. a cell with an unknown VCI (goes to the CPU port) and a cell the CPU
//      port addresses to itself (discarded).
// Every data cell carries source, destination and sequence number in its
// payload; the receiver checks them, the byte pattern, and per-pair order.
// Ports 0 and 6 run with the reception buffer bypass on (cells are read as
// they arrive), ports 1 and 5 with the transmit bypass on (cells are sent
// while the module still writes them); the others store each cell whole.
// Each fabric transfer must be 53 back-to-back bytes. The mechanisms (sleep
// and wake-up, management cells, parallel connections, guaranteed and
// ad-hoc grants, refused acknowledges, queue back-pressure, default route,
// self-addressed discard, buffer bypass) are counted and each must occur.
module tb_octopus_switch;
  import octopus_pkg::*;

  localparam int NP = N_PORTS;
  typedef logic [CELL_BYTES*8-1:0] cell_t;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NP-1:0][7:0] mod_in_data, mod_out_data;
  logic [NP-1:0]      mod_in_valid, mod_in_ready, mod_out_valid, mod_out_ready, mic_awake;
  logic [NP-1:0]      mod_out_bypass, mod_in_bypass;

  octopus_switch dut (.*);

  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // ------------------------------------------------------------- cells
  function automatic cell_t make_cell(input logic [15:0] vci, input logic [7:0] b5,
                                      input logic [7:0] b6, input logic [7:0] b7,
                                      input logic [7:0] b8, input logic [7:0] seed);
    cell_t c;
    c = '0;
    c[0*8 +: 8] = 8'h00;                    // GFC/VPI
    c[1*8 +: 8] = {4'h0, vci[15:12]};
    c[2*8 +: 8] = vci[11:4];
    c[3*8 +: 8] = {vci[3:0], 4'h0};
    c[4*8 +: 8] = 8'h55;                    // HEC (not checked by the switch)
    c[5*8 +: 8] = b5;
    c[6*8 +: 8] = b6;
    c[7*8 +: 8] = b7;
    c[8*8 +: 8] = b8;
    for (int i = 9; i < CELL_BYTES; i++) c[i*8 +: 8] = 8'(seed * 8'd7 + 8'(i) * 8'd13);
    return c;
  endfunction

  cell_t txq [NP][$];
  int    tx_idx [NP];
  int    seq_out [NP][NP];   // next sequence number to send src->dst
  int    seq_in  [NP][NP];   // next sequence number expected src->dst
  int    outstanding = 0;

  task automatic send_data(input int src, input int dst, input logic [15:0] vci);
    logic [7:0] sq;
    sq = 8'(seq_out[src][dst]);
    seq_out[src][dst]++;
    txq[src].push_back(make_cell(vci, 8'hA5, 8'(src), 8'(dst), sq, sq ^ 8'(src * 16 + dst)));
    outstanding++;
  endtask

  task automatic send_mgmt(input int target, input logic [7:0] op, input logic [7:0] a,
                           input logic [7:0] b, input logic [7:0] c);
    txq[0].push_back(make_cell(MGMT_VCI_BASE + 16'(target), op, a, b, c, 8'h00));
  endtask

  // ------------------------------------------------------ module drivers
  always @(posedge clk) begin
    for (int p = 0; p < NP; p++) begin
      if (mod_in_valid[p] && mod_in_ready[p]) begin
        tx_idx[p]++;
        if (tx_idx[p] == CELL_BYTES) begin
          tx_idx[p] = 0;
          void'(txq[p].pop_front());
        end
      end
      if (txq[p].size() > 0) begin
        mod_in_valid[p] <= 1'b1;
        mod_in_data[p]  <= txq[p][0][tx_idx[p]*8 +: 8];
      end else begin
        mod_in_valid[p] <= 1'b0;
        mod_in_data[p]  <= 8'h00;
      end
    end
  end

  // ------------------------------------------------------ module receivers
  logic [NP-1:0] rx_stall;
  cell_t rx_cell [NP];
  int    rx_idx  [NP];
  int    default_route_cells = 0;

  always_comb for (int p = 0; p < NP; p++) mod_out_ready[p] = !rx_stall[p];

  always @(posedge clk) begin
    for (int p = 0; p < NP; p++) begin
      if (rst_n && mod_out_valid[p] && mod_out_ready[p]) begin
        rx_cell[p][rx_idx[p]*8 +: 8] = mod_out_data[p];
        rx_idx[p]++;
        if (rx_idx[p] == CELL_BYTES) begin
          automatic cell_t c = rx_cell[p];
          automatic int s = int'(c[6*8 +: 8]);
          automatic int d = int'(c[7*8 +: 8]);
          automatic logic [7:0] sq = c[8*8 +: 8];
          rx_idx[p] = 0;
          outstanding--;
          check(c[5*8 +: 8] == 8'hA5 && s < NP && d < NP, $sformatf("port %0d: bad cell %h", p, c[9*8-1:0]));
          if (s < NP && d < NP) begin
            automatic logic [15:0] vci = {c[1*8 +: 4], c[2*8 +: 8], c[3*8+4 +: 4]};
            check(c == make_cell(vci, 8'hA5, 8'(s), 8'(d), sq, sq ^ 8'(s * 16 + d)),
                  $sformatf("port %0d: payload of cell %0d->%0d", p, s, d));
            check(d == p, $sformatf("cell for %0d arrived at %0d", d, p));
            check(int'(sq) == (seq_in[s][d] & 255),
                  $sformatf("order %0d->%0d: got %0d exp %0d", s, d, sq, seq_in[s][d]));
            seq_in[s][d]++;
            if (p == int'(DEFAULT_PORT) && vci == 16'd63) default_route_cells++;
          end
        end
      end
    end
  end

  // ------------------------------------------ fabric transfers: 53 bytes
  int run_len [NP];
  int transfers = 0;
  always @(posedge clk) begin
    for (int p = 0; p < NP; p++) begin
      if (dut.tx_valid[p]) run_len[p]++;
      else if (run_len[p] != 0) begin
        check(run_len[p] == CELL_BYTES,
              $sformatf("port %0d sent a burst of %0d bytes", p, run_len[p]));
        transfers++;
        run_len[p] = 0;
      end
    end
  end

  // ------------------------------------------------ mechanism counters
  int n_sleep = 0, n_wake = 0, n_mgmt = 0, n_guar = 0, n_adhoc = 0, n_refused = 0;
  int n_rxfull = 0, n_txfull = 0, n_four = 0, n_selfdrop = 0, n_local = 0;
  int n_bypass = 0, n_bypass_wrong = 0, n_txbypass = 0;
  logic [NP-1:0] awake_q;

  always @(posedge clk) begin
    if (rst_n) begin
      awake_q <= mic_awake;
      for (int p = 0; p < NP; p++) begin
        if (!mic_awake[p]) n_sleep++;
        if (mic_awake[p] && !awake_q[p]) n_wake++;
        if (mod_in_valid[p] && !mod_in_ready[p] && mic_awake[p]) n_txfull++;
      end
      if ($countones(dut.u_fabric.u_net.conn_valid_q) == NP / 2) n_four++;
    end
  end

  for (genvar p = 0; p < NP; p++) begin : g_mon
    always @(posedge clk) begin
      if (rst_n && dut.mic_clk_en[p]) begin
        if (dut.g_mic[p].u_mic.tbl_we || dut.g_mic[p].u_mic.slot_we) n_mgmt++;
        // a byte read from a cell that is still arriving
        if (dut.g_mic[p].u_mic.u_rxq.early && mod_out_valid[p] && mod_out_ready[p]) begin
          if (mod_out_bypass[p]) n_bypass++;
          else n_bypass_wrong++;
        end
        // a byte sent from a cell the module is still writing
        if (dut.g_mic[p].u_mic.u_txq.early && dut.g_mic[p].u_mic.u_txq.rd_fire) begin
          if (mod_in_bypass[p]) n_txbypass++;
          else n_bypass_wrong++;
        end
        if (dut.g_mic[p].u_mic.arb_advance) begin
          if (dut.g_mic[p].u_mic.ack_guar_q) n_guar++;
          else n_adhoc++;
        end
        if (dut.g_mic[p].u_mic.rx_q == 3'd2 && !dut.g_mic[p].u_mic.arb_advance) n_refused++;
        if (dut.g_mic[p].u_mic.rx_q == 3'd0 && dut.g_mic[p].u_mic.arb_valid &&
            !dut.g_mic[p].u_mic.rxq_space) n_rxfull++;
        if (dut.g_mic[p].u_mic.tx_q == 3'd4 && dut.g_mic[p].u_mic.tx_cnt_q == 6'd0) begin
          if (dut.g_mic[p].u_mic.local_mgmt_q) n_local++;
          else n_selfdrop++;
        end
      end
    end
  end

  // ------------------------------------------------------------ helpers
  task automatic wait_idle(input int extra);
    int guard = 0;
    while ((outstanding != 0 || txq[0].size() != 0 || txq[1].size() != 0 ||
            txq[2].size() != 0 || txq[3].size() != 0 || txq[4].size() != 0 ||
            txq[5].size() != 0 || txq[6].size() != 0 || txq[7].size() != 0) && guard < 100000) begin
      @(posedge clk);
      guard++;
    end
    repeat (extra) @(posedge clk);
  endtask

  int src_count_at2 [NP];
  int guar_before;

  initial begin
    rx_stall     = '0;
    mod_out_bypass = 8'b0100_0001;
    mod_in_bypass  = 8'b0010_0010;
    mod_in_valid = '0;
    mod_in_data  = '0;
    for (int p = 0; p < NP; p++) begin
      tx_idx[p] = 0; rx_idx[p] = 0; run_len[p] = 0;
      for (int q = 0; q < NP; q++) begin seq_out[p][q] = 0; seq_in[p][q] = 0; end
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (10) @(posedge clk);
    check(mic_awake == '0, "all MICs asleep after reset with nothing to do");

    // connection manager: VCI 40+d -> port d in every MIC 1..7; slot 0 of
    // port 2 owned by source 5, slot 1 by source 5 as well
    for (int t = 0; t < NP; t++)
      for (int d = 0; d < NP; d++)
        send_mgmt(t, OP_SET_VCI, 8'h00, 8'(40 + d), {1'b1, 4'b0, 3'(d)});
    send_mgmt(2, OP_SET_SLOT, 8'd0, {1'b1, 4'b0, 3'd5}, 8'h00);
    send_mgmt(2, OP_SET_SLOT, 8'd1, {1'b1, 4'b0, 3'd5}, 8'h00);
    wait_idle(50);
    for (int i = 0; i < 1000 && n_mgmt != NP * NP + 2; i++) @(posedge clk);
    check(n_local == NP, $sformatf("management cells executed locally by the CPU port's MIC: %0d", n_local));
    check(n_mgmt == NP * NP + 2, $sformatf("management cells executed: %0d", n_mgmt));

    // phase 1: four disjoint connections at once, after two cells from the CPU
    send_data(0, 3, 16'd43);
    send_data(0, 5, 16'd45);
    wait_idle(20);
    for (int k = 0; k < 6; k++) begin
      send_data(1, 2, 16'd42);
      send_data(3, 4, 16'd44);
      send_data(5, 6, 16'd46);
      send_data(7, 0, 16'd40);
    end
    wait_idle(50);

    // phase 2: contention for port 2; source 5 owns two of eight slots
    guar_before = n_guar;
    for (int k = 0; k < 8; k++) begin
      send_data(1, 2, 16'd42);
      send_data(3, 2, 16'd42);
      send_data(5, 2, 16'd42);
    end
    wait_idle(50);
    check(n_guar > guar_before, "guaranteed slot used under contention");

    // phase 3: ports 1 and 2 send to each other at the same time
    for (int k = 0; k < 4; k++) begin
      send_data(1, 6, 16'd46);  // keep 1 busy a little, then the crossing pair
      send_data(1, 2, 16'd42);
      send_data(2, 1, 16'd41);
      send_data(6, 5, 16'd45);
      send_data(5, 6, 16'd46);
    end
    wait_idle(50);

    // phase 4: receiver 4 stalls, its reception queue fills
    rx_stall[4] = 1'b1;
    for (int k = 0; k < 5; k++) send_data(3, 4, 16'd44);
    repeat (1500) @(posedge clk);
    rx_stall[4] = 1'b0;
    wait_idle(50);

    // phase 5: unknown VCI goes to the CPU port; CPU cell to itself is dropped
    send_data(5, 0, 16'd63);
    txq[0].push_back(make_cell(16'd100, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00));
    wait_idle(200);

    check(outstanding == 0, $sformatf("%0d cells not delivered", outstanding));
    check(mic_awake == '0, "all MICs asleep again at the end");

    $display("mechanisms: local-mgmt=%0d sleep-cycles=%0d wakeups=%0d mgmt=%0d four-parallel-cycles=%0d guaranteed=%0d adhoc=%0d refused-acks=%0d rxq-full=%0d txq-full=%0d default-route=%0d self-drop=%0d bypassed-bytes=%0d/%0d transfers=%0d",
             n_local, n_sleep, n_wake, n_mgmt, n_four, n_guar, n_adhoc, n_refused, n_rxfull, n_txfull,
             default_route_cells, n_selfdrop, n_bypass, n_txbypass, transfers);
    check(n_sleep > 0,  "sleep happened");
    check(n_wake > 0,   "wake-up by attention happened");
    check(n_four > 0,   "four parallel connections happened");
    check(n_guar > 0,   "guaranteed grant happened");
    check(n_adhoc > 0,  "ad-hoc grant happened");
    check(n_refused > 0, "refused acknowledge (half duplex conflict) happened");
    check(n_rxfull > 0, "reception queue full deferral happened");
    check(n_txfull > 0, "transmission queue back-pressure happened");
    check(default_route_cells == 1, "unknown VCI routed to the default port");
    check(n_selfdrop == 1, "self-addressed cell discarded");
    check(n_bypass > 0, "reception bypass happened");
    check(n_txbypass > 0, "transmit bypass happened");
    check(n_bypass_wrong == 0, "no early reads at ports without bypass");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
