// tb_dataflows: the measurement set-up of the switch prototype, repeated in
// simulation. Six modules on ports 1..6 form up to three disjoint
// connections (1->2, 3->4, 5->6) that stream cells back to back, as in the
// power measurement with 0, 1, 2 and 3 data flows. For each number of flows
// it runs a fixed window and reports:
//   * delivered bytes per clock for each flow, which must be the same for
//     every flow and every number of flows (disjoint flows do not congest)
//     and at least 0.8 byte per clock (53 data cycles plus the arbitration
//     and release overhead per cell);
//   * MIC-cycles with the clock enabled, a proxy for the energy the
//     measurement shows rising with the number of flows: with no traffic
//     every MIC must sleep, and each added flow wakes exactly two MICs.
// Every delivered cell is checked for content and order.
module tb_dataflows;
  import octopus_pkg::*;

  localparam int NP     = N_PORTS;
  localparam int WINDOW = 4000;
  typedef logic [CELL_BYTES*8-1:0] cell_t;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NP-1:0][7:0] mod_in_data, mod_out_data;
  logic [NP-1:0]      mod_in_valid, mod_in_ready, mod_out_valid, mod_out_ready, mic_awake;

  logic [NP-1:0]      mod_out_bypass, mod_in_bypass;
  octopus_switch dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic cell_t make_cell(input logic [15:0] vci, input logic [7:0] b5,
                                      input logic [7:0] b6, input logic [7:0] b7,
                                      input logic [7:0] b8);
    cell_t c;
    c = '0;
    c[1*8 +: 8] = {4'h0, vci[15:12]};
    c[2*8 +: 8] = vci[11:4];
    c[3*8 +: 8] = {vci[3:0], 4'h0};
    c[5*8 +: 8] = b5; c[6*8 +: 8] = b6; c[7*8 +: 8] = b7; c[8*8 +: 8] = b8;
    for (int i = 9; i < CELL_BYTES; i++) c[i*8 +: 8] = 8'(b8 + b6 + 8'(i));
    return c;
  endfunction

  // traffic sources: port p streams to port p+1 while flow_on[p] is set
  bit    flow_on [NP];
  cell_t txq [NP][$];
  int    tx_idx [NP];
  int    seq_tx [NP], seq_rx [NP];
  int    rx_bytes [NP];
  cell_t rx_cell [NP];
  int    rx_idx [NP];

  always @(posedge clk) begin
    for (int p = 0; p < NP; p++) begin
      if (rst_n && mod_in_valid[p] && mod_in_ready[p]) begin
        tx_idx[p]++;
        if (tx_idx[p] == CELL_BYTES) begin tx_idx[p] = 0; void'(txq[p].pop_front()); end
      end
      if (flow_on[p] && txq[p].size() < 2) begin
        txq[p].push_back(make_cell(16'(40 + p + 1), 8'hA5, 8'(p), 8'(p + 1), 8'(seq_tx[p])));
        seq_tx[p]++;
      end
      mod_in_valid[p] <= txq[p].size() > 0;
      mod_in_data[p]  <= txq[p].size() > 0 ? txq[p][0][tx_idx[p]*8 +: 8] : 8'h00;
    end
  end

  always @(posedge clk) begin
    for (int p = 0; p < NP; p++) begin
      if (rst_n && mod_out_valid[p] && mod_out_ready[p]) begin
        rx_cell[p][rx_idx[p]*8 +: 8] = mod_out_data[p];
        rx_idx[p]++;
        rx_bytes[p]++;
        if (rx_idx[p] == CELL_BYTES) begin
          automatic int s = p - 1;
          rx_idx[p] = 0;
          check(s >= 0 && rx_cell[p] == make_cell(16'(40 + p), 8'hA5, 8'(s), 8'(p), 8'(seq_rx[s])),
                $sformatf("cell %0d at port %0d", seq_rx[s], p));
          seq_rx[s]++;
        end
      end
    end
  end

  int awake_cycles = 0;
  always @(posedge clk) if (rst_n) awake_cycles += $countones(mic_awake);

  initial begin
    int base_bytes [NP];
    int aw0;
    real rate [4][NP];
    int  awake [4];
    mod_out_ready = '1;
    mod_out_bypass = '0;
    mod_in_bypass  = '0;
    mod_in_valid  = '0;
    mod_in_data   = '0;
    for (int p = 0; p < NP; p++) begin
      flow_on[p] = 0; tx_idx[p] = 0; seq_tx[p] = 0; seq_rx[p] = 0; rx_bytes[p] = 0; rx_idx[p] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // the CPU port sets VCI 40+d -> port d in MICs 1, 3 and 5
    for (int t = 1; t < 6; t += 2)
      txq[0].push_back(make_cell(MGMT_VCI_BASE + 16'(t), OP_SET_VCI, 8'h00, 8'(40 + t + 1),
                                 {1'b1, 4'b0, 3'(t + 1)}));
    repeat (600) @(posedge clk);

    for (int n = 0; n <= 3; n++) begin
      for (int k = 0; k < n; k++) flow_on[1 + 2 * k] = 1;
      repeat (400) @(posedge clk);                 // reach the steady state
      for (int p = 0; p < NP; p++) base_bytes[p] = rx_bytes[p];
      aw0 = awake_cycles;
      repeat (WINDOW) @(posedge clk);
      awake[n] = awake_cycles - aw0;
      for (int p = 0; p < NP; p++) rate[n][p] = real'(rx_bytes[p] - base_bytes[p]) / WINDOW;
      $display("%0d flow(s): bytes/clock at ports 2,4,6 = %0.3f %0.3f %0.3f; awake MIC-cycles %0d",
               n, rate[n][2], rate[n][4], rate[n][6], awake[n]);
      for (int k = 0; k < 3; k++) begin
        if (k < n) begin
          check(rate[n][2 + 2 * k] >= 0.8, $sformatf("flow %0d rate %0.3f", k, rate[n][2 + 2 * k]));
          check(rate[n][2 + 2 * k] - rate[1][2] < 0.01 && rate[1][2] - rate[n][2 + 2 * k] < 0.01,
                "disjoint flows do not slow each other");
        end else begin
          check(rate[n][2 + 2 * k] == 0.0, "no traffic on an idle flow");
        end
      end
      check(awake[n] <= 2 * n * WINDOW && awake[n] >= 2 * n * WINDOW - 4 * n,
            $sformatf("%0d flows keep %0d MIC-cycles awake", n, awake[n]));
    end
    check(awake[0] == 0, "no traffic: every MIC asleep");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
