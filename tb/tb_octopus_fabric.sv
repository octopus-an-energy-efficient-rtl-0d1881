// tb_octopus_fabric: self-checking test of the switching fabric through its
// MIC-side register interface. The testbench acts as the MICs: it sets up a
// connection (address and request, request seen in the destination's
// status with attention raised, acknowledge, ack at the source), streams a
// 53-byte cell and checks it arrives one cycle later, releases it with done,
// then runs four connections in parallel, checks that a busy port's request
// is hidden and that crossing acknowledges (half duplex) are refused, and
// checks the sleep bit and the clock enable.
module tb_octopus_fabric;
  import octopus_pkg::*;
  localparam int NP = N_PORTS;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        [NP-1:0]      in_addr_we, in_ctrl_we, out_ctrl_we, tx_valid, rx_valid;
  logic        [NP-1:0][2:0] in_addr;
  in_ctrl_t    [NP-1:0]      in_ctrl;
  in_status_t  [NP-1:0]      in_status;
  out_ctrl_t   [NP-1:0]      out_ctrl;
  out_status_t [NP-1:0]      out_status;
  logic        [NP-1:0][7:0] tx_data, rx_data;
  logic        [NP-1:0]      wake_req, attention, mic_clk_en;

  octopus_fabric dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic clear_strobes();
    in_addr_we = '0; in_ctrl_we = '0; out_ctrl_we = '0;
  endtask

  task automatic request(input int s, input int d);
    in_addr_we[s] = 1; in_addr[s] = 3'(d);
    in_ctrl_we[s] = 1; in_ctrl[s] = '{sleep: 1'b0, req: 1'b1};
  endtask

  task automatic ack(input int d, input int s);
    out_ctrl_we[d] = 1; out_ctrl[d] = '{ack: 1'b1, ack_src: 3'(s), done: 1'b0};
  endtask

  task automatic done(input int d);
    out_ctrl_we[d] = 1; out_ctrl[d] = '{ack: 1'b0, ack_src: 3'd0, done: 1'b1};
  endtask

  task automatic withdraw(input int s);
    in_ctrl_we[s] = 1; in_ctrl[s] = '{sleep: 1'b0, req: 1'b0};
  endtask

  // stream one cell from every source in srcs to the matching destination
  task automatic stream(input int srcs [4], input int dsts [4], input int n);
    for (int i = 0; i <= CELL_BYTES; i++) begin
      @(negedge clk);
      clear_strobes();
      for (int k = 0; k < n; k++) begin
        // bytes sent in the previous cycle must be at the destination now
        if (i > 0) check(rx_valid[dsts[k]] && rx_data[dsts[k]] == 8'(srcs[k] * 40 + i - 1),
                         $sformatf("byte %0d of %0d->%0d", i - 1, srcs[k], dsts[k]));
        tx_valid[srcs[k]] = (i < CELL_BYTES);
        tx_data[srcs[k]]  = 8'(srcs[k] * 40 + i);
      end
    end
    @(negedge clk);
    tx_valid = '0;
  endtask

  initial begin
    int srcs [4], dsts [4];
    clear_strobes();
    in_addr = '0; in_ctrl = '0; out_ctrl = '0; tx_data = '0; tx_valid = '0; wake_req = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(mic_clk_en == '1 && attention == '0, "after reset all MICs clocked, no attention");
    // all MICs go to sleep
    for (int p = 0; p < NP; p++) begin in_ctrl_we[p] = 1; in_ctrl[p] = '{sleep: 1'b1, req: 1'b0}; end
    @(negedge clk); clear_strobes();
    check(mic_clk_en == '0, "sleeping MICs have no clock");
    wake_req[6] = 1;
    #1;
    check(mic_clk_en == 8'h40 && attention == 8'h40, "module wake-up clocks its MIC");
    wake_req = '0;
    // one connection 1 -> 3
    request(1, 3);
    @(negedge clk); clear_strobes();
    @(negedge clk);
    check(out_status[3].req_vec == 8'h02 && attention[3] && mic_clk_en[3],
          "request stored at output 3, attention wakes MIC 3");
    ack(3, 1);
    @(negedge clk); clear_strobes();
    @(negedge clk);
    check(in_status[1].ack && out_status[3].conn_valid && out_status[3].conn_src == 3'd1 &&
          out_status[1].busy && out_status[3].busy, "connection 1->3 set up");
    srcs = '{1, 0, 0, 0}; dsts = '{3, 0, 0, 0};
    stream(srcs, dsts, 1);
    done(3);
    @(negedge clk); clear_strobes();
    @(negedge clk);
    check(in_status[1].done && !in_status[1].ack && !out_status[3].conn_valid && !out_status[1].busy,
          "connection released, done at source");
    check(out_status[3].req_vec == 8'h00, "served request not presented again");
    withdraw(1);
    @(negedge clk); clear_strobes();
    check(in_status[1] == '0, "status cleared");
    // four parallel connections: 0->1, 2->3, 4->5, 6->7
    for (int k = 0; k < 4; k++) request(2 * k, 2 * k + 1);
    @(negedge clk); clear_strobes();
    @(negedge clk);
    for (int k = 0; k < 4; k++) ack(2 * k + 1, 2 * k);
    @(negedge clk); clear_strobes();
    @(negedge clk);
    check(out_status[1].conn_valid && out_status[3].conn_valid && out_status[5].conn_valid &&
          out_status[7].conn_valid, "four connections in parallel");
    // a request to a busy source's destination is hidden
    request(5, 0);
    @(negedge clk); clear_strobes();
    @(negedge clk);
    check(out_status[0].req_vec == '0, "request of a busy port hidden");
    srcs = '{0, 2, 4, 6}; dsts = '{1, 3, 5, 7};
    stream(srcs, dsts, 4);
    for (int k = 0; k < 4; k++) done(2 * k + 1);
    @(negedge clk); clear_strobes();
    @(negedge clk);
    for (int k = 0; k < 4; k++) withdraw(2 * k);
    withdraw(5);
    @(negedge clk); clear_strobes();
    check(out_status[1].busy == 0 && out_status[7].busy == 0, "all released");
    // crossing acknowledges: 2 -> 4 and 4 -> 2 at once; only output 2 wins
    request(2, 4); request(4, 2);
    @(negedge clk); clear_strobes();
    @(negedge clk);
    ack(4, 2); ack(2, 4);
    @(negedge clk); clear_strobes();
    @(negedge clk);
    check(out_status[2].conn_valid && out_status[2].conn_src == 3'd4 && !out_status[4].conn_valid,
          "half duplex: the lower output wins, the other ack is refused");
    check(in_status[4].ack && !in_status[2].ack, "only source 4 acknowledged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
