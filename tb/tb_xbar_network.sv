// tb_xbar_network: self-checking test of the interconnection network.
// Random requests, acknowledges and dones are applied each cycle; a
// reference model of the connection rules (a port in at most one connection,
// requests from busy ports hidden, acknowledges honoured only for a live
// request with both ports free, lowest output first, done releases) predicts
// request routing, ack/done pulses, connection state and the data crossbar.
module tb_xbar_network;
  import octopus_pkg::*;
  localparam int NP = N_PORTS;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NP-1:0]          in_req, in_valid, ack_set, done_set, out_conn_valid, out_valid;
  logic [NP-1:0][2:0]     in_addr, out_conn_src, ack_src;
  logic [NP-1:0][7:0]     in_data, out_data;
  logic [NP-1:0][NP-1:0]  out_req;
  logic [NP-1:0]          ack_cmd, done_cmd, busy;

  xbar_network dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit m_cv [NP];
  int m_cs [NP];
  int n_conn = 0, n_refused = 0, n_max = 0;

  function automatic bit m_busy(input int p);
    for (int d = 0; d < NP; d++) if (m_cv[d] && (d == p || m_cs[d] == p)) return 1;
    return 0;
  endfunction

  initial begin
    in_req = 0; in_valid = 0; in_addr = 0; in_data = 0; ack_cmd = 0; ack_src = 0; done_cmd = 0;
    for (int d = 0; d < NP; d++) begin m_cv[d] = 0; m_cs[d] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      bit taken [NP];
      bit e_ack [NP], e_done [NP];
      int cnt;
      @(negedge clk);
      for (int p = 0; p < NP; p++) begin
        in_req[p]   = $urandom_range(0, 2) != 0;
        in_addr[p]  = 3'($urandom);
        in_data[p]  = 8'($urandom);
        in_valid[p] = 1'($urandom);
        ack_cmd[p]  = $urandom_range(0, 2) == 0;
        ack_src[p]  = $urandom_range(0, 1) ? in_addr[p] ^ 3'd1 : 3'($urandom);
        done_cmd[p] = $urandom_range(0, 5) == 0;
      end
      // let sources request the output that acks them sometimes
      for (int d = 0; d < NP; d++) if (ack_cmd[d] && $urandom_range(0, 1)) begin
        in_req[ack_src[d]] = 1; in_addr[ack_src[d]] = 3'(d);
      end
      #1;
      // combinational outputs
      for (int d = 0; d < NP; d++) begin
        for (int s = 0; s < NP; s++)
          check(out_req[d][s] == (in_req[s] && int'(in_addr[s]) == d && !m_busy(s) && s != d),
                $sformatf("request routing %0d->%0d", s, d));
        check(out_conn_valid[d] == m_cv[d] && (!m_cv[d] || int'(out_conn_src[d]) == m_cs[d]),
              $sformatf("connection state of %0d", d));
        check(out_valid[d] == (m_cv[d] && in_valid[m_cs[d]]) &&
              (!m_cv[d] || out_data[d] == in_data[m_cs[d]]), $sformatf("data to %0d", d));
        check(busy[d] == m_busy(d), $sformatf("busy %0d", d));
      end
      // model the next state
      for (int p = 0; p < NP; p++) begin taken[p] = m_busy(p); e_ack[p] = 0; e_done[p] = 0; end
      for (int d = 0; d < NP; d++) begin
        int s;
        s = int'(ack_src[d]);
        if (done_cmd[d] && m_cv[d]) begin
          m_cv[d] = 0; e_done[m_cs[d]] = 1;
        end else if (ack_cmd[d] && !m_cv[d]) begin
          if (in_req[s] && int'(in_addr[s]) == d && s != d && !taken[d] && !taken[s]) begin
            m_cv[d] = 1; m_cs[d] = s; taken[d] = 1; taken[s] = 1; e_ack[s] = 1; n_conn++;
          end else n_refused++;
        end
      end
      for (int p = 0; p < NP; p++)
        check(ack_set[p] == e_ack[p] && done_set[p] == e_done[p], $sformatf("ack/done to %0d", p));
      cnt = 0;
      for (int d = 0; d < NP; d++) cnt += int'(m_cv[d]);
      if (cnt > n_max) n_max = cnt;
    end
    check(n_conn > 50 && n_refused > 50, $sformatf("connections %0d refused %0d", n_conn, n_refused));
    check(n_max == NP / 2, $sformatf("max parallel connections %0d", n_max));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
