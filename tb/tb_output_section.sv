// tb_output_section: self-checking test of a fabric output section.
// Checks that requests are stored in the status register one cycle after
// they appear, that control writes reach the network for exactly one cycle
// one cycle after the write, that connection state and busy are reported,
// and that the synchroniser delays data and valid by one cycle.
module tb_output_section;
  import octopus_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               ctrl_we, rx_valid, conn_valid, busy, net_valid, ack_cmd, done_cmd;
  out_ctrl_t          ctrl_wdata;
  out_status_t        status;
  logic [7:0]         rx_data, net_data;
  logic [N_PORTS-1:0] req_in;
  logic [2:0]         conn_src, ack_src;

  output_section dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    ctrl_we = 0; ctrl_wdata = '0; req_in = 0; conn_valid = 0; conn_src = 0; busy = 0;
    net_data = 0; net_valid = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(status.req_vec == 0 && !ack_cmd && !done_cmd && !rx_valid, "reset state");
    for (int i = 0; i < 20; i++) begin
      logic [N_PORTS-1:0] r;
      r = N_PORTS'($urandom);
      req_in = r;
      @(negedge clk);
      check(status.req_vec == r, "request vector stored");
    end
    ctrl_we = 1; ctrl_wdata = '{ack: 1'b1, ack_src: 3'd5, done: 1'b0};
    #1;
    check(!ack_cmd, "command not yet at network");
    @(negedge clk);
    ctrl_we = 0;
    check(ack_cmd && ack_src == 3'd5 && !done_cmd, "ack command for one cycle");
    @(negedge clk);
    check(!ack_cmd, "ack command cleared");
    conn_valid = 1; conn_src = 3'd5; busy = 1;
    #1;
    check(status.conn_valid && status.conn_src == 3'd5 && status.busy, "connection in status");
    begin
      logic [7:0] d_prev; logic v_prev;
      d_prev = 0; v_prev = 0;
      for (int i = 0; i < 60; i++) begin
        net_data = 8'(i * 37 + 1); net_valid = (i % 7) != 3;
        #1;
        if (i > 0) check(rx_data == d_prev && rx_valid == v_prev, "synchroniser delays by one cycle");
        d_prev = net_data; v_prev = net_valid;
        @(negedge clk);
      end
    end
    net_valid = 0;
    ctrl_we = 1; ctrl_wdata = '{ack: 1'b0, ack_src: 3'd0, done: 1'b1};
    @(negedge clk);
    ctrl_we = 0;
    check(done_cmd && !ack_cmd, "done command");
    @(negedge clk);
    check(!done_cmd, "done command cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
