// tb_input_section: self-checking test of a fabric input section.
// Checks the address and control registers, that a request is presented
// only while neither ack nor done is set, the ack -> done sequence of the
// status register, clearing by withdrawing the request, the sleep bit, and
// that data passes through in the same cycle.
module tb_input_section;
  import octopus_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        addr_we, ctrl_we, tx_valid, req, net_valid, ack_set, done_set, sleep;
  logic [2:0]  addr_wdata, req_addr;
  in_ctrl_t    ctrl_wdata;
  in_status_t  status;
  logic [7:0]  tx_data, net_data;

  input_section dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step();
    @(negedge clk);
    addr_we = 0; ctrl_we = 0; ack_set = 0; done_set = 0;
  endtask

  initial begin
    addr_we = 0; ctrl_we = 0; ack_set = 0; done_set = 0; tx_valid = 0; tx_data = 0;
    addr_wdata = 0; ctrl_wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!req && status == '0 && !sleep, "reset state");
    for (int a = 0; a < 8; a++) begin
      addr_we = 1; addr_wdata = 3'(7 - a);
      step();
      check(req_addr == 3'(7 - a), "address register");
    end
    ctrl_we = 1; ctrl_wdata = '{sleep: 1'b0, req: 1'b1};
    step();
    check(req && req_addr == 3'd0, "request presented");
    ack_set = 1;
    step();
    check(status.ack && !status.done && !req, "ack set, request withdrawn from network");
    repeat (3) step();
    check(status.ack, "ack holds");
    done_set = 1;
    step();
    check(!status.ack && status.done && !req, "done replaces ack");
    ctrl_we = 1; ctrl_wdata = '{sleep: 1'b0, req: 1'b0};
    step();
    check(status == '0 && !req, "withdrawing the request clears status");
    ctrl_we = 1; ctrl_wdata = '{sleep: 1'b1, req: 1'b0};
    step();
    check(sleep && !req, "sleep bit");
    ctrl_we = 1; ctrl_wdata = '{sleep: 1'b0, req: 1'b1};
    step();
    check(!sleep && req, "sleep cleared, new request");
    for (int i = 0; i < 20; i++) begin
      tx_data = 8'($urandom); tx_valid = 1'($urandom);
      #1;
      check(net_data == tx_data && net_valid == tx_valid, "data passes through");
      step();
    end
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
