// tb_control_unit: exhaustive self-checking test of the control unit.
// Every combination of sleep, pending requests, busy, ack, done and module
// wake-up is applied; attention and the MIC clock enable are compared with
// the rule: attention when there is work for the MIC, clock when it is not
// asleep or has attention.
module tb_control_unit;
  import octopus_pkg::*;

  logic               sleep, port_busy, wake_req, attention, mic_clk_en;
  logic [N_PORTS-1:0] req_vec;
  in_status_t         in_status;

  control_unit dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int v = 0; v < 64; v++) begin
      for (int r = 0; r < 3; r++) begin
        bit ea;
        sleep     = v[0];
        port_busy = v[1];
        in_status = '{ack: v[2], done: v[3]};
        wake_req  = v[4];
        req_vec   = v[5] ? N_PORTS'(1 << (r * 3)) : '0;
        #1;
        ea = wake_req || in_status.ack || in_status.done || (v[5] && !port_busy);
        checks++;
        if (attention != ea || mic_clk_en != (!sleep || ea)) begin
          failures++;
          $display("FAIL: case %0d: attention %0b clk_en %0b", v, attention, mic_clk_en);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
