// tb_mic_arbiter: self-checking test of the destination arbiter.
// Compares every grant with a reference model of the slot table (static
// scheduling for guaranteed sources) and round robin (ad-hoc sources),
// under random request vectors and random slot tables, and checks that an
// owned slot goes to another source when its owner does not request.
module tb_mic_arbiter;
  import octopus_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N_PORTS-1:0] req_vec;
  logic               grant_valid, grant_guaranteed, advance, slot_we, slot_valid;
  logic [2:0]         grant_src, advance_src, slot_src;
  logic [7:0]         slot_idx;

  mic_arbiter #(.SLOTS(8)) dut (.clk, .rst_n, .en(1'b1), .req_vec, .grant_valid, .grant_src,
                                .grant_guaranteed, .advance, .advance_src, .slot_we,
                                .slot_idx, .slot_valid, .slot_src);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit       m_sv [8];
  bit [2:0] m_ss [8];
  int       m_ptr = 0, m_rr = 0;
  int       n_reuse = 0, n_guar = 0;

  task automatic set_slot(input int i, input bit v, input int s);
    slot_we <= 1; slot_idx <= 8'(i); slot_valid <= v; slot_src <= 3'(s);
    @(posedge clk);
    slot_we <= 0;
    m_sv[i] = v; m_ss[i] = 3'(s);
  endtask

  initial begin
    req_vec = 0; advance = 0; advance_src = 0; slot_we = 0; slot_idx = 0; slot_valid = 0;
    slot_src = 0;
    for (int i = 0; i < 8; i++) begin m_sv[i] = 0; m_ss[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    set_slot(0, 1, 5); set_slot(3, 1, 2); set_slot(4, 1, 5);
    for (int k = 0; k < 2000; k++) begin
      bit ev; int es; bit eg;
      if (k % 500 == 499) set_slot($urandom_range(0, 7), $urandom_range(0, 1), $urandom_range(0, 7));
      req_vec = N_PORTS'($urandom);
      #1;
      ev = 0; es = 0; eg = 0;
      if (m_sv[m_ptr] && req_vec[m_ss[m_ptr]]) begin ev = 1; es = m_ss[m_ptr]; eg = 1; end
      else for (int j = 0; j < N_PORTS; j++) begin
        if (!ev && req_vec[(m_rr + j) % N_PORTS]) begin ev = 1; es = (m_rr + j) % N_PORTS; end
      end
      check(grant_valid == ev && (!ev || (grant_src == 3'(es) && grant_guaranteed == eg)),
            $sformatf("req %b ptr %0d: got %0b/%0d/%0b exp %0b/%0d/%0b", req_vec, m_ptr,
                      grant_valid, grant_src, grant_guaranteed, ev, es, eg));
      if (m_sv[m_ptr] && !req_vec[m_ss[m_ptr]] && ev) n_reuse++;
      if (eg) n_guar++;
      advance     <= ev && ($urandom_range(0, 3) != 0);
      advance_src <= 3'(es);
      @(posedge clk);
      if (advance) begin m_ptr = (m_ptr + 1) % 8; m_rr = (int'(advance_src) + 1) % N_PORTS; end
      advance <= 0;
    end
    check(n_reuse > 0 && n_guar > 0, "both guaranteed grants and slot reuse seen");
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
