// tb_vci_table: self-checking test of the VCI mapping table.
// Fills entries from a reference model, checks lookups of known, unknown,
// invalidated and out-of-range VCIs (which must give the default port),
// and that writes are ignored while the enable is low.
module tb_vci_table;
  import octopus_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        en, we, wvalid, hit;
  logic [15:0] wvci, vci;
  logic [2:0]  wdest, dest;

  vci_table #(.IDX_BITS(6)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit       m_valid [64];
  bit [2:0] m_dest  [64];

  task automatic wr(input logic [15:0] v, input bit val, input logic [2:0] d);
    @(negedge clk);
    we = 1; wvci = v; wvalid = val; wdest = d;
    @(negedge clk);
    we = 0;
    if (en && v < 64) begin m_valid[v] = val; m_dest[v] = d; end
  endtask

  task automatic look(input logic [15:0] v);
    logic [2:0] e;
    @(negedge clk);
    vci = v;
    #1;
    e = (v < 64 && m_valid[v]) ? m_dest[v] : 3'(DEFAULT_PORT);
    check(dest == e && hit == (v < 64 && m_valid[v]),
          $sformatf("vci %0d -> %0d hit %0b, exp %0d", v, dest, hit, e));
  endtask

  initial begin
    en = 1; we = 0; wvci = 0; wvalid = 0; wdest = 0; vci = 0;
    for (int i = 0; i < 64; i++) begin m_valid[i] = 0; m_dest[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 64; i += 7) look(16'(i));
    for (int k = 0; k < 200; k++) wr(16'($urandom_range(0, 70)), $urandom_range(0, 3) != 0, 3'($urandom));
    for (int i = 0; i < 64; i++) look(16'(i));
    look(16'd64); look(16'd1000); look(16'hFFFF);
    wr(16'd64 + 16'd5, 1, 3'd6);   // out of range: must not alias entry 5
    look(16'd5);
    en = 0;
    wr(16'd9, 1, 3'd3);
    look(16'd9);
    en = 1;
    wr(16'd9, 1, 3'd3);
    look(16'd9);
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
