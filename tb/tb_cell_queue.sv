// tb_cell_queue: self-checking test of the cell FIFO.
// Writes cells with random gaps and reads them with random stalls, checking
// data order, that a cell becomes readable only when complete, that a cell
// written with wr_drop on its last byte vanishes, back-pressure when both
// slots are full, head_vci, and one byte per cycle throughput. With
// cut_through set it checks that bytes of a cell are read before the cell is
// complete but never before its 4th byte, and that a held cell is never
// read early and can still be dropped.
module tb_cell_queue;
  import octopus_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]  wr_data, rd_data;
  logic        wr_valid, wr_ready, wr_drop, rd_valid, rd_ready, empty, space;
  logic        wr_hold, cut_through;
  logic [15:0] head_vci;

  cell_queue #(.CELLS(2)) dut (.clk, .rst_n, .en(1'b1), .wr_data, .wr_valid, .wr_ready,
                               .wr_drop, .wr_hold, .cut_through, .rd_data, .rd_valid, .rd_ready, .head_vci,
                               .empty, .space);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [7:0] pat(input int cn, input int i);
    if (i == 1) return 8'h00;
    if (i == 2) return 8'(cn);          // VCI = cn << 4
    if (i == 3) return 8'h00;
    return 8'(cn * 31 + i * 5);
  endfunction

  logic [7:0] exp_q [$];
  int n_written = 0;

  task automatic write_cell(input int cn, input bit drop);
    for (int i = 0; i < CELL_BYTES; i++) begin
      @(negedge clk);
      wr_valid = 1'b1;
      wr_data  = pat(cn, i);
      wr_drop  = drop && (i == CELL_BYTES - 1);
      while (!wr_ready) @(negedge clk);
      if (!drop) exp_q.push_back(pat(cn, i));
      @(posedge clk);
      @(negedge clk);
      wr_valid = 1'b0;
      wr_drop  = 1'b0;
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
  endtask

  // reader
  bit reader_on = 0;
  int n_read = 0;
  always @(posedge clk) begin
    if (rst_n && rd_valid && rd_ready && !force_rd) begin
      logic [7:0] e;
      e = exp_q.size() > 0 ? exp_q.pop_front() : 8'hxx;
      check(rd_data == e, $sformatf("read byte %0d: %h exp %h", n_read, rd_data, e));
      n_read++;
    end
  end
  bit force_rd = 0;
  always @(negedge clk) rd_ready = force_rd || (reader_on && ($urandom_range(0, 3) != 0));

  initial begin
    wr_valid = 0; wr_drop = 0; wr_data = 0; rd_ready = 0;
    wr_hold = 0; cut_through = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(empty && space && !rd_valid, "empty after reset");
    // partial cn is not readable
    for (int i = 0; i < 10; i++) begin
      @(negedge clk); wr_valid = 1; wr_data = pat(1, i); exp_q.push_back(pat(1, i));
    end
    @(negedge clk); wr_valid = 0;
    @(negedge clk);
    check(!rd_valid && !empty && !space, "partial cn not readable");
    for (int i = 10; i < CELL_BYTES; i++) begin
      @(negedge clk); wr_valid = 1; wr_data = pat(1, i); exp_q.push_back(pat(1, i));
    end
    @(negedge clk); wr_valid = 0;
    @(negedge clk);
    check(rd_valid, "complete cn readable");
    check(head_vci == 16'h0010, $sformatf("head vci %h", head_vci));
    // second cn fills the queue
    write_cell(2, 0);
    @(negedge clk);
    check(!wr_ready, "full queue refuses writes");
    // throughput: read 53 bytes back to back
    begin
      int t0, n;
      n = 0;
      t0 = 0;
      while (n < CELL_BYTES) begin
        @(negedge clk);
        check(rd_valid, "byte available every cycle");
        check(rd_data == exp_q.pop_front(), "back-to-back read data");
        force_rd = 1;
        n++;
        @(posedge clk);
        t0++;
      end
      @(negedge clk);
      force_rd = 0;
      check(t0 == CELL_BYTES, "one cell read in 53 cycles");
    end
    @(negedge clk);
    check(wr_ready, "slot freed after one cn read");
    check(head_vci == 16'h0020, $sformatf("head vci of cn 2: %h", head_vci));
    // dropped cn
    write_cell(3, 1);
    reader_on = 1;
    for (int c = 4; c < 12; c++) write_cell(c, c == 7);
    repeat (600) @(posedge clk);
    check(exp_q.size() == 0, $sformatf("%0d bytes not read", exp_q.size()));
    check(empty, "empty at the end");
    // cut-through: bytes leave before the cell is complete
    cut_through = 1;
    begin
      int r0;
      r0 = n_read;
      for (int i = 0; i < CELL_BYTES; i++) begin
        @(negedge clk); wr_valid = 1; wr_data = pat(20, i); exp_q.push_back(pat(20, i));
        if (i == 3) check(n_read == r0, "cut-through: nothing read before byte 4");
        if (i == 30) check(n_read > r0 && n_read - r0 < 30,
                           $sformatf("cut-through: %0d bytes read early", n_read - r0));
      end
      @(negedge clk); wr_valid = 0;
      repeat (200) @(posedge clk);
      check(n_read - r0 == CELL_BYTES, "cut-through cell read completely");
      check(empty, "empty after cut-through cell");
      // a held cell is never read early and is dropped
      r0 = n_read;
      wr_hold = 1;
      write_cell(21, 1);
      check(n_read == r0, "held cell not read early");
      wr_hold = 0;
      repeat (20) @(posedge clk);
      check(n_read == r0 && empty, "held cell dropped");
    end
    // a cell that will be dropped must be held, or its head leaks out
    for (int c = 22; c < 28; c++) begin
      wr_hold = (c == 25);
      write_cell(c, c == 25);
    end
    wr_hold = 0;
    repeat (600) @(posedge clk);
    check(exp_q.size() == 0, $sformatf("cut-through: %0d bytes not read", exp_q.size()));
    check(empty, "empty at the end of cut-through");
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
