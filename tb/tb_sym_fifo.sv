// tb_sym_fifo: random writes and reads against a software queue. Checks
// the head symbol, the full flag (level >= 8 of 16) and the empty flag
// every cycle, and that clr empties the FIFO. The driver never reads an
// empty FIFO and never writes more than 15 symbols ahead.
module tb_sym_fifo;
  localparam int unsigned DEPTH = 16, W = 8, FULL_LEVEL = 8;

  logic clk = 1'b0, rst, clr, ed, ipr;
  logic [W-1:0] di, symb;
  logic full, empty;
  logic [W-1:0] q [$];
  int checks = 0, failures = 0, n_full = 0, max_level = 0;

  sym_fifo #(.DEPTH(DEPTH), .W(W), .FULL_LEVEL(FULL_LEVEL)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, int unsigned got, int unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (level %0d)", what, got, exp, q.size());
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; clr = 0; ed = 0; ipr = 0; di = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // the write / read mix drifts so the level sweeps the whole range
      ed  = (q.size() < DEPTH - 1) && ($urandom_range(0, 99) < ((i / 200) % 2 ? 70 : 30));
      ipr = (q.size() > 0) && ($urandom_range(0, 99) < 50);
      di  = W'($urandom);
      clr = (i % 997 == 996);
      #1;
      check("empty", empty, q.size() == 0);
      check("full", full, q.size() >= FULL_LEVEL);
      if (q.size() > 0) check("symb", symb, q[0]);
      if (full) n_full++;
      if (q.size() > max_level) max_level = q.size();
      @(posedge clk);
      if (clr) q.delete();
      else begin
        if (ipr) void'(q.pop_front());
        if (ed) q.push_back(di);
      end
    end
    checks++;
    if (n_full == 0 || max_level < DEPTH - 1) begin
      failures++;
      $display("FAIL coverage: full cycles %0d max level %0d", n_full, max_level);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
