// tb_seq_detector: the complete sequence detector (FIFO + FSM).
//
// Random word streams (START, STOP, near misses, random letters, one to
// three zero bytes between words) are written with random gaps in the data
// enable, so the FIFO sometimes runs empty and the FSM stalls. Each word
// is classified in software and the reported events (ok with strt / stop,
// rising edge of err) must match in order.
// Also checked: nothing is reported while fewer than 8 symbols have been
// written after start (the FSM waits for the FIFO to be half full), and a
// start pulse in the middle of a word discards it and re-arms that wait.
module tb_seq_detector;
  import cddf_pkg::*;

  logic clk = 1'b0, rst, start, ed;
  sym_t di;
  logic strt, stop, ok, err;
  int checks = 0, failures = 0;

  seq_detector dut (.*);

  always #5 clk = ~clk;

  sym_t q[$];
  int   exp_ev[$], got_ev[$];
  logic err_q = 1'b0;

  function automatic string pick_word();
    string lib[12] = '{"START", "STOP", "STAR", "STO", "S", "STARTS",
                       "STOPP", "SX", "XSTOP", "HELLO", "STAP", "STORT"};
    string w;
    int n;
    if ($urandom_range(0, 4) != 0) return lib[$urandom_range(0, 11)];
    n = $urandom_range(1, 6);
    w = "";
    for (int i = 0; i < n; i++) w = {w, string'(byte'($urandom_range(65, 90)))};
    return w;
  endfunction

  task automatic add_word(string w, bit expect_it = 1);
    for (int i = 0; i < w.len(); i++) q.push_back(sym_t'(w[i]));
    repeat ($urandom_range(1, 3)) q.push_back(SYM_EPS);
    if (expect_it) exp_ev.push_back(w == "START" ? 1 : w == "STOP" ? 2 : 3);
  endtask

  // event monitor
  always @(posedge clk) begin
    if (!rst) begin
      if (ok) got_ev.push_back(strt ? 1 : stop ? 2 : 0);
      if (err && !err_q) got_ev.push_back(3);
      err_q <= err;
    end
  end

  // write the queued symbols, each cycle with probability pct %
  task automatic write_all(int pct);
    while (q.size() > 0) begin
      @(negedge clk);
      ed = ($urandom_range(0, 99) < pct);
      di = q[0];
      if (ed) void'(q.pop_front());
    end
    @(negedge clk);
    ed = 0;
  endtask

  task automatic compare_events(string phase);
    checks++;
    if (got_ev.size() != exp_ev.size()) begin
      failures++;
      $display("FAIL %s: %0d events, expected %0d", phase, got_ev.size(), exp_ev.size());
    end
    for (int i = 0; i < exp_ev.size() && i < got_ev.size(); i++) begin
      checks++;
      if (got_ev[i] != exp_ev[i]) begin
        failures++;
        $display("FAIL %s event %0d: got %0d expected %0d", phase, i, got_ev[i], exp_ev[i]);
      end
    end
    exp_ev.delete(); got_ev.delete();
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; start = 0; ed = 0; di = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;

    // ---- phase 1: STOP and its separator are under the full level
    q.push_back(SYM_S); q.push_back(SYM_T); q.push_back(SYM_O); q.push_back(SYM_P);
    q.push_back(SYM_EPS); exp_ev.push_back(2);
    write_all(100);
    repeat (30) @(negedge clk);
    checks++;
    if (got_ev.size() != 0) begin
      failures++;
      $display("FAIL event before the FIFO was half full");
    end
    repeat (300) add_word(pick_word());
    write_all(55);
    repeat (60) @(negedge clk);
    compare_events("phase 1");

    // ---- phase 2: start in mid-word, then a new stream
    q.push_back(SYM_S); q.push_back(SYM_T); q.push_back(SYM_A);
    write_all(100);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    add_word("STOP");
    write_all(100);
    repeat (30) @(negedge clk);
    checks++;
    if (got_ev.size() != 0) begin
      failures++;
      $display("FAIL event after start before the FIFO was half full");
    end
    repeat (300) add_word(pick_word());
    write_all(70);
    repeat (60) @(negedge clk);
    compare_events("phase 2");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
