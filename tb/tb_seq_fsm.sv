// tb_seq_fsm: the detector FSM fed from a software FIFO.
//
// A random stream of words (START, STOP, near misses, random letters),
// separated by one to three zero bytes, is classified in software
// (START, STOP or error per word) and compared with what the FSM reports:
// an ok cycle with strt or stop, or a rising edge of err.
// Phase 1 pre-fills the whole stream and raises full, so the FSM is never
// starved: it must read one symbol every cycle and spend one extra cycle
// per recognised word and per wrong word that ends early, with no gap. Phase 2 pulses start in the middle of a word and
// checks that the FSM waits in S1 (no reads) until full, then detects a
// fresh stream, this time with gaps in which the FIFO is empty.
module tb_seq_fsm;
  import cddf_pkg::*;

  logic clk = 1'b0, rst, start, full, empty;
  sym_t symb;
  logic ipr, strt, stop, ok, err;
  int checks = 0, failures = 0;

  seq_fsm dut (.*);

  always #5 clk = ~clk;

  sym_t q[$];
  int   exp_ev[$], got_ev[$];
  logic err_q;
  int   n_recog, n_short;

  function automatic string pick_word();
    string lib[14] = '{"START", "STOP", "STAR", "STO", "S", "ST", "STARTS",
                       "STOPP", "SX", "XSTOP", "HELLO", "STAT", "STAP", "STORT"};
    string w;
    int n;
    if ($urandom_range(0, 4) != 0) return lib[$urandom_range(0, 13)];
    n = $urandom_range(1, 6);
    w = "";
    for (int i = 0; i < n; i++) w = {w, string'(byte'($urandom_range(65, 90)))};
    return w;
  endfunction

  // build a stream of nwords words; returns the number of symbols
  task automatic make_stream(int nwords);
    string w;
    for (int k = 0; k < nwords; k++) begin
      w = pick_word();
      for (int i = 0; i < w.len(); i++) q.push_back(sym_t'(w[i]));
      repeat ($urandom_range(1, 3)) q.push_back(SYM_EPS);
      if (w == "START")     begin exp_ev.push_back(1); n_recog++; end
      else if (w == "STOP") begin exp_ev.push_back(2); n_recog++; end
      else                        exp_ev.push_back(3);
      if (w inside {"S", "ST", "STA", "STAR", "STO"}) n_short++;
    end
  endtask

  // one clock: present the FIFO head, observe, pop on ipr
  task automatic cycle(output logic rd, input bit starve = 0);
    @(negedge clk);
    empty = (q.size() == 0) || starve;
    symb  = (q.size() != 0) ? q[0] : SYM_EPS;
    #1;
    if (ok) got_ev.push_back(strt ? 1 : stop ? 2 : 0);
    if (err && !err_q) got_ev.push_back(3);
    err_q = err;
    rd = ipr;
    checks++;
    if (ipr && empty) begin
      failures++;
      $display("FAIL read of an empty FIFO");
    end
    @(posedge clk);
    if (rd && !empty) void'(q.pop_front());
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
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic rd;
    int nsym, first, last, t, nread, tail;
    rst = 1; start = 0; full = 0; empty = 1; symb = 0; err_q = 0; n_recog = 0; n_short = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;

    // ---- phase 1: never starved, rate check
    make_stream(200);
    nsym = q.size();
    repeat (5) begin
      cycle(rd);
      checks++;
      if (rd) begin failures++; $display("FAIL read before full"); end
    end
    full = 1;
    first = -1; last = -1; t = 0; nread = 0;
    tail = 0;
    while (q.size() > 0 || tail < 3) begin
      if (q.size() == 0) tail++;
      cycle(rd);
      if (rd) nread++;
      if ((rd || ok || err) && first < 0) first = t;
      if (rd || ok || err) last = t;
      t++;
      if (t > 10 * nsym) break;
    end
    repeat (3) cycle(rd);
    compare_events("phase 1");
    checks++;
    if (nread != nsym || last - first + 1 != nsym + n_recog + n_short) begin
      failures++;
      $display("FAIL rate: %0d reads of %0d, span %0d cycles, expected %0d",
               nread, nsym, last - first + 1, nsym + n_recog + n_short);
    end

    // ---- phase 2: start in mid-word, then a starved stream
    exp_ev.delete(); got_ev.delete();
    q.push_back(SYM_S); q.push_back(SYM_T);
    cycle(rd);
    @(negedge clk); start = 1; full = 0;
    @(negedge clk); start = 0;
    q.delete();
    make_stream(100);
    repeat (10) begin
      cycle(rd);
      checks++;
      if (rd) begin failures++; $display("FAIL read in S1 before full"); end
    end
    full = 1;
    t = 0;
    tail = 0;
    while (q.size() > 0 || tail < 3) begin
      if (q.size() == 0) tail++;
      cycle(rd, $urandom_range(0, 2) == 0);
      if (++t > 20000) break;
    end
    repeat (3) cycle(rd);
    compare_events("phase 2");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
