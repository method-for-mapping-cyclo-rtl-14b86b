// tb_cddf_top: both datapaths end to end at their default sizes, at once.
//
// Detector: several rounds, each a start pulse (the first one in the middle
// of a word), then 400 random words (START, STOP, near misses, random
// letters) written with random gaps; the reported events must match the
// software classification of every word. LZW: three streams compressed in
// software (one with long runs, one long enough to fill the 4096-entry
// dictionary, one after a start, and a run of one byte 2.42 million long
// whose strings exceed half the stack RAM), fed with random input gaps and
// output back-pressure; the output must equal the original data.
// Every mechanism of both designs is counted and must occur: detector FSM
// waiting for a half-full FIFO, stall on an empty FIFO, START / STOP /
// error reports, restart; LZW special-case code, full dictionary, output
// back-pressure, restart, walker waiting for room in the stack RAM.
module tb_cddf_top;
  import cddf_pkg::*;

  logic clk = 1'b0, rst;
  logic det_start, det_ed, det_strt, det_stop, det_ok, det_err;
  sym_t det_di;
  logic lzw_start, lzw_in_valid, lzw_in_ready, lzw_out_valid, lzw_out_ready, lzw_dict_full;
  logic [11:0] lzw_in_code;
  logic [7:0]  lzw_out_sym;
  int checks = 0, failures = 0;
  bit det_done = 0, lzw_done = 0;

  cddf_top dut (.*);

  always #5 clk = ~clk;

  // mechanism counters
  int m_wait_full, m_stall, m_start_word, m_stop_word, m_error, m_det_restart;
  int m_kwk, m_dict_full, m_backpressure, m_lzw_restart, m_room_stall;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  // ------------------------------------------------------------ detector
  sym_t dq[$];
  int   exp_ev[$], got_ev[$];
  logic err_q = 1'b0;

  function automatic string pick_word();
    string lib[12] = '{"START", "STOP", "STAR", "STO", "S", "STARTS",
                       "STOPP", "SX", "XSTOP", "HELLO", "STAP", "STORT"};
    string w;
    if ($urandom_range(0, 4) != 0) return lib[$urandom_range(0, 11)];
    w = "";
    repeat ($urandom_range(1, 6)) w = {w, string'(byte'($urandom_range(65, 90)))};
    return w;
  endfunction

  always @(posedge clk) begin
    if (!rst) begin
      if (det_ok) got_ev.push_back(det_strt ? 1 : det_stop ? 2 : 0);
      if (det_err && !err_q) got_ev.push_back(3);
      err_q <= det_err;
      // internal views, used only to count mechanisms
      if (dut.u_det.u_fsm.st == ST_S1 && dut.u_det.empty == 1'b0 && !dut.u_det.full)
        m_wait_full++;
      if (!(dut.u_det.u_fsm.st inside {ST_S1, ST_R}) && dut.u_det.empty) m_stall++;
      if (det_ok && det_strt) m_start_word++;
      if (det_ok && det_stop) m_stop_word++;
      if (det_err && !err_q) m_error++;
    end
  end

  task automatic det_write_all(int pct);
    while (dq.size() > 0) begin
      @(negedge clk);
      det_ed = ($urandom_range(0, 99) < pct);
      det_di = dq[0];
      if (det_ed) void'(dq.pop_front());
    end
    @(negedge clk);
    det_ed = 0;
  endtask

  task automatic det_check();
    checks++;
    if (got_ev.size() != exp_ev.size())
      fail($sformatf("detector: %0d events, expected %0d", got_ev.size(), exp_ev.size()));
    for (int i = 0; i < exp_ev.size() && i < got_ev.size(); i++) begin
      checks++;
      if (got_ev[i] != exp_ev[i])
        fail($sformatf("detector event %0d: got %0d expected %0d", i, got_ev[i], exp_ev[i]));
    end
    exp_ev.delete(); got_ev.delete();
  endtask

  task automatic det_run();
    string w;
    for (int r = 0; r < 3; r++) begin
      // a word cut short by the start pulse
      dq.push_back(SYM_S); dq.push_back(SYM_T);
      det_write_all(100);
      @(negedge clk) det_start = 1;
      @(negedge clk) det_start = 0;
      m_det_restart++;
      repeat (400) begin
        w = pick_word();
        for (int i = 0; i < w.len(); i++) dq.push_back(sym_t'(w[i]));
        repeat ($urandom_range(1, 3)) dq.push_back(SYM_EPS);
        exp_ev.push_back(w == "START" ? 1 : w == "STOP" ? 2 : 3);
      end
      det_write_all(40 + 20 * r);
      repeat (60) @(negedge clk);
      det_check();
    end
    det_done = 1;
  endtask

  // ------------------------------------------------------------ LZW
  byte unsigned data[$], got[$];
  int codes[$];

  task automatic encode();
    int dict[int];
    int w, nxt;
    codes.delete();
    nxt = 256; w = data[0];
    for (int i = 1; i < data.size(); i++) begin
      int key = (w << 8) | data[i];
      if (dict.exists(key)) w = dict[key];
      else begin
        codes.push_back(w);
        if (nxt < 4096) begin dict[key] = nxt; nxt++; end
        w = data[i];
      end
    end
    codes.push_back(w);
    for (int j = 1; j < codes.size(); j++)
      if (255 + j < 4096 && codes[j] == 255 + j) m_kwk++;
  endtask

  task automatic lzw_stream(int pin, int pout, int slow_after = -1);
    int ci = 0, t = 0;
    @(negedge clk) lzw_start = 1;
    @(negedge clk) lzw_start = 0;
    m_lzw_restart++;
    encode();
    got.delete();
    while (got.size() < data.size() && t < 40 * data.size() + 2000000) begin
      @(negedge clk);
      lzw_in_valid  = (ci < codes.size()) && ($urandom_range(0, 99) < pin);
      lzw_in_code   = (ci < codes.size()) ? 12'(codes[ci]) : '0;
      lzw_out_ready = ($urandom_range(0, 99) < ((slow_after >= 0 && got.size() > slow_after) ? 3 : pout));
      @(posedge clk);
      if (lzw_in_valid && lzw_in_ready) ci++;
      if (lzw_out_valid && lzw_out_ready) got.push_back(lzw_out_sym);
      if (lzw_out_valid && !lzw_out_ready) m_backpressure++;
      if (lzw_dict_full) m_dict_full++;
      if (!dut.u_lzw.room) m_room_stall++;
      t++;
    end
    @(negedge clk) lzw_in_valid = 0;
    checks++;
    if (got.size() != data.size())
      fail($sformatf("LZW: %0d symbols out, expected %0d", got.size(), data.size()));
    for (int i = 0; i < got.size() && i < data.size(); i++) begin
      checks++;
      if (got[i] != data[i])
        fail($sformatf("LZW symbol %0d: got %h expected %h", i, got[i], data[i]));
    end
  endtask

  task automatic lzw_run();
    data.delete();
    while (data.size() < 2000) begin
      byte unsigned c = byte'($urandom_range(0, 3));
      repeat (($urandom_range(0, 7) == 0) ? $urandom_range(2, 12) : 1) data.push_back(c);
    end
    lzw_stream(100, 100);
    data.delete();
    repeat (60000) data.push_back(byte'($urandom));
    lzw_stream(85, 75);
    data.delete();
    repeat (3000) data.push_back(byte'($urandom_range(0, 7)));
    lzw_stream(70, 60);
    // one byte 2.42 million times: strings of over 2048 symbols, with the
    // output almost stalled over the last 50,000, meet in the stack RAM
    data.delete();
    repeat (2420000) data.push_back(8'h33);
    lzw_stream(100, 100, 2370000);
    lzw_done = 1;
  endtask

  // ------------------------------------------------------------ control
  initial begin
    repeat (12000000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; det_start = 0; det_ed = 0; det_di = 0;
    lzw_start = 0; lzw_in_valid = 0; lzw_in_code = 0; lzw_out_ready = 1;
    {m_wait_full, m_stall, m_start_word, m_stop_word, m_error, m_det_restart} = '0;
    {m_kwk, m_dict_full, m_backpressure, m_lzw_restart, m_room_stall} = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    fork
      det_run();
      lzw_run();
    join
    $display("detector: wait-for-full %0d, empty stalls %0d, START %0d, STOP %0d, errors %0d, restarts %0d",
             m_wait_full, m_stall, m_start_word, m_stop_word, m_error, m_det_restart);
    $display("LZW: special-case codes %0d, full-dictionary cycles %0d, back-pressure %0d, restarts %0d, stack-room stalls %0d",
             m_kwk, m_dict_full, m_backpressure, m_lzw_restart, m_room_stall);
    checks++; if (m_wait_full == 0)    fail("detector never waited for a half-full FIFO");
    checks++; if (m_stall == 0)        fail("detector FSM never stalled on an empty FIFO");
    checks++; if (m_start_word == 0)   fail("START never detected");
    checks++; if (m_stop_word == 0)    fail("STOP never detected");
    checks++; if (m_error == 0)        fail("no wrong word reported");
    checks++; if (m_det_restart == 0)  fail("detector never restarted");
    checks++; if (m_kwk == 0)          fail("LZW special case never used");
    checks++; if (m_dict_full == 0)    fail("LZW dictionary never full");
    checks++; if (m_backpressure == 0) fail("LZW output never back-pressured");
    checks++; if (m_lzw_restart == 0)  fail("LZW never restarted");
    checks++; if (m_room_stall == 0)   fail("LZW stacks never met");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
