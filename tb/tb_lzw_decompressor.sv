// tb_lzw_decompressor: LZW round trip.
//
// The testbench compresses random data with a software LZW encoder (12-bit
// codes, entries 256..4095, dictionary frozen when full), feeds the codes
// to the decoder and compares every output symbol with the original data.
// Stream 1: 600 bytes of a 4-letter alphabet with long runs (many codes of
//   the "code equals the next free code" case), input always valid and
//   output always ready; the cycle count from the first code accepted to
//   the last symbol out must match a cycle model of the walker and popper
//   FSMs (about L + 1 cycles per code of L symbols).
// Stream 2: 60000 bytes of a 16-letter alphabet, random gaps on in_valid
//   and out_ready; the dictionary fills up and must keep decoding.
// Stream 3: after start, a fresh 300-byte stream (dictionary reset).
// Stream 4: 2.42 million copies of one byte, giving strings of over 2048
//   symbols; over the last 50,000 the output is almost always stalled, so two
//   consecutive strings meet in the shared stack RAM and the walker must
//   wait for the popper.
module tb_lzw_decompressor;
  localparam int unsigned CODE_W = 12, SYM_W = 8;

  logic clk = 1'b0, rst, start;
  logic in_valid, in_ready, out_valid, out_ready, dict_full;
  logic [CODE_W-1:0] in_code;
  logic [SYM_W-1:0] out_sym;
  int checks = 0, failures = 0;

  lzw_decompressor #(.CODE_W(CODE_W), .SYM_W(SYM_W)) dut (.*);

  always #5 clk = ~clk;

  byte unsigned data[$], got[$];
  int codes[$], lens[$], kwkf[$];
  int n_kwk, run_kwk, n_full_cycles, n_room_stall;

  // software LZW encoder; also counts the codes that decode as the
  // "next free code" special case
  task automatic encode();
    int dict[int];
    int w, nxt, k;
    codes.delete(); lens.delete();
    nxt = 256; w = data[0]; k = 1;
    for (int i = 1; i < data.size(); i++) begin
      int key = (w << 8) | data[i];
      if (dict.exists(key)) begin
        w = dict[key]; k++;
      end else begin
        codes.push_back(w); lens.push_back(k);
        if (nxt < 4096) begin dict[key] = nxt; nxt++; end
        w = data[i]; k = 1;
      end
    end
    codes.push_back(w); lens.push_back(k);
    // decoder-side view: code j (j >= 1) is the special case when it equals
    // the entry the decoder is about to create
    run_kwk = 0;
    kwkf.delete();
    kwkf.push_back(0);
    for (int j = 1; j < codes.size(); j++) begin
      kwkf.push_back(255 + j < 4096 && codes[j] == 255 + j);
      run_kwk += kwkf[j];
    end
    n_kwk += run_kwk;
  endtask

  task automatic run(int pin, int pout, bit timed, int slow_after = -1);
    int t, first, last, ci, expect_cycles;
    got.delete();
    ci = 0; t = 0; first = -1; last = 0;
    while (got.size() < data.size()) begin
      @(negedge clk);
      in_valid  = (ci < codes.size()) && ($urandom_range(0, 99) < pin);
      in_code   = (ci < codes.size()) ? CODE_W'(codes[ci]) : '0;
      out_ready = ($urandom_range(0, 99) < ((slow_after >= 0 && got.size() > slow_after) ? 3 : pout));
      @(posedge clk);
      if (in_valid && in_ready) begin
        if (first < 0) first = t;
        ci++;
      end
      if (out_valid && out_ready) begin
        got.push_back(out_sym);
        last = t;
      end
      if (dict_full) n_full_cycles++;
      if (!dut.room) n_room_stall++;
      t++;
      if (t > 40 * data.size() + 2000000) break;
    end
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (got.size() != data.size()) begin
      failures++;
      $display("FAIL %0d symbols out, expected %0d", got.size(), data.size());
    end
    for (int i = 0; i < got.size() && i < data.size(); i++) begin
      checks++;
      if (got[i] != data[i]) begin
        failures++;
        if (failures < 10) $display("FAIL symbol %0d: got %h expected %h", i, got[i], data[i]);
      end
    end
    if (timed) begin
      // cycle model of the two FSMs: the walker accepts code k once it has
      // finished code k-1 and the popper has emptied the side code k-2 used;
      // it walks L symbols (L-1 after the special case's early push); the
      // popper pops a string once it is complete and the previous one is out
      int a, e, e_prev, f, f_prev, f_prev2;
      e_prev = -100; f_prev = -100; f_prev2 = -100;
      for (int k = 0; k < codes.size(); k++) begin
        a = (k == 0) ? 0 : ((e_prev + 1 > f_prev2 + 1) ? e_prev + 1 : f_prev2 + 1);
        e = a + lens[k] - kwkf[k];
        f = ((e + 1 > f_prev + 1) ? e + 1 : f_prev + 1) + lens[k] - 1;
        e_prev = e; f_prev2 = f_prev; f_prev = f;
      end
      expect_cycles = f_prev + 1;
      checks++;
      if (last - first != expect_cycles) begin
        failures++;
        $display("FAIL timing: %0d cycles, expected %0d", last - first, expect_cycles);
      end
      checks++;
      if (2 * (last - first) > 3 * data.size()) begin
        failures++;
        $display("FAIL rate: %0d cycles for %0d symbols", last - first, data.size());
      end
    end
  endtask

  initial begin
    repeat (12000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; start = 0; in_valid = 0; in_code = 0; out_ready = 1;
    n_kwk = 0; n_full_cycles = 0; n_room_stall = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;

    // stream 1
    data.delete();
    while (data.size() < 600) begin
      byte unsigned c = byte'($urandom_range(0, 3));
      repeat (($urandom_range(0, 7) == 0) ? $urandom_range(2, 12) : 1) data.push_back(c);
    end
    encode();
    run(100, 100, 1);
    checks++;
    if (n_kwk == 0) begin failures++; $display("FAIL special case never seen"); end

    // stream 2: dictionary fills
    data.delete();
    repeat (60000) data.push_back(byte'($urandom_range(0, 15) * 17));
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    encode();
    run(80, 70, 0);
    checks++;
    if (n_full_cycles == 0) begin failures++; $display("FAIL dictionary never full"); end

    // stream 3: after start, a fresh dictionary
    data.delete();
    repeat (300) data.push_back(byte'($urandom_range(0, 2) + 8'h41));
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    checks++;
    if (dict_full) begin failures++; $display("FAIL start did not clear the dictionary"); end
    encode();
    run(90, 90, 0);

    // stream 4: a run of one byte long enough that two consecutive strings
    // (over 2048 symbols each) do not fit the two stacks together while the
    // output is stalled
    data.delete();
    repeat (2420000) data.push_back(8'h5a);
    repeat (2000) data.push_back(byte'($urandom));
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    encode();
    run(100, 100, 0, 2370000);
    checks++;
    if (n_room_stall == 0) begin failures++; $display("FAIL the stacks never met"); end

    $display("stack-room stalls %0d", n_room_stall);
    $display("special-case codes %0d, cycles with full dictionary %0d", n_kwk, n_full_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
