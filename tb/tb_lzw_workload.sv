// tb_lzw_workload: LZW decoding of text-like data at about 2:1 compression.
//
// Builds 150,000 bytes of text from a random vocabulary of 300 words of 2 to
// 9 lower-case letters separated by spaces, compresses it with a software
// LZW encoder (12-bit codes, 4096-entry dictionary), and decodes it with
// the decoder at its default size, input always valid and output always
// ready. Checks every output byte, that the compression ratio (input bits
// over 12-bit code bits) lies between 1.5 and 3, and that the decoder
// delivers at least 0.57 bytes per clock, the rate that 205 MB/s at
// 360 MHz corresponds to. Prints the measured rate.
module tb_lzw_workload;
  logic clk = 1'b0, rst, start;
  logic in_valid, in_ready, out_valid, out_ready, dict_full;
  logic [11:0] in_code;
  logic [7:0]  out_sym;
  int checks = 0, failures = 0;

  lzw_decompressor dut (.*);

  always #5 clk = ~clk;

  byte unsigned data[$];
  int codes[$];
  string vocab[300];

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dict[int];
    int w, nxt, ci, t, first, last, nout, key;
    string s;
    real ratio, rate;

    foreach (vocab[i]) begin
      vocab[i] = "";
      repeat ($urandom_range(2, 9)) vocab[i] = {vocab[i], string'(byte'($urandom_range(97, 122)))};
    end
    while (data.size() < 150000) begin
      s = vocab[$urandom_range(0, 299)];
      for (int i = 0; i < s.len(); i++) data.push_back(s[i]);
      data.push_back(8'h20);
    end

    nxt = 256; w = data[0];
    for (int i = 1; i < data.size(); i++) begin
      key = (w << 8) | data[i];
      if (dict.exists(key)) w = dict[key];
      else begin
        codes.push_back(w);
        if (nxt < 4096) begin dict[key] = nxt; nxt++; end
        w = data[i];
      end
    end
    codes.push_back(w);
    ratio = real'(8 * data.size()) / real'(12 * codes.size());

    rst = 1; start = 0; in_valid = 0; in_code = 0; out_ready = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    ci = 0; t = 0; first = -1; last = 0; nout = 0;
    while (nout < data.size() && t < 20 * data.size()) begin
      @(negedge clk);
      in_valid = (ci < codes.size());
      in_code  = (ci < codes.size()) ? 12'(codes[ci]) : '0;
      @(posedge clk);
      if (in_valid && in_ready) begin
        if (first < 0) first = t;
        ci++;
      end
      if (out_valid) begin
        checks++;
        if (out_sym != data[nout]) begin
          failures++;
          if (failures < 10) $display("FAIL byte %0d: got %h expected %h", nout, out_sym, data[nout]);
        end
        nout++;
        last = t;
      end
      t++;
    end
    rate = real'(nout) / real'(last - first + 1);
    $display("%0d bytes, %0d codes, compression %0.2f:1, %0.3f bytes per clock (%0.0f MB/s at 360 MHz)",
             data.size(), codes.size(), ratio, rate, rate * 360.0);
    checks++;
    if (nout != data.size()) begin
      failures++;
      $display("FAIL %0d bytes out of %0d", nout, data.size());
    end
    checks++;
    if (ratio < 1.5 || ratio > 3.0) begin
      failures++;
      $display("FAIL compression ratio %0.2f outside 1.5 .. 3", ratio);
    end
    checks++;
    if (rate < 0.57) begin
      failures++;
      $display("FAIL rate %0.3f bytes per clock below 0.57", rate);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
