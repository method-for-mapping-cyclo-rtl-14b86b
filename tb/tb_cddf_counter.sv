// tb_cddf_counter: random init / enable sequence against a software count.
// Checks the register output and the incrementer output every cycle, and
// the asynchronous reset.
module tb_cddf_counter;
  localparam int unsigned W = 4;
  localparam logic [W-1:0] INIT = 4'd5;

  logic clk = 1'b0, rst, init, en;
  logic [W-1:0] cnt, inc;
  int checks = 0, failures = 0;
  int unsigned model;

  cddf_counter #(.W(W), .INIT(INIT)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, int unsigned got, int unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init = 0; en = 0; rst = 1;
    #12 check("reset value", cnt, INIT);
    rst = 0;
    model = INIT;
    repeat (600) begin
      @(negedge clk);
      init = ($urandom_range(0, 15) == 0);
      en   = ($urandom_range(0, 3) != 0);
      check("inc", inc, (model + 1) % (1 << W));
      @(posedge clk);
      if (init) model = INIT;
      else if (en) model = (model + 1) % (1 << W);
      #1 check("cnt", cnt, model);
    end
    // asynchronous reset in mid-cycle
    @(negedge clk); init = 0; en = 1;
    #2 rst = 1; #1 check("async reset", cnt, INIT);
    rst = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
