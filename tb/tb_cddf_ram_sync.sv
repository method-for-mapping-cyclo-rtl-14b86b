// tb_cddf_ram_sync: random writes and registered reads against a software
// array. rdata must show, one cycle after a read, the word as it was before
// any write in the read cycle (read-first), and must hold when re is low.
module tb_cddf_ram_sync;
  localparam int unsigned DEPTH = 64, W = 20, AW = 6;

  logic clk = 1'b0, we, re;
  logic [AW-1:0] waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] model [DEPTH];
  logic [W-1:0] expect_q;
  int checks = 0, failures = 0;

  cddf_ram_sync #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = W'($urandom);
      model[i] = wdata;
    end
    @(negedge clk);
    we = 0; re = 1; raddr = 0;
    @(posedge clk);
    expect_q = model[0];
    repeat (2000) begin
      @(negedge clk);
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        $display("FAIL rdata %h expected %h", rdata, expect_q);
      end
      we    = $urandom_range(0, 1);
      re    = ($urandom_range(0, 3) != 0);
      waddr = AW'($urandom);
      wdata = W'($urandom);
      raddr = ($urandom_range(0, 3) == 0) ? waddr : AW'($urandom);
      @(posedge clk);
      if (re) expect_q = model[raddr];
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
