// tb_cddf_ram: random writes and reads against a software array. The read
// port is combinational, so rdata is checked in the same cycle as raddr is
// applied, and a read of the word being written must show the old value.
module tb_cddf_ram;
  localparam int unsigned DEPTH = 16, W = 8, AW = 4;

  logic clk = 1'b0, we;
  logic [AW-1:0] waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] model [DEPTH];
  bit written [DEPTH];
  int checks = 0, failures = 0;

  cddf_ram #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    // fill every word once
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = W'($urandom);
      model[i] = wdata; written[i] = 1;
    end
    repeat (1000) begin
      @(negedge clk);
      we    = $urandom_range(0, 1);
      waddr = AW'($urandom);
      wdata = W'($urandom);
      raddr = ($urandom_range(0, 3) == 0) ? waddr : AW'($urandom);
      #1;
      checks++;
      if (rdata !== model[raddr]) begin
        failures++;
        $display("FAIL read addr %0d: got %h expected %h", raddr, rdata, model[raddr]);
      end
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
