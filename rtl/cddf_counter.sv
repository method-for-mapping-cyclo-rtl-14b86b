// cddf_counter: the counter element of a cyclo-dynamic dataflow graph.
//
// An increment node feeding a register delay that loops back to it. The
// node has an enable input and an initialisation input: init loads INIT
// (it has priority over en), en adds one, otherwise the register holds.
// Two outputs are brought out so both variants of the element exist:
//   cnt - taken from the register (counter with output from the register)
//   inc - taken from the increment node, i.e. cnt + 1, combinational
//         (counter with output from the incrementer)
// rst is an asynchronous, active-high reset to INIT, as the detector's
// pointer registers use. The counter wraps modulo 2**W.
// The element and its two variants follow the original design; the port names,
// INIT and the priority of init over en are this design's choices.
module cddf_counter #(
  parameter int unsigned W    = 4,
  parameter logic [W-1:0] INIT = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         init,
  input  logic         en,
  output logic [W-1:0] cnt,
  output logic [W-1:0] inc
);

  assign inc = cnt + W'(1);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)       cnt <= INIT;
    else if (init) cnt <= INIT;
    else if (en)   cnt <= inc;
  end

endmodule
