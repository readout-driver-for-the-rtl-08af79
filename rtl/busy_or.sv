// busy_or: module busy signal.
//
// The busy outputs of the processing units are ORed into the single Busy line
// that throttles the level-1 trigger. The output is registered (one cycle).
// The OR follows the source design; the register is this design's choice.
module busy_or #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] busy_in,
  output logic         busy
);
  always_ff @(posedge clk) begin
    if (rst) busy <= 1'b0;
    else     busy <= |busy_in;
  end
endmodule
