// dpram: the dual-port input memory of a processing unit (32K x 32).
//
// Port A is written by the input FPGA, port B is read by the processing engine,
// so events are processed in place without a copy into processor memory.
// Both ports are synchronous: a write on port A lands at the clock edge, a read
// address on port B gives its data on rd_data one cycle later. A read and a
// write of the same address in the same cycle return the old contents.
// The size follows the source design; the single clock is this design's choice.
module dpram #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 32768,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end
endmodule
