// recip_table: reciprocal look-up that replaces the division T = (E*T) / E.
//
// E is first normalised to an 8-bit mantissa m in 128..255 (its leading one at
// bit 7). The table returns floor(2^24 / m), an 18-bit value, one cycle after
// the index m[6:0] is presented. The caller then forms
// T = (E*T) * recip >>> (p + 17), p being the position of E's leading one.
// Using a look-up table for the division follows the source design; the table
// size and the normalisation are this design's choice. The contents are
// computed at elaboration from the formula above.
module recip_table #(
  parameter int unsigned RECIP_BITS = 18
) (
  input  logic                  clk,
  input  logic [6:0]            idx,     // m - 128
  output logic [RECIP_BITS-1:0] recip
);
  typedef logic [127:0][RECIP_BITS-1:0] table_t;

  function automatic table_t gen_table();
    table_t t;
    for (int i = 0; i < 128; i++) t[i] = RECIP_BITS'((64'd1 << 24) / 64'(128 + i));
    return t;
  endfunction

  localparam table_t TABLE = gen_table();

  always_ff @(posedge clk) recip <= TABLE[idx];
endmodule
