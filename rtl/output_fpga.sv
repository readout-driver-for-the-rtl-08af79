// output_fpga: output formatter of a processing unit.
//
// Turns the result stream of the processing engine into an event fragment and
// writes it word by word into the unit's output FIFO (format in rod_pkg):
// two header words (trigger data, error flags, unit number), one word per
// channel with E, gain and channel number, a second word {T, Q} for each
// channel above threshold, and a trailer with the number of channels above
// threshold and the fragment's word count. One word is written per cycle; a
// two-word result holds res_ready low for one cycle. A full FIFO stalls it.
// Formatting into an output FIFO follows the source design; the word layout is
// this design's own.
module output_fpga
  import rod_pkg::*;
#(
  parameter int unsigned PU_ID = 0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        res_valid,
  input  of_result_t  res,
  output logic        res_ready,
  output logic        fifo_we,
  output logic [31:0] fifo_wdata,
  input  logic        fifo_full
);
  logic        phase;      // second word of a two-word result
  logic [15:0] wcount;     // words of the current fragment so far
  logic [7:0]  n_above;
  logic        two, last;

  always_comb begin
    logic [15:0] qs;
    qs = (res.q > 32'h0000_FFFF) ? 16'hFFFF : res.q[15:0];
    two = (res.kind == REC_HDR) || (res.kind == REC_CH && res.above);
    last = !two || phase;
    fifo_we = res_valid && !fifo_full;
    res_ready = fifo_we && last;
    fifo_wdata = '0;
    case (res.kind)
      REC_HDR: fifo_wdata = phase ? {res.err, res.trig.ttype, 4'(PU_ID), res.trig.bcid}
                                  : {FRAG_HDR_MARK, res.trig.l1id};
      REC_CH:  fifo_wdata = phase ? {res.t, qs}
                                  : {res.above, res.gain_mm, res.gain, res.ch, 2'b00, res.e};
      default: fifo_wdata = {FRAG_TRL_MARK, n_above, wcount + 16'd1};
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= 1'b0; wcount <= '0; n_above <= '0;
    end else if (fifo_we) begin
      phase <= !last;
      if (res.kind == REC_END) begin
        wcount <= '0; n_above <= '0;
      end else begin
        wcount <= wcount + 1'b1;
        if (res.kind == REC_CH && res.above && !phase) n_above <= n_above + 1'b1;
      end
    end
  end
endmodule
