// calib_averager: signal averaging of the raw samples during calibration runs.
//
// While calibration is enabled, the samples of each event that starts after
// calib_en is seen are added into one accumulator per (channel, sample). After
// 2^navg_log2 events accumulation stops and done is raised; the host reads the
// average of any (channel, sample) as sum >> navg_log2 on rd_avg, one cycle
// after rd_ch/rd_s. clear zeroes the accumulators and the event count
// (64*8 cycles). The accumulate is a two-cycle read-modify-write, pipelined so
// that one sample per cycle is taken; consecutive samples of the reader always
// address different accumulators.
// The averaging task in calibration runs follows the source design; the
// power-of-two event count and the read-out port are this design's own.
module calib_averager
  import rod_pkg::*;
#(
  parameter int unsigned SUM_BITS = 32
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 calib_en,
  input  logic                 clear,
  input  logic [3:0]           navg_log2,
  input  logic                 ev_start,
  input  logic                 ev_done,
  input  logic                 samp_valid,
  input  logic [5:0]           samp_ch,
  input  logic [2:0]           samp_s,
  input  logic [ADC_BITS-1:0]  samp_adc,
  input  logic [5:0]           rd_ch,
  input  logic [2:0]           rd_s,
  output logic [15:0]          rd_avg,
  output logic [16:0]          n_events,
  output logic                 done,
  output logic                 clearing
);
  logic [SUM_BITS-1:0] acc [512];
  logic                active;
  logic [8:0]          clr_idx;

  // stage 1: read the accumulator
  logic                v1;
  logic [8:0]          a1;
  logic [ADC_BITS-1:0] x1;
  logic [SUM_BITS-1:0] sum1;

  assign done = n_events == (17'd1 << navg_log2);

  always_ff @(posedge clk) begin
    sum1 <= acc[{samp_ch, samp_s}];
    if (clearing)  acc[clr_idx] <= '0;
    else if (v1)   acc[a1] <= sum1 + SUM_BITS'(x1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      active <= 1'b0; n_events <= '0; clearing <= 1'b1; clr_idx <= '0;
      v1 <= 1'b0; a1 <= '0; x1 <= '0;
    end else begin
      v1 <= samp_valid && active && !clearing;
      a1 <= {samp_ch, samp_s};
      x1 <= samp_adc;
      if (clear) begin
        clearing <= 1'b1; clr_idx <= '0; n_events <= '0; active <= 1'b0;
      end else if (clearing) begin
        clr_idx <= clr_idx + 1'b1;
        if (clr_idx == 9'd511) clearing <= 1'b0;
      end else begin
        if (ev_start) active <= calib_en && !done;
        if (ev_done && active) begin
          n_events <= n_events + 1'b1;
          active   <= 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk) rd_avg <= 16'(acc[{rd_ch, rd_s}] >> navg_log2);
endmodule
