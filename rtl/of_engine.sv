// of_engine: optimal-filter processing engine of one processing unit.
//
// Performs, in hardware, the per-event work that the source design assigns to
// the processing unit's DSP: check the event header, read the five samples and
// the gain of each channel, fetch the weights, compute E, and for E above the
// threshold compute T and Q (see of_reader and of_finisher). The two stages
// are decoupled by a 64-entry record queue (one full event), so the sample
// reading (5 cycles per channel, about 330 cycles per 64-channel event)
// overlaps with the T and Q work of channels above threshold however those
// channels are placed within the event.
// Interface: event availability and release towards the input FPGA, a read
// port on the dual-port memory, a write port for the filter constants, the
// threshold, a valid/ready result stream and a sample stream for calibration
// averaging. proc_cycles gives the cycles taken by the last event, from the
// start of its reading to the emission of its end record.
// Replacing the DSP's program by dedicated logic is this design's choice; the
// computation is the source design's.
module of_engine
  import rod_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = 32768,
  localparam int unsigned AW       = $clog2(MEM_DEPTH)
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [7:0]                ev_count,
  output logic                      ev_release,
  output logic                      ev_start,
  output logic [AW-1:0]             mem_addr,
  input  logic [31:0]               mem_rdata,
  input  logic                      coef_we,
  input  logic [COEF_ADDR_BITS-1:0] coef_waddr,
  input  coef_t                     coef_wdata,
  input  logic signed [E_BITS-1:0]  eth,
  output logic                      res_valid,
  output of_result_t                res,
  input  logic                      res_ready,
  output logic                      samp_valid,
  output logic [5:0]                samp_ch,
  output logic [2:0]                samp_s,
  output logic [ADC_BITS-1:0]       samp_adc,
  output logic [15:0]               proc_cycles
);
  localparam int unsigned QD = 64;
  logic       rec_push, rec_pop, q_empty, q_full;
  chan_rec_t  rec_w, rec_r;
  logic [6:0] q_count;
  logic [3:0] q_free;
  // free places, saturated at 15: the reader only needs to know "at least 2"
  assign q_free = (7'(QD) - q_count > 7'd15) ? 4'd15 : 4'(7'(QD) - q_count);

  of_reader #(.MEM_DEPTH(MEM_DEPTH)) u_reader (
    .clk, .rst, .ev_count, .ev_release, .ev_start, .mem_addr, .mem_rdata,
    .coef_we, .coef_waddr, .coef_wdata, .q_free,
    .rec_push, .rec(rec_w), .samp_valid, .samp_ch, .samp_s, .samp_adc
  );

  sync_fifo #(.WIDTH($bits(chan_rec_t)), .DEPTH(QD)) u_q (
    .clk, .rst, .wr_en(rec_push), .wr_data(rec_w), .rd_en(rec_pop), .rd_data(rec_r),
    .empty(q_empty), .full(q_full), .count(q_count)
  );

  of_finisher u_fin (
    .clk, .rst, .eth, .rec_empty(q_empty), .rec_in(rec_r), .rec_pop,
    .res_valid, .res, .res_ready
  );

  // processing time of the last event: a start stamp is queued when the
  // reader begins an event and compared with the time its end record leaves
  logic [15:0] now, stamp;
  logic        st_empty, st_full, end_fire;
  logic [2:0]  st_count;
  assign end_fire = res_valid && res_ready && res.kind == REC_END;

  sync_fifo #(.WIDTH(16), .DEPTH(4)) u_stamps (
    .clk, .rst, .wr_en(ev_start), .wr_data(now), .rd_en(end_fire && !st_empty),
    .rd_data(stamp), .empty(st_empty), .full(st_full), .count(st_count)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      now <= '0; proc_cycles <= '0;
    end else begin
      now <= now + 1'b1;
      if (end_fire) proc_cycles <= now - stamp + 1'b1;
    end
  end
endmodule
