// processing_unit: one 64-channel processing unit (PU) of the ROD.
//
// Chain: input_fpga (serial to parallel, parity check, joins the trigger
// record) -> dual-port input memory (MEM_DEPTH x 32, the derandomiser) ->
// of_engine (E for every channel, T and Q above threshold) -> output_fpga
// (fragment formatting) -> output FIFO (OUT_DEPTH x 32). The result stream of
// the engine also feeds the histograms, and its sample stream the calibration
// averager. A result leaves the engine only when both the formatter and the
// histogrammer can take it.
// busy is raised when the input memory is nearly full or the output FIFO has
// less room than one largest fragment (3 + 2*64 words).
// The chain of input FPGA, dual-port memory, processor, output FPGA and FIFO
// and both 32K x 32 sizes follow the source design; the processor is built
// as dedicated logic (see of_engine).
module processing_unit
  import rod_pkg::*;
#(
  parameter int unsigned PU_ID     = 0,
  parameter int unsigned MEM_DEPTH = 32768,
  parameter int unsigned OUT_DEPTH = 32768,
  parameter int unsigned N_MON     = 4,
  localparam int unsigned OAW      = $clog2(OUT_DEPTH),
  localparam int unsigned MW       = (N_MON > 1) ? $clog2(N_MON) : 1
) (
  input  logic                      clk,
  input  logic                      rst,
  // FEB data (8 lanes of 2 bits) and trigger records
  input  logic [2*LANES_PER_PU-1:0] lane_data,
  input  logic                      lane_valid,
  input  logic                      trig_valid,
  input  trig_rec_t                 trig,
  // configuration
  input  logic                      coef_we,
  input  logic [COEF_ADDR_BITS-1:0] coef_waddr,
  input  coef_t                     coef_wdata,
  input  logic signed [E_BITS-1:0]  eth,
  input  logic                      mon_en,
  input  logic [N_MON-1:0]          mon_sel,
  input  logic [N_MON-1:0][5:0]     mon_ch,
  input  logic                      hist_clear,
  input  logic [1:0]                hist_rd_sel,
  input  logic [MW-1:0]             hist_rd_mon,
  input  logic [7:0]                hist_rd_bin,
  output logic [31:0]               hist_rd_data,
  input  logic                      calib_en,
  input  logic                      calib_clear,
  input  logic [3:0]                calib_navg_log2,
  input  logic [5:0]                calib_rd_ch,
  input  logic [2:0]                calib_rd_s,
  output logic [15:0]               calib_rd_avg,
  output logic                      calib_done,
  // output FIFO read side
  input  logic                      out_rd_en,
  output logic [31:0]               out_rd_data,
  output logic                      out_empty,
  // status
  output logic                      busy,
  output logic [15:0]               drop_cnt,
  output logic [15:0]               proc_cycles,
  output logic [31:0]               n_mon_updates
);
  localparam int unsigned AW = $clog2(MEM_DEPTH);
  localparam int unsigned MAX_FRAG = 3 + 2 * CH_PER_PU;

  // input side
  logic          mem_we;
  logic [AW-1:0] mem_waddr, mem_raddr;
  logic [31:0]   mem_wdata, mem_rdata;
  logic [7:0]    ev_count;
  logic          ev_release, ev_start, in_busy;
  logic [15:0]   trig_lost_cnt;

  input_fpga #(.MEM_DEPTH(MEM_DEPTH)) u_in (
    .clk, .rst, .lane_data, .lane_valid, .trig_valid, .trig,
    .mem_we, .mem_addr(mem_waddr), .mem_wdata, .ev_count, .ev_release,
    .busy(in_busy), .drop_cnt, .trig_lost_cnt
  );

  dpram #(.WIDTH(32), .DEPTH(MEM_DEPTH)) u_mem (
    .clk, .wr_en(mem_we), .wr_addr(mem_waddr), .wr_data(mem_wdata),
    .rd_addr(mem_raddr), .rd_data(mem_rdata)
  );

  // processing
  logic        res_valid, res_ready, fmt_ready, hist_ready;
  of_result_t  res;
  logic        samp_valid;
  logic [5:0]  samp_ch;
  logic [2:0]  samp_s;
  logic [ADC_BITS-1:0] samp_adc;

  of_engine #(.MEM_DEPTH(MEM_DEPTH)) u_eng (
    .clk, .rst, .ev_count, .ev_release, .ev_start, .mem_addr(mem_raddr), .mem_rdata,
    .coef_we, .coef_waddr, .coef_wdata, .eth,
    .res_valid, .res, .res_ready, .samp_valid, .samp_ch, .samp_s, .samp_adc, .proc_cycles
  );

  assign res_ready = fmt_ready && hist_ready;

  logic [31:0] n_updates;
  histogrammer #(.N_MON(N_MON)) u_hist (
    .clk, .rst, .in_valid(res_valid && res_ready), .in(res), .ready(hist_ready),
    .mon_en, .mon_sel, .mon_ch, .clear(hist_clear),
    .rd_sel(hist_rd_sel), .rd_mon(hist_rd_mon), .rd_bin(hist_rd_bin), .rd_data(hist_rd_data),
    .n_updates, .n_mon_updates
  );

  logic [16:0] calib_n_events;
  logic        calib_clearing;
  calib_averager u_cal (
    .clk, .rst, .calib_en, .clear(calib_clear), .navg_log2(calib_navg_log2),
    .ev_start, .ev_done(ev_release), .samp_valid, .samp_ch, .samp_s, .samp_adc,
    .rd_ch(calib_rd_ch), .rd_s(calib_rd_s), .rd_avg(calib_rd_avg),
    .n_events(calib_n_events), .done(calib_done), .clearing(calib_clearing)
  );

  // output side
  logic        fifo_we, fifo_full;
  logic [31:0] fifo_wdata;
  logic [OAW:0] fifo_count;

  output_fpga #(.PU_ID(PU_ID)) u_out (
    .clk, .rst, .res_valid, .res, .res_ready(fmt_ready),
    .fifo_we, .fifo_wdata, .fifo_full
  );

  sync_fifo #(.WIDTH(32), .DEPTH(OUT_DEPTH)) u_fifo (
    .clk, .rst, .wr_en(fifo_we), .wr_data(fifo_wdata), .rd_en(out_rd_en),
    .rd_data(out_rd_data), .empty(out_empty), .full(fifo_full), .count(fifo_count)
  );

  assign busy = in_busy || (32'(OUT_DEPTH) - 32'(fifo_count) < 32'(MAX_FRAG));
endmodule
