// rod_top: readout driver (ROD) module for 256 calorimeter channels.
//
// Two front-end boards send, per level-1 trigger, five 12-bit samples and a
// gain code for each of their 128 channels over a 32-bit, 40 MHz link. The
// data distributor splits each link into two 16-bit halves, one per
// processing unit (PU), so that four PUs handle 64 channels each. The TTC
// receiver turns level-1 accepts into trigger records for all four PUs. Each
// PU stores the event in its input memory, computes E for every channel and T
// and Q for channels above threshold, histograms them and writes a fragment to
// its output FIFO. The output controller joins the four fragments of an event
// into a full event in the output buffer (OB_DEPTH x 33) and sends it over
// the 32-bit ROB link, or, with out_vme set, leaves it in the buffer for the
// host to read over VME (vme_ob_*). The PU busy signals are ORed into Busy.
// Configuration and read-out ports stand where the VME interface would be:
// filter constants are written into the PU chosen by cfg_pu, which also
// selects the PU whose histogram and calibration averages are read; threshold,
// monitoring selection and modes are common to all PUs.
// Everything runs on the 40 MHz clock with a synchronous active-high reset.
// Block structure and sizes follow the source design; the word formats, the
// configuration ports, the output buffer depth and the single clock are this
// design's own.
module rod_top
  import rod_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = 32768,
  parameter int unsigned OUT_DEPTH = 32768,
  parameter int unsigned OB_DEPTH  = 8192,
  parameter int unsigned N_MON     = 4,
  localparam int unsigned MW       = (N_MON > 1) ? $clog2(N_MON) : 1,
  localparam int unsigned PW       = (N_PU > 1) ? $clog2(N_PU) : 1
) (
  input  logic                              clk,
  input  logic                              rst,
  // FEB links and VME test data
  input  logic [N_LINKS-1:0][LINK_BITS-1:0] feb_data,
  input  logic [N_LINKS-1:0]                feb_valid,
  input  logic                              src_vme,
  input  logic [N_LINKS-1:0][LINK_BITS-1:0] vme_data,
  input  logic [N_LINKS-1:0]                vme_valid,
  // TTC
  input  logic                              l1a,
  input  logic                              bcr,
  input  logic                              ecr,
  input  logic [7:0]                        ttype,
  output logic                              busy,
  // ROB link
  input  logic                              rob_xoff,
  output logic                              rob_valid,
  output logic                              rob_ctrl,
  output logic [31:0]                       rob_data,
  // output over VME instead of the ROB link
  input  logic                              out_vme,
  input  logic                              vme_ob_rd,
  output logic [32:0]                       vme_ob_data,
  output logic                              vme_ob_empty,
  // configuration and read-out
  input  logic [PW-1:0]                     cfg_pu,
  input  logic                              coef_we,
  input  logic [COEF_ADDR_BITS-1:0]         coef_waddr,
  input  coef_t                             coef_wdata,
  input  logic signed [E_BITS-1:0]          eth,
  input  logic                              mon_en,
  input  logic [N_MON-1:0]                  mon_sel,
  input  logic [N_MON-1:0][5:0]             mon_ch,
  input  logic                              hist_clear,
  input  logic [1:0]                        hist_rd_sel,
  input  logic [MW-1:0]                     hist_rd_mon,
  input  logic [7:0]                        hist_rd_bin,
  output logic [31:0]                       hist_rd_data,
  input  logic                              calib_en,
  input  logic                              calib_clear,
  input  logic [3:0]                        calib_navg_log2,
  input  logic [5:0]                        calib_rd_ch,
  input  logic [2:0]                        calib_rd_s,
  output logic [15:0]                       calib_rd_avg,
  output logic [N_PU-1:0]                   calib_done,
  // status
  output logic [N_PU-1:0][15:0]             drop_cnt,
  output logic [N_PU-1:0][15:0]             proc_cycles,
  output logic [N_PU-1:0][31:0]             n_mon_updates,
  output logic [31:0]                       n_events
);
  // distribution
  logic [N_PU-1:0][2*LANES_PER_PU-1:0] pu_data;
  logic [N_PU-1:0]                     pu_valid;

  data_distributor u_dist (
    .clk, .rst, .src_vme, .feb_data, .feb_valid, .vme_data, .vme_valid, .pu_data, .pu_valid
  );

  // TTC
  logic      trig_valid;
  trig_rec_t trig;
  ttc_rx u_ttc (.clk, .rst, .l1a, .bcr, .ecr, .ttype, .trig_valid, .trig);

  // processing units
  logic [N_PU-1:0]        pu_busy, frag_empty, frag_rd;
  logic [N_PU-1:0][31:0]  frag_data, pu_hist_data;
  logic [N_PU-1:0][15:0]  pu_calib_avg;

  for (genvar i = 0; i < int'(N_PU); i++) begin : g_pu
    processing_unit #(
      .PU_ID(i), .MEM_DEPTH(MEM_DEPTH), .OUT_DEPTH(OUT_DEPTH), .N_MON(N_MON)
    ) u_pu (
      .clk, .rst,
      .lane_data(pu_data[i]), .lane_valid(pu_valid[i]), .trig_valid, .trig,
      .coef_we(coef_we && cfg_pu == PW'(i)), .coef_waddr, .coef_wdata, .eth,
      .mon_en, .mon_sel, .mon_ch, .hist_clear, .hist_rd_sel, .hist_rd_mon, .hist_rd_bin,
      .hist_rd_data(pu_hist_data[i]),
      .calib_en, .calib_clear, .calib_navg_log2, .calib_rd_ch, .calib_rd_s,
      .calib_rd_avg(pu_calib_avg[i]), .calib_done(calib_done[i]),
      .out_rd_en(frag_rd[i]), .out_rd_data(frag_data[i]), .out_empty(frag_empty[i]),
      .busy(pu_busy[i]), .drop_cnt(drop_cnt[i]), .proc_cycles(proc_cycles[i]),
      .n_mon_updates(n_mon_updates[i])
    );
  end

  assign hist_rd_data = pu_hist_data[cfg_pu];
  assign calib_rd_avg = pu_calib_avg[cfg_pu];

  busy_or #(.N(N_PU)) u_busy (.clk, .rst, .busy_in(pu_busy), .busy);

  // event building and ROB link
  logic        ob_we, ob_rd, ob_full, ob_empty;
  logic [32:0] ob_wdata, ob_rdata;
  logic [$clog2(OB_DEPTH):0] ob_count;

  output_controller u_oc (
    .clk, .rst, .frag_data, .frag_empty, .frag_rd,
    .ob_we, .ob_wdata, .ob_full, .ob_rdata, .ob_empty, .ob_rd,
    .rob_xoff, .out_vme, .vme_rd(vme_ob_rd), .vme_data(vme_ob_data),
    .vme_empty(vme_ob_empty), .rob_valid, .rob_ctrl, .rob_data, .n_events
  );

  sync_fifo #(.WIDTH(33), .DEPTH(OB_DEPTH)) u_ob (
    .clk, .rst, .wr_en(ob_we), .wr_data(ob_wdata), .rd_en(ob_rd),
    .rd_data(ob_rdata), .empty(ob_empty), .full(ob_full), .count(ob_count)
  );
endmodule
