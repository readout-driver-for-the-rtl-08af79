// input_fpga: input controller of a processing unit.
//
// Receives the unit's 16 FEB link bits (eight ADCs, two bits each) and the
// trigger records of the TTC receiver, and builds one event record per trigger
// in the dual-port input memory (layout in rod_pkg).
//
// Serial to parallel: each 2-bit lane shifts in one 16-bit ADC word every 8
// valid cycles, most significant symbol first. The eight words completed in the
// same cycle are staged and written to memory over the next 8 cycles, one per
// cycle, each tagged with sample, channel and its parity check (even parity
// over 16 bits). When the first symbol of an event arrives the oldest trigger
// record is taken from a queue and becomes the record header; the trailer
// holds the parity error count and a flag for a missing trigger record.
// Header and trailer take write cycles in the gaps between events: the link
// must idle at least 3 cycles between events (this design's assumption).
//
// Derandomiser: records sit in a circular buffer of MEM_DEPTH words, which
// holds MEM_DEPTH/REC_WORDS (101) events. ev_count is the number of complete
// records waiting; the engine frees the oldest with ev_release. busy goes high
// when at most BUSY_FREE record slots are left or the trigger queue is nearly
// full. An event that finds no free slot is dropped and counted in drop_cnt.
//
// The combination of FEB and TTC data into one record, the parity check and
// the dual-port memory as input buffer follow the source design; the word
// formats, the busy rule and the drop policy are this design's own.
module input_fpga
  import rod_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = 32768,
  parameter int unsigned BUSY_FREE = 2,
  parameter int unsigned TTC_DEPTH = 16,
  localparam int unsigned AW       = $clog2(MEM_DEPTH)
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic [2*LANES_PER_PU-1:0]   lane_data,
  input  logic                        lane_valid,
  input  logic                        trig_valid,
  input  trig_rec_t                   trig,
  output logic                        mem_we,
  output logic [AW-1:0]               mem_addr,
  output logic [31:0]                 mem_wdata,
  output logic [7:0]                  ev_count,
  input  logic                        ev_release,
  output logic                        busy,
  output logic [15:0]                 drop_cnt,
  output logic [15:0]                 trig_lost_cnt
);
  localparam int unsigned MAX_EV = MEM_DEPTH / REC_WORDS;

  // ---------------- trigger record queue ----------------
  localparam int unsigned TW = $bits(trig_rec_t);
  logic              tq_pop, tq_empty, tq_full;
  logic [TW-1:0]     tq_head;
  logic [$clog2(TTC_DEPTH):0] tq_count;
  trig_rec_t         tq_rec;
  assign tq_rec = trig_rec_t'(tq_head);

  sync_fifo #(.WIDTH(TW), .DEPTH(TTC_DEPTH)) u_tq (
    .clk, .rst,
    .wr_en(trig_valid && !tq_full), .wr_data(trig),
    .rd_en(tq_pop), .rd_data(tq_head),
    .empty(tq_empty), .full(tq_full), .count(tq_count)
  );

  // ---------------- deserialiser ----------------
  logic [LANES_PER_PU-1:0][ADC_WORD_BITS-1:0] shreg;
  logic [LANES_PER_PU-1:0][ADC_WORD_BITS-1:0] word_now;   // word completing this cycle
  logic [2:0] sym;
  logic [5:0] wc;                                         // ADC word index in the event

  always_comb begin
    for (int l = 0; l < int'(LANES_PER_PU); l++)
      word_now[l] = {shreg[l][ADC_WORD_BITS-3:0], lane_data[2*l +: 2]};
  end

  wire ev_start = lane_valid && sym == 3'd0 && wc == 6'd0;
  wire grp_done = lane_valid && sym == 3'(SYM_PER_WORD - 1);
  wire ev_done  = grp_done && wc == 6'(WORDS_PER_LANE - 1);

  // ---------------- record bookkeeping ----------------
  logic [AW-1:0] wr_base;      // base of the next record slot
  logic [AW-1:0] cur_base;     // base of the event being received
  logic          cur_drop;     // event being received is dropped
  logic [15:0]   cur_perr;
  logic          cur_nottc;
  logic [7:0]    in_flight;    // records started and not yet committed
  logic          slot_free;
  assign slot_free = (32'(ev_count) + 32'(in_flight)) < MAX_EV;
  assign tq_pop    = ev_start && !tq_empty;

  // staging of the 8 words completed together
  logic [LANES_PER_PU-1:0][31:0] stg;
  logic [AW-1:0] stg_addr;     // address of lane 0's word
  logic [3:0]    stg_left;     // words still to write
  logic [2:0]    stg_idx;
  logic          stg_drop;

  // pending header and trailer writes
  logic          hdr_pend;
  logic          hdr_idx;
  logic [AW-1:0] hdr_addr;
  logic [1:0][31:0] hdr_w;
  logic          trl_pend;
  logic [AW-1:0] trl_addr;
  logic [31:0]   trl_w;
  logic          trl_drop;     // trailer of a dropped event: commit nothing

  logic [3:0]    grp_perr;
  always_comb begin
    grp_perr = '0;
    for (int l = 0; l < int'(LANES_PER_PU); l++)
      grp_perr += 4'(^word_now[l]);
  end

  // write arbitration: staged samples, then trailer, then header
  logic do_stg, do_trl, do_hdr, commit;
  always_comb begin
    do_stg = stg_left != 0;
    do_trl = !do_stg && trl_pend;
    do_hdr = !do_stg && !trl_pend && hdr_pend;
    mem_we = 1'b0; mem_addr = '0; mem_wdata = '0;
    if (do_stg) begin
      mem_we    = !stg_drop;
      mem_addr  = stg_addr + AW'(stg_idx);
      mem_wdata = stg[stg_idx];
    end else if (do_trl) begin
      mem_we    = !trl_drop;
      mem_addr  = trl_addr;
      mem_wdata = trl_w;
    end else if (do_hdr) begin
      mem_we    = 1'b1;
      mem_addr  = hdr_addr + AW'(hdr_idx);
      mem_wdata = hdr_w[hdr_idx];
    end
    commit = do_trl && !trl_drop;
  end

  always_ff @(posedge clk) begin : seq
    logic drop_now;
    if (rst) begin
      shreg <= '0; sym <= '0; wc <= '0;
      wr_base <= '0; cur_base <= '0; cur_drop <= 1'b0; cur_perr <= '0; cur_nottc <= 1'b0;
      in_flight <= '0; ev_count <= '0;
      stg <= '0; stg_addr <= '0; stg_left <= '0; stg_idx <= '0; stg_drop <= 1'b0;
      hdr_pend <= 1'b0; hdr_idx <= 1'b0; hdr_addr <= '0; hdr_w <= '0;
      trl_pend <= 1'b0; trl_addr <= '0; trl_w <= '0; trl_drop <= 1'b0;
      drop_cnt <= '0; trig_lost_cnt <= '0;
    end else begin
      if (trig_valid && tq_full) trig_lost_cnt <= trig_lost_cnt + 1'b1;

      // ---- deserialiser counters ----
      if (lane_valid) begin
        shreg <= word_now;
        sym   <= sym + 1'b1;
        if (grp_done) wc <= ev_done ? '0 : wc + 1'b1;
      end

      // ---- header and trailer writes done (a new event below may re-arm) ----
      if (do_trl) trl_pend <= 1'b0;
      if (do_hdr) begin
        hdr_idx <= 1'b1;
        if (hdr_idx) hdr_pend <= 1'b0;
      end

      // ---- event start: claim a slot and take the trigger record ----
      drop_now = cur_drop;
      if (ev_start) begin
        drop_now  = !slot_free;
        cur_drop  <= !slot_free;
        cur_base  <= wr_base;
        cur_perr  <= '0;
        cur_nottc <= tq_empty;
        if (slot_free) begin
          wr_base  <= wr_base + AW'(REC_WORDS);
          hdr_pend <= 1'b1;
          hdr_idx  <= 1'b0;
          hdr_addr <= wr_base;
          hdr_w[0] <= tq_empty ? {REC_HDR_MARK, 24'h0} : {REC_HDR_MARK, tq_rec.l1id};
          hdr_w[1] <= tq_empty ? 32'h0 :
                      {tq_rec.ttype, 12'h0, tq_rec.bcid};
        end else begin
          drop_cnt <= drop_cnt + 1'b1;
        end
      end

      // ---- a group of eight ADC words is complete ----
      if (grp_done) begin
        for (int l = 0; l < int'(LANES_PER_PU); l++) begin
          sample_word_t sw;
          sw.par_err = ^word_now[l];
          sw.sample  = 3'(wc / 6'(CH_PER_ADC));
          sw.ch      = 6'(l * CH_PER_ADC) + 6'(wc % 6'(CH_PER_ADC));
          sw.rsvd    = '0;
          sw.gain    = word_now[l][ADC_BITS +: GAIN_BITS];
          sw.adc     = word_now[l][ADC_BITS-1:0];
          stg[l]     <= sw;
        end
        stg_addr <= (ev_start ? wr_base : cur_base) + AW'(REC_HDR_WORDS)
                    + AW'(wc / 6'(CH_PER_ADC)) * AW'(CH_PER_PU)
                    + AW'(wc % 6'(CH_PER_ADC)) * AW'(LANES_PER_PU);
        stg_left <= 4'(LANES_PER_PU);
        stg_idx  <= '0;
        stg_drop <= drop_now;
        cur_perr <= cur_perr + 16'(grp_perr);
        if (ev_done) begin
          trl_pend <= 1'b1;
          trl_drop <= drop_now;
          trl_addr <= cur_base + AW'(REC_TRL_OFS);
          trl_w    <= {REC_TRL_MARK, 7'h0, cur_nottc, cur_perr + 16'(grp_perr)};
        end
      end else if (do_stg) begin
        stg_left <= stg_left - 1'b1;
        stg_idx  <= stg_idx + 1'b1;
      end

      // ---- occupancy ----
      in_flight <= in_flight + 8'(ev_start && slot_free) - 8'(commit);
      ev_count  <= ev_count + 8'(commit) - 8'(ev_release);
    end
  end

  assign busy = ((32'(MAX_EV) - 32'(ev_count) - 32'(in_flight)) <= BUSY_FREE)
             || (32'(tq_count) >= TTC_DEPTH - 2);
endmodule
