// of_reader: first stage of the processing engine of a processing unit.
//
// Reads one event record from the dual-port input memory in place: the two
// header words and the trailer, then the five samples of each of the 64
// channels (channel by channel, one memory read per cycle). For each sample it
// fetches the filter constants of that channel, gain and sample from the
// coefficient memory and accumulates, with two multipliers,
//   E = sum a_i S_i   and   E*T = sum b_i S_i   (constants with COEF_FRAC
// fractional bits, results shifted down by COEF_FRAC).
// It pushes a header record (trigger data and error flags), one record per
// channel (E, E*T, samples and the pulse shape constants g_i, g'_i needed
// later for Q) and an end record into the record queue, then frees the event
// in the input memory (ev_release).
//
// Pipeline: address (cycle t) -> memory data and coefficient address (t+1) ->
// coefficients and multiply-accumulate (t+2). A channel takes 5 cycles, an
// event about 3 + 320 + 4 cycles when the queue does not stall it.
// A channel is started only when the queue has two free places (q_free).
// It also sends every sample to the calibration averager (samp_*).
// The formulas and the reading in place follow the source design; the
// pipeline, the constant memory layout and the error flags are this design's.
module of_reader
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
  input  logic [3:0]                q_free,
  output logic                      rec_push,
  output chan_rec_t                 rec,
  output logic                      samp_valid,
  output logic [5:0]                samp_ch,
  output logic [2:0]                samp_s,
  output logic [ADC_BITS-1:0]       samp_adc
);
  typedef enum logic [2:0] {R_IDLE, R_HDR, R_SMP, R_DRAIN, R_END} rstate_e;
  typedef enum logic [1:0] {K_H0, K_H1, K_TRL, K_SMP} kind_e;

  rstate_e st;
  logic [AW-1:0] base;
  logic [1:0]    hidx;
  logic [5:0]    ch;
  logic [2:0]    s;

  // ---------------- coefficient memory ----------------
  coef_t coef_mem [1 << COEF_ADDR_BITS];
  logic [COEF_ADDR_BITS-1:0] coef_raddr;
  coef_t coef_q;
  always_ff @(posedge clk) begin
    if (coef_we) coef_mem[coef_waddr] <= coef_wdata;
    coef_q <= coef_mem[coef_raddr];
  end

  // ---------------- issue stage ----------------
  logic  issue;
  kind_e issue_kind;
  always_comb begin
    issue = 1'b0; issue_kind = K_SMP; mem_addr = base;
    case (st)
      R_HDR: begin
        issue = 1'b1;
        issue_kind = kind_e'(hidx);
        mem_addr = (hidx == 2'd2) ? base + AW'(REC_TRL_OFS) : base + AW'(hidx);
      end
      R_SMP: begin
        issue = (s != 3'd0) || (q_free >= 4'd2);
        mem_addr = base + AW'(REC_HDR_WORDS) + AW'(s) * AW'(CH_PER_PU)
                 + AW'(ch % 6'(CH_PER_ADC)) * AW'(LANES_PER_PU) + AW'(ch / 6'(CH_PER_ADC));
      end
      default: ;
    endcase
  end

  // ---------------- pipeline registers ----------------
  logic       v1, v2;
  kind_e      k1;
  logic [5:0] ch1, ch2;
  logic [2:0] s1, s2;
  sample_word_t sw1, sw2;
  assign sw1 = sample_word_t'(mem_rdata);
  assign coef_raddr = {ch1, sw1.gain, s1};

  logic [31:0] hdr0, hdr1;
  logic signed [31:0] acc_e, acc_et, acc_e_nx, acc_et_nx;
  logic [N_SAMPLES-1:0][ADC_BITS-1:0]  s_keep;
  logic [N_SAMPLES-1:0][COEF_BITS-1:0] g_keep, gd_keep;
  logic [GAIN_BITS-1:0] gain0;
  logic gain_mm;

  always_comb begin
    logic signed [31:0] pa, pb;
    pa = 32'(coef_q.a) * $signed({1'b0, sw2.adc});
    pb = 32'(coef_q.b) * $signed({1'b0, sw2.adc});
    acc_e_nx  = (s2 == 3'd0 ? 32'sd0 : acc_e)  + pa;
    acc_et_nx = (s2 == 3'd0 ? 32'sd0 : acc_et) + pb;
  end

  // ---------------- record output ----------------
  logic [7:0] hdr_err;
  always_comb begin
    trig_rec_t tr;
    hdr_err = '0;
    hdr_err[ERR_HDR_MARK] = hdr0[31:24] != REC_HDR_MARK;
    hdr_err[ERR_TRL_MARK] = mem_rdata[31:24] != REC_TRL_MARK;
    hdr_err[ERR_PARITY]   = mem_rdata[15:0] != 16'h0;
    hdr_err[ERR_NO_TTC]   = mem_rdata[16];
    tr.l1id  = hdr0[23:0];
    tr.bcid  = hdr1[11:0];
    tr.ttype = hdr1[31:24];
    rec = '0;
    rec_push = 1'b0;
    if (v1 && k1 == K_TRL) begin
      rec_push  = 1'b1;
      rec.kind  = REC_HDR;
      rec.trig  = tr;
      rec.err   = hdr_err;
    end else if (v2 && s2 == 3'(N_SAMPLES - 1)) begin
      rec_push    = 1'b1;
      rec.kind    = REC_CH;
      rec.ch      = ch2;
      rec.gain    = gain0;
      rec.gain_mm = gain_mm || (sw2.gain != gain0);
      rec.e       = E_BITS'(acc_e_nx >>> COEF_FRAC);
      rec.et      = E_BITS'(acc_et_nx >>> COEF_FRAC);
      rec.s       = s_keep;
      rec.s[N_SAMPLES-1]  = sw2.adc;
      rec.g       = g_keep;
      rec.g[N_SAMPLES-1]  = coef_q.g;
      rec.gd      = gd_keep;
      rec.gd[N_SAMPLES-1] = coef_q.gd;
    end else if (st == R_END && q_free != 4'd0) begin
      rec_push = 1'b1;
      rec.kind = REC_END;
    end
  end

  assign samp_valid = v2;
  assign samp_ch    = ch2;
  assign samp_s     = s2;
  assign samp_adc   = sw2.adc;
  assign ev_start   = (st == R_IDLE) && (ev_count != 0) && (q_free >= 4'd2);
  assign ev_release = (st == R_END) && (q_free != 4'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= R_IDLE; base <= '0; hidx <= '0; ch <= '0; s <= '0;
      v1 <= 1'b0; v2 <= 1'b0; k1 <= K_H0; ch1 <= '0; ch2 <= '0; s1 <= '0; s2 <= '0;
      sw2 <= '0; hdr0 <= '0; hdr1 <= '0; acc_e <= '0; acc_et <= '0;
      s_keep <= '0; g_keep <= '0; gd_keep <= '0; gain0 <= '0; gain_mm <= 1'b0;
    end else begin
      // stage 1
      v1  <= issue;
      k1  <= issue_kind;
      ch1 <= ch;
      s1  <= s;
      // stage 2 (samples only)
      v2  <= v1 && k1 == K_SMP;
      ch2 <= ch1;
      s2  <= s1;
      sw2 <= sw1;
      if (v1 && k1 == K_H0) hdr0 <= mem_rdata;
      if (v1 && k1 == K_H1) hdr1 <= mem_rdata;
      if (v2) begin
        acc_e  <= acc_e_nx;
        acc_et <= acc_et_nx;
        s_keep[s2]  <= sw2.adc;
        g_keep[s2]  <= coef_q.g;
        gd_keep[s2] <= coef_q.gd;
        if (s2 == 3'd0) begin
          gain0   <= sw2.gain;
          gain_mm <= 1'b0;
        end else if (sw2.gain != gain0) begin
          gain_mm <= 1'b1;
        end
      end

      case (st)
        R_IDLE: if (ev_start) begin st <= R_HDR; hidx <= '0; end
        R_HDR: begin
          hidx <= hidx + 1'b1;
          if (hidx == 2'd2) begin st <= R_SMP; ch <= '0; s <= '0; end
        end
        R_SMP: if (issue) begin
          if (s == 3'(N_SAMPLES - 1)) begin
            s <= '0;
            if (ch == 6'(CH_PER_PU - 1)) st <= R_DRAIN;
            else ch <= ch + 1'b1;
          end else begin
            s <= s + 1'b1;
          end
        end
        R_DRAIN: if (!v1 && !v2) st <= R_END;
        R_END: if (q_free != 4'd0) begin
          st   <= R_IDLE;
          base <= base + AW'(REC_WORDS);
        end
        default: st <= R_IDLE;
      endcase
    end
  end
endmodule
