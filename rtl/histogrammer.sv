// histogrammer: general and monitoring histograms of a processing unit.
//
// For every channel result it increments the bin of E in the general E
// histogram and, for channels above threshold, the bins of T and Q in the
// general T and Q histograms. When monitoring is enabled (mon_en), a channel
// that matches one of the N_MON selected channels (mon_ch, mon_sel) also
// increments its own E histogram. Bins:
//   E bin = clamp(E >>> E_SHIFT, 0, NBINS-1)
//   T bin = clamp((T >>> T_SHIFT) + NBINS/2, 0, NBINS-1)
//   Q bin = min(Q >> Q_SHIFT, NBINS-1)
// An update is a read-modify-write over two cycles: in_valid is accepted only
// while ready is high. clear zeroes every bin (NBINS*N_MON cycles, ready low).
// A second read port serves the host: rd_sel 0/1/2/3 = E/T/Q/monitor slot
// rd_mon, bin rd_bin, data one cycle later; it does not disturb updates.
// That general histograms of E, T, Q and histograms of monitored cells are kept
// follows the source design; bin counts, scaling and slot count are this
// design's own choices.
module histogrammer
  import rod_pkg::*;
#(
  parameter int unsigned NBINS    = 256,
  parameter int unsigned N_MON    = 4,
  parameter int unsigned E_SHIFT  = 4,
  parameter int unsigned T_SHIFT  = 2,
  parameter int unsigned Q_SHIFT  = 8,
  parameter int unsigned CNT_BITS = 32,
  localparam int unsigned BW      = $clog2(NBINS),
  localparam int unsigned MW      = (N_MON > 1) ? $clog2(N_MON) : 1
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      in_valid,
  input  of_result_t                in,
  output logic                      ready,
  input  logic                      mon_en,
  input  logic [N_MON-1:0]          mon_sel,
  input  logic [N_MON-1:0][5:0]     mon_ch,
  input  logic                      clear,
  input  logic [1:0]                rd_sel,
  input  logic [MW-1:0]             rd_mon,
  input  logic [BW-1:0]             rd_bin,
  output logic [CNT_BITS-1:0]       rd_data,
  output logic [31:0]               n_updates,
  output logic [31:0]               n_mon_updates
);
  logic [CNT_BITS-1:0] h_e [NBINS];
  logic [CNT_BITS-1:0] h_t [NBINS];
  logic [CNT_BITS-1:0] h_q [NBINS];
  logic [CNT_BITS-1:0] h_m [NBINS*N_MON];

  typedef enum logic [1:0] {H_IDLE, H_UPD, H_CLR} hstate_e;
  hstate_e st;

  // ---- bin computation ----
  logic [BW-1:0] be, bt, bq;
  logic          mon_hit;
  logic [MW-1:0] mon_slot;
  always_comb begin
    logic signed [E_BITS-1:0] es;
    logic signed [T_BITS:0]   ts;
    logic [Q_BITS-1:0]        qs;
    es = in.e >>> E_SHIFT;
    ts = (T_BITS+1)'(in.t >>> T_SHIFT) + (T_BITS+1)'(NBINS / 2);
    qs = in.q >> Q_SHIFT;
    be = (es < 0) ? '0 : (es > E_BITS'(NBINS - 1)) ? BW'(NBINS - 1) : BW'(es);
    bt = (ts < 0) ? '0 : (ts > (T_BITS+1)'(NBINS - 1)) ? BW'(NBINS - 1) : BW'(ts);
    bq = (qs > Q_BITS'(NBINS - 1)) ? BW'(NBINS - 1) : BW'(qs);
    mon_hit = 1'b0; mon_slot = '0;
    for (int k = N_MON - 1; k >= 0; k--)
      if (mon_en && mon_sel[k] && mon_ch[k] == in.ch) begin
        mon_hit = 1'b1; mon_slot = MW'(k);
      end
  end

  wire take = in_valid && ready && in.kind == REC_CH;

  // ---- update pipeline ----
  logic [BW-1:0]     be_r, bt_r, bq_r;
  logic [BW+MW-1:0]  bm_r;
  logic              above_r, mon_r;
  logic [CNT_BITS-1:0] ce, ct, cq, cm;
  logic [BW+MW-1:0]  clr_idx;

  assign ready = (st == H_IDLE);

  always_ff @(posedge clk) begin
    // reads for the update (data used in H_UPD)
    ce <= h_e[be];
    ct <= h_t[bt];
    cq <= h_q[bq];
    cm <= h_m[(BW+MW)'(mon_slot) * (BW+MW)'(NBINS) + (BW+MW)'(be)];
    if (st == H_UPD) begin
      h_e[be_r] <= ce + 1'b1;
      if (above_r) begin
        h_t[bt_r] <= ct + 1'b1;
        h_q[bq_r] <= cq + 1'b1;
      end
      if (mon_r) h_m[bm_r] <= cm + 1'b1;
    end else if (st == H_CLR) begin
      h_m[clr_idx] <= '0;
      if (clr_idx < (BW+MW)'(NBINS)) begin
        h_e[BW'(clr_idx)] <= '0;
        h_t[BW'(clr_idx)] <= '0;
        h_q[BW'(clr_idx)] <= '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= H_IDLE; be_r <= '0; bt_r <= '0; bq_r <= '0; bm_r <= '0;
      above_r <= 1'b0; mon_r <= 1'b0; clr_idx <= '0; n_updates <= '0; n_mon_updates <= '0;
    end else begin
      case (st)
        H_IDLE: begin
          if (clear) begin
            st <= H_CLR; clr_idx <= '0; n_updates <= '0; n_mon_updates <= '0;
          end else if (take) begin
            be_r    <= be; bt_r <= bt; bq_r <= bq;
            bm_r    <= (BW+MW)'(mon_slot) * (BW+MW)'(NBINS) + (BW+MW)'(be);
            above_r <= in.above;
            mon_r   <= mon_hit;
            st      <= H_UPD;
          end
        end
        H_UPD: begin
          n_updates <= n_updates + 1'b1;
          if (mon_r) n_mon_updates <= n_mon_updates + 1'b1;
          st <= H_IDLE;
        end
        H_CLR: begin
          clr_idx <= clr_idx + 1'b1;
          if (clr_idx == (BW+MW)'(NBINS * N_MON - 1)) st <= H_IDLE;
        end
        default: st <= H_IDLE;
      endcase
    end
  end

  // ---- host read port ----
  always_ff @(posedge clk) begin
    case (rd_sel)
      2'd0:    rd_data <= h_e[rd_bin];
      2'd1:    rd_data <= h_t[rd_bin];
      2'd2:    rd_data <= h_q[rd_bin];
      default: rd_data <= h_m[(BW+MW)'(rd_mon) * (BW+MW)'(NBINS) + (BW+MW)'(rd_bin)];
    endcase
  end
endmodule
