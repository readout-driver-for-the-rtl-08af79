// of_finisher: second stage of the processing engine of a processing unit.
//
// Takes the records of of_reader from the record queue in order. Header and end
// records pass straight through. For a channel record it compares E with the
// threshold Eth; only when E > Eth (and E > 0) does it compute
//   T = (E*T) / E, the division done with the reciprocal table: E is
//       normalised to an 8-bit mantissa m (leading one at bit 7, position p),
//       T = (E*T) * floor(2^24/m) >>> (p + 17), saturated to 16 bits;
//   Q = sum_i (S_i - E*(g_i + g'_i*T))^2, the chi-square without
//       correlations, one term per cycle, saturated to 32 bits; the products
//       g'_i*T and E*(...) are shifted down by COEF_FRAC.
// Timing: a channel below threshold takes 2 cycles, one above threshold
// 9 cycles (1 take, 1 normalise and look up, 1 multiply, 5 Q terms, 1 emit),
// plus any cycles res_ready is low. The result handshake is valid/ready.
// The formulas and the threshold rule follow the source design; the fixed
// point formats and the schedule are this design's own.
module of_finisher
  import rod_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [E_BITS-1:0] eth,
  input  logic                     rec_empty,
  input  chan_rec_t                rec_in,
  output logic                     rec_pop,
  output logic                     res_valid,
  output of_result_t               res,
  input  logic                     res_ready
);
  typedef enum logic [2:0] {F_IDLE, F_LOOK, F_T, F_Q, F_EMIT} fstate_e;
  fstate_e st;
  chan_rec_t r;
  logic [4:0] p;        // leading one position of E
  logic [2:0] qi;
  logic [63:0] qacc;

  // ---- normalisation of E ----
  logic [4:0] p_nx;
  logic [7:0] m_nx;
  always_comb begin
    p_nx = '0;
    for (int i = 0; i < int'(E_BITS); i++)
      if (r.e[i]) p_nx = 5'(i);
    if (p_nx >= 5'd7) m_nx = 8'(r.e >> (p_nx - 5'd7));
    else              m_nx = 8'(r.e << (5'd7 - p_nx));
  end

  logic [17:0] recip;
  recip_table u_recip (.clk, .idx(m_nx[6:0]), .recip);

  // ---- T from E*T and the reciprocal ----
  logic signed [T_BITS-1:0] t_nx;
  always_comb begin
    logic signed [39:0] prod, tq;
    prod = 40'(r.et) * $signed({1'b0, recip});
    tq   = prod >>> (p + 5'd17);
    if (tq > 40'sd32767)       t_nx = 16'sh7FFF;
    else if (tq < -40'sd32768) t_nx = -16'sh8000;
    else                       t_nx = T_BITS'(tq);
  end

  // ---- one Q term ----
  logic [63:0] qterm;
  always_comb begin
    logic signed [31:0] gdt;
    logic signed [20:0] pi;
    logic signed [40:0] pred;
    logic signed [41:0] d;
    gdt   = 32'($signed(r.gd[qi])) * 32'(res.t);
    pi    = 21'($signed(r.g[qi])) + 21'(gdt >>> COEF_FRAC);
    pred  = (41'(r.e) * 41'(pi)) >>> COEF_FRAC;
    d     = 42'($signed({1'b0, r.s[qi]})) - 42'(pred);
    qterm = 64'(d * d);
  end

  assign rec_pop   = (st == F_IDLE) && !rec_empty;
  assign res_valid = (st == F_EMIT);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= F_IDLE; r <= '0; p <= '0; qi <= '0; qacc <= '0; res <= '0;
    end else begin
      case (st)
        F_IDLE: if (!rec_empty) begin
          r          <= rec_in;
          res        <= '0;
          res.kind   <= rec_in.kind;
          res.trig   <= rec_in.trig;
          res.err    <= rec_in.err;
          res.ch     <= rec_in.ch;
          res.gain   <= rec_in.gain;
          res.gain_mm<= rec_in.gain_mm;
          res.e      <= rec_in.e;
          if (rec_in.kind == REC_CH && rec_in.e > eth && rec_in.e > 0) begin
            res.above <= 1'b1;
            st <= F_LOOK;
          end else begin
            st <= F_EMIT;
          end
        end
        F_LOOK: begin            // table read of m under way
          p  <= p_nx;
          st <= F_T;
        end
        F_T: begin
          res.t <= t_nx;
          qi    <= '0;
          qacc  <= '0;
          st    <= F_Q;
        end
        F_Q: begin
          qacc <= qacc + qterm;
          qi   <= qi + 1'b1;
          if (qi == 3'(N_SAMPLES - 1)) begin
            res.q <= ((qacc + qterm) > 64'hFFFF_FFFF) ? 32'hFFFF_FFFF : 32'(qacc + qterm);
            st    <= F_EMIT;
          end
        end
        F_EMIT: if (res_ready) st <= F_IDLE;
        default: st <= F_IDLE;
      endcase
    end
  end

  a_res_stable: assert property (@(posedge clk) disable iff (rst)
                                 res_valid && !res_ready |=> res_valid && $stable(res));
endmodule
