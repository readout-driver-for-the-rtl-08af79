// tb_pkg: stimulus and reference model shared by the testbenches.
//
// Provides deterministic test data (filter constants and calorimeter samples
// derived from a hash of event, channel and sample numbers, so that any
// testbench can regenerate them), the encoding of ADC words for the FEB link,
// and an independent reference of the per-channel arithmetic:
//   E  = (sum a_i S_i) >>> 12,  ET = (sum b_i S_i) >>> 12,
//   T  = ET * floor(2^24/m) >>> (p+17) with E = m * 2^(p-7), saturated to 16 bits,
//   Q  = sum (S_i - (E * (g_i + (g'_i*T >>> 12)) >>> 12))^2, saturated to 32 bits,
// T and Q only when E > Eth and E > 0.
package tb_pkg;
  import rod_pkg::*;

  function automatic int unsigned hash(input int unsigned x);
    int unsigned h;
    h = x * 32'h9E3779B1;
    h = h ^ (h >> 15);
    h = h * 32'h85EBCA77;
    h = h ^ (h >> 13);
    return h;
  endfunction

  // pulse shape in units of 1/4096 at the five sampling times
  function automatic int shape(input int s);
    case (s)
      0: return 0;
      1: return 3300;
      2: return 3850;
      3: return 2200;
      default: return 900;
    endcase
  endfunction

  function automatic coef_t coef_of(input int ch, input int gain, input int s);
    coef_t c;
    int unsigned h;
    h = hash(ch * 97 + gain * 13 + s * 7 + 1);
    c.a  = 16'(shape(s) * 4096 / 7200 + int'(h % 64) - 32);   // ~ shape / sum(shape^2)
    c.b  = 16'(int'(hash(h) % 8192) - 4096);
    c.g  = 16'(shape(s));
    c.gd = 16'(int'(hash(h + 1) % 512) - 256);
    return c;
  endfunction

  // sample s of channel ch of a unit for event ev; some channels carry a pulse
  function automatic logic [13:0] sample_of(input int ev, input int pu, input int ch, input int s);
    int unsigned h, hn;
    int amp, v;
    int gain;
    h    = hash(ev * 1009 + pu * 131 + ch);
    gain = int'(h % 3);
    amp  = ((h >> 4) % 4 == 0) ? int'((h >> 8) % 3000) + 200 : int'((h >> 8) % 40);
    hn   = hash(h + s);
    v    = amp * shape(s) / 4096 + int'(hn % 16);
    if (v > 4095) v = 4095;
    return {2'(gain), 12'(v)};
  endfunction

  // ADC word on the link, with even parity in bit 15
  function automatic logic [15:0] adc_word(input logic [13:0] gs, input bit bad_parity);
    logic [15:0] w;
    w = {2'b00, gs};
    w[15] = (^w) ^ bad_parity;
    return w;
  endfunction

  typedef struct {
    int  e, et, t;
    longint q;
    bit  above;
  } ch_ref_t;

  function automatic ch_ref_t ref_channel(input logic [4:0][11:0] smp, input coef_t c [5],
                                          input int eth);
    ch_ref_t r;
    longint ae, aet, prod, qq;
    int p, m;
    longint recip;
    ae = 0; aet = 0;
    for (int i = 0; i < 5; i++) begin
      ae  += longint'(c[i].a) * longint'(smp[i]);
      aet += longint'(c[i].b) * longint'(smp[i]);
    end
    r.e  = int'(ae >>> 12);
    r.et = int'(aet >>> 12);
    r.above = (r.e > eth) && (r.e > 0);
    r.t = 0; r.q = 0;
    if (r.above) begin
      p = 0;
      for (int i = 0; i < 20; i++) if ((r.e >> i) & 1) p = i;
      m = (p >= 7) ? (r.e >> (p - 7)) : (r.e << (7 - p));
      recip = (64'd1 << 24) / longint'(m);
      prod  = (longint'(r.et) * recip) >>> (p + 17);
      if (prod > 32767) prod = 32767;
      if (prod < -32768) prod = -32768;
      r.t = int'(prod);
      qq = 0;
      for (int i = 0; i < 5; i++) begin
        longint pi, pred, d;
        pi   = longint'(c[i].g) + ((longint'(c[i].gd) * longint'(r.t)) >>> 12);
        pred = (longint'(r.e) * pi) >>> 12;
        d    = longint'(smp[i]) - pred;
        qq  += d * d;
      end
      r.q = (qq > 64'hFFFF_FFFF) ? 64'hFFFF_FFFF : qq;
    end
    return r;
  endfunction

  // Expected output fragment of unit pu for event ev (samples from sample_of
  // with the same pu number), filter constants from coef_of, threshold eth.
  // Returns the number of channels above threshold.
  function automatic int expected_fragment(input int ev, input int pu, input int eth,
                                           input trig_rec_t tr, input logic [7:0] err,
                                           ref logic [31:0] words[$]);
    int nab, n0;
    n0 = words.size();
    words.push_back({FRAG_HDR_MARK, tr.l1id});
    words.push_back({err, tr.ttype, 4'(pu), tr.bcid});
    nab = 0;
    for (int ch = 0; ch < 64; ch++) begin
      logic [4:0][11:0] smp;
      coef_t c [5];
      ch_ref_t x;
      logic [13:0] gs;
      for (int s = 0; s < 5; s++) begin
        gs = sample_of(ev, pu, ch, s);
        smp[s] = gs[11:0];
        c[s] = coef_of(ch, int'(gs[13:12]), s);
      end
      x = ref_channel(smp, c, eth);
      words.push_back({x.above, 1'b0, gs[13:12], 6'(ch), 2'b00, 20'(x.e)});
      if (x.above) begin
        words.push_back({16'(x.t), x.q > 64'hFFFF ? 16'hFFFF : 16'(x.q)});
        nab++;
      end
    end
    words.push_back({FRAG_TRL_MARK, 8'(nab), 16'(words.size() - n0 + 1)});
    return nab;
  endfunction
endpackage
