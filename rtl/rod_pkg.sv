// rod_pkg: constants and record types shared by the readout driver (ROD).
//
// The ROD takes triggered calorimeter samples from two front-end boards (FEBs),
// 128 channels each, and computes per channel the energy E, and for E above a
// threshold the time T and a quality factor Q, by optimal filtering. The module
// holds four processing units (PUs) of 64 channels each.
//
// Numbers that follow the source design: 5 samples per channel, 12-bit ADC
// samples, 3 gain scales, 8 channels per ADC, 16 ADCs per FEB, 32 link bits per
// 25 ns (2 bits per ADC), 64 channels and 8 ADC lanes per PU, 4 PUs, 16-bit
// filter constants, 32K x 32 input memory and output FIFO per PU.
// Everything else here (word layouts, markers, fractional bits, histogram sizes)
// is this implementation's own choice and is documented where it is defined.
package rod_pkg;

  // ---------------- front end ----------------
  localparam int unsigned N_SAMPLES    = 5;    // samples per channel and event
  localparam int unsigned ADC_BITS     = 12;   // ADC resolution
  localparam int unsigned GAIN_BITS    = 2;    // gain scale code (3 scales used)
  localparam int unsigned N_GAINS      = 3;
  localparam int unsigned CH_PER_ADC   = 8;    // channels digitised by one ADC
  localparam int unsigned LANE_BITS    = 2;    // link bits per ADC per 25 ns
  localparam int unsigned LINK_BITS    = 32;   // FEB link word
  localparam int unsigned N_LINKS      = 2;    // FEBs per ROD
  localparam int unsigned N_PU         = 4;    // processing units per ROD
  localparam int unsigned LANES_PER_PU = 8;    // ADCs per PU (16 link bits)
  localparam int unsigned CH_PER_PU    = LANES_PER_PU * CH_PER_ADC;  // 64

  // One ADC word travels on its 2-bit lane as 8 symbols, most significant first:
  //   [15] even parity over the whole word, [14] reserved (0),
  //   [13:12] gain code, [11:0] ADC value.
  // Per event each lane carries N_SAMPLES*CH_PER_ADC = 40 words, sample-major:
  // word w = s*8 + c holds sample s of channel c of that ADC.
  localparam int unsigned ADC_WORD_BITS  = 16;
  localparam int unsigned SYM_PER_WORD   = ADC_WORD_BITS / LANE_BITS;      // 8
  localparam int unsigned WORDS_PER_LANE = N_SAMPLES * CH_PER_ADC;         // 40

  // ---------------- event record in the PU input memory ----------------
  //   word 0            : {REC_HDR_MARK, l1id[23:0]}
  //   word 1            : {ttype[7:0], 12'b0, bcid[11:0]}
  //   word 2 + s*64 + c*8 + lane : sample word (see sample_word_t)
  //   word 322          : {REC_TRL_MARK, 7'b0, ttc_missing, parity_errors[15:0]}
  localparam int unsigned REC_HDR_WORDS = 2;
  localparam int unsigned REC_SAMPLES   = CH_PER_PU * N_SAMPLES;           // 320
  localparam int unsigned REC_WORDS     = REC_HDR_WORDS + REC_SAMPLES + 1; // 323
  localparam int unsigned REC_TRL_OFS   = REC_HDR_WORDS + REC_SAMPLES;     // 322
  localparam logic [7:0]  REC_HDR_MARK  = 8'hEE;
  localparam logic [7:0]  REC_TRL_MARK  = 8'hEF;

  typedef struct packed {
    logic                 par_err;   // [31]
    logic [2:0]           sample;    // [30:28]
    logic [5:0]           ch;        // [27:22]
    logic [7:0]           rsvd;      // [21:14]
    logic [GAIN_BITS-1:0] gain;      // [13:12]
    logic [ADC_BITS-1:0]  adc;       // [11:0]
  } sample_word_t;

  // ---------------- trigger (TTC) record ----------------
  typedef struct packed {
    logic [23:0] l1id;    // level-1 event number
    logic [11:0] bcid;    // bunch crossing number
    logic [7:0]  ttype;   // trigger type
  } trig_rec_t;

  // ---------------- optimal filter arithmetic ----------------
  localparam int unsigned COEF_BITS = 16;  // filter constants (a, b, g, g')
  localparam int unsigned COEF_FRAC = 12;  // fractional bits of the constants
  localparam int unsigned E_BITS    = 20;  // E and E*T after scaling
  localparam int unsigned T_BITS    = 16;  // T, saturated
  localparam int unsigned Q_BITS    = 32;  // Q, saturated

  // One coefficient memory entry: constants for one (channel, gain, sample).
  typedef struct packed {
    logic signed [COEF_BITS-1:0] a;    // energy weight
    logic signed [COEF_BITS-1:0] b;    // energy*time weight
    logic signed [COEF_BITS-1:0] g;    // normalised pulse shape
    logic signed [COEF_BITS-1:0] gd;   // its time derivative
  } coef_t;
  localparam int unsigned COEF_ADDR_BITS = 6 + GAIN_BITS + 3; // {ch, gain, sample}

  // Record passed from the sample reader to the E/T/Q finisher inside a PU.
  typedef enum logic [1:0] {REC_HDR = 2'd0, REC_CH = 2'd1, REC_END = 2'd2} rec_kind_e;

  typedef struct packed {
    rec_kind_e                              kind;
    // header fields
    trig_rec_t                              trig;
    logic [7:0]                             err;      // event error flags
    // channel fields
    logic [5:0]                             ch;
    logic [GAIN_BITS-1:0]                   gain;
    logic                                   gain_mm;  // gains differ across samples
    logic signed [E_BITS-1:0]               e;
    logic signed [E_BITS-1:0]               et;
    logic [N_SAMPLES-1:0][ADC_BITS-1:0]     s;
    logic [N_SAMPLES-1:0][COEF_BITS-1:0]    g;
    logic [N_SAMPLES-1:0][COEF_BITS-1:0]    gd;
  } chan_rec_t;

  // Result of one record, as the output formatter and the histograms see it.
  typedef struct packed {
    rec_kind_e                kind;
    trig_rec_t                trig;
    logic [7:0]               err;
    logic [5:0]               ch;
    logic [GAIN_BITS-1:0]     gain;
    logic                     gain_mm;
    logic                     above;    // E > Eth: T and Q are valid
    logic signed [E_BITS-1:0] e;
    logic signed [T_BITS-1:0] t;
    logic [Q_BITS-1:0]        q;
  } of_result_t;

  // Event error flags (err field)
  localparam int unsigned ERR_HDR_MARK = 0;  // bad record header marker
  localparam int unsigned ERR_TRL_MARK = 1;  // bad record trailer marker
  localparam int unsigned ERR_PARITY   = 2;  // at least one ADC word had bad parity
  localparam int unsigned ERR_NO_TTC   = 3;  // FEB data arrived with no trigger record

  // ---------------- PU output fragment ----------------
  //   {FRAG_HDR_MARK, l1id}
  //   {err, ttype, pu_id[3:0], bcid}
  //   per channel: {above, gain_mm, gain, ch, 2'b0, E[19:0]}
  //                and, when above, {T[15:0], Q saturated to 16 bits}
  //   {FRAG_TRL_MARK, n_above[7:0], word count[15:0]}
  localparam logic [7:0] FRAG_HDR_MARK = 8'hB0;
  localparam logic [7:0] FRAG_TRL_MARK = 8'hE0;
  // ---------------- full event on the ROB link ----------------
  //   {EV_HDR_MARK, l1id}, the four fragments, {EV_TRL_MARK, 4'b0, l1id mismatch per PU, word count}
  localparam logic [7:0] EV_HDR_MARK = 8'hA0;
  localparam logic [7:0] EV_TRL_MARK = 8'hF0;

  function automatic logic [31:0] sat_u32(input logic [47:0] v);
    return (v > 48'hFFFF_FFFF) ? 32'hFFFF_FFFF : v[31:0];
  endfunction

endpackage
