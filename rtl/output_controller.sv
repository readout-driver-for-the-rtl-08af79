// output_controller: builds full events from the processing-unit fragments and
// drives the ROB link.
//
// Event building: once unit 0 holds a fragment header, the controller writes
// an event header {EV_HDR_MARK, l1id} into the output buffer and then copies
// the fragment of each unit in turn, 0 to N_PU-1, parsing it as it goes (two
// header words, one word per channel plus one more when the channel's
// above-threshold bit 31 is set, one trailer word). It compares every
// fragment's event number with unit 0's and ends the event with
// {EV_TRL_MARK, 4'b0, mismatch flags per unit, word count}. One word moves per
// cycle; an empty unit FIFO or a full output buffer stalls it. Output buffer
// words carry a control bit (bit 32) set on the event header and trailer.
// ROB link: while rob_xoff is low, one word of the output buffer is sent per
// cycle with rob_valid, its control bit on rob_ctrl (registered outputs).
// VME read-out: while out_vme is set the ROB link is silent and the host reads
// the output buffer instead: vme_data is the word at its head (33 bits),
// vme_empty says there is none, and vme_rd pops it.
// The event building into an output buffer of full events, the 32-bit 40 MHz
// link and output either to the ROB or over VME follow the source design; the
// formats, the unit order, the xoff flow control and the form of the VME read
// port are this design's own.
module output_controller
  import rod_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst,
  input  logic [N_PU-1:0][31:0]  frag_data,
  input  logic [N_PU-1:0]        frag_empty,
  output logic [N_PU-1:0]        frag_rd,
  output logic                   ob_we,
  output logic [32:0]            ob_wdata,
  input  logic                   ob_full,
  input  logic [32:0]            ob_rdata,
  input  logic                   ob_empty,
  output logic                   ob_rd,
  input  logic                   rob_xoff,
  input  logic                   out_vme,
  input  logic                   vme_rd,
  output logic [32:0]            vme_data,
  output logic                   vme_empty,
  output logic                   rob_valid,
  output logic                   rob_ctrl,
  output logic [31:0]            rob_data,
  output logic [31:0]            n_events
);
  localparam int unsigned PW = (N_PU > 1) ? $clog2(N_PU) : 1;
  typedef enum logic [2:0] {O_IDLE, O_H0, O_H1, O_CH, O_EXTRA, O_TRL, O_EVTRL} ostate_e;

  ostate_e       st;
  logic [PW-1:0] pu;
  logic [5:0]    ch;
  logic [23:0]   l1id_ref;
  logic [3:0]    mism;
  logic [15:0]   wcount;

  logic [31:0] w;
  logic        w_ok;
  assign w    = frag_data[pu];
  assign w_ok = !frag_empty[pu] && !ob_full;

  always_comb begin
    ob_we = 1'b0; ob_wdata = '0; frag_rd = '0;
    case (st)
      O_IDLE: if (!frag_empty[0] && !ob_full) begin
        ob_we = 1'b1; ob_wdata = {1'b1, EV_HDR_MARK, frag_data[0][23:0]};
      end
      O_H0, O_H1, O_CH, O_EXTRA, O_TRL: if (w_ok) begin
        ob_we = 1'b1; ob_wdata = {1'b0, w}; frag_rd[pu] = 1'b1;
      end
      O_EVTRL: if (!ob_full) begin
        ob_we = 1'b1; ob_wdata = {1'b1, EV_TRL_MARK, 4'h0, mism, wcount + 16'd1};
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= O_IDLE; pu <= '0; ch <= '0; l1id_ref <= '0; mism <= '0; wcount <= '0; n_events <= '0;
    end else begin
      if (ob_we) wcount <= wcount + 1'b1;
      case (st)
        O_IDLE: if (ob_we) begin
          l1id_ref <= frag_data[0][23:0];
          mism <= '0; pu <= '0; st <= O_H0;
          wcount <= 16'd1;
        end
        O_H0: if (w_ok) begin
          if (w[31:24] != FRAG_HDR_MARK || w[23:0] != l1id_ref) mism[pu] <= 1'b1;
          st <= O_H1;
        end
        O_H1: if (w_ok) begin ch <= '0; st <= O_CH; end
        O_CH: if (w_ok) begin
          if (w[31]) st <= O_EXTRA;
          else if (ch == 6'(CH_PER_PU - 1)) st <= O_TRL;
          else ch <= ch + 1'b1;
        end
        O_EXTRA: if (w_ok) begin
          if (ch == 6'(CH_PER_PU - 1)) st <= O_TRL;
          else begin ch <= ch + 1'b1; st <= O_CH; end
        end
        O_TRL: if (w_ok) begin
          if (w[31:24] != FRAG_TRL_MARK) mism[pu] <= 1'b1;
          if (pu == PW'(N_PU - 1)) st <= O_EVTRL;
          else begin pu <= pu + 1'b1; st <= O_H0; end
        end
        O_EVTRL: if (!ob_full) begin
          st <= O_IDLE;
          n_events <= n_events + 1'b1;
        end
        default: st <= O_IDLE;
      endcase
    end
  end

  // ROB link, or read-out over VME when out_vme is set
  assign ob_rd     = !ob_empty && (out_vme ? vme_rd : !rob_xoff);
  assign vme_data  = ob_rdata;
  assign vme_empty = ob_empty;
  always_ff @(posedge clk) begin
    if (rst) begin
      rob_valid <= 1'b0; rob_ctrl <= 1'b0; rob_data <= '0;
    end else begin
      rob_valid <= ob_rd && !out_vme;
      rob_ctrl  <= ob_rd && !out_vme && ob_rdata[32];
      rob_data  <= (ob_rd && !out_vme) ? ob_rdata[31:0] : '0;
    end
  end
endmodule
