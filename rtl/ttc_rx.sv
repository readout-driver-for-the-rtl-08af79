// ttc_rx: trigger, timing and control receiver logic of the ROD module.
//
// Works on the already decoded TTC signals of the 40 MHz bunch clock. It keeps
// the bunch-crossing number (counts clock cycles, cleared by bunch counter
// reset, wraps after N_BUNCH crossings) and the level-1 event number (counts
// level-1 accepts, cleared by event counter reset). On every level-1 accept it
// emits, in the same cycle's registered output one clock later, a trigger record
// {l1id, bcid, ttype} that the processing units join to their FEB data.
// The source design names this receiver and says the trigger record carries the
// bunch crossing and trigger type; the counter behaviour, the 3564-crossing
// orbit and the trigger type arriving together with the accept are this
// design's choices.
module ttc_rx
  import rod_pkg::*;
#(
  parameter int unsigned N_BUNCH = 3564
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      l1a,        // level-1 accept
  input  logic      bcr,        // bunch counter reset
  input  logic      ecr,        // event counter reset
  input  logic [7:0] ttype,     // trigger type, valid with l1a
  output logic      trig_valid,
  output trig_rec_t trig
);
  logic [11:0] bcid;
  logic [23:0] l1id;

  always_ff @(posedge clk) begin
    if (rst) begin
      bcid       <= '0;
      l1id       <= '0;
      trig_valid <= 1'b0;
      trig       <= '0;
    end else begin
      if (bcr)                             bcid <= 12'd1;  // this cycle is crossing 0
      else if (bcid == 12'(N_BUNCH - 1))   bcid <= '0;
      else                                 bcid <= bcid + 1'b1;

      trig_valid <= l1a;
      if (l1a) begin
        trig.l1id  <= ecr ? '0 : l1id;
        trig.bcid  <= bcr ? '0 : bcid;
        trig.ttype <= ttype;
      end
      if (ecr)      l1id <= l1a ? 24'd1 : 24'd0;
      else if (l1a) l1id <= l1id + 1'b1;
    end
  end
endmodule
