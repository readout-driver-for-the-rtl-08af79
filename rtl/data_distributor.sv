// data_distributor: spreads the two FEB links over the four processing units.
//
// Each FEB link delivers 32 bits every 25 ns, two bits per ADC. Bits 0:15 of a
// link (ADCs 0-7, 64 channels) go to one processing unit and bits 16:31
// (ADCs 8-15) to the next: link 0 feeds PUs 0 and 1, link 1 feeds PUs 2 and 3.
// As an alternative source, test data written over VME can replace the links
// (src_vme). Outputs are registered: one cycle of latency.
// The split follows the source design; the valid flags and the register stage
// are this design's choices.
module data_distributor
  import rod_pkg::*;
(
  input  logic                                  clk,
  input  logic                                  rst,
  input  logic                                  src_vme,
  input  logic [N_LINKS-1:0][LINK_BITS-1:0]     feb_data,
  input  logic [N_LINKS-1:0]                    feb_valid,
  input  logic [N_LINKS-1:0][LINK_BITS-1:0]     vme_data,
  input  logic [N_LINKS-1:0]                    vme_valid,
  output logic [N_PU-1:0][2*LANES_PER_PU-1:0]   pu_data,
  output logic [N_PU-1:0]                       pu_valid
);
  localparam int unsigned HB = 2 * LANES_PER_PU;  // 16 bits per PU

  always_ff @(posedge clk) begin
    if (rst) begin
      pu_data  <= '0;
      pu_valid <= '0;
    end else begin
      for (int l = 0; l < int'(N_LINKS); l++) begin
        for (int h = 0; h < 2; h++) begin
          pu_data[2*l+h]  <= src_vme ? vme_data[l][h*HB +: HB] : feb_data[l][h*HB +: HB];
          pu_valid[2*l+h] <= src_vme ? vme_valid[l] : feb_valid[l];
        end
      end
    end
  end
endmodule
