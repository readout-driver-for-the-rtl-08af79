// tb_pu_timing: processing time of one unit against the number of channels
// above threshold, with and without monitoring.
//
// The unit is loaded with flat filter constants (a = g = 0.2, b = g' = 0) and
// fed events in which exactly N_E of the 64 channels carry a 1000-count pulse
// and the rest read zero, so that with a threshold of 10 exactly N_E channels
// go through the time and quality stages. Each event is sent alone, its
// fragment drained, and the unit's own cycle count read. The cases are
// N_E = 0, 1, 10, 20 and 64, each once without and once with monitoring of
// four channels. Checked: fragment length 2 + 64 + N_E + 1 words, the count of
// {T,Q} words, no drops, the level-1 budget of 10 us (400 cycles at 40 MHz)
// for N_E up to 20, that monitoring costs no processing cycles, and that the
// four monitored channels were histogrammed in each monitored event. The
// cycle counts are printed for comparison with a software implementation;
// N_E = 64 is allowed to exceed the 400-cycle average budget.
module tb_pu_timing;
  import rod_pkg::*;
  import tb_pkg::*;
  localparam int PU = 0, ETH = 10, N_CASES = 5;
  localparam int NE [N_CASES] = '{0, 1, 10, 20, 64};
  logic clk = 0, rst = 1;
  logic [15:0] lane_data = 0; logic lane_valid = 0, trig_valid = 0;
  trig_rec_t trig = '0;
  logic coef_we = 0; logic [10:0] coef_waddr = 0; coef_t coef_wdata = '0;
  logic signed [19:0] eth = 20'(ETH);
  logic mon_en = 0; logic [3:0] mon_sel = 4'b1111; logic [3:0][5:0] mon_ch = {6'd63, 6'd20, 6'd5, 6'd0};
  logic hist_clear = 0; logic [1:0] hist_rd_sel = 0, hist_rd_mon = 0; logic [7:0] hist_rd_bin = 0;
  logic [31:0] hist_rd_data;
  logic calib_en = 0, calib_clear = 0; logic [3:0] calib_navg_log2 = 4'd0;
  logic [5:0] calib_rd_ch = 0; logic [2:0] calib_rd_s = 0; logic [15:0] calib_rd_avg; logic calib_done;
  logic out_rd_en = 0; logic [31:0] out_rd_data; logic out_empty;
  logic busy; logic [15:0] drop_cnt, proc_cycles; logic [31:0] n_mon_updates;
  int checks = 0, failures = 0;
  int n_words = 0, n_tq = 0;
  bit tq_next = 0;
  int cyc [2][N_CASES];

  processing_unit #(.PU_ID(PU)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // fragment word counter: word 2..65 are channel words, bit 31 announces a {T,Q} word
  always @(posedge clk) if (out_rd_en) begin
    if (tq_next) n_tq++;
    tq_next <= n_words >= 2 && !tq_next && out_rd_data[31] && out_rd_data[31:24] != FRAG_TRL_MARK;
    n_words++;
  end
  always @(negedge clk) out_rd_en <= !out_empty && !rst;

  task automatic send_event(input int ne);
    for (int wi = 0; wi < 40; wi++) begin
      logic [7:0][15:0] w;
      for (int l = 0; l < 8; l++) begin
        int ch;
        ch = l * 8 + wi % 8;
        w[l] = adc_word({2'b00, ch < ne ? 12'd1000 : 12'd0}, 1'b0);
      end
      for (int sym = 0; sym < 8; sym++) begin
        @(negedge clk);
        lane_valid = 1;
        for (int l = 0; l < 8; l++) lane_data[2*l +: 2] = w[l][15 - 2*sym -: 2];
      end
    end
    @(negedge clk); lane_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0; hist_clear = 1;
    @(negedge clk); hist_clear = 0;
    for (int a = 0; a < 64 * 4 * 8; a++) begin
      @(negedge clk);
      coef_we = 1; coef_waddr = 11'(a);
      coef_wdata = '{a: 16'sd819, b: 16'sd0, g: 16'sd819, gd: 16'sd0};
    end
    @(negedge clk); coef_we = 0;
    for (int m = 0; m < 2; m++)
      for (int k = 0; k < N_CASES; k++) begin
        mon_en = m[0];
        n_words = 0; n_tq = 0; tq_next = 0;
        @(negedge clk); trig_valid = 1; trig = '{24'(m * 10 + k), 12'(k), 8'(1)};
        @(negedge clk); trig_valid = 0;
        send_event(NE[k]);
        wait (n_words == 2 + 64 + NE[k] + 1);
        repeat (40) @(negedge clk);
        cyc[m][k] = int'(proc_cycles);
        check(n_words == 2 + 64 + NE[k] + 1, $sformatf("N_E=%0d fragment of %0d words", NE[k], n_words));
        check(n_tq == NE[k], $sformatf("N_E=%0d: %0d {T,Q} words", NE[k], n_tq));
        $display("N_E=%0d monitoring=%0d: %0d cycles = %0d ns", NE[k], m, cyc[m][k], cyc[m][k] * 25);
      end
    check(drop_cnt == 0, "no event dropped");
    for (int k = 0; k < N_CASES; k++) begin
      if (NE[k] <= 20) check(cyc[0][k] <= 400, $sformatf("N_E=%0d within 400 cycles", NE[k]));
      check(cyc[1][k] == cyc[0][k], $sformatf("N_E=%0d monitoring adds no cycles", NE[k]));
    end
    check(n_mon_updates == 4 * N_CASES, $sformatf("monitor updates %0d", n_mon_updates));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
