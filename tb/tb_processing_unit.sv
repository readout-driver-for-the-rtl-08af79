// tb_processing_unit: one processing unit end to end. Filter constants are
// loaded, then six events are sent over the unit's eight 2-bit lanes, each
// after its trigger record; one event has an ADC word with bad parity. Every
// output fragment is compared word by word with the reference (tb_pkg), the
// E histogram must hold one entry per channel and event, the monitored
// channel histograms must have been filled while monitoring was on, and the
// calibration averages of the events taken in calibration mode are checked.
module tb_processing_unit;
  import rod_pkg::*;
  import tb_pkg::*;
  localparam int PU = 1, N_EV = 6, ETH = 100;
  logic clk = 0, rst = 1;
  logic [15:0] lane_data = 0; logic lane_valid = 0, trig_valid = 0;
  trig_rec_t trig = '0;
  logic coef_we = 0; logic [10:0] coef_waddr = 0; coef_t coef_wdata = '0;
  logic signed [19:0] eth = 20'(ETH);
  logic mon_en = 0; logic [3:0] mon_sel = 4'b0011; logic [3:0][5:0] mon_ch = {6'd0, 6'd0, 6'd17, 6'd2};
  logic hist_clear = 0; logic [1:0] hist_rd_sel = 0, hist_rd_mon = 0; logic [7:0] hist_rd_bin = 0;
  logic [31:0] hist_rd_data;
  logic calib_en = 0, calib_clear = 0; logic [3:0] calib_navg_log2 = 4'd1;
  logic [5:0] calib_rd_ch = 0; logic [2:0] calib_rd_s = 0; logic [15:0] calib_rd_avg; logic calib_done;
  logic out_rd_en = 0; logic [31:0] out_rd_data; logic out_empty;
  logic busy; logic [15:0] drop_cnt, proc_cycles; logic [31:0] n_mon_updates;
  int checks = 0, failures = 0;
  logic [31:0] expq[$];
  int n_busy = 0;

  processing_unit #(.PU_ID(PU)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (busy) n_busy++;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // output FIFO reader and comparison
  always @(posedge clk) begin
    if (out_rd_en) begin
      checks++;
      if (expq.size() == 0 || out_rd_data != expq[0]) begin
        failures++;
        if (failures < 20) $display("word %h exp %h", out_rd_data, expq.size() ? expq[0] : 0);
      end
      if (expq.size()) void'(expq.pop_front());
    end
  end
  always @(negedge clk) out_rd_en <= !out_empty && ($urandom % 2 == 0) && !rst;

  task automatic send_event(input int ev, input int bad_word);
    for (int wi = 0; wi < 40; wi++) begin
      logic [7:0][15:0] w;
      for (int l = 0; l < 8; l++)
        w[l] = adc_word(sample_of(ev, PU, l * 8 + wi % 8, wi / 8), (wi / 8) * 64 + l * 8 + wi % 8 == bad_word);
      for (int sym = 0; sym < 8; sym++) begin
        @(negedge clk);
        lane_valid = 1;
        for (int l = 0; l < 8; l++) lane_data[2*l +: 2] = w[l][15 - 2*sym -: 2];
      end
    end
    @(negedge clk); lane_valid = 0;
    repeat (80) @(negedge clk);
  endtask

  initial begin
    int sum_e, cal [64][5];
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0; hist_clear = 1; calib_clear = 1;
    @(negedge clk); hist_clear = 0; calib_clear = 0;
    for (int ch = 0; ch < 64; ch++)
      for (int g = 0; g < 3; g++)
        for (int s = 0; s < 5; s++) begin
          @(negedge clk);
          coef_we = 1; coef_waddr = {6'(ch), 2'(g), 3'(s)}; coef_wdata = coef_of(ch, g, s);
        end
    @(negedge clk); coef_we = 0;
    foreach (cal[c, s]) cal[c][s] = 0;
    for (int ev = 0; ev < N_EV; ev++) begin
      trig_rec_t tr;
      int bad;
      bad = (ev == 2) ? 77 : -1;
      tr = '{24'(ev + 500), 12'(ev * 11), 8'(ev + 3)};
      mon_en = 1;
      calib_en = ev >= 4;
      if (ev >= 4) for (int ch = 0; ch < 64; ch++) for (int s = 0; s < 5; s++) begin
        logic [13:0] gs; gs = sample_of(ev, PU, ch, s); cal[ch][s] += int'(gs[11:0]);
      end
      @(negedge clk); trig_valid = 1; trig = tr;
      @(negedge clk); trig_valid = 0;
      void'(expected_fragment(ev, PU, ETH, tr, bad >= 0 ? 8'h04 : 8'h00, expq));
      send_event(ev, bad);
    end
    wait (expq.size() == 0);
    repeat (20) @(negedge clk);
    check(drop_cnt == 0, "no event dropped");
    check(proc_cycles > 300 && proc_cycles <= 400, $sformatf("processing time %0d cycles", proc_cycles));
    sum_e = 0;
    hist_rd_sel = 0;
    for (int b = 0; b < 256; b++) begin
      hist_rd_bin = 8'(b); @(posedge clk); #1; sum_e += int'(hist_rd_data); @(negedge clk);
    end
    check(sum_e == 64 * N_EV, $sformatf("E histogram holds %0d entries", sum_e));
    check(n_mon_updates == N_EV * 2, $sformatf("monitor updates %0d", n_mon_updates));
    check(calib_done, "calibration average complete");
    for (int ch = 0; ch < 64; ch += 9) begin
      calib_rd_ch = 6'(ch); calib_rd_s = 3'(ch % 5);
      @(posedge clk); #1;
      check(calib_rd_avg == 16'(cal[ch][ch % 5] / 2), $sformatf("calibration average ch %0d", ch));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
