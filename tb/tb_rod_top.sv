// tb_rod_top: the whole ROD at its default sizes, end to end.
//
// Filter constants are loaded into all four processing units, then events are
// sent over both FEB links at the design rate (one per 400 cycles, 100 kHz),
// each after a level-1 accept. Every word leaving on the ROB link is compared
// with the full event expected from the reference model: event header, the
// four unit fragments, event trailer, control bits.
// Phase A (12 events) exercises the modes and error paths: monitoring off then
// on, calibration averaging, one event fed from the VME source instead of the
// links, one ADC word with bad parity, one event with no trigger record, and
// random ROB xoff; during the calibration events the output is read over VME
// instead of the ROB link (compared one cycle after each read, the delay of
// the registered link). Phase B holds xoff so that the buffers fill; triggers are
// sent until Busy rises and then stop, as the trigger system would, after
// which xoff is released and every buffered event must arrive intact.
// Each mechanism is counted and must occur at least once.
module tb_rod_top;
  import rod_pkg::*;
  import tb_pkg::*;
  localparam int ETH = 100;
  logic clk = 0, rst = 1;
  logic [1:0][31:0] feb_data = '0, vme_data = '0;
  logic [1:0] feb_valid = '0, vme_valid = '0;
  logic src_vme = 0, l1a = 0, bcr = 0, ecr = 0;
  logic [7:0] ttype = 0;
  logic busy, rob_xoff = 0, rob_valid, rob_ctrl;
  logic [31:0] rob_data;
  logic out_vme = 0, vme_ob_rd = 0, vme_ob_empty, vme_v = 0; logic [32:0] vme_ob_data, vme_w = '0;
  logic [1:0] cfg_pu = 0;
  logic coef_we = 0; logic [10:0] coef_waddr = 0; coef_t coef_wdata = '0;
  logic signed [19:0] eth = 20'(ETH);
  logic mon_en = 0; logic [3:0] mon_sel = 4'b0011; logic [3:0][5:0] mon_ch = {6'd0, 6'd0, 6'd17, 6'd2};
  logic hist_clear = 0; logic [1:0] hist_rd_sel = 0, hist_rd_mon = 0; logic [7:0] hist_rd_bin = 0;
  logic [31:0] hist_rd_data;
  logic calib_en = 0, calib_clear = 0; logic [3:0] calib_navg_log2 = 4'd2;
  logic [5:0] calib_rd_ch = 0; logic [2:0] calib_rd_s = 0; logic [15:0] calib_rd_avg;
  logic [3:0] calib_done;
  logic [3:0][15:0] drop_cnt, proc_cycles; logic [3:0][31:0] n_mon_updates; logic [31:0] n_events;

  rod_top dut (.*);
  always #12.5 clk = ~clk;   // 40 MHz

  int checks = 0, failures = 0;
  logic [32:0] expq[$];
  int cyc = 0, bc_now = 0, l1_now = 0;
  int n_above = 0, n_below = 0, n_parity = 0, n_nottc = 0, n_vme = 0;
  int n_xoff_stall = 0, n_busy = 0, n_sent = 0, n_vme_out = 0;
  longint cal [4][64][5];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired, %0d words still expected", expq.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bunch crossing of the current cycle, as the TTC receiver counts it
  always @(posedge clk) begin
    cyc++;
    bc_now = bcr ? 1 : (bc_now + 1) % 3564;
    if (rob_xoff && !out_vme && !vme_ob_empty) n_xoff_stall++;
    if (busy) n_busy++;
  end

  // VME reader of the output buffer
  always @(negedge clk) vme_ob_rd <= ($urandom % 2) == 0;
  always @(posedge clk) begin
    vme_v <= out_vme && vme_ob_rd && !vme_ob_empty;
    vme_w <= vme_ob_data;
  end

  // output checker: ROB link words and words read over VME form one stream
  always @(posedge clk) if (!rst && (rob_valid || vme_v)) begin
    logic [32:0] got;
    got = rob_valid ? {rob_ctrl, rob_data} : vme_w;
    if (vme_v) n_vme_out++;
    checks++;
    if (expq.size() == 0 || got != expq[0] || (rob_valid && vme_v)) begin
      failures++;
      if (failures < 20) $display("%s %h exp %h (%0d left)", rob_valid ? "ROB" : "VME", got,
                                  expq.size() != 0 ? expq[0] : 0, expq.size());
    end
    if (expq.size() != 0) void'(expq.pop_front());
  end

  // one event: trigger (unless no_trig), expected words, link data, idle time
  task automatic do_event(input int ev, input bit no_trig, input bit via_vme,
                          input int bad_pu, input int bad_word);
    trig_rec_t tr;
    logic [31:0] w[$];
    int total;
    if (no_trig) tr = '0;
    else begin
      @(negedge clk);
      l1a = 1; ttype = 8'(ev * 7);
      tr = '{24'(l1_now), 12'(bc_now), 8'(ev * 7)};
      l1_now++;
      @(negedge clk);
      l1a = 0;
    end
    w = {};
    for (int p = 0; p < 4; p++) begin
      int nab;
      logic [7:0] err;
      err = {4'h0, no_trig, p == bad_pu, 2'b00};
      nab = expected_fragment(ev, p, ETH, tr, err, w);
      n_above += nab; n_below += 64 - nab;
      if (calib_en) for (int ch = 0; ch < 64; ch++) for (int s = 0; s < 5; s++) begin
        logic [13:0] gs; gs = sample_of(ev, p, ch, s); cal[p][ch][s] += gs[11:0];
      end
    end
    total = w.size() + 2;
    expq.push_back({1'b1, EV_HDR_MARK, tr.l1id});
    foreach (w[i]) expq.push_back({1'b0, w[i]});
    expq.push_back({1'b1, EV_TRL_MARK, 8'h0, 16'(total)});
    if (bad_pu >= 0) n_parity++;
    if (no_trig) n_nottc++;
    if (via_vme) n_vme++;
    src_vme = via_vme;
    for (int wi = 0; wi < 40; wi++) begin
      logic [1:0][31:0] lw [8];
      for (int sym = 0; sym < 8; sym++) lw[sym] = '0;
      for (int p = 0; p < 4; p++)
        for (int l = 0; l < 8; l++) begin
          logic [15:0] aw;
          int ch, s;
          ch = l * 8 + wi % 8; s = wi / 8;
          aw = adc_word(sample_of(ev, p, ch, s), p == bad_pu && (s * 64 + ch) == bad_word);
          for (int sym = 0; sym < 8; sym++)
            lw[sym][p / 2][(p % 2) * 16 + 2 * l +: 2] = aw[15 - 2*sym -: 2];
        end
      for (int sym = 0; sym < 8; sym++) begin
        @(negedge clk);
        if (via_vme) begin vme_data = lw[sym]; vme_valid = 2'b11; end
        else         begin feb_data = lw[sym]; feb_valid = 2'b11; end
      end
    end
    @(negedge clk);
    feb_valid = 0; vme_valid = 0;
    repeat (77) @(negedge clk);   // 2 + 320 + 78 = 400 cycles per event
    src_vme = 0;
    n_sent++;
  endtask

  task automatic drain();
    rob_xoff = 0;
    wait (expq.size() == 0);
    repeat (50) @(negedge clk);
  endtask

  initial begin
    fork
      forever begin @(negedge clk); if (n_sent < 12) rob_xoff = ($urandom % 4) == 0; end
    join_none
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0; hist_clear = 1; calib_clear = 1; bcr = 1;
    @(negedge clk); hist_clear = 0; calib_clear = 0; bcr = 0;
    for (int p = 0; p < 4; p++)
      for (int ch = 0; ch < 64; ch++)
        for (int g = 0; g < 3; g++)
          for (int s = 0; s < 5; s++) begin
            @(negedge clk);
            cfg_pu = 2'(p); coef_we = 1; coef_waddr = {6'(ch), 2'(g), 3'(s)};
            coef_wdata = coef_of(ch, g, s);
          end
    @(negedge clk); coef_we = 0;
    foreach (cal[p, c, s]) cal[p][c][s] = 0;

    // ---- phase A ----
    for (int ev = 0; ev < 4; ev++) do_event(ev, 0, 0, -1, -1);
    drain();
    for (int p = 0; p < 4; p++) begin
      check(n_mon_updates[p] == 0, "no monitoring while it is off");
      check(proc_cycles[p] <= 400, $sformatf("unit %0d took %0d cycles for an event", p, proc_cycles[p]));
    end
    mon_en = 1;
    for (int ev = 4; ev < 8; ev++) do_event(ev, ev == 7, ev == 6, ev == 5 ? 3 : -1, 201);
    calib_en = 1; out_vme = 1;
    for (int ev = 8; ev < 12; ev++) do_event(ev, 0, 0, -1, -1);
    drain();
    calib_en = 0; out_vme = 0;
    for (int p = 0; p < 4; p++) begin
      check(n_mon_updates[p] == 8 * 2, $sformatf("unit %0d monitor updates %0d", p, n_mon_updates[p]));
      check(drop_cnt[p] == 0, "no drops in phase A");
      cfg_pu = 2'(p); calib_rd_ch = 6'(p * 13); calib_rd_s = 3'(p + 1);
      @(posedge clk); #1;
      check(calib_done[p], "calibration done");
      check(calib_rd_avg == 16'(cal[p][p * 13][p + 1] / 4), $sformatf("unit %0d calibration average", p));
      @(negedge clk);
    end
    // general E histogram of unit 1 holds one entry per channel and event
    begin
      int sum_e;
      sum_e = 0; cfg_pu = 2'd1; hist_rd_sel = 0;
      for (int b = 0; b < 256; b++) begin
        hist_rd_bin = 8'(b); @(posedge clk); #1; sum_e += int'(hist_rd_data); @(negedge clk);
      end
      check(sum_e == 64 * 12, $sformatf("E histogram entries %0d", sum_e));
    end

    // ---- phase B: output held off until Busy ----
    begin
      int ev;
      ev = 100;
      rob_xoff = 1;
      while (!busy && ev < 1100) begin
        do_event(ev, 0, 0, -1, -1);
        ev++;
      end
      $display("busy after %0d events with the ROB link held off", ev - 100);
      check(busy, "busy raised when buffers fill");
      drain();
      for (int p = 0; p < 4; p++) check(drop_cnt[p] == 0, "no event lost under busy");
    end

    check(n_events == 32'(n_sent), $sformatf("events built %0d sent %0d", n_events, n_sent));
    $display("mechanisms: above-threshold channels %0d, below %0d, parity errors %0d, missing trigger %0d, VME source %0d, VME output words %0d, xoff stall cycles %0d, busy cycles %0d, monitor updates %0d, calibration done %b",
             n_above, n_below, n_parity, n_nottc, n_vme, n_vme_out, n_xoff_stall, n_busy, n_mon_updates[0], calib_done);
    check(n_above > 0, "T and Q computed");
    check(n_below > 0, "channels below threshold");
    check(n_parity > 0, "parity error path");
    check(n_nottc > 0, "missing trigger path");
    check(n_vme_out > 0, "output read over VME");
    check(n_vme > 0, "VME source path");
    check(n_xoff_stall > 0, "ROB back-pressure");
    check(n_busy > 0, "busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
