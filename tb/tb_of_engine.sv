// tb_of_engine: event records are placed in a memory model, the filter
// constants are loaded, and the engine's result stream is compared with the
// reference model of tb_pkg: header (trigger data, error flags), every
// channel's E, gain, T and Q, the end record. T is also checked against the
// exact ratio (E*T)/E. The first events run without back-pressure and their
// processing time must stay within 400 cycles (10 us at 40 MHz, the average
// time per event at a 100 kHz trigger rate); later ones see random stalls.
module tb_of_engine;
  import rod_pkg::*;
  import tb_pkg::*;
  localparam int N_EV = 8;
  logic clk = 0, rst = 1;
  logic [7:0] ev_count = 0;
  logic ev_release, ev_start;
  logic [14:0] mem_addr;
  logic [31:0] mem_rdata;
  logic coef_we = 0; logic [10:0] coef_waddr = 0; coef_t coef_wdata = '0;
  logic signed [19:0] eth = 20'sd100;
  logic res_valid, res_ready = 1;
  of_result_t res;
  logic samp_valid; logic [5:0] samp_ch; logic [2:0] samp_s; logic [11:0] samp_adc;
  logic [15:0] proc_cycles;
  int checks = 0, failures = 0;
  logic [31:0] mem [32768];
  int n_above_total = 0, n_samples = 0;

  of_engine dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) mem_rdata <= mem[mem_addr];
  always @(posedge clk) if (samp_valid) n_samples++;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic build_record(input int ev, input int base);
    mem[base]     = {ev == 3 ? 8'h00 : REC_HDR_MARK, 24'(ev + 7)};
    mem[base + 1] = {8'(ev), 12'h0, 12'(ev * 5)};
    for (int s = 0; s < 5; s++)
      for (int ch = 0; ch < 64; ch++) begin
        logic [13:0] gs;
        gs = sample_of(ev, 1, ch, s);
        mem[base + 2 + s * 64 + (ch % 8) * 8 + ch / 8] = {1'b0, 3'(s), 6'(ch), 8'h0, gs};
      end
    mem[base + 322] = {REC_TRL_MARK, 7'h0, 1'b0, ev == 5 ? 16'd2 : 16'd0};
  endtask

  task automatic get_result(output of_result_t r);
    do @(posedge clk); while (!(res_valid && res_ready));
    r = res;
  endtask

  initial begin
    for (int ev = 0; ev < N_EV; ev++) build_record(ev, ev * 323);
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int ch = 0; ch < 64; ch++)
      for (int g = 0; g < 3; g++)
        for (int s = 0; s < 5; s++) begin
          @(negedge clk);
          coef_we = 1; coef_waddr = {6'(ch), 2'(g), 3'(s)}; coef_wdata = coef_of(ch, g, s);
        end
    @(negedge clk); coef_we = 0;
    ev_count = 1;
    for (int ev = 0; ev < N_EV; ev++) begin
      of_result_t r;
      int n_above;
      n_above = 0;
      get_result(r);
      check(r.kind == REC_HDR, "header first");
      check(r.trig.l1id == 24'(ev + 7) && r.trig.bcid == 12'(ev * 5) && r.trig.ttype == 8'(ev),
            $sformatf("trigger fields ev %0d", ev));
      check(r.err == {4'h0, 1'b0, ev == 5, 1'b0, ev == 3}, $sformatf("error flags ev %0d: %b", ev, r.err));
      for (int ch = 0; ch < 64; ch++) begin
        logic [4:0][11:0] smp;
        coef_t c [5];
        ch_ref_t x;
        logic [13:0] gs;
        for (int s = 0; s < 5; s++) begin
          gs = sample_of(ev, 1, ch, s);
          smp[s] = gs[11:0];
          c[s] = coef_of(ch, int'(gs[13:12]), s);
        end
        x = ref_channel(smp, c, 100);
        get_result(r);
        check(r.kind == REC_CH && r.ch == 6'(ch) && r.gain == gs[13:12] && !r.gain_mm,
              $sformatf("channel id ev %0d ch %0d", ev, ch));
        check(r.e == 20'(x.e), $sformatf("E ev %0d ch %0d: %0d exp %0d", ev, ch, r.e, x.e));
        check(r.above == x.above, $sformatf("above ev %0d ch %0d", ev, ch));
        if (x.above) begin
          real ratio;
          n_above++;
          check(r.t == 16'(x.t), $sformatf("T ev %0d ch %0d: %0d exp %0d", ev, ch, r.t, x.t));
          check(r.q == 32'(x.q), $sformatf("Q ev %0d ch %0d: %0d exp %0d", ev, ch, r.q, x.q));
          ratio = real'(x.et) / real'(x.e);
          if (ratio < 30000.0 && ratio > -30000.0) begin
            real err;
            err = real'(r.t) - ratio;
            if (err < 0) err = -err;
            check(err <= 1.0 + (ratio < 0 ? -ratio : ratio) / 64.0,
                  $sformatf("T=%0d far from ratio %f", r.t, ratio));
          end
        end else begin
          check(r.t == 0 && r.q == 0, "T and Q zero below threshold");
        end
      end
      get_result(r);
      check(r.kind == REC_END, "end record");
      n_above_total += n_above;
      @(negedge clk);
      if (ev < 3) begin
        check(proc_cycles <= 400, $sformatf("event %0d with %0d above threshold took %0d cycles",
                                           ev, n_above, proc_cycles));
        $display("event %0d: %0d channels above threshold, %0d cycles", ev, n_above, proc_cycles);
      end
      if (ev == 2) fork
        forever begin @(negedge clk); res_ready = ($urandom % 3) != 0; end
      join_none
      if (ev < N_EV - 1) ev_count = 1;
    end
    check(n_above_total > 20, "enough channels above threshold");
    check(n_samples == N_EV * 320, $sformatf("sample stream count %0d", n_samples));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ev_count bookkeeping: one record offered at a time, taken back on release
  always @(posedge clk) if (ev_release) ev_count <= ev_count - 1;
endmodule
