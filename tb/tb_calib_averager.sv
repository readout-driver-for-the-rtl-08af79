// tb_calib_averager: calibration with 2^2 events: the sample stream of six
// events is fed (the first before calibration is enabled, the last after the
// count is reached) and every (channel, sample) average is compared with the
// mean of the four accumulated events; done and the event count are checked.
module tb_calib_averager;
  import rod_pkg::*;
  import tb_pkg::*;
  logic clk = 0, rst = 1;
  logic calib_en = 0, clear = 0, ev_start = 0, ev_done = 0, samp_valid = 0;
  logic [3:0] navg_log2 = 4'd2;
  logic [5:0] samp_ch = 0, rd_ch = 0; logic [2:0] samp_s = 0, rd_s = 0;
  logic [11:0] samp_adc = 0;
  logic [15:0] rd_avg; logic [16:0] n_events; logic done, clearing;
  int checks = 0, failures = 0;
  int sum [64][5];

  calib_averager dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_event(input int ev, input bit counted);
    @(negedge clk); ev_start = 1;
    @(negedge clk); ev_start = 0;
    for (int ch = 0; ch < 64; ch++)
      for (int s = 0; s < 5; s++) begin
        logic [13:0] gs;
        gs = sample_of(ev, 2, ch, s);
        samp_valid = 1; samp_ch = 6'(ch); samp_s = 3'(s); samp_adc = gs[11:0];
        if (counted) sum[ch][s] += int'(gs[11:0]);
        @(negedge clk);
      end
    samp_valid = 0;
    repeat (2) @(negedge clk);
    ev_done = 1; @(negedge clk); ev_done = 0;
  endtask

  initial begin
    foreach (sum[c, s]) sum[c][s] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    while (clearing) @(negedge clk);
    send_event(0, 0);
    calib_en = 1;
    for (int ev = 1; ev <= 4; ev++) send_event(ev, 1);
    checks++;
    if (!done || n_events != 4) begin failures++; $display("done %b n %0d", done, n_events); end
    send_event(5, 0);
    checks++;
    if (n_events != 4) begin failures++; $display("counted past the end"); end
    for (int ch = 0; ch < 64; ch++)
      for (int s = 0; s < 5; s++) begin
        rd_ch = 6'(ch); rd_s = 3'(s);
        @(posedge clk); #1;
        checks++;
        if (rd_avg != 16'(sum[ch][s] / 4)) begin
          failures++;
          if (failures < 10) $display("ch %0d s %0d avg %0d exp %0d", ch, s, rd_avg, sum[ch][s] / 4);
        end
        @(negedge clk);
      end
    clear = 1; @(negedge clk); clear = 0;
    while (clearing) @(negedge clk);
    rd_ch = 6'd5; rd_s = 3'd2; @(posedge clk); #1;
    checks++;
    if (rd_avg != 0 || n_events != 0 || done) begin failures++; $display("clear failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
