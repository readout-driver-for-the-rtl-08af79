// tb_histogrammer: clears the histograms, feeds random channel results (some
// above threshold, values beyond both ends of the bin range) offered at random
// times, with monitoring switched off for the first half and on for the
// second, then reads every bin of the E, T, Q and monitor histograms back and
// compares them with counts kept by the testbench.
module tb_histogrammer;
  import rod_pkg::*;
  localparam int NB = 256, NM = 4;
  logic clk = 0, rst = 1;
  logic in_valid = 0; of_result_t in = '0; logic ready;
  logic mon_en = 0; logic [NM-1:0] mon_sel = 4'b1011; logic [NM-1:0][5:0] mon_ch;
  logic clear = 0; logic [1:0] rd_sel = 0; logic [1:0] rd_mon = 0; logic [7:0] rd_bin = 0;
  logic [31:0] rd_data, n_updates, n_mon_updates;
  int checks = 0, failures = 0;
  int he [NB], ht [NB], hq [NB], hm [NM][NB];
  int n_mon = 0;

  histogrammer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clampi(input int v);
    return v < 0 ? 0 : v > NB - 1 ? NB - 1 : v;
  endfunction

  initial begin
    mon_ch = {6'd40, 6'd9, 6'd9, 6'd3};   // slots 3..0; slot 2 disabled, 9 twice
    foreach (he[i]) begin he[i] = 0; ht[i] = 0; hq[i] = 0; end
    foreach (hm[k, i]) hm[k][i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0; clear = 1;
    @(negedge clk); clear = 0;
    for (int n = 0; n < 3000; n++) begin
      of_result_t r;
      @(negedge clk);
      while (!ready) @(negedge clk);
      if ($urandom % 3 == 0) begin in_valid = 0; continue; end
      mon_en = n >= 1500;
      r = '0;
      r.kind  = (n % 50 == 0) ? REC_HDR : REC_CH;
      r.ch    = 6'($urandom % 48);
      r.e     = 20'(int'($urandom % 6000) - 500);
      r.above = $urandom % 2;
      r.t     = r.above ? 16'(int'($urandom % 800) - 400) : 16'h0;
      r.q     = r.above ? ($urandom % 2 ? $urandom % 80000 : $urandom) : 32'h0;
      in = r; in_valid = 1;
      if (r.kind == REC_CH) begin
        int be, k;
        be = clampi(int'(r.e) >>> 4);
        he[be]++;
        if (r.above) begin
          ht[clampi((int'(r.t) >>> 2) + 128)]++;
          hq[r.q >> 8 > NB - 1 ? NB - 1 : int'(r.q >> 8)]++;
        end
        k = -1;
        for (int j = NM - 1; j >= 0; j--) if (mon_en && mon_sel[j] && mon_ch[j] == r.ch) k = j;
        if (k >= 0) begin hm[k][be]++; n_mon++; end
      end
      @(negedge clk);
      in_valid = 0;
    end
    @(negedge clk); in_valid = 0;
    repeat (4) @(negedge clk);
    for (int sel = 0; sel < 4; sel++)
      for (int k = 0; k < (sel == 3 ? NM : 1); k++)
        for (int b = 0; b < NB; b++) begin
          int expv;
          rd_sel = 2'(sel); rd_mon = 2'(k); rd_bin = 8'(b);
          @(posedge clk); #1;
          expv = sel == 0 ? he[b] : sel == 1 ? ht[b] : sel == 2 ? hq[b] : hm[k][b];
          checks++;
          if (rd_data != 32'(expv)) begin
            failures++;
            if (failures < 10) $display("hist %0d slot %0d bin %0d: %0d exp %0d", sel, k, b, rd_data, expv);
          end
          @(negedge clk);
        end
    checks++;
    if (n_mon_updates != 32'(n_mon) || n_mon < 20) begin failures++; $display("monitor updates %0d exp %0d", n_mon_updates, n_mon); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
