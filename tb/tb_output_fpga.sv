// tb_output_fpga: three events of results (header, 64 channels with random
// above-threshold flags and values, end) are offered while the FIFO full flag
// toggles at random; the written words are compared with the fragment format:
// header pair, channel words, {T, saturated Q} words, trailer with the count
// of channels above threshold and the word count.
module tb_output_fpga;
  import rod_pkg::*;
  logic clk = 0, rst = 1;
  logic res_valid = 0; of_result_t res = '0; logic res_ready;
  logic fifo_we; logic [31:0] fifo_wdata; logic fifo_full = 0;
  int checks = 0, failures = 0;
  logic [31:0] expq[$];

  output_fpga #(.PU_ID(2)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) fifo_full <= ($urandom % 4) == 0;

  always @(posedge clk) if (!rst && fifo_we) begin
    checks++;
    if (expq.size() == 0 || fifo_wdata != expq[0]) begin
      failures++;
      if (failures < 10) $display("word %h exp %h", fifo_wdata, expq.size() ? expq[0] : 0);
    end
    if (expq.size()) void'(expq.pop_front());
  end

  task automatic offer(input of_result_t r);
    @(negedge clk);
    res = r; res_valid = 1;
    do @(posedge clk); while (!res_ready);
    @(negedge clk); res_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int ev = 0; ev < 3; ev++) begin
      of_result_t r;
      int nab, nw;
      r = '0; r.kind = REC_HDR; r.trig = '{24'(ev + 40), 12'(ev * 9), 8'(ev + 1)}; r.err = 8'(ev);
      expq.push_back({FRAG_HDR_MARK, 24'(ev + 40)});
      expq.push_back({8'(ev), 8'(ev + 1), 4'd2, 12'(ev * 9)});
      offer(r);
      nab = 0; nw = 2;
      for (int ch = 0; ch < 64; ch++) begin
        r = '0; r.kind = REC_CH; r.ch = 6'(ch); r.gain = 2'(ch % 3); r.e = 20'($urandom);
        r.above = ($urandom % 3) == 0; r.gain_mm = ch == 7;
        if (r.above) begin r.t = 16'($urandom); r.q = ($urandom % 2) ? $urandom % 70000 : $urandom; end
        expq.push_back({r.above, r.gain_mm, r.gain, r.ch, 2'b00, r.e});
        nw++;
        if (r.above) begin
          expq.push_back({r.t, r.q > 32'hFFFF ? 16'hFFFF : r.q[15:0]});
          nab++; nw++;
        end
        offer(r);
      end
      r = '0; r.kind = REC_END;
      expq.push_back({FRAG_TRL_MARK, 8'(nab), 16'(nw + 1)});
      offer(r);
    end
    repeat (5) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d words missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
