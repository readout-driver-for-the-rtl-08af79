// tb_recip_table: every entry must satisfy recip*m <= 2^24 < (recip+1)*m for
// m = 128 + idx, one cycle after the index.
module tb_recip_table;
  logic clk = 0;
  logic [6:0] idx = 0;
  logic [17:0] recip;
  int checks = 0, failures = 0;

  recip_table dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++) begin
      longint m;
      @(negedge clk); idx = 7'(i);
      @(posedge clk); #1;
      m = 128 + i;
      checks++;
      if (!(longint'(recip) * m <= (64'd1 << 24) && (longint'(recip) + 1) * m > (64'd1 << 24))) begin
        failures++; $display("entry %0d = %0d", i, recip);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
