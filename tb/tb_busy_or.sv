// tb_busy_or: every combination of the four busy inputs; Busy must follow
// their OR one cycle later.
module tb_busy_or;
  logic clk = 0, rst = 1;
  logic [3:0] busy_in = 0;
  logic busy;
  int checks = 0, failures = 0;

  busy_or #(.N(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int n = 0; n < 64; n++) begin
      busy_in = 4'(n);
      @(posedge clk); #1;
      checks++;
      if (busy !== (n % 16 != 0)) begin failures++; $display("busy wrong for %b", busy_in); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
