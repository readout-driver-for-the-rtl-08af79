// tb_dpram: writes random words at random addresses of the 32K x 32 memory
// and reads them back on the other port with one cycle of latency, including
// read-during-write of the same address (old data expected).
module tb_dpram;
  logic clk = 0;
  logic wr_en = 0;
  logic [14:0] wr_addr = 0, rd_addr = 0;
  logic [31:0] wr_data = 0, rd_data;
  int checks = 0, failures = 0;
  logic [31:0] model [int];
  logic [14:0] addrs [$];

  dpram dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 15'($urandom); wr_data = $urandom;
      if (n == 0) wr_addr = 15'h7FFF;
      model[wr_addr] = wr_data; addrs.push_back(wr_addr);
    end
    @(negedge clk); wr_en = 0;
    foreach (addrs[i]) begin
      rd_addr = addrs[i];
      @(posedge clk); #1;
      checks++;
      if (rd_data != model[addrs[i]]) begin failures++; $display("addr %h got %h exp %h", addrs[i], rd_data, model[addrs[i]]); end
      @(negedge clk);
    end
    // read during write of the same address returns the old word
    rd_addr = addrs[0]; wr_en = 1; wr_addr = addrs[0]; wr_data = ~model[addrs[0]];
    @(posedge clk); #1;
    checks++;
    if (rd_data != model[addrs[0]]) begin failures++; $display("read-during-write wrong"); end
    @(negedge clk); wr_en = 0;
    @(posedge clk); #1;
    checks++;
    if (rd_data != ~model[addrs[0]]) begin failures++; $display("write lost"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
