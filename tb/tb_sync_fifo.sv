// tb_sync_fifo: random pushes and pops against a queue model; checks data
// order, full/empty/count, and simultaneous push and pop at full.
module tb_sync_fifo;
  localparam int DEPTH = 16;
  logic clk = 0, rst = 1;
  logic wr_en = 0, rd_en = 0;
  logic [31:0] wr_data = 0, rd_data;
  logic empty, full;
  logic [4:0] count;
  int checks = 0, failures = 0;
  logic [31:0] model[$];

  sync_fifo #(.WIDTH(32), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 1200; n++) begin
      @(negedge clk);
      // check outputs against the model
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == DEPTH) || count != model.size()) begin
        failures++; $display("flags wrong at %0d: size %0d count %0d", n, model.size(), count);
      end
      if (model.size() > 0) begin
        checks++;
        if (rd_data != model[0]) begin failures++; $display("data %h exp %h", rd_data, model[0]); end
      end
      // choose operations (phases bias towards filling and draining)
      wr_en = ($urandom % 4) < ((n / 200) % 2 == 0 ? 3 : 1);
      rd_en = ($urandom % 4) < ((n / 200) % 2 == 0 ? 1 : 3);
      if (full && ($urandom % 2)) begin wr_en = 1; rd_en = 1; end
      if (model.size() == 0) rd_en = 0;
      if (model.size() == DEPTH && !rd_en) wr_en = 0;
      wr_data = $urandom;
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
    end
    @(negedge clk); wr_en = 0; rd_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
