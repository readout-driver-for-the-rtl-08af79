// tb_ttc_rx: level-1 accepts at chosen cycles with bunch counter and event
// counter resets; the trigger records are checked against counters kept by
// the testbench, including the wrap of the bunch number after N_BUNCH.
module tb_ttc_rx;
  import rod_pkg::*;
  localparam int NB = 100;
  logic clk = 0, rst = 1, l1a = 0, bcr = 0, ecr = 0;
  logic [7:0] ttype = 0;
  logic trig_valid;
  trig_rec_t trig;
  int checks = 0, failures = 0;
  int cyc, exp_bc, exp_l1;
  int n_trig = 0;
  logic pend; trig_rec_t exp_rec;

  ttc_rx #(.N_BUNCH(NB)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pend = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    exp_bc = 0; exp_l1 = 0;
    for (cyc = 0; cyc < 2500; cyc++) begin
      // outputs of the previous cycle
      checks++;
      if (trig_valid != pend) begin failures++; $display("valid wrong at %0d", cyc); end
      if (pend) begin
        checks++;
        if (trig != exp_rec) begin failures++; $display("record %h exp %h", trig, exp_rec); end
      end
      l1a = ($urandom % 7) == 0;
      bcr = (cyc == 250) || (cyc == 1337);
      ecr = (cyc == 900) || (cyc == 901 && l1a);
      ttype = 8'($urandom);
      pend = l1a;
      if (bcr) exp_bc = 0;
      if (ecr) exp_l1 = 0;
      if (l1a) begin exp_rec = '{24'(exp_l1), 12'(exp_bc), ttype}; exp_l1++; n_trig++; end
      @(negedge clk);
      exp_bc = (exp_bc + 1) % NB;
    end
    checks++;
    if (n_trig < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
