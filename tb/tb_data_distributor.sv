// tb_data_distributor: random link and VME words; checks that each PU gets its
// 16-bit half of the right link one cycle later, for both sources.
module tb_data_distributor;
  import rod_pkg::*;
  logic clk = 0, rst = 1, src_vme = 0;
  logic [1:0][31:0] feb_data, vme_data;
  logic [1:0] feb_valid, vme_valid;
  logic [3:0][15:0] pu_data;
  logic [3:0] pu_valid;
  int checks = 0, failures = 0;
  logic [1:0][31:0] d_q; logic [1:0] v_q;

  data_distributor dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    feb_data = '0; vme_data = '0; feb_valid = '0; vme_valid = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int n = 0; n < 400; n++) begin
      src_vme = n >= 200;
      feb_data = {$urandom, $urandom}; vme_data = {$urandom, $urandom};
      feb_valid = 2'($urandom); vme_valid = 2'($urandom);
      d_q = src_vme ? vme_data : feb_data;
      v_q = src_vme ? vme_valid : feb_valid;
      @(posedge clk); #1;
      checks++;
      if (pu_data[0] != d_q[0][15:0] || pu_data[1] != d_q[0][31:16] ||
          pu_data[2] != d_q[1][15:0] || pu_data[3] != d_q[1][31:16] ||
          pu_valid != {v_q[1], v_q[1], v_q[0], v_q[0]}) begin
        failures++; $display("mismatch at %0d", n);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
