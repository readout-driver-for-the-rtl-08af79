// tb_input_fpga: sends whole events over the eight 2-bit lanes (with idle
// cycles inside and between events) and trigger records, captures the memory
// writes, and checks every record word: header from the trigger record, each
// sample word with its channel, sample and parity flag, trailer with parity
// error count and missing-trigger flag. With a 1024-word memory (3 record
// slots) it also checks ev_count, busy, dropping of an event that finds no
// slot, release, and records wrapping round the end of the memory.
module tb_input_fpga;
  import rod_pkg::*;
  import tb_pkg::*;
  localparam int DEPTH = 1024;
  logic clk = 0, rst = 1;
  logic [15:0] lane_data = 0;
  logic lane_valid = 0, trig_valid = 0, ev_release = 0;
  trig_rec_t trig = '0;
  logic mem_we; logic [9:0] mem_addr; logic [31:0] mem_wdata;
  logic [7:0] ev_count; logic busy; logic [15:0] drop_cnt, trig_lost_cnt;
  int checks = 0, failures = 0;
  logic [31:0] mem [DEPTH];

  input_fpga #(.MEM_DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (mem_we) mem[mem_addr] <= mem_wdata;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send_trig(input int l1id);
    @(negedge clk);
    trig_valid = 1; trig = '{24'(l1id), 12'(l1id * 3), 8'(l1id + 100)};
    @(negedge clk);
    trig_valid = 0;
  endtask

  // bad_word: index (s*64+ch) of one word sent with wrong parity, or -1
  task automatic send_event(input int ev, input int bad_word);
    logic [7:0][15:0] w;
    for (int wi = 0; wi < 40; wi++) begin
      int s, c;
      s = wi / 8; c = wi % 8;
      for (int l = 0; l < 8; l++)
        w[l] = adc_word(sample_of(ev, 0, l * 8 + c, s), (s * 64 + l * 8 + c) == bad_word);
      for (int sym = 0; sym < 8; sym++) begin
        @(negedge clk);
        if (ev % 2 == 1 && ($urandom % 5 == 0)) begin   // idle cycle inside the event
          lane_valid = 0;
          @(negedge clk);
        end
        lane_valid = 1;
        for (int l = 0; l < 8; l++) lane_data[2*l +: 2] = w[l][15 - 2*sym -: 2];
      end
    end
    @(negedge clk);
    lane_valid = 0;
    repeat (4) @(negedge clk);
  endtask

  task automatic check_record(input int ev, input int base, input bit has_trig, input int bad_word);
    int a;
    a = base;
    check(mem[a % DEPTH] == {REC_HDR_MARK, has_trig ? 24'(ev) : 24'(0)}, $sformatf("hdr0 ev %0d", ev));
    check(mem[(a + 1) % DEPTH] == (has_trig ? {8'(ev + 100), 12'h0, 12'(ev * 3)} : 32'h0),
          $sformatf("hdr1 ev %0d", ev));
    for (int s = 0; s < 5; s++)
      for (int ch = 0; ch < 64; ch++) begin
        int c, l;
        logic [13:0] gs;
        sample_word_t sw;
        l = ch / 8; c = ch % 8;
        gs = sample_of(ev, 0, ch, s);
        sw = '{(s * 64 + ch) == bad_word, 3'(s), 6'(ch), 8'h0, gs[13:12], gs[11:0]};
        check(mem[(a + 2 + s * 64 + c * 8 + l) % DEPTH] == sw,
              $sformatf("sample ev %0d s %0d ch %0d", ev, s, ch));
      end
    check(mem[(a + 322) % DEPTH] == {REC_TRL_MARK, 7'h0, !has_trig, bad_word >= 0 ? 16'd1 : 16'd0},
          $sformatf("trailer ev %0d", ev));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    repeat (3) @(negedge clk);
    check(ev_count == 0 && !busy, "idle after reset");
    send_trig(0); send_trig(1); send_trig(3); send_trig(4);
    send_event(0, -1);
    repeat (10) @(negedge clk);
    check(ev_count == 1, "one record");
    check(busy, "busy with 2 free slots of 3");
    send_event(1, 130);
    send_event(2, -1);       // takes trigger 3: numbers come from the queue
    repeat (10) @(negedge clk);
    check(ev_count == 3, "three records");
    check_record(0, 0, 1, -1);
    check_record(1, 323, 1, 130);
    // event 2 was joined to trigger record 3
    check(mem[646] == {REC_HDR_MARK, 24'd3}, "event 2 header takes queued trigger");
    send_event(3, -1);       // no slot: dropped, trigger 4 consumed
    repeat (10) @(negedge clk);
    check(drop_cnt == 1 && ev_count == 3, "event dropped when full");
    @(negedge clk); ev_release = 1; @(negedge clk); ev_release = 0;
    check(ev_count == 2, "release");
    send_event(5, -1);       // no trigger record left
    repeat (10) @(negedge clk);
    check(ev_count == 3, "record after release");
    check_record(5, 969, 0, -1);   // wraps round the end of the memory
    check(trig_lost_cnt == 0, "no trigger lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
