// tb_output_controller: four unit FIFOs (queue models filled at random times)
// receive fragments of five events; unit 2's fragment of event 3 carries a
// wrong event number. The full events on the ROB link, sent through a small
// output buffer while xoff toggles at random, are compared word by word with
// the expected event header, the four fragments in unit order and the event
// trailer with mismatch flags and word count. Control bits are checked too.
// The output mode switches at random between the ROB link and VME read-out;
// words read over VME (compared one cycle after the read, the same delay as
// the registered link) must continue the same stream, and both paths must
// have carried words.
module tb_output_controller;
  import rod_pkg::*;
  localparam int N_EV = 5;
  logic clk = 0, rst = 1;
  logic [3:0][31:0] frag_data; logic [3:0] frag_empty, frag_rd;
  logic ob_we, ob_full, ob_empty, ob_rd; logic [32:0] ob_wdata, ob_rdata; logic [6:0] ob_count;
  logic rob_xoff = 0, rob_valid, rob_ctrl; logic [31:0] rob_data, n_events;
  logic out_vme = 0, vme_rd = 0, vme_empty, vme_v = 0; logic [32:0] vme_data, vme_w = '0;
  int checks = 0, failures = 0, n_rob = 0, n_vme = 0;
  logic [31:0] src [4][$];     // words not yet visible to the controller
  logic [31:0] fq [4][$];      // unit FIFO contents
  logic [32:0] expq[$];

  output_controller dut (.*);
  sync_fifo #(.WIDTH(33), .DEPTH(64)) u_ob (
    .clk, .rst, .wr_en(ob_we), .wr_data(ob_wdata), .rd_en(ob_rd), .rd_data(ob_rdata),
    .empty(ob_empty), .full(ob_full), .count(ob_count)
  );
  always #5 clk = ~clk;

  always_comb for (int u = 0; u < 4; u++) begin
    frag_empty[u] = fq[u].size() == 0;
    frag_data[u]  = fq[u].size() ? fq[u][0] : 32'h0;
  end
  always @(posedge clk) for (int u = 0; u < 4; u++) begin
    if (frag_rd[u]) void'(fq[u].pop_front());
    if (src[u].size() && ($urandom % 3 == 0)) fq[u].push_back(src[u].pop_front());
  end
  always @(negedge clk) begin
    rob_xoff <= ($urandom % 5) == 0;
    if ($urandom % 150 == 0) out_vme <= !out_vme;
    vme_rd <= ($urandom % 2) == 0;
  end
  always @(posedge clk) begin
    vme_v <= out_vme && vme_rd && !vme_empty;
    vme_w <= vme_data;
  end

  always @(posedge clk) if (!rst && (rob_valid || vme_v)) begin
    logic [32:0] got;
    got = rob_valid ? {rob_ctrl, rob_data} : vme_w;
    if (rob_valid) n_rob++; else n_vme++;
    checks++;
    if (expq.size() == 0 || got != expq[0] || (rob_valid && vme_v)) begin
      failures++;
      if (failures < 10) $display("%s word %h exp %h", rob_valid ? "ROB" : "VME", got, expq.size() != 0 ? expq[0] : 0);
    end
    if (expq.size() != 0) void'(expq.pop_front());
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ev = 0; ev < N_EV; ev++) begin
      int total;
      logic [3:0] mism;
      expq.push_back({1'b1, EV_HDR_MARK, 24'(ev + 100)});
      total = 1; mism = '0;
      for (int u = 0; u < 4; u++) begin
        int nw, nab;
        logic [23:0] id;
        id = (ev == 3 && u == 2) ? 24'(ev + 999) : 24'(ev + 100);
        if (id != 24'(ev + 100)) mism[u] = 1;
        src[u].push_back({FRAG_HDR_MARK, id});
        src[u].push_back({8'h0, 8'h1, 4'(u), 12'(ev)});
        nw = 2; nab = 0;
        for (int ch = 0; ch < 64; ch++) begin
          logic ab;
          ab = ($urandom % 4) == 0;
          src[u].push_back({ab, 1'b0, 2'b01, 6'(ch), 2'b00, 20'($urandom)});
          nw++;
          if (ab) begin src[u].push_back($urandom); nw++; nab++; end
        end
        src[u].push_back({FRAG_TRL_MARK, 8'(nab), 16'(nw + 1)});
        nw++;
        for (int i = src[u].size() - nw; i < src[u].size(); i++) expq.push_back({1'b0, src[u][i]});
        total += nw;
      end
      expq.push_back({1'b1, EV_TRL_MARK, 4'h0, mism, 16'(total + 1)});
    end
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    wait (expq.size() == 0);
    repeat (5) @(posedge clk);
    checks++;
    if (n_events != N_EV) begin failures++; $display("events %0d", n_events); end
    checks++;
    if (n_rob == 0 || n_vme == 0) begin failures++; $display("ROB words %0d, VME words %0d", n_rob, n_vme); end
    $display("ROB words %0d, VME words %0d", n_rob, n_vme);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
