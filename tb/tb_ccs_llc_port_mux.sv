// tb_ccs_llc_port_mux: two random requesters (processor side and CCS) share one
// LLC port through the mux. A behavioural LLC accepts requests with random
// back-pressure and returns read data, in order, after random delays. Checks:
// the processor side wins whenever both request, every request reaches the
// LLC unchanged, every read response reaches the requester that issued it, in
// issue order, and a response waits while its requester is not ready.
module tb_ccs_llc_port_mux;
  localparam int LB = 64, PA_W = 40, NREQ = 400;
  logic clk = 0, rst_n = 0;
  logic [1:0] p_req_valid = '0, p_req_ready, p_req_we = '0, p_rsp_valid, p_rsp_ready = '0;
  logic [1:0][PA_W-1:0] p_req_addr = '0;
  logic [1:0][LB*8-1:0] p_req_wdata = '0;
  logic [1:0][LB-1:0] p_req_be = '0;
  logic [LB*8-1:0] p_rsp_rdata;
  logic llc_req_valid, llc_req_ready = 0, llc_req_we, llc_rsp_valid = 0, llc_rsp_ready;
  logic [PA_W-1:0] llc_req_addr;
  logic [LB*8-1:0] llc_req_wdata, llc_rsp_rdata = '0;
  logic [LB-1:0] llc_req_be;
  int checks = 0, failures = 0;

  ccs_llc_port_mux #(.LINE_BYTES(LB), .PA_W(PA_W), .MAX_OUT(16)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [LB*8-1:0] line_of(logic [PA_W-1:0] a);
    logic [LB*8-1:0] l;
    for (int w = 0; w < LB / 4; w++) l[w*32 +: 32] = a[31:0] ^ (32'h9e37_79b9 * (w + 1));
    return l;
  endfunction

  task automatic fail(string s);
    failures++;
    $display("FAIL %s at %0t", s, $time);
  endtask

  logic [PA_W-1:0] lq[$];          // reads inside the LLC model
  logic [PA_W-1:0] exq[2][$];      // reads each requester waits for
  int issued[2], rsp_cnt[2], reads[2], contention = 0, held_rsp = 0;
  bit fired[2];
  int who;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      for (int p = 0; p < 2; p++) begin
        if (fired[p]) p_req_valid[p] = 0;
        fired[p] = 0;
        if (!p_req_valid[p] && issued[p] < NREQ && $urandom_range(0, 2) != 0) begin
          p_req_valid[p] = 1;
          p_req_we[p]    = ($urandom_range(0, 3) == 0);
          p_req_addr[p]  = {PA_W'($urandom), 6'd0};
          for (int w = 0; w < LB / 4; w++) p_req_wdata[p][w*32 +: 32] = $urandom;
          p_req_be[p]    = {$urandom, $urandom};
          issued[p]++;
        end
      end
      p_rsp_ready   = 2'($urandom);
      llc_req_ready = ($urandom_range(0, 3) != 0);
      llc_rsp_valid = (lq.size() > 0) && ($urandom_range(0, 2) != 0);
      llc_rsp_rdata = (lq.size() > 0) ? line_of(lq[0]) : '0;
      #1;
      // fixed priority of the processor side
      if (p_req_valid == 2'b11) begin
        contention++;
        checks++;
        if (p_req_ready[1]) fail("CCS granted while processor side requests");
      end
      // request path
      if (llc_req_valid && llc_req_ready) begin
        who = -1;
        for (int p = 0; p < 2; p++) if (p_req_valid[p] && p_req_ready[p]) begin
          if (who != -1) fail("two requesters granted");
          who = p;
        end
        checks++;
        if (who < 0) fail("LLC request without a granted requester");
        else begin
          if (llc_req_we !== p_req_we[who] || llc_req_addr !== p_req_addr[who] ||
              llc_req_wdata !== p_req_wdata[who] || llc_req_be !== p_req_be[who])
            fail("request altered");
          fired[who] = 1;
          if (!p_req_we[who]) begin
            lq.push_back(p_req_addr[who]);
            exq[who].push_back(p_req_addr[who]);
            reads[who]++;
          end
        end
      end else begin
        checks++;
        if (|(p_req_valid & p_req_ready)) fail("requester granted but LLC did not take it");
      end
      // response path
      if (llc_rsp_valid) begin
        checks++;
        if (!$onehot(p_rsp_valid)) fail("response not routed to exactly one requester");
        else begin
          who = p_rsp_valid[1];
          if (exq[who].size() == 0) fail("response to a requester with no read");
          else if (llc_rsp_ready !== p_rsp_ready[who]) fail("ready not taken from the destination");
          else if (llc_rsp_ready) begin
            if (p_rsp_rdata !== line_of(exq[who][0])) fail("response data / order");
            void'(exq[who].pop_front());
            void'(lq.pop_front());
            rsp_cnt[who]++;
          end else held_rsp++;
        end
      end else begin
        checks++;
        if (p_rsp_valid !== 2'b00) fail("response without LLC response");
      end
      if (issued[0] == NREQ && issued[1] == NREQ && p_req_valid == 0 && lq.size() == 0) break;
    end
    for (int p = 0; p < 2; p++) begin
      checks++;
      if (rsp_cnt[p] != reads[p] || issued[p] != NREQ) fail($sformatf("requester %0d incomplete", p));
    end
    checks++;
    if (contention == 0 || held_rsp == 0) fail("contention or held responses not exercised");
    $display("contention=%0d held_responses=%0d reads=%0d/%0d", contention, held_rsp, reads[0], reads[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
