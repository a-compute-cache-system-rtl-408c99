// tb_ccs_addr_router: a random processor issues reads and writes, part of them
// inside the CCS programming-interface window. A PI model answers reads one
// cycle after accepting them; a memory model answers after random delays with
// random back-pressure. Checks: each request goes to exactly the right target
// (with the window offset for the PI), no response is lost, and read data
// returns to the processor in issue order.
module tb_ccs_addr_router;
  localparam int AW = 48;
  localparam logic [47:0] PI_BASE = 48'h0000_2000_0000;
  logic clk = 0, rst_n = 0;
  logic cpu_req_valid = 0, cpu_req_ready, cpu_req_we = 0, cpu_rsp_valid;
  logic [AW-1:0] cpu_req_addr = '0;
  logic [63:0] cpu_req_wdata = '0, cpu_rsp_rdata;
  logic pi_req_valid, pi_req_ready = 0, pi_req_we, pi_rsp_valid = 0;
  logic [7:0] pi_req_addr;
  logic [63:0] pi_req_wdata, pi_rsp_rdata = '0;
  logic mem_req_valid, mem_req_ready = 0, mem_req_we, mem_rsp_valid = 0;
  logic [AW-1:0] mem_req_addr;
  logic [63:0] mem_req_wdata, mem_rsp_rdata = '0;
  int checks = 0, failures = 0;

  ccs_addr_router #(.AW(AW), .PI_BASE(PI_BASE)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [63:0] mem_data(logic [AW-1:0] a);
    return {16'h3e3e, a} ^ 64'h0123_4567_89ab_cdef;
  endfunction
  function automatic logic [63:0] pi_data(logic [7:0] a);
    return {56'h5a5a5a_5a5a5a5a, a};
  endfunction
  task automatic fail(string s);
    failures++;
    $display("FAIL %s at %0t", s, $time);
  endtask

  typedef struct { bit pi; logic [AW-1:0] addr; } rd_t;
  rd_t cq[$];                       // reads the processor waits for
  logic [AW-1:0] mq[$];             // reads inside the memory model
  bit pi_rd_last, fired, to_pi;
  logic [7:0] pi_addr_last;
  int n_issued = 0, n_pi = 0, n_mem = 0, n_rsp = 0, n_blocked = 0;
  localparam int NREQ = 1500;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 30000; cyc++) begin
      @(negedge clk);
      if (fired) cpu_req_valid = 0;
      fired = 0;
      if (!cpu_req_valid && n_issued < NREQ && $urandom_range(0, 3) != 0) begin
        to_pi = $urandom_range(0, 1);
        cpu_req_valid = 1;
        cpu_req_we    = ($urandom_range(0, 2) == 0);
        cpu_req_addr  = to_pi ? {PI_BASE[AW-1:8], 8'($urandom) & 8'hf8}
                              : {16'($urandom) | 16'h1, 32'($urandom) & 32'hffff_fff8};
        cpu_req_wdata = {$urandom, $urandom};
        n_issued++;
      end
      // PI model: reads answered the cycle after acceptance
      pi_rsp_valid  = pi_rd_last;
      pi_rsp_rdata  = pi_rd_last ? pi_data(pi_addr_last) : '0;
      pi_req_ready  = ($urandom_range(0, 4) != 0);
      // memory model
      mem_req_ready = ($urandom_range(0, 3) != 0);
      mem_rsp_valid = (mq.size() > 0) && ($urandom_range(0, 2) == 0);
      mem_rsp_rdata = (mq.size() > 0) ? mem_data(mq[0]) : '0;
      #1;
      pi_rd_last = 0;
      to_pi = cpu_req_addr[AW-1:8] == PI_BASE[AW-1:8];
      if (cpu_req_valid) begin
        checks++;
        if (to_pi ? mem_req_valid : pi_req_valid) fail("request sent to the wrong target");
        if (!cpu_req_ready && !(to_pi ? pi_req_valid : mem_req_valid)) n_blocked++;
      end else begin
        checks++;
        if (pi_req_valid || mem_req_valid) fail("request without processor request");
      end
      if (cpu_req_valid && cpu_req_ready) begin
        checks++;
        fired = 1;
        if (to_pi) begin
          n_pi++;
          if (!(pi_req_valid && pi_req_ready) || pi_req_addr !== cpu_req_addr[7:0] ||
              pi_req_we !== cpu_req_we || pi_req_wdata !== cpu_req_wdata) fail("PI request");
          if (!cpu_req_we) begin pi_rd_last = 1; pi_addr_last = cpu_req_addr[7:0]; end
        end else begin
          n_mem++;
          if (!(mem_req_valid && mem_req_ready) || mem_req_addr !== cpu_req_addr ||
              mem_req_we !== cpu_req_we || mem_req_wdata !== cpu_req_wdata) fail("memory request");
          if (!cpu_req_we) mq.push_back(cpu_req_addr);
        end
        if (!cpu_req_we) cq.push_back('{pi: to_pi, addr: cpu_req_addr});
      end
      if (pi_rsp_valid || mem_rsp_valid) begin
        checks++;
        if (!cpu_rsp_valid) fail("response lost");
      end
      if (cpu_rsp_valid) begin
        checks++;
        if (cq.size() == 0) fail("response without read");
        else begin
          if (cpu_rsp_rdata !== (cq[0].pi ? pi_data(cq[0].addr[7:0]) : mem_data(cq[0].addr)))
            fail("response data / order");
          void'(cq.pop_front());
          n_rsp++;
        end
      end
      if (mem_rsp_valid) void'(mq.pop_front());
      if (n_issued == NREQ && !cpu_req_valid && cq.size() == 0 && !pi_rd_last) break;
    end
    checks++;
    if (n_pi + n_mem != NREQ || cq.size() != 0 || n_blocked == 0) fail("incomplete run");
    $display("pi=%0d mem=%0d responses=%0d blocked_cycles=%0d", n_pi, n_mem, n_rsp, n_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
