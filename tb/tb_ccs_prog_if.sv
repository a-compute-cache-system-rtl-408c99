// tb_ccs_prog_if: drives the host bus of the programming interface. Checks the
// read-back of every parameter register, the reset value of STRIDE, that a
// START write copies the parameters into the command queue, that a second START
// is held off while the queued command has not been taken, that later writes do
// not disturb a queued command, READINESS, the sticky overflow flag with its
// write-1-to-clear, and the TLB-miss status bit.
module tb_ccs_prog_if;
  import ccs_pkg::*;
  localparam int VA_W = 48, DW = 32;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, req_we = 0, rsp_valid;
  logic [7:0] req_addr = '0;
  logic [63:0] req_wdata = '0, rsp_rdata;
  logic cmd_valid, cmd_accept = 0;
  logic [5:0] cmd_id;
  logic [31:0] cmd_len, cmd_stride;
  logic [DW-1:0] cmd_k;
  logic [VA_W-1:0] cmd_opa, cmd_opb, cmd_res;
  logic engine_idle = 1, ovf_pulse = 0, tlb_miss = 0;
  int checks = 0, failures = 0;

  ccs_prog_if #(.VA_W(VA_W), .DW(DW)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  // one bus transfer; returns the number of cycles the request waited
  task automatic wr(logic [7:0] a, logic [63:0] d, output int waited);
    @(negedge clk);
    req_valid = 1; req_we = 1; req_addr = a; req_wdata = d;
    waited = 0;
    #1;
    while (!req_ready) begin @(negedge clk); #1; waited++; end
    @(negedge clk);
    req_valid = 0;
  endtask

  task automatic rd(logic [7:0] a, output logic [63:0] d);
    @(negedge clk);
    req_valid = 1; req_we = 0; req_addr = a;
    #1;
    while (!req_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    req_valid = 0;
    #1;
    check(rsp_valid === 1'b1, "read response valid");
    d = rsp_rdata;
  endtask

  logic [63:0] val [7];
  logic [7:0]  regs [7] = '{PI_CMD_ID, PI_OP_LEN, PI_K, PI_OPA_ADDR, PI_OPB_ADDR, PI_RES_ADDR, PI_STRIDE};
  logic [63:0] d;
  int w;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    rd(PI_STRIDE, d);    check(d == 64'd1, "STRIDE reset value");
    rd(PI_READINESS, d); check(d == 64'd1, "ready after reset");
    rd(PI_STATUS, d);    check(d == 64'd0, "status after reset");
    for (int r = 0; r < 20; r++) begin
      for (int i = 0; i < 7; i++) begin
        val[i] = {$urandom, $urandom};
        wr(regs[i], val[i], w);
        check(w == 0, "parameter write not delayed");
      end
      for (int i = 0; i < 7; i++) begin
        rd(regs[i], d);
        check(d === val[i], $sformatf("read-back of register %h", regs[i]));
      end
      check(!cmd_valid, "queue empty before START");
      wr(PI_START, 64'd1, w);
      check(w == 0, "START into empty queue not delayed");
      check(cmd_valid && cmd_id == val[0][5:0] && cmd_len == val[1][31:0] && cmd_k == val[2][DW-1:0] &&
            cmd_opa == val[3][VA_W-1:0] && cmd_opb == val[4][VA_W-1:0] &&
            cmd_res == val[5][VA_W-1:0] && cmd_stride == val[6][31:0], "queued command fields");
      rd(PI_READINESS, d); check(d == 64'd0, "not ready while a command is queued");
      // overwrite a parameter and try a second START while the queue is full
      wr(PI_OP_LEN, 64'h77, w);
      check(cmd_len == val[1][31:0], "queued command unaffected by writes");
      fork
        wr(PI_START, 64'd1, w);
        begin
          repeat (4) @(negedge clk);
          cmd_accept = 1;
          @(negedge clk);
          cmd_accept = 0;
        end
      join
      check(w >= 3, "second START held while queue full");
      check(cmd_valid && cmd_len == 32'h77, "second command queued after accept");
      @(negedge clk); cmd_accept = 1; @(negedge clk); cmd_accept = 0;
      check(!cmd_valid, "queue empties on accept");
      // START with bit 0 clear does nothing
      wr(PI_START, 64'd2, w);
      check(!cmd_valid, "START without bit 0 ignored");
    end
    engine_idle = 0;
    rd(PI_READINESS, d); check(d == 64'd0, "not ready while the engine works");
    engine_idle = 1;
    @(negedge clk); ovf_pulse = 1; @(negedge clk); ovf_pulse = 0;
    rd(PI_STATUS, d); check(d == 64'd1, "overflow sticky");
    rd(PI_STATUS, d); check(d == 64'd1, "overflow stays set");
    wr(PI_STATUS, 64'd1, w);
    rd(PI_STATUS, d); check(d == 64'd0, "overflow cleared by writing 1");
    tlb_miss = 1;
    rd(PI_STATUS, d); check(d == 64'd2, "TLB miss status");
    tlb_miss = 0;
    rd(8'hf0, d); check(d == 64'd0, "unmapped offset reads 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
