// tb_ccs_tlb: fills the 16 entries with random page pairs, looks up mapped and
// unmapped addresses on both ports (the physical address keeps the page
// offset), overwrites entries, and checks that a flush unmaps everything.
module tb_ccs_tlb;
  localparam int VA_W = 48, PA_W = 40, PB = 12, E = 16;
  logic clk = 0, rst_n = 0, flush = 0, fill_valid = 0;
  logic [3:0] fill_idx = '0;
  logic [VA_W-PB-1:0] fill_vpn = '0;
  logic [PA_W-PB-1:0] fill_ppn = '0;
  logic [1:0][VA_W-1:0] lk_va = '0;
  logic [1:0][PA_W-1:0] lk_pa;
  logic [1:0] lk_hit;
  int checks = 0, failures = 0;

  ccs_tlb #(.ENTRIES(E), .NPORTS(2), .VA_W(VA_W), .PA_W(PA_W), .PAGE_BITS(PB)) dut (.*);
  always #5 clk = ~clk;

  logic [VA_W-PB-1:0] vpn [E];
  logic [PA_W-PB-1:0] ppn [E];

  task automatic fill(int i, logic [VA_W-PB-1:0] v, logic [PA_W-PB-1:0] p);
    @(negedge clk);
    fill_valid = 1; fill_idx = 4'(i); fill_vpn = v; fill_ppn = p;
    @(negedge clk);
    fill_valid = 0;
    vpn[i] = v; ppn[i] = p;
  endtask

  task automatic look(int port, logic [VA_W-1:0] va, bit exp_hit, logic [PA_W-1:0] exp_pa);
    lk_va[port] = va;
    #1;
    checks++;
    if (lk_hit[port] !== exp_hit || (exp_hit && lk_pa[port] !== exp_pa)) begin
      failures++; $display("FAIL port %0d va %h hit %b pa %h exp %b %h", port, va, lk_hit[port], lk_pa[port], exp_hit, exp_pa);
    end
  endtask

  initial begin
    logic [11:0] off;
    logic [VA_W-PB-1:0] probe;
    logic [PA_W-PB-1:0] pp;
    bit hit;
    repeat (2) @(negedge clk);
    rst_n = 1;
    look(0, 48'h1234_5678, 0, '0);
    for (int i = 0; i < E; i++) fill(i, (VA_W-PB)'(64'h1000 + i * 3), (PA_W-PB)'($urandom));
    // overwrites keep the virtual pages distinct (a refill reuses a freed page number)
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < E; i++) begin
        off = 12'($urandom);
        look(i % 2, {vpn[i], off}, 1, {ppn[i], off});
        probe = vpn[i] + 36'd1;
        hit = 0; pp = '0;
        for (int j = 0; j < E; j++) if (vpn[j] == probe) begin hit = 1; pp = ppn[j]; end
        look((i + 1) % 2, {probe, off}, hit, {pp, off});
      end
      begin
        int idx;
        idx = $urandom_range(0, E - 1);
        fill(idx, vpn[idx] + (VA_W-PB)'(48 * (r + 1)), (PA_W-PB)'($urandom));
      end
    end
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    for (int i = 0; i < E; i++) look(0, {vpn[i], 12'h0}, 0, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
