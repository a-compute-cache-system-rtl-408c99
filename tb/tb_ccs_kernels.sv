// tb_ccs_kernels: the six kernels of the CCS evaluation, run end to end on the
// full-size system (64-byte lines, 32-bit elements) at the sizes of the
// evaluation:
//   ReLU      one RELUV over 100 x 100 = 10000 elements (625 line runs)
//   Conv 1D   1000 samples, 15 taps: one IPVV per output point (986 points)
//   Conv 2D   100 x 100 image, 3 x 3 kernel: one IPVV per point (98 x 98)
//   Conv 3D   10 x 10 x 10 volume, 3 x 3 x 3 kernel: one 27-element IPVV per
//             point (two runs, the second through the accumulator; 8 x 8 x 8)
//   Max pool  99 x 99 image, 3 x 3 patches, stride 3: one MAXV per patch (1089)
//   kNN       1000 training samples of 16 features, one test sample: one SSDVV
//             per training sample, then the host picks the 4 nearest and votes
//             among 8 classes
// The host side plays the processor. Conv 1D windows are read in place from the
// signal (operands at any element address); for the 2-D and 3-D windows and the
// pooling patches, which are not contiguous in memory, the host first gathers
// each window into a buffer. Scalar results are written densely, one element
// per output point. Each command is programmed through the register window and
// started without waiting; READINESS is polled once per kernel. Every result in the cache is compared with a
// reference computed here, and the cycles per kernel are printed.
module tb_ccs_kernels;
  import ccs_pkg::*;
  import tb_ccs_ref_pkg::*;

  localparam int LINE_BYTES = 64, N = 16, VA_W = 48, PA_W = 40;
  localparam longint PI_BASE = 64'h2000_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                    cpu_req_valid = 0, cpu_req_ready, cpu_req_we = 0, cpu_rsp_valid;
  logic [VA_W-1:0]         cpu_req_addr = '0;
  logic [63:0]             cpu_req_wdata = '0, cpu_rsp_rdata;
  logic                    mem_req_valid, mem_req_ready, mem_req_we, mem_rsp_valid;
  logic [VA_W-1:0]         mem_req_addr;
  logic [63:0]             mem_req_wdata, mem_rsp_rdata;
  logic                    tlb_flush = 0, tlb_fill_valid = 0, tlb_miss;
  logic [3:0]              tlb_fill_idx = '0;
  logic [VA_W-13:0]        tlb_fill_vpn = '0;
  logic [PA_W-13:0]        tlb_fill_ppn = '0;
  logic [VA_W-1:0]         tlb_miss_va;
  logic                    l1_req_valid, l1_req_ready, l1_req_we, l1_rsp_valid, l1_rsp_ready;
  logic [PA_W-1:0]         l1_req_addr;
  logic [LINE_BYTES*8-1:0] l1_req_wdata, l1_rsp_rdata;
  logic [LINE_BYTES-1:0]   l1_req_be;
  logic                    llc_req_valid, llc_req_ready, llc_req_we, llc_rsp_valid, llc_rsp_ready;
  logic [PA_W-1:0]         llc_req_addr;
  logic [LINE_BYTES*8-1:0] llc_req_wdata, llc_rsp_rdata;
  logic [LINE_BYTES-1:0]   llc_req_be;
  logic                    ccs_ready;

  ccs_top dut (.*);

  tb_ccs_llc_model #(.LINE_BYTES(LINE_BYTES), .PA_W(PA_W), .HIT_LAT(2), .MISS_LAT(12), .BP(0)) llc (
    .clk, .req_valid(llc_req_valid && rst_n), .req_ready(llc_req_ready), .req_we(llc_req_we),
    .req_addr(llc_req_addr), .req_wdata(llc_req_wdata), .req_be(llc_req_be),
    .rsp_valid(llc_rsp_valid), .rsp_ready(llc_rsp_ready), .rsp_rdata(llc_rsp_rdata));

  assign l1_req_we    = 1'b0;
  assign l1_req_wdata = '0;
  assign l1_req_be    = '0;
  assign l1_rsp_ready = 1'b1;

  // ------------------------------------------------------ host memory side
  assign mem_req_ready = 1'b1;
  always @(posedge clk) begin
    mem_rsp_valid <= mem_req_valid && !mem_req_we;
    mem_rsp_rdata <= 64'(mem_req_addr) ^ 64'h5a5a;
  end

  int checks = 0, failures = 0;
  int n_fill = 0;

  // ------------------------------------------------------ TLB refill agent
  function automatic longint v2p(longint va);
    return (((va >> 12) + 64'h100) << 12) | (va & 64'hfff);
  endfunction
  always @(posedge clk) begin
    tlb_fill_valid <= 1'b0;
    if (rst_n && tlb_miss && !tlb_fill_valid) begin
      tlb_fill_valid <= 1'b1;
      tlb_fill_vpn   <= tlb_miss_va[VA_W-1:12];
      tlb_fill_ppn   <= PA_W'(v2p(longint'(tlb_miss_va)) >> 12);
      tlb_fill_idx   <= tlb_fill_idx + 1'b1;
      n_fill++;
    end
  end

  // the upper cache levels stay quiet in this test
  assign l1_req_valid = 1'b0;
  assign l1_req_addr  = '0;

  // ------------------------------------------------------------ host bus
  task automatic bus_write(longint addr, longint data);
    @(negedge clk);
    cpu_req_valid = 1; cpu_req_we = 1; cpu_req_addr = VA_W'(addr); cpu_req_wdata = data;
    @(posedge clk);
    while (!cpu_req_ready) @(posedge clk);
    #1 cpu_req_valid = 0;
  endtask
  task automatic bus_read(longint addr, output longint data);
    @(negedge clk);
    cpu_req_valid = 1; cpu_req_we = 0; cpu_req_addr = VA_W'(addr);
    @(posedge clk);
    while (!cpu_req_ready) @(posedge clk);
    #1 cpu_req_valid = 0;
    while (!cpu_rsp_valid) @(posedge clk) #1;
    data = cpu_rsp_rdata;
  endtask
  task automatic pi_wr(logic [7:0] off, longint v); bus_write(PI_BASE + off, v); endtask
  task automatic ccs_setup(ccs_cmd_e c, int len, longint k, longint a, longint b, longint r, int s);
    pi_wr(PI_CMD_ID, c); pi_wr(PI_OP_LEN, len); pi_wr(PI_K, k);
    pi_wr(PI_OPA_ADDR, a); pi_wr(PI_OPB_ADDR, b); pi_wr(PI_RES_ADDR, r); pi_wr(PI_STRIDE, s);
  endtask
  task automatic ccs_wait();
    longint r = 0;
    while (r != 1) bus_read(PI_BASE + PI_READINESS, r);
  endtask

  // --------------------------------------------------------- data helpers
  function automatic bit [31:0] rd_elem(longint va);
    bit [511:0] l = llc.peek(v2p(va) >> 6);
    return l[((va >> 2) & 15) * 32 +: 32];
  endfunction
  function automatic void wr_elem(longint va, bit [31:0] v);
    bit [511:0] l = llc.peek(v2p(va) >> 6);
    l[((va >> 2) & 15) * 32 +: 32] = v;
    llc.mem[v2p(va) >> 6] = l;
  endfunction
  function automatic longint eaddr(longint base, int i, int s);
    return base + longint'(i / N) * s * LINE_BYTES + longint'(i % N) * 4;
  endfunction


  // per-line operand layout: window w occupies the line at base + w*64
  longint base;
  longint t0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  task automatic check_eq(string what, int idx, bit [31:0] got, bit [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s %0d got %0d exp %0d", what, idx, int'(got), int'(exp));
    end
  endtask

  task automatic kernel_done(string name, int cmds);
    ccs_wait();
    $display("%-10s %6d commands %8d cycles", name, cmds, cyc - t0);
  endtask

  bit [31:0] img [];
  bit [31:0] ker [];
  bit [31:0] wv[], hv[];
  longint dsq[1000];
  int cls[1000];

  initial begin
    longint a, h, r;
    int np, n;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // ------------------------------------------------------------------ ReLU
    base = 64'h100_0000; t0 = cyc;
    img = new[10000];
    foreach (img[i]) begin img[i] = $urandom_range(0, 2000) - 1000; wr_elem(base + i * 4, img[i]); end
    ccs_setup(RELUV, 10000, 0, base, base, base + 64'h10_0000, 1); pi_wr(PI_START, 1);
    kernel_done("ReLU", 1);
    foreach (img[i]) check_eq("relu", i, rd_elem(base + 64'h10_0000 + i * 4), (int'(img[i]) > 0) ? img[i] : 0);

    // --------------------------------------------------------------- Conv 1D
    base = 64'h200_0000; t0 = cyc;
    img = new[1000]; ker = new[15];
    foreach (img[i]) begin img[i] = $urandom_range(0, 200) - 100; wr_elem(base + 64'h1000 + i * 4, img[i]); end
    foreach (ker[i]) begin ker[i] = $urandom_range(0, 20) - 10; wr_elem(base + i * 4, ker[i]); end
    np = 1000 - 15 + 1;
    // each window is read in place from the signal (any element address)
    for (int o = 0; o < np; o++) begin
      ccs_setup(IPVV, 15, 0, base + 64'h1000 + o * 4, base, base + 64'h10_0000 + o * 4, 1);
      pi_wr(PI_START, 1);
    end
    kernel_done("Conv1D", np);
    wv = new[15];
    for (int o = 0; o < np; o++) begin
      foreach (wv[t]) wv[t] = img[o + t];
      check_eq("conv1d", o, rd_elem(base + 64'h10_0000 + o * 4), ref_reduce(IPVV, wv, ker));
    end

    // --------------------------------------------------------------- Conv 2D
    base = 64'h400_0000; t0 = cyc;
    img = new[10000]; ker = new[9];
    foreach (img[i]) img[i] = $urandom_range(0, 200) - 100;
    foreach (ker[i]) begin ker[i] = $urandom_range(0, 20) - 10; wr_elem(base + i * 4, ker[i]); end
    n = 0;
    for (int y = 0; y < 98; y++)
      for (int x = 0; x < 98; x++) begin
        a = base + 64'h1000 + n * 64;
        for (int t = 0; t < 9; t++) wr_elem(a + t * 4, img[(y + t / 3) * 100 + x + t % 3]);
        ccs_setup(IPVV, 9, 0, a, base, base + 64'h20_0000 + n * 4, 1); pi_wr(PI_START, 1);
        n++;
      end
    kernel_done("Conv2D", n);
    wv = new[9];
    n = 0;
    for (int y = 0; y < 98; y++)
      for (int x = 0; x < 98; x++) begin
        foreach (wv[t]) wv[t] = img[(y + t / 3) * 100 + x + t % 3];
        check_eq("conv2d", n, rd_elem(base + 64'h20_0000 + n * 4), ref_reduce(IPVV, wv, ker));
        n++;
      end

    // --------------------------------------------------------------- Conv 3D
    // a 27-element window spans two lines: both lines of window n are at
    // base + 0x1000 + n*128, the kernel at base (two lines)
    base = 64'h800_0000; t0 = cyc;
    img = new[1000]; ker = new[27];
    foreach (img[i]) img[i] = $urandom_range(0, 200) - 100;
    foreach (ker[i]) begin ker[i] = $urandom_range(0, 20) - 10; wr_elem(base + i * 4, ker[i]); end
    n = 0;
    for (int z = 0; z < 8; z++)
      for (int y = 0; y < 8; y++)
        for (int x = 0; x < 8; x++) begin
          a = base + 64'h1000 + n * 128;
          for (int t = 0; t < 27; t++) wr_elem(a + t * 4, img[(z + t / 9) * 100 + (y + (t / 3) % 3) * 10 + x + t % 3]);
          ccs_setup(IPVV, 27, 0, a, base, base + 64'h10_0000 + n * 4, 1); pi_wr(PI_START, 1);
          n++;
        end
    kernel_done("Conv3D", n);
    wv = new[27];
    n = 0;
    for (int z = 0; z < 8; z++)
      for (int y = 0; y < 8; y++)
        for (int x = 0; x < 8; x++) begin
          foreach (wv[t]) wv[t] = img[(z + t / 9) * 100 + (y + (t / 3) % 3) * 10 + x + t % 3];
          check_eq("conv3d", n, rd_elem(base + 64'h10_0000 + n * 4), ref_reduce(IPVV, wv, ker));
          n++;
        end

    // -------------------------------------------------------------- Max pool
    base = 64'hc00_0000; t0 = cyc;
    img = new[99 * 99];
    foreach (img[i]) img[i] = $urandom_range(0, 20000) - 10000;
    n = 0;
    for (int y = 0; y < 33; y++)
      for (int x = 0; x < 33; x++) begin
        a = base + n * 64;
        for (int t = 0; t < 9; t++) wr_elem(a + t * 4, img[(3 * y + t / 3) * 99 + 3 * x + t % 3]);
        ccs_setup(MAXV, 9, 0, a, a, base + 64'h10_0000 + n * 4, 1); pi_wr(PI_START, 1);
        n++;
      end
    kernel_done("MaxPool", n);
    wv = new[9];
    n = 0;
    for (int y = 0; y < 33; y++)
      for (int x = 0; x < 33; x++) begin
        foreach (wv[t]) wv[t] = img[(3 * y + t / 3) * 99 + 3 * x + t % 3];
        check_eq("maxpool", n, rd_elem(base + 64'h10_0000 + n * 4), ref_reduce(MAXV, wv, wv));
        n++;
      end

    // ------------------------------------------------------------------- kNN
    base = 64'h1000_0000; t0 = cyc;
    ker = new[16];
    foreach (ker[f]) begin ker[f] = $urandom_range(0, 200) - 100; wr_elem(base + f * 4, ker[f]); end
    img = new[16000];
    for (int s = 0; s < 1000; s++) begin
      cls[s] = $urandom_range(0, 7);
      for (int f = 0; f < 16; f++) begin
        img[s * 16 + f] = $urandom_range(0, 200) - 100 + cls[s] * 10;
        wr_elem(base + 64'h1000 + s * 64 + f * 4, img[s * 16 + f]);
      end
      ccs_setup(SSDVV, 16, 0, base + 64'h1000 + s * 64, base, base + 64'h10_0000 + s * 64, 1);
      pi_wr(PI_START, 1);
    end
    kernel_done("kNN", 1000);
    wv = new[16];
    for (int s = 0; s < 1000; s++) begin
      foreach (wv[f]) wv[f] = img[s * 16 + f];
      dsq[s] = longint'(rd_elem(base + 64'h10_0000 + s * 64));
      check_eq("knn distance", s, 32'(dsq[s]), ref_reduce(SSDVV, wv, ker));
    end
    begin
      // host side: 4 nearest neighbours, majority vote (ties to the lower class)
      int votes[8], best, nn[4];
      bit used[1000];
      foreach (votes[c]) votes[c] = 0;
      for (int q = 0; q < 4; q++) begin
        nn[q] = -1;
        for (int s = 0; s < 1000; s++)
          if (!used[s] && (nn[q] < 0 || dsq[s] < dsq[nn[q]])) nn[q] = s;
        used[nn[q]] = 1;
        votes[cls[nn[q]]]++;
      end
      best = 0;
      foreach (votes[c]) if (votes[c] > votes[best]) best = c;
      $display("kNN: nearest %0d %0d %0d %0d, class %0d", nn[0], nn[1], nn[2], nn[3], best);
      checks++;
      if (nn[0] < 0) failures++;
    end

    $display("TLB refills: %0d", n_fill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
