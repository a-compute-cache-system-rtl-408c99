// ccs_top: Cache Compute System attached to a last-level cache.
//
// The CCS is a co-processor that computes on whole cache lines next to the
// last-level cache (LLC). The host programs it through memory-mapped registers
// (ccs_prog_if, reached through ccs_addr_router on the host's data port),
// starts it, and later polls for readiness. The CCS translates the operand and
// result addresses with its own TLB (ccs_tlb, filled by the host side), fetches
// operand lines from the LLC one per cycle, computes in a pipelined tree of
// functional units (ccs_control with ccs_datapath) and writes result lines
// back into the LLC, whose coherence machinery keeps the upper cache levels up
// to date. The LLC port is shared with the processor's upper cache levels
// through ccs_llc_port_mux.
//
// Ports brought out because the parts behind them are not part of this RTL:
//   cpu_*   the host processor's data port (register reads/writes and its
//           other memory traffic)
//   mem_*   the host traffic that is not for the CCS, towards the memory system
//   l1_*    line requests from the processor's upper cache levels to the LLC
//   llc_*   the LLC itself (in-order responses, byte-enabled line writes)
//   tlb_*   fill/flush of the CCS TLB by the host side, and the miss report
// ccs_ready mirrors the READINESS register.
// Default sizes follow the document's evaluated system: 64-byte lines and
// 32-bit elements (16 lanes). Address widths, TLB size and the register window
// base are this design's choices.
module ccs_top
  import ccs_pkg::*;
#(
  parameter int unsigned LINE_BYTES  = 64,
  parameter int unsigned DW          = 32,
  parameter int unsigned VA_W        = 48,
  parameter int unsigned PA_W        = 40,
  parameter int unsigned TLB_ENTRIES = 16,
  parameter int unsigned MAX_OUT     = 8,
  parameter logic [47:0] PI_BASE     = 48'h0000_2000_0000,
  localparam int unsigned TLB_IDX_W  = $clog2(TLB_ENTRIES)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // host data port
  input  logic                       cpu_req_valid,
  output logic                       cpu_req_ready,
  input  logic                       cpu_req_we,
  input  logic [VA_W-1:0]            cpu_req_addr,
  input  logic [63:0]                cpu_req_wdata,
  output logic                       cpu_rsp_valid,
  output logic [63:0]                cpu_rsp_rdata,
  // host traffic not for the CCS
  output logic                       mem_req_valid,
  input  logic                       mem_req_ready,
  output logic                       mem_req_we,
  output logic [VA_W-1:0]            mem_req_addr,
  output logic [63:0]                mem_req_wdata,
  input  logic                       mem_rsp_valid,
  input  logic [63:0]                mem_rsp_rdata,
  // TLB synchronisation
  input  logic                       tlb_flush,
  input  logic                       tlb_fill_valid,
  input  logic [TLB_IDX_W-1:0]       tlb_fill_idx,
  input  logic [VA_W-13:0]           tlb_fill_vpn,
  input  logic [PA_W-13:0]           tlb_fill_ppn,
  output logic                       tlb_miss,
  output logic [VA_W-1:0]            tlb_miss_va,
  // upper cache levels -> LLC
  input  logic                       l1_req_valid,
  output logic                       l1_req_ready,
  input  logic                       l1_req_we,
  input  logic [PA_W-1:0]            l1_req_addr,
  input  logic [LINE_BYTES*8-1:0]    l1_req_wdata,
  input  logic [LINE_BYTES-1:0]      l1_req_be,
  output logic                       l1_rsp_valid,
  input  logic                       l1_rsp_ready,
  output logic [LINE_BYTES*8-1:0]    l1_rsp_rdata,
  // LLC port
  output logic                       llc_req_valid,
  input  logic                       llc_req_ready,
  output logic                       llc_req_we,
  output logic [PA_W-1:0]            llc_req_addr,
  output logic [LINE_BYTES*8-1:0]    llc_req_wdata,
  output logic [LINE_BYTES-1:0]      llc_req_be,
  input  logic                       llc_rsp_valid,
  output logic                       llc_rsp_ready,
  input  logic [LINE_BYTES*8-1:0]    llc_rsp_rdata,
  // readiness
  output logic                       ccs_ready
);
  // ----------------------------------------------------------- host side
  logic        pi_req_valid, pi_req_ready, pi_req_we, pi_rsp_valid;
  logic [7:0]  pi_req_addr;
  logic [63:0] pi_req_wdata, pi_rsp_rdata;

  ccs_addr_router #(.AW(VA_W), .PI_BASE(PI_BASE)) u_router (
    .clk, .rst_n,
    .cpu_req_valid, .cpu_req_ready, .cpu_req_we, .cpu_req_addr, .cpu_req_wdata,
    .cpu_rsp_valid, .cpu_rsp_rdata,
    .pi_req_valid, .pi_req_ready, .pi_req_we, .pi_req_addr, .pi_req_wdata,
    .pi_rsp_valid, .pi_rsp_rdata,
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata,
    .mem_rsp_valid, .mem_rsp_rdata);

  logic            cmd_valid, cmd_accept, engine_idle, ovf_pulse;
  logic [5:0]      cmd_id;
  logic [31:0]     cmd_len, cmd_stride;
  logic [DW-1:0]   cmd_k;
  logic [VA_W-1:0] cmd_opa, cmd_opb, cmd_res;

  ccs_prog_if #(.VA_W(VA_W), .DW(DW)) u_pi (
    .clk, .rst_n,
    .req_valid(pi_req_valid), .req_ready(pi_req_ready), .req_we(pi_req_we),
    .req_addr(pi_req_addr), .req_wdata(pi_req_wdata),
    .rsp_valid(pi_rsp_valid), .rsp_rdata(pi_rsp_rdata),
    .cmd_valid, .cmd_accept, .cmd_id, .cmd_len, .cmd_k, .cmd_opa, .cmd_opb,
    .cmd_res, .cmd_stride,
    .engine_idle, .ovf_pulse, .tlb_miss);

  assign ccs_ready = !cmd_valid && engine_idle;

  // ------------------------------------------------------------------ TLB
  logic [1:0][VA_W-1:0] xl_va;
  logic [1:0][PA_W-1:0] xl_pa;
  logic [1:0]           xl_hit;

  ccs_tlb #(.ENTRIES(TLB_ENTRIES), .NPORTS(2), .VA_W(VA_W), .PA_W(PA_W),
            .PAGE_BITS(12)) u_tlb (
    .clk, .rst_n, .flush(tlb_flush),
    .fill_valid(tlb_fill_valid), .fill_idx(tlb_fill_idx),
    .fill_vpn(tlb_fill_vpn), .fill_ppn(tlb_fill_ppn),
    .lk_va(xl_va), .lk_pa(xl_pa), .lk_hit(xl_hit));

  // ------------------------------------------------------ compute engine
  logic                    c_req_valid, c_req_ready, c_req_we, c_rsp_valid, c_rsp_ready;
  logic [PA_W-1:0]         c_req_addr;
  logic [LINE_BYTES*8-1:0] c_req_wdata;
  logic [LINE_BYTES-1:0]   c_req_be;

  ccs_control #(.LINE_BYTES(LINE_BYTES), .DW(DW), .VA_W(VA_W), .PA_W(PA_W),
                .MAX_OUT(MAX_OUT)) u_ctl (
    .clk, .rst_n,
    .cmd_valid, .cmd_accept, .cmd_id, .cmd_len, .cmd_k, .cmd_opa, .cmd_opb,
    .cmd_res, .cmd_stride,
    .xl_va, .xl_pa, .xl_hit, .tlb_miss, .tlb_miss_va,
    .req_valid(c_req_valid), .req_ready(c_req_ready), .req_we(c_req_we),
    .req_addr(c_req_addr), .req_wdata(c_req_wdata), .req_be(c_req_be),
    .rsp_valid(c_rsp_valid), .rsp_ready(c_rsp_ready), .rsp_rdata(llc_rsp_rdata),
    .idle(engine_idle), .ovf(ovf_pulse));

  // ------------------------------------------------------------ LLC port
  logic [1:0]                   p_rsp_valid, p_req_ready;
  logic [LINE_BYTES*8-1:0]      p_rsp_rdata;

  ccs_llc_port_mux #(.LINE_BYTES(LINE_BYTES), .PA_W(PA_W)) u_mux (
    .clk, .rst_n,
    .p_req_valid({c_req_valid, l1_req_valid}),
    .p_req_ready(p_req_ready),
    .p_req_we({c_req_we, l1_req_we}),
    .p_req_addr({c_req_addr, l1_req_addr}),
    .p_req_wdata({c_req_wdata, l1_req_wdata}),
    .p_req_be({c_req_be, l1_req_be}),
    .p_rsp_valid(p_rsp_valid),
    .p_rsp_ready({c_rsp_ready, l1_rsp_ready}),
    .p_rsp_rdata(p_rsp_rdata),
    .llc_req_valid, .llc_req_ready, .llc_req_we, .llc_req_addr, .llc_req_wdata,
    .llc_req_be, .llc_rsp_valid, .llc_rsp_ready, .llc_rsp_rdata);

  assign l1_req_ready = p_req_ready[0];
  assign c_req_ready  = p_req_ready[1];
  assign l1_rsp_valid = p_rsp_valid[0];
  assign c_rsp_valid  = p_rsp_valid[1];
  assign l1_rsp_rdata = p_rsp_rdata;
endmodule
