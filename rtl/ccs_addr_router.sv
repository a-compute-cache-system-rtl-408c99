// ccs_addr_router: sends each processor memory request either to the CCS
// programming interface or on to the memory subsystem.
//
// Requests whose address falls in the PI window [PI_BASE, PI_BASE + 256) go to
// the CCS registers (with the offset inside the window), all others to the
// memory side. Reads are answered in order: while reads are outstanding at one
// target, a request to the other target is held back (req_ready low), so the
// response can be taken from whichever target was last read.
//
// Interface: a valid/ready request channel with we, addr, 64-bit wdata on each
// side, and a response channel (rsp_valid, rsp_rdata) that the processor always
// accepts. No added latency. The document describes the routing function; the
// window base, size and the ordering rule are this design's.
module ccs_addr_router #(
  parameter int unsigned AW      = 48,
  parameter logic [47:0] PI_BASE = 48'h0000_2000_0000
) (
  input  logic          clk,
  input  logic          rst_n,
  // processor
  input  logic          cpu_req_valid,
  output logic          cpu_req_ready,
  input  logic          cpu_req_we,
  input  logic [AW-1:0] cpu_req_addr,
  input  logic [63:0]   cpu_req_wdata,
  output logic          cpu_rsp_valid,
  output logic [63:0]   cpu_rsp_rdata,
  // CCS programming interface
  output logic          pi_req_valid,
  input  logic          pi_req_ready,
  output logic          pi_req_we,
  output logic [7:0]    pi_req_addr,
  output logic [63:0]   pi_req_wdata,
  input  logic          pi_rsp_valid,
  input  logic [63:0]   pi_rsp_rdata,
  // memory subsystem
  output logic          mem_req_valid,
  input  logic          mem_req_ready,
  output logic          mem_req_we,
  output logic [AW-1:0] mem_req_addr,
  output logic [63:0]   mem_req_wdata,
  input  logic          mem_rsp_valid,
  input  logic [63:0]   mem_rsp_rdata
);
  logic       to_pi, blocked, acc_rd;
  logic       last_pi;        // target of the outstanding reads
  logic [7:0] outstanding;
  logic       rsp;

  assign to_pi   = (cpu_req_addr[AW-1:8] == PI_BASE[AW-1:8]);
  assign blocked = (outstanding != 0) && (to_pi != last_pi);

  assign pi_req_valid  = cpu_req_valid && to_pi && !blocked;
  assign pi_req_we     = cpu_req_we;
  assign pi_req_addr   = cpu_req_addr[7:0];
  assign pi_req_wdata  = cpu_req_wdata;
  assign mem_req_valid = cpu_req_valid && !to_pi && !blocked;
  assign mem_req_we    = cpu_req_we;
  assign mem_req_addr  = cpu_req_addr;
  assign mem_req_wdata = cpu_req_wdata;
  assign cpu_req_ready = !blocked && (to_pi ? pi_req_ready : mem_req_ready);

  assign acc_rd = cpu_req_valid && cpu_req_ready && !cpu_req_we;
  assign rsp    = last_pi ? pi_rsp_valid : mem_rsp_valid;

  assign cpu_rsp_valid = (outstanding != 0) && rsp;
  assign cpu_rsp_rdata = last_pi ? pi_rsp_rdata : mem_rsp_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      outstanding <= '0;
      last_pi     <= 1'b0;
    end else begin
      if (acc_rd) last_pi <= to_pi;
      outstanding <= outstanding + 8'(acc_rd) - 8'(cpu_rsp_valid);
    end
  end
endmodule
