// ccs_prog_if: the CCS programming interface (memory-mapped registers).
//
// The host programs a command by writing its descriptor registers and then the
// START register; it polls READINESS to learn that all results are in the
// cache. Registers (64 bits each, byte offsets from ccs_pkg):
//   0x00 CMD_ID   0x08 OP_LEN (elements)   0x10 K (constant)
//   0x18 OPA_ADDR 0x20 OPB_ADDR            0x28 RES_ADDR (virtual addresses)
//   0x30 STRIDE   (lines between consecutive lines of a split operand)
//   0x38 START    (write: queue the programmed command)
//   0x40 READINESS (read: 1 when no command is queued or executing)
//   0x48 STATUS   (read: bit0 sticky overflow, bit1 TLB miss pending;
//                  write 1 to bit0 to clear the overflow flag)
// Writing START copies the descriptor into a one-entry command queue, so the
// host may program the next command while the previous one runs. A START
// written while the queue is still full is held off (req_ready low) until the
// control unit takes the queued command: commands run in order of arrival.
//
// Bus: req_valid/req_ready handshake with req_we, req_addr, req_wdata; a read
// returns rsp_valid/rsp_rdata on the cycle after it is accepted.
// The register list and the start/readiness protocol follow the document; the
// offsets, the STATUS register, the one-entry queue and the bus handshake are
// this design's choices.
module ccs_prog_if
  import ccs_pkg::*;
#(
  parameter int unsigned VA_W = 48,
  parameter int unsigned DW   = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // host bus
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_we,
  input  logic [7:0]        req_addr,
  input  logic [63:0]       req_wdata,
  output logic              rsp_valid,
  output logic [63:0]       rsp_rdata,
  // queued command towards the control unit
  output logic              cmd_valid,
  input  logic              cmd_accept,
  output logic [5:0]        cmd_id,
  output logic [31:0]       cmd_len,
  output logic [DW-1:0]     cmd_k,
  output logic [VA_W-1:0]   cmd_opa,
  output logic [VA_W-1:0]   cmd_opb,
  output logic [VA_W-1:0]   cmd_res,
  output logic [31:0]       cmd_stride,
  // status from the engine
  input  logic              engine_idle,
  input  logic              ovf_pulse,
  input  logic              tlb_miss
);
  logic [63:0] r_cmd, r_len, r_k, r_opa, r_opb, r_res, r_stride;
  logic        ovf_sticky;
  logic        wr, rd, start_wr;

  assign start_wr  = req_valid && req_we && (req_addr == PI_START) && req_wdata[0];
  assign req_ready = !(start_wr && cmd_valid && !cmd_accept);
  assign wr        = req_valid && req_ready && req_we;
  assign rd        = req_valid && req_ready && !req_we;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_cmd <= '0; r_len <= '0; r_k <= '0; r_opa <= '0; r_opb <= '0;
      r_res <= '0; r_stride <= 64'd1;
      cmd_valid <= 1'b0;
      cmd_id <= '0; cmd_len <= '0; cmd_k <= '0; cmd_opa <= '0; cmd_opb <= '0;
      cmd_res <= '0; cmd_stride <= '0;
      ovf_sticky <= 1'b0;
      rsp_valid <= 1'b0; rsp_rdata <= '0;
    end else begin
      if (cmd_accept) cmd_valid <= 1'b0;
      if (wr) begin
        unique case (req_addr)
          PI_CMD_ID:   r_cmd    <= req_wdata;
          PI_OP_LEN:   r_len    <= req_wdata;
          PI_K:        r_k      <= req_wdata;
          PI_OPA_ADDR: r_opa    <= req_wdata;
          PI_OPB_ADDR: r_opb    <= req_wdata;
          PI_RES_ADDR: r_res    <= req_wdata;
          PI_STRIDE:   r_stride <= req_wdata;
          PI_START: if (req_wdata[0]) begin
            cmd_valid  <= 1'b1;
            cmd_id     <= r_cmd[5:0];
            cmd_len    <= r_len[31:0];
            cmd_k      <= r_k[DW-1:0];
            cmd_opa    <= r_opa[VA_W-1:0];
            cmd_opb    <= r_opb[VA_W-1:0];
            cmd_res    <= r_res[VA_W-1:0];
            cmd_stride <= r_stride[31:0];
          end
          default: ;
        endcase
      end
      if (ovf_pulse) ovf_sticky <= 1'b1;
      else if (wr && req_addr == PI_STATUS && req_wdata[0]) ovf_sticky <= 1'b0;
      rsp_valid <= rd;
      if (rd) begin
        unique case (req_addr)
          PI_CMD_ID:    rsp_rdata <= r_cmd;
          PI_OP_LEN:    rsp_rdata <= r_len;
          PI_K:         rsp_rdata <= r_k;
          PI_OPA_ADDR:  rsp_rdata <= r_opa;
          PI_OPB_ADDR:  rsp_rdata <= r_opb;
          PI_RES_ADDR:  rsp_rdata <= r_res;
          PI_STRIDE:    rsp_rdata <= r_stride;
          PI_READINESS: rsp_rdata <= 64'(!cmd_valid && engine_idle);
          PI_STATUS:    rsp_rdata <= {62'd0, tlb_miss, ovf_sticky};
          default:      rsp_rdata <= '0;
        endcase
      end
    end
  end
endmodule
