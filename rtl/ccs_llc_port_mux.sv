// ccs_llc_port_mux: shares the last-level cache port between the processor side
// and the CCS (the SOURCE SEL multiplexers of the document's LLC drawing).
//
// Two requesters drive line-wide requests: port 0 is the processor side (the
// upper cache levels), port 1 is the CCS. The LLC sees one request stream. A
// request is granted to port 0 when it is valid, otherwise to port 1 (fixed
// priority, so the processor is never slowed by the CCS; the CCS simply waits,
// as the document lets it idle while it cannot get data). Reads are answered
// by the LLC in request order; a small queue remembers which port issued each
// accepted read and steers the response (with its ready) back to it.
//
// Interface per port: req_valid/req_ready, req_we, req_addr (byte address of
// the line), req_wdata (one line), req_be (byte enables of a write);
// rsp_valid/rsp_ready, rsp_rdata. Combinational paths from LLC ready to port
// ready and from LLC response to port response; no added latency.
// The fixed priority and the in-order response queue are this design's choices.
module ccs_llc_port_mux #(
  parameter int unsigned LINE_BYTES = 64,
  parameter int unsigned PA_W       = 40,
  parameter int unsigned MAX_OUT    = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // requesters: [0] processor side, [1] CCS
  input  logic [1:0]                   p_req_valid,
  output logic [1:0]                   p_req_ready,
  input  logic [1:0]                   p_req_we,
  input  logic [1:0][PA_W-1:0]         p_req_addr,
  input  logic [1:0][LINE_BYTES*8-1:0] p_req_wdata,
  input  logic [1:0][LINE_BYTES-1:0]   p_req_be,
  output logic [1:0]                   p_rsp_valid,
  input  logic [1:0]                   p_rsp_ready,
  output logic [LINE_BYTES*8-1:0]      p_rsp_rdata,
  // last-level cache
  output logic                         llc_req_valid,
  input  logic                         llc_req_ready,
  output logic                         llc_req_we,
  output logic [PA_W-1:0]              llc_req_addr,
  output logic [LINE_BYTES*8-1:0]      llc_req_wdata,
  output logic [LINE_BYTES-1:0]        llc_req_be,
  input  logic                         llc_rsp_valid,
  output logic                         llc_rsp_ready,
  input  logic [LINE_BYTES*8-1:0]      llc_rsp_rdata
);
  logic sel;        // source select: 0 processor side, 1 CCS
  logic q_full, q_empty, q_head;
  logic rd_acc;

  assign sel = !p_req_valid[0];

  assign llc_req_valid = p_req_valid[sel] && !(!p_req_we[sel] && q_full);
  assign llc_req_we    = p_req_we[sel];
  assign llc_req_addr  = p_req_addr[sel];
  assign llc_req_wdata = p_req_wdata[sel];
  assign llc_req_be    = p_req_be[sel];

  always_comb begin
    p_req_ready      = '0;
    p_req_ready[sel] = llc_req_ready && !(!p_req_we[sel] && q_full);
  end

  assign rd_acc = llc_req_valid && llc_req_ready && !llc_req_we;

  ccs_fifo #(.W(1), .DEPTH(MAX_OUT)) u_src (
    .clk, .rst_n,
    .push(rd_acc), .din(sel),
    .pop(llc_rsp_valid && llc_rsp_ready),
    .dout(q_head), .full(q_full), .empty(q_empty));

  always_comb begin
    p_rsp_valid         = '0;
    p_rsp_valid[q_head] = llc_rsp_valid && !q_empty;
  end
  assign llc_rsp_ready = !q_empty && p_rsp_ready[q_head];
  assign p_rsp_rdata   = llc_rsp_rdata;
endmodule
