// tb_ccs_llc_model: behavioural stand-in for the last-level cache and the
// memory behind it (testbench only, not synthesizable).
//
// Lines live in an associative array indexed by line address and start as a
// fixed function of the address. A line touched before is a hit and answers
// after HIT_LAT cycles; the first touch of a line is a miss and answers after
// MISS_LAT cycles. Responses come back strictly in request order. Writes use
// byte enables. With BP set, req_ready is randomly dropped (back-pressure).
module tb_ccs_llc_model #(
  parameter int unsigned LINE_BYTES = 64,
  parameter int unsigned PA_W       = 40,
  parameter int unsigned HIT_LAT    = 2,
  parameter int unsigned MISS_LAT   = 12,
  parameter bit          BP         = 1'b0
) (
  input  logic                    clk,
  input  logic                    req_valid,
  output logic                    req_ready,
  input  logic                    req_we,
  input  logic [PA_W-1:0]         req_addr,
  input  logic [LINE_BYTES*8-1:0] req_wdata,
  input  logic [LINE_BYTES-1:0]   req_be,
  output logic                    rsp_valid,
  input  logic                    rsp_ready,
  output logic [LINE_BYTES*8-1:0] rsp_rdata
);
  typedef logic [LINE_BYTES*8-1:0] line_t;
  localparam int LB = $clog2(LINE_BYTES);

  line_t   mem [longint];
  bit      present [longint];
  line_t   q_data [$];
  longint  q_time [$];
  longint  cyc = 0;
  longint  last_ready = 0;
  int      reads = 0, writes = 0, misses = 0;
  bit      bp_en = BP;

  function automatic line_t init_line(longint la);
    line_t l;
    for (int i = 0; i < LINE_BYTES / 4; i++) l[i*32 +: 32] = 32'(la * 131 + i * 7919 + 17);
    return l;
  endfunction

  function automatic line_t peek(longint la);
    return mem.exists(la) ? mem[la] : init_line(la);
  endfunction

  function automatic void poke(longint la, line_t d);
    mem[la] = d;
    present[la] = 1;
  endfunction

  initial begin
    req_ready = 1'b1;
    rsp_valid = 1'b0;
    rsp_rdata = '0;
  end

  always @(posedge clk) begin
    longint la, lat, t;
    line_t  l;
    cyc++;
    if (req_valid && req_ready) begin
      la = longint'(req_addr >> LB);
      if (req_we) begin
        l = peek(la);
        for (int i = 0; i < LINE_BYTES; i++) if (req_be[i]) l[i*8 +: 8] = req_wdata[i*8 +: 8];
        mem[la] = l;
        present[la] = 1;
        writes++;
      end else begin
        lat = present.exists(la) ? HIT_LAT : MISS_LAT;
        if (!present.exists(la)) misses++;
        present[la] = 1;
        t = cyc + lat;
        if (t <= last_ready) t = last_ready + 1;
        last_ready = t;
        q_data.push_back(peek(la));
        q_time.push_back(t);
        reads++;
      end
    end
    if (rsp_valid && rsp_ready) begin
      void'(q_data.pop_front());
      void'(q_time.pop_front());
    end
    req_ready <= bp_en ? ($urandom_range(0, 3) != 0) : 1'b1;
  end

  always @(negedge clk) begin
    rsp_valid = (q_time.size() > 0) && (q_time[0] <= cyc);
    rsp_rdata = rsp_valid ? q_data[0] : '0;
  end
endmodule
