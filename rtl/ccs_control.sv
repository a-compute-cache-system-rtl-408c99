// ccs_control: the CCS control unit, with the operand buffer and the processing
// structure it drives.
//
// A queued command (from the programming interface) is decoded and split into
// runs of one cache line per operand: a vector of op_len elements takes
// ceil(op_len / N) runs, N = LINE_BYTES*8/DW lanes. For every run the unit
// translates the operand and result line addresses in the TLB and issues the
// read requests, one per cycle, first operand then second operand (two-vector
// commands), without waiting for earlier reads to return. Returned lines are
// matched, in order, against a queue of run descriptors: a first operand goes
// into the operand buffer, a second (or only) operand enters the tree together
// with the buffered line and the run's control record (decoded command,
// constant, lane mask, first/last-run flags, physical result line address).
// Results leave the tree one line per cycle and are written to the cache with
// a byte enable per element; map commands write line r of the result at
// res_addr + r*stride lines, reduce commands write one element at res_addr.
//
// Operand realignment: an operand may start at any element address. Run r of
// an operand is the N elements starting at opa + r*stride lines. When they lie
// in one line that line is read once; when they straddle two lines both are
// needed: the first is held in a line register and the realigner picks the N
// elements starting at the operand's element offset from the pair, so the
// tree always sees element 0 of the run in lane 0. Each operand has its own
// line register holding the last line read for it; with stride 1 the second
// line of one run is the first line of the next, so after the first run a
// misaligned operand costs one read per run, as an aligned one does. Map results are written to
// whole lines (res_addr rounded down to a line); a reduce result may sit at any
// element address, its lane being selected by the element offset.
//
// Ordering rules (how two commands in flight are kept from conflicting):
//  * commands start in order of arrival; a command is taken as soon as all
//    read requests of the previous one have been issued, as the document
//    describes, unless its result would leave the tree at a shallower level
//    than the previous command's (which could overtake or collide with it at
//    the write port); then it waits until the tree has drained.
//  * result writes have priority over operand reads at the cache port; if a
//    write is not accepted the whole tree stalls (adv low).
//  * a TLB miss stalls the fetch and is reported (tlb_miss, tlb_miss_va) until
//    the host fills the entry.
// An illegal command id or op_len = 0 is accepted and dropped.
//
// Interface timing: cmd_accept is a one-cycle pulse; idle is high when nothing
// is queued in the unit, in the tree or in flight from the cache.
// Following the document: line-wide fetch, sequential fetch of two operands
// into a buffer, one request per cycle across runs, pipelined runs with a
// final accumulation, write-back one line at a time. This design's choices:
// the in-order response protocol, write priority, the ordering rule above, the
// meaning of stride (distance in lines between consecutive lines of an operand
// and of a map result), the per-operand line registers (a misaligned operand
// with a stride other than 1 costs two reads per run), line-aligned map
// results and MAX_OUT.
module ccs_control
  import ccs_pkg::*;
#(
  parameter int unsigned LINE_BYTES = 64,
  parameter int unsigned DW         = 32,
  parameter int unsigned VA_W       = 48,
  parameter int unsigned PA_W       = 40,
  parameter int unsigned MAX_OUT    = 8,
  localparam int unsigned N         = LINE_BYTES * 8 / DW,
  localparam int unsigned LB        = $clog2(LINE_BYTES),
  localparam int unsigned EB        = $clog2(DW / 8),
  localparam int unsigned OW        = LB - EB
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // queued command
  input  logic                        cmd_valid,
  output logic                        cmd_accept,
  input  logic [5:0]                  cmd_id,
  input  logic [31:0]                 cmd_len,
  input  logic [DW-1:0]               cmd_k,
  input  logic [VA_W-1:0]             cmd_opa,
  input  logic [VA_W-1:0]             cmd_opb,
  input  logic [VA_W-1:0]             cmd_res,
  input  logic [31:0]                 cmd_stride,
  // TLB lookups: [0] operand line, [1] result line
  output logic [1:0][VA_W-1:0]        xl_va,
  input  logic [1:0][PA_W-1:0]        xl_pa,
  input  logic [1:0]                  xl_hit,
  output logic                        tlb_miss,
  output logic [VA_W-1:0]             tlb_miss_va,
  // cache port
  output logic                        req_valid,
  input  logic                        req_ready,
  output logic                        req_we,
  output logic [PA_W-1:0]             req_addr,
  output logic [LINE_BYTES*8-1:0]     req_wdata,
  output logic [LINE_BYTES-1:0]       req_be,
  input  logic                        rsp_valid,
  output logic                        rsp_ready,
  input  logic [LINE_BYTES*8-1:0]     rsp_rdata,
  // status
  output logic                        idle,
  output logic                        ovf
);
  typedef struct packed {
    logic          to_buf;   // first operand of a two-vector run
    logic          low;      // first of the two lines of a misaligned operand
    logic          two;      // operand spans this line and the one before
    logic          b_op;     // line of the second operand
    logic [OW-1:0] off;      // element offset of the operand in its first line
    ccs_dec_t      dec;
    logic [DW-1:0] k;
    logic [N-1:0]  mask;
    logic          first;
    logic          last;
    logic          multi;
    logic [PA_W-1:0] tag;
  } info_t;

  // ------------------------------------------------------- command intake
  ccs_dec_t   dec_new;
  logic [31:0] runs_new;
  logic       multi_new;
  logic [1:0] rank_new, last_rank;
  logic       pipe_empty, can_start, start;

  ccs_cmd_decoder u_dec (.cmd_id(cmd_id), .dec(dec_new));

  assign runs_new  = (cmd_len + 32'(N - 1)) >> $clog2(N);
  assign multi_new = runs_new > 32'd1;
  assign rank_new  = out_rank(dec_new.out, multi_new);

  // active command (fetch side)
  logic            act, phase_b, hi, first;
  logic            have_a, have_b;   // next run's first line of a / b already read
  ccs_dec_t        a_dec;
  logic [DW-1:0]   a_k;
  logic            a_multi;
  logic [VA_W-1:0] va_a, va_b, va_r, stride_b;
  logic [31:0]     elems_left;

  logic  q_full, q_empty, q_push, q_pop;
  info_t q_in, q_head;
  logic  buf_valid, dp_busy, dp_out_valid;

  assign pipe_empty = q_empty && !dp_busy && !buf_valid;
  assign can_start  = cmd_valid && !act && ((rank_new >= last_rank) || pipe_empty);
  assign cmd_accept = can_start;
  assign start      = can_start && dec_new.legal && (cmd_len != 0);

  // ------------------------------------------------------------ fetch side
  logic          last_run, rd_want, rd_fire;
  logic [N-1:0]  run_mask;
  logic          is_vop2;
  logic [VA_W-1:0] va_x, va_line;
  logic [OW-1:0]   off_x;
  logic [31:0]     cnt;
  logic            need_two, have_x, rd_low, stride1;

  assign is_vop2  = (a_dec.opcls == OPC_VOP2);
  assign last_run = (elems_left <= 32'(N));
  always_comb begin
    run_mask = '1;
    if (last_run)
      for (int i = 0; i < N; i++) run_mask[i] = (32'(i) < elems_left);
  end

  // current operand: element address, offset in its line, and whether the
  // elements of this run reach into the next line
  assign va_x     = phase_b ? va_b : va_a;
  assign off_x    = va_x[LB-1:EB];
  assign cnt      = last_run ? elems_left : 32'(N);
  assign need_two = (off_x != '0) && ((32'(off_x) + cnt) > 32'(N));
  assign have_x   = phase_b ? have_b : have_a;
  // the first line of a straddling run is read only if the previous run of
  // the same operand did not already read it as its second line
  assign rd_low   = !hi && need_two && !have_x;
  assign va_line  = {va_x[VA_W-1:LB], {LB{1'b0}}} + ((need_two && !rd_low) ? VA_W'(LINE_BYTES) : '0);

  assign xl_va[0]    = va_line;
  assign xl_va[1]    = va_r;
  assign tlb_miss    = act && !(xl_hit[0] && xl_hit[1]);
  assign tlb_miss_va = !xl_hit[0] ? xl_va[0] : xl_va[1];
  assign rd_want     = act && xl_hit[0] && xl_hit[1] && !q_full;
  assign rd_fire     = rd_want && !dp_out_valid && req_ready;

  assign q_push = rd_fire;
  assign q_in   = '{to_buf: is_vop2 && !phase_b, low: rd_low, two: need_two && !rd_low,
                    b_op: phase_b, off: off_x,
                    dec: a_dec, k: a_k, mask: run_mask,
                    first: first, last: last_run, multi: a_multi,
                    tag: {xl_pa[1][PA_W-1:EB], {EB{1'b0}}}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act <= 1'b0; phase_b <= 1'b0; hi <= 1'b0; first <= 1'b0;
      have_a <= 1'b0; have_b <= 1'b0; stride1 <= 1'b0;
      a_dec <= '0; a_k <= '0; a_multi <= 1'b0;
      va_a <= '0; va_b <= '0; va_r <= '0; stride_b <= '0;
      elems_left <= '0; last_rank <= '0;
    end else begin
      if (start) begin
        act        <= 1'b1;
        phase_b    <= 1'b0;
        hi         <= 1'b0;
        have_a     <= 1'b0;
        have_b     <= 1'b0;
        stride1    <= (cmd_stride == 32'd1);
        first      <= 1'b1;
        a_dec      <= dec_new;
        a_k        <= cmd_k;
        a_multi    <= multi_new;
        va_a       <= {cmd_opa[VA_W-1:EB], {EB{1'b0}}};
        va_b       <= {cmd_opb[VA_W-1:EB], {EB{1'b0}}};
        // map results are whole lines; a reduce result is one element
        va_r       <= (dec_new.out == OUT_RED) ? {cmd_res[VA_W-1:EB], {EB{1'b0}}}
                                               : {cmd_res[VA_W-1:LB], {LB{1'b0}}};
        stride_b   <= VA_W'(cmd_stride) << LB;
        elems_left <= cmd_len;
        last_rank  <= rank_new;
      end else if (rd_fire) begin
        if (!rd_low) begin
          // last line of this operand for this run: with stride 1 a second
          // line is the next run's first line
          if (phase_b) have_b <= need_two && stride1;
          else         have_a <= need_two && stride1;
        end
        if (rd_low) begin
          hi <= 1'b1;                  // fetch the second line of this operand next
        end else if (is_vop2 && !phase_b) begin
          hi      <= 1'b0;
          phase_b <= 1'b1;
        end else begin
          hi         <= 1'b0;
          phase_b    <= 1'b0;
          first      <= 1'b0;
          va_a       <= va_a + stride_b;
          va_b       <= va_b + stride_b;
          if (a_dec.out != OUT_RED) va_r <= va_r + stride_b;
          elems_left <= elems_left - 32'(N);
          if (last_run) act <= 1'b0;
        end
      end
    end
  end

  ccs_fifo #(.W($bits(info_t)), .DEPTH(MAX_OUT)) u_runq (
    .clk, .rst_n, .push(q_push), .din(q_in), .pop(q_pop),
    .dout(q_head), .full(q_full), .empty(q_empty));

  // --------------------------------------------------------- response side
  logic                      adv, dp_in_valid, buf_load, buf_consume;
  logic [LINE_BYTES*8-1:0]   buf_q;
  logic [N-1:0][DW-1:0]      dp_out_data;
  logic [N-1:0]              dp_out_mask;
  logic [PA_W-1:0]           dp_out_tag;

  // realignment: the first line of a split operand waits in a line register;
  // the operand is the N elements starting at element off of {second, first}
  // line. Every line of an operand is kept (low_a / low_b): with stride 1 the
  // second line of one run is the first line of the next.
  logic [LINE_BYTES*8-1:0]   low_a, low_b, opnd;
  logic [2*N-1:0][DW-1:0]    pair;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      low_a <= '0; low_b <= '0;
    end else if (q_pop) begin
      if (q_head.b_op) low_b <= rsp_rdata;
      else             low_a <= rsp_rdata;
    end
  end
  assign pair = q_head.two ? {rsp_rdata, (q_head.b_op ? low_b : low_a)} : {rsp_rdata, rsp_rdata};
  always_comb begin
    for (int i = 0; i < N; i++) opnd[i*DW +: DW] = pair[i + int'(q_head.off)];
  end

  assign rsp_ready   = !q_empty && (q_head.low || q_head.to_buf || adv);
  assign q_pop       = rsp_valid && rsp_ready;
  assign buf_load    = q_pop && q_head.to_buf;
  assign dp_in_valid = rsp_valid && !q_empty && !q_head.to_buf && !q_head.low;
  assign buf_consume = dp_in_valid && adv && (q_head.dec.opcls == OPC_VOP2);

  ccs_operand_buffer #(.LINE_BYTES(LINE_BYTES)) u_buf (
    .clk, .rst_n, .load(buf_load), .consume(buf_consume), .d(opnd),
    .q(buf_q), .valid(buf_valid));

  ccs_datapath #(.LINE_BYTES(LINE_BYTES), .DW(DW), .TAG_W(PA_W)) u_dp (
    .clk, .rst_n, .adv,
    .in_valid(dp_in_valid), .in_dec(q_head.dec),
    .in_a((q_head.dec.opcls == OPC_VOP2) ? buf_q : opnd),
    .in_b(opnd), .in_k(q_head.k), .in_mask(q_head.mask),
    .in_first(q_head.first), .in_last(q_head.last), .in_multi(q_head.multi),
    .in_tag(q_head.tag),
    .out_valid(dp_out_valid), .out_data(dp_out_data), .out_mask(dp_out_mask),
    .out_tag(dp_out_tag), .ovf(ovf), .busy(dp_busy));

  // ------------------------------------------------------------- cache port
  assign adv       = !dp_out_valid || req_ready;
  assign req_valid = dp_out_valid || rd_want;
  assign req_we    = dp_out_valid;
  // a result leaves in lane 0 (reduce) or lane-aligned (map); the element
  // offset in the tag (zero for maps) places a reduce result in its lane
  logic [OW-1:0] r_off;
  assign r_off     = dp_out_tag[LB-1:EB];
  assign req_addr  = dp_out_valid ? {dp_out_tag[PA_W-1:LB], {LB{1'b0}}}
                                  : {xl_pa[0][PA_W-1:LB], {LB{1'b0}}};
  always_comb begin
    for (int i = 0; i < N; i++) begin
      req_wdata[i*DW +: DW]     = dp_out_data[OW'(i) - r_off];
      req_be[i*(DW/8) +: DW/8]  = {(DW/8){dp_out_mask[OW'(i) - r_off]}};
    end
  end

  assign idle = !act && pipe_empty;
endmodule
