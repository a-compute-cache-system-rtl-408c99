// ccs_datapath: the CCS processing structure (pipelined tree of functional units).
//
// One cache line of each operand enters per cycle, cut into N lanes of DW bits.
// Stages, each closed by a register row:
//   s0  operand register (the line(s) as fetched, constant, control record)
//   L0  N type A units        -> OUT1 (map commands without multiplication)
//   L1  N type B units        -> OUT2 (map commands with multiplication)
//   L2.. log2(N) levels of type C units (ccs_reduce_tree) -> OUT_M
//        (reduce commands whose operands fit in one line)
//   ACC one type C unit with a feedback register -> OUT_M+1 (reduce commands
//        split over several lines: it accumulates the per-line sub-results)
// A decoded control record travels with each line, so every level does the
// operation of the command whose data it holds; commands of different kinds can
// be in the tree at the same time. The output multiplexer picks the level whose
// entry has reached its result level; the control unit orders commands so that
// at most one level produces a result in any cycle.
//
// For reduce commands, lanes outside in_mask are replaced by the identity of
// the reduction (0 for ADD/OR/XOR, all ones for AND, the most negative value for
// MAX, the most positive for MIN) before the tree, so short vectors and the
// tail of long ones reduce correctly. The reduced value leaves in lane 0 with
// out_mask = 1 (only element 0 of the result line is written).
//
// Timing from the cycle a line is accepted (in_valid && adv): OUT1 after 2
// clock edges counting the operand register, OUT2 after 3, OUT_M after
// 3+log2(N), OUT_M+1 one later. One line per cycle. Every register moves only
// when adv is high; the control unit drops adv while a result cannot be
// written (global stall). ovf pulses when a valid operation overflowed.
//
// Following the document: the level structure, the unit types per level, the
// four result taps, the accumulator for split commands. This design's choices:
// which operands are forwarded between levels (level 1 sees the level-0 result
// and the second operand), identity padding of unused lanes, lane-0 placement of
// scalar results, and the stage/latency numbering above.
module ccs_datapath
  import ccs_pkg::*;
#(
  parameter int unsigned LINE_BYTES = 64,
  parameter int unsigned DW         = 32,
  parameter int unsigned TAG_W      = 40,
  localparam int unsigned N         = LINE_BYTES * 8 / DW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 adv,
  input  logic                 in_valid,
  input  ccs_dec_t             in_dec,
  input  logic [N-1:0][DW-1:0] in_a,
  input  logic [N-1:0][DW-1:0] in_b,
  input  logic [DW-1:0]        in_k,
  input  logic [N-1:0]         in_mask,
  input  logic                 in_first,
  input  logic                 in_last,
  input  logic                 in_multi,
  input  logic [TAG_W-1:0]     in_tag,
  output logic                 out_valid,
  output logic [N-1:0][DW-1:0] out_data,
  output logic [N-1:0]         out_mask,
  output logic [TAG_W-1:0]     out_tag,
  output logic                 ovf,
  output logic                 busy
);
  typedef struct packed {
    ccs_dec_t         dec;
    logic [N-1:0]     mask;
    logic             first;
    logic             last;
    logic             multi;
    logic [TAG_W-1:0] tag;
  } ctl_t;

  // ------------------------------------------------------------- s0 operands
  logic                 v0;
  ctl_t                 c0;
  logic [N-1:0][DW-1:0] a0, b0;
  logic [DW-1:0]        k0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v0 <= 1'b0; c0 <= '0; a0 <= '0; b0 <= '0; k0 <= '0;
    end else if (adv) begin
      v0 <= in_valid;
      c0 <= '{dec: in_dec, mask: in_mask, first: in_first, last: in_last,
              multi: in_multi, tag: in_tag};
      a0 <= in_a;
      b0 <= in_b;
      k0 <= in_k;
    end
  end

  // ---------------------------------------------------------------- L0: A
  logic [N-1:0][DW-1:0] ra;
  logic [N-1:0]         oa;
  for (genvar i = 0; i < N; i++) begin : g_a
    ccs_fu_a #(.DW(DW)) u_a (
      .op(c0.dec.aop), .use_k(c0.dec.a_k), .op1(a0[i]), .op2(b0[i]), .konst(k0),
      .result(ra[i]), .ovf(oa[i]));
  end

  logic                 v1;
  ctl_t                 c1;
  logic [N-1:0][DW-1:0] r1, b1;
  logic [DW-1:0]        k1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; c1 <= '0; r1 <= '0; b1 <= '0; k1 <= '0;
    end else if (adv) begin
      v1 <= v0;
      c1 <= c0;
      r1 <= ra;
      b1 <= b0;
      k1 <= k0;
    end
  end

  // ---------------------------------------------------------------- L1: B
  logic [N-1:0][DW-1:0] rb;
  logic [N-1:0]         ob;
  for (genvar i = 0; i < N; i++) begin : g_b
    ccs_fu_b #(.DW(DW)) u_b (
      .op(c1.dec.bop), .use_k(c1.dec.b_k), .op1(r1[i]), .op2(b1[i]), .konst(k1),
      .result(rb[i]), .ovf(ob[i]));
  end

  logic                 v2;
  ctl_t                 c2;
  logic [N-1:0][DW-1:0] r2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2 <= 1'b0; c2 <= '0; r2 <= '0;
    end else if (adv) begin
      v2 <= v1 && (c1.dec.out != OUT_A);
      c2 <= c1;
      r2 <= rb;
    end
  end

  // ------------------------------------------------- identity padding + tree
  logic [DW-1:0]        ident;
  logic [N-1:0][DW-1:0] tin;

  always_comb begin
    unique case (c2.dec.cop)
      C_AND:   ident = '1;
      C_MAX:   ident = {1'b1, {(DW-1){1'b0}}};
      C_MIN:   ident = {1'b0, {(DW-1){1'b1}}};
      default: ident = '0;
    endcase
    for (int i = 0; i < N; i++) tin[i] = c2.mask[i] ? r2[i] : ident;
  end

  logic            tv;
  ccs_cop_e        top_op;
  logic [DW-1:0]   tdata;
  logic [$bits(ctl_t)-1:0] tsb;
  ctl_t            ct;
  logic            tovf, tbusy;

  ccs_reduce_tree #(.N(N), .DW(DW), .SB_W($bits(ctl_t))) u_tree (
    .clk, .rst_n, .adv,
    .in_valid(v2 && (c2.dec.out == OUT_RED)), .in_op(c2.dec.cop), .in_data(tin),
    .in_sb(c2),
    .out_valid(tv), .out_op(top_op), .out_data(tdata), .out_sb(tsb),
    .ovf(tovf), .busy(tbusy));
  assign ct = ctl_t'(tsb);

  // -------------------------------------------------------- accumulator level
  logic          accv;
  ctl_t          cacc;
  logic [DW-1:0] acc, acc_nxt;
  logic          acc_ovf;

  ccs_fu_c #(.DW(DW)) u_acc (
    .op(top_op), .op1(acc), .op2(tdata), .result(acc_nxt), .ovf(acc_ovf));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      accv <= 1'b0; cacc <= '0; acc <= '0;
    end else if (adv) begin
      accv <= tv && ct.multi && ct.last;
      if (tv && ct.multi) begin
        acc  <= ct.first ? tdata : acc_nxt;
        cacc <= ct;
      end
    end
  end

  // ----------------------------------------------------------- output mux
  logic sel1, sel2, selm;
  assign sel1 = v1 && (c1.dec.out == OUT_A);
  assign sel2 = v2 && (c2.dec.out == OUT_B);
  assign selm = tv && !ct.multi;

  always_comb begin
    out_valid = 1'b1;
    out_data  = '0;
    out_mask  = '0;
    out_tag   = '0;
    if (sel1) begin
      out_data = r1; out_mask = c1.mask; out_tag = c1.tag;
    end else if (sel2) begin
      out_data = r2; out_mask = c2.mask; out_tag = c2.tag;
    end else if (selm) begin
      out_data[0] = tdata; out_mask = N'(1); out_tag = ct.tag;
    end else if (accv) begin
      out_data[0] = acc; out_mask = N'(1); out_tag = cacc.tag;
    end else begin
      out_valid = 1'b0;
    end
  end

  // -------------------------------------------------------- overflow / busy
  logic a_ovf, b_ovf;
  assign a_ovf = v0 && (|(oa & c0.mask));
  assign b_ovf = v1 && (c1.dec.out != OUT_A) && (|(ob & c1.mask));
  assign ovf   = adv && (a_ovf || b_ovf || tovf || (tv && ct.multi && !ct.first && acc_ovf));
  assign busy  = v0 || v1 || v2 || tbusy || accv;

  // At most one level may present a result in a cycle (control guarantees it).
  a_one_result: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({sel1, sel2, selm, accv}));
endmodule
