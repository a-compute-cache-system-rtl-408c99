// ccs_reduce_tree: pipelined binary tree of type C units.
//
// N values enter together; level l holds N/2^(l+1) type C units, each combining
// two neighbours of the level above, and a register row behind them. After
// log2(N) levels one value remains. The operation code and a sideband word
// (the command's control record, opaque here) travel down the tree with the
// data so that commands of different kinds can follow each other cycle by
// cycle, as the document's pipelined tree does.
//
// Timing: latency log2(N) cycles, one new vector accepted per cycle. All
// registers move only when adv is high (global pipeline stall).
// Interface: in_* is the vector entering the first tree level; out_* is the
// last level's register (the tree output, OUT_M in the document's drawing);
// ovf pulses when an addition in a valid level overflowed; busy is high while
// any level holds a valid entry.
module ccs_reduce_tree
  import ccs_pkg::*;
#(
  parameter int unsigned N    = 16,
  parameter int unsigned DW   = 32,
  parameter int unsigned SB_W = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  adv,
  input  logic                  in_valid,
  input  ccs_cop_e              in_op,
  input  logic [N-1:0][DW-1:0]  in_data,
  input  logic [SB_W-1:0]       in_sb,
  output logic                  out_valid,
  output ccs_cop_e              out_op,
  output logic [DW-1:0]         out_data,
  output logic [SB_W-1:0]       out_sb,
  output logic                  ovf,
  output logic                  busy
);
  localparam int unsigned LG = $clog2(N);

  logic [N-1:0][DW-1:0] d   [LG+1];
  logic [N-1:0]         o   [LG];     // overflow flags of each level's units
  logic                 v   [LG+1];
  ccs_cop_e             op  [LG+1];
  logic [SB_W-1:0]      sb  [LG+1];
  logic [LG-1:0]        lvl_ovf;
  logic [LG:0]          vbits;

  assign d[0]  = in_data;
  assign v[0]  = in_valid;
  assign op[0] = in_op;
  assign sb[0] = in_sb;

  for (genvar l = 0; l < LG; l++) begin : g_lvl
    localparam int unsigned M = N >> (l + 1);
    logic [N-1:0][DW-1:0] nxt;
    for (genvar j = 0; j < N; j++) begin : g_node
      if (j < M) begin : g_fu
        ccs_fu_c #(.DW(DW)) u_fu (
          .op(op[l]), .op1(d[l][2*j]), .op2(d[l][2*j+1]),
          .result(nxt[j]), .ovf(o[l][j]));
      end else begin : g_unused
        assign nxt[j]  = '0;
        assign o[l][j] = 1'b0;
      end
    end
    assign lvl_ovf[l] = v[l] && (|o[l]);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v[l+1]  <= 1'b0;
        d[l+1]  <= '0;
        op[l+1] <= C_ADD;
        sb[l+1] <= '0;
      end else if (adv) begin
        v[l+1]  <= v[l];
        d[l+1]  <= nxt;
        op[l+1] <= op[l];
        sb[l+1] <= sb[l];
      end
    end
  end

  for (genvar l = 0; l <= LG; l++) begin : g_vb
    assign vbits[l] = v[l];
  end

  assign out_valid = v[LG];
  assign out_op    = op[LG];
  assign out_data  = d[LG][0];
  assign out_sb    = sb[LG];
  assign ovf       = adv && (|lvl_ovf);
  assign busy      = |vbits[LG:1];
endmodule
