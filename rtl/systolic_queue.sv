// systolic_queue: FIFO queue built as a complete binary tree of queue_node
// cells, with LEVELS levels and 2**LEVELS - 1 nodes.
//
// The root holds the front of the queue. An insert that reaches an occupied
// node is parked in that node's buffer and moves one level down per clock,
// steered alternately left and right, until it reaches an empty node; a
// delete takes the root's item and the hole it leaves moves down the tree one
// level per clock, each node refilling its data register from the child that
// holds its oldest remaining item. Both operations therefore answer in the
// cycle they are issued and a new one can be issued every clock, whatever the
// depth of the tree. Nodes are numbered in heap order: node k (from 0) has
// the children 2k+1 and 2k+2; the leaves' child buses are tied off.
//
// Interface (all synchronous to clk, rst asynchronous, active high):
//   ins_i/din_i   insert din_i; refused (overflow_o pulses) when full_o
//   del_i         delete; dout_o carries the front item in the same cycle,
//                 qualified by dout_valid_o; refused (underflow_o) when empty
//   ins_i and del_i must not be asserted together; if they are, the delete
//   is obeyed and the insert refused.
//   count_o       number of stored items, full_o = (count_o == 2**LEVELS-1)
// The tree and the node behaviour follow the original design; the counter,
// full/empty flags, refusal of an insert into a full tree (the original loses
// such an item in a leaf buffer) and the zero output outside a delete are
// choices of this design.
module systolic_queue
  import systolic_ds_pkg::*;
#(
  parameter int unsigned W      = DATA_W,
  parameter int unsigned LEVELS = QUEUE_LEVELS,
  localparam int unsigned N     = (1 << LEVELS) - 1,
  localparam int unsigned CW    = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          ins_i,
  input  logic          del_i,
  input  logic [W-1:0]  din_i,
  output logic [W-1:0]  dout_o,
  output logic          dout_valid_o,
  output logic          empty_o,
  output logic          full_o,
  output logic [CW-1:0] count_o,
  output logic          overflow_o,
  output logic          underflow_o
);
  // per-node buses; index N stands for the missing children of the leaves
  logic [W-1:0] topi  [N+1];
  logic [W-1:0] topd  [N+1];
  logic         ins   [N+1];
  logic         del   [N+1];
  logic         ls    [N+1];
  logic         ols   [N+1];

  logic ins_ok, del_ok;
  logic [CW-1:0] count_q;

  assign empty_o  = (count_q == '0);
  assign full_o   = (count_q == CW'(N));
  assign del_ok   = del_i & ~empty_o;
  assign ins_ok   = ins_i & ~del_i & ~full_o;

  assign ins[0]   = ins_ok;
  assign del[0]   = del_ok;
  assign topi[0]  = din_i;

  // tie-off "child" of the leaves: always empty
  assign topd[N]  = '0;
  assign ls[N]    = 1'b0;
  assign ols[N]   = 1'b0;

  for (genvar k = 0; k < N; k++) begin : g_node
    localparam int unsigned L = (2*k + 1 < N) ? 2*k + 1 : N;
    localparam int unsigned R = (2*k + 2 < N) ? 2*k + 2 : N;
    logic         ins_l, ins_r, del_l, del_r;
    logic [W-1:0] topi_l, topi_r;

    queue_node #(.W(W)) u_node (
      .clk      (clk),
      .rst      (rst),
      .ins_i    (ins[k]),
      .del_i    (del[k]),
      .topi_i   (topi[k]),
      .topd_o   (topd[k]),
      .ls_o     (ls[k]),
      .ols_o    (ols[k]),
      .ins_l_o  (ins_l),
      .del_l_o  (del_l),
      .topi_l_o (topi_l),
      .topd_l_i (topd[L]),
      .ls_l_i   (ls[L]),
      .ols_l_i  (ols[L]),
      .ins_r_o  (ins_r),
      .del_r_o  (del_r),
      .topi_r_o (topi_r),
      .topd_r_i (topd[R]),
      .ls_r_i   (ls[R]),
      .ols_r_i  (ols[R])
    );

    if (L < N) begin : g_children
      assign ins[L]  = ins_l;
      assign del[L]  = del_l;
      assign topi[L] = topi_l;
      assign ins[R]  = ins_r;
      assign del[R]  = del_r;
      assign topi[R] = topi_r;
    end
  end

  // the tie-off slot has no parent
  assign ins[N]  = 1'b0;
  assign del[N]  = 1'b0;
  assign topi[N] = '0;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)         count_q <= '0;
    else if (del_ok) count_q <= count_q - 1'b1;
    else if (ins_ok) count_q <= count_q + 1'b1;
  end

  assign count_o      = count_q;
  assign dout_valid_o = del_ok;
  assign dout_o       = del_ok ? topd[0] : '0;
  assign overflow_o   = ins_i & ~del_i & full_o;
  assign underflow_o  = del_i & empty_o;

  // the counter and the root's own flag must agree
  a_root_ls: assert property (@(posedge clk) disable iff (rst) ls[0] == !empty_o);
endmodule
