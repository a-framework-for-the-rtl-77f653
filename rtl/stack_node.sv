// stack_node: one processing element of a systolic-tree LIFO stack.
//
// Every node of the tree is this same cell. Its data register S (valid when
// LS is set) holds the newest item of its subtree; its buffer register B
// (valid when LB is set) holds an item on its way down to a child. A single
// flag C names the child that holds the newest item below this node (left
// when C = 0, right when C = 1); it is complemented by every push that sends
// an item down and by every pop that takes one back, so pushed items
// alternate between the two subtrees.
//
// Per clock the node obeys at most one instruction from its parent:
//   push, node empty     : S <= data, LS <= 1, C <= 0
//   push, node active    : S <= data, B <= old S, LB <= 1, C <= ~C, and in
//                          the next cycle B goes to the child named by the new
//                          C (IL/IR flags)
//   pop, B full          : S <= B, C <= ~C, and the transfer of B to the
//                          child that was due in this cycle is cancelled
//   pop, nothing below   : LS <= 0                     (node becomes empty)
//   pop, otherwise       : S <= S of the child named by C, C <= ~C, and the
//                          pop is passed to that child in the next cycle
//                          (DL/DR flags)
// The parent reads S combinationally on topd_o in the cycle of its pop, so
// the root answers in the cycle of the request and takes one instruction per
// cycle.
//
// ls_o is the raw LS flag; ols_o is LS as it will be after the pop obeyed in
// the current cycle, which a parent that popped this child one cycle earlier
// needs instead of the stale flag. Registers, flags and the five conditions
// follow the original node (pop from the buffer takes priority whatever the
// children hold, as in the original condition 4); the look-ahead status, the
// cancelling of a buffer transfer, the one-cycle LB/IL/IR/DL/DR flags and the
// reset are choices of this design. Reset is asynchronous and active high.
module stack_node
  import systolic_ds_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic         clk,
  input  logic         rst,
  // parent side (TOPI1, TOPD1, INS1 = push, DEL1 = pop, OLS1)
  input  logic         ins_i,
  input  logic         del_i,
  input  logic [W-1:0] topi_i,
  output logic [W-1:0] topd_o,
  output logic         ls_o,
  output logic         ols_o,
  // left child (TOPI2, TOPD2, OIL1, ODL1, LSL1)
  output logic         ins_l_o,
  output logic         del_l_o,
  output logic [W-1:0] topi_l_o,
  input  logic [W-1:0] topd_l_i,
  input  logic         ls_l_i,
  input  logic         ols_l_i,
  // right child (TOPI3, TOPD3, OIR1, ODR1, LSR1)
  output logic         ins_r_o,
  output logic         del_r_o,
  output logic [W-1:0] topi_r_o,
  input  logic [W-1:0] topd_r_i,
  input  logic         ls_r_i,
  input  logic         ols_r_i
);
  logic [W-1:0] s_q, b_q;
  logic         ls_q, lb_q, c_q;
  logic         il_q, ir_q, dl_q, dr_q;

  logic push_empty, push_active;     // conditions 1 and 2
  logic pop_last, pop_buf, pop_pull; // conditions 3, 4 and 5
  logic below;

  assign below       = ols_l_i | ols_r_i;
  assign push_empty  = ins_i & ~ls_q;
  assign push_active = ins_i &  ls_q;
  assign pop_buf     = del_i & ls_q &  lb_q;
  assign pop_last    = del_i & ls_q & ~lb_q & ~below;
  assign pop_pull    = del_i & ls_q & ~lb_q &  below;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      s_q  <= '0;
      b_q  <= '0;
      ls_q <= 1'b0;
      lb_q <= 1'b0;
      c_q  <= 1'b0;
      il_q <= 1'b0;
      ir_q <= 1'b0;
      dl_q <= 1'b0;
      dr_q <= 1'b0;
    end else begin
      lb_q <= 1'b0;
      il_q <= 1'b0;
      ir_q <= 1'b0;
      dl_q <= 1'b0;
      dr_q <= 1'b0;
      if (push_empty) begin
        s_q  <= topi_i;
        ls_q <= 1'b1;
        c_q  <= 1'b0;
      end
      if (push_active) begin
        s_q  <= topi_i;
        b_q  <= s_q;
        lb_q <= 1'b1;
        c_q  <= ~c_q;
        il_q <=  c_q;            // new C = 0: left child
        ir_q <= ~c_q;            // new C = 1: right child
      end
      if (pop_buf) begin
        s_q <= b_q;
        c_q <= ~c_q;
      end
      if (pop_last) ls_q <= 1'b0;
      if (pop_pull) begin
        s_q  <= c_q ? topd_r_i : topd_l_i;
        dl_q <= ~c_q;
        dr_q <=  c_q;
        c_q  <= ~c_q;
      end
    end
  end

  assign topd_o   = s_q;
  assign ls_o     = ls_q;
  assign ols_o    = ls_q & ~(del_i & ~lb_q & ~ls_l_i & ~ls_r_i);
  assign ins_l_o  = il_q & ~pop_buf;
  assign ins_r_o  = ir_q & ~pop_buf;
  assign topi_l_o = ins_l_o ? b_q : '0;
  assign topi_r_o = ins_r_o ? b_q : '0;
  assign del_l_o  = dl_q;
  assign del_r_o  = dr_q;

  a_one_instr: assert property (@(posedge clk) disable iff (rst) !(ins_i && del_i));
  // the child named by C must hold the newest item whenever anything is below
  a_c_side: assert property (@(posedge clk) disable iff (rst)
                             pop_pull |-> (c_q ? ols_r_i : ols_l_i));
endmodule
