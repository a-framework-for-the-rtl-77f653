// queue_node: one processing element of a systolic-tree FIFO queue.
//
// Every node of the tree is this same cell. It holds one item in its data
// register S (valid when flag LS is set) and can hold one item in transit to
// a child in its buffer register B (valid when LB is set). Two steering
// flags decide where traffic goes: CI picks the child that receives the next
// forwarded insert, CD picks the child that holds the oldest item below this
// node. Both are complemented each time they are used, so forwarded items
// alternate between the left and the right subtree, and the subtrees stay
// balanced.
//
// Per clock the node obeys at most one instruction from its parent:
//   insert, node empty   : S <= data, LS <= 1, CI <= 0, CD <= 0
//   insert, node active  : B <= data, LB <= 1, CI <= ~CI, and in the next
//                          cycle B goes to the left child if the new CI is 1,
//                          to the right child if it is 0 (IL/IR flags)
//   delete, nothing below: LS <= 0                       (node becomes empty)
//   delete, only B below : S <= B, CD <= ~CD, and the transfer of B to the
//                          child that was due in this cycle is cancelled
//   delete, otherwise    : S <= S of the child picked by CD (left if CD = 0),
//                          CD <= ~CD, and the delete is passed to that child
//                          in the next cycle (DL/DR flags)
// The parent reads S combinationally on topd_o in the cycle of its delete,
// so the root answers in the cycle of the request (unit response time) and
// accepts one instruction every cycle (unit pipeline interval).
//
// Status towards the parent: ls_o is the raw LS flag; ols_o is LS as it will
// be after the delete this node is obeying in the current cycle (it drops when
// the node holds nothing but S). A parent that deleted from this child one
// cycle earlier must see that look-ahead, not the stale flag. The register
// names, the flags, the alternation rules and the five conditions follow the
// original node; the look-ahead status, the cancelling of a buffer transfer,
// the clearing of LB/IL/IR/DL/DR after one cycle and the reset are choices of
// this design. Reset is asynchronous and active high, as the original RESET
// input.
module queue_node
  import systolic_ds_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic         clk,
  input  logic         rst,
  // parent side (TOPI1, TOPD1, INS1, DEL1, OLS1)
  input  logic         ins_i,
  input  logic         del_i,
  input  logic [W-1:0] topi_i,
  output logic [W-1:0] topd_o,
  output logic         ls_o,
  output logic         ols_o,
  // left child (TOPI2, TOPD2, OIL1/INS2, ODL1/DEL2, LSL1)
  output logic         ins_l_o,
  output logic         del_l_o,
  output logic [W-1:0] topi_l_o,
  input  logic [W-1:0] topd_l_i,
  input  logic         ls_l_i,
  input  logic         ols_l_i,
  // right child (TOPI3, TOPD3, OIR1/INS3, ODR1/DEL3, LSR1)
  output logic         ins_r_o,
  output logic         del_r_o,
  output logic [W-1:0] topi_r_o,
  input  logic [W-1:0] topd_r_i,
  input  logic         ls_r_i,
  input  logic         ols_r_i
);
  logic [W-1:0] s_q, b_q;
  logic         ls_q, lb_q, ci_q, cd_q;
  logic         il_q, ir_q, dl_q, dr_q;

  logic ins_empty, ins_active;      // conditions 1 and 2
  logic del_last, del_buf, del_pull; // conditions 3, 4 and 5
  logic below;                       // anything stored under S

  assign below      = ols_l_i | ols_r_i;
  assign ins_empty  = ins_i & ~ls_q;
  assign ins_active = ins_i &  ls_q;
  assign del_last   = del_i & ls_q & ~lb_q & ~below;
  assign del_buf    = del_i & ls_q &  lb_q & ~below;
  assign del_pull   = del_i & ls_q &  below;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      s_q  <= '0;
      b_q  <= '0;
      ls_q <= 1'b0;
      lb_q <= 1'b0;
      ci_q <= 1'b0;
      cd_q <= 1'b0;
      il_q <= 1'b0;
      ir_q <= 1'b0;
      dl_q <= 1'b0;
      dr_q <= 1'b0;
    end else begin
      // flags that describe a transfer last one cycle
      lb_q <= 1'b0;
      il_q <= 1'b0;
      ir_q <= 1'b0;
      dl_q <= 1'b0;
      dr_q <= 1'b0;
      if (ins_empty) begin
        s_q  <= topi_i;
        ls_q <= 1'b1;
        ci_q <= 1'b0;
        cd_q <= 1'b0;
      end
      if (ins_active) begin
        b_q  <= topi_i;
        lb_q <= 1'b1;
        ci_q <= ~ci_q;
        il_q <= ~ci_q;           // new CI = 1: left child
        ir_q <=  ci_q;           // new CI = 0: right child
      end
      if (del_last) ls_q <= 1'b0;
      if (del_buf) begin
        s_q  <= b_q;
        cd_q <= ~cd_q;
      end
      if (del_pull) begin
        s_q  <= cd_q ? topd_r_i : topd_l_i;
        dl_q <= ~cd_q;
        dr_q <=  cd_q;
        cd_q <= ~cd_q;
      end
    end
  end

  assign topd_o   = s_q;
  assign ls_o     = ls_q;
  assign ols_o    = ls_q & ~(del_i & ~lb_q & ~ls_l_i & ~ls_r_i);
  // a buffered item taken back by the parent's own delete is not sent
  assign ins_l_o  = il_q & ~del_buf;
  assign ins_r_o  = ir_q & ~del_buf;
  assign topi_l_o = ins_l_o ? b_q : '0;
  assign topi_r_o = ins_r_o ? b_q : '0;
  assign del_l_o  = dl_q;
  assign del_r_o  = dr_q;

  // one instruction per cycle reaches every node
  a_one_instr: assert property (@(posedge clk) disable iff (rst) !(ins_i && del_i));
  // the child picked by CD must hold the oldest item whenever anything is below
  a_cd_side: assert property (@(posedge clk) disable iff (rst)
                              del_pull |-> (cd_q ? ols_r_i : ols_l_i));
endmodule
