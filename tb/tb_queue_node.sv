// tb_queue_node: directed self-checking test of one queue_node, with the
// two children played by the testbench.
//
// Checks, cycle by cycle: the reference single-node trace (inserts 11..55:
// S keeps 11, B takes 22, 33, 44, 55 and hands them to the left, right, left
// and right child in the following cycle); a delete answered in its own
// cycle; refills from the left then the right child under the delete flag,
// with the delete passed to that child one cycle later; the node emptying
// when nothing is below; a delete that takes the buffered item back and
// cancels its transfer; and the look-ahead status.
module tb_queue_node;
  import systolic_ds_pkg::*;
  localparam int unsigned W = DATA_W;

  logic clk = 1'b0, rst;
  logic ins, del;
  logic [W-1:0] topi, topd, topi_l, topi_r, topd_l, topd_r;
  logic ls, ols, ins_l, ins_r, del_l, del_r;
  logic ls_l, ls_r, ols_l, ols_r;
  int checks = 0, failures = 0;

  queue_node dut (
    .clk(clk), .rst(rst), .ins_i(ins), .del_i(del), .topi_i(topi),
    .topd_o(topd), .ls_o(ls), .ols_o(ols),
    .ins_l_o(ins_l), .del_l_o(del_l), .topi_l_o(topi_l), .topd_l_i(topd_l),
    .ls_l_i(ls_l), .ols_l_i(ols_l),
    .ins_r_o(ins_r), .del_r_o(del_r), .topi_r_o(topi_r), .topd_r_i(topd_r),
    .ls_r_i(ls_r), .ols_r_i(ols_r)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // drive the next instruction half a cycle before the sampling edge
  task automatic drive(input bit i, input bit d, input logic [W-1:0] v);
    @(negedge clk);
    ins = i; del = d; topi = v;
    #1;
  endtask

  task automatic children(input bit l, input logic [W-1:0] dl, input bit r, input logic [W-1:0] dr);
    ls_l = l; ols_l = l; topd_l = dl;
    ls_r = r; ols_r = r; topd_r = dr;
  endtask

  initial begin : stim
    ins = 0; del = 0; topi = '0;
    children(0, '0, 0, '0);
    rst = 1'b1;
    repeat (2) @(posedge clk);
    rst = 1'b0;

    // reference trace: inserts 11, 22, 33, 44, 55 into a lone node
    drive(1, 0, 8'h11);
    check(!ls && !ins_l && !ins_r, "empty before first insert");
    drive(1, 0, 8'h22);
    check(ls && topd == 8'h11 && !ins_l && !ins_r, "S=11 after first insert");
    drive(1, 0, 8'h33);
    check(ins_l && !ins_r && topi_l == 8'h22 && topi_r == 8'h00, "22 goes left");
    drive(1, 0, 8'h44);
    check(!ins_l && ins_r && topi_r == 8'h33 && topi_l == 8'h00, "33 goes right");
    drive(1, 0, 8'h55);
    check(ins_l && !ins_r && topi_l == 8'h44, "44 goes left");
    drive(0, 0, 8'h00);
    check(!ins_l && ins_r && topi_r == 8'h55 && topd == 8'h11, "55 goes right, S=11");
    drive(0, 0, 8'h00);
    check(!ins_l && !ins_r, "no transfer when idle");

    // children now hold 22 (left) and 33 (right)
    children(1, 8'h22, 1, 8'h33);
    drive(0, 1, 8'h00);
    check(topd == 8'h11 && ols, "delete answers 11 in its cycle, node stays full");
    drive(0, 1, 8'h00);
    check(topd == 8'h22 && del_l && !del_r, "refilled from left, delete passed left");
    children(1, 8'h44, 1, 8'h33);
    drive(0, 1, 8'h00);
    check(topd == 8'h33 && del_r && !del_l, "refilled from right, delete passed right");
    children(1, 8'h44, 1, 8'h55);
    drive(0, 0, 8'h00);
    check(topd == 8'h44 && del_l, "refilled from left again");
    children(0, '0, 0, '0);
    drive(0, 1, 8'h00);
    check(ls && !ols, "look-ahead: last item leaves");
    drive(0, 0, 8'h00);
    check(!ls, "node empty after last delete");

    // delete that takes back the buffered item
    drive(1, 0, 8'h61);
    drive(1, 0, 8'h62);
    drive(0, 1, 8'h00);
    check(topd == 8'h61, "front 61");
    check(!ins_l && !ins_r, "transfer of 62 cancelled");
    check(ols, "node keeps the buffered item");
    drive(0, 0, 8'h00);
    check(ls && topd == 8'h62 && !ins_l && !ins_r, "S takes 62 from B");
    drive(0, 1, 8'h00);
    check(topd == 8'h62 && !ols, "last delete");
    drive(1, 0, 8'h70);
    check(!ls, "empty again");
    drive(1, 0, 8'h71);
    check(ls && topd == 8'h70, "restart into empty node");
    drive(0, 0, 8'h00);
    check(ins_l && topi_l == 8'h71, "flags reset: first forward goes left");
    drive(0, 0, 8'h00);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
