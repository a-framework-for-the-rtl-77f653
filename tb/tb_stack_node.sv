// tb_stack_node: directed self-checking test of one stack_node, with the
// two children played by the testbench.
//
// Checks, cycle by cycle: the reference trace (pushes 11, 22, 33 and then
// three pops returning 33, 22, 11: S always holds the newest item, the
// displaced one goes through B to the right child, then to the left child);
// a pop answered in its own cycle; refills from the child named by the flag,
// with the pop passed to that child one cycle later; the node emptying when
// nothing is below; a pop right after a push that takes the buffered item
// back and cancels its transfer; and the look-ahead status.
module tb_stack_node;
  import systolic_ds_pkg::*;
  localparam int unsigned W = DATA_W;

  logic clk = 1'b0, rst;
  logic ins, del;
  logic [W-1:0] topi, topd, topi_l, topi_r, topd_l, topd_r;
  logic ls, ols, ins_l, ins_r, del_l, del_r;
  logic ls_l, ls_r, ols_l, ols_r;
  int checks = 0, failures = 0;

  stack_node dut (
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

    // reference trace: push 11, 22, 33, idle, pop, pop, pop
    drive(1, 0, 8'h11);
    check(!ls, "empty before first push");
    drive(1, 0, 8'h22);
    check(ls && topd == 8'h11 && !ins_l && !ins_r, "S=11");
    drive(1, 0, 8'h33);
    check(topd == 8'h22 && ins_r && !ins_l && topi_r == 8'h11, "S=22, 11 goes right");
    drive(0, 0, 8'h00);
    check(topd == 8'h33 && ins_l && !ins_r && topi_l == 8'h22, "S=33, 22 goes left");
    children(1, 8'h22, 1, 8'h11);
    drive(0, 1, 8'h00);
    check(!ins_l && !ins_r && topd == 8'h33, "pop answers 33 in its cycle");
    check(ols, "node stays full");
    drive(0, 1, 8'h00);
    check(topd == 8'h22 && del_l && !del_r, "refilled from left, pop passed left");
    children(0, 8'h00, 1, 8'h11);
    drive(0, 1, 8'h00);
    check(topd == 8'h11 && del_r && !del_l, "refilled from right, pop passed right");
    children(0, '0, 0, '0);
    #1;
    check(!ols, "look-ahead: last item leaves");
    drive(0, 0, 8'h00);
    check(!ls, "node empty after third pop");

    // pop right after a push takes back the buffered item
    drive(1, 0, 8'h41);
    drive(1, 0, 8'h42);
    drive(0, 1, 8'h00);
    check(topd == 8'h42 && ols, "pop answers 42");
    check(!ins_l && !ins_r, "transfer of 41 cancelled");
    drive(1, 0, 8'h43);
    check(ls && topd == 8'h41, "S takes 41 back from B");
    drive(0, 0, 8'h00);
    check(topd == 8'h43 && ins_r && topi_r == 8'h41, "flag restored: 41 goes right again");
    drive(0, 0, 8'h00);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
