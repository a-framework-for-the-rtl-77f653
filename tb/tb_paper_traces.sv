// tb_paper_traces: replays the reference instruction sequences of the small
// trees the design was first demonstrated with, and checks every answer in
// the cycle of its request.
//
//   3-node queue : insert 11 22 33 44 55, then delete x4. The tree holds
//                  three items, so 44 and 55 are refused (overflow) and the
//                  deletes return 11 22 33 and then report underflow.
//   7-node queue : insert 11..77, then delete x8 returning 11..77 and then
//                  underflow.
//   3-node stack : push 11 22 33, one idle cycle, then pop x4 returning
//                  33 22 11 and then underflow. After the pushes the root
//                  holds 33, the left child 22 and the right child 11.
//   7-node stack : push 11..77, then pop x7 returning 77..11 and then
//                  underflow; the pops start in the cycle right after the
//                  last push, so the first refill comes from the root's
//                  buffer.
module tb_paper_traces;
  import systolic_ds_pkg::*;
  localparam int unsigned W = DATA_W;

  logic clk = 1'b0, rst;
  int checks = 0, failures = 0;

  logic         ins [4];
  logic         del [4];
  logic [W-1:0] din [4];
  logic [W-1:0] dout [4];
  logic         dv [4], emp [4], ful [4], ovf [4], unf [4];
  logic [2:0]   cnt [4];

  systolic_queue #(.LEVELS(2)) u_q3 (
    .clk(clk), .rst(rst), .ins_i(ins[0]), .del_i(del[0]), .din_i(din[0]),
    .dout_o(dout[0]), .dout_valid_o(dv[0]), .empty_o(emp[0]), .full_o(ful[0]),
    .count_o(cnt[0][1:0]), .overflow_o(ovf[0]), .underflow_o(unf[0]));
  systolic_queue #(.LEVELS(3)) u_q7 (
    .clk(clk), .rst(rst), .ins_i(ins[1]), .del_i(del[1]), .din_i(din[1]),
    .dout_o(dout[1]), .dout_valid_o(dv[1]), .empty_o(emp[1]), .full_o(ful[1]),
    .count_o(cnt[1]), .overflow_o(ovf[1]), .underflow_o(unf[1]));
  systolic_stack #(.LEVELS(2)) u_s3 (
    .clk(clk), .rst(rst), .ins_i(ins[2]), .del_i(del[2]), .din_i(din[2]),
    .dout_o(dout[2]), .dout_valid_o(dv[2]), .empty_o(emp[2]), .full_o(ful[2]),
    .count_o(cnt[2][1:0]), .overflow_o(ovf[2]), .underflow_o(unf[2]));
  systolic_stack #(.LEVELS(3)) u_s7 (
    .clk(clk), .rst(rst), .ins_i(ins[3]), .del_i(del[3]), .din_i(din[3]),
    .dout_o(dout[3]), .dout_valid_o(dv[3]), .empty_o(emp[3]), .full_o(ful[3]),
    .count_o(cnt[3]), .overflow_o(ovf[3]), .underflow_o(unf[3]));
  assign cnt[0][2] = 1'b0;
  assign cnt[2][2] = 1'b0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (500) @(posedge clk);
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

  // one instruction per structure per clock: 'I' insert/push, 'D' delete/pop,
  // '-' idle. exp holds one entry per step: for 'D' the item expected back or
  // -1 for underflow; for 'I' 0 when accepted or -2 for overflow.
  task automatic run(input int u, input string ops, input int vals [], input int exp []);
    for (int c = 0; c < ops.len(); c++) begin
      @(negedge clk);
      ins[u] = (ops[c] == "I");
      del[u] = (ops[c] == "D");
      din[u] = W'(vals[c]);
      #2;
      if (ops[c] == "D") begin
        if (exp[c] < 0) check(unf[u] && !dv[u], $sformatf("unit %0d step %0d underflow", u, c));
        else check(dv[u] && dout[u] == W'(exp[c]),
                   $sformatf("unit %0d step %0d got %0h expected %0h", u, c, dout[u], exp[c]));
      end
      if (ops[c] == "I") check(ovf[u] == (exp[c] == -2), $sformatf("unit %0d step %0d overflow flag", u, c));
    end
    @(negedge clk);
    ins[u] = 1'b0; del[u] = 1'b0;
  endtask

  initial begin : stim
    for (int u = 0; u < 4; u++) begin ins[u] = 0; del[u] = 0; din[u] = '0; end
    rst = 1'b1;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    fork
      run(0, "IIIIIDDDD", '{'h11, 'h22, 'h33, 'h44, 'h55, 0, 0, 0, 0},
                          '{0, 0, 0, -2, -2, 'h11, 'h22, 'h33, -1});
      run(1, "IIIIIIIDDDDDDDD", '{'h11, 'h22, 'h33, 'h44, 'h55, 'h66, 'h77, 0, 0, 0, 0, 0, 0, 0, 0},
                                '{0, 0, 0, 0, 0, 0, 0, 'h11, 'h22, 'h33, 'h44, 'h55, 'h66, 'h77, -1});
      begin
        run(2, "III-", '{'h11, 'h22, 'h33, 0}, '{0, 0, 0, 0});
        check(u_s3.g_node[0].u_node.s_q == 8'h33 && u_s3.g_node[1].u_node.s_q == 8'h22 &&
              u_s3.g_node[2].u_node.s_q == 8'h11, "3-node stack distribution 33 / 22 11");
        run(2, "DDDD", '{0, 0, 0, 0}, '{'h33, 'h22, 'h11, -1});
      end
      run(3, "IIIIIIIDDDDDDDD", '{'h11, 'h22, 'h33, 'h44, 'h55, 'h66, 'h77, 0, 0, 0, 0, 0, 0, 0, 0},
                                '{0, 0, 0, 0, 0, 0, 0, 'h77, 'h66, 'h55, 'h44, 'h33, 'h22, 'h11, -1});
    join
    @(negedge clk);
    for (int u = 0; u < 4; u++) check(emp[u], $sformatf("unit %0d empty at the end", u));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
