// tb_systolic_ds_top: end-to-end test of the whole design at its default
// parameters (63-node queue and 15-node stack side by side, 8-bit data).
//
// Both structures receive independent random instruction streams, one
// instruction per clock each, in phases that fill them to capacity and drain
// them to empty. Every answer is compared in its own cycle with a
// behavioural FIFO and LIFO, and the status outputs every cycle. The test
// also counts, over all nodes, how often each node mechanism fired: insert
// or push into an empty node, into an active node (item forwarded through the
// buffer), a node emptying on a delete, a delete served from the buffer
// (transfer cancelled), a refill from the left and from the right child, and
// a look-ahead status differing from the raw one; plus refused inserts when
// full and refused deletes when empty. A mechanism that never fired counts
// as a failure.
module tb_systolic_ds_top;
  import systolic_ds_pkg::*;
  localparam int unsigned W  = DATA_W;
  localparam int unsigned QN = (1 << QUEUE_LEVELS) - 1;
  localparam int unsigned SN = (1 << STACK_LEVELS) - 1;
  localparam int unsigned QCW = $clog2(QN + 1);
  localparam int unsigned SCW = $clog2(SN + 1);

  logic clk = 1'b0, rst;
  logic q_ins, q_del, s_push, s_pop;
  logic [W-1:0] q_din, q_dout, s_din, s_dout;
  logic q_dv, q_empty, q_full, q_over, q_under;
  logic s_dv, s_empty, s_full, s_over, s_under;
  logic [QCW-1:0] q_count;
  logic [SCW-1:0] s_count;

  int checks = 0, failures = 0;
  logic [W-1:0] qm [$];
  logic [W-1:0] sm [$];

  systolic_ds_top dut (
    .clk(clk), .rst(rst),
    .q_ins_i(q_ins), .q_del_i(q_del), .q_din_i(q_din), .q_dout_o(q_dout),
    .q_dout_valid_o(q_dv), .q_empty_o(q_empty), .q_full_o(q_full),
    .q_count_o(q_count), .q_overflow_o(q_over), .q_underflow_o(q_under),
    .s_push_i(s_push), .s_pop_i(s_pop), .s_din_i(s_din), .s_dout_o(s_dout),
    .s_dout_valid_o(s_dv), .s_empty_o(s_empty), .s_full_o(s_full),
    .s_count_o(s_count), .s_overflow_o(s_over), .s_underflow_o(s_under)
  );

  // mechanism probes, one bit per node
  typedef enum int {M_INS_EMPTY, M_INS_ACTIVE, M_DEL_LAST, M_DEL_BUF,
                    M_PULL_LEFT, M_PULL_RIGHT, M_LOOKAHEAD, M_NUM} mech_e;
  localparam string MNAME [M_NUM] = '{"insert into empty node", "insert into active node",
                                      "node emptied", "delete served from buffer",
                                      "refill from left child", "refill from right child",
                                      "look-ahead status used"};
  logic [QN-1:0] qp [M_NUM];
  logic [SN-1:0] sp [M_NUM];
  int qcnt [M_NUM];
  int scnt [M_NUM];

  for (genvar k = 0; k < QN; k++) begin : g_qp
    assign qp[M_INS_EMPTY][k]  = dut.u_queue.g_node[k].u_node.ins_empty;
    assign qp[M_INS_ACTIVE][k] = dut.u_queue.g_node[k].u_node.ins_active;
    assign qp[M_DEL_LAST][k]   = dut.u_queue.g_node[k].u_node.del_last;
    assign qp[M_DEL_BUF][k]    = dut.u_queue.g_node[k].u_node.del_buf;
    assign qp[M_PULL_LEFT][k]  = dut.u_queue.g_node[k].u_node.del_pull & ~dut.u_queue.g_node[k].u_node.cd_q;
    assign qp[M_PULL_RIGHT][k] = dut.u_queue.g_node[k].u_node.del_pull &  dut.u_queue.g_node[k].u_node.cd_q;
    assign qp[M_LOOKAHEAD][k]  = dut.u_queue.g_node[k].u_node.ls_o != dut.u_queue.g_node[k].u_node.ols_o;
  end
  for (genvar k = 0; k < SN; k++) begin : g_sp
    assign sp[M_INS_EMPTY][k]  = dut.u_stack.g_node[k].u_node.push_empty;
    assign sp[M_INS_ACTIVE][k] = dut.u_stack.g_node[k].u_node.push_active;
    assign sp[M_DEL_LAST][k]   = dut.u_stack.g_node[k].u_node.pop_last;
    assign sp[M_DEL_BUF][k]    = dut.u_stack.g_node[k].u_node.pop_buf;
    assign sp[M_PULL_LEFT][k]  = dut.u_stack.g_node[k].u_node.pop_pull & ~dut.u_stack.g_node[k].u_node.c_q;
    assign sp[M_PULL_RIGHT][k] = dut.u_stack.g_node[k].u_node.pop_pull &  dut.u_stack.g_node[k].u_node.c_q;
    assign sp[M_LOOKAHEAD][k]  = dut.u_stack.g_node[k].u_node.ls_o != dut.u_stack.g_node[k].u_node.ols_o;
  end

  always @(posedge clk) begin
    if (!rst) begin
      for (int m = 0; m < M_NUM; m++) begin
        qcnt[m] += $countones(qp[m]);
        scnt[m] += $countones(sp[m]);
      end
    end
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int q_nover = 0, q_nunder = 0, q_nfull = 0, s_nover = 0, s_nunder = 0, s_nfull = 0;

  // one clock of both structures: 0 idle, 1 insert/push, 2 delete/pop
  task automatic step(input int qop, input int sop);
    logic [W-1:0] qv, sv;
    qv = W'($urandom);
    sv = W'($urandom);
    @(negedge clk);
    q_ins = (qop == 1); q_del = (qop == 2); q_din = qv;
    s_push = (sop == 1); s_pop = (sop == 2); s_din = sv;
    #2;
    // queue
    check(q_count == QCW'(qm.size()) && q_empty == (qm.size() == 0) &&
          q_full == (qm.size() == QN), "queue status");
    if (qop == 2) begin
      if (qm.size() == 0) begin
        check(q_under && !q_dv, "queue underflow"); q_nunder++;
      end else begin
        check(q_dv && q_dout == qm[0], $sformatf("queue front %0h expected %0h", q_dout, qm[0]));
        void'(qm.pop_front());
      end
    end else if (qop == 1) begin
      if (qm.size() == QN) begin
        check(q_over, "queue overflow"); q_nover++;
      end else begin
        check(!q_over, "queue accepts"); qm.push_back(qv);
      end
    end
    if (qm.size() == QN) q_nfull++;
    // stack
    check(s_count == SCW'(sm.size()) && s_empty == (sm.size() == 0) &&
          s_full == (sm.size() == SN), "stack status");
    if (sop == 2) begin
      if (sm.size() == 0) begin
        check(s_under && !s_dv, "stack underflow"); s_nunder++;
      end else begin
        check(s_dv && s_dout == sm[$], $sformatf("stack top %0h expected %0h", s_dout, sm[$]));
        void'(sm.pop_back());
      end
    end else if (sop == 1) begin
      if (sm.size() == SN) begin
        check(s_over, "stack overflow"); s_nover++;
      end else begin
        check(!s_over, "stack accepts"); sm.push_back(sv);
      end
    end
    if (sm.size() == SN) s_nfull++;
  endtask

  function automatic int pick(input int p_ins);
    int r, a;
    a = $urandom_range(99);
    r = $urandom_range(99);
    if (a < 15)     return 0;
    if (r < p_ins)  return 1;
    return 2;
  endfunction

  initial begin : stim
    int p;
    q_ins = 0; q_del = 0; q_din = '0; s_push = 0; s_pop = 0; s_din = '0;
    for (int m = 0; m < M_NUM; m++) begin qcnt[m] = 0; scnt[m] = 0; end
    rst = 1'b1;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int ph = 0; ph < 32; ph++) begin
      p = (ph % 4 == 0) ? 92 : (ph % 4 == 2) ? 8 : 50;
      for (int c = 0; c < 300; c++) step(pick(p), pick(p));
    end
    while (qm.size() != 0 || sm.size() != 0)
      step(qm.size() != 0 ? 2 : 0, sm.size() != 0 ? 2 : 0);
    repeat (4) step(0, 0);
    check(q_empty && s_empty, "both empty at the end");

    for (int m = 0; m < M_NUM; m++) begin
      $display("queue %-28s %0d", MNAME[m], qcnt[m]);
      $display("stack %-28s %0d", MNAME[m], scnt[m]);
      check(qcnt[m] > 0, {"queue mechanism never seen: ", MNAME[m]});
      check(scnt[m] > 0, {"stack mechanism never seen: ", MNAME[m]});
    end
    $display("queue full cycles %0d overflow %0d underflow %0d", q_nfull, q_nover, q_nunder);
    $display("stack full cycles %0d overflow %0d underflow %0d", s_nfull, s_nover, s_nunder);
    check(q_nfull > 0 && q_nover > 0 && q_nunder > 0, "queue full/overflow/underflow seen");
    check(s_nfull > 0 && s_nover > 0 && s_nunder > 0, "stack full/overflow/underflow seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
