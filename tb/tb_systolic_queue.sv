// tb_systolic_queue: self-checking test of the systolic-tree queue at its
// default size (six levels, 63 nodes).
//
// 1. Fifteen consecutive inserts of 1..15 into the empty queue must leave the
//    items in the top four levels in the pattern of the reference
//    distribution (root 1, children 2 and 3, then 4 6 5 7, then
//    8 12 10 14 9 13 11 15 in heap order).
// 2. A long random stream of inserts, deletes and idle cycles, biased in
//    phases so that the queue is filled to capacity and drained to empty
//    repeatedly, is compared with a behavioural FIFO. One instruction is
//    issued per clock and every delete must return the front item in the
//    same cycle (unit response time, unit pipeline interval). Flags, count,
//    overflow and underflow pulses are compared every cycle.
module tb_systolic_queue;
  import systolic_ds_pkg::*;
  localparam int unsigned W = DATA_W;
  localparam int unsigned N = (1 << QUEUE_LEVELS) - 1;
  localparam int unsigned CW = $clog2(N + 1);

  logic clk = 1'b0;
  logic rst;
  logic ins, del;
  logic [W-1:0] din, dout;
  logic dout_valid, empty, full, overflow, underflow;
  logic [CW-1:0] count;

  int checks = 0, failures = 0;
  int n_full = 0, n_over = 0, n_under = 0, n_del = 0;
  logic [W-1:0] model [$];

  systolic_queue dut (
    .clk(clk), .rst(rst), .ins_i(ins), .del_i(del), .din_i(din),
    .dout_o(dout), .dout_valid_o(dout_valid), .empty_o(empty), .full_o(full),
    .count_o(count), .overflow_o(overflow), .underflow_o(underflow)
  );

  logic [W-1:0] snap [15];
  for (genvar k = 0; k < 15; k++) begin : g_snap
    assign snap[k] = dut.g_node[k].u_node.s_q;
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
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

  // apply one instruction for one clock and compare with the model
  task automatic step(input bit i, input bit d, input logic [W-1:0] v);
    @(negedge clk);
    ins = i; del = d; din = v;
    #2;
    check(count == CW'(model.size()), "count");
    check(empty == (model.size() == 0), "empty");
    check(full  == (model.size() == N), "full");
    if (d) begin
      if (model.size() == 0) begin
        check(!dout_valid && underflow, "underflow");
        n_under++;
      end else begin
        check(dout_valid && !underflow, "dout_valid");
        check(dout == model[0], $sformatf("front %0h expected %0h", dout, model[0]));
        void'(model.pop_front());
        n_del++;
      end
    end else if (i) begin
      if (model.size() == N) begin
        check(overflow, "overflow");
        n_over++;
      end else begin
        check(!overflow, "no overflow");
        model.push_back(v);
      end
    end else begin
      check(!dout_valid && !overflow && !underflow, "idle");
    end
    if (model.size() == N) n_full++;
  endtask

  localparam int unsigned FIG [15] = '{1, 2, 3, 4, 6, 5, 7, 8, 12, 10, 14, 9, 13, 11, 15};

  initial begin : stim
    int p_ins, r, a;
    ins = 0; del = 0; din = '0;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // 1. distribution after fifteen inserts
    for (int v = 1; v <= 15; v++) step(1, 0, W'(v));
    repeat (6) step(0, 0, '0);
    for (int k = 0; k < 15; k++)
      check(snap[k] == W'(FIG[k]), $sformatf("node %0d holds %0d expected %0d", k, snap[k], FIG[k]));
    // drain in order
    for (int v = 1; v <= 15; v++) step(0, 1, '0);
    step(0, 1, '0);                          // delete from the empty queue
    // 2. random phases
    for (int ph = 0; ph < 40; ph++) begin
      p_ins = (ph % 4 == 0) ? 90 : (ph % 4 == 2) ? 10 : 50;
      for (int c = 0; c < 400; c++) begin
        r = $urandom_range(99);
        a = $urandom_range(99);
        if (a < 15)          step(0, 0, '0);
        else if (r < p_ins)  step(1, 0, W'($urandom));
        else                 step(0, 1, '0);
      end
    end
    while (model.size() != 0) step(0, 1, '0);
    check(n_full > 0, "queue reached full");
    check(n_over > 0, "overflow seen");
    check(n_under > 0, "underflow seen");
    $display("deletes=%0d full_cycles=%0d overflows=%0d underflows=%0d", n_del, n_full, n_over, n_under);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
