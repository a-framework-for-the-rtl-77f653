// tree_size_checker: drives one systolic queue (IS_STACK = 0) or stack
// (IS_STACK = 1) of LEVELS levels with a random instruction stream and
// compares every answer, in the cycle of its request, and the status
// outputs with a behavioural FIFO or LIFO. The stream runs in phases that
// fill the tree to capacity and drain it to empty. Reports its check and
// failure counts and raises done when finished.
module tree_size_checker
  import systolic_ds_pkg::*;
#(
  parameter bit          IS_STACK = 1'b0,
  parameter int unsigned LEVELS   = 2,
  parameter int unsigned STEPS    = 4000
) (
  input  logic clk,
  input  logic rst,
  output int   checks,
  output int   failures,
  output int   fulls,
  output logic done
);
  localparam int unsigned W  = DATA_W;
  localparam int unsigned N  = (1 << LEVELS) - 1;
  localparam int unsigned CW = $clog2(N + 1);

  logic ins, del, dv, empty, full, ovf, unf;
  logic [W-1:0] din, dout;
  logic [CW-1:0] count;
  logic [W-1:0] model [$];

  if (IS_STACK) begin : g_dut
    systolic_stack #(.LEVELS(LEVELS)) u_dut (
      .clk(clk), .rst(rst), .ins_i(ins), .del_i(del), .din_i(din),
      .dout_o(dout), .dout_valid_o(dv), .empty_o(empty), .full_o(full),
      .count_o(count), .overflow_o(ovf), .underflow_o(unf));
  end else begin : g_dut
    systolic_queue #(.LEVELS(LEVELS)) u_dut (
      .clk(clk), .rst(rst), .ins_i(ins), .del_i(del), .din_i(din),
      .dout_o(dout), .dout_valid_o(dv), .empty_o(empty), .full_o(full),
      .count_o(count), .overflow_o(ovf), .underflow_o(unf));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s L=%0d: %s at %0t", IS_STACK ? "stack" : "queue", LEVELS, what, $time);
    end
  endtask

  initial begin : stim
    int p, a, r;
    logic [W-1:0] exp;
    checks = 0; failures = 0; fulls = 0; done = 1'b0;
    ins = 1'b0; del = 1'b0; din = '0;
    @(negedge rst);
    for (int c = 0; c < STEPS; c++) begin
      p = ((c / 200) % 3 == 0) ? 85 : ((c / 200) % 3 == 1) ? 15 : 50;
      a = $urandom_range(99);
      r = $urandom_range(99);
      @(negedge clk);
      ins = (a >= 10) && (r < p);
      del = (a >= 10) && (r >= p);
      din = W'($urandom);
      #2;
      check(count == CW'(model.size()) && empty == (model.size() == 0) &&
            full == (model.size() == N), "status");
      if (del) begin
        if (model.size() == 0) check(unf && !dv, "underflow");
        else begin
          exp = IS_STACK ? model[$] : model[0];
          check(dv && dout == exp, $sformatf("got %0h expected %0h", dout, exp));
          if (IS_STACK) void'(model.pop_back());
          else          void'(model.pop_front());
        end
      end else if (ins) begin
        if (model.size() == N) check(ovf, "overflow");
        else begin
          check(!ovf, "accepted");
          model.push_back(din);
        end
      end
      if (model.size() == N) fulls++;
    end
    @(negedge clk);
    ins = 1'b0; del = 1'b0;
    done = 1'b1;
  end
endmodule
