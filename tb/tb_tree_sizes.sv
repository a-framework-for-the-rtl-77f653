// tb_tree_sizes: random test of every tree size the design was built in,
// 1, 3, 7 and 15 nodes (LEVELS 1 to 4), for the queue and for the stack,
// each against a behavioural FIFO or LIFO (see tree_size_checker). Every
// size must also have been filled to capacity at least once.
module tb_tree_sizes;
  logic clk = 1'b0, rst = 1'b1;
  int checks = 0, failures = 0;
  int c [8], f [8], fu [8];
  logic d [8];

  always #5 clk = ~clk;

  for (genvar l = 1; l <= 4; l++) begin : g_size
    tree_size_checker #(.IS_STACK(1'b0), .LEVELS(l)) u_q (
      .clk(clk), .rst(rst), .checks(c[2*l-2]), .failures(f[2*l-2]), .fulls(fu[2*l-2]), .done(d[2*l-2]));
    tree_size_checker #(.IS_STACK(1'b1), .LEVELS(l)) u_s (
      .clk(clk), .rst(rst), .checks(c[2*l-1]), .failures(f[2*l-1]), .fulls(fu[2*l-1]), .done(d[2*l-1]));
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin : stim
    bit all_done;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    do begin
      @(posedge clk);
      all_done = 1'b1;
      for (int i = 0; i < 8; i++) all_done &= d[i];
    end while (!all_done);
    for (int i = 0; i < 8; i++) begin
      $display("%s, %0d nodes: checks %0d failures %0d full cycles %0d",
               (i % 2) ? "stack" : "queue", (1 << (i / 2 + 1)) - 1, c[i], f[i], fu[i]);
      checks += c[i] + 1;
      failures += f[i] + (fu[i] == 0 ? 1 : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
