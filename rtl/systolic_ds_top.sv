// systolic_ds_top: the two systolic-tree data structures of this design side
// by side, a FIFO queue (default 63 nodes, six levels) and a LIFO stack
// (default 15 nodes, four levels), each an independent tree of identical
// nodes with its own instruction and data ports and a shared clock and reset.
//
// Queue ports q_*: q_ins_i/q_din_i insert, q_del_i delete with the front
// item on q_dout_o in the same cycle (q_dout_valid_o). Stack ports s_*:
// s_push_i/s_din_i push, s_pop_i pop with the top item on s_dout_o in the
// same cycle (s_dout_valid_o). Each structure reports empty, full, its item
// count, and a one-cycle pulse for a refused insert/push (overflow) or a
// refused delete/pop (underflow). One instruction per structure per clock.
// Reset is asynchronous and active high. Putting both structures in one top
// is a choice of this design; they do not interact.
module systolic_ds_top
  import systolic_ds_pkg::*;
#(
  parameter int unsigned W        = DATA_W,
  parameter int unsigned Q_LEVELS = QUEUE_LEVELS,
  parameter int unsigned S_LEVELS = STACK_LEVELS,
  localparam int unsigned QCW     = $clog2((1 << Q_LEVELS)),
  localparam int unsigned SCW     = $clog2((1 << S_LEVELS))
) (
  input  logic           clk,
  input  logic           rst,
  // queue
  input  logic           q_ins_i,
  input  logic           q_del_i,
  input  logic [W-1:0]   q_din_i,
  output logic [W-1:0]   q_dout_o,
  output logic           q_dout_valid_o,
  output logic           q_empty_o,
  output logic           q_full_o,
  output logic [QCW-1:0] q_count_o,
  output logic           q_overflow_o,
  output logic           q_underflow_o,
  // stack
  input  logic           s_push_i,
  input  logic           s_pop_i,
  input  logic [W-1:0]   s_din_i,
  output logic [W-1:0]   s_dout_o,
  output logic           s_dout_valid_o,
  output logic           s_empty_o,
  output logic           s_full_o,
  output logic [SCW-1:0] s_count_o,
  output logic           s_overflow_o,
  output logic           s_underflow_o
);
  systolic_queue #(.W(W), .LEVELS(Q_LEVELS)) u_queue (
    .clk          (clk),
    .rst          (rst),
    .ins_i        (q_ins_i),
    .del_i        (q_del_i),
    .din_i        (q_din_i),
    .dout_o       (q_dout_o),
    .dout_valid_o (q_dout_valid_o),
    .empty_o      (q_empty_o),
    .full_o       (q_full_o),
    .count_o      (q_count_o),
    .overflow_o   (q_overflow_o),
    .underflow_o  (q_underflow_o)
  );

  systolic_stack #(.W(W), .LEVELS(S_LEVELS)) u_stack (
    .clk          (clk),
    .rst          (rst),
    .ins_i        (s_push_i),
    .del_i        (s_pop_i),
    .din_i        (s_din_i),
    .dout_o       (s_dout_o),
    .dout_valid_o (s_dout_valid_o),
    .empty_o      (s_empty_o),
    .full_o       (s_full_o),
    .count_o      (s_count_o),
    .overflow_o   (s_overflow_o),
    .underflow_o  (s_underflow_o)
  );
endmodule
