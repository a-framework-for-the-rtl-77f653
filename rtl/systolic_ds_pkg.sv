// Shared constants of the systolic-tree queue and stack.
//
// DATA_W is the width of the data and buffer registers and of the four
// data buses of every tree node (eight bits, as in the original design).
// QUEUE_LEVELS and STACK_LEVELS are the default tree depths: a 63-node
// queue (six levels) and a 15-node stack (four levels), the largest trees
// of each kind in the original design.
package systolic_ds_pkg;
  localparam int unsigned DATA_W       = 8;
  localparam int unsigned QUEUE_LEVELS = 6;
  localparam int unsigned STACK_LEVELS = 4;
endpackage
