// Types shared by the GCD control unit: the binary state encoding (two
// flip-flops) and the bundle of control signals sent to the datapath.
// The four states and their codes are this design's reading of the
// subtract-compare-swap algorithm.
package gcd_pkg;
  typedef enum logic [1:0] {
    S_IDLE = 2'b00,   // wait for start, load operands
    S_CMP  = 2'b01,   // compare: done, swap or subtract
    S_SWAP = 2'b10,   // exchange x and y
    S_DONE = 2'b11    // result in x, wait for start to drop
  } gcd_state_t;

  typedef struct packed {
    logic load;   // x <= operand x, y <= operand y
    logic swap;   // x <= y, y <= x
    logic sub;    // x <= x - y
    logic done;   // x holds the GCD
  } gcd_ctrl_t;
endpackage
