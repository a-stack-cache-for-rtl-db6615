// Shared types and constants of the linear stack cache.
//
// The C-processor addresses memory in quads (32-bit words). A request
// carries a 16-bit process identification number (PIN) and a 30-bit quad
// address, which together form the virtual address the cache sees. The
// widths follow the processor: 4 GB address space in quads and a 16-bit PIN.
// The request classes, the control-command encoding and the event record
// are choices of this implementation.
package sc_pkg;

  localparam int unsigned ADDR_W = 30;  // quad address width (4 GB / 4 bytes)
  localparam int unsigned PIN_W  = 16;  // process identification number
  localparam int unsigned DATA_W = 32;  // one quad

  typedef logic [ADDR_W-1:0] qaddr_t;
  typedef logic [PIN_W-1:0]  pin_t;
  typedef logic [DATA_W-1:0] quad_t;

  // Result of the stage-one address check of one request.
  typedef enum logic [1:0] {
    CMP_HIT    = 2'd0,  // PIN matches, address on the cached stack, block valid
    CMP_MISS   = 2'd1,  // on the stack of the current process, block not in the RAM
    CMP_GLOBAL = 2'd2,  // not on the stack (below the bottom or above the TOS)
    CMP_TASK   = 2'd3   // PIN differs from the PIN of the RAM
  } cmp_class_e;

  // Replacement strategy of the linear cache.
  typedef enum logic {
    REPL_CUT_BACK_K = 1'b0,
    REPL_HYBRID     = 1'b1
  } repl_e;

  // Commands from the execution unit on the control interface.
  typedef enum logic {
    CTL_SET_TOS     = 1'b0,  // move the top of stack
    CTL_TASK_SWITCH = 1'b1   // flush, then load a new PIN, TOS and stack bottom
  } ctl_op_e;

  // One-cycle event pulses, for statistics and for testbenches.
  typedef struct packed {
    logic ram_hit;       // a port was served from the data RAM
    logic rb_hit;        // a port was served from the read buffer
    logic demand_fetch;  // a demand miss started a block fetch
    logic no_space;      // a miss found the RAM full and bypassed it
    logic global_acc;    // a request went to main memory uncached
    logic overflow;      // TOS moved up past base + cache size
    logic underflow;     // TOS moved down below the base
    logic task_switch;   // linear cache flushed on a task switch
    logic cutback_fill;  // a block between old and new base was fetched (stage 6)
    logic prefetch;      // hybrid algorithm prefetched the block below the base
    logic dirty_wb;      // hybrid algorithm wrote back the block at the dirty pointer
    logic wb_push;       // a block was copied into the write buffer
  } sc_events_t;

endpackage
