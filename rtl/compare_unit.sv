// Compare unit: the stage-one check of one request port.
//
// It classifies a request in the same cycle, before anything is read or
// written:
//   CMP_TASK   the request PIN differs from the PIN that owns the RAM;
//   CMP_GLOBAL the address is not on the stack of the current process, i.e.
//              below the stack bottom or above the TOS (all stack data is
//              local, everything else is global and goes to main memory);
//   CMP_HIT    the address lies between base and TOS and its block is valid;
//   CMP_MISS   the address is on the stack but its block is not in the RAM
//              (below the base, or a block not yet fetched).
// The unit also returns the RAM word and block of the address, which for a
// linear cache are simply its low address bits. One instance serves one port;
// the ports do not interact, as misses are handled centrally.
//
// The order of the checks (PIN, then boundaries, then valid bit) follows the
// stage-one description of the control block. Treating a PIN mismatch on a
// request as an uncached access, rather than as the trigger of the flush, is
// a choice of this design: the flush is started by the task-switch command.
module compare_unit
  import sc_pkg::*;
#(
  parameter int unsigned NBLK   = 32,
  parameter int unsigned QPB    = 16,
  localparam int unsigned WORDS = NBLK * QPB,
  localparam int unsigned CW    = $clog2(WORDS),
  localparam int unsigned QW    = $clog2(QPB),
  localparam int unsigned SW    = $clog2(NBLK),
  localparam int unsigned BLK_W = ADDR_W - QW
) (
  input  pin_t             req_pin,
  input  qaddr_t           req_addr,
  input  pin_t             ram_pin,
  input  qaddr_t           tos,
  input  logic [BLK_W-1:0] base,
  input  qaddr_t           bottom,
  input  logic [NBLK-1:0]  valid,
  output cmp_class_e       cls,
  output logic [CW-1:0]    ram_word,
  output logic [BLK_W-1:0] blk
);

  logic [SW-1:0] slot;

  assign ram_word = req_addr[CW-1:0];
  assign slot     = req_addr[CW-1:QW];
  assign blk      = req_addr[ADDR_W-1:QW];

  always_comb begin
    if (req_pin != ram_pin)                             cls = CMP_TASK;
    else if (req_addr > tos || req_addr < bottom)       cls = CMP_GLOBAL;
    else if (blk >= base && valid[slot])                cls = CMP_HIT;
    else                                                cls = CMP_MISS;
  end

endmodule
