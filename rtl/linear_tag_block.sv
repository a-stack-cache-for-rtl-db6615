// Tag block of the linear stack cache.
//
// A linear cache holds one contiguous piece of the stack, so it needs no
// address tags: the base register (lowest cached block) and the TOS register
// (highest stack address) say which addresses are cached, and block b lives
// in RAM slot b mod NBLK. Per block the tag keeps a valid bit, per transfer
// block a dirty bit, and per quad a clear bit that marks space allocated to
// the stack by a TOS move but never written (a read of it returns zero).
// Besides TOS and base the block holds the dirty pointer of the hybrid
// algorithm (every cached block below it is clean), the PIN of the process
// that owns the RAM, and the bottom of that process' stack.
//
// All status bits and registers change on the rising clock edge. The
// execution unit's write port marks its transfer block dirty and its quad
// written, and pulls the dirty pointer down to its block, in the same cycle
// as the data is written. The control block updates everything else through
// set/clear masks and register load strobes; a valid clear wins over a set
// in the same cycle.
//
// The bit set (clear, valid, dirty), the registers TOS, base and dirty and the
// PIN register follow the tag block of the linear cache. Keeping the dirty
// pointer as a full block number and keeping a stack-bottom register (for the
// check that separates stack from global data) are choices of this design.
module linear_tag_block #(
  parameter int unsigned NBLK   = 32,  // blocks in the cache
  parameter int unsigned QPB    = 16,  // quads per block
  parameter int unsigned TBPB   = 4,   // transfer blocks per block
  parameter int unsigned ADDR_W = 30,
  parameter int unsigned PIN_W  = 16,
  localparam int unsigned WORDS = NBLK * QPB,
  localparam int unsigned CW    = $clog2(WORDS),
  localparam int unsigned QW    = $clog2(QPB),
  localparam int unsigned TW    = $clog2(TBPB),
  localparam int unsigned TIW   = (TW > 0) ? TW : 1,  // transfer block index width
  localparam int unsigned BLK_W = ADDR_W - QW
) (
  input  logic              clk,
  input  logic              rst_n,
  // write of the execution unit that hits the RAM
  input  logic              eu_wr_en,
  input  logic [ADDR_W-1:0] eu_wr_addr,
  // move of a fetched quad from the read buffer into the RAM
  input  logic              fill_en,
  input  logic [CW-1:0]     fill_quad,
  input  logic              fill_dirty,
  // block-wise updates by the control block (index = RAM slot)
  input  logic [NBLK-1:0]   valid_set,
  input  logic [NBLK-1:0]   valid_clr,
  input  logic [NBLK-1:0]   clean_blk,
  input  logic [NBLK-1:0]   clear_blk,
  // registers
  input  logic              tos_ld,
  input  logic [ADDR_W-1:0] tos_d,
  input  logic              base_ld,
  input  logic [BLK_W-1:0]  base_d,
  input  logic              dptr_ld,
  input  logic [BLK_W-1:0]  dptr_d,
  input  logic              pin_ld,
  input  logic [PIN_W-1:0]  pin_d,
  input  logic              bottom_ld,
  input  logic [ADDR_W-1:0] bottom_d,
  // state
  output logic [NBLK-1:0]   valid,
  output logic [TBPB-1:0]   dirty [NBLK],
  output logic [WORDS-1:0]  clear,
  output logic [ADDR_W-1:0] tos,
  output logic [BLK_W-1:0]  base,
  output logic [BLK_W-1:0]  dptr,
  output logic [PIN_W-1:0]  pin,
  output logic [ADDR_W-1:0] bottom
);

  localparam int unsigned SW = $clog2(NBLK);

  logic [SW-1:0]    wr_slot;
  logic [TIW-1:0]   wr_tb;
  logic [CW-1:0]    wr_quad;
  logic [BLK_W-1:0] wr_blk;
  logic [BLK_W-1:0] dptr_n;

  assign wr_quad = eu_wr_addr[CW-1:0];
  assign wr_slot = eu_wr_addr[CW-1:QW];
  assign wr_tb   = TIW'(eu_wr_addr[QW-1:0] >> (QW - TW));
  assign wr_blk  = eu_wr_addr[ADDR_W-1:QW];

  always_comb begin
    dptr_n = dptr_ld ? dptr_d : dptr;
    if (eu_wr_en && wr_blk < dptr_n) dptr_n = wr_blk;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid  <= '0;
      clear  <= '0;
      for (int b = 0; b < NBLK; b++) dirty[b] <= '0;
      tos    <= '0;
      base   <= '0;
      dptr   <= '0;
      pin    <= '0;
      bottom <= '1;  // empty stack: every address is global
    end else begin
      valid <= (valid | valid_set) & ~valid_clr;
      for (int b = 0; b < NBLK; b++) begin
        if (clean_blk[b]) dirty[b] <= '0;
        if (clear_blk[b]) clear[b*QPB +: QPB] <= '1;
      end
      if (eu_wr_en) begin
        dirty[wr_slot][wr_tb] <= 1'b1;
        clear[wr_quad]        <= 1'b0;
      end
      if (fill_en) begin
        clear[fill_quad] <= 1'b0;
        if (fill_dirty) dirty[fill_quad[CW-1:QW]][TIW'(fill_quad[QW-1:0] >> (QW - TW))] <= 1'b1;
      end
      if (tos_ld)    tos    <= tos_d;
      if (base_ld)   base   <= base_d;
      if (pin_ld)    pin    <= pin_d;
      if (bottom_ld) bottom <= bottom_d;
      dptr <= dptr_n;
    end
  end

endmodule
