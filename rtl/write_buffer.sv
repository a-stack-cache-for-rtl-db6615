// Write buffer: dirty blocks on their way back to main memory.
//
// When a dirty block leaves the RAM (overflow, task-switch flush, or a
// write-back ordered by the hybrid algorithm) the control block copies it
// quad by quad into the staging entry (st_*) and then commits it with its PIN,
// block number and the mask of dirty transfer blocks. The buffer is a FIFO of
// ENTRIES blocks; the oldest entry is written back in the background, one
// quad per bus transaction, and only its dirty transfer blocks are sent. The
// entry is freed when its last dirty quad has been accepted.
//
// The lookup port tells the control block whether a block is still waiting
// in the buffer; a fetch or uncached access of such a block waits until it has
// left, so main memory is always up to date when it is read.
//
// Bus side: req/pin/addr/wdata stay stable until ack (one cycle pulse).
// Timing: staging, commit and pop take effect on the rising clock edge; full,
// empty and the lookup are combinational. Committing while full is an error
// (asserted). Sending only dirty transfer blocks follows the document; the
// FIFO order and the wait-on-lookup rule, instead of moving a block back out of
// the buffer or cancelling a write-back, are choices of this design.
module write_buffer #(
  parameter int unsigned ENTRIES = 4,
  parameter int unsigned QPB     = 16,
  parameter int unsigned TBPB    = 4,
  parameter int unsigned BLK_W   = 26,
  parameter int unsigned PIN_W   = 16,
  parameter int unsigned DATA_W  = 32,
  localparam int unsigned QW     = $clog2(QPB),
  localparam int unsigned TW     = $clog2(TBPB),
  localparam int unsigned TIW    = (TW > 0) ? TW : 1,  // transfer block index width
  localparam int unsigned EW     = (ENTRIES > 1) ? $clog2(ENTRIES) : 1,
  localparam int unsigned AW     = BLK_W + QW
) (
  input  logic              clk,
  input  logic              rst_n,
  // staging and commit
  input  logic              st_en,
  input  logic [QW-1:0]     st_idx,
  input  logic [DATA_W-1:0] st_data,
  input  logic              commit,
  input  logic [PIN_W-1:0]  commit_pin,
  input  logic [BLK_W-1:0]  commit_blk,
  input  logic [TBPB-1:0]   commit_dirty,
  output logic              full,
  output logic              empty,
  // lookup
  input  logic [PIN_W-1:0]  lk_pin,
  input  logic [BLK_W-1:0]  lk_blk,
  output logic              lk_hit,
  // bus master
  output logic              bus_req,
  output logic [PIN_W-1:0]  bus_pin,
  output logic [AW-1:0]     bus_addr,
  output logic [DATA_W-1:0] bus_wdata,
  input  logic              bus_ack
);

  logic [DATA_W-1:0] data  [ENTRIES][QPB];
  logic [PIN_W-1:0]  e_pin [ENTRIES];
  logic [BLK_W-1:0]  e_blk [ENTRIES];
  logic [TBPB-1:0]   e_dty [ENTRIES];
  logic [ENTRIES-1:0] e_val;
  logic [EW-1:0]     head, tail;
  logic [QW-1:0]     dq;      // quad of the head entry being written back
  logic              dq_dirty;
  logic              last_q;

  assign full  = &e_val;
  assign empty = ~|e_val;

  always_comb begin
    lk_hit = 1'b0;
    for (int e = 0; e < ENTRIES; e++)
      if (e_val[e] && e_pin[e] == lk_pin && e_blk[e] == lk_blk) lk_hit = 1'b1;
  end

  assign dq_dirty  = e_dty[head][TIW'(dq >> (QW - TW))];
  assign last_q    = (dq == QW'(QPB - 1));
  assign bus_req   = e_val[head] && dq_dirty;
  assign bus_pin   = e_pin[head];
  assign bus_addr  = {e_blk[head], dq};
  assign bus_wdata = data[head][dq];

  function automatic logic [EW-1:0] nxt(input logic [EW-1:0] i);
    return (i == EW'(ENTRIES - 1)) ? '0 : i + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_val <= '0;
      head  <= '0;
      tail  <= '0;
      dq    <= '0;
    end else begin
      if (commit) begin
        e_val[tail] <= 1'b1;
        tail        <= nxt(tail);
      end
      if (e_val[head] && (!dq_dirty || bus_ack)) begin
        dq <= dq + 1'b1;
        if (last_q) begin
          e_val[head] <= 1'b0;
          head        <= nxt(head);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (st_en) data[tail][st_idx] <= st_data;
    if (commit) begin
      e_pin[tail] <= commit_pin;
      e_blk[tail] <= commit_blk;
      e_dty[tail] <= commit_dirty;
    end
  end

  always_ff @(posedge clk) begin
    assert (!(commit && full)) else $error("write_buffer: commit while full");
  end

endmodule
