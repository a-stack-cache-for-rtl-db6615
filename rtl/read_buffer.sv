// Read buffer: one block being fetched from main memory.
//
// On a miss the control block allocates the buffer for a block (PIN and block
// number) and the bus delivers the block quad by quad, the transfer block
// holding the requested quad first. Each quad is usable as soon as it has
// arrived: the read ports of the execution unit are checked against the
// buffer in parallel with the RAM (rd_hit), so a read miss is answered after
// one memory access, not after the whole block. The execution unit may also
// write into a block that is being fetched (the write-miss shortcut): the
// quad is marked written and a later arriving memory quad does not overwrite
// it. When the block is complete (full) the control block moves it into the
// RAM, reading it through the mv_* port, and the written mask tells which
// transfer blocks are dirty. While the move is under way the control block
// sets lock, which refuses writes so that none is lost.
//
// A block fetched when the RAM has no room for it (to_ram = 0) stays in the
// buffer, serving reads only, until the buffer is needed again; a write to it
// is not accepted here and goes to main memory instead.
//
// Timing: lookups are combinational; alloc, fill, writes and release take
// effect on the rising clock edge. alloc wins over everything else.
// The buffer holds a single block because the control block handles one miss
// at a time; that size, and the per-quad valid and written bits, are choices
// of this design.
module read_buffer #(
  parameter int unsigned QPB    = 16,
  parameter int unsigned NRD    = 2,
  parameter int unsigned BLK_W  = 26,
  parameter int unsigned PIN_W  = 16,
  parameter int unsigned DATA_W = 32,
  localparam int unsigned QW    = $clog2(QPB),
  localparam int unsigned AW    = BLK_W + QW
) (
  input  logic              clk,
  input  logic              rst_n,
  // control block
  input  logic              alloc,
  input  logic [PIN_W-1:0]  alloc_pin,
  input  logic [BLK_W-1:0]  alloc_blk,
  input  logic              alloc_to_ram,
  input  logic              fill_en,
  input  logic [QW-1:0]     fill_idx,
  input  logic [DATA_W-1:0] fill_data,
  input  logic              release_buf,
  input  logic              lock,
  input  logic [QW-1:0]     mv_idx,
  output logic [DATA_W-1:0] mv_data,
  output logic              mv_written,
  output logic              active,
  output logic              to_ram,
  output logic [BLK_W-1:0]  blk,
  output logic [PIN_W-1:0]  pin,
  output logic              full,
  output logic [QPB-1:0]    written,
  // execution unit read ports
  input  logic [PIN_W-1:0]  rd_pin  [NRD],
  input  logic [AW-1:0]     rd_addr [NRD],
  output logic              rd_hit  [NRD],
  output logic [DATA_W-1:0] rd_data [NRD],
  // execution unit write port
  input  logic              wr_en,
  input  logic [PIN_W-1:0]  wr_pin,
  input  logic [AW-1:0]     wr_addr,
  input  logic [DATA_W-1:0] wr_data,
  output logic              wr_hit
);

  logic [DATA_W-1:0] data [QPB];
  logic [QPB-1:0]    qvalid;

  assign full       = active && (&qvalid);
  assign mv_data    = data[mv_idx];
  assign mv_written = written[mv_idx];

  always_comb begin
    for (int p = 0; p < NRD; p++) begin
      rd_hit[p]  = active && rd_pin[p] == pin && rd_addr[p][AW-1:QW] == blk
                   && qvalid[rd_addr[p][QW-1:0]];
      rd_data[p] = data[rd_addr[p][QW-1:0]];
    end
  end

  assign wr_hit = active && to_ram && !lock && wr_pin == pin && wr_addr[AW-1:QW] == blk;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active  <= 1'b0;
      to_ram  <= 1'b0;
      blk     <= '0;
      pin     <= '0;
      qvalid  <= '0;
      written <= '0;
    end else if (alloc) begin
      active  <= 1'b1;
      to_ram  <= alloc_to_ram;
      blk     <= alloc_blk;
      pin     <= alloc_pin;
      qvalid  <= '0;
      written <= '0;
    end else begin
      if (release_buf) active <= 1'b0;
      if (fill_en && !written[fill_idx]) qvalid[fill_idx] <= 1'b1;
      if (wr_en && wr_hit) begin
        qvalid[wr_addr[QW-1:0]]  <= 1'b1;
        written[wr_addr[QW-1:0]] <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!alloc && fill_en && !written[fill_idx] && !(wr_en && wr_hit && wr_addr[QW-1:0] == fill_idx))
      data[fill_idx] <= fill_data;
    if (!alloc && wr_en && wr_hit) data[wr_addr[QW-1:0]] <= wr_data;
  end

endmodule
