// Linear stack cache for a stack-based processor.
//
// The processor keeps procedure parameters and locals on a stack that grows
// upward, and the cache holds the contiguous top of that stack: every address
// from the base pointer (block aligned) up to the top of stack (TOS). Because
// the cached data is contiguous, no address tags are needed: block b sits in
// RAM slot b mod (CACHE_QUADS / BLOCK_QUADS) and two registers, base and TOS,
// say what is cached. The cache is an extension of the stack, not a copy:
// dirty data is written back only when it must leave the RAM.
//
// Execution-unit side (all in quads of 32 bits, addresses are 30-bit quad
// addresses qualified by a 16-bit PIN):
//   NRD read ports and one write port, valid/ack handshake: a request is held
//   until ack. A hit is acknowledged in the same cycle (read data valid with
//   ack), so every port can complete one request per clock. A miss holds the
//   port until the data has arrived in the read buffer (reads) or until the
//   read buffer has been allocated for the block (writes).
//   ctl_*: commands, held until ctl_ready. CTL_SET_TOS moves the TOS;
//   CTL_TASK_SWITCH flushes the cache and loads the PIN, TOS and stack bottom
//   of the next process.
// MMU side: one quad per transaction, mem_req and its command stay stable
//   until the one-cycle mem_ack; mem_rdata is valid with mem_ack.
//
// Blocks: data_ram (NRD+1 read, 2 write ports), linear_tag_block (status bits
// and boundary registers), one compare_unit per port (hit check), read_buffer
// and write_buffer between RAM and memory, bus_unit (bus arbitration) and
// replacement_unit (cut back K or hybrid replacement). Stack data is every
// address from the stack bottom to the TOS; other addresses, and requests of
// another PIN, are passed to main memory uncached.
//
// Organisation, replacement algorithms, buffers and the order of the actions
// follow the document; its example sizes (512-quad cache, 16-quad blocks, two
// read ports and one write port) are the defaults. The transfer-block size, K,
// the hybrid offsets, the write-buffer depth, the handshakes and the uncached
// path for non-stack data are this design's choices.
module linear_stack_cache
  import sc_pkg::*;
#(
  parameter int unsigned CACHE_QUADS     = 512,
  parameter int unsigned BLOCK_QUADS     = 16,
  parameter int unsigned TB_QUADS        = 4,
  parameter int unsigned NRD             = 2,
  parameter int unsigned WB_ENTRIES      = 4,
  parameter repl_e       REPL            = REPL_HYBRID,
  parameter int unsigned K               = 2,
  parameter int unsigned DIRTY_OFFSET    = 24,
  parameter int unsigned PREFETCH_OFFSET = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  // read ports
  input  logic       rd_req  [NRD],
  input  pin_t       rd_pin  [NRD],
  input  qaddr_t     rd_addr [NRD],
  output logic       rd_ack  [NRD],
  output quad_t      rd_data [NRD],
  // write port
  input  logic       wr_req,
  input  pin_t       wr_pin,
  input  qaddr_t     wr_addr,
  input  quad_t      wr_data,
  output logic       wr_ack,
  // commands
  input  logic       ctl_valid,
  input  ctl_op_e    ctl_op,
  input  pin_t       ctl_pin,
  input  qaddr_t     ctl_tos,
  input  qaddr_t     ctl_bottom,
  output logic       ctl_ready,
  // MMU
  output logic       mem_req,
  output logic       mem_we,
  output pin_t       mem_pin,
  output qaddr_t     mem_addr,
  output quad_t      mem_wdata,
  input  logic       mem_ack,
  input  quad_t      mem_rdata,
  // statistics
  output sc_events_t events
);

  localparam int unsigned NBLK  = CACHE_QUADS / BLOCK_QUADS;
  localparam int unsigned TBPB  = BLOCK_QUADS / TB_QUADS;
  localparam int unsigned NP    = NRD + 1;
  localparam int unsigned CW    = $clog2(CACHE_QUADS);
  localparam int unsigned QW    = $clog2(BLOCK_QUADS);
  localparam int unsigned BLK_W = ADDR_W - QW;

  // ------------------------------------------------------------ tag block
  logic [NBLK-1:0]        valid, valid_set, valid_clr, clean_blk, clear_blk;
  logic [TBPB-1:0]        dirty [NBLK];
  logic [CACHE_QUADS-1:0] clear;
  qaddr_t                 tos, tos_d, bottom, bottom_d;
  logic [BLK_W-1:0]       base, base_d, dptr, dptr_d;
  pin_t                   pin, pin_d;
  logic tos_ld, base_ld, dptr_ld, pin_ld, bottom_ld;
  logic fill_en, fill_dirty;
  logic [CW-1:0] fill_quad;
  logic eu_wr_en;

  linear_tag_block #(
    .NBLK(NBLK), .QPB(BLOCK_QUADS), .TBPB(TBPB), .ADDR_W(ADDR_W), .PIN_W(PIN_W)
  ) u_tag (
    .clk, .rst_n,
    .eu_wr_en(eu_wr_en), .eu_wr_addr(wr_addr),
    .fill_en, .fill_quad, .fill_dirty,
    .valid_set, .valid_clr, .clean_blk, .clear_blk,
    .tos_ld, .tos_d, .base_ld, .base_d, .dptr_ld, .dptr_d,
    .pin_ld, .pin_d, .bottom_ld, .bottom_d,
    .valid, .dirty, .clear, .tos, .base, .dptr, .pin, .bottom
  );

  // ------------------------------------------------------------ compare units
  pin_t             p_pin  [NP];
  qaddr_t           p_addr [NP];
  quad_t            p_wdata[NP];
  cmp_class_e       cls    [NP];
  logic [CW-1:0]    word   [NP];
  logic [BLK_W-1:0] blk    [NP];

  always_comb begin
    for (int p = 0; p < NRD; p++) begin
      p_pin[p]   = rd_pin[p];
      p_addr[p]  = rd_addr[p];
      p_wdata[p] = '0;
    end
    p_pin[NRD]   = wr_pin;
    p_addr[NRD]  = wr_addr;
    p_wdata[NRD] = wr_data;
  end

  for (genvar p = 0; p < NP; p++) begin : g_cmp
    compare_unit #(.NBLK(NBLK), .QPB(BLOCK_QUADS)) u_cmp (
      .req_pin(p_pin[p]), .req_addr(p_addr[p]),
      .ram_pin(pin), .tos, .base, .bottom, .valid,
      .cls(cls[p]), .ram_word(word[p]), .blk(blk[p])
    );
  end

  // ------------------------------------------------------------ data RAM
  logic [CW-1:0] ram_rd_addr [NP];
  quad_t         ram_rd_data [NP];
  logic          ram_wr_en   [2];
  logic [CW-1:0] ram_wr_addr [2];
  quad_t         ram_wr_data [2];
  logic [CW-1:0] c_rd_addr, c_wr_addr;
  logic          c_wr_en;
  quad_t         c_wr_data;

  always_comb begin
    for (int p = 0; p < NRD; p++) ram_rd_addr[p] = word[p];
    ram_rd_addr[NRD] = c_rd_addr;
    ram_wr_en[0]   = eu_wr_en;
    ram_wr_addr[0] = word[NRD];
    ram_wr_data[0] = wr_data;
    ram_wr_en[1]   = c_wr_en;
    ram_wr_addr[1] = c_wr_addr;
    ram_wr_data[1] = c_wr_data;
  end

  data_ram #(.WORDS(CACHE_QUADS), .DATA_W(DATA_W), .NRD(NP), .NWR(2)) u_ram (
    .clk, .rd_addr(ram_rd_addr), .rd_data(ram_rd_data),
    .wr_en(ram_wr_en), .wr_addr(ram_wr_addr), .wr_data(ram_wr_data)
  );

  // ------------------------------------------------------------ read buffer
  logic             rb_alloc, rb_alloc_to_ram, rb_fill_en, rb_release, rb_lock;
  pin_t             rb_alloc_pin, rb_pin_q;
  logic [BLK_W-1:0] rb_alloc_blk, rb_blk_q;
  logic [QW-1:0]    rb_fill_idx, rb_mv_idx;
  quad_t            rb_fill_data, rb_mv_data;
  logic             rb_mv_written, rb_active, rb_to_ram, rb_full;
  logic [BLOCK_QUADS-1:0] rb_written;
  logic             rb_rd_hit  [NRD];
  quad_t            rb_rd_data [NRD];
  logic             rb_wr_en, rb_wr_hit;

  assign rb_wr_en = wr_req && cls[NRD] == CMP_MISS;

  read_buffer #(
    .QPB(BLOCK_QUADS), .NRD(NRD), .BLK_W(BLK_W), .PIN_W(PIN_W), .DATA_W(DATA_W)
  ) u_rb (
    .clk, .rst_n,
    .alloc(rb_alloc), .alloc_pin(rb_alloc_pin), .alloc_blk(rb_alloc_blk),
    .alloc_to_ram(rb_alloc_to_ram),
    .fill_en(rb_fill_en), .fill_idx(rb_fill_idx), .fill_data(rb_fill_data),
    .release_buf(rb_release), .lock(rb_lock),
    .mv_idx(rb_mv_idx), .mv_data(rb_mv_data), .mv_written(rb_mv_written),
    .active(rb_active), .to_ram(rb_to_ram), .blk(rb_blk_q), .pin(rb_pin_q),
    .full(rb_full), .written(rb_written),
    .rd_pin, .rd_addr, .rd_hit(rb_rd_hit), .rd_data(rb_rd_data),
    .wr_en(rb_wr_en), .wr_pin, .wr_addr, .wr_data, .wr_hit(rb_wr_hit)
  );

  // ------------------------------------------------------------ write buffer
  logic             wb_st_en, wb_commit, wb_full, wb_empty, wb_lk_hit;
  logic [QW-1:0]    wb_st_idx;
  quad_t            wb_st_data;
  pin_t             wb_commit_pin, wb_lk_pin;
  logic [BLK_W-1:0] wb_commit_blk, wb_lk_blk;
  logic [TBPB-1:0]  wb_commit_dirty;
  logic             m1_req, m1_ack;
  pin_t             m1_pin;
  qaddr_t           m1_addr;
  quad_t            m1_wdata;

  write_buffer #(
    .ENTRIES(WB_ENTRIES), .QPB(BLOCK_QUADS), .TBPB(TBPB), .BLK_W(BLK_W),
    .PIN_W(PIN_W), .DATA_W(DATA_W)
  ) u_wb (
    .clk, .rst_n,
    .st_en(wb_st_en), .st_idx(wb_st_idx), .st_data(wb_st_data),
    .commit(wb_commit), .commit_pin(wb_commit_pin), .commit_blk(wb_commit_blk),
    .commit_dirty(wb_commit_dirty), .full(wb_full), .empty(wb_empty),
    .lk_pin(wb_lk_pin), .lk_blk(wb_lk_blk), .lk_hit(wb_lk_hit),
    .bus_req(m1_req), .bus_pin(m1_pin), .bus_addr(m1_addr), .bus_wdata(m1_wdata),
    .bus_ack(m1_ack)
  );

  // ------------------------------------------------------------ bus unit
  logic   m0_req, m0_we, m0_ack;
  pin_t   m0_pin;
  qaddr_t m0_addr;
  quad_t  m0_wdata, bus_rdata;

  bus_unit #(.AW(ADDR_W), .PIN_W(PIN_W), .DATA_W(DATA_W)) u_bus (
    .clk, .rst_n,
    .m0_req, .m0_we, .m0_pin, .m0_addr, .m0_wdata, .m0_ack,
    .m1_req, .m1_pin, .m1_addr, .m1_wdata, .m1_ack,
    .rdata(bus_rdata),
    .mem_req, .mem_we, .mem_pin, .mem_addr, .mem_wdata, .mem_ack, .mem_rdata
  );

  // ------------------------------------------------------------ ports
  logic [NP-1:0]    dm_need, svc_ack;
  quad_t            svc_rdata;
  logic             copy_busy;
  logic [BLK_W-1:0] copy_blk;
  logic             wr_ram_hit;
  sc_events_t       ru_ev;
  logic             any_ram_hit, any_rb_hit;

  assign wr_ram_hit = wr_req && cls[NRD] == CMP_HIT && !(copy_busy && blk[NRD] == copy_blk);
  assign eu_wr_en   = wr_ram_hit;

  always_comb begin
    any_ram_hit = wr_ram_hit;
    any_rb_hit  = rb_wr_en && rb_wr_hit;
    for (int p = 0; p < NRD; p++) begin
      rd_ack[p]  = (rd_req[p] && (cls[p] == CMP_HIT || rb_rd_hit[p])) || svc_ack[p];
      rd_data[p] = svc_ack[p]           ? svc_rdata :
                   (cls[p] == CMP_HIT)  ? (clear[word[p]] ? '0 : ram_rd_data[p]) :
                                          rb_rd_data[p];
      dm_need[p] = rd_req[p] && cls[p] != CMP_HIT && !rb_rd_hit[p];
      if (rd_req[p] && cls[p] == CMP_HIT) any_ram_hit = 1'b1;
      if (rd_req[p] && cls[p] != CMP_HIT && rb_rd_hit[p]) any_rb_hit = 1'b1;
    end
    wr_ack       = wr_ram_hit || (rb_wr_en && rb_wr_hit) || svc_ack[NRD];
    dm_need[NRD] = wr_req && cls[NRD] != CMP_HIT && !(rb_wr_en && rb_wr_hit);
  end

  always_comb begin
    events         = ru_ev;
    events.ram_hit = any_ram_hit;
    events.rb_hit  = any_rb_hit;
  end

  // ------------------------------------------------------------ replacement unit
  replacement_unit #(
    .NBLK(NBLK), .QPB(BLOCK_QUADS), .TBPB(TBPB), .NP(NP), .NRD(NRD), .REPL(REPL),
    .K(K), .DIRTY_OFFSET(DIRTY_OFFSET), .PREFETCH_OFFSET(PREFETCH_OFFSET)
  ) u_ru (
    .clk, .rst_n,
    .dm_need, .dm_cls(cls), .dm_pin(p_pin), .dm_addr(p_addr), .dm_wdata(p_wdata),
    .svc_ack, .svc_rdata,
    .ctl_valid, .ctl_op, .ctl_pin, .ctl_tos, .ctl_bottom, .ctl_ready,
    .valid, .dirty, .clear, .tos, .base, .dptr, .pin, .bottom,
    .valid_set, .valid_clr, .clean_blk, .clear_blk,
    .fill_en, .fill_quad, .fill_dirty,
    .tos_ld, .tos_d, .base_ld, .base_d, .dptr_ld, .dptr_d,
    .pin_ld, .pin_d, .bottom_ld, .bottom_d,
    .ram_rd_addr(c_rd_addr), .ram_rd_data(ram_rd_data[NRD]),
    .ram_wr_en(c_wr_en), .ram_wr_addr(c_wr_addr), .ram_wr_data(c_wr_data),
    .rb_alloc, .rb_alloc_pin, .rb_alloc_blk, .rb_alloc_to_ram,
    .rb_fill_en, .rb_fill_idx, .rb_fill_data, .rb_release, .rb_lock,
    .rb_mv_idx, .rb_mv_data, .rb_mv_written,
    .rb_active, .rb_blk(rb_blk_q), .rb_pin(rb_pin_q), .rb_written,
    .wb_st_en, .wb_st_idx, .wb_st_data, .wb_commit, .wb_commit_pin, .wb_commit_blk,
    .wb_commit_dirty, .wb_full, .wb_lk_pin, .wb_lk_blk, .wb_lk_hit,
    .bus_req(m0_req), .bus_we(m0_we), .bus_pin(m0_pin), .bus_addr(m0_addr),
    .bus_wdata(m0_wdata), .bus_ack(m0_ack), .bus_rdata,
    .copy_busy, .copy_blk,
    .ev(ru_ev)
  );

endmodule
