// Replacement unit: the control block of the linear stack cache.
//
// Hits are served by the ports without this unit. It handles everything else,
// one action at a time, in this priority: a request that the RAM and the read
// buffer cannot serve (ports in fixed order, read ports first), then a
// command of the execution unit (TOS move, task switch), then background work.
//
// Demand miss on a stack address (cut back K):
//   * block inside [base, TOS] but not valid: fetch it into the read buffer,
//     requested transfer block first, then move it into the RAM;
//   * block below the base and the RAM has room: the new base is lowered by a
//     multiple of K blocks (not below the stack bottom, not so far that
//     TOS - base would exceed the cache). The requested block is fetched first
//     and moved in; the base is then updated, and the blocks between the new and
//     the old base are fetched in the background, highest first (stage 6).
//   * no room in the RAM: a read is served from the read buffer, which keeps
//     the block without moving it into the RAM; a write goes to main memory.
//   A write miss is answered as soon as the read buffer has been allocated:
//   the data is written into the buffer and the rest of the block is fetched
//   later. A fetch waits while the block is still in the write buffer.
// Global or foreign-PIN request: one uncached quad access through the bus.
// TOS up: if the new TOS passes base + cache size, the blocks falling out at
//   the base are invalidated, the dirty ones after a copy into the write buffer
//   (overflow); the newly allocated blocks are marked valid and clear.
// TOS down: blocks above the new TOS are invalidated without write-back; if
//   the new TOS is below the base, the base moves to it and the TOS block is
//   fetched (underflow).
// Task switch: all dirty blocks are copied into the write buffer, the RAM is
//   invalidated and the new PIN, TOS and stack bottom are loaded.
// Hybrid only (REPL = REPL_HYBRID), in idle cycles: while TOS - dirty pointer
//   exceeds DIRTY_OFFSET blocks, the block at the dirty pointer is written back
//   (it stays valid and becomes clean) and the pointer advances; while TOS - base
//   is below PREFETCH_OFFSET blocks and the base is above the stack bottom, the
//   block below the base is prefetched.
//
// Interfaces: dm_* are the pending port requests with their stage-one class;
// svc_ack answers an uncached request (svc_rdata valid with it). ctl_* is the
// command interface; ctl_ready pulses when a command is complete. The unit
// drives the tag block through masks and load strobes, owns one read and one
// write port of the data RAM, the control ports of both buffers and master 0
// of the bus unit. copy_busy/copy_blk name a block being copied into the write
// buffer; writes to it must be held off by the ports for that time.
//
// The stages and their order follow the cut back K and hybrid state diagrams
// and the control-algorithm listing of the document. The document gives no
// values for K and the two offsets; the defaults here are this design's. Also
// this design's: one action at a time (a prefetch is not interrupted by a
// demand miss), one quad per cycle for block copies, and waiting for the write
// buffer instead of moving a block back out of it.
module replacement_unit
  import sc_pkg::*;
#(
  parameter int unsigned NBLK            = 32,
  parameter int unsigned QPB             = 16,
  parameter int unsigned TBPB            = 4,
  parameter int unsigned NP              = 3,    // ports: read ports, then write ports
  parameter int unsigned NRD             = 2,
  parameter repl_e       REPL            = REPL_HYBRID,
  parameter int unsigned K               = 2,
  parameter int unsigned DIRTY_OFFSET    = 24,
  parameter int unsigned PREFETCH_OFFSET = 8,
  localparam int unsigned WORDS = NBLK * QPB,
  localparam int unsigned CW    = $clog2(WORDS),
  localparam int unsigned QW    = $clog2(QPB),
  localparam int unsigned TW    = $clog2(TBPB),
  localparam int unsigned TIW   = (TW > 0) ? TW : 1,  // transfer block index width
  localparam int unsigned SW    = $clog2(NBLK),
  localparam int unsigned BLK_W = ADDR_W - QW,
  localparam int unsigned PW    = (NP > 1) ? $clog2(NP) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // pending port requests
  input  logic [NP-1:0]     dm_need,
  input  cmp_class_e        dm_cls   [NP],
  input  pin_t              dm_pin   [NP],
  input  qaddr_t            dm_addr  [NP],
  input  quad_t             dm_wdata [NP],
  output logic [NP-1:0]     svc_ack,
  output quad_t             svc_rdata,
  // command interface
  input  logic              ctl_valid,
  input  ctl_op_e           ctl_op,
  input  pin_t              ctl_pin,
  input  qaddr_t            ctl_tos,
  input  qaddr_t            ctl_bottom,
  output logic              ctl_ready,
  // tag block
  input  logic [NBLK-1:0]   valid,
  input  logic [TBPB-1:0]   dirty [NBLK],
  input  logic [WORDS-1:0]  clear,
  input  qaddr_t            tos,
  input  logic [BLK_W-1:0]  base,
  input  logic [BLK_W-1:0]  dptr,
  input  pin_t              pin,
  input  qaddr_t            bottom,
  output logic [NBLK-1:0]   valid_set,
  output logic [NBLK-1:0]   valid_clr,
  output logic [NBLK-1:0]   clean_blk,
  output logic [NBLK-1:0]   clear_blk,
  output logic              fill_en,
  output logic [CW-1:0]     fill_quad,
  output logic              fill_dirty,
  output logic              tos_ld,
  output qaddr_t            tos_d,
  output logic              base_ld,
  output logic [BLK_W-1:0]  base_d,
  output logic              dptr_ld,
  output logic [BLK_W-1:0]  dptr_d,
  output logic              pin_ld,
  output pin_t              pin_d,
  output logic              bottom_ld,
  output qaddr_t            bottom_d,
  // data RAM control ports
  output logic [CW-1:0]     ram_rd_addr,
  input  quad_t             ram_rd_data,
  output logic              ram_wr_en,
  output logic [CW-1:0]     ram_wr_addr,
  output quad_t             ram_wr_data,
  // read buffer
  output logic              rb_alloc,
  output pin_t              rb_alloc_pin,
  output logic [BLK_W-1:0]  rb_alloc_blk,
  output logic              rb_alloc_to_ram,
  output logic              rb_fill_en,
  output logic [QW-1:0]     rb_fill_idx,
  output quad_t             rb_fill_data,
  output logic              rb_release,
  output logic              rb_lock,
  output logic [QW-1:0]     rb_mv_idx,
  input  quad_t             rb_mv_data,
  input  logic              rb_mv_written,
  input  logic              rb_active,
  input  logic [BLK_W-1:0]  rb_blk,
  input  pin_t              rb_pin,
  input  logic [QPB-1:0]    rb_written,
  // write buffer
  output logic              wb_st_en,
  output logic [QW-1:0]     wb_st_idx,
  output quad_t             wb_st_data,
  output logic              wb_commit,
  output pin_t              wb_commit_pin,
  output logic [BLK_W-1:0]  wb_commit_blk,
  output logic [TBPB-1:0]   wb_commit_dirty,
  input  logic              wb_full,
  output pin_t              wb_lk_pin,
  output logic [BLK_W-1:0]  wb_lk_blk,
  input  logic              wb_lk_hit,
  // bus master 0
  output logic              bus_req,
  output logic              bus_we,
  output pin_t              bus_pin,
  output qaddr_t            bus_addr,
  output quad_t             bus_wdata,
  input  logic              bus_ack,
  input  quad_t             bus_rdata,
  // write hold-off while a block is copied
  output logic              copy_busy,
  output logic [BLK_W-1:0]  copy_blk,
  // events
  output sc_events_t        ev
);

  typedef enum logic [3:0] {
    S_IDLE, S_FETCH_WAIT, S_FETCH, S_MOVE, S_MOVE_DONE, S_UNC_WAIT, S_UNC,
    S_COPY, S_UP_WB, S_UP_ALLOC, S_UP_FIN, S_DN_LOOP, S_DN_FIN, S_FL_LOOP, S_FL_FIN
  } state_e;

  typedef enum logic [2:0] {
    A_NONE, A_PORT, A_CTL, A_SCAN, A_DWB, A_PREF
  } act_e;

  state_e state, ret_state;

  // fetch
  logic [BLK_W-1:0] f_blk, f_newbase;
  pin_t             f_pin;
  logic [TIW-1:0]   f_tb;
  logic             f_to_ram, f_set_base;
  logic [QW-1:0]    fq;
  // uncached access
  logic [PW-1:0]    u_port;
  pin_t             u_pin;
  qaddr_t           u_addr;
  logic             u_we;
  quad_t            u_wdata;
  // block copy into the write buffer
  logic [BLK_W-1:0] cp_blk;
  logic             cp_inval, cp_dptr;
  logic [QW-1:0]    cq;
  // loops of the commands
  logic [BLK_W-1:0] lp, lp_end, n_base;
  qaddr_t           n_tos;
  pin_t             n_pin;
  qaddr_t           n_bottom;
  // stage-6 scan
  logic             scan_on;
  logic [BLK_W-1:0] scan_ptr;

  logic [BLK_W-1:0] tos_blk, bot_blk;
  assign tos_blk = tos[ADDR_W-1:QW];
  assign bot_blk = bottom[ADDR_W-1:QW];

  function automatic logic [SW-1:0] slot(input logic [BLK_W-1:0] b);
    return b[SW-1:0];
  endfunction
  function automatic logic [BLK_W-1:0] bmax(input logic [BLK_W-1:0] a, input logic [BLK_W-1:0] b);
    return (a > b) ? a : b;
  endfunction
  function automatic logic [BLK_W-1:0] bmin(input logic [BLK_W-1:0] a, input logic [BLK_W-1:0] b);
    return (a < b) ? a : b;
  endfunction

  // ---------------------------------------------------------------- decisions
  act_e             act;
  logic [PW-1:0]    port;
  logic [BLK_W-1:0] p_blk;
  logic             p_space;
  logic [BLK_W-1:0] p_newbase;
  logic             pf_ok, dwb_due;
  logic [BLK_W-1:0] used;  // blocks from base to TOS

  always_comb begin
    port = '0;
    for (int p = NP - 1; p >= 0; p--) if (dm_need[p]) port = PW'(p);
  end

  assign p_blk   = dm_addr[port][ADDR_W-1:QW];
  assign p_space = (tos_blk - p_blk) < BLK_W'(NBLK);
  assign used    = tos_blk + 1'b1 - base;

  always_comb begin
    logic [BLK_W-1:0] d, kk, nb;
    d  = base - p_blk;
    kk = ((d + BLK_W'(K) - 1'b1) / BLK_W'(K)) * BLK_W'(K);
    nb = (kk > base) ? '0 : base - kk;
    nb = bmax(nb, bot_blk);
    nb = bmax(nb, tos_blk - BLK_W'(NBLK - 1));
    p_newbase = bmin(nb, p_blk);
  end

  assign pf_ok   = (REPL == REPL_HYBRID) && used < BLK_W'(PREFETCH_OFFSET)
                   && base > bot_blk && used < BLK_W'(NBLK) && tos >= bottom;
  assign dwb_due = (REPL == REPL_HYBRID) && tos >= bottom && tos_blk > dptr
                   && (tos_blk - dptr) > BLK_W'(DIRTY_OFFSET);

  always_comb begin
    act = A_NONE;
    if (|dm_need)                                  act = A_PORT;
    else if (ctl_valid)                            act = A_CTL;
    else if (scan_on)                              act = A_SCAN;
    else if (dwb_due)                              act = A_DWB;
    else if (pf_ok)                                act = A_PREF;
  end

  // ---------------------------------------------------------------- outputs
  logic [QW-1:0] fidx;
  assign fidx = (QW'(f_tb) << (QW - TW)) + fq;

  always_comb begin
    svc_ack   = '0;
    svc_rdata = bus_rdata;
    ctl_ready = 1'b0;
    valid_set = '0;  valid_clr = '0;  clean_blk = '0;  clear_blk = '0;
    fill_en   = 1'b0; fill_quad = '0;  fill_dirty = 1'b0;
    tos_ld = 1'b0;  tos_d = n_tos;
    base_ld = 1'b0; base_d = base;
    dptr_ld = 1'b0; dptr_d = dptr;
    pin_ld = 1'b0;  pin_d = n_pin;
    bottom_ld = 1'b0; bottom_d = n_bottom;
    ram_rd_addr = {slot(cp_blk), cq};
    ram_wr_en = 1'b0; ram_wr_addr = {slot(f_blk), fq}; ram_wr_data = rb_mv_data;
    rb_alloc = 1'b0; rb_alloc_pin = f_pin; rb_alloc_blk = f_blk; rb_alloc_to_ram = f_to_ram;
    rb_fill_en = 1'b0; rb_fill_idx = fidx; rb_fill_data = bus_rdata;
    rb_release = 1'b0; rb_lock = 1'b0; rb_mv_idx = fq;
    wb_st_en = 1'b0; wb_st_idx = cq;
    wb_st_data = clear[{slot(cp_blk), cq}] ? '0 : ram_rd_data;
    wb_commit = 1'b0; wb_commit_pin = pin; wb_commit_blk = cp_blk;
    wb_commit_dirty = dirty[slot(cp_blk)];
    wb_lk_pin = f_pin; wb_lk_blk = f_blk;
    bus_req = 1'b0; bus_we = 1'b0; bus_pin = f_pin; bus_addr = {f_blk, fidx}; bus_wdata = u_wdata;
    copy_busy = (state == S_COPY);
    copy_blk  = cp_blk;
    ev = '0;

    unique case (state)
      S_FETCH_WAIT: if (!wb_lk_hit) rb_alloc = 1'b1;
      S_FETCH: begin
        bus_req = 1'b1;
        if (bus_ack) rb_fill_en = 1'b1;
      end
      S_MOVE: begin
        rb_lock    = 1'b1;
        ram_wr_en  = 1'b1;
        fill_en    = 1'b1;
        fill_quad  = {slot(f_blk), fq};
        fill_dirty = rb_mv_written;
      end
      S_MOVE_DONE: begin
        rb_lock = 1'b1;
        rb_release = 1'b1;
        valid_set[slot(f_blk)] = 1'b1;
        if (f_set_base) begin
          base_ld = 1'b1;
          base_d  = f_newbase;
        end
        if (|rb_written && f_blk < dptr) begin
          dptr_ld = 1'b1;
          dptr_d  = f_blk;
        end
      end
      S_UNC_WAIT: begin
        wb_lk_pin = u_pin;
        wb_lk_blk = u_addr[ADDR_W-1:QW];
      end
      S_UNC: begin
        bus_req  = 1'b1;
        bus_we   = u_we;
        bus_pin  = u_pin;
        bus_addr = u_addr;
        if (bus_ack) begin
          svc_ack[u_port] = 1'b1;
          if (u_we && rb_active && rb_pin == u_pin && rb_blk == u_addr[ADDR_W-1:QW])
            rb_release = 1'b1;
        end
      end
      S_COPY: if (!wb_full) begin
        wb_st_en = 1'b1;
        if (cq == QW'(QPB - 1)) begin
          wb_commit = 1'b1;
          ev.wb_push = 1'b1;
          clean_blk[slot(cp_blk)] = 1'b1;
          if (cp_inval) valid_clr[slot(cp_blk)] = 1'b1;
          if (cp_dptr && dptr == cp_blk) begin
            dptr_ld = 1'b1;
            dptr_d  = cp_blk + 1'b1;
          end
        end
      end
      S_UP_WB: if (lp < lp_end && !(valid[slot(lp)] && |dirty[slot(lp)]))
        valid_clr[slot(lp)] = 1'b1;
      S_UP_ALLOC: if (lp <= n_tos[ADDR_W-1:QW]) begin
        valid_set[slot(lp)] = 1'b1;
        clear_blk[slot(lp)] = 1'b1;
      end
      S_UP_FIN: begin
        tos_ld = 1'b1;
        ev.overflow = (n_base > base);
        base_ld = 1'b1;
        base_d  = n_base;
        if (dptr < n_base) begin
          dptr_ld = 1'b1;
          dptr_d  = n_base;
        end
        ctl_ready = 1'b1;
      end
      S_DN_LOOP: if (lp >= lp_end) valid_clr[slot(lp)] = 1'b1;
      S_DN_FIN: begin
        tos_ld = 1'b1;
        ctl_ready = 1'b1;
        if (n_tos < bottom) begin
          base_ld = 1'b1;
          base_d  = bot_blk;
        end else if (n_tos[ADDR_W-1:QW] < base) begin
          base_ld = 1'b1;
          base_d  = n_tos[ADDR_W-1:QW];
          ev.underflow = 1'b1;
        end
        if (dptr > n_tos[ADDR_W-1:QW]) begin
          dptr_ld = 1'b1;
          dptr_d  = n_tos[ADDR_W-1:QW];
        end
      end
      S_FL_LOOP: if (lp < lp_end && !(valid[slot(lp)] && |dirty[slot(lp)]))
        valid_clr[slot(lp)] = 1'b1;
      S_FL_FIN: begin
        valid_clr  = '1;
        rb_release = 1'b1;
        tos_ld = 1'b1;  pin_ld = 1'b1;  bottom_ld = 1'b1;  base_ld = 1'b1;  dptr_ld = 1'b1;
        base_d = (n_tos < n_bottom) ? n_bottom[ADDR_W-1:QW] : n_tos[ADDR_W-1:QW];
        dptr_d = base_d;
        ctl_ready = 1'b1;
        ev.task_switch = 1'b1;
      end
      S_IDLE: begin
        unique case (act)
          A_PORT: begin
            if (dm_cls[port] == CMP_GLOBAL || dm_cls[port] == CMP_TASK)
              ev.global_acc = 1'b1;
            else if (p_blk < base && !p_space)
              ev.no_space = 1'b1;
            else
              ev.demand_fetch = 1'b1;
          end
          A_SCAN: begin
            if (scan_ptr < base || scan_ptr > tos_blk || scan_ptr < bot_blk) ;
            else if (!valid[slot(scan_ptr)]) ev.cutback_fill = 1'b1;
          end
          A_DWB: begin
            if (dptr < base) begin
              dptr_ld = 1'b1;
              dptr_d  = base;
            end else if (valid[slot(dptr)] && |dirty[slot(dptr)]) begin
              ev.dirty_wb = 1'b1;
            end else begin
              dptr_ld = 1'b1;
              dptr_d  = dptr + 1'b1;
            end
          end
          A_PREF: ev.prefetch = 1'b1;
          default: ;
        endcase
      end
      default: ;
    endcase
  end

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;  ret_state <= S_IDLE;
      f_blk <= '0; f_newbase <= '0; f_pin <= '0; f_tb <= '0; f_to_ram <= 1'b0; f_set_base <= 1'b0;
      fq <= '0;
      u_port <= '0; u_pin <= '0; u_addr <= '0; u_we <= 1'b0; u_wdata <= '0;
      cp_blk <= '0; cp_inval <= 1'b0; cp_dptr <= 1'b0; cq <= '0;
      lp <= '0; lp_end <= '0; n_base <= '0; n_tos <= '0; n_pin <= '0; n_bottom <= '0;
      scan_on <= 1'b0; scan_ptr <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          unique case (act)
            A_PORT: begin
              if (dm_cls[port] == CMP_GLOBAL || dm_cls[port] == CMP_TASK
                  || (p_blk < base && !p_space && port >= PW'(NRD))) begin
                u_port  <= port;
                u_pin   <= dm_pin[port];
                u_addr  <= dm_addr[port];
                u_we    <= (port >= PW'(NRD));
                u_wdata <= dm_wdata[port];
                state   <= S_UNC_WAIT;
              end else begin
                f_blk      <= p_blk;
                f_pin      <= pin;
                f_tb       <= TIW'(dm_addr[port][QW-1:0] >> (QW - TW));
                f_to_ram   <= (p_blk >= base) || p_space;
                f_set_base <= (p_blk < base) && p_space;
                f_newbase  <= p_newbase;
                state      <= S_FETCH_WAIT;
              end
            end
            A_CTL: begin
              n_tos    <= ctl_tos;
              n_pin    <= ctl_pin;
              n_bottom <= ctl_bottom;
              if (ctl_op == CTL_TASK_SWITCH) begin
                lp     <= base;
                lp_end <= tos_blk + 1'b1;
                state  <= S_FL_LOOP;
              end else if (ctl_tos > tos) begin : up
                logic [BLK_W-1:0] ntb, nbs;
                ntb = ctl_tos[ADDR_W-1:QW];
                nbs = (ntb >= base + BLK_W'(NBLK)) ? ntb - BLK_W'(NBLK - 1) : base;
                if (nbs < bot_blk && ntb >= bot_blk) nbs = bot_blk;
                n_base <= nbs;
                lp     <= base;
                lp_end <= bmin(nbs, tos_blk + 1'b1);
                state  <= S_UP_WB;
              end else begin
                lp     <= tos_blk;
                lp_end <= bmax(ctl_tos[ADDR_W-1:QW] + 1'b1, base);
                state  <= S_DN_LOOP;
              end
            end
            A_SCAN: begin
              if (scan_ptr < base || scan_ptr > tos_blk || scan_ptr < bot_blk) begin
                scan_on <= 1'b0;
              end else if (valid[slot(scan_ptr)]) begin
                if (scan_ptr == base) scan_on <= 1'b0;
                scan_ptr <= scan_ptr - 1'b1;
              end else begin
                f_blk      <= scan_ptr;
                f_pin      <= pin;
                f_tb       <= '0;
                f_to_ram   <= 1'b1;
                f_set_base <= 1'b0;
                state      <= S_FETCH_WAIT;
              end
            end
            A_DWB: begin
              if (dptr >= base && valid[slot(dptr)] && |dirty[slot(dptr)]) begin
                cp_blk    <= dptr;
                cp_inval  <= 1'b0;
                cp_dptr   <= 1'b1;
                cq        <= '0;
                ret_state <= S_IDLE;
                state     <= S_COPY;
              end
            end
            A_PREF: begin
              f_blk      <= base - 1'b1;
              f_pin      <= pin;
              f_tb       <= '1;  // the top of the block lies next to the base
              f_to_ram   <= 1'b1;
              f_set_base <= 1'b1;
              f_newbase  <= base - 1'b1;
              state      <= S_FETCH_WAIT;
            end
            default: ;
          endcase
        end
        S_FETCH_WAIT: if (!wb_lk_hit) begin
          fq    <= '0;
          state <= S_FETCH;
        end
        S_FETCH: if (bus_ack) begin
          fq <= fq + 1'b1;
          if (fq == QW'(QPB - 1)) state <= f_to_ram ? S_MOVE : S_IDLE;
        end
        S_MOVE: begin
          fq <= fq + 1'b1;
          if (fq == QW'(QPB - 1)) state <= S_MOVE_DONE;
        end
        S_MOVE_DONE: begin
          if (f_set_base) begin
            scan_on  <= (base > f_newbase + 1'b1);
            scan_ptr <= base - 1'b1;
          end
          state <= S_IDLE;
        end
        S_UNC_WAIT: if (!wb_lk_hit) state <= S_UNC;
        S_UNC: if (bus_ack) state <= S_IDLE;
        S_COPY: if (!wb_full) begin
          cq <= cq + 1'b1;
          if (cq == QW'(QPB - 1)) state <= ret_state;
        end
        S_UP_WB: begin
          if (lp >= lp_end) begin
            lp    <= bmax(bmax(tos_blk + 1'b1, n_base), bot_blk);
            state <= S_UP_ALLOC;
          end else begin
            lp <= lp + 1'b1;
            if (valid[slot(lp)] && |dirty[slot(lp)]) begin
              cp_blk    <= lp;
              cp_inval  <= 1'b1;
              cp_dptr   <= 1'b0;
              cq        <= '0;
              ret_state <= S_UP_WB;
              state     <= S_COPY;
            end
          end
        end
        S_UP_ALLOC: begin
          if (lp <= n_tos[ADDR_W-1:QW]) lp <= lp + 1'b1;
          else state <= S_UP_FIN;
        end
        S_UP_FIN: state <= S_IDLE;
        S_DN_LOOP: begin
          if (lp >= lp_end && lp != '0) lp <= lp - 1'b1;
          else state <= S_DN_FIN;
        end
        S_DN_FIN: begin
          scan_on <= 1'b0;
          if (n_tos >= bottom && n_tos[ADDR_W-1:QW] < base) begin
            f_blk      <= n_tos[ADDR_W-1:QW];
            f_pin      <= pin;
            f_tb       <= TIW'(n_tos[QW-1:0] >> (QW - TW));
            f_to_ram   <= 1'b1;
            f_set_base <= 1'b0;
            state      <= S_FETCH_WAIT;
          end else begin
            state <= S_IDLE;
          end
        end
        S_FL_LOOP: begin
          if (lp >= lp_end) begin
            state <= S_FL_FIN;
          end else begin
            lp <= lp + 1'b1;
            if (valid[slot(lp)] && |dirty[slot(lp)]) begin
              cp_blk    <= lp;
              cp_inval  <= 1'b1;
              cp_dptr   <= 1'b0;
              cq        <= '0;
              ret_state <= S_FL_LOOP;
              state     <= S_COPY;
            end
          end
        end
        S_FL_FIN: begin
          scan_on <= 1'b0;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A block is only moved into the RAM out of an allocated read buffer.
  a_move_from_rb: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_MOVE) |-> rb_active);

endmodule
