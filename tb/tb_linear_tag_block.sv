// Self-checking testbench of the tag block of the linear stack cache.
//
// Drives random execution-unit writes, block fills, block-wise valid, clean
// and clear commands and register loads, and keeps a reference copy of the
// whole tag state in the testbench. After every clock edge all outputs are
// compared with the reference. The reference follows the rules of the tag:
// a write marks its transfer block dirty and its quad no longer clear, and
// pulls the dirty pointer down to its block; a fill from the read buffer
// un-clears its quad and may mark it dirty; a per-quad write wins over a
// block-wise clean or clear in the same cycle. Reset values are checked too.
module tb_linear_tag_block;
  localparam int unsigned NBLK  = 32;
  localparam int unsigned QPB   = 16;
  localparam int unsigned TBPB  = 4;
  localparam int unsigned WORDS = NBLK * QPB;
  localparam int unsigned CW    = $clog2(WORDS);
  localparam int unsigned QW    = $clog2(QPB);
  localparam int unsigned TW    = $clog2(TBPB);
  localparam int unsigned BLK_W = 30 - QW;

  logic clk = 1'b0, rst_n = 1'b0;
  logic eu_wr_en, fill_en, fill_dirty;
  logic [29:0] eu_wr_addr;
  logic [CW-1:0] fill_quad;
  logic [NBLK-1:0] valid_set, valid_clr, clean_blk, clear_blk;
  logic tos_ld, base_ld, dptr_ld, pin_ld, bottom_ld;
  logic [29:0] tos_d, bottom_d;
  logic [BLK_W-1:0] base_d, dptr_d;
  logic [15:0] pin_d;
  logic [NBLK-1:0] valid;
  logic [TBPB-1:0] dirty [NBLK];
  logic [WORDS-1:0] clear;
  logic [29:0] tos, bottom;
  logic [BLK_W-1:0] base, dptr;
  logic [15:0] pin;

  // reference state
  logic [NBLK-1:0] r_valid;
  logic [TBPB-1:0] r_dirty [NBLK];
  logic [WORDS-1:0] r_clear;
  logic [29:0] r_tos, r_bottom;
  logic [BLK_W-1:0] r_base, r_dptr;
  logic [15:0] r_pin;

  int checks = 0, failures = 0;

  linear_tag_block #(.NBLK(NBLK), .QPB(QPB), .TBPB(TBPB)) u_dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string where);
    logic bad;
    bad = (valid != r_valid) || (clear != r_clear) || (tos != r_tos) || (bottom != r_bottom)
       || (base != r_base) || (dptr != r_dptr) || (pin != r_pin);
    for (int b = 0; b < NBLK; b++) if (dirty[b] != r_dirty[b]) bad = 1'b1;
    checks++;
    if (bad) begin
      failures++;
      if (failures < 10)
        $display("%s: mismatch valid %h/%h dptr %h/%h tos %h/%h", where, valid, r_valid, dptr, r_dptr, tos, r_tos);
    end
  endtask

  task automatic idle_inputs();
    eu_wr_en = 0; fill_en = 0; fill_dirty = 0; eu_wr_addr = '0; fill_quad = '0;
    valid_set = '0; valid_clr = '0; clean_blk = '0; clear_blk = '0;
    tos_ld = 0; base_ld = 0; dptr_ld = 0; pin_ld = 0; bottom_ld = 0;
    tos_d = '0; bottom_d = '0; base_d = '0; dptr_d = '0; pin_d = '0;
  endtask

  function automatic logic [NBLK-1:0] sparse_mask();
    logic [NBLK-1:0] m = '0;
    if ($urandom_range(3) == 0) m[$urandom_range(NBLK - 1)] = 1'b1;
    if ($urandom_range(15) == 0) m = {$urandom} & {$urandom};
    return m;
  endfunction

  initial begin
    idle_inputs();
    repeat (3) @(posedge clk);
    #1;
    // reset values
    r_valid = '0; r_clear = '0; r_tos = '0; r_base = '0; r_dptr = '0; r_pin = '0; r_bottom = '1;
    for (int b = 0; b < NBLK; b++) r_dirty[b] = '0;
    compare("reset");
    rst_n = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      logic [BLK_W-1:0] dn, wb;
      @(negedge clk);
      idle_inputs();
      eu_wr_en   = ($urandom_range(2) == 0);
      eu_wr_addr = 30'($urandom_range(20000));
      fill_en    = ($urandom_range(2) == 0);
      fill_quad  = CW'($urandom);
      fill_dirty = $urandom_range(1);
      valid_set  = sparse_mask();
      valid_clr  = sparse_mask();
      clean_blk  = sparse_mask();
      clear_blk  = sparse_mask();
      tos_ld     = ($urandom_range(7) == 0); tos_d    = 30'($urandom_range(20000));
      base_ld    = ($urandom_range(7) == 0); base_d   = BLK_W'($urandom_range(1200));
      dptr_ld    = ($urandom_range(15) == 0); dptr_d  = BLK_W'($urandom_range(1200));
      pin_ld     = ($urandom_range(31) == 0); pin_d   = 16'($urandom);
      bottom_ld  = ($urandom_range(31) == 0); bottom_d = 30'($urandom_range(3000));
      // reference update for the coming edge
      r_valid = (r_valid | valid_set) & ~valid_clr;
      for (int b = 0; b < NBLK; b++) begin
        if (clean_blk[b]) r_dirty[b] = '0;
        if (clear_blk[b]) for (int q = 0; q < QPB; q++) r_clear[b * QPB + q] = 1'b1;
      end
      if (eu_wr_en) begin
        r_dirty[(eu_wr_addr / QPB) % NBLK][(eu_wr_addr % QPB) / (QPB / TBPB)] = 1'b1;
        r_clear[eu_wr_addr % WORDS] = 1'b0;
      end
      if (fill_en) begin
        r_clear[fill_quad] = 1'b0;
        if (fill_dirty) r_dirty[fill_quad / QPB][(fill_quad % QPB) / (QPB / TBPB)] = 1'b1;
      end
      dn = dptr_ld ? dptr_d : r_dptr;
      wb = BLK_W'(eu_wr_addr / QPB);
      if (eu_wr_en && wb < dn) dn = wb;
      r_dptr = dn;
      if (tos_ld) r_tos = tos_d;
      if (base_ld) r_base = base_d;
      if (pin_ld) r_pin = pin_d;
      if (bottom_ld) r_bottom = bottom_d;
      @(posedge clk);
      #1;
      compare("step");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
