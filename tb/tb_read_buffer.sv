// Self-checking testbench of the read buffer.
//
// Runs many fetch episodes. Each episode allocates the buffer for a random
// block (to be moved into the RAM or not), fills its quads in a random order
// as a memory would, while the execution-unit ports read and write random
// addresses in and around the block, with the lock raised now and then. At
// the end of the episode the buffer is released. A reference model in the
// testbench tracks which quads are valid and which were written by the
// execution unit, and their data. Every cycle the read hits and data, the
// write hit, the full flag and the move port are compared with it. The rule
// that matters most: a quad written by the execution unit is never
// overwritten by the later fill of the stale memory copy.
module tb_read_buffer;
  localparam int unsigned QPB   = 16;
  localparam int unsigned NRD   = 2;
  localparam int unsigned BLK_W = 26;
  localparam int unsigned QW    = $clog2(QPB);
  localparam int unsigned AW    = BLK_W + QW;

  logic clk = 1'b0, rst_n = 1'b0;
  logic alloc = 0, alloc_to_ram = 0, fill_en = 0, release_buf = 0, lock = 0, wr_en = 0;
  logic [15:0] alloc_pin = '0, wr_pin = '0, pin;
  logic [BLK_W-1:0] alloc_blk = '0, blk;
  logic [QW-1:0] fill_idx = '0, mv_idx = '0;
  logic [31:0] fill_data = '0, mv_data, wr_data = '0;
  logic mv_written, active, to_ram, full, wr_hit;
  logic [QPB-1:0] written;
  logic [15:0] rd_pin [NRD];
  logic [AW-1:0] rd_addr [NRD];
  logic rd_hit [NRD];
  logic [31:0] rd_data [NRD];
  logic [AW-1:0] wr_addr = '0;

  // reference
  bit r_active = 0, r_to_ram = 0;
  logic [15:0] r_pin;
  logic [BLK_W-1:0] r_blk;
  bit r_qv [QPB], r_wr [QPB];
  logic [31:0] r_data [QPB];

  int checks = 0, failures = 0, n_protect = 0, n_wr_hit = 0, n_rd_hit = 0;

  read_buffer #(.QPB(QPB), .NRD(NRD), .BLK_W(BLK_W)) u_dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string m);
    failures++;
    if (failures < 10) $display("%s", m);
  endtask

  function automatic logic [AW-1:0] near_addr();
    logic [BLK_W-1:0] b = r_blk + BLK_W'($urandom_range(2)) - 1'b1;
    if ($urandom_range(2) != 0) b = r_blk;
    return {b, QW'($urandom)};
  endfunction

  // compare outputs with the reference (inputs stable, before the edge)
  task automatic compare();
    bit full_e = r_active;
    bit whit_e;
    for (int q = 0; q < QPB; q++) if (!r_qv[q]) full_e = 0;
    for (int p = 0; p < NRD; p++) begin
      bit hit_e = r_active && rd_pin[p] == r_pin && rd_addr[p][AW-1:QW] == r_blk && r_qv[rd_addr[p][QW-1:0]];
      checks++;
      if (rd_hit[p] != hit_e) fail($sformatf("read port %0d hit %0d expected %0d", p, rd_hit[p], hit_e));
      if (hit_e) begin
        n_rd_hit++;
        checks++;
        if (rd_data[p] != r_data[rd_addr[p][QW-1:0]]) fail("read data");
      end
    end
    whit_e = r_active && r_to_ram && !lock && wr_pin == r_pin && wr_addr[AW-1:QW] == r_blk;
    checks++;
    if (wr_hit != whit_e) fail("write hit");
    checks++;
    if (full != full_e || active != r_active) fail("full/active");
    if (r_active && r_qv[mv_idx]) begin
      checks++;
      if (mv_data != r_data[mv_idx] || mv_written != r_wr[mv_idx]) fail("move port");
    end
  endtask

  initial begin
    for (int p = 0; p < NRD; p++) begin rd_pin[p] = '0; rd_addr[p] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int ep = 0; ep < 600; ep++) begin
      int order [QPB];
      int k;
      k = 0;
      @(negedge clk);
      alloc = 1; alloc_pin = 16'($urandom_range(2)); alloc_blk = BLK_W'($urandom_range(50));
      alloc_to_ram = ($urandom_range(3) != 0);
      @(posedge clk);
      r_active = 1; r_to_ram = alloc_to_ram; r_pin = alloc_pin; r_blk = alloc_blk;
      for (int q = 0; q < QPB; q++) begin r_qv[q] = 0; r_wr[q] = 0; end
      for (int q = 0; q < QPB; q++) order[q] = q;
      order.shuffle();
      while (k < QPB || $urandom_range(3) != 0) begin
        @(negedge clk);
        alloc = 0;
        fill_en = (k < QPB) && ($urandom_range(2) != 0);
        fill_idx = (k < QPB) ? QW'(order[k]) : '0;
        fill_data = $urandom;
        lock = ($urandom_range(7) == 0);
        wr_en = ($urandom_range(2) == 0);
        wr_pin = ($urandom_range(5) == 0) ? 16'($urandom_range(2)) : r_pin;
        wr_addr = near_addr();
        if ($urandom_range(1) && fill_en) wr_addr = {r_blk, fill_idx};
        wr_data = $urandom;
        mv_idx = QW'($urandom);
        for (int p = 0; p < NRD; p++) begin
          rd_pin[p] = ($urandom_range(5) == 0) ? 16'($urandom_range(2)) : r_pin;
          rd_addr[p] = near_addr();
        end
        #1;
        compare();
        // reference update for the coming edge
        if (fill_en) begin
          if (!r_wr[fill_idx] && !(wr_en && wr_hit && wr_addr[QW-1:0] == fill_idx)) begin
            r_qv[fill_idx] = 1; r_data[fill_idx] = fill_data;
          end else if (r_wr[fill_idx]) n_protect++;
          k++;
        end
        if (wr_en && r_active && r_to_ram && !lock && wr_pin == r_pin && wr_addr[AW-1:QW] == r_blk) begin
          r_qv[wr_addr[QW-1:0]] = 1; r_wr[wr_addr[QW-1:0]] = 1; r_data[wr_addr[QW-1:0]] = wr_data;
          n_wr_hit++;
        end
        @(posedge clk);
      end
      // buffer complete: check the move port for every quad
      @(negedge clk);
      fill_en = 0; wr_en = 0; lock = 1;
      for (int q = 0; q < QPB; q++) begin
        mv_idx = QW'(q);
        #1;
        checks++;
        if (!full || mv_data != r_data[q] || mv_written != r_wr[q]) fail("move after fill");
      end
      lock = 0;
      release_buf = 1;
      @(posedge clk);
      r_active = 0;
      @(negedge clk);
      release_buf = 0;
      #1;
      compare();
    end
    checks++;
    if (n_protect == 0 || n_wr_hit == 0 || n_rd_hit == 0) fail("a mechanism never happened");
    $display("written-quad protections=%0d write hits=%0d read hits=%0d", n_protect, n_wr_hit, n_rd_hit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
