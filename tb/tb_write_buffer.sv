// Self-checking testbench of the write buffer.
//
// A producer stages whole blocks of random data quad by quad and commits
// each with a random dirty mask (one bit per transfer block), waiting while
// the buffer is full. The bus side is connected straight to a behavioural
// memory. From the committed blocks the testbench builds the list of writes
// the buffer must make: only the quads of dirty transfer blocks, in commit
// order, quad by quad. Every write seen on the bus is compared with that
// list, and the memory is compared at the end. The lookup port is checked
// on every cycle: a block with a dirty quad not yet written must hit, a
// block never committed must miss, and after the drain nothing may hit.
module tb_write_buffer;
  localparam int unsigned ENTRIES = 4;
  localparam int unsigned QPB     = 16;
  localparam int unsigned TBPB    = 4;
  localparam int unsigned QW      = $clog2(QPB);
  localparam int unsigned BLK_W   = 26;

  logic clk = 1'b0, rst_n = 1'b0;
  logic st_en = 0, commit = 0, full, empty, lk_hit, bus_req, bus_ack;
  logic [QW-1:0] st_idx = '0;
  logic [31:0] st_data = '0, bus_wdata, mem_rdata;
  logic [15:0] commit_pin = '0, lk_pin = '0, bus_pin;
  logic [BLK_W-1:0] commit_blk = '0, lk_blk = '0;
  logic [TBPB-1:0] commit_dirty = '0;
  logic [29:0] bus_addr;

  typedef struct { logic [15:0] pin; logic [29:0] addr; logic [31:0] data; int blk_no; } wr_t;
  wr_t exp_q[$];
  int pending[int];          // block number -> dirty quads not yet written
  logic [15:0] blk_pin[int];
  int n_committed = 0, n_blocks = 300, n_full_waits = 0;
  int checks = 0, failures = 0;
  bit done = 0;

  write_buffer #(.ENTRIES(ENTRIES), .QPB(QPB), .TBPB(TBPB)) u_dut (.*);
  mem_model #(.LATENCY(2)) u_mem (.clk, .req(bus_req), .we(1'b1), .pin(bus_pin), .addr(bus_addr),
    .wdata(bus_wdata), .ack(bus_ack), .rdata(mem_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bus monitor: each acknowledged write must be the next expected one
  always @(posedge clk) begin
    if (rst_n && bus_ack) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected write to %h", bus_addr);
      end else begin
        wr_t e;
        e = exp_q.pop_front();
        if (bus_pin != e.pin || bus_addr != e.addr || bus_wdata != e.data) begin
          failures++;
          if (failures < 10) $display("write %h/%h, expected %h/%h", bus_addr, bus_wdata, e.addr, e.data);
        end
        pending[e.blk_no]--;
      end
    end
  end

  // lookup checks, on the negative edge when everything is stable
  always @(negedge clk) begin
    if (rst_n && !done) begin
      int b;
      bit exp_hit;
      b = $urandom_range(n_committed + 3);
      lk_pin = blk_pin.exists(b) ? blk_pin[b] : 16'h7777;
      lk_blk = BLK_W'(b * 3 + 100);
      #1;
      if (pending.exists(b) && pending[b] > 0) begin
        checks++;
        if (!lk_hit) begin failures++; $display("block %0d with unwritten data not found", b); end
      end else if (b > n_committed) begin
        checks++;
        if (lk_hit) begin failures++; $display("uncommitted block %0d found", b); end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < n_blocks; n++) begin
      logic [31:0] d [QPB];
      logic [TBPB-1:0] m;
      logic [15:0] p;
      p = 16'($urandom_range(3));
      m = TBPB'($urandom);
      if (n % 7 == 0) m = '0;
      if (n % 5 == 0) m = '1;
      while (full) begin n_full_waits++; @(negedge clk); end
      for (int q = 0; q < QPB; q++) begin
        @(negedge clk);
        st_en = 1; st_idx = QW'(q); d[q] = $urandom; st_data = d[q];
      end
      @(negedge clk);
      st_en = 0;
      commit = 1; commit_pin = p; commit_blk = BLK_W'(n * 3 + 100); commit_dirty = m;
      blk_pin[n] = p;
      @(negedge clk);
      commit = 0;
      // the entry exists from the edge just passed; no write can have been
      // acknowledged yet, so the expected writes are recorded now
      pending[n] = 0;
      for (int q = 0; q < QPB; q++)
        if (m[q / (QPB / TBPB)]) begin
          exp_q.push_back('{p, {commit_blk, QW'(q)}, d[q], n});
          pending[n]++;
        end
      n_committed = n + 1;
    end
    repeat (2000) @(negedge clk);
    done = 1;
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d writes missing", exp_q.size()); end
    checks++;
    if (!empty) failures++;
    for (int n = 0; n < n_blocks; n++) begin
      lk_pin = blk_pin[n]; lk_blk = BLK_W'(n * 3 + 100);
      #1;
      checks++;
      if (lk_hit) failures++;
    end
    checks++;
    if (n_full_waits == 0) begin failures++; $display("buffer never full"); end
    $display("blocks=%0d full_waits=%0d mem_writes=%0d", n_blocks, n_full_waits, u_mem.n_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
