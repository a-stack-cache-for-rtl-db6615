// Stimulus and checking shared by the linear stack cache testbenches.
//
// Included inside a testbench module that declares the cache ports as
// signals, instantiates the cache as u_dut and mem_model as u_mem, and sets
// the localparams HYBRID (1 if the cache runs the hybrid algorithm) and
// WATCHDOG (cycles). The body plays an execution unit running two processes:
// procedure calls and returns move the TOS, "instructions" read two stack
// quads and write one in parallel, recursion bursts overflow the cache and a
// long return underflows it, and some requests go to global data or to the
// other process' stack. A shadow memory holds every value written; each read
// is compared with it, and after a final flush main memory is compared with
// it too. Every mechanism of the cache is counted, and one that never happens
// is a failure.

  int checks = 0;
  int failures = 0;

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- event counters
  int n_ram_hit = 0, n_rb_hit = 0, n_fetch = 0, n_nospace = 0, n_global = 0;
  int n_over = 0, n_under = 0, n_ts = 0, n_fill = 0, n_pref = 0, n_dwb = 0, n_push = 0;
  always @(posedge clk) if (rst_n) begin
    n_ram_hit += int'(events.ram_hit);
    n_rb_hit  += int'(events.rb_hit);
    n_fetch   += int'(events.demand_fetch);
    n_nospace += int'(events.no_space);
    n_global  += int'(events.global_acc);
    n_over    += int'(events.overflow);
    n_under   += int'(events.underflow);
    n_ts      += int'(events.task_switch);
    n_fill    += int'(events.cutback_fill);
    n_pref    += int'(events.prefetch);
    n_dwb     += int'(events.dirty_wb);
    n_push    += int'(events.wb_push);
  end

  // ---------------------------------------------------------- reference model
  logic [31:0] shadow [longint];
  logic [15:0] p_pin [2];
  logic [29:0] p_tos [2];
  logic [29:0] p_bot [2];
  int          cur;

  function automatic longint key(input logic [15:0] pin, input logic [29:0] a);
    return {18'h0, pin, a};
  endfunction

  function automatic logic [31:0] expect_of(input logic [15:0] pin, input logic [29:0] a);
    longint k = key(pin, a);
    return shadow.exists(k) ? shadow[k] : sc_tb_pkg::mem_init(pin, a);
  endfunction

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  // ---------------------------------------------------------- port drivers
  task automatic rd(input int p, input logic [15:0] pin, input logic [29:0] a,
                    output logic [31:0] data, output int waits);
    @(negedge clk);
    rd_req[p] = 1'b1; rd_pin[p] = pin; rd_addr[p] = a;
    waits = 0;
    #1;
    while (!rd_ack[p]) begin
      @(negedge clk); #1;
      waits++;
    end
    data = rd_data[p];
    @(posedge clk); #1;
    rd_req[p] = 1'b0;
  endtask

  task automatic wr(input logic [15:0] pin, input logic [29:0] a, input logic [31:0] d,
                    output int waits);
    @(negedge clk);
    wr_req = 1'b1; wr_pin = pin; wr_addr = a; wr_data = d;
    waits = 0;
    #1;
    while (!wr_ack) begin
      @(negedge clk); #1;
      waits++;
    end
    @(posedge clk); #1;
    wr_req = 1'b0;
    shadow[key(pin, a)] = d;
  endtask

  task automatic command(input ctl_op_e op, input logic [15:0] pin, input logic [29:0] t,
                         input logic [29:0] b);
    @(negedge clk);
    ctl_valid = 1'b1; ctl_op = op; ctl_pin = pin; ctl_tos = t; ctl_bottom = b;
    #1;
    while (!ctl_ready) begin
      @(negedge clk); #1;
    end
    @(posedge clk); #1;
    ctl_valid = 1'b0;
  endtask

  task automatic read_check(input int p, input logic [15:0] pin, input logic [29:0] a);
    logic [31:0] d, e;
    int w;
    e = expect_of(pin, a);
    rd(p, pin, a, d, w);
    check($sformatf("read port %0d pin %h addr %h", p, pin, a), d, e);
  endtask

  // move the TOS of the running process; data above a lower TOS is dropped
  task automatic set_tos(input logic [29:0] t);
    if (t < p_tos[cur])
      for (logic [29:0] a = t + 1; a <= p_tos[cur]; a++) shadow.delete(key(p_pin[cur], a));
    command(CTL_SET_TOS, p_pin[cur], t, p_bot[cur]);
    p_tos[cur] = t;
  endtask

  task automatic switch_to(input int n);
    cur = n;
    command(CTL_TASK_SWITCH, p_pin[n], p_tos[n], p_bot[n]);
  endtask

  // a written quad of the running stack, near the TOS or anywhere
  function automatic logic [29:0] pick_defined(input bit deep, output bit ok);
    logic [29:0] lo, a;
    int span;
    ok = 1'b0;
    a  = '0;
    if (p_tos[cur] < p_bot[cur]) return a;
    span = int'(p_tos[cur] - p_bot[cur]) + 1;
    if (!deep && span > 24) span = 24;
    lo = p_tos[cur] - 30'(span) + 1;
    for (int i = 0; i < 8; i++) begin
      a = lo + 30'($urandom_range(span - 1));
      if (shadow.exists(key(p_pin[cur], a))) begin
        ok = 1'b1;
        return a;
      end
    end
    return a;
  endfunction

  // two reads and one write in the same cycle
  task automatic instruction();
    bit ok0, ok1, okw;
    logic [29:0] a0, a1, aw;
    bit deep;
    int w;
    deep = ($urandom_range(99) < 15);
    a0 = pick_defined(deep, ok0);
    a1 = pick_defined(1'b0, ok1);
    okw = (p_tos[cur] >= p_bot[cur]);
    if ($urandom_range(99) < 8 && okw)
      aw = p_bot[cur] + 30'($urandom_range(int'(p_tos[cur] - p_bot[cur])));
    else
      aw = p_tos[cur] - 30'($urandom_range(p_tos[cur] - p_bot[cur] > 30 ? 30 : int'(p_tos[cur] - p_bot[cur])));
    if (ok0 && a0 == aw) ok0 = 1'b0;
    if (ok1 && a1 == aw) ok1 = 1'b0;
    fork
      if (ok0) read_check(0, p_pin[cur], a0);
      if (ok1) read_check(1, p_pin[cur], a1);
      if (okw) wr(p_pin[cur], aw, $urandom, w);
    join
  endtask

  // A frame that reaches into a new block must read as zero there until it
  // is written: newly allocated cache space never shows old data.
  int n_zero_chk = 0;
  task automatic call_frame(input int size, input int nwrites);
    int w;
    logic [29:0] old_tos;
    logic [31:0] d;
    old_tos = p_tos[cur];
    set_tos(p_tos[cur] + 30'(size));
    if (p_tos[cur] / 30'(u_dut.BLOCK_QUADS) > old_tos / 30'(u_dut.BLOCK_QUADS)
        && old_tos >= p_bot[cur]) begin
      rd(0, p_pin[cur], p_tos[cur], d, w);
      check($sformatf("new stack space at %h reads as zero", p_tos[cur]), d, 32'h0);
      n_zero_chk++;
    end
    for (int i = 0; i < nwrites; i++)
      wr(p_pin[cur], p_tos[cur] - 30'($urandom_range(size - 1)), $urandom, w);
  endtask

  task automatic return_frame(input int size);
    logic [29:0] t;
    t = (p_tos[cur] - p_bot[cur] + 1 > 30'(size)) ? p_tos[cur] - 30'(size) : p_bot[cur] - 1;
    set_tos(t);
  endtask

  // a request outside the stack, or to the other process' stack
  int n_foreign = 0;
  task automatic foreign_access();
    logic [29:0] a;
    int w;
    n_foreign++;
    if ($urandom_range(1) == 0) begin
      a = p_bot[cur] - 30'(1 + $urandom_range(255));
      if ($urandom_range(1) == 0) wr(p_pin[cur], a, $urandom, w);
      else read_check(0, p_pin[cur], a);
    end else begin
      int o = 1 - cur;
      if (p_tos[o] >= p_bot[o]) begin
        a = p_bot[o] + 30'($urandom_range(int'(p_tos[o] - p_bot[o])));
        if (shadow.exists(key(p_pin[o], a))) read_check(1, p_pin[o], a);
      end
    end
  endtask

  // ---------------------------------------------------------- main sequence
  initial begin : main
    logic [31:0] d;
    int w, w2;
    rst_n = 1'b0;
    for (int p = 0; p < 2; p++) begin
      rd_req[p] = 1'b0; rd_pin[p] = '0; rd_addr[p] = '0;
    end
    wr_req = 1'b0; wr_pin = '0; wr_addr = '0; wr_data = '0;
    ctl_valid = 1'b0; ctl_op = CTL_SET_TOS; ctl_pin = '0; ctl_tos = '0; ctl_bottom = '0;
    p_pin[0] = 16'h0a11; p_bot[0] = 30'h0001_0000; p_tos[0] = p_bot[0] - 1;
    p_pin[1] = 16'h0b22; p_bot[1] = 30'h0004_0000; p_tos[1] = p_bot[1] - 1;
    repeat (4) @(posedge clk);
    #1 rst_n = 1'b1;

    switch_to(0);
    // directed: a hit completes in the cycle it is issued
    call_frame(40, 0);
    rd(0, p_pin[0], p_bot[0] + 5, d, w);
    check("allocated, never written quad reads as zero", d, 32'h0);
    check("read hit latency (cycles)", 32'(w), 32'd0);
    wr(p_pin[0], p_bot[0] + 7, 32'hcafe_0007, w);
    check("write hit latency (cycles)", 32'(w), 32'd0);
    rd(1, p_pin[0], p_bot[0] + 7, d, w2);
    check("read back", d, 32'hcafe_0007);
    check("read hit latency (cycles)", 32'(w2), 32'd0);
    for (int i = 0; i < 40; i++) wr(p_pin[0], p_bot[0] + 30'(i), $urandom, w);

    for (int step = 0; step < 2400; step++) begin
      int r;
      r = $urandom_range(99);
      if (step % 600 == 300) begin
        // recursion burst: grow far beyond the cache, then unwind
        for (int i = 0; i < 14; i++) begin
          call_frame(40 + $urandom_range(8), 6);
          repeat (3) instruction();
        end
        repeat (20) instruction();
        return_frame(int'(p_tos[cur] - p_bot[cur]) - 60 - $urandom_range(40));
        repeat (10) instruction();
      end else if (step % 800 == 799) begin
        switch_to(1 - cur);
        if (p_tos[cur] < p_bot[cur]) call_frame(30, 8);
      end else if (r < 55) instruction();
      else if (r < 72) call_frame(1 + $urandom_range(47), $urandom_range(4));
      else if (r < 90) return_frame(1 + $urandom_range(47));
      else if (r < 96) foreign_access();
      else repeat (2 + $urandom_range(10)) @(posedge clk);
      if (p_tos[cur] < p_bot[cur] + 20) call_frame(24, 4);
    end

    // directed: a call chain several times the cache size, then one return
    // to just above where it started. The return underflows; the read five
    // blocks below the new base is a cut-back miss that leaves a gap to fill,
    // and the idle cycles after it give the hybrid policy room to prefetch.
    begin
      logic [29:0] t0, a;
      if (p_tos[cur] < p_bot[cur] + 300) call_frame(300, 4);
      t0 = p_tos[cur];
      a  = ((t0 + 10) / 30'(u_dut.BLOCK_QUADS)) * 30'(u_dut.BLOCK_QUADS) - 1;
      call_frame(48, 0);
      wr(p_pin[cur], a, $urandom, w);
      wr(p_pin[cur], a - 5 * 30'(u_dut.BLOCK_QUADS), $urandom, w);
      for (int i = 0; i < 40; i++) call_frame(48, 2);
      set_tos(t0 + 10);
      read_check(1, p_pin[cur], a - 5 * 30'(u_dut.BLOCK_QUADS));
      read_check(0, p_pin[cur], a);
      repeat (1500) @(posedge clk);
    end

    // flush the last process and let the write buffer drain
    cur = 0;
    command(CTL_TASK_SWITCH, 16'h0fff, 30'h0008_0000, 30'h0008_0000);
    repeat (3000) @(posedge clk);
    foreach (shadow[k]) begin
      logic [15:0] pn;
      logic [29:0] ad;
      pn = k[45:30];
      ad = k[29:0];
      check($sformatf("memory after flush pin %h addr %h", pn, ad), u_mem.peek(pn, ad), shadow[k]);
    end

    $display("foreign accesses=%0d zero-space checks=%0d", n_foreign, n_zero_chk);
    $display("events: ram_hit=%0d rb_hit=%0d demand_fetch=%0d no_space=%0d global=%0d overflow=%0d underflow=%0d task_switch=%0d cutback_fill=%0d prefetch=%0d dirty_wb=%0d wb_push=%0d mem_reads=%0d mem_writes=%0d",
             n_ram_hit, n_rb_hit, n_fetch, n_nospace, n_global, n_over, n_under, n_ts, n_fill,
             n_pref, n_dwb, n_push, u_mem.n_reads, u_mem.n_writes);
    check("RAM hits happened",          32'(n_ram_hit > 0), 1);
    check("read-buffer hits happened",  32'(n_rb_hit > 0),  1);
    check("demand fetches happened",    32'(n_fetch > 0),   1);
    check("no-space misses happened",   32'(n_nospace > 0), 1);
    check("uncached accesses happened", 32'(n_global > 0),  1);
    check("overflows happened",         32'(n_over > 0),    1);
    check("underflows happened",        32'(n_under > 0),   1);
    check("task switches happened",     32'(n_ts > 0),      1);
    check("new stack space checked",    32'(n_zero_chk > 0), 1);
    check("cut back K fills happened",  32'(n_fill > 0),    1);
    check("write-buffer pushes happened", 32'(n_push > 0),  1);
    check("prefetches iff hybrid",      32'(n_pref > 0),    32'(HYBRID));
    check("dirty-pointer write-backs iff hybrid", 32'(n_dwb > 0), 32'(HYBRID));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
