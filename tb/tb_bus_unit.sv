// Self-checking testbench of the bus unit.
//
// Two random masters share the memory port through the bus unit: master 0
// (pin 1) issues reads and writes, master 1 (pin 2) issues writes only, each
// holding its request until it sees its acknowledge. A behavioural memory
// with a fixed latency answers. The testbench keeps a reference memory that
// it updates in the order transactions are acknowledged and checks every
// read against it; at the end it compares the whole reference with the
// memory. A monitor checks the arbitration: when both masters request while
// the bus is free, master 0 must win; a transaction's address and pin must
// not change until it is acknowledged; and no acknowledge may go to the
// wrong master. It also checks the single-quad latency (LATENCY cycles from
// the start of a transaction to its acknowledge).
module tb_bus_unit;
  localparam int LATENCY = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic m0_req = 0, m0_we = 0, m0_ack, m1_req = 0, m1_ack;
  logic [15:0] m0_pin = 16'd1, m1_pin = 16'd2;
  logic [29:0] m0_addr = '0, m1_addr = '0;
  logic [31:0] m0_wdata = '0, m1_wdata = '0, rdata;
  logic mem_req, mem_we, mem_ack;
  logic [15:0] mem_pin;
  logic [29:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata;

  logic [31:0] ref_mem [longint];
  int checks = 0, failures = 0;
  int n_contested = 0, n_m0 = 0, n_m1 = 0;
  bit m0_done = 0, m1_done = 0;

  bus_unit u_dut (.*);
  mem_model #(.LATENCY(LATENCY)) u_mem (.clk, .req(mem_req), .we(mem_we), .pin(mem_pin),
    .addr(mem_addr), .wdata(mem_wdata), .ack(mem_ack), .rdata(mem_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_read(logic [15:0] p, logic [29:0] a);
    longint key = {18'h0, p, a};
    return ref_mem.exists(key) ? ref_mem[key] : sc_tb_pkg::mem_init(p, a);
  endfunction

  // arbitration and stability monitor
  bit in_txn = 0;
  int start_cyc = 0, cyc = 0;
  logic [15:0] t_pin;
  logic [29:0] t_addr;
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      checks++;
      if (m0_ack && m1_ack) failures++;
      if (mem_ack) begin
        in_txn = 0;
        checks++;
        if (cyc - start_cyc != LATENCY) begin
          failures++;
          $display("latency %0d, expected %0d", cyc - start_cyc, LATENCY);
        end
      end else if (in_txn) begin
        checks++;
        if (mem_pin != t_pin || mem_addr != t_addr) begin failures++; $display("transaction changed"); end
      end else if (mem_req) begin
        in_txn = 1; start_cyc = cyc; t_pin = mem_pin; t_addr = mem_addr;
        if (m0_req && m1_req) begin
          n_contested++;
          checks++;
          if (mem_pin != 16'd1) begin failures++; $display("master 1 won against master 0"); end
        end
      end
    end
  end

  initial begin : master0
    @(posedge rst_n);
    for (int i = 0; i < 1500; i++) begin
      logic [31:0] exp;
      repeat ($urandom_range(2)) @(negedge clk);
      @(negedge clk);
      m0_req = 1; m0_we = $urandom_range(1); m0_addr = 30'($urandom_range(63)); m0_wdata = $urandom;
      do @(negedge clk); while (!m0_ack);
      if (m0_we) ref_mem[{18'h0, m0_pin, m0_addr}] = m0_wdata;
      else begin
        exp = ref_read(m0_pin, m0_addr);
        checks++;
        if (rdata != exp) begin
          failures++;
          $display("read %h: got %h expected %h", m0_addr, rdata, exp);
        end
      end
      n_m0++;
      @(posedge clk); #1 m0_req = 0;
    end
    m0_done = 1;
  end

  initial begin : master1
    @(posedge rst_n);
    for (int i = 0; i < 1500; i++) begin
      repeat ($urandom_range(2)) @(negedge clk);
      @(negedge clk);
      m1_req = 1; m1_addr = 30'($urandom_range(63)); m1_wdata = $urandom;
      do @(negedge clk); while (!m1_ack);
      ref_mem[{18'h0, m1_pin, m1_addr}] = m1_wdata;
      n_m1++;
      @(posedge clk); #1 m1_req = 0;
    end
    m1_done = 1;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (m0_done && m1_done);
    repeat (5) @(posedge clk);
    for (int p = 1; p <= 2; p++)
      for (int a = 0; a < 64; a++) begin
        checks++;
        if (u_mem.peek(16'(p), 30'(a)) != ref_read(16'(p), 30'(a))) failures++;
      end
    checks++;
    if (n_contested == 0) begin failures++; $display("no contested arbitration"); end
    $display("m0=%0d m1=%0d contested=%0d", n_m0, n_m1, n_contested);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
