// Self-checking testbench of the multi-ported data RAM.
//
// First fills every word through the two write ports, then runs random
// cycles in which both write ports write distinct words and all read ports
// read random words. A reference array in the testbench gives the expected
// value. Because reads are asynchronous, each read is checked in the same
// cycle as its address is applied, before the clock edge: that checks the
// zero-cycle read latency. A write becomes visible on the next cycle, which
// is checked by reading the just-written word right after the edge.
module tb_data_ram;
  localparam int unsigned WORDS = 512;
  localparam int unsigned NRD   = 3;
  localparam int unsigned NWR   = 2;
  localparam int unsigned AW    = $clog2(WORDS);

  logic          clk = 1'b0;
  logic [AW-1:0] rd_addr [NRD];
  logic [31:0]   rd_data [NRD];
  logic          wr_en   [NWR];
  logic [AW-1:0] wr_addr [NWR];
  logic [31:0]   wr_data [NWR];

  logic [31:0] ref_mem [WORDS];
  int checks = 0, failures = 0;

  data_ram #(.WORDS(WORDS), .NRD(NRD), .NWR(NWR)) u_dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    #1;
    for (int p = 0; p < NRD; p++) begin
      checks++;
      if (rd_data[p] !== ref_mem[rd_addr[p]]) begin
        failures++;
        if (failures < 10)
          $display("read port %0d addr %0d: got %h expected %h", p, rd_addr[p], rd_data[p], ref_mem[rd_addr[p]]);
      end
    end
  endtask

  initial begin
    for (int p = 0; p < NWR; p++) begin wr_en[p] = 1'b0; wr_addr[p] = '0; wr_data[p] = '0; end
    for (int p = 0; p < NRD; p++) rd_addr[p] = '0;
    @(negedge clk);
    // fill: port 0 the even words, port 1 the odd words
    for (int w = 0; w < WORDS; w += 2) begin
      for (int p = 0; p < NWR; p++) begin
        wr_en[p] = 1'b1; wr_addr[p] = AW'(w + p); wr_data[p] = $urandom;
        ref_mem[w + p] = wr_data[p];
      end
      @(negedge clk);
    end
    for (int p = 0; p < NWR; p++) wr_en[p] = 1'b0;
    // read everything back on every read port
    for (int w = 0; w < WORDS; w++) begin
      for (int p = 0; p < NRD; p++) rd_addr[p] = AW'(w + p * 7);
      check_reads();
      @(negedge clk);
    end
    // random traffic
    for (int i = 0; i < 5000; i++) begin
      logic [AW-1:0] a0, a1;
      a0 = AW'($urandom);
      a1 = AW'($urandom);
      if (a1 == a0) a1 = a0 + 1'b1;
      wr_en[0] = ($urandom_range(3) != 0); wr_addr[0] = a0; wr_data[0] = $urandom;
      wr_en[1] = ($urandom_range(3) != 0); wr_addr[1] = a1; wr_data[1] = $urandom;
      rd_addr[0] = AW'($urandom);
      rd_addr[1] = a0;               // old value of a word being written
      rd_addr[2] = AW'($urandom);
      check_reads();
      @(posedge clk);
      for (int p = 0; p < NWR; p++) if (wr_en[p]) ref_mem[wr_addr[p]] = wr_data[p];
      @(negedge clk);
      for (int p = 0; p < NWR; p++) wr_en[p] = 1'b0;
      rd_addr[0] = a0; rd_addr[1] = a1;  // new value visible one cycle later
      check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
