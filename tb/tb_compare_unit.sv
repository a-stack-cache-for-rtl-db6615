// Self-checking testbench of the compare unit.
//
// Drives random and corner-case requests against random cache states and
// compares the class (hit, miss, global, other task), the RAM word and the
// block number with a reference worked out here from the rules of the linear
// stack cache: another PIN is the other-task class; an address above the top
// of stack or below the stack bottom is global; otherwise the block must be
// at or above the base block and its slot valid to hit, else it misses. The
// unit is combinational, so every check is made in the same time step as the
// inputs change (zero latency).
module tb_compare_unit;
  import sc_pkg::*;
  localparam int unsigned NBLK  = 32;
  localparam int unsigned QPB   = 16;
  localparam int unsigned QW    = $clog2(QPB);
  localparam int unsigned CW    = $clog2(NBLK * QPB);
  localparam int unsigned BLK_W = ADDR_W - QW;

  pin_t             req_pin, ram_pin;
  qaddr_t           req_addr, tos, bottom;
  logic [BLK_W-1:0] base, blk;
  logic [NBLK-1:0]  valid;
  cmp_class_e       cls;
  logic [CW-1:0]    ram_word;

  int checks = 0, failures = 0;
  int n_cls [4] = '{0, 0, 0, 0};

  compare_unit #(.NBLK(NBLK), .QPB(QPB)) u_dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cmp_class_e expect_cls();
    logic [BLK_W-1:0] b;
    b = req_addr[ADDR_W-1:QW];
    if (req_pin != ram_pin) return CMP_TASK;
    if (req_addr > tos) return CMP_GLOBAL;
    if (req_addr < bottom) return CMP_GLOBAL;
    if (b < base) return CMP_MISS;
    if (!valid[b % NBLK]) return CMP_MISS;
    return CMP_HIT;
  endfunction

  initial begin
    for (int i = 0; i < 20000; i++) begin
      int unsigned off;
      bottom   = qaddr_t'($urandom_range(32'h0100_0000));
      tos      = bottom + qaddr_t'($urandom_range(4000));
      base     = BLK_W'((tos >> QW) - $urandom_range(NBLK - 1));
      if (base < (bottom >> QW)) base = BLK_W'(bottom >> QW);
      valid    = {$urandom, $urandom};
      ram_pin  = pin_t'($urandom_range(3));
      req_pin  = ($urandom_range(9) == 0) ? pin_t'($urandom_range(3)) : ram_pin;
      off      = $urandom_range(5);
      case ($urandom_range(5))
        0: req_addr = tos;
        1: req_addr = tos + 1'b1;
        2: req_addr = bottom;
        3: req_addr = bottom - 1'b1;
        4: req_addr = {base, QW'(off)};
        default: req_addr = tos - qaddr_t'($urandom_range(800));
      endcase
      #1;
      checks++;
      n_cls[expect_cls()]++;
      if (cls != expect_cls()) begin
        failures++;
        if (failures < 10)
          $display("addr %h tos %h bottom %h base %h: got %s expected %s",
                   req_addr, tos, bottom, base, cls.name(), expect_cls().name());
      end
      checks++;
      if (ram_word != req_addr[CW-1:0] || blk != req_addr[ADDR_W-1:QW]) failures++;
    end
    // every class must have been produced
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (n_cls[c] == 0) begin failures++; $display("class %0d never produced", c); end
    end
    $display("classes: hit=%0d miss=%0d global=%0d task=%0d", n_cls[0], n_cls[1], n_cls[2], n_cls[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
