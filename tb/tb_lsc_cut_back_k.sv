// End-to-end test of the linear stack cache with the cut back K algorithm
// (K = 2 blocks) instead of the hybrid one; otherwise as tb_linear_stack_cache:
// no prefetch or dirty-pointer write-back may happen. See lsc_tb_body.svh for the
// stimulus and the checks.
module tb_lsc_cut_back_k;
  import sc_pkg::*;

  localparam bit HYBRID   = 1'b0;
  localparam int WATCHDOG = 2_000_000;

  logic       clk, rst_n;
  logic       rd_req [2];
  pin_t       rd_pin [2];
  qaddr_t     rd_addr[2];
  logic       rd_ack [2];
  quad_t      rd_data[2];
  logic       wr_req, wr_ack;
  pin_t       wr_pin;
  qaddr_t     wr_addr;
  quad_t      wr_data;
  logic       ctl_valid, ctl_ready;
  ctl_op_e    ctl_op;
  pin_t       ctl_pin;
  qaddr_t     ctl_tos, ctl_bottom;
  logic       mem_req, mem_we, mem_ack;
  pin_t       mem_pin;
  qaddr_t     mem_addr;
  quad_t      mem_wdata, mem_rdata;
  sc_events_t events;

  linear_stack_cache #(.REPL(REPL_CUT_BACK_K), .K(2)) u_dut (.*);

  mem_model #(.LATENCY(3)) u_mem (
    .clk, .req(mem_req), .we(mem_we), .pin(mem_pin), .addr(mem_addr), .wdata(mem_wdata),
    .ack(mem_ack), .rdata(mem_rdata)
  );

  `include "lsc_tb_body.svh"
endmodule
