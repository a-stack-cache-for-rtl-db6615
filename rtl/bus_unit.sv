// Bus unit: shares the one bus to the MMU between two masters.
//
// Master 0 is the control block (demand fetches, prefetches, uncached
// accesses), master 1 the write buffer (write-backs). A transaction is a
// single quad read or write: the master raises req with its command and keeps
// it stable until ack. When the bus is free the unit passes the request of
// the highest-priority master straight through in the same cycle (master 0
// first, so a fetch is never delayed behind queued write-backs) and keeps that
// master as owner until the MMU answers with mem_ack. mem_ack and mem_rdata
// are returned to the owner only.
//
// The document names the bus unit and says only that it allocates ports and
// busses; the fixed priority and the one-quad transaction are choices of this
// design.
module bus_unit #(
  parameter int unsigned AW     = 30,
  parameter int unsigned PIN_W  = 16,
  parameter int unsigned DATA_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // master 0: control block
  input  logic              m0_req,
  input  logic              m0_we,
  input  logic [PIN_W-1:0]  m0_pin,
  input  logic [AW-1:0]     m0_addr,
  input  logic [DATA_W-1:0] m0_wdata,
  output logic              m0_ack,
  // master 1: write buffer (writes only)
  input  logic              m1_req,
  input  logic [PIN_W-1:0]  m1_pin,
  input  logic [AW-1:0]     m1_addr,
  input  logic [DATA_W-1:0] m1_wdata,
  output logic              m1_ack,
  // shared read data
  output logic [DATA_W-1:0] rdata,
  // MMU side
  output logic              mem_req,
  output logic              mem_we,
  output logic [PIN_W-1:0]  mem_pin,
  output logic [AW-1:0]     mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic              mem_ack,
  input  logic [DATA_W-1:0] mem_rdata
);

  logic busy, own, sel;

  assign sel     = busy ? own : !m0_req;
  assign mem_req = busy ? (own ? m1_req : m0_req) : (m0_req || m1_req);
  assign mem_we    = sel ? 1'b1     : m0_we;
  assign mem_pin   = sel ? m1_pin   : m0_pin;
  assign mem_addr  = sel ? m1_addr  : m0_addr;
  assign mem_wdata = sel ? m1_wdata : m0_wdata;
  assign m0_ack  = mem_ack && !sel;
  assign m1_ack  = mem_ack && sel;
  assign rdata   = mem_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      own  <= 1'b0;
    end else if (mem_ack) begin
      busy <= 1'b0;
    end else if (mem_req && !busy) begin
      busy <= 1'b1;
      own  <= sel;
    end
  end

  // A master keeps its request up until it is acknowledged.
  property p_hold(r, a);
    @(posedge clk) disable iff (!rst_n) (r && !a) |=> r;
  endproperty
  a_m0_hold: assert property (p_hold(m0_req, m0_ack));
  a_m1_hold: assert property (p_hold(m1_req, m1_ack));

endmodule
