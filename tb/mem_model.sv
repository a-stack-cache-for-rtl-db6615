// Behavioural model of the MMU and main memory behind the stack cache (not
// synthesizable). Every transaction is one quad: after a request has been
// seen for LATENCY cycles the model answers with a one-cycle ack, writing the
// quad or returning it on rdata. Memory is sparse; a quad never written reads
// as sc_tb_pkg::mem_init(pin, addr). The model counts reads and writes and
// lets the testbench peek at any quad.
module mem_model #(
  parameter int LATENCY = 3
) (
  input  logic        clk,
  input  logic        req,
  input  logic        we,
  input  logic [15:0] pin,
  input  logic [29:0] addr,
  input  logic [31:0] wdata,
  output logic        ack,
  output logic [31:0] rdata
);
  logic [31:0] mem [longint];
  int          cnt = 0;
  int          n_reads = 0;
  int          n_writes = 0;

  function automatic logic [31:0] peek(input logic [15:0] p, input logic [29:0] a);
    longint key = {18'h0, p, a};
    return mem.exists(key) ? mem[key] : sc_tb_pkg::mem_init(p, a);
  endfunction

  initial begin
    ack   = 1'b0;
    rdata = '0;
  end

  always @(posedge clk) begin
    ack <= 1'b0;
    if (req && !ack) begin
      if (cnt >= LATENCY - 1) begin
        cnt <= 0;
        ack <= 1'b1;
        if (we) begin
          mem[{18'h0, pin, addr}] = wdata;
          n_writes++;
        end else begin
          rdata <= peek(pin, addr);
          n_reads++;
        end
      end else begin
        cnt <= cnt + 1;
      end
    end
  end
endmodule
