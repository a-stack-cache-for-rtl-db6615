// Multi-ported data RAM of the stack cache.
//
// Holds WORDS quads. Every read port is asynchronous: the word appears in
// the same cycle as its address, so the data of a hit is ready together with
// the hit information (the RAM and the tag are addressed in parallel). Every
// write port writes on the rising clock edge. The port split follows the
// multi-port plan of the cache: the execution unit owns two read ports and
// one write port, and the control block owns one extra read port (to copy
// dirty blocks into the write buffer) and one extra write port (to move a
// fetched block from the read buffer into the RAM). The RAM itself does not
// know which port belongs to whom; it only requires that two write ports never
// write the same word in one cycle, which an assertion checks (the control
// block guarantees it). The number of ports and the asynchronous read are
// choices of this implementation.
module data_ram #(
  parameter int unsigned WORDS  = 512,
  parameter int unsigned DATA_W = 32,
  parameter int unsigned NRD    = 3,
  parameter int unsigned NWR    = 2,
  localparam int unsigned AW    = $clog2(WORDS)
) (
  input  logic              clk,
  input  logic [AW-1:0]     rd_addr [NRD],
  output logic [DATA_W-1:0] rd_data [NRD],
  input  logic              wr_en   [NWR],
  input  logic [AW-1:0]     wr_addr [NWR],
  input  logic [DATA_W-1:0] wr_data [NWR]
);

  logic [DATA_W-1:0] mem [WORDS];

  always_comb begin
    for (int p = 0; p < NRD; p++) rd_data[p] = mem[rd_addr[p]];
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < NWR; p++)
      if (wr_en[p]) mem[wr_addr[p]] <= wr_data[p];
  end

  // Two write ports must not hit the same word in one cycle.
  always_ff @(posedge clk) begin
    for (int i = 0; i < NWR; i++)
      for (int j = i + 1; j < NWR; j++)
        assert (!(wr_en[i] && wr_en[j] && wr_addr[i] == wr_addr[j]))
          else $error("data_ram: write ports %0d and %0d collide", i, j);
  end

endmodule
