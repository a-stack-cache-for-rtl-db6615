// Helpers shared by the stack cache testbenches: the initial content of the
// behavioural main memory, so that a testbench can predict what a fetch of a
// never-written quad returns.
package sc_tb_pkg;
  function automatic logic [31:0] mem_init(input logic [15:0] pin, input logic [29:0] addr);
    return {pin ^ 16'h5a5a, addr[15:0]} ^ {addr[29:16], 2'b01, 16'h0};
  endfunction
endpackage
