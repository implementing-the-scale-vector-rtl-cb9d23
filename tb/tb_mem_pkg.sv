// Helpers shared by the testbenches: the initial contents of the external
// memory model, as a function of the 32-bit word address.
package tb_mem_pkg;
  function automatic logic [31:0] init_word(input logic [29:0] waddr);
    logic [31:0] x;
    x = {waddr, 2'b01} * 32'h9E37_79B9;
    return x ^ (x >> 15) ^ 32'h5A5A_A5A5;
  endfunction
endpackage
