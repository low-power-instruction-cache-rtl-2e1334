// tb_mem_pkg: contents of the simulated main memory. Every 32-bit word holds
// a value computed from its byte address, so a testbench can check any
// instruction the cache returns without storing an image:
//   word(a) = (a * 32'h9E3779B1) ^ 32'h5A5A_0F0F ^ (a >> 7)
package tb_mem_pkg;
  function automatic logic [31:0] mem_word(logic [31:0] a);
    logic [31:0] w;
    w = {a[31:2], 2'b00};
    return (w * 32'h9E3779B1) ^ 32'h5A5A_0F0F ^ (w >> 7);
  endfunction
endpackage
