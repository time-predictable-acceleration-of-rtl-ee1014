// Testbench helpers shared by the DICTAT / profiler testbenches.
//
// mem_word() gives the initial content of every memory word that was never
// written, as a function of its word address, so any checker can tell what
// a read must return without a copy of the memory.
package tb_pkg;

  function automatic logic [127:0] mem_word(input logic [63:0] word_addr);
    logic [31:0] h;
    h = word_addr[31:0] * 32'h9E37_79B1 ^ word_addr[63:32] ^ 32'h5A5A_1234;
    return {h ^ 32'h0F0F_0F0F, h + 32'd3, ~h, h};
  endfunction

endpackage
