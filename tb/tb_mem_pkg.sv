// Contents that the behavioural L2 holds before anything is written to it:
// every 64-bit word is a fixed function of its byte address, so a testbench
// can predict any word without storing it.
package tb_mem_pkg;
  function automatic logic [63:0] init_word(input logic [31:0] byte_addr);
    logic [31:0] a;
    a = byte_addr & ~32'h7;
    return {a ^ 32'hC0DE_0000, ~a * 32'd2654435761};
  endfunction
endpackage
