// tb_pkg: helpers shared by the testbenches.
// mem_init gives the contents an SDRAM model returns for a word that was never
// written, so a testbench can predict read data without writing first.
package tb_pkg;
  function automatic logic [31:0] mem_init(int unsigned id, logic [1:0] bank, logic [12:0] row,
                                           logic [9:0] col);
    return {id[3:0], 1'b1, bank, row, col, 2'b01} ^ 32'h5a5a_0000;
  endfunction
endpackage
