// tb_pkg: helpers shared by the testbenches of the multi-cache system.
// init_word gives the content of every off-chip word that was never written,
// so reads of fresh memory return a known, address-dependent value.
package tb_pkg;
  import mc_pkg::*;

  function automatic data_t init_word(logic [63:0] addr);
    return {addr[31:0] ^ 32'hA5A5_0000, ~addr[31:0]};
  endfunction

endpackage
