// rcc_pkg - shared definitions of the RAM-based reconfigurable combinational
// circuit: which RAM a configuration write goes to.
package rcc_pkg;
  typedef enum logic [1:0] {
    CFG_OUT_RAM = 2'd0,  // output RAM: word = {end flag, y}
    CFG_PM      = 2'd1,  // PM select RAM of variable cfg_k: word = input index
    CFG_STRAM   = 2'd2   // STRAM: word = {valid, push, next, rstate}
  } cfg_target_e;
endpackage
