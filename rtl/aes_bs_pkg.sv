// aes_bs_pkg: types shared by the bit-serial AES datapath and its controller.
//   phase_t   : the controller's phases (see aes_ctrl)
//   st_src_t  : what a state row shifts in
//   key_src_t : what a key row shifts in
//   sb_src_t  : where the S-box input bit comes from
package aes_bs_pkg;

  typedef enum logic [2:0] {
    PH_IDLE, PH_LOAD, PH_SUB, PH_KEY, PH_ACC, PH_SR, PH_MC, PH_OUT
  } phase_t;

  typedef enum logic [1:0] {
    ST_REC,    // recirculate the row's own serial output
    ST_LOAD,   // plaintext input
    ST_SBOX,   // S-box output
    ST_MC      // MixColumns output
  } st_src_t;

  typedef enum logic [1:0] {
    KEY_REC,   // recirculate
    KEY_LOAD,  // key input
    KEY_SBOX,  // own bit ^ S-box output ^ round constant (first key column)
    KEY_ACC    // own bit ^ read-port bit (running XOR of the columns)
  } key_src_t;

  typedef enum logic {
    SB_STATE,  // state bit ^ round-key bit (AddRoundKey + SubBytes)
    SB_KEY     // key byte read through a read port (SubWord of the key schedule)
  } sb_src_t;

endpackage
