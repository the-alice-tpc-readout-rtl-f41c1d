// tb_pkg: reference data shared by the testbenches.
//
// The ALTRO bus model (altro_model) answers a channel readout with a data
// block whose length and content depend only on the channel's 12-bit hardware
// address {branch, card[3:0], chip[2:0], channel[3:0]}, so a testbench can
// compute independently what the RCU must deliver:
//   length(hw)  = 1 + (hw * 37 + 11) mod max_len
//   word(hw, k) = {hw, k[11:0], (hw * 131 + k * 7) ^ 16'hA5A5}
// Register contents of the model start as reg_init(addr) = addr * 3 + 1.
package tb_pkg;

  function automatic int unsigned chan_len(input logic [11:0] hw, input int unsigned max_len);
    return 1 + ((int'(hw) * 37 + 11) % max_len);
  endfunction

  function automatic logic [39:0] chan_word(input logic [11:0] hw, input int unsigned k);
    logic [15:0] lo;
    lo = 16'((int'(hw) * 131 + int'(k) * 7)) ^ 16'hA5A5;
    return {hw, 12'(k), lo};
  endfunction

  function automatic logic [19:0] reg_init(input logic [19:0] a);
    return 20'(a * 3 + 1);
  endfunction

endpackage
