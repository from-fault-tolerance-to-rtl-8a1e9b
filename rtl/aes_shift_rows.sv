// aes_shift_rows: the AES ShiftRows byte permutation (row r rotated left by
// r columns). Combinational, wiring only. The RS1-protected core uses a
// second copy of it to move the redundancy bytes along with their data.
module aes_shift_rows
  import aes_pkg::*;
(
  input  state_t d_i,
  output state_t d_o
);
  assign d_o = shift_rows(d_i);
endmodule
