// aes_inv_shift_rows: InvShiftRows (row r rotated right by r columns).
// Combinational. Inverse module of ShiftRows in the low-latency CED core.
module aes_inv_shift_rows
  import aes_pkg::*;
(
  input  state_t d_i,
  output state_t d_o
);
  assign d_o = inv_shift_rows(d_i);
endmodule
