// rs1_sub_bytes: SubBytes on an RS1-protected state. The data bytes go
// through the AES S-boxes and, in parallel and independently, their
// redundancy bytes go through SR-boxes, which give the redundancy of the
// S-box output directly. A fault in either path leaves data and redundancy
// inconsistent for the guard that follows. Combinational.
module rs1_sub_bytes
  import aes_pkg::*;
(
  input  state_t d_i,
  input  state_t r_i,
  output state_t d_o,
  output state_t r_o
);
  aes_sub_bytes u_sb (.d_i(d_i), .d_o(d_o));
  for (genvar b = 0; b < 16; b++) begin : g_sr
    sr_box u_sr (.red_i(r_i[b]), .red_o(r_o[b]));
  end
endmodule
