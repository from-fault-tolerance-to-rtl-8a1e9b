// rs1_guard: a bank of sixteen RS1 byte guards placed after an operation of
// the protected AES. With GUARD = GUARD_CHECK every byte goes through
// Check_Redundancy: correctable bytes are repaired (corrected_o) and any
// uncorrectable byte raises error_o. With GUARD = GUARD_CORRECT every byte
// goes through Correct_Redundancy, which always repairs and never flags, so
// both flags stay low. Combinational.
module rs1_guard
  import aes_pkg::*;
  import ecc_pkg::*;
#(
  parameter guard_e GUARD = GUARD_CHECK
) (
  input  state_t d_i,
  input  state_t r_i,
  output state_t d_o,
  output state_t r_o,
  output logic   corrected_o,
  output logic   error_o
);
  if (GUARD == GUARD_CHECK) begin : g_check
    logic [15:0] cor, unc;
    for (genvar b = 0; b < 16; b++) begin : g_byte
      rs1_check u_chk (
        .data_i(d_i[b]), .red_i(r_i[b]), .data_o(d_o[b]), .red_o(r_o[b]),
        .corrected_o(cor[b]), .uncorrectable_o(unc[b])
      );
    end
    assign corrected_o = |cor;
    assign error_o     = |unc;
  end else begin : g_correct
    for (genvar b = 0; b < 16; b++) begin : g_byte
      rs1_correct u_cor (.data_i(d_i[b]), .red_i(r_i[b]), .data_o(d_o[b]), .red_o(r_o[b]));
    end
    assign corrected_o = 1'b0;
    assign error_o     = 1'b0;
  end
endmodule
