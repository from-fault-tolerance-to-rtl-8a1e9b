// aes_fat_top: the fault-attack-tolerant AES design. Four independent parts
// stand side by side, each with its own ports:
//   chk_*  AES-128 encryption protected by RS1 with Check_Redundancy guards
//          ("AES_Check": detect, repair only what is correctable, withhold
//          the ciphertext on an uncorrectable fault);
//   cor_*  the same core with Correct_Redundancy guards ("AES_Correct":
//          always repair from the redundancy, never flag);
//   ced_*  AES-128 encryption with low-latency concurrent error detection by
//          inverse modules (one time slot of added latency);
//   rs2_*, hc_*  the other two byte codes, RS2 (6 redundancy bits) and a
//          (12,8) Hamming code, each with encoder, Check_Redundancy and
//          Correct_Redundancy.
// The AES cores take start_*_i with a 128-bit plaintext and key and pulse
// done_*_o with the ciphertext (10 clocks later for the RS1 cores, 41 for the
// CED core). The *_fault_i inputs are fault-injection test hooks; tie their
// en bit low in use. The codecs are combinational. One clock, asynchronous
// active-low reset.
module aes_fat_top
  import aes_pkg::*;
  import ecc_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // AES_Check
  input  logic         chk_start_i,
  input  logic [127:0] chk_pt_i,
  input  logic [127:0] chk_key_i,
  input  fault_t       chk_fault_i,
  output logic         chk_busy_o,
  output logic         chk_done_o,
  output logic [127:0] chk_ct_o,
  output logic         chk_err_o,
  output logic         chk_corrected_o,
  // AES_Correct
  input  logic         cor_start_i,
  input  logic [127:0] cor_pt_i,
  input  logic [127:0] cor_key_i,
  input  fault_t       cor_fault_i,
  output logic         cor_busy_o,
  output logic         cor_done_o,
  output logic [127:0] cor_ct_o,
  // low-latency CED
  input  logic         ced_start_i,
  input  logic [127:0] ced_pt_i,
  input  logic [127:0] ced_key_i,
  input  fault_t       ced_fault_i,
  output logic         ced_busy_o,
  output logic         ced_done_o,
  output logic [127:0] ced_ct_o,
  output logic         ced_err_o,
  // RS2 codec
  input  logic [7:0]   rs2_data_i,
  output logic [5:0]   rs2_red_o,
  input  logic [7:0]   rs2_rx_data_i,
  input  logic [5:0]   rs2_rx_red_i,
  output logic [7:0]   rs2_chk_data_o,
  output logic         rs2_chk_corrected_o,
  output logic         rs2_chk_uncorrectable_o,
  output logic [7:0]   rs2_cor_data_o,
  // HC codec
  input  logic [7:0]   hc_data_i,
  output logic [3:0]   hc_red_o,
  input  logic [7:0]   hc_rx_data_i,
  input  logic [3:0]   hc_rx_red_i,
  output logic         hc_chk_error_o,
  output logic [7:0]   hc_cor_data_o
);
  aes_rs1_core #(.GUARD(GUARD_CHECK)) u_aes_check (
    .clk, .rst_n, .start_i(chk_start_i), .pt_i(chk_pt_i), .key_i(chk_key_i),
    .fault_i(chk_fault_i), .busy_o(chk_busy_o), .done_o(chk_done_o), .ct_o(chk_ct_o),
    .err_o(chk_err_o), .corrected_o(chk_corrected_o)
  );

  logic cor_err, cor_corrected;  // constant low with Correct_Redundancy guards
  aes_rs1_core #(.GUARD(GUARD_CORRECT)) u_aes_correct (
    .clk, .rst_n, .start_i(cor_start_i), .pt_i(cor_pt_i), .key_i(cor_key_i),
    .fault_i(cor_fault_i), .busy_o(cor_busy_o), .done_o(cor_done_o), .ct_o(cor_ct_o),
    .err_o(cor_err), .corrected_o(cor_corrected)
  );

  aes_ced_core u_aes_ced (
    .clk, .rst_n, .start_i(ced_start_i), .pt_i(ced_pt_i), .key_i(ced_key_i),
    .fault_i(ced_fault_i), .busy_o(ced_busy_o), .done_o(ced_done_o), .ct_o(ced_ct_o),
    .err_o(ced_err_o)
  );

  rs2_encode  u_rs2_enc (.data_i(rs2_data_i), .red_o(rs2_red_o));
  rs2_check   u_rs2_chk (
    .data_i(rs2_rx_data_i), .red_i(rs2_rx_red_i), .data_o(rs2_chk_data_o),
    .corrected_o(rs2_chk_corrected_o), .uncorrectable_o(rs2_chk_uncorrectable_o)
  );
  rs2_correct u_rs2_cor (.data_i(rs2_rx_data_i), .red_i(rs2_rx_red_i), .data_o(rs2_cor_data_o));

  hc_encode  u_hc_enc (.data_i(hc_data_i), .red_o(hc_red_o));
  hc_check   u_hc_chk (.data_i(hc_rx_data_i), .red_i(hc_rx_red_i), .error_o(hc_chk_error_o));
  hc_correct u_hc_cor (.data_i(hc_rx_data_i), .red_i(hc_rx_red_i), .data_o(hc_cor_data_o));
endmodule
