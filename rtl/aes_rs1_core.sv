// aes_rs1_core: AES-128 encryption protected by the RS1 code. Every state
// byte and every round-key byte travels with an 8-bit RS1 redundancy byte.
// The redundancy is never recomputed from the data inside the rounds: it is
// carried through each operation by its own hardware (SR-boxes for SubBytes,
// a second ShiftRows, the RS1 doubling/tripling networks for MixColumns, XOR
// for AddRoundKey and the key schedule). After SubBytes, ShiftRows,
// MixColumns, AddRoundKey and after each new round key a bank of byte guards
// compares data with redundancy:
//   GUARD = GUARD_CHECK   ("AES_Check"): Check_Redundancy guards. A
//     correctable byte is repaired; any uncorrectable byte makes the block
//     fail: err_o is raised with done_o and ct_o is forced to zero, so no
//     faulty ciphertext leaves the core.
//   GUARD = GUARD_CORRECT ("AES_Correct"): Correct_Redundancy guards repair
//     every byte from its redundancy and never flag; err_o stays low.
// Architecture (this design's choice; the paper protects an existing AES
// core without fixing its structure): one full round per clock with an
// on-the-fly key schedule. start_i (while busy_o is low) loads pt_i ^ key_i
// and the RS1 codes of pt_i and key_i; rounds 1..10 follow on the next ten
// clocks and done_o pulses for one clock together with ct_o, err_o and
// corrected_o, ten clocks after start_i was taken. Round 10 skips
// MixColumns. Asynchronous active-low reset.
// fault_i is a test hook: when fault_i.en is set it XORs fault_i.dmask into
// data byte fault_i.idx and fault_i.rmask into the matching redundancy byte
// at the input of operation fault_i.op of round fault_i.rnd.
module aes_rs1_core
  import aes_pkg::*;
  import ecc_pkg::*;
#(
  parameter guard_e GUARD = GUARD_CHECK
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start_i,
  input  logic [127:0] pt_i,
  input  logic [127:0] key_i,
  input  fault_t       fault_i,
  output logic         busy_o,
  output logic         done_o,
  output logic [127:0] ct_o,
  output logic         err_o,
  output logic         corrected_o
);
  state_t     st_d, st_r, k_d, k_r;
  logic [7:0] rcon;
  logic [3:0] rnd;
  logic       busy;

  // RS1 encoding of the inputs.
  state_t pt_r, key_r;
  for (genvar b = 0; b < 16; b++) begin : g_enc
    rs1_encode u_ept (.data_i(pt_i[127-8*b -: 8]),  .red_o(pt_r[b]));
    rs1_encode u_ekey (.data_i(key_i[127-8*b -: 8]), .red_o(key_r[b]));
  end

  // Fault injection at the input of operation op in the current round.
  function automatic state_t inj_d(input state_t s, input op_e op, input fault_t f, input logic [3:0] r);
    state_t o = s;
    if (f.en && f.op == op && f.rnd == r) o[f.idx] = s[f.idx] ^ f.dmask;
    return o;
  endfunction
  function automatic state_t inj_r(input state_t s, input op_e op, input fault_t f, input logic [3:0] r);
    state_t o = s;
    if (f.en && f.op == op && f.rnd == r) o[f.idx] = s[f.idx] ^ f.rmask;
    return o;
  endfunction

  // One round.
  state_t sb_d, sb_r, g0_d, g0_r, sr_d, sr_r, g1_d, g1_r;
  state_t mc_d, mc_r, g2_d, g2_r, nk_d, nk_r, gk_d, gk_r;
  state_t ark_d, ark_r, nx_d, nx_r;
  logic [7:0] rcon_n;
  logic [4:0] cor, err;
  logic       last;

  assign last = (rnd == 4'(NR));

  rs1_sub_bytes u_sb (
    .d_i(inj_d(st_d, OP_SB, fault_i, rnd)), .r_i(inj_r(st_r, OP_SB, fault_i, rnd)),
    .d_o(sb_d), .r_o(sb_r)
  );
  rs1_guard #(.GUARD(GUARD)) u_g0 (
    .d_i(sb_d), .r_i(sb_r), .d_o(g0_d), .r_o(g0_r), .corrected_o(cor[0]), .error_o(err[0])
  );

  aes_shift_rows u_sr_d (.d_i(inj_d(g0_d, OP_SR, fault_i, rnd)), .d_o(sr_d));
  aes_shift_rows u_sr_r (.d_i(inj_r(g0_r, OP_SR, fault_i, rnd)), .d_o(sr_r));
  rs1_guard #(.GUARD(GUARD)) u_g1 (
    .d_i(sr_d), .r_i(sr_r), .d_o(g1_d), .r_o(g1_r), .corrected_o(cor[1]), .error_o(err[1])
  );

  state_t mcx_d, mcx_r;
  rs1_mix_columns u_mc (
    .d_i(inj_d(g1_d, OP_MC, fault_i, rnd)), .r_i(inj_r(g1_r, OP_MC, fault_i, rnd)),
    .d_o(mcx_d), .r_o(mcx_r)
  );
  assign mc_d = last ? g1_d : mcx_d;
  assign mc_r = last ? g1_r : mcx_r;
  rs1_guard #(.GUARD(GUARD)) u_g2 (
    .d_i(mc_d), .r_i(mc_r), .d_o(g2_d), .r_o(g2_r), .corrected_o(cor[2]), .error_o(err[2])
  );

  rs1_key_expand u_ks (
    .key_i(k_d), .red_i(k_r), .rcon_i(rcon), .key_o(nk_d), .red_o(nk_r), .rcon_o(rcon_n)
  );
  rs1_guard #(.GUARD(GUARD)) u_gk (
    .d_i(nk_d), .r_i(nk_r), .d_o(gk_d), .r_o(gk_r), .corrected_o(cor[3]), .error_o(err[3])
  );

  assign ark_d = inj_d(g2_d, OP_ARK, fault_i, rnd) ^ gk_d;
  assign ark_r = inj_r(g2_r, OP_ARK, fault_i, rnd) ^ gk_r;
  rs1_guard #(.GUARD(GUARD)) u_g3 (
    .d_i(ark_d), .r_i(ark_r), .d_o(nx_d), .r_o(nx_r), .corrected_o(cor[4]), .error_o(err[4])
  );

  logic err_acc, cor_acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      done_o      <= 1'b0;
      ct_o        <= '0;
      err_o       <= 1'b0;
      corrected_o <= 1'b0;
      err_acc     <= 1'b0;
      cor_acc     <= 1'b0;
      rnd         <= '0;
      rcon        <= 8'h01;
      st_d        <= '0;
      st_r        <= '0;
      k_d         <= '0;
      k_r         <= '0;
    end else begin
      done_o <= 1'b0;
      if (!busy) begin
        if (start_i) begin
          busy    <= 1'b1;
          rnd     <= 4'd1;
          rcon    <= 8'h01;
          st_d    <= state_t'(pt_i ^ key_i);
          st_r    <= pt_r ^ key_r;
          k_d     <= state_t'(key_i);
          k_r     <= key_r;
          err_acc <= 1'b0;
          cor_acc <= 1'b0;
        end
      end else begin
        st_d    <= nx_d;
        st_r    <= nx_r;
        k_d     <= gk_d;
        k_r     <= gk_r;
        rcon    <= rcon_n;
        err_acc <= err_acc | (|err);
        cor_acc <= cor_acc | (|cor);
        if (last) begin
          busy        <= 1'b0;
          done_o      <= 1'b1;
          err_o       <= err_acc | (|err);
          corrected_o <= cor_acc | (|cor);
          ct_o        <= (err_acc | (|err)) ? '0 : 128'(nx_d);
        end else begin
          rnd <= rnd + 4'd1;
        end
      end
    end
  end

  assign busy_o = busy;
endmodule
