// aes_ced_core: AES-128 encryption with low-latency concurrent error
// detection by inverse modules. Each AES operation (SubBytes, ShiftRows,
// MixColumns, AddRoundKey) runs in its own time slot (one clock). In the slot
// after an operation, while the next operation already runs, the inverse
// module of that operation (InvSubBytes, InvShiftRows, InvMixColumns,
// AddRoundKey with the same round key) is applied to its registered output
// and compared with its registered input. So checking never stalls the
// datapath: the only added latency is one slot, for the check of the last
// AddRoundKey.
// Schedule: slot 1 is the initial AddRoundKey, rounds 1..9 take four slots,
// round 10 three (no MixColumns), then one check-only slot: done_o pulses 41
// clocks after start_i was taken (40 operation slots + 1). The round key is
// expanded on the fly at each AddRoundKey. A mismatch in any comparison sets
// err_o (reported with done_o) and ct_o is forced to zero so that no faulty
// ciphertext is released. Asynchronous active-low reset. The one-slot-per-
// operation schedule and the zeroed output are this design's choices.
// fault_i is a test hook: when fault_i.en is set, fault_i.dmask is XORed
// into byte fault_i.idx of the output of operation fault_i.op of round
// fault_i.rnd (round 0 = initial AddRoundKey); fault_i.rmask is unused.
module aes_ced_core
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start_i,
  input  logic [127:0] pt_i,
  input  logic [127:0] key_i,
  input  fault_t       fault_i,
  output logic         busy_o,
  output logic         done_o,
  output logic [127:0] ct_o,
  output logic         err_o
);
  state_t     cur, rk, chk_in, chk_key;
  op_e        op, chk_op;
  logic       chk_v, busy, fin, err_acc;
  logic [3:0] rnd;
  logic [7:0] rcon, rcon_n;

  // Forward units.
  state_t sb_o, sr_o, mc_o, rk_n;
  state_t fwd, fwd_f;
  aes_sub_bytes   u_sb (.d_i(cur), .d_o(sb_o));
  aes_shift_rows  u_sr (.d_i(cur), .d_o(sr_o));
  aes_mix_columns u_mc (.d_i(cur), .d_o(mc_o));
  aes_key_expand  u_ks (.key_i(rk), .rcon_i(rcon), .key_o(rk_n), .rcon_o(rcon_n));

  always_comb begin
    unique case (op)
      OP_SB:   fwd = sb_o;
      OP_SR:   fwd = sr_o;
      OP_MC:   fwd = mc_o;
      default: fwd = cur ^ rk;
    endcase
    fwd_f = fwd;
    if (fault_i.en && fault_i.op == op && fault_i.rnd == rnd)
      fwd_f[fault_i.idx] = fwd[fault_i.idx] ^ fault_i.dmask;
  end

  // Inverse units, one slot behind: they see the previous operation's output
  // (now in cur) and compare with its input (chk_in).
  state_t isb_o, isr_o, imc_o, inv;
  logic   mismatch;
  aes_inv_sub_bytes   u_isb (.d_i(cur), .d_o(isb_o));
  aes_inv_shift_rows  u_isr (.d_i(cur), .d_o(isr_o));
  aes_inv_mix_columns u_imc (.d_i(cur), .d_o(imc_o));

  always_comb begin
    unique case (chk_op)
      OP_SB:   inv = isb_o;
      OP_SR:   inv = isr_o;
      OP_MC:   inv = imc_o;
      default: inv = cur ^ chk_key;
    endcase
    mismatch = chk_v && (inv != chk_in);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      fin     <= 1'b0;
      done_o  <= 1'b0;
      ct_o    <= '0;
      err_o   <= 1'b0;
      err_acc <= 1'b0;
      chk_v   <= 1'b0;
      chk_op  <= OP_ARK;
      chk_in  <= '0;
      chk_key <= '0;
      op      <= OP_ARK;
      rnd     <= '0;
      rcon    <= 8'h01;
      cur     <= '0;
      rk      <= '0;
    end else begin
      done_o <= 1'b0;
      if (!busy) begin
        if (start_i) begin
          busy    <= 1'b1;
          fin     <= 1'b0;
          cur     <= state_t'(pt_i);
          rk      <= state_t'(key_i);
          rcon    <= 8'h01;
          rnd     <= '0;
          op      <= OP_ARK;
          chk_v   <= 1'b0;
          err_acc <= 1'b0;
        end
      end else if (!fin) begin
        cur     <= fwd_f;
        chk_in  <= cur;
        chk_key <= rk;
        chk_op  <= op;
        chk_v   <= 1'b1;
        err_acc <= err_acc | mismatch;
        unique case (op)
          OP_SB: op <= OP_SR;
          OP_SR: op <= (rnd == 4'(NR)) ? OP_ARK : OP_MC;
          OP_MC: op <= OP_ARK;
          default: begin
            if (rnd == 4'(NR)) begin
              fin <= 1'b1;
            end else begin
              rnd  <= rnd + 4'd1;
              op   <= OP_SB;
              rk   <= rk_n;
              rcon <= rcon_n;
            end
          end
        endcase
      end else begin
        busy   <= 1'b0;
        fin    <= 1'b0;
        chk_v  <= 1'b0;
        done_o <= 1'b1;
        err_o  <= err_acc | mismatch;
        ct_o   <= (err_acc | mismatch) ? '0 : 128'(cur);
      end
    end
  end

  assign busy_o = busy;
endmodule
