// tb_aes_ops: checks the AES operation units (SubBytes, ShiftRows, MixColumns,
// their inverses and one key-schedule step) against the FIPS-197 Appendix B
// round-1 values and the Appendix A.1 key schedule, and against the
// independent reference model on random states.
module tb_aes_ops;
  import aes_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  state_t x, sb, isb, sr, isr, mc, imc, ko;
  logic [7:0] rc, rco;

  aes_sub_bytes       u_sb  (.d_i(x), .d_o(sb));
  aes_inv_sub_bytes   u_isb (.d_i(x), .d_o(isb));
  aes_shift_rows      u_sr  (.d_i(x), .d_o(sr));
  aes_inv_shift_rows  u_isr (.d_i(x), .d_o(isr));
  aes_mix_columns     u_mc  (.d_i(x), .d_o(mc));
  aes_inv_mix_columns u_imc (.d_i(x), .d_o(imc));
  aes_key_expand      u_ke  (.key_i(x), .rcon_i(rc), .key_o(ko), .rcon_o(rco));

  task automatic check(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] v, k;
    init();
    rc = 8'h01;
    // FIPS-197 Appendix B, round 1.
    x = 128'h193de3bea0f4e22b9ac68d2ae9f84808; #1;
    check("SubBytes B.1", sb, 128'hd42711aee0bf98f1b8b45de51e415230);
    x = 128'hd42711aee0bf98f1b8b45de51e415230; #1;
    check("ShiftRows B.1", sr, 128'hd4bf5d30e0b452aeb84111f11e2798e5);
    x = 128'hd4bf5d30e0b452aeb84111f11e2798e5; #1;
    check("MixColumns B.1", mc, 128'h046681e5e0cb199a48f8d37a2806264c);
    x = 128'h046681e5e0cb199a48f8d37a2806264c; #1;
    check("InvMixColumns B.1", imc, 128'hd4bf5d30e0b452aeb84111f11e2798e5);
    // Key schedule, FIPS-197 Appendix A.1.
    k = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    for (int r = 1; r <= 10; r++) begin
      x = k; #1;
      if (r == 1)  check("round key 1", ko, 128'ha0fafe1788542cb123a339392a6c7605);
      if (r == 10) check("round key 10", ko, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6);
      check("rcon", 128'(rco), 128'(gf_mul(rc, 8'h02)));
      k = ko;
      rc = rco;
    end
    // Random states against the reference model.
    for (int n = 0; n < 300; n++) begin
      v = {$urandom, $urandom, $urandom, $urandom};
      rc = 8'($urandom);
      x = v; #1;
      check("SubBytes",       sb,  sub_bytes(v));
      check("InvSubBytes",    isb, inv_sub_bytes(v));
      check("ShiftRows",      sr,  shift_rows(v));
      check("InvShiftRows",   isr, inv_shift_rows(v));
      check("MixColumns",     mc,  mix_columns(v));
      check("InvMixColumns",  imc, inv_mix_columns(v));
      check("key step",       ko,  next_key(v, rc));
    end
    // Every S-box entry.
    for (int b = 0; b < 256; b++) begin
      x = {16{8'(b)}}; #1;
      check("S-box entry", 128'(sb[0]), 128'(sbox(8'(b))));
      check("inverse S-box entry", 128'(isb[5]), 128'(isbox_t[b]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
