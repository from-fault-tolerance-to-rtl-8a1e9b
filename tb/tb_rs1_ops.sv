// tb_rs1_ops: checks the RS1-protected AES operations. For every SR-box
// entry and for random states, the data outputs must equal the reference AES
// operation and the redundancy outputs must equal the RS1 code of those data
// outputs, computed independently. The guard bank is checked in both modes
// with clean states, single-nibble faults and wider faults.
module tb_rs1_ops;
  import aes_pkg::*;
  import ecc_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] sri, sro, rc, rco;
  state_t d, r, sb_d, sb_r, mc_d, mc_r, k_d, k_r;
  state_t gc_d, gc_r, gk_d, gk_r;
  logic   gc_cor, gc_err, gk_cor, gk_err;

  sr_box          u_srb (.red_i(sri), .red_o(sro));
  rs1_sub_bytes   u_sb  (.d_i(d), .r_i(r), .d_o(sb_d), .r_o(sb_r));
  rs1_mix_columns u_mc  (.d_i(d), .r_i(r), .d_o(mc_d), .r_o(mc_r));
  rs1_key_expand  u_ke  (.key_i(d), .red_i(r), .rcon_i(rc), .key_o(k_d), .red_o(k_r), .rcon_o(rco));
  rs1_guard #(.GUARD(GUARD_CHECK))   u_gc (.d_i(d), .r_i(r), .d_o(gc_d), .r_o(gc_r), .corrected_o(gc_cor), .error_o(gc_err));
  rs1_guard #(.GUARD(GUARD_CORRECT)) u_gk (.d_i(d), .r_i(r), .d_o(gk_d), .r_o(gk_r), .corrected_o(gk_cor), .error_o(gk_err));

  task automatic check(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] inv [256];
    logic [127:0] v;
    int b;
    init();
    for (int x = 0; x < 256; x++) inv[rs1(8'(x))] = 8'(x);
    // SR-box: SR[R(x)] = R(S(x)) for every entry.
    for (int x = 0; x < 256; x++) begin
      sri = 8'(x); #1;
      check("SR-box", 128'(sro), 128'(rs1(sbox(inv[x]))));
    end
    for (int n = 0; n < 500; n++) begin
      v  = {$urandom, $urandom, $urandom, $urandom};
      rc = 8'($urandom);
      d = v;
      r = rs1_state(v);
      #1;
      check("SubBytes data", sb_d, sub_bytes(v));
      check("SubBytes red",  sb_r, rs1_state(sub_bytes(v)));
      check("MixColumns data", mc_d, mix_columns(v));
      check("MixColumns red",  mc_r, rs1_state(mix_columns(v)));
      check("key data", k_d, next_key(v, rc));
      check("key red",  k_r, rs1_state(next_key(v, rc)));
      check("rcon", 128'(rco), 128'(gf_mul(rc, 8'h02)));
      // Clean state: both guards pass it and stay quiet.
      check("guard clean", {gc_d, gk_d}, {v, v});
      check("guard clean red", {gc_r, gk_r}, {r, r});
      check("guard clean flags", 128'({gc_cor, gc_err, gk_cor, gk_err}), 128'(0));
      // One data nibble wrong in one byte: Check repairs and reports it.
      b = $urandom_range(15);
      d[b] = v[127 - 8*b -: 8] ^ ($urandom_range(1) ? {4'($urandom_range(15, 1)), 4'h0} : {4'h0, 4'($urandom_range(15, 1))});
      #1;
      check("check guard repairs nibble", gc_d, v);
      check("check guard flags nibble", 128'({gc_cor, gc_err}), 128'(2'b10));
      check("correct guard repairs nibble", gk_d, v);
      // Both nibbles wrong: Check flags it, Correct repairs from the redundancy.
      d[b] = v[127 - 8*b -: 8] ^ {4'($urandom_range(15, 1)), 4'($urandom_range(15, 1))};
      #1;
      check("check guard flags byte", 128'({gc_cor, gc_err}), 128'(2'b01));
      check("check guard leaves byte", gc_d, d);
      check("correct guard repairs byte", gk_d, v);
      check("correct guard silent", 128'({gk_cor, gk_err}), 128'(0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
