// tb_rs1_codec: exhaustive test of the RS1 encoder, Check_Redundancy and
// Correct_Redundancy: every data byte against every 16-bit error pattern on
// data and redundancy. Expected results come from an inverse-table model:
// the received redundancy determines a unique data byte d'; Check repairs
// to d' only when the data differs from d' in exactly one nibble, and
// Correct always returns d'. At the end it prints how the error patterns
// were classified (corrected, wrongly repaired, flagged, undetected).
module tb_rs1_codec;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] d, r, enc, cd, cr, kd, kr;
  logic       cor, unc;

  rs1_encode  u_enc (.data_i(d), .red_o(enc));
  rs1_check   u_chk (.data_i(d), .red_i(r), .data_o(cd), .red_o(cr), .corrected_o(cor), .uncorrectable_o(unc));
  rs1_correct u_cor (.data_i(d), .red_i(r), .data_o(kd), .red_o(kr));

  task automatic check(input string what, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: d=%h r=%h got %h expected %h", what, d, r, got, exp);
    end
  endtask

  initial begin
    repeat (100000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] inv [256];
    longint n_ok = 0, n_bad = 0, n_unc = 0, n_und = 0, n_pass = 0, k_ok = 0, k_bad = 0, k_und = 0;
    for (int x = 0; x < 256; x++) inv[rs1(8'(x))] = 8'(x);
    for (int x = 0; x < 256; x++) begin
      d = 8'(x); #1;
      check("encode", 16'(enc), 16'(rs1(d)));
      for (int e = 1; e < 65536; e++) begin
        logic [7:0] dp, diff, exp_d;
        logic exp_cor, exp_unc;
        d = 8'(x) ^ e[7:0];
        r = rs1(8'(x)) ^ e[15:8];
        #1;
        dp = inv[r];
        diff = d ^ dp;
        exp_cor = (diff != 0) && ((diff[7:4] == 0) != (diff[3:0] == 0));
        exp_unc = (diff != 0) && !exp_cor;
        exp_d = exp_cor ? dp : d;
        check("check", {cd, cr}, {exp_d, r});
        check("check flags", {14'b0, cor, unc}, {14'b0, exp_cor, exp_unc});
        check("correct", {kd, kr}, {dp, r});
        // Classification of the Check_Redundancy outcome.
        if (!cor && !unc)                 n_und++;
        else if (unc && e[7:0] == 0)      n_pass++;
        else if (unc)                     n_unc++;
        else if (cd == 8'(x))             n_ok++;
        else                              n_bad++;
        if (kd == 8'(x) && e[7:0] != 0)   k_ok++;
        else if (kd == d)                 k_und++;
        else                              k_bad++;
      end
    end
    $display("RS1 Check_Redundancy over %0d patterns: corrected %0d, bad repair %0d, flagged %0d, flagged (redundancy only) %0d, undetected %0d",
             256*65535, n_ok, n_bad, n_unc, n_pass, n_und);
    $display("RS1 Correct_Redundancy: repaired %0d, changed to another value %0d, unchanged %0d", k_ok, k_bad, k_und);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
