// tb_rs2_codec: exhaustive test of the RS2 encoder, Check_Redundancy and
// Correct_Redundancy: every data byte against every 14-bit error pattern.
// The reference decoder searches all single-part errors (in I1, then I2,
// then I3) for one that makes the received word a codeword.
module tb_rs2_codec;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] d, cd, kd;
  logic [5:0] r, enc;
  logic       cor, unc;

  rs2_encode  u_enc (.data_i(d), .red_o(enc));
  rs2_check   u_chk (.data_i(d), .red_i(r), .data_o(cd), .corrected_o(cor), .uncorrectable_o(unc));
  rs2_correct u_cor (.data_i(d), .red_i(r), .data_o(kd));

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
    longint n_ok = 0, n_bad = 0, n_unc = 0, n_und = 0;
    for (int x = 0; x < 256; x++) begin
      d = 8'(x); #1;
      check("encode", 16'(enc), 16'(rs2(d)));
      for (int e = 1; e < 16384; e++) begin
        logic [7:0] exp_d;
        logic found, syn;
        d = 8'(x) ^ e[7:0];
        r = rs2(8'(x)) ^ e[13:8];
        #1;
        syn = (rs2(d) != r);
        found = 1'b0;
        exp_d = d;
        if (syn) begin
          for (int part = 0; part < 3 && !found; part++)
            for (int v = 1; v < 8 && !found; v++) begin
              logic [7:0] m;
              m = (part == 0) ? 8'(v) : (part == 1) ? 8'(v) << 3 : 8'(v & 3) << 6;
              if (m != 0 && rs2(d ^ m) == r) begin
                found = 1'b1;
                exp_d = d ^ m;
              end
            end
        end
        check("check", {cd, 6'b0, cor, unc}, {exp_d, 6'b0, syn && found, syn && !found});
        check("correct", 16'(kd), 16'(exp_d));
        if (!cor && !unc)         n_und++;
        else if (unc)             n_unc++;
        else if (cd == 8'(x))     n_ok++;
        else                      n_bad++;
      end
    end
    $display("RS2 Check_Redundancy over %0d patterns: corrected %0d, bad repair %0d, flagged %0d, undetected %0d",
             256*16383, n_ok, n_bad, n_unc, n_und);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
