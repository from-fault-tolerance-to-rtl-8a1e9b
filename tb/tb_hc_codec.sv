// tb_hc_codec: exhaustive test of the Hamming-code encoder, Check_Redundancy
// (detection only) and Correct_Redundancy: every data byte against every
// 12-bit error pattern. The reference corrector searches the twelve
// single-bit flips of the received word for one that yields a codeword.
module tb_hc_codec;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] d, kd;
  logic [3:0] r, enc;
  logic       err;

  hc_encode  u_enc (.data_i(d), .red_o(enc));
  hc_check   u_chk (.data_i(d), .red_i(r), .error_o(err));
  hc_correct u_cor (.data_i(d), .red_i(r), .data_o(kd));

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
    int dpos [8] = '{3, 5, 6, 7, 9, 10, 11, 12};
    int ppos [4] = '{1, 2, 4, 8};
    longint n_ok = 0, n_det = 0, n_und = 0;
    for (int x = 0; x < 256; x++) begin
      d = 8'(x); #1;
      check("encode", 16'(enc), 16'(hc(d)));
      for (int e = 1; e < 4096; e++) begin
        logic [7:0] exp_d;
        d = 8'(x) ^ e[7:0];
        r = hc(8'(x)) ^ e[11:8];
        #1;
        exp_d = d;
        if (hc(d) != r) begin
          for (int j = 0; j < 8; j++)
            if (hc(d ^ (8'd1 << j)) == r) exp_d = d ^ (8'd1 << j);
          // A flip of one check bit also explains the word: data unchanged.
          for (int j = 0; j < 4; j++)
            if (hc(d) == (r ^ (4'd1 << j))) exp_d = d;
        end
        check("check", 16'(err), 16'(hc(d) != r));
        check("correct", 16'(kd), 16'(exp_d));
        if (kd == 8'(x))  n_ok++;
        if (err)          n_det++;
        else              n_und++;
      end
    end
    $display("HC over %0d patterns: Check flags %0d, misses %0d; Correct restores %0d",
             256*4095, n_det, n_und, n_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
