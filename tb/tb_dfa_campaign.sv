// tb_dfa_campaign: fault-attack campaign on AES_Check and AES_Correct. All
// faults an attacker can place on the first byte of the MixColumns input of
// round 9 are injected: every non-zero mask on the data byte, on its
// redundancy byte, and on both at once (random pairs). Each ciphertext is
// classed as correct, withheld (AES_Check flags it), or faulty. A faulty
// ciphertext is further tested against two attack fault models:
//   one-bit:     equal to the ciphertext of a one-bit flip of that byte;
//   single-byte: differs from the correct one in exactly the four bytes a
//                single-byte fault there reaches (bytes 0, 7, 10, 13).
// Required: data-only faults never yield a faulty ciphertext from either
// core; AES_Correct repairs all of them; with AES_Correct a redundancy
// fault m acts as the data fault R^-1(m), so exactly the eight masks
// R(2^j) fit the one-bit model. Counts for every class are printed.
module tb_dfa_campaign;
  import aes_pkg::*;
  import ecc_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0]   start, busy, done, err, cor;
  logic [127:0] pt, key;
  logic [127:0] ct [2];
  fault_t       fault;

  aes_rs1_core #(.GUARD(GUARD_CHECK)) u_chk (
    .clk, .rst_n, .start_i(start[0]), .pt_i(pt), .key_i(key), .fault_i(fault),
    .busy_o(busy[0]), .done_o(done[0]), .ct_o(ct[0]), .err_o(err[0]), .corrected_o(cor[0])
  );
  aes_rs1_core #(.GUARD(GUARD_CORRECT)) u_cor (
    .clk, .rst_n, .start_i(start[1]), .pt_i(pt), .key_i(key), .fault_i(fault),
    .busy_o(busy[1]), .done_o(done[1]), .ct_o(ct[1]), .err_o(err[1]), .corrected_o(cor[1])
  );

  task automatic check(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Reference ciphertext with data byte 0 XORed by m at the round-9
  // MixColumns input.
  function automatic logic [127:0] encrypt_fault(input logic [127:0] p, input logic [127:0] k,
                                                 input logic [7:0] m);
    logic [127:0] s = p ^ k, kk = k;
    logic [7:0] rc = 8'h01;
    for (int r = 1; r <= 10; r++) begin
      kk = next_key(kk, rc);
      rc = gf_mul(rc, 8'h02);
      s = shift_rows(sub_bytes(s));
      if (r == 9) s[127 -: 8] ^= m;
      if (r != 10) s = mix_columns(s);
      s ^= kk;
    end
    return s;
  endfunction

  task automatic run_both(output logic [127:0] o0, output logic [127:0] o1, output logic e0);
    @(negedge clk);
    start = 2'b11;
    @(negedge clk);
    start = 2'b00;
    while (!(done[0] && done[1])) @(negedge clk);
    o0 = ct[0];
    o1 = ct[1];
    e0 = err[0];
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Per core (0 Check, 1 Correct) and fault target (0 data, 1 redundancy,
  // 2 both): correct, withheld, faulty, faulty fitting one-bit, fitting byte.
  int n_ok [2][3], n_wh [2][3], n_fa [2][3], n_bit [2][3], n_byte [2][3];

  initial begin
    logic [127:0] ref_ct, o [2], bit_ct [8];
    logic e0;
    string tname [3] = '{"data", "redundancy", "both"};
    init();
    start = '0;
    fault = '0;
    pt  = 128'h3243f6a8885a308d313198a2e0370734;
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    ref_ct = encrypt(pt, key);
    for (int j = 0; j < 8; j++) bit_ct[j] = encrypt_fault(pt, key, 8'd1 << j);
    for (int c = 0; c < 2; c++)
      for (int t = 0; t < 3; t++) begin
        n_ok[c][t] = 0; n_wh[c][t] = 0; n_fa[c][t] = 0; n_bit[c][t] = 0; n_byte[c][t] = 0;
      end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int t = 0; t < 3; t++)
      for (int m = 1; m < 256; m++) begin
        fault.en    = 1'b1;
        fault.rnd   = 4'd9;
        fault.op    = OP_MC;
        fault.idx   = 4'd0;
        fault.dmask = (t == 1) ? 8'h00 : 8'(m);
        fault.rmask = (t == 0) ? 8'h00 : (t == 1) ? 8'(m) : 8'($urandom_range(255, 1));
        run_both(o[0], o[1], e0);
        for (int c = 0; c < 2; c++) begin
          logic [127:0] d;
          logic fits_bit, fits_byte;
          d = o[c] ^ ref_ct;
          fits_bit = 1'b0;
          for (int j = 0; j < 8; j++) if (o[c] == bit_ct[j]) fits_bit = 1'b1;
          fits_byte = 1'b1;
          for (int b = 0; b < 16; b++)
            if ((b == 0 || b == 7 || b == 10 || b == 13) != (d[127 - 8*b -: 8] != 0)) fits_byte = 1'b0;
          if (o[c] == ref_ct)                n_ok[c][t]++;
          else if (c == 0 && e0 && o[c] == 0) n_wh[c][t]++;
          else begin
            n_fa[c][t]++;
            if (fits_bit)  n_bit[c][t]++;
            if (fits_byte) n_byte[c][t]++;
          end
        end
      end
    fault = '0;

    check("AES_Check: no faulty ciphertext from data faults", 128'(n_fa[0][0]), 128'(0));
    check("AES_Correct: no faulty ciphertext from data faults", 128'(n_fa[1][0]), 128'(0));
    check("AES_Correct: data faults all repaired", 128'(n_ok[1][0]), 128'(255));
    check("AES_Check: some data faults withheld", 128'(n_wh[0][0] > 0), 128'(1));
    // A redundancy fault m acts as the data fault R^-1(m): exactly the eight
    // masks m = R(2^j) reproduce a one-bit data fault.
    check("AES_Correct: redundancy faults one-bit only for m = R(2^j)", 128'(n_bit[1][1]), 128'(8));
    for (int c = 0; c < 2; c++)
      for (int t = 0; t < 3; t++)
        $display("%s, %s faults: correct %0d, withheld %0d, faulty %0d (one-bit model %0d, single-byte pattern %0d)",
                 c ? "AES_Correct" : "AES_Check", tname[t], n_ok[c][t], n_wh[c][t], n_fa[c][t], n_bit[c][t], n_byte[c][t]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
