// tb_aes_fat_top: end-to-end test of the whole design at its default
// configuration. The three AES cores encrypt concurrently, first clean
// blocks (FIPS-197 vectors and random blocks), then blocks with injected
// faults; the RS2 and HC codecs are driven with clean and corrupted bytes.
// Every protection mechanism must occur at least once: Check repair and
// Check withholding, Correct repair and Correct scrambling, CED detection,
// RS2 repair and RS2 flag, HC detection and HC single-bit correction.
module tb_aes_fat_top;
  import aes_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_chk_rep = 0, n_chk_wh = 0, n_cor_rep = 0, n_cor_scr = 0, n_ced = 0;
  int n_rs2_rep = 0, n_rs2_unc = 0, n_hc_det = 0, n_hc_cor = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         chk_start, chk_busy, chk_done, chk_err, chk_corrected;
  logic         cor_start, cor_busy, cor_done;
  logic         ced_start, ced_busy, ced_done, ced_err;
  logic [127:0] pt, key, chk_ct, cor_ct, ced_ct;
  fault_t       chk_fault, cor_fault, ced_fault;
  logic [7:0]   rs2_d, rs2_rx_d, rs2_chk_d, rs2_cor_d, hc_d, hc_rx_d, hc_cor_d;
  logic [5:0]   rs2_r, rs2_rx_r;
  logic [3:0]   hc_r, hc_rx_r;
  logic         rs2_cor_f, rs2_unc_f, hc_err_f;

  aes_fat_top u_top (
    .clk, .rst_n,
    .chk_start_i(chk_start), .chk_pt_i(pt), .chk_key_i(key), .chk_fault_i(chk_fault),
    .chk_busy_o(chk_busy), .chk_done_o(chk_done), .chk_ct_o(chk_ct), .chk_err_o(chk_err),
    .chk_corrected_o(chk_corrected),
    .cor_start_i(cor_start), .cor_pt_i(pt), .cor_key_i(key), .cor_fault_i(cor_fault),
    .cor_busy_o(cor_busy), .cor_done_o(cor_done), .cor_ct_o(cor_ct),
    .ced_start_i(ced_start), .ced_pt_i(pt), .ced_key_i(key), .ced_fault_i(ced_fault),
    .ced_busy_o(ced_busy), .ced_done_o(ced_done), .ced_ct_o(ced_ct), .ced_err_o(ced_err),
    .rs2_data_i(rs2_d), .rs2_red_o(rs2_r), .rs2_rx_data_i(rs2_rx_d), .rs2_rx_red_i(rs2_rx_r),
    .rs2_chk_data_o(rs2_chk_d), .rs2_chk_corrected_o(rs2_cor_f),
    .rs2_chk_uncorrectable_o(rs2_unc_f), .rs2_cor_data_o(rs2_cor_d),
    .hc_data_i(hc_d), .hc_red_o(hc_r), .hc_rx_data_i(hc_rx_d), .hc_rx_red_i(hc_rx_r),
    .hc_chk_error_o(hc_err_f), .hc_cor_data_o(hc_cor_d)
  );

  task automatic check(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Start all three cores on the same block and wait for all three.
  task automatic run_all(output int lat_chk, output int lat_cor, output int lat_ced);
    int t;
    @(negedge clk);
    chk_start = 1'b1;
    cor_start = 1'b1;
    ced_start = 1'b1;
    @(posedge clk);
    t = 0;
    lat_chk = -1;
    lat_cor = -1;
    lat_ced = -1;
    @(negedge clk);
    {chk_start, cor_start, ced_start} = '0;
    while (lat_chk < 0 || lat_cor < 0 || lat_ced < 0) begin
      @(posedge clk);
      t++;
      @(negedge clk);
      if (chk_done) lat_chk = t;
      if (cor_done) lat_cor = t;
      if (ced_done) lat_ced = t;
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
    int l1, l2, l3;
    logic [127:0] ref_ct;
    logic e_chk, k_chk;
    init();
    {chk_start, cor_start, ced_start} = '0;
    chk_fault = '0;
    cor_fault = '0;
    ced_fault = '0;
    pt = '0;
    key = '0;
    {rs2_d, rs2_rx_d, rs2_rx_r, hc_d, hc_rx_d, hc_rx_r} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // Clean blocks.
    for (int n = 0; n < 6; n++) begin
      if (n == 0) begin
        pt  = 128'h00112233445566778899aabbccddeeff;
        key = 128'h000102030405060708090a0b0c0d0e0f;
      end else begin
        pt  = {$urandom, $urandom, $urandom, $urandom};
        key = {$urandom, $urandom, $urandom, $urandom};
      end
      ref_ct = (n == 0) ? 128'h69c4e0d86a7b0430d8cdb78070b4c55a : encrypt(pt, key);
      run_all(l1, l2, l3);
      check("AES_Check ciphertext", chk_ct, ref_ct);
      check("AES_Correct ciphertext", cor_ct, ref_ct);
      check("CED ciphertext", ced_ct, ref_ct);
      check("latencies 10/10/41", {32'(l1), 32'(l2), 32'(l3)}, {32'd10, 32'd10, 32'd41});
      check("no errors", 128'({chk_err, chk_corrected, ced_err}), 128'(0));
    end

    // Faulty blocks: the attack location (first byte of the MixColumns input,
    // round 9) and a ShiftRows-input fault of one bit, which stays in one nibble.
    for (int n = 0; n < 8; n++) begin
      pt  = {$urandom, $urandom, $urandom, $urandom};
      key = {$urandom, $urandom, $urandom, $urandom};
      ref_ct = encrypt(pt, key);
      chk_fault = '{en: 1'b1, rnd: 4'd9, op: (n % 2) ? OP_MC : OP_SR, idx: 4'd0,
                    dmask: (n % 2) ? 8'hff : 8'h01 << (n % 8), rmask: 8'h00};
      cor_fault = '{en: 1'b1, rnd: 4'd9, op: OP_MC, idx: 4'd0,
                    dmask: (n % 2) ? 8'h00 : 8'($urandom_range(255, 1)),
                    rmask: (n % 2) ? 8'($urandom_range(255, 1)) : 8'h00};
      ced_fault = '{en: 1'b1, rnd: 4'd9, op: op_e'(n % 4), idx: 4'(n),
                    dmask: 8'($urandom_range(255, 1)), rmask: 8'h00};
      run_all(l1, l2, l3);
      e_chk = chk_err;
      k_chk = chk_corrected;
      if (n % 2) begin
        check("AES_Check withholds", {chk_ct, 126'b0, e_chk}, {128'b0, 126'b0, 1'b1});
        if (e_chk && chk_ct == 0) n_chk_wh++;
        check("AES_Correct scrambles redundancy fault", 128'(cor_ct != ref_ct), 128'(1));
        if (cor_ct != ref_ct) n_cor_scr++;
      end else begin
        check("AES_Check repairs", {chk_ct, 126'b0, e_chk, k_chk}, {ref_ct, 126'b0, 1'b0, 1'b1});
        if (!e_chk && k_chk && chk_ct == ref_ct) n_chk_rep++;
        check("AES_Correct repairs data fault", cor_ct, ref_ct);
        if (cor_ct == ref_ct) n_cor_rep++;
      end
      check("CED detects", {ced_ct, 127'b0, ced_err}, {128'b0, 127'b0, 1'b1});
      if (ced_err) n_ced++;
      check("latencies with faults", {32'(l1), 32'(l2), 32'(l3)}, {32'd10, 32'd10, 32'd41});
    end
    chk_fault = '0;
    cor_fault = '0;
    ced_fault = '0;

    // Codecs.
    for (int n = 0; n < 400; n++) begin
      logic [7:0] x;
      x = 8'($urandom);
      rs2_d = x;
      hc_d = x;
      #1;
      check("RS2 encode", 128'(rs2_r), 128'(rs2(x)));
      check("HC encode", 128'(hc_r), 128'(hc(x)));
      // RS2: a fault in I1 only is repaired; a fault in I1 and I2 is flagged.
      rs2_rx_r = rs2_r;
      rs2_rx_d = x ^ ((n % 2) ? 8'(($urandom_range(7, 1) << 3) | $urandom_range(7, 1)) : 8'($urandom_range(7, 1)));
      hc_rx_r = hc_r;
      hc_rx_d = x ^ (8'd1 << (n % 8));
      #1;
      if (n % 2) begin
        if (rs2_unc_f) n_rs2_unc++;
      end else begin
        check("RS2 repair", {rs2_chk_d, rs2_cor_d, 6'b0, rs2_cor_f, rs2_unc_f}, {x, x, 8'b10});
        if (rs2_cor_f && rs2_chk_d == x) n_rs2_rep++;
      end
      check("HC detects", 128'(hc_err_f), 128'(1));
      check("HC corrects one bit", 128'(hc_cor_d), 128'(x));
      if (hc_err_f) n_hc_det++;
      if (hc_cor_d == x) n_hc_cor++;
    end

    check("mechanism: AES_Check repair",      128'(n_chk_rep > 0), 128'(1));
    check("mechanism: AES_Check withholding", 128'(n_chk_wh > 0),  128'(1));
    check("mechanism: AES_Correct repair",    128'(n_cor_rep > 0), 128'(1));
    check("mechanism: AES_Correct scrambling", 128'(n_cor_scr > 0), 128'(1));
    check("mechanism: CED detection",         128'(n_ced > 0),     128'(1));
    check("mechanism: RS2 repair",            128'(n_rs2_rep > 0), 128'(1));
    check("mechanism: RS2 flag",              128'(n_rs2_unc > 0), 128'(1));
    check("mechanism: HC detection",          128'(n_hc_det > 0),  128'(1));
    check("mechanism: HC correction",         128'(n_hc_cor > 0),  128'(1));
    $display("Check repair %0d, Check withhold %0d, Correct repair %0d, Correct scramble %0d, CED detect %0d, RS2 repair %0d, RS2 flag %0d, HC detect %0d, HC correct %0d",
             n_chk_rep, n_chk_wh, n_cor_rep, n_cor_scr, n_ced, n_rs2_rep, n_rs2_unc, n_hc_det, n_hc_cor);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
