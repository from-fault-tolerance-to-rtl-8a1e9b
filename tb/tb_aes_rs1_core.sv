// tb_aes_rs1_core: end-to-end test of the RS1-protected AES core in both
// guard modes (AES_Check and AES_Correct). Checks the FIPS-197 vectors and
// random blocks against the reference AES, the 10-clock latency from start
// to done, and the response to injected faults: at the first byte of the
// MixColumns input of round 9 (the location a differential fault attack
// targets) and at other operations, on the data, on the redundancy or both.
module tb_aes_rs1_core;
  import aes_pkg::*;
  import ecc_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_repaired = 0, n_withheld = 0, n_scrambled = 0;
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

  // Reference data at the input of operation op of round rnd.
  function automatic logic [127:0] state_at(input logic [127:0] p, input logic [127:0] k,
                                            input int rnd, input op_e op);
    logic [127:0] s = p ^ k, kk = k;
    logic [7:0] rc = 8'h01;
    for (int r = 1; r <= rnd; r++) begin
      kk = next_key(kk, rc);
      rc = gf_mul(rc, 8'h02);
      if (r == rnd && op == OP_SB) return s;
      s = sub_bytes(s);
      if (r == rnd && op == OP_SR) return s;
      s = shift_rows(s);
      if (r == rnd && op == OP_MC) return s;
      if (r != 10) s = mix_columns(s);
      if (r == rnd) return s;
      s ^= kk;
    end
    return s;
  endfunction

  // Error that a data-only fault at the input of op leaves at the next guard.
  function automatic logic [127:0] guard_error(input logic [127:0] x, input logic [127:0] f, input op_e op);
    unique case (op)
      OP_SB:   return sub_bytes(x ^ f) ^ sub_bytes(x);
      OP_SR:   return shift_rows(x ^ f) ^ shift_rows(x);
      OP_MC:   return mix_columns(x ^ f) ^ mix_columns(x);
      default: return f;
    endcase
  endfunction

  // Check_Redundancy repairs every byte with at most one wrong nibble.
  function automatic logic repairable(input logic [127:0] e);
    for (int b = 0; b < 16; b++)
      if (e[127 - 8*b -: 4] != 0 && e[123 - 8*b -: 4] != 0) return 1'b0;
    return 1'b1;
  endfunction

  // Encrypt one block on core c; returns ciphertext, flags and latency.
  task automatic run(input int c, output logic [127:0] o, output logic e, output logic k, output int lat);
    @(negedge clk);
    start[c] = 1'b1;
    @(posedge clk);
    lat = 0;
    @(negedge clk);
    start[c] = 1'b0;
    while (!done[c]) begin
      @(posedge clk);
      lat++;
      @(negedge clk);
    end
    o = ct[c];
    e = err[c];
    k = cor[c];
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] o, ref_ct;
    logic e, k;
    int lat;
    init();
    start = '0;
    fault = '0;
    pt = '0;
    key = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int c = 0; c < 2; c++) begin
      pt  = 128'h3243f6a8885a308d313198a2e0370734;
      key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
      run(c, o, e, k, lat);
      check("FIPS-197 B", o, 128'h3925841d02dc09fbdc118597196a0b32);
      check("latency", 128'(lat), 128'(10));
      check("clean flags", 128'({e, k}), 128'(0));
      pt  = 128'h00112233445566778899aabbccddeeff;
      key = 128'h000102030405060708090a0b0c0d0e0f;
      run(c, o, e, k, lat);
      check("FIPS-197 C.1", o, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
      for (int n = 0; n < 10; n++) begin
        pt  = {$urandom, $urandom, $urandom, $urandom};
        key = {$urandom, $urandom, $urandom, $urandom};
        run(c, o, e, k, lat);
        check("random block", o, encrypt(pt, key));
      end
    end

    // Faults at the first byte of the MixColumns input, round 9, and elsewhere.
    for (int n = 0; n < 40; n++) begin
      logic [7:0] m;
      pt  = {$urandom, $urandom, $urandom, $urandom};
      key = {$urandom, $urandom, $urandom, $urandom};
      ref_ct = encrypt(pt, key);
      fault.en  = 1'b1;
      fault.rnd = (n < 20) ? 4'd9 : 4'($urandom_range(10, 1));
      fault.op  = (n < 20) ? OP_MC : op_e'($urandom_range(3));
      if (fault.rnd == 4'd10 && fault.op == OP_MC) fault.op = OP_ARK;
      fault.idx = (n < 20) ? 4'd0 : 4'($urandom_range(15));
      // Single-bit data fault: repaired when every byte the guard sees has
      // at most one wrong nibble, otherwise the ciphertext is withheld.
      m = 8'd1 << $urandom_range(7);
      fault.dmask = m;
      fault.rmask = '0;
      begin
        logic [127:0] fe, ge;
        logic rep;
        fe = '0;
        fe[127 - 8*fault.idx -: 8] = m;
        ge = guard_error(state_at(pt, key, fault.rnd, fault.op), fe, fault.op);
        rep = repairable(ge);
        run(0, o, e, k, lat);
        check("check: 1-bit fault outcome", o, rep ? ref_ct : 128'(0));
        check("check: 1-bit fault flags", 128'(e), 128'(!rep));
        if (rep) check("check: repair reported", 128'(k), 128'(1));
        if (o == ref_ct && k) n_repaired++;
        if (e && o == 0) n_withheld++;
      end
      run(1, o, e, k, lat);
      check("correct: 1-bit fault repaired", o, ref_ct);
      // Both nibbles of the data byte wrong: the ciphertext is withheld unless
      // the operation leaves at most one wrong nibble per byte at the guard.
      fault.dmask = {4'($urandom_range(15, 1)), 4'($urandom_range(15, 1))};
      begin
        logic [127:0] fe;
        logic rep;
        fe = '0;
        fe[127 - 8*fault.idx -: 8] = fault.dmask;
        rep = repairable(guard_error(state_at(pt, key, fault.rnd, fault.op), fe, fault.op));
        run(0, o, e, k, lat);
        check("check: byte fault detected", 128'(e), 128'(!rep));
        check("check: byte fault outcome", o, rep ? ref_ct : 128'(0));
        if (e && o == 0) n_withheld++;
      end
      run(1, o, e, k, lat);
      check("correct: data fault repaired", o, ref_ct);
      check("correct: no flags", 128'({e, k}), 128'(0));
      // Fault on the redundancy only: Correct turns it into another value.
      fault.dmask = '0;
      fault.rmask = 8'($urandom_range(255, 1));
      run(1, o, e, k, lat);
      checks++;
      if (o == ref_ct) begin
        failures++;
        $display("FAIL correct: redundancy fault left ciphertext intact");
      end else n_scrambled++;
    end
    fault = '0;

    check("mechanism: repaired by Check", 128'(n_repaired > 0), 128'(1));
    check("mechanism: withheld by Check", 128'(n_withheld > 0), 128'(1));
    check("mechanism: scrambled by Correct", 128'(n_scrambled > 0), 128'(1));
    $display("repaired %0d, withheld %0d, scrambled %0d", n_repaired, n_withheld, n_scrambled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
