// tb_aes_ced_core: test of the low-latency CED AES core. Checks the FIPS-197
// vectors and random blocks against the reference AES, the latency of 41
// clocks (40 operation slots plus the one slot the delayed check adds), and
// that a fault injected into the output of each kind of operation
// (SubBytes, ShiftRows, MixColumns, AddRoundKey, including the initial and
// the last AddRoundKey) is detected by the inverse module one slot later.
module tb_aes_ced_core;
  import aes_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  int det [4];
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         start, busy, done, err;
  logic [127:0] pt, key, ct;
  fault_t       fault;

  aes_ced_core u_dut (
    .clk, .rst_n, .start_i(start), .pt_i(pt), .key_i(key), .fault_i(fault),
    .busy_o(busy), .done_o(done), .ct_o(ct), .err_o(err)
  );

  task automatic check(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic run(output logic [127:0] o, output logic e, output int lat);
    @(negedge clk);
    start = 1'b1;
    @(posedge clk);
    lat = 0;
    @(negedge clk);
    start = 1'b0;
    while (!done) begin
      @(posedge clk);
      lat++;
      @(negedge clk);
    end
    o = ct;
    e = err;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] o;
    logic e;
    int lat;
    init();
    start = 1'b0;
    fault = '0;
    pt = '0;
    key = '0;
    det = '{default: 0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    pt  = 128'h3243f6a8885a308d313198a2e0370734;
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    run(o, e, lat);
    check("FIPS-197 B", o, 128'h3925841d02dc09fbdc118597196a0b32);
    check("latency: 40 slots + 1 check slot", 128'(lat), 128'(41));
    check("no error", 128'(e), 128'(0));
    pt  = 128'h00112233445566778899aabbccddeeff;
    key = 128'h000102030405060708090a0b0c0d0e0f;
    run(o, e, lat);
    check("FIPS-197 C.1", o, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    for (int n = 0; n < 10; n++) begin
      pt  = {$urandom, $urandom, $urandom, $urandom};
      key = {$urandom, $urandom, $urandom, $urandom};
      run(o, e, lat);
      check("random block", o, encrypt(pt, key));
      check("random block no error", 128'(e), 128'(0));
    end

    for (int n = 0; n < 60; n++) begin
      pt  = {$urandom, $urandom, $urandom, $urandom};
      key = {$urandom, $urandom, $urandom, $urandom};
      fault.en    = 1'b1;
      fault.op    = op_e'(n % 4);
      fault.rnd   = (fault.op == OP_ARK) ? 4'($urandom_range(10, 0)) :
                    (fault.op == OP_MC)  ? 4'($urandom_range(9, 1))  : 4'($urandom_range(10, 1));
      if (n == 3)  fault.rnd = 4'd0;    // initial AddRoundKey
      if (n == 7)  fault.rnd = 4'd10;   // last AddRoundKey: caught in the extra slot
      if (n == 2)  fault.rnd = 4'd9;    // MixColumns of round 9
      fault.idx   = 4'($urandom_range(15));
      fault.dmask = 8'($urandom_range(255, 1));
      fault.rmask = '0;
      run(o, e, lat);
      check("fault detected", 128'(e), 128'(1));
      check("ciphertext withheld", o, 128'(0));
      check("latency with fault", 128'(lat), 128'(41));
      if (e) det[n % 4]++;
    end
    fault = '0;
    pt  = 128'h3243f6a8885a308d313198a2e0370734;
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    run(o, e, lat);
    check("clean after faults", o, 128'h3925841d02dc09fbdc118597196a0b32);
    for (int i = 0; i < 4; i++) check("mechanism: detection per operation", 128'(det[i] > 0), 128'(1));
    $display("detected: SubBytes %0d ShiftRows %0d MixColumns %0d AddRoundKey %0d", det[0], det[1], det[2], det[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
