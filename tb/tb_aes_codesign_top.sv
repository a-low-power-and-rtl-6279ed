// tb_aes_codesign_top: end-to-end AES-128 encryption through the co-design.
//
// The testbench plays the processor: it expands the key and runs
// AddRoundKey, ShiftRows and MixColumns in software (aes_ref_pkg), and for
// every round's SubBytes writes the state to BLOCK_IN, writes CTRL.start,
// polls STATUS until done and reads BLOCK_OUT, exactly as the software side
// of the co-design would. The ciphertexts are compared with the FIPS-197
// example vectors and with a software-only encryption. The top runs at its
// default parameters.
//
// Mechanisms counted, each must occur: SubBytes operations on the
// accelerator (ten per block); STATUS polls that found the accelerator still
// busy (the enable/done handshake); and idle holds, where a new state was
// written to BLOCK_IN without a start and BLOCK_OUT, read back, still held
// the previous result. An idle hold is what operand isolation and the gated
// output registers together must give: the inputs are cut off and the
// registers get no clock edge while the enable is low. (The internal view of
// both, cell addresses at zero and withheld gated edges, is checked in the
// cell and clock-gate testbenches.) The SubBytes latency, start
// write to result, is checked to be the two cycles of the slave's timing:
// one to raise the enable, one for the accelerator itself.
module tb_aes_codesign_top;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [3:0]  avs_address = '0;
  logic        avs_write = 1'b0, avs_read = 1'b0;
  logic [31:0] avs_writedata = '0, avs_readdata;
  int checks = 0, failures = 0;

  int n_sb_ops = 0, n_busy_polls = 0, n_idle_holds = 0;
  aes_block_t last_result = '0;

  aes_codesign_top dut (
    .clk(clk), .rst_n(rst_n),
    .avs_address(avs_address), .avs_write(avs_write),
    .avs_writedata(avs_writedata), .avs_read(avs_read),
    .avs_readdata(avs_readdata));

  always #5 clk = ~clk;

  // Reset asserted shortly after time zero, so the asynchronous reset sees
  // a falling edge.
  initial #1 rst_n = 1'b0;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---- processor bus cycles ------------------------------------------
  task automatic bus_write(int a, logic [31:0] d);
    @(negedge clk);
    avs_address = 4'(a); avs_writedata = d; avs_write = 1'b1;
    @(negedge clk);
    avs_write = 1'b0;
  endtask

  task automatic bus_read(int a, output logic [31:0] d);
    @(negedge clk);
    avs_address = 4'(a); avs_read = 1'b1;
    #4 d = avs_readdata;
    @(negedge clk);
    avs_read = 1'b0;
  endtask

  // SubBytes on the accelerator, as the software driver does it.
  task automatic hw_sub_bytes(aes_block_t s, output aes_block_t r);
    logic [31:0] d;
    int cycles;
    for (int i = 0; i < 4; i++) bus_write(i, s[127-32*i -: 32]);
    // While idle, the new input must not reach BLOCK_OUT.
    for (int i = 0; i < 4; i++) begin
      bus_read(4 + i, d);
      check(d == last_result[127-32*i -: 32], "BLOCK_OUT holds while the enable is low");
    end
    if (s != last_result) n_idle_holds++;
    @(negedge clk);
    avs_address = 4'd8; avs_writedata = 32'h1; avs_write = 1'b1;
    @(negedge clk);
    avs_write = 1'b0;
    n_sb_ops++;
    // Poll STATUS in consecutive cycles until done.
    avs_address = 4'd9; avs_read = 1'b1;
    cycles = 1;
    #4;
    while (!avs_readdata[0] && cycles < 20) begin
      n_busy_polls++;
      @(negedge clk);
      cycles++;
      #4;
    end
    @(negedge clk);
    avs_read = 1'b0;
    check(cycles == 2, $sformatf("SubBytes result two cycles after start (got %0d)", cycles));
    for (int i = 0; i < 4; i++) begin
      bus_read(4 + i, d);
      r[127-32*i -: 32] = d;
    end
    last_result = r;
  endtask

  task automatic codesign_encrypt(aes_block_t pt, aes_block_t key, output aes_block_t ct);
    logic [11*128-1:0] rk = expand_key_ref(key);
    aes_block_t s = pt ^ rk[0 +: 128];
    aes_block_t sb;
    for (int r = 1; r <= 10; r++) begin
      hw_sub_bytes(s, sb);
      // Software model of some processor work between accelerator calls.
      repeat (r) @(negedge clk);
      s = shift_rows_ref(sb);
      if (r != 10) s = mix_columns_ref(s);
      s ^= rk[128*r +: 128];
    end
    ct = s;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    aes_block_t ct, pt, key;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    begin
      logic [31:0] d;
      bus_read(9, d);
      check(d == 32'h0, "STATUS idle and not done after reset");
      bus_read(4, d);
      check(d == 32'h0, "BLOCK_OUT cleared by reset");
    end

    // FIPS-197 Appendix C.1 and Appendix B vectors.
    codesign_encrypt(128'h00112233445566778899aabbccddeeff,
                     128'h000102030405060708090a0b0c0d0e0f, ct);
    check(ct == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "FIPS-197 C.1 ciphertext");
    codesign_encrypt(128'h3243f6a8885a308d313198a2e0370734,
                     128'h2b7e151628aed2a6abf7158809cf4f3c, ct);
    check(ct == 128'h3925841d02dc09fbdc118597196a0b32, "FIPS-197 Appendix B ciphertext");

    // Random blocks against the software-only encryption.
    for (int i = 0; i < 6; i++) begin
      pt  = {$urandom, $urandom, $urandom, $urandom};
      key = {$urandom, $urandom, $urandom, $urandom};
      codesign_encrypt(pt, key, ct);
      check(ct == encrypt_ref(pt, key), $sformatf("random block %0d", i));
    end

    check(n_sb_ops == 80, "ten accelerator calls per block");
    check(n_busy_polls > 0, "handshake: busy seen while polling");
    check(n_idle_holds > 0, "idle hold (isolation and gating) exercised");
    $display("mechanisms: sb_ops=%0d busy_polls=%0d idle_holds=%0d",
             n_sb_ops, n_busy_polls, n_idle_holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
