// tb_aes_workload: encrypts runs of 1, 1,000 and 10,000 blocks through the
// co-design, the block counts of the execution-time comparison this design
// is measured by, and checks every ciphertext against a software-only
// encryption.
//
// The testbench is the processor: key expansion, AddRoundKey, ShiftRows and
// MixColumns in software, SubBytes on the accelerator through the bus slave
// (write BLOCK_IN, start, poll STATUS.done, read BLOCK_OUT). Blocks are
// encrypted one after another (ECB) under one key; the plaintexts are a
// counter mixed with random words. It reports the bus-side clock cycles the
// hardware SubBytes took per block. The top runs at its default parameters.
module tb_aes_workload;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  localparam int RUNS = 3;
  localparam int RUN_BLOCKS [RUNS] = '{1, 1000, 10000};

  logic clk = 1'b0, rst_n = 1'b1;
  logic [3:0]  avs_address = '0;
  logic        avs_write = 1'b0, avs_read = 1'b0;
  logic [31:0] avs_writedata = '0, avs_readdata;
  int checks = 0, failures = 0;
  longint cycle = 0;
  int n_sb_ops = 0, n_busy_polls = 0;

  aes_codesign_top dut (
    .clk(clk), .rst_n(rst_n),
    .avs_address(avs_address), .avs_write(avs_write),
    .avs_writedata(avs_writedata), .avs_read(avs_read),
    .avs_readdata(avs_readdata));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial #1 rst_n = 1'b0;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

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

  task automatic hw_sub_bytes(aes_block_t s, output aes_block_t r);
    logic [31:0] d;
    int polls;
    for (int i = 0; i < 4; i++) bus_write(i, s[127-32*i -: 32]);
    bus_write(8, 32'h1);
    n_sb_ops++;
    polls = 0;
    do begin
      bus_read(9, d);
      polls++;
      if (!d[0]) n_busy_polls++;
    end while (!d[0] && polls < 20);
    check(d[0] == 1'b1, "SubBytes done");
    for (int i = 0; i < 4; i++) begin
      bus_read(4 + i, d);
      r[127-32*i -: 32] = d;
    end
  endtask

  task automatic codesign_encrypt(aes_block_t pt, logic [11*128-1:0] rk, output aes_block_t ct);
    aes_block_t s = pt ^ rk[0 +: 128];
    aes_block_t sb;
    for (int r = 1; r <= 10; r++) begin
      hw_sub_bytes(s, sb);
      s = shift_rows_ref(sb);
      if (r != 10) s = mix_columns_ref(s);
      s ^= rk[128*r +: 128];
    end
    ct = s;
  endtask

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    aes_block_t key, pt, ct;
    logic [11*128-1:0] rk;
    longint c0;
    int bad;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    rk  = expand_key_ref(key);
    for (int run = 0; run < RUNS; run++) begin
      bad = 0;
      c0  = cycle;
      for (int b = 0; b < RUN_BLOCKS[run]; b++) begin
        pt = (b == 0) ? 128'h3243f6a8885a308d313198a2e0370734
                      : {32'(b), $urandom, $urandom, $urandom};
        codesign_encrypt(pt, rk, ct);
        checks++;
        if (ct != encrypt_ref(pt, key)) begin
          bad++;
          failures++;
          if (bad <= 5) $display("FAIL run %0d block %0d", run, b);
        end
      end
      $display("run of %0d blocks: %0d mismatches, %0d cycles, %0d cycles per block",
               RUN_BLOCKS[run], bad, cycle - c0, (cycle - c0) / RUN_BLOCKS[run]);
    end
    check(n_sb_ops == 10 * 11001, "ten accelerator calls per block");
    check(n_busy_polls == 0, "with one bus cycle per poll, done is already set at the first poll");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
