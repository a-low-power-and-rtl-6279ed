// tb_lp_sb_accel: runs the 16-byte SubBytes accelerator on the FIPS-197
// worked example and on random blocks. Checks block_out one cycle after a
// single enable cycle, the done pulse, and that block_out holds while the
// enable is low and the input keeps changing.
module tb_lp_sb_accel;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1, enable = 1'b0, done;
  aes_block_t block_in = '0, block_out;
  int checks = 0, failures = 0;

  lp_sb_accel dut (.clk(clk), .rst_n(rst_n), .enable(enable),
                   .block_in(block_in), .block_out(block_out), .done(done));

  always #5 clk = ~clk;

  // Reset asserted shortly after time zero, so the asynchronous reset sees
  // a falling edge.
  initial #1 rst_n = 1'b0;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // One SubBytes operation: one enable cycle, then the cycles until done is
  // seen are counted.
  task automatic run_sb(aes_block_t blk, output int latency);
    @(negedge clk);
    block_in = blk;
    enable   = 1'b1;
    latency  = 0;
    check(done == 1'b0, "done low before result");
    do begin
      @(negedge clk);
      enable = 1'b0;
      latency++;
    end while (!done && latency < 8);
    check(done == 1'b1, "done seen");
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    aes_block_t blk, held;
    int lat;
    repeat (2) @(negedge clk);
    check(block_out == '0 && done == 1'b0, "reset values");
    rst_n = 1'b1;
    // Start of round 1 of the FIPS-197 example, and its SubBytes result.
    run_sb(128'h193de3bea0f4e22b9ac68d2ae9f84808, lat);
    check(block_out == 128'hd42711aee0bf98f1b8b45de51e415230, "FIPS-197 round 1 SubBytes");
    check(lat == 1, "one-cycle SubBytes");
    for (int i = 0; i < 200; i++) begin
      blk = {$urandom, $urandom, $urandom, $urandom};
      run_sb(blk, lat);
      check(block_out == sub_bytes_ref(blk), $sformatf("random block %0d", i));
      held = block_out;
      repeat (1 + i % 4) begin
        @(negedge clk);
        block_in = {$urandom, $urandom, $urandom, $urandom};
        check(block_out == held && done == 1'b0, "output held while idle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
