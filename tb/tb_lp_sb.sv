// tb_lp_sb: drives one LP-SB byte cell with the S-Box ROM modelled from the
// reference table. Checks the S-Box address (16*row + column), the operand
// isolation (address 0 while enable is low), the one-cycle result, and that
// the gated output register holds while enable is low.
module tb_lp_sb;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1, enable = 1'b0;
  aes_byte_t din = '0, rom_addr, rom_data, dout;
  int checks = 0, failures = 0;

  lp_sb dut (.clk(clk), .rst_n(rst_n), .enable(enable), .din(din),
             .rom_addr(rom_addr), .rom_data(rom_data), .dout(dout));

  // ROM model: the reference S-Box, read combinationally.
  assign rom_data = sbox_ref(rom_addr);

  always #5 clk = ~clk;

  // Reset asserted shortly after time zero, so the asynchronous reset sees
  // a falling edge.
  initial #1 rst_n = 1'b0;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    aes_byte_t last;
    repeat (2) @(negedge clk);
    check(dout == 8'h00, "reset value");
    rst_n = 1'b1;
    // Every byte value once, each followed by an idle cycle with new data.
    for (int v = 0; v < 256; v++) begin
      @(negedge clk);
      enable = 1'b1;
      din    = 8'(v);
      #1;
      check(rom_addr == 8'(v), $sformatf("address for %02h", v));
      @(negedge clk);
      check(dout == sbox_ref(8'(v)), $sformatf("S(%02h) one cycle after enable", v));
      last   = dout;
      enable = 1'b0;
      din    = 8'($urandom);
      #1;
      check(rom_addr == 8'h00, "operand isolated while enable low");
      @(negedge clk);
      check(dout == last, "output held while enable low");
    end
    // A long idle stretch with changing data leaves the output alone.
    repeat (20) begin
      @(negedge clk); din = 8'($urandom);
      check(dout == last, "output held over idle stretch");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
