// tb_sb_bus_slave: exercises the register map of the bus slave with a small
// accelerator model (block_out becomes the bitwise inverse of block_in one
// cycle after the enable pulse, with done). Checks read-back of BLOCK_IN,
// the single-cycle enable pulse, the done/busy status bits, BLOCK_OUT words
// and that unmapped or read-only words behave.
module tb_sb_bus_slave;
  import aes_pkg::*;

  localparam int unsigned AW = 4;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [AW-1:0] address = '0;
  logic write = 1'b0, read = 1'b0;
  logic [31:0] writedata = '0, readdata;
  logic sb_enable, sb_done = 1'b0;
  aes_block_t sb_block_in, sb_block_out = '0;
  int checks = 0, failures = 0;
  int pulses = 0;

  sb_bus_slave dut (
    .clk(clk), .rst_n(rst_n), .address(address), .write(write),
    .writedata(writedata), .read(read), .readdata(readdata),
    .sb_enable(sb_enable), .sb_block_in(sb_block_in),
    .sb_block_out(sb_block_out), .sb_done(sb_done));

  // Accelerator model.
  always @(posedge clk) begin
    sb_done <= sb_enable;
    if (sb_enable) sb_block_out <= ~sb_block_in;
    if (sb_enable) pulses++;
  end

  always #5 clk = ~clk;

  // Reset asserted shortly after time zero, so the asynchronous reset sees
  // a falling edge.
  initial #1 rst_n = 1'b0;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic bus_write(int a, logic [31:0] d);
    @(negedge clk);
    address = AW'(a); writedata = d; write = 1'b1;
    @(negedge clk);
    write = 1'b0;
  endtask

  task automatic bus_read(int a, output logic [31:0] d);
    @(negedge clk);
    address = AW'(a); read = 1'b1;
    #4 d = readdata;
    @(negedge clk);
    read = 1'b0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w [4];
    logic [31:0] d;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    bus_read(9, d);
    check(d == 32'h0, "status after reset");
    for (int n = 0; n < 20; n++) begin
      for (int i = 0; i < 4; i++) begin
        w[i] = $urandom;
        bus_write(i, w[i]);
      end
      check(sb_block_in == {w[0], w[1], w[2], w[3]}, "block_in layout, word 0 most significant");
      check(sb_enable == 1'b0, "enable low while idle");
      for (int i = 0; i < 4; i++) begin
        bus_read(i, d);
        check(d == w[i], $sformatf("BLOCK_IN word %0d read-back", i));
      end
      // Start; the enable pulse follows the write, done one cycle later.
      @(negedge clk);
      address = AW'(8); writedata = 32'h1; write = 1'b1;
      @(negedge clk);
      write = 1'b0;
      check(sb_enable == 1'b1, "enable pulse after start");
      address = AW'(9); read = 1'b1; #4;
      check(readdata == 32'h2, "status busy, not done, during pulse");
      @(negedge clk);
      check(sb_enable == 1'b0, "enable pulse lasts one cycle");
      #4;
      check(readdata == 32'h1, "status done one cycle after pulse");
      @(negedge clk);
      read = 1'b0;
      for (int i = 0; i < 4; i++) begin
        bus_read(4 + i, d);
        check(d == ~w[i], $sformatf("BLOCK_OUT word %0d", i));
      end
      // Read-only and unmapped words.
      bus_write(4, 32'hDEAD_BEEF);
      bus_read(4, d);
      check(d == ~w[0], "BLOCK_OUT not writable");
      bus_read(8, d);
      check(d == 32'h0, "CTRL reads 0");
      bus_read(12, d);
      check(d == 32'h0, "unmapped word reads 0");
      // A CTRL write with bit 0 clear does not start.
      bus_write(8, 32'h0);
      bus_read(9, d);
      check(d == 32'h1, "done stays set without a start");
    end
    check(pulses == 20, "one enable pulse per start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
