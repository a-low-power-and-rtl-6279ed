// aes_codesign_top: hardware half of a hardware/software AES-128 encoder in
// which only SubBytes runs in hardware.
//
// A processor (outside this module) runs the AES rounds in software: key
// expansion, AddRoundKey, ShiftRows and MixColumns. SubBytes, the step that
// takes most of the software run time, is done by the LP-SB accelerator: 16
// byte cells with one shared S-Box ROM that substitute a whole 128-bit state
// in one clock cycle. Each cell isolates its input with an AND on the enable
// and clock-gates its output register, so the accelerator hardly switches
// during the long stretches in which the processor works on the other steps.
// The processor reaches the accelerator through a memory-mapped slave port,
// the top's ports; the register map and timing are described in
// sb_bus_slave. One encryption uses the accelerator ten times, once per
// round.
//
// The partition (only SubBytes in hardware), the cell structure and N = 16
// follow the co-design this RTL implements; the bus port, the register map
// and the reset are this design's own choices.
module aes_codesign_top
  import aes_pkg::*;
#(
  parameter int unsigned N      = AES_BLOCK_BYTES,
  parameter int unsigned ADDR_W = $clog2(2 * (N / 4) + 2)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] avs_address,
  input  logic              avs_write,
  input  logic [31:0]       avs_writedata,
  input  logic              avs_read,
  output logic [31:0]       avs_readdata
);

  logic           sb_enable;
  logic           sb_done;
  logic [8*N-1:0] sb_block_in;
  logic [8*N-1:0] sb_block_out;

  sb_bus_slave #(.N(N), .ADDR_W(ADDR_W)) u_slave (
    .clk         (clk),
    .rst_n       (rst_n),
    .address     (avs_address),
    .write       (avs_write),
    .writedata   (avs_writedata),
    .read        (avs_read),
    .readdata    (avs_readdata),
    .sb_enable   (sb_enable),
    .sb_block_in (sb_block_in),
    .sb_block_out(sb_block_out),
    .sb_done     (sb_done)
  );

  lp_sb_accel #(.N(N)) u_accel (
    .clk      (clk),
    .rst_n    (rst_n),
    .enable   (sb_enable),
    .block_in (sb_block_in),
    .block_out(sb_block_out),
    .done     (sb_done)
  );

endmodule
