// lp_sb_accel: the full SubBytes accelerator, N LP-SB byte cells working in
// parallel on one block and sharing a single S-Box ROM.
//
// Each cell takes one byte of block_in and returns its substitute in the same
// byte position of block_out; the cells share the ROM through one read port
// each, so the entire SubBytes step of a 128-bit block (N = 16) takes one
// clock cycle. Operand isolation and clock gating sit in every cell and are
// all driven by the one enable input, so the whole unit is quiet while the
// processor works on the other AES steps.
//
// Byte k of the block is block_in[8*(N-1-k) +: 8] (first byte most
// significant); since SubBytes treats bytes alone, any order would work.
//
// Timing: raise enable for one cycle with block_in valid. At the rising edge
// that ends the cycle block_out takes S(block_in) and done goes high for one
// cycle, telling the processor the result is ready; block_out then holds
// until the next enable. done, on the free-running clock with an
// asynchronous active-low reset, is this design's choice for the completion
// signal that the accelerator it follows mentions but does not detail. N = 16
// is the number of cells of that accelerator.
module lp_sb_accel
  import aes_pkg::*;
#(
  parameter int unsigned N = AES_BLOCK_BYTES
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           enable,
  input  logic [8*N-1:0] block_in,
  output logic [8*N-1:0] block_out,
  output logic           done
);

  aes_byte_t rom_addr [N];
  aes_byte_t rom_data [N];

  sbox_rom #(.NPORTS(N)) u_sbox (
    .addr(rom_addr),
    .data(rom_data)
  );

  for (genvar k = 0; k < N; k++) begin : g_cell
    lp_sb u_cell (
      .clk     (clk),
      .rst_n   (rst_n),
      .enable  (enable),
      .din     (block_in[8*(N-1-k) +: 8]),
      .rom_addr(rom_addr[k]),
      .rom_data(rom_data[k]),
      .dout    (block_out[8*(N-1-k) +: 8])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) done <= 1'b0;
    else        done <= enable;
  end

  // done answers each enable cycle exactly one cycle later.
  a_done_follows_enable: assert property (
    @(posedge clk) disable iff (!rst_n) enable |=> done);

endmodule
