// lp_sb: one byte of the low-power SubBytes unit (LP-SB).
//
// The input byte first passes an AND with the enable (operand isolation):
// while enable is low the cell sees 8'h00, so the adder and the S-Box read
// port do not toggle when the processor changes the data it will later hand
// over. The isolated byte is split into nibbles; the high nibble, shifted left
// by four (times 16), is added to the low nibble to form the address of the
// S-Box entry, which lies at 16*row + column in a ROM with contiguous
// addresses. The S-Box is not inside the cell: the address goes out on
// rom_addr and the entry comes back on rom_data, so that many cells can share
// one ROM. The entry is stored in the output register, whose clock is gated by
// the same enable, so the register is clocked only when a result is wanted.
//
// All of this structure follows the accelerator this design implements. The
// asynchronous active-low reset of the output register is this design's own
// addition, so that dout is defined before the first use.
//
// Timing: hold enable high for one clock cycle with din valid; dout shows
// S(din) after the rising edge that ends that cycle and keeps it until the
// next cycle with enable high.
module lp_sb
  import aes_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      enable,
  input  aes_byte_t din,
  output aes_byte_t rom_addr,
  input  aes_byte_t rom_data,
  output aes_byte_t dout
);

  aes_byte_t din_iso;
  logic      gclk;

  // Operand isolation.
  assign din_iso  = din & {8{enable}};

  // Row (high nibble) times 16 plus column (low nibble).
  assign rom_addr = ({4'h0, din_iso[7:4]} << 4) + {4'h0, din_iso[3:0]};

  clock_gate u_cg (
    .clk (clk),
    .en  (enable),
    .gclk(gclk)
  );

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) dout <= '0;
    else        dout <= rom_data;
  end

endmodule
