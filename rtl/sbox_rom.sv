// sbox_rom: the AES S-Box as a 256 x 8 read-only memory with NPORTS
// combinational read ports.
//
// Every LP-SB byte cell reads the same table, so the accelerator holds one
// copy of it and gives each cell its own read port; all ports answer in the
// same cycle, which lets the whole SubBytes step finish in one clock. The
// address is the input byte, high nibble as the row and low nibble as the
// column of the usual 16 x 16 table, so row r, column c sits at address
// 16*r + c.
//
// The contents are computed at elaboration rather than pasted in: entry a is
// the affine transform of the multiplicative inverse of a in GF(2^8) with
// polynomial x^8+x^4+x^3+x+1 (0 maps to 0), i.e.
//   s = b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 8'h63,
// with the inverse taken as a^254. Synthesis turns the constant table into a
// ROM or into logic; the design keeps one shared ROM, as the accelerator it
// follows does. The read is purely combinational: no clock, no latency.
module sbox_rom
  import aes_pkg::*;
#(
  parameter int unsigned NPORTS = AES_BLOCK_BYTES
) (
  input  aes_byte_t addr [NPORTS],
  output aes_byte_t data [NPORTS]
);

  // GF(2^8) product, shift-and-add with reduction by 0x11B.
  function automatic aes_byte_t gf_mul(aes_byte_t a, aes_byte_t b);
    aes_byte_t p = '0;
    aes_byte_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = {x[6:0], 1'b0} ^ (x[7] ? 8'h1B : 8'h00);
    end
    return p;
  endfunction

  // a^254 = a^-1 for a != 0, and 0 for a == 0.
  function automatic aes_byte_t gf_inv(aes_byte_t a);
    aes_byte_t r = 8'h01;
    aes_byte_t s = a;
    for (int i = 0; i < 8; i++) begin
      if (((254 >> i) & 1) != 0) r = gf_mul(r, s);
      s = gf_mul(s, s);
    end
    return r;
  endfunction

  function automatic aes_byte_t affine(aes_byte_t b);
    return b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]}
             ^ {b[3:0], b[7:4]} ^ 8'h63;
  endfunction

  // The whole table packed into one constant, entry a in bits [8a +: 8].
  function automatic logic [8*SBOX_DEPTH-1:0] build_table();
    logic [8*SBOX_DEPTH-1:0] t = '0;
    for (int a = 0; a < SBOX_DEPTH; a++)
      t[8*a +: 8] = affine(gf_inv(8'(a)));
    return t;
  endfunction

  localparam logic [8*SBOX_DEPTH-1:0] SBOX_TABLE = build_table();

  always_comb begin
    for (int p = 0; p < NPORTS; p++)
      data[p] = SBOX_TABLE[8*addr[p] +: 8];
  end

endmodule
