// aes_pkg: types and constants shared by the SubBytes accelerator.
//
// The AES state is 128 bits, 16 bytes. Byte k of the state (k = 0 first, in
// the column-major order of the AES standard) sits in bits [127-8k -: 8] of a
// 128-bit vector, so the byte that arrives first in a byte stream is the most
// significant. SubBytes acts on each byte alone, so this order only matters
// for the bus word layout and for the software steps around the accelerator.
// The 16-byte block and the 256-entry S-Box are fixed by AES-128; the byte
// order is this design's choice.
package aes_pkg;

  // Bytes in one AES block; the accelerator has one LP-SB cell per byte.
  localparam int unsigned AES_BLOCK_BYTES = 16;
  localparam int unsigned AES_BLOCK_BITS  = 8 * AES_BLOCK_BYTES;

  // Entries in the S-Box: one per possible byte value.
  localparam int unsigned SBOX_DEPTH = 256;

  typedef logic [7:0]                aes_byte_t;
  typedef logic [AES_BLOCK_BITS-1:0] aes_block_t;

endpackage
