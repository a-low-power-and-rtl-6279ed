// sb_bus_slave: memory-mapped slave through which the processor uses the
// SubBytes accelerator.
//
// The processor runs key expansion, AddRoundKey, ShiftRows and MixColumns in
// software and hands the state to the hardware only for SubBytes. This block
// is the meeting point: a 32-bit slave in the style of an Avalon-MM port with
// zero read latency and no wait states (write, read, word address, writedata,
// combinational readdata). The port style and the register map below are this
// design's choices; the system it follows links the accelerator to its
// processor with a system-integration tool and says only that an enable
// signal tells each side when the other has data for it.
//
// Register map, word addresses, NW = N/4 words per block (NW = 4 for N = 16):
//   0 .. NW-1       BLOCK_IN   read/write, word 0 = bits [8N-1 -: 32]
//   NW .. 2NW-1     BLOCK_OUT  read only,  same layout, from the accelerator
//   2NW             CTRL       write bit 0 = 1: start SubBytes; reads 0
//   2NW+1           STATUS     bit 0 done (set when the result is ready,
//                              cleared by a start), bit 1 busy
// Writes to read-only words are ignored; unmapped words read 0.
//
// Timing: a start write at edge t drives sb_enable high for the cycle after
// t; the accelerator stores its result at edge t+1, and from then on
// BLOCK_OUT holds it and STATUS.done reads 1 (the accelerator's done pulse is
// passed straight to the status word in that first cycle and kept in a
// sticky bit after it). BLOCK_IN may already be rewritten in the enable
// cycle: the write lands at edge t+1, after the accelerator has sampled the
// old value at that same edge. sb_enable is low in every other cycle, which is what keeps the accelerator's isolated inputs and
// gated registers quiet.
module sb_bus_slave
  import aes_pkg::*;
#(
  parameter int unsigned N      = AES_BLOCK_BYTES,
  parameter int unsigned NW     = N / 4,
  parameter int unsigned ADDR_W = $clog2(2 * NW + 2)
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor side
  input  logic [ADDR_W-1:0] address,
  input  logic              write,
  input  logic [31:0]       writedata,
  input  logic              read,
  output logic [31:0]       readdata,
  // accelerator side
  output logic              sb_enable,
  output logic [8*N-1:0]    sb_block_in,
  input  logic [8*N-1:0]    sb_block_out,
  input  logic              sb_done
);

  localparam int unsigned CTRL_ADDR   = 2 * NW;
  localparam int unsigned STATUS_ADDR = 2 * NW + 1;
  localparam int unsigned IDX_W       = (NW > 1) ? $clog2(NW) : 1;

  logic [31:0] block_in_q [NW];
  logic        done_q;
  logic        start;
  logic [IDX_W-1:0] word;

  // Word index within a block region (address bits below the region select).
  assign word = IDX_W'(address);

  assign start = write && (address == ADDR_W'(CTRL_ADDR)) && writedata[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int w = 0; w < NW; w++) block_in_q[w] <= '0;
      sb_enable <= 1'b0;
      done_q    <= 1'b0;
    end else begin
      if (write && address < ADDR_W'(NW))
        block_in_q[word] <= writedata;
      sb_enable <= start;
      if (start)        done_q <= 1'b0;
      else if (sb_done) done_q <= 1'b1;
    end
  end

  always_comb begin
    for (int w = 0; w < NW; w++)
      sb_block_in[8*N-1-32*w -: 32] = block_in_q[w];
  end

  always_comb begin
    readdata = '0;
    if (read) begin
      if (address < ADDR_W'(NW))
        readdata = block_in_q[word];
      else if (address < ADDR_W'(2 * NW))
        readdata = sb_block_out[8*N-1-32*(int'(address)-NW) -: 32];
      else if (address == ADDR_W'(STATUS_ADDR))
        readdata = {30'd0, sb_enable, done_q | sb_done};
    end
  end

  // The accelerator enable is a single-cycle pulse per start.
  a_enable_pulse: assert property (
    @(posedge clk) disable iff (!rst_n) sb_enable |=> !sb_enable || $past(start));

  // A block is NW whole 32-bit words.
  initial assert (N % 4 == 0) else $error("N must be a multiple of 4");

endmodule
