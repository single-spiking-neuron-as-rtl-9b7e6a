// quarter_sine_lut -- 256 x 8 ROM holding the first quarter of a sine period.
//
// Entry i holds round(2^6 * sin(pi/2 * (i + 0.5) / 256)), an unsigned 2.6
// fixed-point number from 0 to 1.0 (0x40).  Sampling at half-step offsets
// makes the table an exact mirror image of itself under address inversion,
// so the second quadrant can be read with the one's complement of the
// address.  The contents are loaded from rtl/quarter_sine.hex.
//
// Timing: synchronous read; `data` shows the entry at `addr` one clock after
// `addr` is presented (a block-RAM style ROM).  The size (256 bytes, 2048
// bits) and the 2.6 format follow the specification; the half-step sampling
// and the scale of 1.0 are this design's choices.
module quarter_sine_lut
  import ddfs_pkg::*;
#(
  parameter int unsigned ADDR_W    = ddfs_pkg::LUT_ADDR_W,
  parameter int unsigned DATA_W    = ddfs_pkg::LUT_DATA_W,
  parameter string       INIT_FILE = "rtl/quarter_sine.hex"
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] data
);

  logic [DATA_W-1:0] rom [2**ADDR_W];

  initial $readmemh(INIT_FILE, rom);

  always_ff @(posedge clk) data <= rom[addr];

endmodule
