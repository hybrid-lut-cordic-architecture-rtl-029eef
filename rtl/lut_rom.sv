// lut_rom: 4 x 2-bit correction ROM.
//
// Near the ends of the first quadrant the 10-bit sine (85.5..90 deg) and
// cosine (0..4.5 deg) differ only in their two least significant bits; the
// upper eight bits are all ones. The ROM stores those two LSBs for each of
// the four angle groups: group 0 -> 00 (0x3FC), group 1 -> 01 (0x3FD),
// group 2 -> 10 (0x3FE), group 3 -> 11 (0x3FF). The contents are the
// published precomputed values; the group numbering is this design's own.
//
// Interface: addr (group) -> data (two LSBs). Combinational, no clock.
module lut_rom (
  input  logic [1:0] addr,
  output logic [1:0] data
);

  localparam logic [1:0] ROM [4] = '{2'b00, 2'b01, 2'b10, 2'b11};

  assign data = ROM[addr];

endmodule
