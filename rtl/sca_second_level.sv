// Second level of the self-checking full adder: the two-from-four code.
//
// Four gates turn the one-from-eight S signals into the double-rail sum
// (Z_1, Z_0) and carry-out (G_1, G_0). A gate goes HIGH when any S signal of
// its set is LOW:
//   Z_1 (sum = 1)      from S_1 S_2 S_4 S_7
//   Z_0 (sum = 0)      from S_0 S_3 S_5 S_6
//   G_1 (carry = 1)    from S_3 S_5 S_6 S_7
//   G_0 (carry = 0)    from S_0 S_1 S_2 S_4
// With one S LOW exactly two of the four wires are HIGH, one of each pair, so
// X + Y + C = 2G + Z. All S HIGH (passive) gives all four LOW; all S LOW
// (fault injection) gives all four HIGH.
//
// Interface: s (S_7..S_0), z and g (double rail, h = variable). Purely
// combinational. The sets follow from the original design's table of
// faultless states; the four-input NAND is the simplest gate that meets it.
module sca_second_level
  import sca_pkg::*;
(
  input  logic [7:0] s,
  output dual_rail_t z,
  output dual_rail_t g
);

  // Gate outputs Z_1 Z_0 G_1 G_0 (bit 3 down to bit 0).
  logic [3:0] zg;

  always_comb begin
    zg[3] = ~(s[1] & s[2] & s[4] & s[7]);  // Z_1
    zg[2] = ~(s[0] & s[3] & s[5] & s[6]);  // Z_0
    zg[1] = ~(s[3] & s[5] & s[6] & s[7]);  // G_1
    zg[0] = ~(s[0] & s[1] & s[2] & s[4]);  // G_0
    z = '{h: zg[3], l: zg[2]};
    g = '{h: zg[1], l: zg[0]};
  end

endmodule
