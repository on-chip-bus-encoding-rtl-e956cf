// lc_bus_pkg: constants and helper functions shared by the encoded on-chip
// bus links.
//
// Two link styles live in this design:
//  * the bus-invert link, which stops more than about half of the data wires
//    from switching in the same direction in one cycle (the pattern that gives
//    the longest delay when mutual inductance dominates), and
//  * the flexible code-set link, which maps each k-bit data word onto one of
//    2**k codes of an m-bit bus chosen offline so that every transition between
//    two codes meets a delay constraint.
//
// The numbers here follow the described design where it gives them: an 8-bit
// bus is its typical bus-invert width, and the 2-bit to 3-bit code set
// {000, 001, 100, 101} is its worked example. The order in which data words are
// assigned to those four codes is this design's own choice (ascending).
package lc_bus_pkg;

  // Typical bus-invert data width (8-bit bus used for the encoder delay study).
  localparam int unsigned BI_WIDTH_DEFAULT = 8;

  // Worked flexible-encoding example: 2 data bits carried on 3 wires.
  localparam int unsigned FLEX_K_DEFAULT = 2;
  localparam int unsigned FLEX_M_DEFAULT = 3;
  // Code table, entry d at bits [d*M +: M]: 00->000, 01->001, 10->100, 11->101.
  localparam logic [(2**FLEX_K_DEFAULT)*FLEX_M_DEFAULT-1:0] FLEX_CODES_DEFAULT =
      {3'b101, 3'b100, 3'b001, 3'b000};

  // Majority threshold of the bus-invert voters: ceil((N+1)/2) of N inputs.
  function automatic int unsigned bi_threshold(input int unsigned n);
    return (n + 2) / 2;
  endfunction

  // Largest number of wires (data wires plus the invert wire) that may switch
  // in the same direction in one cycle after bus-invert encoding:
  // (N+1)/2 for odd N, N/2 for even N.
  function automatic int unsigned bi_same_dir_bound(input int unsigned n);
    return (n % 2 == 1) ? (n + 1) / 2 : n / 2;
  endfunction

  // Direction of a wire between two consecutive bus words.
  typedef enum logic [1:0] {
    WIRE_STABLE  = 2'b00,
    WIRE_RISING  = 2'b01,
    WIRE_FALLING = 2'b10
  } wire_dir_e;

endpackage
