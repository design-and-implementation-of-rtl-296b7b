// rev_seg7_pkg: shared types and constants of the reversible BCD to seven
// segment decoder.
//
// The seven segment functions are written as sums of minterms of the BCD input
// I[3:0] (a standard common-cathode digit map, segments lit high):
//   A = sum m(0,2,3,5,7,8,9)      B = sum m(0,1,2,3,4,7,8,9)
//   C = sum m(0,1,3,4,5,6,7,8,9)  D = sum m(0,2,3,5,6,8)
//   E = sum m(0,2,6,8)            F = sum m(0,4,5,6,8,9)
//   G = sum m(2,3,4,5,6,8,9)
// Minterms 10..15 (not valid BCD) belong to no segment, so those codes leave
// the display dark. SEG_MINTERMS holds each sum as a 16-bit mask, bit k set
// when minterm k belongs to the segment. The constant functions below derive,
// at elaboration time, how many copies of each minterm the fan-out stage must
// make and which copy feeds which input of which segment's OR chain.
package rev_seg7_pkg;

  localparam int unsigned NUM_SEG     = 7;   // segments A..G
  localparam int unsigned NUM_MINTERM = 16;  // outputs of the 4-to-16 decoder

  // Segment index: A=0 ... G=6.
  typedef enum logic [2:0] {
    SEG_A = 3'd0, SEG_B = 3'd1, SEG_C = 3'd2, SEG_D = 3'd3,
    SEG_E = 3'd4, SEG_F = 3'd5, SEG_G = 3'd6
  } seg_idx_e;

  // Segment drive word, G in the MSB and A in the LSB.
  typedef struct packed {
    logic g;
    logic f;
    logic e;
    logic d;
    logic c;
    logic b;
    logic a;
  } seg7_t;

  // Minterm masks of segments A..G (entry s is segment s; bit k is minterm k).
  localparam logic [NUM_SEG-1:0][NUM_MINTERM-1:0] SEG_MINTERMS = '{
    16'b0000_0011_0111_1100,  // G: 2,3,4,5,6,8,9
    16'b0000_0011_0111_0001,  // F: 0,4,5,6,8,9
    16'b0000_0001_0100_0101,  // E: 0,2,6,8
    16'b0000_0001_0110_1101,  // D: 0,2,3,5,6,8
    16'b0000_0011_1111_1011,  // C: 0,1,3,4,5,6,7,8,9
    16'b0000_0011_1001_1111,  // B: 0,1,2,3,4,7,8,9
    16'b0000_0011_1010_1101   // A: 0,2,3,5,7,8,9
  };

  // Number of minterms summed by segment s.
  function automatic int unsigned seg_terms(int unsigned s);
    int unsigned n = 0;
    for (int unsigned k = 0; k < NUM_MINTERM; k++)
      if (SEG_MINTERMS[s][k]) n++;
    return n;
  endfunction

  // Number of segments that use minterm k, i.e. copies the fan-out must make.
  function automatic int unsigned minterm_uses(int unsigned k);
    int unsigned n = 0;
    for (int unsigned s = 0; s < NUM_SEG; s++)
      if (SEG_MINTERMS[s][k]) n++;
    return n;
  endfunction

  // Position of minterm k among the inputs of segment s's OR chain.
  function automatic int unsigned term_pos(int unsigned s, int unsigned k);
    int unsigned n = 0;
    for (int unsigned j = 0; j < k; j++)
      if (SEG_MINTERMS[s][j]) n++;
    return n;
  endfunction

  // Which copy of minterm k goes to segment s: copies are handed out in
  // segment order A..G.
  function automatic int unsigned copy_idx(int unsigned s, int unsigned k);
    int unsigned n = 0;
    for (int unsigned t = 0; t < s; t++)
      if (SEG_MINTERMS[t][k]) n++;
    return n;
  endfunction

endpackage
