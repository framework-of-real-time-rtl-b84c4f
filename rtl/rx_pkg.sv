// rx_pkg: constants, types and elaboration-time functions shared by the
// Nyquist-WDM receiver.
//
// Sample format: every data path between stages is a 12-bit signed word,
// full scale +/-2047, the width of the ADC. Filter coefficients are 18-bit
// signed Q2.16 (the multiplier width of the target FPGA's DSP slices).
//
// Bit conventions of the 4-QAM symbol (b1,b0), from the constellation the
// receiver decodes: 00 = +I, 01 = -I, 11 = +Q, 10 = -Q. b1 selects the axis
// (1 when |Q| > |I|), b0 the side. The serial bit stream carries b1 first.
//
// Each module imports only the constants it needs, so a lint run over one
// module (or over this package alone) reports the others as unused
// parameters; every constant here is used somewhere in the design.
//
// Test data block (this design's choice where the source only outlines it):
// a 2048-bit block = 20 synchronisation bits (alternating +I/-I symbols),
// Barker-11 / one spare bit / negated Barker-11 / one spare bit (bits 21-44),
// Barker-13 / negated Barker-13 (bits 45-70), then a PRBS-9 payload.
// The checker compares the 2176 bits that follow the Barker-13 pair; they
// are stored in check_rom.hex (bit (70 + a) mod 2048 of the block at line a,
// PRBS-9 x^9 + x^5 + 1, seed 9'h1FF, output taken from the register's MSB
// before each shift).
package rx_pkg;

  localparam int SW       = 12;        // sample width
  localparam int CW       = 18;        // coefficient width
  localparam int CFRAC    = 16;        // coefficient fraction bits
  localparam int FULL     = 2047;      // normalizer full scale

  // Test block: 2048 bits (2^15 transmit points / 32 points per symbol *
  // 2 bits); Barker-11 starts at bit 20, Barker-13 at bit 44, the payload at
  // bit 70 (0-based).
  localparam int CHECK_BITS = 2176;    // bits compared by the data checker

  // CORDIC angle table: atan(2^-i) in units of 2^-16 turn (2*pi = 65536)
  localparam int CORDIC_ITER = 16;
  localparam logic [15:0] ATAN_TAB [CORDIC_ITER] = '{
    16'd8192, 16'd4836, 16'd2555, 16'd1297, 16'd651, 16'd326, 16'd163, 16'd81,
    16'd41,   16'd20,   16'd10,   16'd5,    16'd3,   16'd1,   16'd1,   16'd0};
  // CORDIC gain compensation 1/1.64676 in Q2.14
  localparam int CORDIC_K_Q14 = 9949;

  typedef logic signed [SW-1:0] sample_t;
  typedef logic signed [CW-1:0] coef_t;

  // Barker codes in transmission order, first bit at index 0, '1' = +1.
  localparam logic [10:0] BARKER11 = 11'b11100010010; // + + + - - - + - - + -
  localparam logic [12:0] BARKER13 = 13'b1111100110101; // + + + + + - - + + - + - +

  // i-th transmitted bit of a code (MSB first)
  function automatic logic b11(int i); return BARKER11[10-i]; endfunction
  function automatic logic b13(int i); return BARKER13[12-i]; endfunction

  // Rotation of a 4-QAM symbol by +90 degrees (counter-clockwise):
  // +I -> +Q -> -I -> -Q -> +I, i.e. 00 -> 11 -> 01 -> 10 -> 00.
  function automatic logic [1:0] rot90(logic [1:0] s);
    return {~s[1], ~(s[1] ^ s[0])};
  endfunction

  // Rotate by k quarter turns counter-clockwise (k = 0..3)
  function automatic logic [1:0] rotk(logic [1:0] s, int k);
    logic [1:0] r;
    r = s;
    for (int j = 0; j < k; j++) r = rot90(r);
    return r;
  endfunction

  // Barker-11 (neg=0) or its negation (neg=1) as received after a rotation
  // of k quarter turns. Bit i in transmission order; the code starts on a
  // symbol boundary, so bits (2j, 2j+1) form symbol j. The 11th bit is b1 of
  // symbol 5, whose rotated value depends only on itself.
  function automatic logic [10:0] rotated_b11(int k, bit neg);
    logic [11:0] v;
    logic [10:0] out;
    logic [1:0] s;
    for (int i = 0; i < 11; i++) v[i] = b11(i) ^ neg;
    v[11] = 1'b0;
    for (int j = 0; j < 6; j++) begin
      s = rotk({v[2*j], v[2*j+1]}, k);
      v[2*j] = s[1];
      v[2*j+1] = s[0];
    end
    for (int i = 0; i < 11; i++) out[i] = v[i];
    return out;
  endfunction

  // Observation bundle of the top level (the signals the source watched with
  // its logic analyzer core).
  typedef struct packed {
    logic [7:0]         tick_count;      // generic_counter value
    logic               we_net;          // DataSort write enable
    logic               rd_net;          // DataSort read enable
    logic               checkdoneright;
    logic               checkdonewrong;
    logic               trig_sample;     // symbol strobe of the timing loop
    logic signed [31:0] loop_v;          // timing loop filter output
    logic               fifo_full;       // receiver symbol FIFOs
    logic               fifo_empty;
    logic [11:0]        fifo_count;
    logic [2:0]         shift_trig;      // latched 90/-90/180 triggers
    logic [2:0]         shift_pulse;
    logic               shift_phase;
    logic               barker_trig_i;
    logic               barker_trig_q;
    logic [11:0]        check_index;
    logic [11:0]        errorcount_last;
  } rx_debug_t;
endpackage
