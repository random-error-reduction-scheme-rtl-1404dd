// sc_pkg: types and constant functions shared by the stochastic stream
// generators and the benchmark top.
//
// A stream of n = 2^M bits represents a probability E_X by carrying
// nE_X ones. Each input of a stochastic circuit is generated either as an
// MCAS (maximal concentrated autocorrelation sequence: all nE_X ones first,
// then zeros) or as a BS (Bernoulli-like sequence from an LFSR and a
// comparator). Which one each input gets is the "state vector" V of the
// error reduction scheme; here it is a parameter bit per input, 1 = BS.
//
// The LFSR feedback polynomials and the seed spreading function are this
// design's own choices: the reduction scheme only needs a maximal-length
// LFSR with a different seed per BS generator.
package sc_pkg;

  // Widest LFSR supported by the tap table below.
  localparam int unsigned MAX_W = 24;

  typedef enum logic {
    SEQ_MCAS = 1'b0,
    SEQ_BS   = 1'b1
  } seq_type_e;

  // Feedback taps of a Fibonacci LFSR that shifts towards the MSB and feeds
  // the XOR of the tapped bits into bit 0. Bit t-1 of the mask is set for
  // tap t of the polynomial x^M + ... ; every entry is maximal length
  // (period 2^M - 1).
  function automatic logic [MAX_W-1:0] lfsr_taps(input int unsigned m);
    logic [MAX_W-1:0] t;
    case (m)
      2:       t = 24'b0000_0000_0000_0000_0000_0011; // 2,1
      3:       t = 24'b0000_0000_0000_0000_0000_0110; // 3,2
      4:       t = 24'b0000_0000_0000_0000_0000_1100; // 4,3
      5:       t = 24'b0000_0000_0000_0000_0001_0100; // 5,3
      6:       t = 24'b0000_0000_0000_0000_0011_0000; // 6,5
      7:       t = 24'b0000_0000_0000_0000_0110_0000; // 7,6
      8:       t = 24'b0000_0000_0000_0000_1011_1000; // 8,6,5,4
      9:       t = 24'b0000_0000_0000_0001_0001_0000; // 9,5
      10:      t = 24'b0000_0000_0000_0010_0100_0000; // 10,7
      11:      t = 24'b0000_0000_0000_0101_0000_0000; // 11,9
      12:      t = 24'b0000_0000_0000_1000_0010_1001; // 12,6,4,1
      13:      t = 24'b0000_0000_0001_0000_0000_1101; // 13,4,3,1
      14:      t = 24'b0000_0000_0010_0000_0001_0101; // 14,5,3,1
      15:      t = 24'b0000_0000_0110_0000_0000_0000; // 15,14
      16:      t = 24'b0000_0000_1101_0000_0000_1000; // 16,15,13,4
      17:      t = 24'b0000_0001_0010_0000_0000_0000; // 17,14
      18:      t = 24'b0000_0010_0000_0100_0000_0000; // 18,11
      19:      t = 24'b0000_0100_0000_0000_0010_0011; // 19,6,2,1
      20:      t = 24'b0000_1001_0000_0000_0000_0000; // 20,17
      21:      t = 24'b0001_0100_0000_0000_0000_0000; // 21,19
      22:      t = 24'b0011_0000_0000_0000_0000_0000; // 22,21
      23:      t = 24'b0100_0010_0000_0000_0000_0000; // 23,18
      24:      t = 24'b1110_0001_0000_0000_0000_0000; // 24,23,22,17
      default: t = '0;
    endcase
    return t;
  endfunction

  // Non-zero m-bit seed for BS generator number idx. A 32-bit integer hash
  // (multiply-xorshift finaliser) of idx, truncated to m bits. A plain
  // multiple of idx would not do: 2*h is h shifted left by one, which is the
  // next state of a left-shifting LFSR, and two generators would then emit
  // the same stream one bit apart.
  function automatic logic [MAX_W-1:0] lfsr_seed(input int unsigned m,
                                                 input int unsigned idx);
    logic [31:0] h;
    logic [MAX_W-1:0] s;
    h = idx * 32'h9E37_79B9 + 32'h7F4A_7C15;
    h = h ^ (h >> 16);
    h = h * 32'h85EB_CA6B;
    h = h ^ (h >> 13);
    h = h * 32'hC2B2_AE35;
    h = h ^ (h >> 16);
    s = MAX_W'(h) & MAX_W'((64'd1 << m) - 1);
    if (s == '0) s = MAX_W'(1);
    return s;
  endfunction

endpackage
