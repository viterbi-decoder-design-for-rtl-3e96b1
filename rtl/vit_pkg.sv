// vit_pkg: types, constants and trellis functions shared by the UWB Viterbi
// decoder.
//
// The code is the rate-1/3, constraint-length-7 convolutional code of the
// multiband-OFDM UWB physical layer, punctured to the higher rates. A trellis
// state is the last six information bits with the newest bit in bit 0, so a
// radix-4 step (two information bits u1 then u2) moves state p to
// {p[3:0], u1, u2}; the two low bits of a state are therefore the two bits
// decoded for the step that entered it. Soft values are 3 bits, 0 = strong
// zero, 7 = strong one. Everything here is combinational or constant.
//
// The generator taps, the state numbering and the 3-bit soft scale follow the
// document. The puncture patterns are this design's choice: the document gives
// the rates (1/3, 11/32, 1/2, 5/8, 3/4) but not the stolen-bit positions.
// The 8-bit path metric width is also this design's (see PMW).
package vit_pkg;

  localparam int NSTATE = 64;  // 2^(K-1), K = 7
  localparam int SW     = 3;   // soft-decision width
  localparam int BMW    = 5;   // branch metric width after offset reduction
  // Path metric width. The source design uses 7 bits; with 7 bits and
  // clamping below 32, clean rate-1/3 input drives every state off the best
  // path to zero, and a traceback from state 0 no longer merges. 8 bits
  // (threshold 128, subtract 64) keeps four radix-4 steps of spread.
  localparam int PMW    = 8;
  localparam int NSLOT  = 12;  // coded-bit slots per clock: 4 stages x 3 bits
  localparam int SOFT_MAX = (1 << SW) - 1;

  // Generator taps, bit k is the coefficient of D^k.
  localparam logic [6:0] G_A = 7'b1101101;  // 1 + D^2 + D^3 + D^5 + D^6
  localparam logic [6:0] G_B = 7'b0110011;  // 1 + D + D^4 + D^5
  localparam logic [6:0] G_C = 7'b1011111;  // 1 + D + D^2 + D^3 + D^4 + D^6

  typedef logic [SW-1:0]  soft_t;
  typedef logic [BMW-1:0] bm_t;
  typedef logic [PMW-1:0] pm_t;

  typedef enum logic [2:0] {
    RATE_1_3   = 3'd0,
    RATE_11_32 = 3'd1,
    RATE_1_2   = 3'd2,
    RATE_5_8   = 3'd3,
    RATE_3_4   = 3'd4
  } rate_e;

  // One clock's worth of depunctured input: 12 soft values in trellis order
  // (stage 0 A,B,C, stage 1 A,B,C, ...) and a flag per slot for a stolen bit.
  typedef struct packed {
    logic  [NSLOT-1:0] erased;
    soft_t [NSLOT-1:0] v;
  } dp_word_t;

  // Coded bits {C,B,A} (A in bit 0) leaving state s on input bit u.
  function automatic logic [2:0] enc_out(input logic [5:0] s, input logic u);
    logic [6:0] reg7;
    reg7 = {s, u};
    return {^(reg7 & G_C), ^(reg7 & G_B), ^(reg7 & G_A)};
  endfunction

  // Six reference bits of the radix-4 branch into state s from its
  // predecessor number j (predecessor state {j, s[5:2]}); bit i is the
  // reference for slot i (first stage A,B,C then second stage A,B,C).
  function automatic logic [5:0] r4_label(input int s, input int j);
    logic [5:0] ns, p, q;
    logic [2:0] o1, o2;
    ns = 6'(s);
    p  = {2'(j), ns[5:2]};
    o1 = enc_out(p, ns[1]);
    q  = {p[4:0], ns[1]};
    o2 = enc_out(q, ns[0]);
    return {o2, o1};
  endfunction

  // Puncture period in information bits.
  function automatic int punct_period(input rate_e r);
    case (r)
      RATE_11_32: return 11;
      RATE_5_8:   return 5;
      RATE_3_4:   return 3;
      default:    return 1;
    endcase
  endfunction

  // 1 when coded bit b (0=A,1=B,2=C) of the information bit at position ph
  // of the puncture period is transmitted.
  function automatic logic punct_keep(input rate_e r, input int ph, input int b);
    case (r)
      RATE_1_3:   return 1'b1;
      RATE_11_32: return (b != 2) || (ph != 10);           // 32 of 33
      RATE_1_2:   return (b != 2);                         // A,B
      RATE_5_8:   return (b == 0) || (b == 1 && ph[0] == 1'b0); // A x5, B x3
      RATE_3_4:   return (b == 0) || (b == 1 && ph == 0);  // A x3, B x1
      default:    return 1'b1;
    endcase
  endfunction

endpackage
