// ym_pkg: types shared by the FM synthesizer blocks.
package ym_pkg;
  // Settings of one operator, as loaded from the FM chip's registers
  typedef struct packed {
    logic [10:0] fnum;   // frequency number
    logic [2:0]  block;  // octave
    logic [2:0]  dt;     // detune (bit 2 = subtract)
    logic [3:0]  mul;    // multiple (0 = x1/2)
    logic [6:0]  tl;     // total level, 0.75 dB steps
    logic [1:0]  rs;     // rate (key) scaling
    logic [4:0]  ar;     // attack rate
    logic        am;     // amplitude modulation by the LFO on
    logic [4:0]  d1r;    // first decay rate
    logic [4:0]  d2r;    // second decay (sustain) rate
    logic [3:0]  sl;     // sustain level, 3 dB steps
    logic [3:0]  rr;     // release rate
  } ym_op_cfg_t;

  typedef enum logic [1:0] {EG_ATTACK, EG_DECAY, EG_SUSTAIN, EG_RELEASE} ym_eg_state_e;
endpackage
