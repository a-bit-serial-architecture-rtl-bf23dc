// bindct_pkg: shared constants, types and helpers of the bit-serial binDCT.
//
// Word format: 16-bit two's complement fixed point with 8 fractional bits.
// Serial frame: every word travels LSB first inside a frame of FRAME = 19
// clock cycles. Frame positions 0..2 are guard slots that carry zero (the
// three zeros inserted between data blocks so that shifts of up to three
// places can be aligned); positions 3..18 carry data bits 0..15. All eight
// lines of a 1-D transform share one frame position at every point of the
// datapath, so each unit is told the frame position of its inputs.
//
// The guard length of three follows the largest shift of the lifting
// coefficients (1/8). The 16-bit word with 8 fractional bits is the
// document's configuration. Lifting modes and the pos helpers are this
// design's own encoding. WORD and FRAME are the defaults: the datapath
// modules take the word length as a parameter WL (frame WL + GUARD), and
// pos_t is wide enough for frames of up to 64 cycles.
package bindct_pkg;

  localparam int unsigned WORD  = 16;             // data bits per word
  localparam int unsigned GUARD = 3;              // zero slots per frame
  localparam int unsigned FRAME = WORD + GUARD;   // 19 cycles per frame
  localparam int unsigned LANES = 8;              // 8-point transform
  localparam int unsigned POSW  = 6;              // frame position, frames up to 64

  typedef logic [POSW-1:0]        pos_t;
  typedef logic signed [WORD-1:0] word_t;

  // Form of a lifting step, Q' from Q and the scaled P term s = kP/2^m.
  typedef enum logic [1:0] {
    LIFT_ADD  = 2'd0,   // Q' = Q + s
    LIFT_SUB  = 2'd1,   // Q' = Q - s
    LIFT_RSUB = 2'd2    // Q' = s - Q
  } lift_mode_e;

  // Frame position of a stream that is `d` cycles later than a stream at `p`,
  // for frames of `fl` cycles. `d` and `fl` are constants in every use, so
  // this is one adder and a compare.
  function automatic pos_t pos_back(pos_t p, int unsigned d, int unsigned fl = FRAME);
    logic [POSW:0] v;
    v = {1'b0, p} + (POSW+1)'(fl - (d % fl));
    if (v >= (POSW+1)'(fl)) v = v - (POSW+1)'(fl);
    return v[POSW-1:0];
  endfunction

  function automatic int unsigned max2(int unsigned a, int unsigned b);
    return (a > b) ? a : b;
  endfunction

endpackage
