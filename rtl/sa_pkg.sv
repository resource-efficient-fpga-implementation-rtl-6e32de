// sa_pkg: types and helpers shared by the self-attention score accelerator.
//
// Numbers are 16-bit signed Q8.8 fixed point (8 integer bits including the
// sign, 8 fraction bits), as the accelerator's datapath uses throughout.
// The controller's six states are named after the ones the design is built
// around: IDLE, LOAD, COMPUTE, ACCUMULATE, STORE and DONE. The saturating
// narrowing function is this implementation's own choice for turning the
// wide accumulator into a 16-bit Q8.8 score.
package sa_pkg;

  localparam int unsigned Q_W    = 16;  // Q8.8 word width

  typedef logic signed [Q_W-1:0] q88_t;

  typedef enum logic [2:0] {
    ST_IDLE       = 3'd0,
    ST_LOAD       = 3'd1,
    ST_COMPUTE    = 3'd2,
    ST_ACCUMULATE = 3'd3,
    ST_STORE      = 3'd4,
    ST_DONE       = 3'd5
  } sa_state_t;

  // Clamp a wide signed accumulator value to the Q8.8 range.
  function automatic q88_t sat_q88(input logic signed [63:0] v);
    if (v > 64'sd32767)       return 16'sh7FFF;
    else if (v < -64'sd32768) return 16'sh8000;
    else                      return q88_t'(v);
  endfunction

endpackage
