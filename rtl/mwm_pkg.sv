// mwm_pkg: types shared by the shift-and-add ("mod without mod") reducer.
//
// The controller walks through six states. Their numbering S0..S5 and their
// meaning follow the reducer's published state diagram; the 3-bit binary
// encoding is this design's choice.
package mwm_pkg;

  typedef enum logic [2:0] {
    S_WAIT_LOW  = 3'd0,  // S0: wait for start to be low
    S_LOAD      = 3'd1,  // S1: load z, wait for start to rise
    S_SHIFT     = 3'd2,  // S2: shift-and-add until N shifts are counted
    S_ADD_LOW   = 3'd3,  // S3: add the lower half of z, first subtract
    S_SUB_LOOP  = 3'd4,  // S4: subtract m until the difference goes negative
    S_DONE      = 3'd5   // S5: assert done for one cycle
  } state_t;

  // Width of a shift amount able to hold 0..max_shift.
  function automatic int unsigned amt_width(input int unsigned max_shift);
    return $clog2(max_shift + 1);
  endfunction

endpackage
