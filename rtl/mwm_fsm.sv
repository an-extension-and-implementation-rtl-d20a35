// mwm_fsm: controller of the reducer.
//
// Six states, numbered as in the source design:
//   S0  wait until start is low                       (start=0 -> S1)
//   S1  load z into the shift-and-add register         (start=1 -> S2)
//   S2  shift and add until the counter reports N shifts (shift_done -> S3)
//   S3  add the lower half of z, first subtract of m   (always -> S4)
//   S4  subtract m until the difference is negative    (sub_neg -> S5)
//   S5  done for one clock                             (always -> S0)
// So an operation is requested by taking start low and then high again; the
// result is valid from the clock done is high until the next operation
// reaches S3.
// Outputs per state follow the source signal table: load_z in S1,
// reset_count = start in S1, sub_flag in S4, done in S5. add_low (high in S3)
// is an extra output of this design that tells the correction section when to
// take its first value. Synchronous active-high reset to S0.
module mwm_fsm
  import mwm_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  logic shift_done,
  input  logic sub_neg,
  output logic reset_count,
  output logic load_z,
  output logic done,
  output logic sub_flag,
  output logic add_low
);

  state_t state, next_state;

  always_ff @(posedge clk) begin
    if (rst) state <= S_WAIT_LOW;
    else     state <= next_state;
  end

  // Moore outputs, decoded from the state alone (reset_count also uses start).
  always_comb begin
    load_z      = (state == S_LOAD);
    reset_count = (state == S_LOAD) && start;
    add_low     = (state == S_ADD_LOW);
    sub_flag    = (state == S_SUB_LOOP);
    done        = (state == S_DONE);
  end

  always_comb begin
    next_state = state;
    unique case (state)
      S_WAIT_LOW: if (!start)     next_state = S_LOAD;
      S_LOAD:     if (start)      next_state = S_SHIFT;
      S_SHIFT:    if (shift_done) next_state = S_ADD_LOW;
      S_ADD_LOW:                  next_state = S_SUB_LOOP;
      S_SUB_LOOP: if (sub_neg)    next_state = S_DONE;
      S_DONE:                     next_state = S_WAIT_LOW;
      default:                    next_state = S_WAIT_LOW;
    endcase
  end

endmodule
