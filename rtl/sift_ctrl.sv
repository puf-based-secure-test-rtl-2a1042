// Protocol sequencer of the secure infrastructure for test.
//
// Runs the two exchanges the test server can start:
//  * Enrollment (only while the read-out fuse is intact): a challenge sent
//    with enroll_i is evaluated and its corrected response is returned once
//    (resp_valid_o). After the fuse is blown such requests are ignored.
//  * Authentication: SYN advances the PRNG, which presents a fresh non-zero
//    Delta (delta_valid_o pulses one cycle later). The next challenge is
//    evaluated into R_i, the one after it (which carries the IP identifier)
//    into R_j. The sequencer then sends ACK with ack_pass_o = comparator
//    result and reseeds the PRNG. The comparator result, and with it the
//    unlock of the chosen IP, stays until the next SYN, which clears the
//    response registers and starts a new session.
// A SYN while a challenge is awaited restarts the session; challenges that
// arrive while a response is being computed are ignored; ready_o tells the
// tester when the next challenge will be taken. Every output is a
// decoded state or a one-cycle pulse. The message order (SYN, Delta, C_i,
// C_j || ID, ACK) and the enrollment exchange follow the published scheme; the
// state machine, the restart rule and the fuse input are this design's.
module sift_ctrl (
  input  logic clk,
  input  logic rst_n,
  // test server side
  input  logic syn_i,
  input  logic chal_valid_i,
  input  logic enroll_i,
  input  logic fuse_blown_i,
  output logic ready_o,
  output logic delta_valid_o,
  output logic resp_valid_o,
  output logic ack_o,
  output logic ack_pass_o,
  // datapath control
  output logic prng_step_o,
  output logic prng_reseed_o,
  output logic ecc_start_o,
  input  logic ecc_done_i,
  output logic mem_clear_o,
  output logic mem_we_o,
  output logic mem_sel_o,
  output logic id_load_o,
  input  logic match_i,
  output stw_pkg::sift_state_e state_o
);

  import stw_pkg::*;

  sift_state_e state_q;

  assign state_o = state_q;
  assign ready_o = (state_q == ST_IDLE) || (state_q == ST_WAIT_CI) || (state_q == ST_WAIT_CJ);

  always_comb begin
    prng_step_o   = 1'b0;
    prng_reseed_o = 1'b0;
    ecc_start_o   = 1'b0;
    mem_clear_o   = 1'b0;
    mem_we_o      = 1'b0;
    mem_sel_o     = 1'b0;
    id_load_o     = 1'b0;
    unique case (state_q)
      ST_IDLE, ST_WAIT_CI, ST_WAIT_CJ: begin
        if (syn_i) begin
          prng_step_o = 1'b1;
          mem_clear_o = 1'b1;
        end else if (chal_valid_i) begin
          if (state_q == ST_IDLE) ecc_start_o = enroll_i && !fuse_blown_i;
          else                    ecc_start_o = !enroll_i;
          id_load_o = (state_q == ST_WAIT_CJ) && !enroll_i;
        end
      end
      ST_EVAL_CI: begin
        mem_we_o  = ecc_done_i;
        mem_sel_o = 1'b0;
      end
      ST_EVAL_CJ: begin
        mem_we_o  = ecc_done_i;
        mem_sel_o = 1'b1;
      end
      ST_CHECK: prng_reseed_o = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q       <= ST_IDLE;
      delta_valid_o <= 1'b0;
      resp_valid_o  <= 1'b0;
      ack_o         <= 1'b0;
      ack_pass_o    <= 1'b0;
    end else begin
      delta_valid_o <= prng_step_o;
      resp_valid_o  <= (state_q == ST_ENROLL) && ecc_done_i;
      ack_o         <= (state_q == ST_CHECK);
      if (state_q == ST_CHECK) ack_pass_o <= match_i;
      else if (prng_step_o) ack_pass_o <= 1'b0;
      unique case (state_q)
        ST_IDLE:
          if (syn_i) state_q <= ST_WAIT_CI;
          else if (ecc_start_o) state_q <= ST_ENROLL;
        ST_ENROLL:
          if (ecc_done_i) state_q <= ST_IDLE;
        ST_WAIT_CI:
          if (syn_i) state_q <= ST_WAIT_CI;
          else if (ecc_start_o) state_q <= ST_EVAL_CI;
        ST_EVAL_CI:
          if (ecc_done_i) state_q <= ST_WAIT_CJ;
        ST_WAIT_CJ:
          if (syn_i) state_q <= ST_WAIT_CI;
          else if (ecc_start_o) state_q <= ST_EVAL_CJ;
        ST_EVAL_CJ:
          if (ecc_done_i) state_q <= ST_CHECK;
        ST_CHECK:
          state_q <= ST_IDLE;
        default:
          state_q <= ST_IDLE;
      endcase
    end
  end

  // The result is taken only after the last response register write.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state_q == ST_CHECK) |-> !mem_we_o);

endmodule
