// slot_controller: sequences the phases of one scheduling time slot.
//
// A slot is N+3 clock cycles:
//   PH_REQUEST (1 cycle) : requests of all inputs are latched
//   PH_GRANT   (1 cycle) : the single request-grant iteration; grants are
//                          latched and the ring counter is started
//   PH_PASS    (N cycles): sub-intervals T1..TN of grant passing; on TN the
//                          ring counter is cleared
//   PH_ACCEPT  (1 cycle) : each input accepts one grant, the matched cells
//                          are switched, and the Request/Grant cells are
//                          cleared at the end of the cycle
// The scheme fixes the order (one iteration, then N equal sub-intervals)
// and that the cells are cleared at the end of the slot; the single cycle
// per phase and the separate accept cycle are this design's choices.
// While `enable` is low the controller waits in PH_REQUEST doing nothing.
// `t_last` is the TN line of the ring counter.
module slot_controller (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  enable,
  input  logic                  t_last,
  output atm_sched_pkg::phase_e phase,
  output logic                  req_load,
  output logic                  grant_load,
  output logic                  ring_start,
  output logic                  ring_advance,
  output logic                  ring_clear,
  output logic                  accept,
  output logic                  slot_clear
);
  import atm_sched_pkg::*;

  phase_e state, state_next;

  always_comb begin
    state_next   = state;
    req_load     = 1'b0;
    grant_load   = 1'b0;
    ring_start   = 1'b0;
    ring_advance = 1'b0;
    ring_clear   = 1'b0;
    accept       = 1'b0;
    slot_clear   = 1'b0;
    unique case (state)
      PH_REQUEST: if (enable) begin
        req_load   = 1'b1;
        state_next = PH_GRANT;
      end
      PH_GRANT: begin
        grant_load = 1'b1;
        ring_start = 1'b1;
        state_next = PH_PASS;
      end
      PH_PASS: begin
        if (t_last) begin
          ring_clear = 1'b1;
          state_next = PH_ACCEPT;
        end else begin
          ring_advance = 1'b1;
        end
      end
      PH_ACCEPT: begin
        accept     = 1'b1;
        slot_clear = 1'b1;
        state_next = PH_REQUEST;
      end
      default: state_next = PH_REQUEST;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= PH_REQUEST;
    else        state <= state_next;
  end

  assign phase = state;
endmodule
