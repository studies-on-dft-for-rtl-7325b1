// mbist_controller -- runs the shared memory BIST wrappers in the order of a
// test schedule and gathers their results.
//
// The schedule, found at design time under the peak power limit, puts each of
// the NG wrappers (one per memory group) into a session: SESS[g] in
// 0..NSESS-1. Groups of one session run concurrently, sessions run one after
// the other, as rectangles packed left to right under the power line.
//
// For each session the controller raises grp_start of the session's groups
// and holds it until all of them report grp_done; it then drops grp_start,
// waits until their grp_done have fallen (four-phase handshake, so wrappers
// in another clock domain can be reached through synchronizers) and moves on.
// grp_fail is sampled on the cycle all grp_done are seen high. After the last
// session, done rises and stays high with pass and fail_grp valid until the
// next start pulse. A start pulse while busy is ignored.
//
// Sessions and the four-phase handshake are this design's own choices; the
// published design only requires a BIST controller for the wrappers.
module mbist_controller #(
  parameter int unsigned NG    = 4,
  parameter int unsigned NSESS = 1,
  parameter int unsigned SESS [NG] = '{default: 0}
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic          pass,
  output logic [NG-1:0] fail_grp,
  output logic [NG-1:0] grp_start,
  input  logic [NG-1:0] grp_done,
  input  logic [NG-1:0] grp_fail
);

  localparam int unsigned SSW = (NSESS > 1) ? $clog2(NSESS) : 1;

  typedef enum logic [1:0] { C_IDLE, C_RUN, C_RELEASE, C_DONE } cstate_e;

  cstate_e        state;
  logic [SSW-1:0] sess;
  logic [NG-1:0]  in_sess;

  always_comb begin
    for (int g = 0; g < NG; g++) in_sess[g] = (SESS[g] == 32'(sess));
  end

  logic all_done, all_low;
  assign all_done = ((grp_done & in_sess) == in_sess);
  assign all_low  = ((grp_done & in_sess) == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= C_IDLE;
      sess      <= '0;
      grp_start <= '0;
      fail_grp  <= '0;
    end else begin
      unique case (state)
        C_IDLE, C_DONE: if (start) begin
          state     <= C_RUN;
          sess      <= '0;
          fail_grp  <= '0;
        end
        C_RUN: begin
          grp_start <= in_sess;
          if (grp_start == in_sess && all_done) begin
            fail_grp  <= fail_grp | (grp_fail & in_sess);
            grp_start <= '0;
            state     <= C_RELEASE;
          end
        end
        C_RELEASE: if (all_low) begin
          if (32'(sess) == NSESS - 1) begin
            state <= C_DONE;
          end else begin
            sess  <= sess + 1'b1;
            state <= C_RUN;
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  assign busy = (state == C_RUN) || (state == C_RELEASE);
  assign done = (state == C_DONE);
  assign pass = done && (fail_grp == '0);

  // a wrapper is only started in its own session
  a_start_in_session: assert property (@(posedge clk) disable iff (!rst_n)
    (grp_start & ~in_sess) == '0);

endmodule
