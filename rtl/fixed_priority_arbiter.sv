// fixed_priority_arbiter: N-input fixed-priority arbiter built as a Moore FSM.
//
// The state register holds IDLE or one grant state G1..GN. Every clock the
// next state is the grant state of the highest-priority active request
// (req[0] = request 1 is the highest, req[N-1] the lowest), or IDLE when no
// request is active. grant[k] is high exactly while the state is G(k+1), so
// a grant follows its request by one clock and is held as long as that
// request stays active and no higher one appears. A higher-priority request
// takes the grant away on the next clock: the arbiter is pre-emptive.
//
// The states, the priority order and the rule "Grant k = 1 when State = Gk"
// follow the router's arbiter description; the pre-emptive reading of its
// state diagram, the synchronous active-high reset and the state encoding
// (0 = IDLE, k = Gk) are this design's choices.
module fixed_priority_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] req,
  output logic [N-1:0] grant
);

  localparam int unsigned SW = $clog2(N + 1);

  logic [SW-1:0] state, state_next;

  always_comb begin
    state_next = '0;                       // IDLE
    for (int k = N - 1; k >= 0; k--) begin
      if (req[k]) state_next = SW'(k + 1); // lowest index wins
    end
  end

  always_ff @(posedge clk) begin
    if (rst) state <= '0;
    else     state <= state_next;
  end

  always_comb begin
    for (int k = 0; k < N; k++) grant[k] = (state == SW'(k + 1));
  end

  assert property (@(posedge clk) disable iff (rst) $onehot0(grant));

endmodule
