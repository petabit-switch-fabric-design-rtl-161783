// cl_arbiter: carry-lookahead (fixed-priority) arbiter with request lock.
//
// Request 0 has the highest priority and request N-1 the lowest. The winner is
// found in one step from the request vector alone: adding one to the inverted
// requests sets exactly the bit of the lowest-index request, and ANDing that sum
// with the requests again leaves a one-hot winner, so no grant waits on the
// grants of higher-priority requests.
//
// Lock: the previous winner is remembered. While it keeps requesting and does not
// raise its release_lock bit, it wins again whatever the other requests are, so a
// packet keeps the resource until its last flit. The lock register follows the
// winner every cycle and is cleared in a cycle without requests; it starts empty.
//
// Priority levels: with LEVELS > 1 only the requests at the highest priority
// level present take part in the fixed-priority selection (prio_filter); a held
// lock is kept regardless of level. With LEVELS = 1 the prio input is ignored.
//
// Timing: grant, chosen and valid are combinational in the current requests and
// the lock register. grant = winner AND ready; valid = a request was granted.
// chosen is the winner's index (0 when there is none).
module cl_arbiter #(
  parameter int N      = 8,
  parameter int LEVELS = 1,
  localparam int PW    = (LEVELS > 1) ? $clog2(LEVELS) : 1,
  localparam int IW    = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic [N-1:0]         release_lock,
  input  logic [N-1:0][PW-1:0] prio,
  input  logic                 ready,
  output logic [N-1:0]         grant,
  output logic [IW-1:0]        chosen,
  output logic                 valid
);

  logic [N-1:0] lock_q;     // one-hot previous winner, or zero
  logic [N-1:0] elig;
  logic [N-1:0] lowest;     // ~elig + 1: carry stops at the first request
  logic [N-1:0] winner;
  logic         locked;

  prio_filter #(.N(N), .LEVELS(LEVELS)) u_filter (.req(req), .prio(prio), .elig(elig));

  always_comb begin
    locked = |(lock_q & req & ~release_lock);
    lowest = ~elig + N'(1);
    winner = locked ? lock_q : (lowest & elig);
    grant  = winner & {N{ready}};
    valid  = ready && (|winner);
    chosen = '0;
    for (int i = 0; i < N; i++)
      if (winner[i]) chosen = IW'(i);
  end

  always_ff @(posedge clk)
    if (!rst_n) lock_q <= '0;
    else        lock_q <= winner;

  // The winner is always one-hot or zero, and always a requester.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(winner));
  a_isreq:  assert property (@(posedge clk) disable iff (!rst_n) (winner & ~req) == '0);

endmodule
