// rr_arbiter: round-robin arbiter with request lock.
//
// The request just after the previous winner has the highest priority, so every
// requester is served within N grants. Same ports and lock rule as cl_arbiter:
// while the previous winner keeps requesting without raising release_lock it
// wins again. The round-robin pointer moves past a winner only when the grant
// is taken (valid). With LEVELS > 1 only requests at the highest priority level
// present compete (prio_filter).
//
// Timing: grant, chosen and valid are combinational; the pointer and the lock
// register change on the clock edge. After reset request 0 has priority.
module rr_arbiter #(
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

  logic [N-1:0]  lock_q;
  logic [IW-1:0] ptr_q;     // index with the highest priority
  logic [N-1:0]  elig;
  logic [N-1:0]  rrwin;
  logic [N-1:0]  winner;
  logic          locked;

  prio_filter #(.N(N), .LEVELS(LEVELS)) u_filter (.req(req), .prio(prio), .elig(elig));

  always_comb begin
    locked = |(lock_q & req & ~release_lock);
    // scan downwards so the last assignment is the first request at or after ptr
    rrwin = '0;
    for (int k = N - 1; k >= 0; k--)
      if (elig[(int'(ptr_q) + k) % N]) rrwin = N'(1) << ((int'(ptr_q) + k) % N);
    winner = locked ? lock_q : rrwin;
    grant  = winner & {N{ready}};
    valid  = ready && (|winner);
    chosen = '0;
    for (int i = 0; i < N; i++)
      if (winner[i]) chosen = IW'(i);
  end

  always_ff @(posedge clk)
    if (!rst_n) begin
      lock_q <= '0;
      ptr_q  <= '0;
    end else begin
      lock_q <= winner;
      if (valid) ptr_q <= (int'(chosen) == N - 1) ? '0 : IW'(int'(chosen) + 1);
    end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(winner));

endmodule
