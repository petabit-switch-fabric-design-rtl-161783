// matrix_arbiter: least-recently-served matrix arbiter with request lock.
//
// State is a matrix of priority bits w[i][j]; w[i][j] = 1 means request i has
// priority over request j. The diagonal is not needed and w[j][i] = NOT w[i][j],
// so only the upper triangle (i < j) is stored, N*(N-1)/2 flip-flops; the lower
// triangle is its complement. Each request ANDed with its row disables the
// requests it beats: dis[j] = OR over i of (req[i] AND w[i][j]). A request whose
// disable signal is 0 is granted. When a grant is taken (valid), the winner's
// row is cleared and its column set, so it becomes the lowest priority. After
// reset the order is 0 highest down to N-1 lowest.
//
// Lock: as in cl_arbiter, the previous winner keeps winning while it requests
// and does not raise release_lock; the matrix does not change while a lock is
// held. With LEVELS > 1 only requests at the highest priority level present
// compete (prio_filter).
//
// Timing: grant, chosen and valid are combinational; matrix and lock register
// change on the clock edge. grant = winner AND ready.
module matrix_arbiter #(
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

  logic [N-1:0][N-1:0] up_q;   // up_q[i][j], i < j: stored priority bits
  logic [N-1:0][N-1:0] w;      // full matrix view
  logic [N-1:0]        elig;
  logic [N-1:0]        dis;
  logic [N-1:0]        mwin;
  logic [N-1:0]        lock_q;
  logic [N-1:0]        winner;
  logic                locked;

  prio_filter #(.N(N), .LEVELS(LEVELS)) u_filter (.req(req), .prio(prio), .elig(elig));

  always_comb begin
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        if (i < j)      w[i][j] = up_q[i][j];
        else if (i > j) w[i][j] = ~up_q[j][i];
        else            w[i][j] = 1'b0;
    for (int j = 0; j < N; j++) begin
      dis[j] = 1'b0;
      for (int i = 0; i < N; i++)
        dis[j] = dis[j] | (elig[i] & w[i][j]);
    end
    mwin   = elig & ~dis;
    locked = |(lock_q & req & ~release_lock);
    winner = locked ? lock_q : mwin;
    grant  = winner & {N{ready}};
    valid  = ready && (|winner);
    chosen = '0;
    for (int i = 0; i < N; i++)
      if (winner[i]) chosen = IW'(i);
  end

  always_ff @(posedge clk)
    if (!rst_n) begin
      lock_q <= '0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          up_q[i][j] <= (i < j);
    end else begin
      lock_q <= winner;
      if (valid && !locked)
        for (int i = 0; i < N; i++)
          for (int j = i + 1; j < N; j++)
            if (mwin[i])      up_q[i][j] <= 1'b0;   // winner i loses to j
            else if (mwin[j]) up_q[i][j] <= 1'b1;   // winner j loses to i
    end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(winner));
  a_isreq:  assert property (@(posedge clk) disable iff (!rst_n) (winner & ~req) == '0);

endmodule
