// prio_filter: priority-level selection in front of an arbiter.
//
// Finds the highest priority level p_max among the asserted requests and passes
// on only the requests at that level; requests at lower levels are masked.
// With LEVELS = 1 every request passes. Purely combinational.
//   req   : request vector
//   prio  : priority level of each request
//   elig  : requests whose level equals p_max
module prio_filter #(
  parameter int N      = 8,
  parameter int LEVELS = 8,
  localparam int PW    = (LEVELS > 1) ? $clog2(LEVELS) : 1
) (
  input  logic [N-1:0]         req,
  input  logic [N-1:0][PW-1:0] prio,
  output logic [N-1:0]         elig
);

  logic [LEVELS-1:0] present;   // level l has at least one request
  logic [PW-1:0]     pmax;

  always_comb begin
    present = '0;
    for (int i = 0; i < N; i++)
      if (req[i] && int'(prio[i]) < LEVELS) present[(LEVELS > 1) ? int'(prio[i]) : 0] = 1'b1;
    pmax = '0;
    for (int l = 0; l < LEVELS; l++)
      if (present[l]) pmax = PW'(l);
    for (int i = 0; i < N; i++)
      elig[i] = req[i] && ((LEVELS == 1) || (prio[i] == pmax));
  end

endmodule
