// tb_rr_arbiter: self-checking test of the round-robin arbiter.
//
// The reference model keeps a pointer to the request with the highest priority;
// the winner is the first eligible request at or after it, unless the previous
// winner still requests without releasing its lock. On a taken grant the
// pointer moves just past the winner. A directed phase checks that, with all
// requests held, every request is served once in N grants (fairness); a random
// phase compares every cycle, with and without priority levels.
module tb_rr_arbiter;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, rel;
  logic [N-1:0][2:0] prio;
  logic ready;
  logic [N-1:0] grant, grant1;
  logic [2:0] chosen, chosen1;
  logic valid, valid1;
  int checks = 0, failures = 0;

  rr_arbiter #(.N(N), .LEVELS(8)) dut (.clk, .rst_n, .req, .release_lock(rel), .prio,
                                       .ready, .grant, .chosen, .valid);
  rr_arbiter #(.N(N), .LEVELS(1)) dut1 (.clk, .rst_n, .req, .release_lock(rel), .prio('0),
                                        .ready, .grant(grant1), .chosen(chosen1), .valid(valid1));

  always #5 clk = ~clk;

  typedef struct { int ptr; logic [N-1:0] lock; } model_t;
  model_t md, md1;

  function automatic logic [N-1:0] mstep(ref model_t x, input bit use_prio, input bit commit);
    logic [N-1:0] e, w;
    int best;
    best = -1;
    for (int i = 0; i < N; i++) if (req[i] && int'(prio[i]) > best) best = int'(prio[i]);
    for (int i = 0; i < N; i++) e[i] = req[i] && (!use_prio || int'(prio[i]) == best);
    w = '0;
    if (|(x.lock & req & ~rel)) w = x.lock;
    else
      for (int k = 0; k < N; k++)
        if (e[(x.ptr + k) % N]) begin w[(x.ptr + k) % N] = 1; break; end
    if (commit) begin
      if (ready && |w) for (int k = 0; k < N; k++) if (w[k]) x.ptr = (k + 1) % N;
      x.lock = w;
    end
    return w;
  endfunction

  task automatic cmp(input logic [N-1:0] g, input logic [2:0] c, input logic v, input logic [N-1:0] w);
    checks++;
    if (g !== (w & {N{ready}}) || v !== (ready && |w) || (|w && (N'(1) << c) != w)) begin
      failures++;
      $display("FAIL t=%0t req=%b rel=%b rdy=%b grant=%b exp=%b", $time, req, rel, ready, g, w & {N{ready}});
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] w, w1, seen;
    req = '0; rel = '1; prio = '0; ready = 0;
    md = '{0, '0}; md1 = '{0, '0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    // fairness: all request, locks released every cycle -> N distinct winners
    seen = '0; ready = 1;
    for (int k = 0; k < N; k++) begin
      @(negedge clk); req = '1; rel = '1; #1;
      seen |= grant1;
      w = mstep(md, 1, 1); w1 = mstep(md1, 0, 1);
      @(posedge clk);
    end
    checks++;
    if (seen !== '1) begin failures++; $display("FAIL fairness seen=%b", seen); end
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      req   = N'($urandom) & N'($urandom);
      rel   = ~(N'($urandom) & N'($urandom));
      for (int i = 0; i < N; i++) prio[i] = 3'($urandom);
      ready = ($urandom % 4) != 0;
      #1;
      cmp(grant, chosen, valid, mstep(md, 1, 0));
      cmp(grant1, chosen1, valid1, mstep(md1, 0, 0));
      w  = mstep(md, 1, 1);
      w1 = mstep(md1, 0, 1);
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
