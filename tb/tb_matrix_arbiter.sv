// tb_matrix_arbiter: self-checking test of the matrix (least recently served)
// arbiter.
//
// The reference model keeps its own full N x N priority matrix: request i beats
// j when m[i][j] = 1; the winner among the eligible requests is the one no other
// eligible request beats; on a taken, unlocked grant the winner's row is cleared
// and its column set. First a directed sequence checks the reset order (0
// highest) and that a served request drops to the lowest priority; then random
// requests, release_lock, ready and priority levels are compared every cycle,
// for an arbiter with 8 priority levels and one without.
module tb_matrix_arbiter;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, rel;
  logic [N-1:0][2:0] prio;
  logic ready;
  logic [N-1:0] grant, grant1;
  logic [2:0] chosen, chosen1;
  logic valid, valid1;
  int checks = 0, failures = 0;

  matrix_arbiter #(.N(N), .LEVELS(8)) dut (.clk, .rst_n, .req, .release_lock(rel), .prio,
                                           .ready, .grant, .chosen, .valid);
  matrix_arbiter #(.N(N), .LEVELS(1)) dut1 (.clk, .rst_n, .req, .release_lock(rel), .prio('0),
                                            .ready, .grant(grant1), .chosen(chosen1), .valid(valid1));

  always #5 clk = ~clk;

  typedef struct {
    bit m [N][N];
    logic [N-1:0] lock;
  } model_t;
  model_t md, md1;

  function automatic void mreset(ref model_t x);
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) x.m[i][j] = (i < j);
    x.lock = '0;
  endfunction

  // returns winner; updates model state as the clock edge would
  function automatic logic [N-1:0] mstep(ref model_t x, input bit use_prio, input bit commit);
    logic [N-1:0] e, w;
    int best;
    bit locked;
    best = -1;
    for (int i = 0; i < N; i++) if (req[i] && int'(prio[i]) > best) best = int'(prio[i]);
    for (int i = 0; i < N; i++) e[i] = req[i] && (!use_prio || int'(prio[i]) == best);
    locked = |(x.lock & req & ~rel);
    w = '0;
    if (locked) w = x.lock;
    else
      for (int j = 0; j < N; j++) begin
        bit beaten;
        beaten = 0;
        for (int i = 0; i < N; i++) if (i != j && e[i] && x.m[i][j]) beaten = 1;
        if (e[j] && !beaten) w[j] = 1;
      end
    if (commit) begin
      if (ready && |w && !locked)
        for (int k = 0; k < N; k++) if (w[k])
          for (int j = 0; j < N; j++) if (j != k) begin x.m[k][j] = 0; x.m[j][k] = 1; end
      x.lock = w;
    end
    return w;
  endfunction

  task automatic cmp(input logic [N-1:0] g, input logic [2:0] c, input logic v, input logic [N-1:0] w,
                     input string tag);
    checks++;
    if (g !== (w & {N{ready}}) || v !== (ready && |w) || (|w && (N'(1) << c) != w)) begin
      failures++;
      $display("FAIL %s t=%0t req=%b rel=%b rdy=%b grant=%b exp=%b", tag, $time, req, rel, ready, g,
               w & {N{ready}});
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
    logic [N-1:0] w, w1;
    req = '0; rel = '1; prio = '0; ready = 0;
    mreset(md); mreset(md1);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // directed, no priorities: 3 and 5 request -> 3; then 3 is least recent -> 5; then 3
    ready = 1;
    for (int k = 0; k < 3; k++) begin
      @(negedge clk); req = 8'b0010_1000; #1;
      checks++;
      if (grant1 !== ((k % 2 == 0) ? 8'b0000_1000 : 8'b0010_0000)) begin
        failures++; $display("FAIL directed step %0d grant=%b", k, grant1);
      end
      w = mstep(md, 1, 1); w1 = mstep(md1, 0, 1);
      @(posedge clk);
    end
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      req   = N'($urandom) & N'($urandom);
      rel   = ~(N'($urandom) & N'($urandom));
      for (int i = 0; i < N; i++) prio[i] = 3'($urandom);
      ready = ($urandom % 4) != 0;
      #1;
      w  = mstep(md, 1, 0);
      w1 = mstep(md1, 0, 0);
      cmp(grant, chosen, valid, w, "prio");
      cmp(grant1, chosen1, valid1, w1, "plain");
      w  = mstep(md, 1, 1);
      w1 = mstep(md1, 0, 1);
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
