// tb_cl_arbiter: self-checking test of the carry-lookahead arbiter.
//
// Drives random requests, release_lock bits, ready and priority levels into an
// 8-request arbiter with 8 priority levels, and into a second 8-request arbiter
// with no priority levels, and compares grant/chosen/valid every cycle with a
// reference model kept in the testbench: fixed priority (lowest index wins among
// the highest priority level present) unless the previous winner still requests
// without releasing its lock. Also checks that grants are combinational (same
// cycle as the request) and that the lock is seen holding against a
// higher-priority request at least once.
module tb_cl_arbiter;
  localparam int N = 8;
  localparam int L = 8;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, rel;
  logic [N-1:0][2:0] prio;
  logic ready;
  logic [N-1:0] grant, grant1;
  logic [2:0] chosen, chosen1;
  logic valid, valid1;
  int checks = 0, failures = 0, lock_holds = 0;

  cl_arbiter #(.N(N), .LEVELS(L)) dut (.clk, .rst_n, .req, .release_lock(rel), .prio,
                                       .ready, .grant, .chosen, .valid);
  cl_arbiter #(.N(N), .LEVELS(1)) dut1 (.clk, .rst_n, .req, .release_lock(rel), .prio('0),
                                        .ready, .grant(grant1), .chosen(chosen1), .valid(valid1));

  always #5 clk = ~clk;

  // reference model
  logic [N-1:0] mlock, mlock1;
  function automatic logic [N-1:0] pick(input logic [N-1:0] r, input logic [N-1:0][2:0] p,
                                        input bit use_prio);
    int best;
    best = -1;
    for (int i = 0; i < N; i++) if (r[i] && (!use_prio || int'(p[i]) > best)) best = use_prio ? int'(p[i]) : 0;
    for (int i = 0; i < N; i++)
      if (r[i] && (!use_prio || int'(p[i]) == best)) return N'(1) << i;
    return '0;
  endfunction

  task automatic check(input logic [N-1:0] g, input logic [2:0] c, input logic v,
                       input logic [N-1:0] lk, input bit use_prio, output logic [N-1:0] win);
    logic [N-1:0] w;
    if (|(lk & req & ~rel)) w = lk; else w = pick(req, prio, use_prio);
    win = w;
    checks++;
    if (g !== (w & {N{ready}}) || v !== (ready && |w) || (|w && (N'(1) << c) != w)) begin
      failures++;
      $display("FAIL t=%0t prio=%0b req=%b rel=%b rdy=%b lock=%b grant=%b exp=%b",
               $time, use_prio, req, rel, ready, lk, g, w & {N{ready}});
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] w, w1;
    req = '0; rel = '0; prio = '0; ready = 0;
    mlock = '0; mlock1 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // directed: request 5 and 2 -> 2 wins; 2 keeps lock against 0 until release
    @(negedge clk); req = 8'b0010_0100; rel = '0; ready = 1;
    #1 check(grant1, chosen1, valid1, mlock1, 0, w1);
    if (grant1 !== 8'b0000_0100) begin failures++; $display("directed 1 failed"); end
    checks++;
    @(posedge clk); mlock1 = w1; mlock = w1;
    @(negedge clk); req = 8'b0010_0101;
    #1 check(grant1, chosen1, valid1, mlock1, 0, w1);
    checks++;
    if (grant1 !== 8'b0000_0100) begin failures++; $display("lock did not hold"); end
    @(posedge clk); mlock1 = w1;
    @(negedge clk); rel = 8'b0000_0100;
    #1 check(grant1, chosen1, valid1, mlock1, 0, w1);
    checks++;
    if (grant1 !== 8'b0000_0001) begin failures++; $display("release failed"); end
    @(posedge clk); mlock1 = w1;
    // reset both models' view with a quiet cycle
    @(negedge clk); req = '0; rel = '0;
    @(posedge clk); mlock1 = '0;
    mlock = '0;
    // random
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      req   = N'($urandom) & N'($urandom);
      rel   = N'($urandom) & N'($urandom) & N'($urandom);
      for (int i = 0; i < N; i++) prio[i] = 3'($urandom);
      ready = ($urandom % 4) != 0;
      #1;
      check(grant, chosen, valid, mlock, 1, w);
      check(grant1, chosen1, valid1, mlock1, 0, w1);
      if (|(mlock1 & req & ~rel) && pick(req, prio, 0) != mlock1) lock_holds++;
      @(posedge clk);
      mlock = w; mlock1 = w1;
    end
    checks++;
    if (lock_holds == 0) begin failures++; $display("lock never held"); end
    $display("lock held against a higher-priority request %0d times", lock_holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
