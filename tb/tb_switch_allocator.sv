// tb_switch_allocator: self-checking test of the switch allocator.
//
// An 8-port, 2-VC allocator with carry-lookahead arbiters and 8 priority levels.
// Random requests, routes, tail bits and priorities are applied and compared
// every cycle with a model of the two arbiter ranks: per input, the VC with the
// highest priority level and then the lowest index wins unless the previous
// winner still requests with a non-tail flit (lock); per output, the same rule
// over the inputs whose picked VC is routed there. Checks the pops (grant), the
// per-output result, that each input pops at most one flit and each output takes
// at most one, and that the crossbar configuration follows one cycle later.
// Counts how often a held connection beat a higher-priority request.
module tb_switch_allocator;
  import psf_pkg::*;
  localparam int P = 8, V = 2;
  logic clk = 0, rst_n = 0;
  logic [P-1:0][V-1:0] req, tail, grant;
  logic [P-1:0][V-1:0][2:0] port, prio;
  logic [P-1:0] out_take, xb_en;
  logic [P-1:0][2:0] out_in, xb_sel;
  logic [P-1:0][0:0] out_vcsel;
  int checks = 0, failures = 0, holds = 0;

  switch_allocator #(.NUM_PORTS(P), .VCS(V), .LEVELS(8), .ARB_KIND(ARB_CL)) dut (.*);

  always #5 clk = ~clk;

  int lock1 [P];   // locked VC per input, -1 none
  int lock2 [P];   // locked input per output, -1 none

  function automatic int pick(input bit r [], input int p [], input bit rel [], input int lock);
    int best;
    if (lock >= 0 && r[lock] && !rel[lock]) return lock;
    best = -1;
    foreach (r[i]) if (r[i] && p[i] > best) best = p[i];
    foreach (r[i]) if (r[i] && p[i] == best) return i;
    return -1;
  endfunction

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL t=%0t %s", $time, msg); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w1 [P], w2 [P];
    logic [P-1:0] pen; logic [P-1:0][2:0] psel;
    req = '0; tail = '0; port = '0; prio = '0;
    for (int i = 0; i < P; i++) begin lock1[i] = -1; lock2[i] = -1; end
    pen = '0; psel = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      chk(xb_en == pen, "xb_en registered");
      for (int o = 0; o < P; o++) if (pen[o]) chk(xb_sel[o] == psel[o], "xb_sel registered");
      for (int i = 0; i < P; i++) for (int v = 0; v < V; v++) begin
        req[i][v]  = ($urandom % 3) != 0;
        tail[i][v] = ($urandom % 4) == 0;
        port[i][v] = 3'($urandom);
        prio[i][v] = ($urandom % 2) ? 3'($urandom) : 3'd0;
      end
      #1;
      // rank 1
      for (int i = 0; i < P; i++) begin
        bit r [] = new [V]; int p [] = new [V]; bit rl [] = new [V];
        for (int v = 0; v < V; v++) begin r[v] = req[i][v]; p[v] = int'(prio[i][v]); rl[v] = tail[i][v]; end
        w1[i] = pick(r, p, rl, lock1[i]);
      end
      // rank 2
      for (int o = 0; o < P; o++) begin
        bit r [] = new [P]; int p [] = new [P]; bit rl [] = new [P];
        int np;
        for (int i = 0; i < P; i++) begin
          r[i]  = w1[i] >= 0 && int'(port[i][w1[i] < 0 ? 0 : w1[i]]) == o;
          p[i]  = w1[i] >= 0 ? int'(prio[i][w1[i]]) : 0;
          rl[i] = w1[i] >= 0 ? tail[i][w1[i]] : 1'b0;
        end
        w2[o] = pick(r, p, rl, lock2[o]);
        np = pick(r, p, rl, -1);
        if (w2[o] >= 0 && np != w2[o]) holds++;
        chk(out_take[o] == (w2[o] >= 0), "out_take");
        if (w2[o] >= 0) chk(int'(out_in[o]) == w2[o] && int'(out_vcsel[o]) == w1[w2[o]], "out_in/out_vcsel");
      end
      for (int i = 0; i < P; i++) begin
        logic [V-1:0] eg;
        eg = '0;
        for (int o = 0; o < P; o++) if (w2[o] == i) eg[w1[i]] = 1;
        chk(grant[i] == eg, "grant (pop)");
        chk($onehot0(grant[i]), "one pop per input");
      end
      @(posedge clk);
      for (int i = 0; i < P; i++) lock1[i] = w1[i];
      for (int o = 0; o < P; o++) lock2[o] = w2[o];
      pen = out_take; psel = out_in;
    end
    chk(holds > 0, "connection held for a packet");
    $display("held connections %0d", holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
