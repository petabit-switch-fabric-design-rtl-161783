// tb_vc_allocator: self-checking test of the VC allocator.
//
// An 8-port, 2-VC allocator with carry-lookahead arbiters is compared every
// cycle with a model: for each output port the lowest-index requesting input VC
// wins if the port has a free VC, and it receives the lowest free VC. A second
// allocator with matrix arbiters gets the same stimulus and is checked for the
// allocation rules only: every grant goes to a requester, each output grants at
// most once and only a free VC, each input VC is granted at most once, and no
// output with a free VC and a requester goes without a grant.
module tb_vc_allocator;
  import psf_pkg::*;
  localparam int P = 8, V = 2, NI = P * V;
  logic clk = 0, rst_n = 0;
  logic [NI-1:0] req, grant, grant_m;
  logic [NI-1:0][2:0] port;
  logic [P-1:0][V-1:0] vc_free;
  logic [NI-1:0][0:0] grant_ovc, grant_ovc_m;
  logic [P-1:0] alloc_valid, alloc_valid_m;
  logic [P-1:0][0:0] alloc_vc, alloc_vc_m;
  logic [P-1:0][3:0] alloc_owner, alloc_owner_m;
  int checks = 0, failures = 0;

  vc_allocator #(.NUM_PORTS(P), .VCS(V), .ARB_KIND(ARB_CL)) dut (.*);
  vc_allocator #(.NUM_PORTS(P), .VCS(V), .ARB_KIND(ARB_MATRIX)) dut_m (
    .clk, .rst_n, .req, .port, .vc_free, .grant(grant_m), .grant_ovc(grant_ovc_m),
    .alloc_valid(alloc_valid_m), .alloc_vc(alloc_vc_m), .alloc_owner(alloc_owner_m));

  always #5 clk = ~clk;

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
    req = '0; port = '0; vc_free = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      req = NI'($urandom);
      for (int k = 0; k < NI; k++) port[k] = 3'($urandom);
      vc_free = (P * V)'($urandom) | (P * V)'($urandom);
      #1;
      for (int o = 0; o < P; o++) begin
        int win, fv, mcount;
        bit anyreq;
        win = -1; fv = -1; mcount = 0; anyreq = 0;
        for (int k = 0; k < NI; k++) if (req[k] && int'(port[k]) == o) begin
          anyreq = 1;
          if (win < 0) win = k;
        end
        for (int v = V - 1; v >= 0; v--) if (vc_free[o][v]) fv = v;
        if (fv < 0) win = -1;
        chk(alloc_valid[o] == (win >= 0), "alloc_valid");
        if (win >= 0) begin
          chk(int'(alloc_owner[o]) == win && int'(alloc_vc[o]) == fv, "alloc owner/vc");
          chk(grant[win] && int'(grant_ovc[win]) == fv, "input grant");
        end
        // matrix allocator: rules
        chk(alloc_valid_m[o] == (anyreq && fv >= 0), "matrix: work conserving");
        for (int k = 0; k < NI; k++) if (grant_m[k] && int'(port[k]) == o) mcount++;
        chk(mcount == int'(alloc_valid_m[o]), "matrix: one grant per output");
        if (alloc_valid_m[o]) chk(vc_free[o][alloc_vc_m[o]] && req[alloc_owner_m[o]] &&
                                   int'(port[alloc_owner_m[o]]) == o, "matrix: legal grant");
      end
      for (int k = 0; k < NI; k++) begin
        bit exp;
        exp = 0;
        for (int o = 0; o < P; o++) if (alloc_valid[o] && int'(alloc_owner[o]) == k) exp = 1;
        chk(grant[k] == exp, "no other grants");
        chk(!grant_m[k] || req[k], "matrix: grant to requester");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
