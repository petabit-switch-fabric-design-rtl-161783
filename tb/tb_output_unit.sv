// tb_output_unit: self-checking test of one router output port (2 VCs, 4
// credits per VC).
//
// The testbench plays the VC allocator, the switch allocator, the crossbar and
// the downstream receiver. It allocates free VCs, sends flits on allocated VCs
// that hold a credit (ending packets at random with a tail), returns credits
// after a random delay, and drives random crossbar flits. A model of busy
// flags, owners and credit counts checks vc_free and credit_ok every cycle,
// that credits never exceed the buffer depth, that a VC is freed by its tail
// flit, and that the output buffer presents the crossbar flit one cycle later.
module tb_output_unit;
  import psf_pkg::*;
  localparam int P = 64, V = 2, D = 4;
  logic clk = 0, rst_n = 0;
  logic [V-1:0] vc_free, credit_ok;
  logic alloc_valid; logic [0:0] alloc_vc; logic [6:0] alloc_owner;
  logic take_valid; logic [0:0] take_vc; logic take_tail; logic [6:0] take_owner;
  logic xb_valid; logic [0:0] xb_vc; flit_t xb_flit;
  logic out_valid; logic [0:0] out_vc; flit_t out_flit;
  logic cr_in_valid; logic [0:0] cr_in_vc;
  int checks = 0, failures = 0, frees = 0, stalls = 0;

  output_unit #(.NUM_PORTS(P), .VCS(V), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  bit busy [V]; int owner [V]; int cred [V]; int held [V];   // held: flits downstream
  logic pv; logic [0:0] pvc; flit_t pflit;

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
    alloc_valid = 0; alloc_vc = '0; alloc_owner = '0; take_valid = 0; take_vc = '0; take_tail = 0;
    take_owner = '0; xb_valid = 0; xb_vc = '0; xb_flit = '0; cr_in_valid = 0; cr_in_vc = '0;
    for (int v = 0; v < V; v++) begin busy[v] = 0; owner[v] = 0; cred[v] = D; held[v] = 0; end
    pv = 0; pvc = '0; pflit = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      int v;
      @(negedge clk);
      chk(out_valid == pv, "out_valid");
      if (pv) chk(out_vc == pvc && out_flit == pflit, "output buffer contents");
      for (int k = 0; k < V; k++) begin
        chk(vc_free[k] == !busy[k], "vc_free");
        chk(credit_ok[k] == (cred[k] > 0), "credit_ok");
        if (busy[k] && cred[k] == 0) stalls++;
      end
      v = $urandom % V;
      alloc_valid = !busy[v] && ($urandom % 2 == 0);
      alloc_vc = v[0:0];
      alloc_owner = 7'($urandom);
      v = $urandom % V;
      take_valid = busy[v] && cred[v] > 0 && ($urandom % 4 != 0) && !(alloc_valid && alloc_vc == v[0:0]);
      take_vc = v[0:0];
      take_tail = ($urandom % 4 == 0);
      take_owner = 7'(owner[v]);
      v = $urandom % V;
      cr_in_valid = held[v] > 0 && ($urandom % 3 == 0);
      cr_in_vc = v[0:0];
      xb_valid = $urandom % 2;
      xb_vc = 1'($urandom);
      xb_flit = {23'($urandom), 32'($urandom)};
      @(posedge clk);
      pv = xb_valid; pvc = xb_vc; pflit = xb_flit;
      if (alloc_valid) begin busy[alloc_vc] = 1; owner[alloc_vc] = int'(alloc_owner); end
      if (take_valid) begin
        cred[take_vc]--; held[take_vc]++;
        if (take_tail) begin busy[take_vc] = 0; frees++; end
      end
      if (cr_in_valid) begin cred[cr_in_vc]++; held[cr_in_vc]--; end
      for (int k = 0; k < V; k++) chk(cred[k] >= 0 && cred[k] <= D, "credit range");
    end
    chk(frees > 100, "VCs freed by tail flits");
    chk(stalls > 0, "credits ran out at least once");
    $display("frees %0d credit stalls %0d", frees, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
