// tb_input_unit: self-checking test of one router input port (2 VCs, 4 flits
// deep).
//
// The testbench plays upstream sender, routing table, VC allocator and switch
// allocator. It sends random packets (1-4 flits, random VC, priority and
// destination) while respecting the buffer space, answers lookups with
// port = dest[5:0] XOR 0x15, grants output VCs and switch requests at random,
// and withholds credits at random. A reference model of the per-VC state
// (idle -> waiting for an output VC -> active -> idle after the tail) and of the
// FIFOs checks every cycle: va_req/va_port, sa_req, sa_tail/sa_prio, the flit,
// output VC and credit that leave one cycle after a pop, and the 2-cycle gap
// from a head flit's arrival in an idle VC to its VC request (more when the
// other VC is routed first).
module tb_input_unit;
  import psf_pkg::*;
  localparam int P = 64, V = 2, D = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid; logic [0:0] in_vc; flit_t in_flit;
  logic cr_out_valid; logic [0:0] cr_out_vc;
  logic [DEST_W-1:0] lut_addr; logic [5:0] lut_port;
  logic [V-1:0] va_req, va_grant, credit_ok, sa_req, sa_tail, sa_grant;
  logic [V-1:0][5:0] va_port;
  logic [V-1:0][0:0] va_ovc, ovc;
  logic [V-1:0][2:0] sa_prio;
  logic st_valid; logic [0:0] st_ovc; flit_t st_flit;
  int checks = 0, failures = 0, popped = 0, sent = 0, head_lat_checks = 0;

  input_unit #(.NUM_PORTS(P), .VCS(V), .DEPTH(D)) dut (.*);
  assign lut_port = lut_addr[5:0] ^ 6'h15;

  always #5 clk = ~clk;

  // model
  flit_t q [V][$];
  int    st [V];          // 0 idle, 1 valloc, 2 active
  int    route [V];
  int    mo [V];
  int    left [V];        // flits still to send of the current packet per VC
  int    pkt_id = 0;
  int    arrive_head [V]; // cycle a head flit arrived into an empty idle VC, or -1
  int    cyc = 0;
  bit    exp_st; flit_t exp_flit; int exp_ovc, exp_vc;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL cyc=%0d %s", cyc, msg); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_vc = '0; in_flit = '0; va_grant = '0; va_ovc = '0; credit_ok = '0; sa_grant = '0;
    for (int v = 0; v < V; v++) begin st[v] = 0; left[v] = 0; arrive_head[v] = -1; end
    exp_st = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < 6000; cyc++) begin
      int rc;
      bit vag [V];
      int sel;
      @(negedge clk);
      // registered outputs from the previous cycle's pop
      chk(st_valid == exp_st && cr_out_valid == exp_st, "st_valid/cr_out_valid");
      if (exp_st) begin
        chk(st_flit == exp_flit, "st_flit");
        chk(int'(st_ovc) == exp_ovc, "st_ovc");
        chk(int'(cr_out_vc) == exp_vc, "cr_out_vc");
      end
      // drive sender
      in_valid = 0;
      if ($urandom % 3 != 0) begin
        int v;
        v = $urandom % V;
        if (q[v].size() < D) begin
          if (left[v] == 0) begin
            left[v] = 1 + $urandom % 4;
            in_flit.head = 1;
          end else in_flit.head = 0;
          in_flit.tail    = (left[v] == 1);
          in_flit.prio    = 3'($urandom);
          in_flit.dest    = DEST_W'($urandom);
          in_flit.payload = PAYLOAD_W'(pkt_id++);
          in_vc = v[0:0];
          in_valid = 1;
          left[v]--;
        end
      end
      // allocator responses
      for (int v = 0; v < V; v++) begin
        vag[v] = (st[v] == 1) && ($urandom % 2 == 0);
        va_grant[v] = vag[v];
        va_ovc[v] = 1'($urandom);
        credit_ok[v] = ($urandom % 4) != 0;
      end
      #1;
      // combinational checks against the model
      rc = -1;
      for (int v = 0; v < V; v++) if (rc < 0 && st[v] == 0 && q[v].size() > 0) rc = v;
      if (rc >= 0) chk(lut_addr == q[rc][0].dest, "lut_addr");
      for (int v = 0; v < V; v++) begin
        chk(va_req[v] == (st[v] == 1), "va_req");
        if (st[v] == 1) chk(int'(va_port[v]) == route[v], "va_port");
        if (st[v] == 2) chk(int'(ovc[v]) == mo[v], "ovc");
        chk(sa_req[v] == (st[v] == 2 && q[v].size() > 0 && credit_ok[v]), "sa_req");
        if (q[v].size() > 0) begin
          chk(sa_tail[v] == q[v][0].tail, "sa_tail");
          chk(sa_prio[v] == q[v][0].prio, "sa_prio");
        end
        if (va_req[v] && arrive_head[v] >= 0) begin
          chk(cyc - arrive_head[v] >= 2, "head flit to VC request latency");
          if (cyc - arrive_head[v] == 2) head_lat_checks++;
          arrive_head[v] = -1;
        end
      end
      // switch allocator: grant one requesting VC at random
      sa_grant = '0;
      sel = $urandom % V;
      if ($urandom % 4 != 0) begin
        if (sa_req[sel]) sa_grant[sel] = 1;
        else if (sa_req[1 - sel]) sa_grant[1 - sel] = 1;
      end
      // model update at the edge
      @(posedge clk);
      exp_st = |sa_grant;
      for (int v = 0; v < V; v++) begin
        if (sa_grant[v]) begin
          exp_flit = q[v].pop_front();
          exp_ovc = mo[v];
          exp_vc = v;
          popped++;
          if (exp_flit.tail) st[v] = 0;
        end else if (st[v] == 0 && v == rc) begin
          route[v] = int'(q[v][0].dest[5:0] ^ 6'h15);
          st[v] = 1;
        end else if (st[v] == 1 && vag[v]) begin
          mo[v] = int'(va_ovc[v]);
          st[v] = 2;
        end
      end
      if (in_valid) begin
        if (in_flit.head && st[in_vc] == 0 && q[in_vc].size() == 0) arrive_head[in_vc] = cyc;
        q[in_vc].push_back(in_flit);
        sent++;
      end
    end
    chk(popped > 1000, "enough traffic");
    chk(head_lat_checks > 50, "head latency observed");
    $display("sent %0d popped %0d head-latency checks %0d", sent, popped, head_lat_checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
