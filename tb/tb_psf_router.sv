// tb_psf_router: end-to-end test of the router with each arbiter kind.
//
// Four 8-port, 2-VC routers run side by side, each fed by router_traffic:
//   cl, matrix, rr  carry-lookahead, matrix and round-robin arbiters under the
//                   evaluation workload: 10% injection rate per VC, 64 packets
//                   per input port, sinks that always take flits;
//   stress          carry-lookahead arbiters with 60% injection and sinks that
//                   free a slot only 40% of the time, so credits run out.
// router_traffic checks routing, packet integrity and credits. This testbench
// also checks that the smallest head-flit latency is 5 cycles for every kind,
// and counts, through the routers' internal signals, that each mechanism was
// exercised: routing-table loading, VC-allocation waits, switch conflicts, a
// switch connection held for a packet against other requests, priority-level
// selection, credit stalls at inputs and outputs, single- and multi-flit
// packets (body flits skip route computation and VC allocation).
module tb_psf_router;
  import psf_pkg::*;
  localparam int P = 8, V = 2, D = 4;
  localparam int NR = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 cfg_we   [NR];
  logic [DEST_W-1:0]    cfg_addr [NR];
  logic [2:0]           cfg_port [NR];
  logic [P-1:0]         in_valid [NR], cr_out_valid [NR], out_valid [NR], cr_in_valid [NR];
  logic [P-1:0][0:0]    in_vc [NR], cr_out_vc [NR], out_vc [NR], cr_in_vc [NR];
  flit_t [P-1:0]        in_flit [NR], out_flit [NR];
  logic                 done [NR];
  int                   chk [NR], fl [NR], minl [NR], maxl [NR], dlv [NR];
  int                   ist [NR], ost [NR], sp [NR], mp [NR];
  longint               suml [NR];

  localparam arb_kind_e KINDS [NR] = '{ARB_CL, ARB_MATRIX, ARB_RR, ARB_CL};
  localparam int        INJ   [NR] = '{10, 10, 10, 60};
  localparam int        RET   [NR] = '{100, 100, 100, 40};

  int va_wait [NR], sa_conf [NR], held [NR], prio_sel [NR];

  for (genvar r = 0; r < NR; r++) begin : g_r
    psf_router #(.NUM_PORTS(P), .VCS(V), .DEPTH(D), .ARB_KIND(KINDS[r])) dut (
      .clk, .rst_n,
      .cfg_we (cfg_we[r]), .cfg_addr (cfg_addr[r]), .cfg_port (cfg_port[r]),
      .in_valid (in_valid[r]), .in_vc (in_vc[r]), .in_flit (in_flit[r]),
      .cr_out_valid (cr_out_valid[r]), .cr_out_vc (cr_out_vc[r]),
      .out_valid (out_valid[r]), .out_vc (out_vc[r]), .out_flit (out_flit[r]),
      .cr_in_valid (cr_in_valid[r]), .cr_in_vc (cr_in_vc[r])
    );
    router_traffic #(.P(P), .VCS(V), .DEPTH(D), .NPKT(64), .INJ_PCT(INJ[r]), .RET_PCT(RET[r])) gen (
      .clk, .rst_n,
      .cfg_we (cfg_we[r]), .cfg_addr (cfg_addr[r]), .cfg_port (cfg_port[r]),
      .in_valid (in_valid[r]), .in_vc (in_vc[r]), .in_flit (in_flit[r]),
      .cr_out_valid (cr_out_valid[r]), .cr_out_vc (cr_out_vc[r]),
      .out_valid (out_valid[r]), .out_vc (out_vc[r]), .out_flit (out_flit[r]),
      .cr_in_valid (cr_in_valid[r]), .cr_in_vc (cr_in_vc[r]),
      .done (done[r]), .checks (chk[r]), .failures (fl[r]), .min_lat (minl[r]), .max_lat (maxl[r]),
      .sum_lat (suml[r]), .delivered (dlv[r]), .in_stalls (ist[r]), .out_stalls (ost[r]),
      .single_pkts (sp[r]), .multi_pkts (mp[r])
    );

    logic [P-1:0][2:0] prev_in;
    logic [P-1:0]      prev_take;
    always @(posedge clk) if (rst_n) begin
      if (|(dut.va_req & ~dut.va_grant)) va_wait[r]++;
      if (|(dut.sa_req & ~dut.sa_grant)) sa_conf[r]++;
      for (int o = 0; o < P; o++) begin
        int n, pmin, pmax;
        n = 0; pmin = 99; pmax = -1;
        for (int i = 0; i < P; i++) if (dut.u_sa.oreq[o][i]) begin
          n++;
          if (int'(dut.u_sa.in_prio[i]) < pmin) pmin = int'(dut.u_sa.in_prio[i]);
          if (int'(dut.u_sa.in_prio[i]) > pmax) pmax = int'(dut.u_sa.in_prio[i]);
        end
        if (n > 1 && pmin != pmax) prio_sel[r]++;
        if (n > 1 && prev_take[o] && dut.u_sa.out_take[o] && dut.u_sa.out_in[o] == prev_in[o] &&
            prev_in[o] != 3'(0) && dut.u_sa.oreq[o][0] && pmin == pmax)
          held[r]++;   // input 0 wins without a lock under carry-lookahead; another input kept it
      end
      prev_in   <= dut.u_sa.out_in;
      prev_take <= dut.u_sa.out_take;
    end
  end

  int checks = 0, failures = 0;
  longint cycles = 0;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycles++;

  function automatic void need(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endfunction

  initial begin
    string names [NR] = '{"cl", "matrix", "rr", "cl-stress"};
    int t_va, t_sa, t_held, t_prio, t_ist, t_ost, t_sp, t_mp;
    for (int r = 0; r < NR; r++) begin va_wait[r] = 0; sa_conf[r] = 0; held[r] = 0; prio_sel[r] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done[0] && done[1] && done[2] && done[3]);
    repeat (5) @(posedge clk);
    t_va = 0; t_sa = 0; t_held = 0; t_prio = 0; t_ist = 0; t_ost = 0; t_sp = 0; t_mp = 0;
    for (int r = 0; r < NR; r++) begin
      $display("%-10s packets %0d  latency min %0d avg %0.2f max %0d  checks %0d",
               names[r], dlv[r], minl[r], real'(suml[r]) / dlv[r], maxl[r], chk[r]);
      checks += chk[r];
      failures += fl[r];
      need(dlv[r] == P * 64, "all packets delivered");
      need(minl[r] == 5, $sformatf("%s: minimum head latency %0d, expected 5", names[r], minl[r]));
      t_va += va_wait[r]; t_sa += sa_conf[r]; t_held += held[r]; t_prio += prio_sel[r];
      t_ist += ist[r]; t_ost += ost[r]; t_sp += sp[r]; t_mp += mp[r];
    end
    $display("routing table entries loaded per router: %0d", 1 << DEST_W);
    $display("VC allocation waits %0d, switch conflicts %0d, held connections %0d, priority selections %0d",
             t_va, t_sa, t_held, t_prio);
    $display("input credit stalls %0d, output credit stalls %0d, single-flit %0d, multi-flit %0d packets",
             t_ist, t_ost, t_sp, t_mp);
    need(t_va > 0, "VC allocation wait happened");
    need(t_sa > 0, "switch conflict happened");
    need(t_held > 0, "connection held for a packet");
    need(t_prio > 0, "priority-level selection happened");
    need(t_ist > 0, "input credit stall happened");
    need(t_ost > 0, "output credit stall happened");
    need(t_sp > 0 && t_mp > 0, "single- and multi-flit packets");
    $display("cycles %0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
