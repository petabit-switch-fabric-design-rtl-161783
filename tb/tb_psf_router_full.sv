// tb_psf_router_full: the router at its full default size, end to end.
//
// One psf_router with its default parameters (64 ports, 2 VCs per port, 4-flit
// VC buffers, carry-lookahead arbiters) runs the evaluation workload: the
// routing table is loaded with a random mapping, then every input port injects
// 64 packets of 1..4 flits at a 10% injection rate per VC into sinks that always
// take flits. router_traffic checks routing, packet integrity and credit use;
// this testbench checks that all 4096 packets arrive, that the smallest
// head-flit latency is the 5-cycle pipeline latency, and reports the latency
// spread and the channel utilisation of the output links.
module tb_psf_router_full;
  import psf_pkg::*;
  localparam int P = 64, V = 2, D = 4, NPKT = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              cfg_we;
  logic [DEST_W-1:0] cfg_addr;
  logic [5:0]        cfg_port;
  logic [P-1:0]      in_valid, cr_out_valid, out_valid, cr_in_valid;
  logic [P-1:0][0:0] in_vc, cr_out_vc, out_vc, cr_in_vc;
  flit_t [P-1:0]     in_flit, out_flit;
  logic              done;
  int                chk, fl, minl, maxl, dlv, ist, ost, sp, mp;
  longint            suml;

  psf_router dut (.*);

  router_traffic #(.P(P), .VCS(V), .DEPTH(D), .NPKT(NPKT), .INJ_PCT(10), .RET_PCT(100)) gen (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_port, .in_valid, .in_vc, .in_flit,
    .cr_out_valid, .cr_out_vc, .out_valid, .out_vc, .out_flit, .cr_in_valid, .cr_in_vc,
    .done, .checks (chk), .failures (fl), .min_lat (minl), .max_lat (maxl), .sum_lat (suml),
    .delivered (dlv), .in_stalls (ist), .out_stalls (ost), .single_pkts (sp), .multi_pkts (mp));

  int checks = 0, failures = 0;
  longint cycles = 0, out_flits = 0;
  always @(posedge clk) if (rst_n) begin
    cycles++;
    out_flits += $countones(out_valid);
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done);
    repeat (5) @(posedge clk);
    checks = chk + 2;
    failures = fl;
    if (dlv != P * NPKT) begin failures++; $display("FAIL delivered %0d of %0d", dlv, P * NPKT); end
    if (minl != 5) begin failures++; $display("FAIL minimum latency %0d", minl); end
    $display("packets %0d, head latency min %0d avg %0.2f max %0d cycles", dlv, minl,
             real'(suml) / dlv, maxl);
    $display("cycles %0d (256 of them load the table), output channel utilisation %0.3f",
             cycles, real'(out_flits) / (real'(cycles) * P));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
