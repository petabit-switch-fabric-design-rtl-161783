// psf_router: high-radix input-queued virtual-channel router.
//
// A single router with NUM_PORTS ports (64 by default), VCS virtual channels per
// port (2) and 55-bit flits, for use as the building block of a switch fabric.
// A packet is a sequence of flits; its head flit carries a destination address.
// Each packet passes four stages:
//   route computation   the head flit's destination indexes a programmable lookup
//                       table (route_lut) that returns the output port, so the
//                       router fits any network topology;
//   VC allocation       the head flit wins a free output VC of that port
//                       (vc_allocator); body flits reuse it;
//   switch allocation   each cycle the input and output ports are matched
//                       (switch_allocator); a match is held for a packet;
//   switch traversal    the matched flits cross the crossbar the next cycle and
//                       land in the output units' output buffers.
// All arbiters are of kind ARB_KIND: carry-lookahead by default, matrix or round
// robin as alternatives. The switch allocator's arbiters honour 8 packet
// priority levels.
//
// Links are credit based in both directions. An input link carries in_valid,
// in_vc and in_flit; for each flit that leaves an input buffer the router
// returns a credit on cr_out_valid/cr_out_vc one cycle later. An output link
// carries out_valid/out_vc/out_flit; the receiver returns a credit on
// cr_in_valid/cr_in_vc when it frees a slot. Both sides assume DEPTH-flit
// buffers per VC. The lookup table is loaded through cfg_we/cfg_addr/cfg_port.
//
// Latency with no contention: a head flit presented in cycle t is routed in t+1,
// gets its output VC in t+2, wins the switch in t+3, crosses it in t+4 and is
// on the output link in t+5. A body flit that finds its packet's VC already
// active leaves 3 cycles after it arrives. Throughput is one flit per cycle per
// port. Reset is synchronous, active low.
//
// Radix, VC count, flit width, the arbiter kinds and the lookup-table routing
// follow the design study this router comes from; the flit field layout, buffer
// depth, credit protocol, pipeline timing and allocator structure are this
// design's own choices.
module psf_router
  import psf_pkg::*;
#(
  parameter int        NUM_PORTS = 64,
  parameter int        VCS       = 2,
  parameter int        DEPTH     = 4,
  parameter arb_kind_e ARB_KIND  = ARB_CL,
  localparam int PORTW = (NUM_PORTS > 1) ? $clog2(NUM_PORTS) : 1,
  localparam int VCW   = (VCS > 1) ? $clog2(VCS) : 1,
  localparam int OWNW  = PORTW + VCW
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // routing table programming
  input  logic                            cfg_we,
  input  logic [DEST_W-1:0]               cfg_addr,
  input  logic [PORTW-1:0]                cfg_port,
  // input links
  input  logic [NUM_PORTS-1:0]            in_valid,
  input  logic [NUM_PORTS-1:0][VCW-1:0]   in_vc,
  input  flit_t [NUM_PORTS-1:0]           in_flit,
  output logic [NUM_PORTS-1:0]            cr_out_valid,
  output logic [NUM_PORTS-1:0][VCW-1:0]   cr_out_vc,
  // output links
  output logic [NUM_PORTS-1:0]            out_valid,
  output logic [NUM_PORTS-1:0][VCW-1:0]   out_vc,
  output flit_t [NUM_PORTS-1:0]           out_flit,
  input  logic [NUM_PORTS-1:0]            cr_in_valid,
  input  logic [NUM_PORTS-1:0][VCW-1:0]   cr_in_vc
);

  localparam int XW = VCW + FLIT_W;   // crossbar lane: output VC + flit

  // route computation
  logic [NUM_PORTS-1:0][DEST_W-1:0]        lut_addr;
  logic [NUM_PORTS-1:0][PORTW-1:0]         lut_port;
  // VC allocation
  logic [NUM_PORTS-1:0][VCS-1:0]            va_req;
  logic [NUM_PORTS-1:0][VCS-1:0][PORTW-1:0] va_port;
  logic [NUM_PORTS-1:0][VCS-1:0]            va_grant;
  logic [NUM_PORTS-1:0][VCS-1:0][VCW-1:0]   va_ovc;
  logic [NUM_PORTS-1:0][VCS-1:0]            vc_free;
  logic [NUM_PORTS-1:0]                     alloc_valid;
  logic [NUM_PORTS-1:0][VCW-1:0]            alloc_vc;
  logic [NUM_PORTS-1:0][OWNW-1:0]           alloc_owner;
  // switch allocation
  logic [NUM_PORTS-1:0][VCS-1:0][VCW-1:0]    ovc;
  logic [NUM_PORTS-1:0][VCS-1:0]             credit_ok_in;
  logic [NUM_PORTS-1:0][VCS-1:0]             credit_ok_out;
  logic [NUM_PORTS-1:0][VCS-1:0]             sa_req;
  logic [NUM_PORTS-1:0][VCS-1:0]             sa_tail;
  logic [NUM_PORTS-1:0][VCS-1:0][PRIO_W-1:0] sa_prio;
  logic [NUM_PORTS-1:0][VCS-1:0]             sa_grant;
  logic [NUM_PORTS-1:0]                      out_take;
  logic [NUM_PORTS-1:0][PORTW-1:0]           out_in;
  logic [NUM_PORTS-1:0][VCW-1:0]             out_vcsel;
  logic [NUM_PORTS-1:0][VCW-1:0]             take_vc;
  logic [NUM_PORTS-1:0]                      take_tail;
  logic [NUM_PORTS-1:0][OWNW-1:0]            take_owner;
  // switch traversal
  logic [NUM_PORTS-1:0]                      st_valid;
  logic [NUM_PORTS-1:0][VCW-1:0]             st_ovc;
  flit_t [NUM_PORTS-1:0]                     st_flit;
  logic [NUM_PORTS-1:0][XW-1:0]              xb_in;
  logic [NUM_PORTS-1:0][XW-1:0]              xb_out;
  logic [NUM_PORTS-1:0]                      xb_en;
  logic [NUM_PORTS-1:0][PORTW-1:0]           xb_sel;
  logic [NUM_PORTS-1:0]                      xb_valid;

  route_lut #(.NUM_PORTS(NUM_PORTS), .NUM_READ(NUM_PORTS)) u_lut (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_port,
    .rd_addr (lut_addr),
    .rd_port (lut_port)
  );

  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_in
    input_unit #(.NUM_PORTS(NUM_PORTS), .VCS(VCS), .DEPTH(DEPTH)) u_in (
      .clk, .rst_n,
      .in_valid     (in_valid[i]),
      .in_vc        (in_vc[i]),
      .in_flit      (in_flit[i]),
      .cr_out_valid (cr_out_valid[i]),
      .cr_out_vc    (cr_out_vc[i]),
      .lut_addr     (lut_addr[i]),
      .lut_port     (lut_port[i]),
      .va_req       (va_req[i]),
      .va_port      (va_port[i]),
      .va_grant     (va_grant[i]),
      .va_ovc       (va_ovc[i]),
      .ovc          (ovc[i]),
      .credit_ok    (credit_ok_in[i]),
      .sa_req       (sa_req[i]),
      .sa_tail      (sa_tail[i]),
      .sa_prio      (sa_prio[i]),
      .sa_grant     (sa_grant[i]),
      .st_valid     (st_valid[i]),
      .st_ovc       (st_ovc[i]),
      .st_flit      (st_flit[i])
    );
  end

  // An input VC may use the switch only while its output VC has a credit.
  always_comb
    for (int i = 0; i < NUM_PORTS; i++)
      for (int v = 0; v < VCS; v++)
        credit_ok_in[i][v] = credit_ok_out[va_port[i][v]][ovc[i][v]];

  vc_allocator #(.NUM_PORTS(NUM_PORTS), .VCS(VCS), .ARB_KIND(ARB_KIND)) u_va (
    .clk, .rst_n,
    .req         (va_req),
    .port        (va_port),
    .vc_free     (vc_free),
    .grant       (va_grant),
    .grant_ovc   (va_ovc),
    .alloc_valid (alloc_valid),
    .alloc_vc    (alloc_vc),
    .alloc_owner (alloc_owner)
  );

  switch_allocator #(.NUM_PORTS(NUM_PORTS), .VCS(VCS), .LEVELS(PRIO_LVLS),
                     .ARB_KIND(ARB_KIND)) u_sa (
    .clk, .rst_n,
    .req       (sa_req),
    .port      (va_port),
    .tail      (sa_tail),
    .prio      (sa_prio),
    .grant     (sa_grant),
    .out_take  (out_take),
    .out_in    (out_in),
    .out_vcsel (out_vcsel),
    .xb_en     (xb_en),
    .xb_sel    (xb_sel)
  );

  // What each output port receives this cycle: the output VC and tail bit of the
  // winning input VC, for the output unit's credit and VC bookkeeping.
  always_comb
    for (int o = 0; o < NUM_PORTS; o++) begin
      take_vc[o]    = ovc[out_in[o]][out_vcsel[o]];
      take_tail[o]  = sa_tail[out_in[o]][out_vcsel[o]];
      take_owner[o] = {out_in[o], out_vcsel[o]};
    end

  always_comb
    for (int i = 0; i < NUM_PORTS; i++)
      xb_in[i] = {st_ovc[i], st_flit[i]};

  crossbar #(.NUM_PORTS(NUM_PORTS), .W(XW)) u_xbar (
    .in_data   (xb_in),
    .sel       (xb_sel),
    .en        (xb_en),
    .out_data  (xb_out),
    .out_valid (xb_valid)
  );

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    output_unit #(.NUM_PORTS(NUM_PORTS), .VCS(VCS), .DEPTH(DEPTH)) u_out (
      .clk, .rst_n,
      .vc_free     (vc_free[o]),
      .credit_ok   (credit_ok_out[o]),
      .alloc_valid (alloc_valid[o]),
      .alloc_vc    (alloc_vc[o]),
      .alloc_owner (alloc_owner[o]),
      .take_valid  (out_take[o]),
      .take_vc     (take_vc[o]),
      .take_tail   (take_tail[o]),
      .take_owner  (take_owner[o]),
      .xb_valid    (xb_valid[o]),
      .xb_vc       (xb_out[o][XW-1 -: VCW]),
      .xb_flit     (xb_out[o][FLIT_W-1:0]),
      .out_valid   (out_valid[o]),
      .out_vc      (out_vc[o]),
      .out_flit    (out_flit[o]),
      .cr_in_valid (cr_in_valid[o]),
      .cr_in_vc    (cr_in_vc[o])
    );
  end

  // Every flit that crosses the switch was popped from its input the cycle before.
  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_chk
    a_st_match: assert property (@(posedge clk) disable iff (!rst_n)
      xb_en[o] |-> st_valid[xb_sel[o]]);
  end

endmodule
