// switch_allocator: matches input ports to output ports for the crossbar.
//
// Separable input-first allocation, built from two ranks of arbiters of kind
// ARB_KIND with priority-level selection (LEVELS levels, from the flit's prio
// field):
//   1. per input port, an arbiter over its VCS VCs that request the switch picks
//      one VC;
//   2. per output port, an arbiter over the NUM_PORTS input ports whose picked VC
//      is routed there picks one input.
// An input whose pick wins at its output pops that flit (grant). Both ranks use
// the arbiters' lock: a winner keeps winning while it requests and its flit is
// not a tail flit (release_lock = tail), so a connection is held for the time
// slots of one packet and released after its tail flit.
//
// Timing: grant and out_take/out_in/out_vcsel are combinational (same cycle as
// the requests). xb_en/xb_sel, the crossbar configuration, are registered: they
// take effect the next cycle, when the popped flits traverse the switch.
module switch_allocator
  import psf_pkg::*;
#(
  parameter int        NUM_PORTS = 64,
  parameter int        VCS       = 2,
  parameter int        LEVELS    = PRIO_LVLS,
  parameter arb_kind_e ARB_KIND  = ARB_CL,
  localparam int PORTW = (NUM_PORTS > 1) ? $clog2(NUM_PORTS) : 1,
  localparam int VCW   = (VCS > 1) ? $clog2(VCS) : 1,
  localparam int PW    = (LEVELS > 1) ? $clog2(LEVELS) : 1
) (
  input  logic                                     clk,
  input  logic                                     rst_n,
  input  logic [NUM_PORTS-1:0][VCS-1:0]            req,
  input  logic [NUM_PORTS-1:0][VCS-1:0][PORTW-1:0] port,
  input  logic [NUM_PORTS-1:0][VCS-1:0]            tail,
  input  logic [NUM_PORTS-1:0][VCS-1:0][PW-1:0]    prio,
  output logic [NUM_PORTS-1:0][VCS-1:0]            grant,
  output logic [NUM_PORTS-1:0]                     out_take,
  output logic [NUM_PORTS-1:0][PORTW-1:0]          out_in,
  output logic [NUM_PORTS-1:0][VCW-1:0]            out_vcsel,
  output logic [NUM_PORTS-1:0]                     xb_en,
  output logic [NUM_PORTS-1:0][PORTW-1:0]          xb_sel
);

  // rank 1: per input port
  logic [NUM_PORTS-1:0][VCS-1:0] in_win;
  logic [NUM_PORTS-1:0][VCW-1:0] in_vc;
  logic [NUM_PORTS-1:0]          in_any;
  // rank 2: per output port
  logic [NUM_PORTS-1:0][NUM_PORTS-1:0]         oreq;
  logic [NUM_PORTS-1:0]                        in_tail;
  logic [NUM_PORTS-1:0][PW-1:0]                in_prio;
  logic [NUM_PORTS-1:0][PORTW-1:0]             in_port;
  logic [NUM_PORTS-1:0][NUM_PORTS-1:0]         ogrant;
  logic [NUM_PORTS-1:0]                        in_won;

  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_in
    psf_arbiter #(.N(VCS), .LEVELS(LEVELS), .KIND(ARB_KIND)) u_arb (
      .clk, .rst_n,
      .req          (req[i]),
      .release_lock (tail[i]),
      .prio         (prio[i]),
      .ready        (1'b1),
      .grant        (in_win[i]),
      .chosen       (in_vc[i]),
      .valid        (in_any[i])
    );
  end

  always_comb
    for (int i = 0; i < NUM_PORTS; i++) begin
      in_tail[i] = tail[i][in_vc[i]];
      in_prio[i] = prio[i][in_vc[i]];
      in_port[i] = port[i][in_vc[i]];
    end

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    always_comb
      for (int i = 0; i < NUM_PORTS; i++)
        oreq[o][i] = in_any[i] && (int'(in_port[i]) == o);

    psf_arbiter #(.N(NUM_PORTS), .LEVELS(LEVELS), .KIND(ARB_KIND)) u_arb (
      .clk, .rst_n,
      .req          (oreq[o]),
      .release_lock (in_tail),
      .prio         (in_prio),
      .ready        (1'b1),
      .grant        (ogrant[o]),
      .chosen       (out_in[o]),
      .valid        (out_take[o])
    );
  end

  always_comb begin
    in_won = '0;
    for (int o = 0; o < NUM_PORTS; o++)
      in_won = in_won | ogrant[o];
    for (int i = 0; i < NUM_PORTS; i++)
      grant[i] = in_won[i] ? in_win[i] : '0;
    for (int o = 0; o < NUM_PORTS; o++)
      out_vcsel[o] = in_vc[out_in[o]];
  end

  always_ff @(posedge clk)
    if (!rst_n) begin
      xb_en  <= '0;
      xb_sel <= '0;
    end else begin
      xb_en  <= out_take;
      xb_sel <= out_in;
    end

endmodule
