// vc_allocator: gives head flits exclusive use of an output virtual channel.
//
// Every input VC waiting for an output VC (req) names its output port (port).
// For each output port one arbiter (kind ARB_KIND) chooses among all
// NUM_PORTS*VCS input VCs that want that port, and the winner receives the
// lowest-index free VC of the port. An arbiter's resource is ready only while
// the port has a free VC, so no VC is handed out twice, and each input VC asks
// for one port only, so it is granted at most once. At most one VC per output
// port is allocated per cycle. Body flits never come here: they use their head
// flit's allocation.
//
// Input VC k = port*VCS + vc. Timing: grant/grant_ovc and alloc_* are
// combinational in the requests and the output units' free flags; the input and
// output units register them. The arbiters' locks are released at once
// (release_lock all ones) because an allocation is a single event.
module vc_allocator
  import psf_pkg::*;
#(
  parameter int        NUM_PORTS = 64,
  parameter int        VCS       = 2,
  parameter arb_kind_e ARB_KIND  = ARB_CL,
  localparam int PORTW = (NUM_PORTS > 1) ? $clog2(NUM_PORTS) : 1,
  localparam int VCW   = (VCS > 1) ? $clog2(VCS) : 1,
  localparam int NI    = NUM_PORTS * VCS,
  localparam int OWNW  = PORTW + VCW
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic [NI-1:0]                      req,
  input  logic [NI-1:0][PORTW-1:0]           port,
  input  logic [NUM_PORTS-1:0][VCS-1:0]      vc_free,
  output logic [NI-1:0]                      grant,
  output logic [NI-1:0][VCW-1:0]             grant_ovc,
  output logic [NUM_PORTS-1:0]               alloc_valid,
  output logic [NUM_PORTS-1:0][VCW-1:0]      alloc_vc,
  output logic [NUM_PORTS-1:0][OWNW-1:0]     alloc_owner
);

  logic [NUM_PORTS-1:0][NI-1:0]    oreq;
  logic [NUM_PORTS-1:0][NI-1:0]    ogrant;
  logic [NUM_PORTS-1:0][OWNW-1:0]  ochosen;
  logic [NUM_PORTS-1:0][VCW-1:0]   free_vc;
  logic [NUM_PORTS-1:0]            any_free;

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    always_comb begin
      for (int k = 0; k < NI; k++)
        oreq[o][k] = req[k] && (int'(port[k]) == o);
      any_free[o] = |vc_free[o];
      free_vc[o]  = '0;
      for (int v = VCS - 1; v >= 0; v--)
        if (vc_free[o][v]) free_vc[o] = VCW'(v);
    end

    psf_arbiter #(.N(NI), .LEVELS(1), .KIND(ARB_KIND)) u_arb (
      .clk, .rst_n,
      .req          (oreq[o]),
      .release_lock ({NI{1'b1}}),
      .prio         ('0),
      .ready        (any_free[o]),
      .grant        (ogrant[o]),
      .chosen       (ochosen[o]),
      .valid        (alloc_valid[o])
    );
    assign alloc_vc[o]    = free_vc[o];
    assign alloc_owner[o] = ochosen[o];
  end

  // An input VC is granted by the one output port it asked for.
  for (genvar k = 0; k < NI; k++) begin : g_grant
    always_comb begin
      grant[k]     = 1'b0;
      grant_ovc[k] = '0;
      for (int o = 0; o < NUM_PORTS; o++)
        if (ogrant[o][k]) begin
          grant[k]     = 1'b1;
          grant_ovc[k] = free_vc[o];
        end
    end
  end

endmodule
