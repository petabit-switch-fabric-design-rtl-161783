// psf_arbiter: selects the arbiter kind used by the allocators.
//
// Instantiates a carry-lookahead (ARB_CL), matrix (ARB_MATRIX) or round-robin
// (ARB_RR) arbiter with the common arbiter interface: request vector, per-request
// release_lock and priority level, a ready input for the shared resource, and a
// combinational one-hot grant, winner index and valid. See cl_arbiter for the
// lock rule. Nothing is added around the chosen arbiter.
module psf_arbiter
  import psf_pkg::*;
#(
  parameter int        N      = 8,
  parameter int        LEVELS = 1,
  parameter arb_kind_e KIND   = ARB_CL,
  localparam int PW    = (LEVELS > 1) ? $clog2(LEVELS) : 1,
  localparam int IW    = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic [N-1:0]         release_lock,
  input  logic [N-1:0][PW-1:0] prio,
  input  logic                 ready,
  output logic [N-1:0]         grant,
  output logic [IW-1:0]        chosen,
  output logic                 valid
);

  if (KIND == ARB_MATRIX) begin : g_matrix
    matrix_arbiter #(.N(N), .LEVELS(LEVELS)) u_arb (.*);
  end else if (KIND == ARB_RR) begin : g_rr
    rr_arbiter #(.N(N), .LEVELS(LEVELS)) u_arb (.*);
  end else begin : g_cl
    cl_arbiter #(.N(N), .LEVELS(LEVELS)) u_arb (.*);
  end

endmodule
