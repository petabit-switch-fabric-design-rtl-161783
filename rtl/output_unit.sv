// output_unit: one output port of the router.
//
// Holds, per output virtual channel, a global state G (free or allocated to a
// packet), the input VC I that owns it, and a credit count C of free slots in
// the downstream buffer of that VC. The flit leaving the crossbar is stored in
// a one-entry output buffer and sent downstream the next cycle.
//
// Interface and timing:
//   vc_free / credit_ok  state seen by the VC and switch allocators (combinational
//                        from registers).
//   alloc_*              the VC allocator hands output VC alloc_vc to input VC
//                        alloc_owner; it is busy from the next cycle.
//   take_*               the switch allocator sent a flit to this port on VC
//                        take_vc this cycle: one credit is used; a tail flit
//                        frees the VC from the next cycle.
//   xb_*                 the flit arriving through the crossbar (one cycle after
//                        take_*), registered into out_valid/out_vc/out_flit.
//   cr_in_*              a credit returned by the downstream receiver.
// Credits start at DEPTH, the assumed depth of each downstream VC buffer, so the
// output buffer never has to wait: a flit is only switched when the downstream
// VC can take it. Reset is synchronous, active low.
module output_unit
  import psf_pkg::*;
#(
  parameter int NUM_PORTS = 64,
  parameter int VCS       = 2,
  parameter int DEPTH     = 4,
  localparam int PORTW    = (NUM_PORTS > 1) ? $clog2(NUM_PORTS) : 1,
  localparam int VCW      = (VCS > 1) ? $clog2(VCS) : 1,
  localparam int OWNW     = PORTW + VCW,
  localparam int CW       = $clog2(DEPTH + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  output logic [VCS-1:0]        vc_free,
  output logic [VCS-1:0]        credit_ok,
  input  logic                  alloc_valid,
  input  logic [VCW-1:0]        alloc_vc,
  input  logic [OWNW-1:0]       alloc_owner,
  input  logic                  take_valid,
  input  logic [VCW-1:0]        take_vc,
  input  logic                  take_tail,
  input  logic [OWNW-1:0]       take_owner,
  input  logic                  xb_valid,
  input  logic [VCW-1:0]        xb_vc,
  input  flit_t                 xb_flit,
  output logic                  out_valid,
  output logic [VCW-1:0]        out_vc,
  output flit_t                 out_flit,
  input  logic                  cr_in_valid,
  input  logic [VCW-1:0]        cr_in_vc
);

  logic [VCS-1:0]  busy_q;          // G
  logic [OWNW-1:0] owner_q [VCS];   // I
  logic [CW-1:0]   cred_q  [VCS];   // C

  always_comb
    for (int v = 0; v < VCS; v++) begin
      vc_free[v]   = !busy_q[v];
      credit_ok[v] = (cred_q[v] != '0);
    end

  always_ff @(posedge clk)
    if (!rst_n) begin
      busy_q    <= '0;
      out_valid <= 1'b0;
      out_vc    <= '0;
      out_flit  <= '0;
      for (int v = 0; v < VCS; v++) begin
        owner_q[v] <= '0;
        cred_q[v]  <= CW'(DEPTH);
      end
    end else begin
      for (int v = 0; v < VCS; v++) begin
        logic use_v, ret_v;
        use_v = take_valid && (int'(take_vc) == v);
        ret_v = cr_in_valid && (int'(cr_in_vc) == v);
        cred_q[v] <= cred_q[v] - CW'(use_v) + CW'(ret_v);
        if (alloc_valid && int'(alloc_vc) == v) begin
          busy_q[v]  <= 1'b1;
          owner_q[v] <= alloc_owner;
        end else if (use_v && take_tail) begin
          busy_q[v]  <= 1'b0;
        end
      end
      out_valid <= xb_valid;
      out_vc    <= xb_vc;
      out_flit  <= xb_flit;
    end

  a_alloc_free: assert property (@(posedge clk) disable iff (!rst_n)
    alloc_valid |-> !busy_q[alloc_vc]);
  a_take_credit: assert property (@(posedge clk) disable iff (!rst_n)
    take_valid |-> (cred_q[take_vc] != '0) && busy_q[take_vc]);
  a_take_owner: assert property (@(posedge clk) disable iff (!rst_n)
    take_valid |-> take_owner == owner_q[take_vc]);
  a_credit_max: assert property (@(posedge clk) disable iff (!rst_n)
    cr_in_valid |-> int'(cred_q[cr_in_vc]) < DEPTH || (take_valid && take_vc == cr_in_vc));

endmodule
