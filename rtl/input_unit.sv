// input_unit: one input port of the router, with a buffer per virtual channel.
//
// Arriving flits are written into the FIFO of the VC named on the link and held
// there until the switch forwards them. Each VC keeps the state of the packet at
// its buffer front: a global state G (idle / waiting for an output VC / active),
// the route R (output port), the output VC O, the FIFO pointers P, and, through
// credit_ok, whether the output VC has a credit (C).
//
// Per-packet flow of a VC:
//   IDLE     a head flit at the buffer front is routed: its destination goes to
//            the lookup table (lut_addr) and the returned port is stored in R.
//            One VC per port is routed per cycle, the lowest-index one.
//   VALLOC   va_req is raised for output port R until the VC allocator grants an
//            output VC (va_grant, va_ovc), which is stored in O.
//   ACTIVE   while the FIFO holds a flit and the output VC has a credit, sa_req
//            is raised. sa_grant pops the flit; the tail flit returns the VC to
//            IDLE. Body flits skip routing and VC allocation.
// The flit popped in a cycle appears on st_flit/st_ovc the next cycle (switch
// traversal), and a credit for the freed slot is returned upstream on
// cr_out_valid/cr_out_vc, also the next cycle.
//
// Flow control is credit based: the upstream sender must not send into a full
// VC buffer (asserted). Reset is synchronous, active low. FIFO depth DEPTH per
// VC is this design's choice; the register-based FIFO per VC is plain logic.
module input_unit
  import psf_pkg::*;
#(
  parameter int NUM_PORTS = 64,
  parameter int VCS       = 2,
  parameter int DEPTH     = 4,
  localparam int PORTW    = (NUM_PORTS > 1) ? $clog2(NUM_PORTS) : 1,
  localparam int VCW      = (VCS > 1) ? $clog2(VCS) : 1,
  localparam int CW       = $clog2(DEPTH + 1),
  localparam int AW       = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // link from upstream
  input  logic                          in_valid,
  input  logic [VCW-1:0]                in_vc,
  input  flit_t                         in_flit,
  output logic                          cr_out_valid,
  output logic [VCW-1:0]                cr_out_vc,
  // route computation
  output logic [DEST_W-1:0]             lut_addr,
  input  logic [PORTW-1:0]              lut_port,
  // VC allocation
  output logic [VCS-1:0]                va_req,
  output logic [VCS-1:0][PORTW-1:0]     va_port,
  input  logic [VCS-1:0]                va_grant,
  input  logic [VCS-1:0][VCW-1:0]       va_ovc,
  // switch allocation
  output logic [VCS-1:0][VCW-1:0]       ovc,
  input  logic [VCS-1:0]                credit_ok,
  output logic [VCS-1:0]                sa_req,
  output logic [VCS-1:0]                sa_tail,
  output logic [VCS-1:0][PRIO_W-1:0]    sa_prio,
  input  logic [VCS-1:0]                sa_grant,
  // switch traversal
  output logic                          st_valid,
  output logic [VCW-1:0]                st_ovc,
  output flit_t                         st_flit
);

  flit_t               mem_q  [VCS][DEPTH];
  logic [AW-1:0]       rd_q   [VCS];
  logic [AW-1:0]       wr_q   [VCS];
  logic [CW-1:0]       cnt_q  [VCS];
  vc_state_e           g_q    [VCS];
  logic [PORTW-1:0]    r_q    [VCS];
  logic [VCW-1:0]      o_q    [VCS];

  flit_t               front  [VCS];
  logic [VCS-1:0]      nonempty;
  logic [VCS-1:0]      rc_sel;        // one-hot: VC routed this cycle
  logic                rc_any;
  logic                rc_head;       // the routed front flit is a head flit
  logic [VCW-1:0]      pop_vc;
  logic                pop;

  always_comb begin
    for (int v = 0; v < VCS; v++) begin
      front[v]    = mem_q[v][rd_q[v]];
      nonempty[v] = (cnt_q[v] != '0);
      va_req[v]   = (g_q[v] == VC_VALLOC);
      va_port[v]  = r_q[v];
      ovc[v]      = o_q[v];
      sa_req[v]   = (g_q[v] == VC_ACTIVE) && nonempty[v] && credit_ok[v];
      sa_tail[v]  = front[v].tail;
      sa_prio[v]  = front[v].prio;
    end
    rc_sel = '0;
    rc_any = 1'b0;
    lut_addr = '0;
    rc_head  = 1'b0;
    for (int v = 0; v < VCS; v++)
      if (!rc_any && g_q[v] == VC_IDLE && nonempty[v]) begin
        rc_sel[v] = 1'b1;
        rc_any    = 1'b1;
        lut_addr  = front[v].dest;
        rc_head   = front[v].head;
      end
    pop    = |sa_grant;
    pop_vc = '0;
    for (int v = 0; v < VCS; v++)
      if (sa_grant[v]) pop_vc = VCW'(v);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int v = 0; v < VCS; v++) begin
        rd_q[v]  <= '0;
        wr_q[v]  <= '0;
        cnt_q[v] <= '0;
        g_q[v]   <= VC_IDLE;
        r_q[v]   <= '0;
        o_q[v]   <= '0;
      end
      st_valid     <= 1'b0;
      st_ovc       <= '0;
      st_flit      <= '0;
      cr_out_valid <= 1'b0;
      cr_out_vc    <= '0;
    end else begin
      for (int v = 0; v < VCS; v++) begin
        logic push_v, pop_v;
        push_v = in_valid && (int'(in_vc) == v);
        pop_v  = sa_grant[v];
        if (push_v) begin
          mem_q[v][wr_q[v]] <= in_flit;
          wr_q[v] <= (int'(wr_q[v]) == DEPTH - 1) ? '0 : wr_q[v] + AW'(1);
        end
        if (pop_v)
          rd_q[v] <= (int'(rd_q[v]) == DEPTH - 1) ? '0 : rd_q[v] + AW'(1);
        cnt_q[v] <= cnt_q[v] + CW'(push_v) - CW'(pop_v);
        // per-VC state
        unique case (g_q[v])
          VC_IDLE:   if (rc_sel[v]) begin
                       r_q[v] <= lut_port;
                       g_q[v] <= VC_VALLOC;
                     end
          VC_VALLOC: if (va_grant[v]) begin
                       o_q[v] <= va_ovc[v];
                       g_q[v] <= VC_ACTIVE;
                     end
          VC_ACTIVE: if (pop_v && front[v].tail) g_q[v] <= VC_IDLE;
          default:   g_q[v] <= VC_IDLE;
        endcase
      end
      st_valid     <= pop;
      st_ovc       <= o_q[pop_vc];
      st_flit      <= front[pop_vc];
      cr_out_valid <= pop;
      cr_out_vc    <= pop_vc;
    end
  end

  // Upstream must respect credits; a VC starts a packet with a head flit;
  // at most one flit leaves the port per cycle, and only when requested.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> int'(cnt_q[in_vc]) < DEPTH);
  a_head_first: assert property (@(posedge clk) disable iff (!rst_n)
    rc_any |-> rc_head);
  a_one_pop: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sa_grant));
  a_pop_req: assert property (@(posedge clk) disable iff (!rst_n) (sa_grant & ~sa_req) == '0);

endmodule
