// router_traffic: traffic source, sink and scoreboard for psf_router tests.
//
// Sources: before traffic starts the routing table is loaded with a random
// mapping of all 2**DEST_W destination addresses to output ports (one entry per
// cycle through cfg_*), kept in a shadow copy. Each input port then offers
// NPKT packets: in a cycle with no packet pending on a VC, a new packet is
// created with probability INJ_PCT percent, of 1..4 flits (single-flit packets
// included), on a random VC, with random priority and destination. A link sends
// at most one flit per cycle, from a VC that has a credit (DEPTH credits per VC,
// returned by the router on cr_out_*).
//
// Payload layout used for checking: [41:34] source port, [33:18] packet number,
// [17:14] flit index, [13:10] packet length.
//
// Sinks: every output VC keeps the flits it received in a downstream buffer of
// DEPTH slots and frees one slot, returning a credit, with probability RET_PCT
// percent per cycle (one credit per port per cycle), so slow sinks exhaust
// credits.
//
// Scoreboard: a head flit must leave at the port the table gives for its
// destination; the flits of a packet must follow it on the same output VC, in
// order, without another packet's flits on that VC, up to the tail; every
// packet must arrive exactly once. Latency is counted from the cycle a head flit
// is put on the input link to the cycle it appears on the output link; the
// smallest value is reported (5 cycles through an idle router).
module router_traffic
  import psf_pkg::*;
#(
  parameter int P       = 8,
  parameter int VCS     = 2,
  parameter int DEPTH   = 4,
  parameter int NPKT    = 64,
  parameter int INJ_PCT = 10,
  parameter int RET_PCT = 100,
  localparam int PORTW  = (P > 1) ? $clog2(P) : 1,
  localparam int VCW    = (VCS > 1) ? $clog2(VCS) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  output logic                      cfg_we,
  output logic [DEST_W-1:0]         cfg_addr,
  output logic [PORTW-1:0]          cfg_port,
  output logic [P-1:0]              in_valid,
  output logic [P-1:0][VCW-1:0]     in_vc,
  output flit_t [P-1:0]             in_flit,
  input  logic [P-1:0]              cr_out_valid,
  input  logic [P-1:0][VCW-1:0]     cr_out_vc,
  input  logic [P-1:0]              out_valid,
  input  logic [P-1:0][VCW-1:0]     out_vc,
  input  flit_t [P-1:0]             out_flit,
  output logic [P-1:0]              cr_in_valid,
  output logic [P-1:0][VCW-1:0]     cr_in_vc,
  output logic                      done,
  output int                        checks,
  output int                        failures,
  output int                        min_lat,
  output int                        max_lat,
  output longint                    sum_lat,
  output int                        delivered,
  output int                        in_stalls,     // a flit waited for an input credit
  output int                        out_stalls,    // an output VC had no free downstream slot
  output int                        single_pkts,
  output int                        multi_pkts
);

  localparam int ENTRIES = 1 << DEST_W;

  int          lut [ENTRIES];
  bit          loading;
  int          load_idx;
  longint      cyc;
  // sources
  flit_t       pend   [P][VCS][$];
  int          credit [P][VCS];
  int          made   [P];
  longint      inj_time [P][int];
  // sinks
  int          held   [P][VCS];
  bit          open_pkt [P][VCS];
  int          cur_src  [P][VCS];
  int          cur_seq  [P][VCS];
  int          cur_idx  [P][VCS];
  int          cur_len  [P][VCS];

  function automatic void fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL cycle %0d: %s", cyc, msg);
  endfunction

  initial begin
    checks = 0; failures = 0; min_lat = 1 << 30; max_lat = 0; sum_lat = 0; delivered = 0;
    in_stalls = 0; out_stalls = 0; single_pkts = 0; multi_pkts = 0; done = 0;
    for (int a = 0; a < ENTRIES; a++) lut[a] = $urandom % P;
    for (int i = 0; i < P; i++) begin
      made[i] = 0;
      for (int v = 0; v < VCS; v++) begin
        credit[i][v] = DEPTH; held[i][v] = 0; open_pkt[i][v] = 0;
      end
    end
    loading = 1; load_idx = 0; cyc = 0;
  end

  always_ff @(posedge clk) begin
    if (rst_n) cyc <= cyc + 1;
  end

  // ---------------------------------------------------------------- drive
  always @(negedge clk) begin
    cfg_we = 0; cfg_addr = '0; cfg_port = '0;
    in_valid = '0; in_vc = '0; in_flit = '0;
    cr_in_valid = '0; cr_in_vc = '0;
    if (rst_n) begin
      if (loading) begin
        cfg_we = 1; cfg_addr = DEST_W'(load_idx); cfg_port = PORTW'(lut[load_idx]);
      end else begin
        for (int i = 0; i < P; i++) begin
          int start, v;
          // new packets
          for (int k = 0; k < VCS; k++)
            if (pend[i][k].size() == 0 && made[i] < NPKT && ($urandom % 100) < INJ_PCT) begin
              int len, vc; flit_t f;
              len = 1 + $urandom % 4;
              vc  = $urandom % VCS;
              if (pend[i][vc].size() == 0) begin
                f.prio = PRIO_W'($urandom);
                f.dest = DEST_W'($urandom);
                for (int n = 0; n < len; n++) begin
                  f.head = (n == 0);
                  f.tail = (n == len - 1);
                  f.payload = {8'(i), 16'(made[i]), 4'(n), 4'(len), 10'd0};
                  pend[i][vc].push_back(f);
                end
                if (len == 1) single_pkts++; else multi_pkts++;
                made[i]++;
              end
            end
          // send one flit from a VC with a credit, starting the scan at a random VC
          start = $urandom % VCS;
          for (int k = 0; k < VCS; k++) begin
            v = (start + k) % VCS;
            if (!in_valid[i] && pend[i][v].size() > 0) begin
              if (credit[i][v] > 0) begin
                in_valid[i] = 1;
                in_vc[i]    = VCW'(v);
                in_flit[i]  = pend[i][v][0];
              end else in_stalls++;
            end
          end
        end
        // sinks free slots
        for (int o = 0; o < P; o++) begin
          int start;
          start = $urandom % VCS;
          for (int k = 0; k < VCS; k++) begin
            int v;
            v = (start + k) % VCS;
            if (!cr_in_valid[o] && held[o][v] > 0 && ($urandom % 100) < RET_PCT) begin
              cr_in_valid[o] = 1;
              cr_in_vc[o]    = VCW'(v);
            end
          end
        end
      end
    end
  end

  // ---------------------------------------------------------------- observe
  always @(posedge clk) if (rst_n) begin
    if (loading) begin
      if (cfg_we) load_idx++;
      if (load_idx == ENTRIES) loading <= 0;
    end
    for (int i = 0; i < P; i++) begin
      if (in_valid[i]) begin
        flit_t f;
        f = pend[i][in_vc[i]].pop_front();
        credit[i][in_vc[i]]--;
        if (f.head) inj_time[i][int'(f.payload[33:18])] = cyc;
      end
      if (cr_out_valid[i]) begin
        credit[i][cr_out_vc[i]]++;
        checks++;
        if (credit[i][cr_out_vc[i]] > DEPTH) fail("router returned too many credits");
      end
    end
    for (int o = 0; o < P; o++) begin
      if (cr_in_valid[o]) held[o][cr_in_vc[o]]--;
      for (int v = 0; v < VCS; v++) if (held[o][v] == DEPTH) out_stalls++;
      if (out_valid[o]) begin
        flit_t f; int v, src, seq, idx, len;
        f = out_flit[o]; v = int'(out_vc[o]);
        src = int'(f.payload[41:34]); seq = int'(f.payload[33:18]);
        idx = int'(f.payload[17:14]); len = int'(f.payload[13:10]);
        held[o][v]++;
        checks++;
        if (held[o][v] > DEPTH) fail("output sent without a credit");
        checks++;
        if (f.head) begin
          if (open_pkt[o][v]) fail("head flit interleaved into an open packet");
          if (lut[f.dest] != o) fail($sformatf("packet %0d.%0d left on port %0d, table says %0d",
                                               src, seq, o, lut[f.dest]));
          if (idx != 0) fail("head flit index");
          if (inj_time[src].exists(seq)) begin
            int lat;
            lat = int'(cyc - inj_time[src][seq]);
            if (lat < min_lat) min_lat = lat;
            if (lat > max_lat) max_lat = lat;
            sum_lat += lat;
            inj_time[src].delete(seq);
          end else fail("head flit delivered twice or never sent");
          open_pkt[o][v] = 1; cur_src[o][v] = src; cur_seq[o][v] = seq;
          cur_idx[o][v] = 0; cur_len[o][v] = len;
        end else begin
          if (!open_pkt[o][v]) fail("body flit without a head");
          else if (src != cur_src[o][v] || seq != cur_seq[o][v] || idx != cur_idx[o][v] + 1)
            fail("body flit out of order or from another packet");
          cur_idx[o][v] = idx;
        end
        if (f.tail) begin
          checks++;
          if (idx != len - 1) fail("tail flit before the end of the packet");
          open_pkt[o][v] = 0;
          delivered++;
        end
      end
    end
    if (!loading && !done) begin
      bit all;
      all = (delivered == P * NPKT);
      for (int i = 0; i < P; i++) if (made[i] < NPKT) all = 0;
      if (all) done <= 1;
    end
  end

endmodule
