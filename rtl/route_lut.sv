// route_lut: programmable routing lookup table.
//
// Route computation for head flits. Instead of a routing function tied to one
// network topology, each destination address indexes a table entry that holds
// the output port, so the router can be placed in any topology by loading the
// table. One write port (cfg_*) loads an entry; NUM_READ combinational read
// ports, one per input port, return the entry for a head flit's destination.
//
// Interface: cfg_we writes cfg_port into entry cfg_addr at the clock edge; the
// new value is visible on the read ports from the next cycle. Reset (synchronous,
// active low) loads entry a with a mod NUM_PORTS, a usable default before any
// programming. Table size 2**DEST_W entries of $clog2(NUM_PORTS) bits.
module route_lut
  import psf_pkg::*;
#(
  parameter int NUM_PORTS = 64,
  parameter int NUM_READ  = 64,
  localparam int PORTW    = (NUM_PORTS > 1) ? $clog2(NUM_PORTS) : 1,
  localparam int ENTRIES  = 1 << DEST_W
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             cfg_we,
  input  logic [DEST_W-1:0]                cfg_addr,
  input  logic [PORTW-1:0]                 cfg_port,
  input  logic [NUM_READ-1:0][DEST_W-1:0]  rd_addr,
  output logic [NUM_READ-1:0][PORTW-1:0]   rd_port
);

  logic [PORTW-1:0] table_q [ENTRIES];

  always_ff @(posedge clk)
    if (!rst_n) begin
      for (int a = 0; a < ENTRIES; a++)
        table_q[a] <= PORTW'(a % NUM_PORTS);
    end else if (cfg_we) begin
      table_q[cfg_addr] <= cfg_port;
    end

  always_comb
    for (int r = 0; r < NUM_READ; r++)
      rd_port[r] = table_q[rd_addr[r]];

  a_port_range: assert property (@(posedge clk) disable iff (!rst_n)
    cfg_we |-> int'(cfg_port) < NUM_PORTS);

endmodule
