// crossbar: the router's switch.
//
// A NUM_PORTS x NUM_PORTS crossbar built as one multiplexer per output. Output o
// carries input sel[o] when en[o] is set and zero otherwise. The switch
// allocator guarantees that each input drives at most one output and that each
// output listens to at most one input, and supplies sel/en registered, one cycle
// after the allocation, the same cycle the popped flits reach the inputs.
// Purely combinational; W is the width of one input (flit plus its output VC).
module crossbar #(
  parameter int NUM_PORTS = 64,
  parameter int W         = 56,
  localparam int PORTW    = (NUM_PORTS > 1) ? $clog2(NUM_PORTS) : 1
) (
  input  logic [NUM_PORTS-1:0][W-1:0]     in_data,
  input  logic [NUM_PORTS-1:0][PORTW-1:0] sel,
  input  logic [NUM_PORTS-1:0]            en,
  output logic [NUM_PORTS-1:0][W-1:0]     out_data,
  output logic [NUM_PORTS-1:0]            out_valid
);

  always_comb
    for (int o = 0; o < NUM_PORTS; o++) begin
      out_valid[o] = en[o];
      out_data[o]  = en[o] ? in_data[sel[o]] : '0;
    end

endmodule
