// tb_crossbar: self-checking test of the crossbar switch.
//
// A 64-port, 56-bit crossbar. Each step draws random input data and a random
// partial permutation (each output enabled or not, each enabled output taking a
// distinct input) and checks every output against the selected input, and that
// disabled outputs are zero and not valid. Combinational: checked in the same
// step.
module tb_crossbar;
  localparam int P = 64, W = 56;
  logic [P-1:0][W-1:0] in_data, out_data;
  logic [P-1:0][5:0] sel;
  logic [P-1:0] en, out_valid;
  int checks = 0, failures = 0;

  crossbar #(.NUM_PORTS(P), .W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int perm [P];
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < P; i++) begin
        in_data[i] = {W'($urandom), 32'($urandom)};
        perm[i] = i;
      end
      for (int i = P - 1; i > 0; i--) begin
        int j, tmp;
        j = $urandom % (i + 1);
        tmp = perm[i]; perm[i] = perm[j]; perm[j] = tmp;
      end
      for (int o = 0; o < P; o++) begin
        sel[o] = 6'(perm[o]);
        en[o]  = ($urandom % 3) != 0;
      end
      #1;
      for (int o = 0; o < P; o++) begin
        checks++;
        if (out_valid[o] !== en[o] || out_data[o] !== (en[o] ? in_data[perm[o]] : '0)) begin
          failures++;
          $display("FAIL out %0d", o);
        end
      end
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
