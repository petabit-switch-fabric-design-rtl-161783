// tb_route_lut: self-checking test of the programmable routing table.
//
// A 64-port table with 4 read ports. Checks the reset contents (entry a holds
// a mod 64) for every entry, then performs random writes and random reads on all
// read ports against a shadow copy of the table, including a read of an entry
// in the cycle after it is written.
module tb_route_lut;
  import psf_pkg::*;
  localparam int P = 64, R = 4;
  logic clk = 0, rst_n = 0;
  logic cfg_we;
  logic [DEST_W-1:0] cfg_addr;
  logic [5:0] cfg_port;
  logic [R-1:0][DEST_W-1:0] rd_addr;
  logic [R-1:0][5:0] rd_port;
  int checks = 0, failures = 0;
  logic [5:0] shadow [256];

  route_lut #(.NUM_PORTS(P), .NUM_READ(R)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check();
    #1;
    for (int r = 0; r < R; r++) begin
      checks++;
      if (rd_port[r] !== shadow[rd_addr[r]]) begin
        failures++;
        $display("FAIL addr=%0d got=%0d exp=%0d", rd_addr[r], rd_port[r], shadow[rd_addr[r]]);
      end
    end
  endtask

  initial begin
    cfg_we = 0; cfg_addr = '0; cfg_port = '0; rd_addr = '0;
    for (int a = 0; a < 256; a++) shadow[a] = 6'(a % P);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 256; a += R) begin
      @(negedge clk);
      for (int r = 0; r < R; r++) rd_addr[r] = DEST_W'(a + r);
      read_check();
    end
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      cfg_we   = $urandom % 2;
      cfg_addr = DEST_W'($urandom);
      cfg_port = 6'($urandom);
      for (int r = 0; r < R; r++) rd_addr[r] = DEST_W'($urandom);
      rd_addr[0] = cfg_addr;   // the write is not visible in the same cycle
      read_check();
      @(posedge clk);
      if (cfg_we) shadow[cfg_addr] = cfg_port;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
