// tb_tdp_ram: self-checking test of the two-port RAM primitive.
// Random writes on both ports (to different addresses) and reads on both
// ports, compared against a reference array; also checks that a read in the
// cycle of a write to the same address returns the old word, and that the
// contents start at zero.
module tb_tdp_ram;
  localparam int W = 32, DEPTH = 64, AW = 6;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          we_a, we_b;
  logic [AW-1:0] addr_a, addr_b;
  logic [W-1:0]  wdata_a, wdata_b, rdata_a, rdata_b;
  logic [W-1:0]  ref_mem [DEPTH];
  int checks = 0, failures = 0;

  tdp_ram #(.W(W), .DEPTH(DEPTH)) dut (.*);

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) ref_mem[i] = '0;
    we_a = 0; we_b = 0; addr_a = 0; addr_b = 0; wdata_a = 0; wdata_b = 0;
    // initial contents are zero
    for (int i = 0; i < DEPTH; i++) begin
      addr_a = AW'(i); addr_b = AW'(DEPTH - 1 - i);
      #1;
      check(rdata_a, '0, "init A");
      check(rdata_b, '0, "init B");
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we_a    = 1'($urandom);
      we_b    = 1'($urandom);
      addr_a  = AW'($urandom);
      addr_b  = AW'($urandom);
      if (we_a && we_b && addr_a == addr_b) addr_b = addr_b + 1'b1;
      wdata_a = $urandom;
      wdata_b = $urandom;
      #1;
      // read-old-data on both ports
      check(rdata_a, ref_mem[addr_a], "read A");
      check(rdata_b, ref_mem[addr_b], "read B");
      @(posedge clk);
      if (we_a) ref_mem[addr_a] = wdata_a;
      if (we_b) ref_mem[addr_b] = wdata_b;
    end
    @(negedge clk);
    we_a = 0; we_b = 0;
    for (int i = 0; i < DEPTH; i++) begin
      addr_a = AW'(i);
      #1;
      check(rdata_a, ref_mem[i], "final A");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
