// tb_hbdx_mem: self-checking test of the HBDX 1W4R memory.
// One write and four reads per cycle of random traffic against a reference
// array, with addresses drawn from few rows so that reads pile up in one
// sub-memory. Counts reads rebuilt at the HBDX level, cycles where a BDX
// sub-memory rebuilt a read, and the worst case of the scheme (write and all
// four reads in one sub-memory); fails if any of them never happened. Reads
// are combinational and must return the word before this cycle's write.
module tb_hbdx_mem;
  import mpm_pkg::*;
  localparam int W = 32, DEPTH = 256, AW = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          we;
  logic [AW-1:0] waddr;
  logic [W-1:0]  wdata;
  logic          re    [RD_SLOTS];
  logic [AW-1:0] raddr [RD_SLOTS];
  logic [W-1:0]  rdata [RD_SLOTS];
  logic          recon [RD_SLOTS];
  logic          bdx_recon;
  logic [W-1:0]  ref_mem [DEPTH];
  int checks = 0, failures = 0;
  int n_recon = 0, n_bdx = 0, n_worst = 0, n_write = 0, n_idle_w = 0;

  hbdx_mem #(.W(W), .DEPTH(DEPTH)) dut (.*);

  // sub-memory = bits 1:0, BDX bank = bits 3:2, row = bits 7:4 (kept small)
  function automatic logic [AW-1:0] pick_addr(input logic [1:0] sub);
    return AW'({2'($urandom), 2'($urandom), sub});
  endfunction

  task automatic cycle();
    int same;
    #1;
    same = 0;
    for (int i = 0; i < 4; i++) begin
      if (re[i]) begin
        checks++;
        if (rdata[i] !== ref_mem[raddr[i]]) begin
          failures++;
          $display("FAIL read %0d addr %0d we=%0b: got %h expected %h",
                   i, raddr[i], we, rdata[i], ref_mem[raddr[i]]);
        end
        if (recon[i]) n_recon++;
        if (we && raddr[i][1:0] == waddr[1:0]) same++;
      end
    end
    if (bdx_recon) n_bdx++;
    if (same == 4) n_worst++;
    if (we) n_write++; else n_idle_w++;
    @(posedge clk);
    if (we) ref_mem[waddr] = wdata;
    @(negedge clk);
  endtask

  initial begin
    logic [1:0] hot;
    for (int i = 0; i < DEPTH; i++) ref_mem[i] = '0;
    we = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < 4; i++) begin re[i] = 0; raddr[i] = 0; end
    @(negedge clk);
    for (int n = 0; n < 6000; n++) begin
      hot   = 2'($urandom);
      we    = ($urandom % 4) != 0;
      waddr = pick_addr(($urandom % 2) ? hot : 2'($urandom));
      wdata = $urandom;
      for (int i = 0; i < 4; i++) begin
        re[i]    = ($urandom % 8) != 0;
        raddr[i] = pick_addr(($urandom % 4 != 0) ? hot : 2'($urandom));
      end
      cycle();
    end
    we = 0;
    for (int a = 0; a < DEPTH; a += 4) begin
      for (int i = 0; i < 4; i++) begin re[i] = 1; raddr[i] = AW'(a + i); end
      cycle();
    end
    $display("writes=%0d read-only=%0d hbdx-rebuilt=%0d bdx-rebuilt-cycles=%0d worst-case=%0d",
             n_write, n_idle_w, n_recon, n_bdx, n_worst);
    checks++;
    if (n_recon == 0 || n_bdx == 0 || n_worst == 0 || n_write == 0 || n_idle_w == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
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
