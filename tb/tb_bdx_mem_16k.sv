// tb_bdx_mem_16k: the BDX memory (1W2R and 4R modes) at its full 16K-word
// default size. Same traffic and checks as tb_bdx_mem (half of the addresses
// crowded onto a few rows, half anywhere), then a read-back of all 16K words.
module tb_bdx_mem_16k;
  import mpm_pkg::*;
  localparam int W = 32, DEPTH = 16384, AW = 14;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          we;
  logic [AW-1:0] waddr;
  logic [W-1:0]  wdata;
  logic          re    [RD_SLOTS];
  logic [AW-1:0] raddr [RD_SLOTS];
  logic [W-1:0]  rdata [RD_SLOTS];
  logic          recon [RD_SLOTS];
  logic [W-1:0]  ref_mem [DEPTH];
  int checks = 0, failures = 0;
  int n_recon_w = 0, n_recon_4r = 0, n_write = 0, n_4r = 0;

  bdx_mem dut (.*);

  function automatic logic [AW-1:0] pick_addr();
    // bank = low 2 bits; only rows 0..3 so collisions are frequent
    if ($urandom % 2) return AW'($urandom);
    return AW'({2'($urandom), 2'($urandom)});
  endfunction

  task automatic check_reads(input int nports);
    for (int i = 0; i < nports; i++) begin
      if (re[i]) begin
        checks++;
        if (rdata[i] !== ref_mem[raddr[i]]) begin
          failures++;
          $display("FAIL read %0d addr %0d we=%0b: got %h expected %h",
                   i, raddr[i], we, rdata[i], ref_mem[raddr[i]]);
        end
      end
    end
  endtask

  task automatic cycle();
    #1;
    check_reads(we ? 2 : 4);
    for (int i = 0; i < 4; i++) begin
      if (re[i] && recon[i]) begin
        if (we) n_recon_w++; else n_recon_4r++;
      end
    end
    if (we) n_write++; else n_4r++;
    @(posedge clk);
    if (we) ref_mem[waddr] = wdata;
    @(negedge clk);
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) ref_mem[i] = '0;
    we = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < 4; i++) begin re[i] = 0; raddr[i] = 0; end
    @(negedge clk);
    // write bank 1 row 0 while reading bank 1 rows 0 and 1
    we = 1; waddr = AW'(1); wdata = 32'hA5A5_0001;
    re[0] = 1; raddr[0] = AW'(1); re[1] = 1; raddr[1] = AW'(5);
    cycle();
    we = 1; waddr = AW'(5); wdata = 32'h5A5A_0002;
    cycle();
    we = 0; re[0] = 1; raddr[0] = AW'(1); re[1] = 1; raddr[1] = AW'(5);
    re[2] = 1; raddr[2] = AW'(9); re[3] = 1; raddr[3] = AW'(13);
    cycle();
    for (int n = 0; n < 5000; n++) begin
      we    = ($urandom % 3) != 0;
      waddr = pick_addr();
      wdata = $urandom;
      for (int i = 0; i < 4; i++) begin
        re[i]    = (i < 2 || !we) ? 1'($urandom % 4 != 0) : 1'b0;
        raddr[i] = pick_addr();
      end
      cycle();
    end
    we = 0;
    for (int a = 0; a < DEPTH; a += 4) begin
      for (int i = 0; i < 4; i++) begin re[i] = 1; raddr[i] = AW'(a + i); end
      cycle();
    end
    $display("writes=%0d 4R-cycles=%0d rebuilt-in-1W2R=%0d rebuilt-in-4R=%0d",
             n_write, n_4r, n_recon_w, n_recon_4r);
    checks++;
    if (n_recon_w == 0 || n_recon_4r == 0 || n_write == 0 || n_4r == 0) begin
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
