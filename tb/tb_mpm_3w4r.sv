// tb_mpm_3w4r: end-to-end test of the 3W4R configuration (three write ports,
// three bank buffers, 16K words of 32 bits): the same traffic and checks as
// the 2W4R test, with three writes per cycle that often collide on one bank.
module tb_mpm_3w4r;
  localparam int W = 32, DEPTH = 16384, NW = 3, NR = 4, AW = 14, ND = 4;
  localparam int CYCLES = 20000;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          wen    [NW];
  logic [AW-1:0] waddr  [NW];
  logic [W-1:0]  wdata  [NW];
  logic          ren    [NR];
  logic [AW-1:0] raddr  [NR];
  logic [W-1:0]  rdata  [NR];
  logic          rvalid [NR];
  logic          stat_redirect   [NW];
  logic          stat_dropped    [NW];
  logic          stat_hbdx_recon [NR];
  logic          stat_bdx_recon;
  logic          stat_wfail;

  mpm_nwmr #(.NW(3)) dut (.*);

  logic [W-1:0] ref_mem [DEPTH];
  logic [W-1:0] exp_data [NR];
  logic         exp_valid [NR];
  int checks = 0, failures = 0;
  int n_redirect = 0, n_dropped = 0, n_hbdx = 0, n_bdx = 0, n_rw_same = 0, n_cycles = 0;

  function automatic logic [AW-1:0] pick_addr();
    if ($urandom % 2) return AW'($urandom % (16 * ND));   // hot window: rows 0..15
    return AW'($urandom);
  endfunction

  task automatic idle_inputs();
    for (int i = 0; i < NW; i++) begin wen[i] = 0; waddr[i] = 0; wdata[i] = 0; end
    for (int i = 0; i < NR; i++) begin ren[i] = 0; raddr[i] = 0; end
  endtask

  // one clock: model the requests, then check the registered outputs
  task automatic step();
    @(posedge clk);
    for (int i = 0; i < NR; i++) begin
      exp_valid[i] = ren[i];
      exp_data[i]  = ren[i] ? ref_mem[raddr[i]] : '0;
      for (int j = 0; j < NW; j++) if (ren[i] && wen[j] && waddr[j] == raddr[i]) n_rw_same++;
    end
    for (int j = 0; j < NW; j++) if (wen[j]) ref_mem[waddr[j]] = wdata[j];
    n_cycles++;
    @(negedge clk);
    for (int i = 0; i < NR; i++) begin
      checks++;
      if (rvalid[i] !== exp_valid[i] || (exp_valid[i] && rdata[i] !== exp_data[i])) begin
        failures++;
        if (failures < 20)
          $display("FAIL cycle %0d read %0d: valid %0b data %h expected %0b %h",
                   n_cycles, i, rvalid[i], rdata[i], exp_valid[i], exp_data[i]);
      end
      if (stat_hbdx_recon[i]) n_hbdx++;
    end
    for (int j = 0; j < NW; j++) begin
      if (stat_redirect[j]) n_redirect++;
      if (stat_dropped[j]) n_dropped++;
    end
    if (stat_bdx_recon) n_bdx++;
    checks++;
    if (stat_wfail) begin failures++; $display("FAIL write placement failed"); end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) ref_mem[i] = '0;
    idle_inputs();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // bank-buffer example: bank 0 row 0 and bank 0 row 1 written together
    wen[0] = 1; waddr[0] = AW'(0); wdata[0] = 32'h0000_00A0;
    wen[1] = 1; waddr[1] = AW'(ND); wdata[1] = 32'h0000_00B1;
    step();
    checks++;
    if (!(stat_redirect[1] && !stat_redirect[0] && int'(dut.u_remap.map[1][0]) == ND)) begin
      failures++;
      $display("FAIL second write not moved to bank buffer 0");
    end
    idle_inputs();
    ren[0] = 1; raddr[0] = AW'(0);
    step();
    ren[0] = 1; raddr[0] = AW'(ND);
    step();
    idle_inputs();
    // random traffic at full rate
    for (int n = 0; n < CYCLES; n++) begin
      for (int j = 0; j < NW; j++) begin
        wen[j]   = ($urandom % 8) != 0;
        waddr[j] = pick_addr();
        wdata[j] = $urandom;
      end
      if ($urandom % 16 == 0) waddr[1] = waddr[0];
      for (int i = 0; i < NR; i++) begin
        ren[i]   = ($urandom % 8) != 0;
        raddr[i] = ($urandom % 8 == 0) ? waddr[$urandom % NW] : pick_addr();
      end
      step();
    end
    // read back everything, four words per cycle
    idle_inputs();
    for (int a = 0; a < DEPTH; a += NR) begin
      for (int i = 0; i < NR; i++) begin ren[i] = 1; raddr[i] = AW'(a + i); end
      step();
    end
    idle_inputs();
    step();
    $display("cycles=%0d moved-to-bank-buffer=%0d same-address-drops=%0d hbdx-rebuilt=%0d bdx-rebuilt-cycles=%0d read-during-write=%0d",
             n_cycles, n_redirect, n_dropped, n_hbdx, n_bdx, n_rw_same);
    checks++;
    if (n_redirect == 0 || n_dropped == 0 || n_rw_same == 0 || (NR > 1 && (n_hbdx == 0 || n_bdx == 0))) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + DEPTH + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
