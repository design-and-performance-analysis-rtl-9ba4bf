// tb_remap_table: self-checking test of the BDRT remap table.
// After reset every word must map to its own memory bank and all bank-buffer
// slots must be free. Then random row-preserving moves (a word goes to a free
// physical slot of its row) are applied through the update ports, and all
// read lookups, write lookups and free masks are compared with a reference.
module tb_remap_table;
  localparam int ND = 4, NP = 6, ROWS = 16, NR = 4, NW = 2;
  localparam int BW = 2, RW = 4, PW = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [RW-1:0] rd_row  [NR];
  logic [BW-1:0] rd_bank [NR];
  logic [PW-1:0] rd_phys [NR];
  logic [RW-1:0] wl_row  [NW];
  logic [BW-1:0] wl_bank [NW];
  logic [PW-1:0] wl_phys [NW];
  logic [NP-1:0] wl_free [NW];
  logic          upd_en   [NW];
  logic [RW-1:0] upd_row  [NW];
  logic [BW-1:0] upd_bank [NW];
  logic [PW-1:0] upd_phys [NW];
  int ref_map [ROWS][ND];
  int checks = 0, failures = 0, n_moves = 0;

  remap_table #(.ND(ND), .NP(NP), .ROWS(ROWS), .NR(NR), .NW(NW)) dut (.*);

  function automatic logic [NP-1:0] ref_free(input int r);
    logic [NP-1:0] m;
    m = '1;
    for (int b = 0; b < ND; b++) m[ref_map[r][b]] = 1'b0;
    return m;
  endfunction

  task automatic check_all_lookups();
    for (int r = 0; r < ROWS; r++) begin
      for (int b = 0; b < ND; b++) begin
        rd_row[b % NR] = RW'(r); rd_bank[b % NR] = BW'(b);
        wl_row[b % NW] = RW'(r); wl_bank[b % NW] = BW'(b);
        #1;
        checks += 3;
        if (rd_phys[b % NR] != PW'(ref_map[r][b])) begin
          failures++; $display("FAIL rd row %0d bank %0d: %0d vs %0d", r, b, rd_phys[b % NR], ref_map[r][b]);
        end
        if (wl_phys[b % NW] != PW'(ref_map[r][b])) begin
          failures++; $display("FAIL wl row %0d bank %0d", r, b);
        end
        if (wl_free[b % NW] != ref_free(r)) begin
          failures++; $display("FAIL free row %0d: %b vs %b", r, wl_free[b % NW], ref_free(r));
        end
      end
    end
  endtask

  initial begin
    for (int r = 0; r < ROWS; r++) for (int b = 0; b < ND; b++) ref_map[r][b] = b;
    for (int i = 0; i < NR; i++) begin rd_row[i] = 0; rd_bank[i] = 0; end
    for (int i = 0; i < NW; i++) begin
      wl_row[i] = 0; wl_bank[i] = 0; upd_en[i] = 0; upd_row[i] = 0; upd_bank[i] = 0; upd_phys[i] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check_all_lookups();
    for (int n = 0; n < 400; n++) begin
      int r0, r1, b0, b1, p0, p1;
      logic [NP-1:0] f;
      @(negedge clk);
      // two moves on distinct (row, bank) entries, each to a free slot
      r0 = $urandom % ROWS; b0 = $urandom % ND;
      r1 = $urandom % ROWS; b1 = $urandom % ND;
      if (r1 == r0) begin r1 = (r0 + 1) % ROWS; end
      f = ref_free(r0);
      p0 = ref_map[r0][b0];
      for (int p = 0; p < NP; p++) if (f[p] && ($urandom % 2)) p0 = p;
      f = ref_free(r1);
      p1 = ref_map[r1][b1];
      for (int p = 0; p < NP; p++) if (f[p] && ($urandom % 2)) p1 = p;
      upd_en[0] = 1; upd_row[0] = RW'(r0); upd_bank[0] = BW'(b0); upd_phys[0] = PW'(p0);
      upd_en[1] = ($urandom % 4) != 0; upd_row[1] = RW'(r1); upd_bank[1] = BW'(b1); upd_phys[1] = PW'(p1);
      @(posedge clk);
      if (p0 != ref_map[r0][b0]) n_moves++;
      ref_map[r0][b0] = p0;
      if (upd_en[1]) ref_map[r1][b1] = p1;
      @(negedge clk);
      upd_en[0] = 0; upd_en[1] = 0;
      if (n % 50 == 0) check_all_lookups();
    end
    check_all_lookups();
    // reset again restores the identity map
    rst_n = 1'b0;
    #1;
    for (int r = 0; r < ROWS; r++) for (int b = 0; b < ND; b++) ref_map[r][b] = b;
    @(negedge clk);
    rst_n = 1'b1;
    check_all_lookups();
    checks++;
    if (n_moves == 0) begin failures++; $display("FAIL no moves"); end
    $display("moves=%0d", n_moves);
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
