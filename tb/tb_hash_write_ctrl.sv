// tb_hash_write_ctrl: self-checking test of the hash write controller, in the
// 3-write configuration (4 memory banks, 3 bank buffers).
// Random write sets over random valid row mappings. Checked for every case:
// a write also written by a higher port is dropped; surviving writes get
// distinct physical banks; each destination is the word's current bank or a
// free slot of its row; a write keeps its bank unless an earlier write took
// it, and is then moved to the lowest free untaken bank; no case fails.
module tb_hash_write_ctrl;
  localparam int NW = 3, NP = 7, ND = 4, AW = 8, PW = 3;

  logic          wen      [NW];
  logic [AW-1:0] waddr    [NW];
  logic [PW-1:0] cur_phys [NW];
  logic [NP-1:0] free     [NW];
  logic          wen_eff  [NW];
  logic [PW-1:0] dest     [NW];
  logic          redirect [NW];
  logic          dropped  [NW];
  logic          fail;
  int checks = 0, failures = 0, n_redirect = 0, n_dropped = 0;

  hash_write_ctrl #(.NW(NW), .NP(NP), .AW(AW)) dut (.*);

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int rowmap [4][ND];   // four rows: each a random placement of ND words
    for (int n = 0; n < 20000; n++) begin
      bit taken [NP];
      int perm [NP];
      // random injective row placements
      for (int r = 0; r < 4; r++) begin
        for (int p = 0; p < NP; p++) perm[p] = p;
        for (int p = NP - 1; p > 0; p--) begin
          int j, t;
          j = $urandom % (p + 1); t = perm[p]; perm[p] = perm[j]; perm[j] = t;
        end
        for (int b = 0; b < ND; b++) rowmap[r][b] = perm[b];
      end
      for (int i = 0; i < NW; i++) begin
        int r, b;
        logic [NP-1:0] f;
        wen[i] = ($urandom % 5) != 0;
        r = $urandom % 4;         // few rows and banks: many collisions
        b = $urandom % ND;
        waddr[i] = AW'(r * ND + b);
        cur_phys[i] = PW'(rowmap[r][b]);
        f = '1;
        for (int k = 0; k < ND; k++) f[rowmap[r][k]] = 1'b0;
        free[i] = f;
      end
      #1;
      // independent expectation
      for (int p = 0; p < NP; p++) taken[p] = 0;
      for (int i = 0; i < NW; i++) begin
        bit drop;
        int d;
        drop = 0;
        for (int j = i + 1; j < NW; j++) if (wen[i] && wen[j] && waddr[i] == waddr[j]) drop = 1;
        expect_eq(int'(dropped[i]), int'(drop), "dropped");
        expect_eq(int'(wen_eff[i]), int'(wen[i] && !drop), "wen_eff");
        if (wen[i] && !drop) begin
          if (!taken[cur_phys[i]]) d = cur_phys[i];
          else begin
            d = -1;
            for (int p = NP - 1; p >= 0; p--) if (free[i][p] && !taken[p]) d = p;
          end
          expect_eq(int'(dest[i]), d, "dest");
          expect_eq(int'(redirect[i]), int'(d != int'(cur_phys[i])), "redirect");
          if (d >= 0) taken[d] = 1;
          if (redirect[i]) n_redirect++;
        end
        if (drop) n_dropped++;
      end
      expect_eq(int'(fail), 0, "fail");
    end
    $display("redirected=%0d dropped=%0d", n_redirect, n_dropped);
    checks++;
    if (n_redirect == 0 || n_dropped == 0) begin failures++; $display("FAIL mechanism missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
