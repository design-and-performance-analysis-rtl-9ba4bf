// mpm_nwmr: nWmR multi-ported memory, BDRT write side over HBDX banks.
// Default: 2 writes and 4 reads per cycle (2W4R), 16K words of 32 bits;
// NW=3 gives the 3W4R memory.
//
// Write side (BDRT, bank division with remap table): the logical address
// space is split over ND=4 interleaved memory banks (bank = low address bits,
// row = the rest). NBB bank buffers of the same depth sit next to them, so
// there are ND+NBB physical banks. The remap table says which physical bank
// holds each logical word; the hash write controller gives the writes of a
// cycle distinct physical banks, moving a write whose bank is already taken
// to a free slot (a null entry) at its row in another bank, and the remap
// table is updated to match. Every physical bank thus gets at most one write
// per cycle.
//
// Read side: every physical bank is an HBDX 1W4R memory (hbdx_mem), so it can
// serve all four reads even when they fall on the same bank while it is being
// written. Read i looks up its physical bank in the remap table, the bank
// reads row i on its read slot i, and a multiplexer driven by the remap table
// picks bank output i.
//
// Interface and timing: per write port wen/waddr/wdata, per read port
// ren/raddr; rdata and rvalid are registered and appear one clock after the
// request. A read and a write of the same word in the same cycle return the
// old word. When two write ports write one address in a cycle, the higher
// port wins. NW writes and NR reads are accepted every cycle, without stalls.
// The stat_* outputs (registered like rdata) report, for the previous cycle,
// which writes were moved to another bank, which were dropped by a same-
// address write, which reads were rebuilt by XOR at the HBDX level, whether
// any BDX level rebuilt a read, and whether a write found no bank (never
// expected). Contents start at zero.
//
// Following the BDRT+HBDX scheme: the bank division, remap table, hash write
// control, bank buffers, HBDX banks and remap-driven read multiplexers. This
// design's own choices: NBB defaults to NW (the scheme needs at least NW-1),
// the one-cycle registered read latency, the address interleaving and the
// same-address rule.
module mpm_nwmr
  import mpm_pkg::*;
#(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 16384,
  parameter int unsigned NW    = 2,
  parameter int unsigned NR    = 4,
  parameter int unsigned ND    = 4,
  parameter int unsigned NBB   = NW,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wen    [NW],
  input  logic [AW-1:0] waddr  [NW],
  input  logic [W-1:0]  wdata  [NW],
  input  logic          ren    [NR],
  input  logic [AW-1:0] raddr  [NR],
  output logic [W-1:0]  rdata  [NR],
  output logic          rvalid [NR],
  output logic          stat_redirect   [NW],
  output logic          stat_dropped    [NW],
  output logic          stat_hbdx_recon [NR],
  output logic          stat_bdx_recon,
  output logic          stat_wfail
);

  localparam int unsigned NP   = ND + NBB;
  localparam int unsigned PW   = $clog2(NP);
  localparam int unsigned BW   = $clog2(ND);
  localparam int unsigned RW   = AW - BW;
  localparam int unsigned ROWS = DEPTH / ND;
  localparam int unsigned RS   = RD_SLOTS;

  if (NR > RS) begin : g_bad_nr
    $error("mpm_nwmr: an HBDX bank serves at most %0d reads", RS);
  end
  if (NBB + 1 < NW) begin : g_bad_nbb
    $error("mpm_nwmr: BDRT needs at least NW-1 bank buffers");
  end

  // address fields
  logic [BW-1:0] wbank [NW];
  logic [RW-1:0] wrow  [NW];
  logic [BW-1:0] rbank [NR];
  logic [RW-1:0] rrow  [NR];

  always_comb begin
    for (int i = 0; i < int'(NW); i++) begin
      wbank[i] = waddr[i][BW-1:0];
      wrow[i]  = waddr[i][AW-1:BW];
    end
    for (int i = 0; i < int'(NR); i++) begin
      rbank[i] = raddr[i][BW-1:0];
      rrow[i]  = raddr[i][AW-1:BW];
    end
  end

  // BDRT write side
  logic [PW-1:0] rphys    [NR];
  logic [PW-1:0] cur_phys [NW];
  logic [NP-1:0] free     [NW];
  logic          wen_eff  [NW];
  logic [PW-1:0] dest     [NW];
  logic          redirect [NW];
  logic          dropped  [NW];
  logic          wfail;

  remap_table #(.ND(ND), .NP(NP), .ROWS(ROWS), .NR(NR), .NW(NW)) u_remap (
    .clk, .rst_n,
    .rd_row(rrow), .rd_bank(rbank), .rd_phys(rphys),
    .wl_row(wrow), .wl_bank(wbank), .wl_phys(cur_phys), .wl_free(free),
    .upd_en(wen_eff), .upd_row(wrow), .upd_bank(wbank), .upd_phys(dest)
  );

  hash_write_ctrl #(.NW(NW), .NP(NP), .AW(AW)) u_hash (
    .wen, .waddr, .cur_phys, .free,
    .wen_eff, .dest, .redirect, .dropped, .fail(wfail)
  );

  // physical banks (memory banks 0..ND-1, bank buffers ND..NP-1)
  logic          bk_we     [NP];
  logic [RW-1:0] bk_waddr  [NP];
  logic [W-1:0]  bk_wdata  [NP];
  logic          bk_re     [NP][RS];
  logic [RW-1:0] bk_raddr  [NP][RS];
  logic [W-1:0]  bk_rdata  [NP][RS];
  logic          bk_recon  [NP][RS];
  logic          bk_brecon [NP];

  always_comb begin
    for (int p = 0; p < int'(NP); p++) begin
      bk_we[p]    = 1'b0;
      bk_waddr[p] = '0;
      bk_wdata[p] = '0;
      for (int i = 0; i < int'(NW); i++) begin
        if (wen_eff[i] && dest[i] == PW'(p)) begin
          bk_we[p]    = 1'b1;
          bk_waddr[p] = wrow[i];
          bk_wdata[p] = wdata[i];
        end
      end
      for (int j = 0; j < int'(RS); j++) begin
        bk_re[p][j]    = 1'b0;
        bk_raddr[p][j] = '0;
        if (j < int'(NR)) begin
          bk_re[p][j]    = ren[j] && rphys[j] == PW'(p);
          bk_raddr[p][j] = rrow[j];
        end
      end
    end
  end

  for (genvar p = 0; p < int'(NP); p++) begin : g_bank
    hbdx_mem #(.W(W), .DEPTH(ROWS)) u_hbdx (
      .clk,
      .we(bk_we[p]), .waddr(bk_waddr[p]), .wdata(bk_wdata[p]),
      .re(bk_re[p]), .raddr(bk_raddr[p]), .rdata(bk_rdata[p]),
      .recon(bk_recon[p]), .bdx_recon(bk_brecon[p])
    );
  end

  // remap-driven read multiplexers and output registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NR); i++) begin
        rdata[i]           <= '0;
        rvalid[i]          <= 1'b0;
        stat_hbdx_recon[i] <= 1'b0;
      end
      for (int i = 0; i < int'(NW); i++) begin
        stat_redirect[i] <= 1'b0;
        stat_dropped[i]  <= 1'b0;
      end
      stat_bdx_recon <= 1'b0;
      stat_wfail     <= 1'b0;
    end else begin
      for (int i = 0; i < int'(NR); i++) begin
        rdata[i]           <= ren[i] ? bk_rdata[rphys[i]][i] : '0;
        rvalid[i]          <= ren[i];
        stat_hbdx_recon[i] <= ren[i] && bk_recon[rphys[i]][i];
      end
      for (int i = 0; i < int'(NW); i++) begin
        stat_redirect[i] <= wen_eff[i] && redirect[i];
        stat_dropped[i]  <= dropped[i];
      end
      stat_bdx_recon <= 1'b0;
      for (int p = 0; p < int'(NP); p++)
        if (bk_brecon[p]) stat_bdx_recon <= 1'b1;
      stat_wfail <= wfail;
    end
  end

  always_ff @(posedge clk) begin
    assert (!wfail) else $error("mpm_nwmr: a write found no free bank");
  end

endmodule
