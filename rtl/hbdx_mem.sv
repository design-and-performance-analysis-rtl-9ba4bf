// hbdx_mem: HBDX (hierarchical BDX) memory with one write and four reads per
// cycle (1W4R), built from five BDX memories (bdx_mem).
//
// The address space is split over four interleaved sub-memories (low address
// bits pick the sub-memory) plus one XOR sub-memory holding, at every row, the
// XOR of the four sub-memories. Each sub-memory is itself a BDX memory that
// works in 1W2R mode when it is written (one write, two reads) and in 4R mode
// otherwise (four reads).
//
// Per cycle: the written sub-memory runs in 1W2R mode and stores the word.
// The three other sub-memories give up one read slot each for the read update
// Ru, their word at the written row; the XOR sub-memory (also in 1W2R mode)
// stores Ru ^ new word. Reads are then handed out in port order: a read goes
// directly to its sub-memory while that one has a free slot (two when written,
// three when another sub-memory is written, four when nothing is written);
// otherwise it is rebuilt as the XOR of the same row in every other
// sub-memory and in the XOR sub-memory, taking one slot in each. With four
// reads and one write this never runs out of slots: at most two reads are
// rebuilt, which is what the XOR sub-memory can give while it is written.
// The worst case (write and all four reads in one sub-memory) is the one the
// HBDX scheme is drawn for: R0/R1 direct, R2/R3 and Ru from three XOR trees.
//
// Timing: combinational read (read-old-data), write at the rising edge.
// recon[i] marks reads rebuilt at this level; bdx_recon is set when any
// sub-memory rebuilt a read internally this cycle. The slot-allocation order
// is this design's choice.
module hbdx_mem
  import mpm_pkg::*;
#(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 16384,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re    [RD_SLOTS],
  input  logic [AW-1:0] raddr [RD_SLOTS],
  output logic [W-1:0]  rdata [RD_SLOTS],
  output logic          recon [RD_SLOTS],
  output logic          bdx_recon
);

  localparam int unsigned NS = NUM_SUBBANKS;
  localparam int unsigned SW = $clog2(NS);
  localparam int unsigned SD = DEPTH / NS;
  localparam int unsigned OW = AW - SW;
  localparam int unsigned RS = RD_SLOTS;
  localparam int unsigned CW = $clog2(RS + 1);   // slot counter width
  localparam int unsigned XW = $clog2(RS);       // slot index width

  // sub-memory ports (index NS is the XOR sub-memory)
  logic          sub_we    [NS+1];
  logic [W-1:0]  sub_wdata [NS+1];
  logic          sub_re    [NS+1][RS];
  logic [OW-1:0] sub_raddr [NS+1][RS];
  logic [W-1:0]  sub_rdata [NS+1][RS];
  logic          sub_recon [NS+1][RS];

  logic [SW-1:0] wsub;
  logic [OW-1:0] wrow;
  logic [SW-1:0] rsub [RS];
  logic [OW-1:0] rrow [RS];

  for (genvar s = 0; s <= int'(NS); s++) begin : g_sub
    bdx_mem #(.W(W), .DEPTH(SD)) u_sub (
      .clk,
      .we(sub_we[s]), .waddr(wrow), .wdata(sub_wdata[s]),
      .re(sub_re[s]), .raddr(sub_raddr[s]), .rdata(sub_rdata[s]),
      .recon(sub_recon[s])
    );
  end

  // slot bookkeeping per read
  logic          dir   [RS];
  logic          rec   [RS];
  logic [XW-1:0] dslot [RS];
  logic [XW-1:0] rslot [RS][NS+1];
  logic          overflow;

  always_comb begin
    wsub = waddr[SW-1:0];
    wrow = waddr[AW-1:SW];
    for (int i = 0; i < int'(RS); i++) begin
      rsub[i] = raddr[i][SW-1:0];
      rrow[i] = raddr[i][AW-1:SW];
    end
  end

  // slot allocation
  always_comb begin
    logic [CW-1:0] cnt [NS+1];
    logic [CW-1:0] cap [NS+1];
    int unsigned   t;
    overflow = 1'b0;
    for (int s = 0; s <= int'(NS); s++) begin
      for (int j = 0; j < int'(RS); j++) begin
        sub_re[s][j]    = 1'b0;
        sub_raddr[s][j] = '0;
      end
      cnt[s] = '0;
      if (s == int'(NS)) begin
        sub_we[s] = we;
        cap[s]    = we ? CW'(RD_SLOTS_WRITE_MODE) : CW'(RS);
      end else if (we && wsub == SW'(s)) begin
        sub_we[s] = 1'b1;
        cap[s]    = CW'(RD_SLOTS_WRITE_MODE);
      end else if (we) begin
        // last slot carries the read update Ru at the written row
        sub_we[s]           = 1'b0;
        sub_re[s][RS-1]     = 1'b1;
        sub_raddr[s][RS-1]  = wrow;
        cap[s]              = CW'(RS - 1);
      end else begin
        sub_we[s] = 1'b0;
        cap[s]    = CW'(RS);
      end
    end
    for (int i = 0; i < int'(RS); i++) begin
      dir[i]   = 1'b0;
      rec[i]   = 1'b0;
      dslot[i] = '0;
      for (int s = 0; s <= int'(NS); s++) rslot[i][s] = '0;
      t = int'(rsub[i]);
      if (re[i]) begin
        if (cnt[t] < cap[t]) begin
          dir[i]                    = 1'b1;
          dslot[i]                  = XW'(cnt[t]);
          sub_re[t][cnt[t][XW-1:0]]    = 1'b1;
          sub_raddr[t][cnt[t][XW-1:0]] = rrow[i];
          cnt[t]                    = cnt[t] + 1'b1;
        end else begin
          rec[i] = 1'b1;
          for (int s = 0; s <= int'(NS); s++) begin
            if (s != int'(t)) begin
              if (cnt[s] >= cap[s]) begin
                overflow = 1'b1;
              end else begin
                rslot[i][s]                  = XW'(cnt[s]);
                sub_re[s][cnt[s][XW-1:0]]    = 1'b1;
                sub_raddr[s][cnt[s][XW-1:0]] = rrow[i];
                cnt[s]                       = cnt[s] + 1'b1;
              end
            end
          end
        end
      end
    end
  end

  // write data: the word itself, and Ru ^ word for the XOR sub-memory
  always_comb begin
    logic [W-1:0] ru;
    ru = '0;
    for (int s = 0; s < int'(NS); s++)
      if (SW'(s) != wsub) ru ^= sub_rdata[s][RS-1];
    for (int s = 0; s < int'(NS); s++) sub_wdata[s] = wdata;
    sub_wdata[NS] = wdata ^ ru;
  end

  // read data
  always_comb begin
    logic [W-1:0] x;
    bdx_recon = 1'b0;
    for (int s = 0; s <= int'(NS); s++)
      for (int j = 0; j < int'(RS); j++)
        bdx_recon |= sub_re[s][j] && sub_recon[s][j];
    for (int i = 0; i < int'(RS); i++) begin
      x = '0;
      for (int s = 0; s <= int'(NS); s++)
        if (s != int'(rsub[i])) x ^= sub_rdata[s][rslot[i][s]];
      rdata[i] = dir[i] ? sub_rdata[int'(rsub[i])][dslot[i]] : (rec[i] ? x : '0);
      recon[i] = rec[i];
    end
  end

  // Slot allocation can never run out with one write and four reads.
  always_ff @(posedge clk) begin
    assert (!overflow) else $error("hbdx_mem: read slot allocation overflow");
  end

endmodule
