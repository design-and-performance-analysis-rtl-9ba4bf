// bdx_mem: BDX (bank division with XOR) memory with a 1W2R mode and a 4R mode.
//
// The address space is split over four interleaved data banks (bank = low
// address bits, row = the remaining bits) plus one XOR bank that holds, at
// every row, the XOR of the four data banks at that row. Every bank is a
// two-port RAM (tdp_ram).
//
// Port B of every bank serves the read pair (R0, R1); port A serves either
// the write (1W2R mode, we=1) or the read pair (R2, R3) (4R mode, we=0).
// Within a pair, the first read is taken directly from its bank. The second
// read is taken directly as well when it lies in another bank; when both
// reads of a pair fall into the same bank, the second one is rebuilt as the
// XOR of the other three data banks and the XOR bank at its row. So a pair
// never needs more than one access on any bank, whatever its addresses.
//
// In 1W2R mode, port A of the written bank stores the new word, port A of
// the other three data banks reads their word at the written row (the read
// update Ru), and port A of the XOR bank stores Ru ^ new word, which keeps
// the XOR bank equal to the XOR of all data banks. Reads R2 and R3 are not
// served in this mode and return zero.
//
// Timing: reads are combinational from address to data and return the
// contents before this cycle's write (read-old-data); the write takes
// effect at the rising edge. recon[i] tells whether read i was rebuilt by XOR;
// recon[0] and recon[2] are always 0, since the first read of a pair is
// never rebuilt (the port is kept for a uniform four-slot interface).
// The port split between modes follows the BDX 1W2R/4R mode description;
// the rule of which read of a pair is rebuilt is this design's choice.
module bdx_mem
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
  output logic          recon [RD_SLOTS]
);

  localparam int unsigned NB = NUM_SUBBANKS;
  localparam int unsigned BW = $clog2(NB);
  localparam int unsigned BD = DEPTH / NB;
  localparam int unsigned OW = AW - BW;

  // bank ports
  logic          a_we    [NB];
  logic [OW-1:0] a_addr  [NB];
  logic [W-1:0]  a_rdata [NB];
  logic [OW-1:0] b_addr  [NB];
  logic [W-1:0]  b_rdata [NB];
  // XOR bank ports
  logic          xa_we;
  logic [OW-1:0] xa_addr, xb_addr;
  logic [W-1:0]  xa_wdata, xa_rdata, xb_rdata;

  for (genvar k = 0; k < int'(NB); k++) begin : g_bank
    tdp_ram #(.W(W), .DEPTH(BD)) u_bank (
      .clk,
      .we_a(a_we[k]), .addr_a(a_addr[k]), .wdata_a(wdata), .rdata_a(a_rdata[k]),
      .we_b(1'b0),    .addr_b(b_addr[k]), .wdata_b('0),    .rdata_b(b_rdata[k])
    );
  end

  tdp_ram #(.W(W), .DEPTH(BD)) u_xor_bank (
    .clk,
    .we_a(xa_we), .addr_a(xa_addr), .wdata_a(xa_wdata), .rdata_a(xa_rdata),
    .we_b(1'b0),  .addr_b(xb_addr), .wdata_b('0),       .rdata_b(xb_rdata)
  );

  // address fields
  logic [BW-1:0] rbank [RD_SLOTS];
  logic [OW-1:0] rrow  [RD_SLOTS];
  logic [BW-1:0] wbank;
  logic [OW-1:0] wrow;
  logic          pair_b_same, pair_a_same;

  always_comb begin
    for (int i = 0; i < int'(RD_SLOTS); i++) begin
      rbank[i] = raddr[i][BW-1:0];
      rrow[i]  = raddr[i][AW-1:BW];
    end
    wbank = waddr[BW-1:0];
    wrow  = waddr[AW-1:BW];
    // second read of a pair collides with the first one
    pair_b_same = re[0] && re[1] && (rbank[0] == rbank[1]);
    pair_a_same = !we && re[2] && re[3] && (rbank[2] == rbank[3]);
  end

  // port addressing
  always_comb begin
    for (int k = 0; k < int'(NB); k++) begin
      // pair (R0, R1) on port B
      b_addr[k] = (re[0] && rbank[0] == BW'(k)) ? rrow[0] : rrow[1];
      // port A: write + read update, or pair (R2, R3)
      if (we) begin
        a_we[k]   = (wbank == BW'(k));
        a_addr[k] = wrow;
      end else begin
        a_we[k]   = 1'b0;
        a_addr[k] = (re[2] && rbank[2] == BW'(k)) ? rrow[2] : rrow[3];
      end
    end
    xb_addr = rrow[1];
    xa_addr = we ? wrow : rrow[3];
    xa_we   = we;
  end

  // XOR bank update: Ru (other banks at the written row) ^ new word
  always_comb begin
    xa_wdata = wdata;
    for (int k = 0; k < int'(NB); k++)
      if (BW'(k) != wbank) xa_wdata ^= a_rdata[k];
  end

  // read data
  always_comb begin
    logic [W-1:0] x1, x3;
    x1 = xb_rdata;
    x3 = xa_rdata;
    for (int k = 0; k < int'(NB); k++) begin
      if (BW'(k) != rbank[0]) x1 ^= b_rdata[k];
      if (BW'(k) != rbank[2]) x3 ^= a_rdata[k];
    end
    rdata[0] = b_rdata[rbank[0]];
    rdata[1] = pair_b_same ? x1 : b_rdata[rbank[1]];
    recon[0] = 1'b0;
    recon[1] = pair_b_same;
    if (we) begin
      rdata[2] = '0;
      rdata[3] = '0;
      recon[2] = 1'b0;
      recon[3] = 1'b0;
    end else begin
      rdata[2] = a_rdata[rbank[2]];
      rdata[3] = pair_a_same ? x3 : a_rdata[rbank[3]];
      recon[2] = 1'b0;
      recon[3] = pair_a_same;
    end
  end

  // In 1W2R mode only R0 and R1 may be requested.
  always_ff @(posedge clk) begin
    for (int j = int'(RD_SLOTS_WRITE_MODE); j < int'(RD_SLOTS); j++)
      if (we) assert (!re[j])
        else $error("bdx_mem: read %0d requested while writing (1W2R mode)", j);
  end

endmodule
