// remap_table: BDRT remap table, the register table that says in which
// physical bank each logical word currently lives.
//
// The logical address space is divided into ND data banks (bank = low address
// bits, row = the remaining bits). The physical side has NP >= ND banks: the
// ND memory banks (ids 0..ND-1) and the bank buffers (ids ND..NP-1). A word
// always stays at its own row; the table holds, per row and per logical bank,
// the id of the physical bank that holds it. At every row the ND entries are
// distinct, so NP-ND physical slots of the row are free ("null" entries).
//
// Lookups are combinational: NR read lookups give the read-multiplexer
// selects, NW write lookups give the current physical bank of each written
// word and the mask of free physical banks at its row. NW updates per cycle
// are written at the rising clock edge. Reset (asynchronous, active low)
// restores the identity map, every word in its own memory bank and all
// bank-buffer slots free. The table is made of registers, as in BDRT; the
// reset value and the encoding are this design's choice.
module remap_table #(
  parameter int unsigned ND   = 4,
  parameter int unsigned NP   = 6,
  parameter int unsigned ROWS = 4096,
  parameter int unsigned NR   = 4,
  parameter int unsigned NW   = 2,
  localparam int unsigned BW  = $clog2(ND),
  localparam int unsigned RW  = $clog2(ROWS),
  localparam int unsigned PW  = $clog2(NP)
) (
  input  logic          clk,
  input  logic          rst_n,
  // read lookups
  input  logic [RW-1:0] rd_row  [NR],
  input  logic [BW-1:0] rd_bank [NR],
  output logic [PW-1:0] rd_phys [NR],
  // write lookups
  input  logic [RW-1:0] wl_row  [NW],
  input  logic [BW-1:0] wl_bank [NW],
  output logic [PW-1:0] wl_phys [NW],
  output logic [NP-1:0] wl_free [NW],
  // updates
  input  logic          upd_en   [NW],
  input  logic [RW-1:0] upd_row  [NW],
  input  logic [BW-1:0] upd_bank [NW],
  input  logic [PW-1:0] upd_phys [NW]
);

  logic [PW-1:0] map [ROWS][ND];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(ROWS); r++)
        for (int b = 0; b < int'(ND); b++)
          map[r][b] <= PW'(b);
    end else begin
      for (int i = 0; i < int'(NW); i++)
        if (upd_en[i]) map[upd_row[i]][upd_bank[i]] <= upd_phys[i];
    end
  end

  always_comb begin
    for (int i = 0; i < int'(NR); i++)
      rd_phys[i] = map[rd_row[i]][rd_bank[i]];
    for (int i = 0; i < int'(NW); i++) begin
      logic [NP-1:0] used;
      used = '0;
      for (int b = 0; b < int'(ND); b++)
        used[map[wl_row[i]][b]] = 1'b1;
      wl_phys[i] = map[wl_row[i]][wl_bank[i]];
      wl_free[i] = ~used;
    end
  end

endmodule
