// tdp_ram: two-port RAM, the storage primitive of every bank in the design.
//
// Each of the two ports (A and B) either reads or writes one word per clock,
// which is what an FPGA block RAM in true dual-port configuration offers.
// Reads are combinational (the word at the address presented this cycle,
// before any write of this cycle takes effect: read-old-data); writes land
// on the rising clock edge. The two ports must not write the same address in
// the same cycle; an assertion checks that rule.
//
// Contents start at zero, as FPGA block RAMs do after configuration; this
// keeps every XOR bank consistent with its data banks from the start. The
// asynchronous read port is this design's choice: it lets the XOR-bank
// read-update and the XOR reconstruction of a read finish in the same cycle.
module tdp_ram #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  // port A
  input  logic          we_a,
  input  logic [AW-1:0] addr_a,
  input  logic [W-1:0]  wdata_a,
  output logic [W-1:0]  rdata_a,
  // port B
  input  logic          we_b,
  input  logic [AW-1:0] addr_b,
  input  logic [W-1:0]  wdata_b,
  output logic [W-1:0]  rdata_b
);

  logic [W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  assign rdata_a = mem[addr_a];
  assign rdata_b = mem[addr_b];

  always_ff @(posedge clk) begin
    if (we_a) mem[addr_a] <= wdata_a;
    if (we_b) mem[addr_b] <= wdata_b;
  end

  // Both ports writing one word in the same cycle is a caller error.
  always_ff @(posedge clk) begin
    if (we_a && we_b)
      assert (addr_a != addr_b)
        else $error("tdp_ram: both ports write address %0d", addr_a);
  end

endmodule
