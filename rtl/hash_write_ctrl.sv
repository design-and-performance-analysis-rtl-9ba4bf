// hash_write_ctrl: hash write controller of the BDRT write side.
//
// Each cycle it takes the NW write requests, each with the physical bank its
// word currently lives in (from the remap table) and the free physical banks
// at its row, and gives every write a distinct physical bank, so that each
// bank sees at most one write per cycle.
//
// Rules, in port order: a write whose address is also written by a higher
// port in the same cycle is dropped (the higher port wins). The first
// surviving write keeps its current bank. A later write keeps its current
// bank if no earlier write took it; otherwise it is moved to the lowest free
// bank at its row that no earlier write took, and the remap table must then
// point the word at that bank. The old slot becomes free (a null entry).
// Write i has its current bank plus at least NW-1 free banks to choose from
// and at most i of them are taken, so with NP >= ND+NW-1 physical banks a
// place is always found; the fail output would flag the opposite and the
// top asserts that it never rises. By these rules
// redirect[0] and dropped[NW-1] are always 0: the first write never finds
// its bank taken and the last port is never superseded.
//
// Purely combinational. The priority order and the same-address rule are
// this design's choices; the mechanism (moving a conflicting write to a
// bank-buffer slot and remapping it) follows BDRT.
module hash_write_ctrl #(
  parameter int unsigned NW = 2,
  parameter int unsigned NP = 6,
  parameter int unsigned AW = 14,
  localparam int unsigned PW = $clog2(NP)
) (
  input  logic          wen      [NW],
  input  logic [AW-1:0] waddr    [NW],
  input  logic [PW-1:0] cur_phys [NW],
  input  logic [NP-1:0] free     [NW],
  output logic          wen_eff  [NW],
  output logic [PW-1:0] dest     [NW],
  output logic          redirect [NW],
  output logic          dropped  [NW],
  output logic          fail
);

  always_comb begin
    logic [NP-1:0] taken;
    logic          found;
    taken = '0;
    found = 1'b0;
    fail  = 1'b0;
    for (int i = 0; i < int'(NW); i++) begin
      dropped[i] = 1'b0;
      for (int j = i + 1; j < int'(NW); j++)
        if (wen[i] && wen[j] && waddr[j] == waddr[i]) dropped[i] = 1'b1;
      wen_eff[i]  = wen[i] && !dropped[i];
      dest[i]     = cur_phys[i];
      redirect[i] = 1'b0;
      if (wen_eff[i]) begin
        if (taken[cur_phys[i]]) begin
          found = 1'b0;
          for (int p = 0; p < int'(NP); p++) begin
            if (!found && free[i][p] && !taken[p]) begin
              found   = 1'b1;
              dest[i] = PW'(p);
            end
          end
          redirect[i] = 1'b1;
          if (!found) fail = 1'b1;
        end
        taken[dest[i]] = 1'b1;
      end
    end
  end

endmodule
