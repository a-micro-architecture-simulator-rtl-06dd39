// Multi-ported register array: one level of the register hierarchy.
//
// Every level of the hierarchy (the shared SRF, each cluster's scratch pad
// SP and the two local register files LRF0/LRF1 beside every functional
// unit) is an array of NREG = 64 registers of 32 bits. This module is that
// array with NR combinational read ports and NW write ports.
//
// Timing: a read returns the current contents in the same cycle; a write
// takes effect at the rising clock edge, so it is seen by reads in the next
// cycle (no write-to-read bypass). When several write ports address the
// same register in one cycle, the port with the highest index wins; the
// instantiating level orders its ports so that the result is defined. A
// synchronous reset clears every register.
//
// The size of the array follows the document; the port counts, the reset
// to zero and the write priority are this design's choices.
module regfile
  import sp_pkg::*;
#(
  parameter int unsigned NR = 2,  // read ports
  parameter int unsigned NW = 2   // write ports
) (
  input  logic             clk,
  input  logic             rst,
  input  wreq_t  [NW-1:0]  wr,
  input  raddr_t [NR-1:0]  ra,
  output word_t  [NR-1:0]  rd
);

  word_t mem [NREG];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(NREG); i++) mem[i] <= '0;
    end else begin
      for (int p = 0; p < int'(NW); p++)
        if (wr[p].en) mem[wr[p].addr] <= wr[p].data;
    end
  end

  always_comb
    for (int r = 0; r < int'(NR); r++) rd[r] = mem[ra[r]];

endmodule
