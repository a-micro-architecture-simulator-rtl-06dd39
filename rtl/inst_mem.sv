// Instruction memory: holds the statically scheduled cluster instructions.
//
// Row r holds the r-th cluster instruction of every cluster side by side
// (cluster c in bits [c*137 +: 137]), so one read delivers the instructions
// that all NCL clusters issue together in one clock. The host loads the
// program one 137-bit cluster instruction at a time through the write port
// (row `waddr`, cluster `wcl`). The read port is synchronous: `rdata`
// holds row `raddr` from the cycle after the address is presented.
//
// The document sizes the memory as "instruction number times VLIW_length"
// and loads it from a file; the row organisation, the depth (DEPTH rows,
// 256 by default, enough for the 135-instruction single-cluster FFT) and
// the write port are this design's choices.
module inst_mem
  import sp_pkg::*;
#(
  parameter int unsigned NCL   = 4,
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [$clog2(NCL+1)-1:0] wcl,
  input  vliw_t                    wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output vliw_t [NCL-1:0]          rdata
);

  vliw_t [NCL-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && int'(wcl) < int'(NCL)) mem[waddr][wcl] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
