// Self-checking testbench for the instruction memory: writes random
// cluster instructions into every (row, cluster) slot in random order, then
// reads rows back and checks each word one cycle after the address
// (synchronous read). Writes to a cluster index beyond NCL must be ignored.
module tb_inst_mem;
  import sp_pkg::*;

  localparam int unsigned NCL = 3, DEPTH = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                     we;
  logic [$clog2(DEPTH)-1:0] waddr, raddr;
  logic [$clog2(NCL+1)-1:0] wcl;
  vliw_t                    wdata;
  vliw_t [NCL-1:0]          rdata;

  inst_mem #(.NCL(NCL), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  vliw_t model [DEPTH][NCL];

  function automatic vliw_t rnd_vliw();
    vliw_t v;
    for (int i = 0; i < int'(VLIW_LEN); i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wcl = 0; wdata = '0;
    for (int r = 0; r < int'(DEPTH); r++)
      for (int c = 0; c < int'(NCL); c++) begin
        @(negedge clk);
        we = 1; waddr = 4'(r); wcl = 2'(c); wdata = rnd_vliw();
        model[r][c] = wdata;
      end
    // out-of-range cluster index: ignored
    @(negedge clk);
    we = 1; waddr = 0; wcl = 2'(NCL); wdata = rnd_vliw();
    for (int it = 0; it < 200; it++) begin
      @(negedge clk);
      we = 0;
      raddr = 4'($urandom_range(0, DEPTH - 1));
      @(negedge clk);
      for (int c = 0; c < int'(NCL); c++) begin
        checks++;
        if (rdata[c] !== model[raddr][c]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
