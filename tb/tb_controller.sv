// Self-checking testbench for the controller, with a behavioural
// synchronous-read instruction memory. For several program lengths it
// checks that rows 0..len-1 are issued in order on consecutive cycles (one
// cluster instruction per cluster per clock, the right word to each
// cluster), that `done` rises after the 6-cycle drain, that `cycles` equals
// len + 6, that perf_clr pulses with start and that start is ignored while
// busy.
module tb_controller;
  import sp_pkg::*;

  localparam int unsigned NCL = 2, DEPTH = 32;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic                     start;
  logic [$clog2(DEPTH):0]   prog_len;
  logic [$clog2(DEPTH)-1:0] imem_raddr;
  vliw_t [NCL-1:0]          imem_rdata;
  logic                     issue;
  vliw_t [NCL-1:0]          inst;
  logic                     busy, done, perf_clr;
  logic [31:0]              cycles;

  controller #(.NCL(NCL), .DEPTH(DEPTH)) dut (.*);

  // row r, cluster c holds the tag {r, c}
  always_ff @(posedge clk)
    for (int c = 0; c < int'(NCL); c++)
      imem_rdata[c] <= vliw_t'({imem_raddr, 8'(c)});

  int checks = 0, failures = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lens [5] = '{1, 5, 17, 32, 0};

  initial begin
    start = 0; prog_len = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    foreach (lens[k]) begin
      int len, n_issued, t;
      len = lens[k];
      @(negedge clk);
      start = 1; prog_len = 6'(len);
      #1 check(perf_clr == 1'b1, "perf_clr with start");
      @(negedge clk);
      start = 0;
      check(busy, "busy after start");
      n_issued = 0; t = 0;
      while (!done && t < 200) begin
        if (issue) begin
          for (int c = 0; c < int'(NCL); c++)
            check(inst[c] == vliw_t'({5'(n_issued), 8'(c)}), "issued word");
          n_issued++;
        end else begin
          // once issuing has begun it is contiguous
          check(n_issued == 0 || n_issued == len, "issue contiguous");
        end
        if (t == 3) begin
          start = 1; prog_len = 6'(3);   // ignored while busy
        end else start = 0;
        @(negedge clk);
        t++;
      end
      start = 0;
      check(n_issued == len, $sformatf("issued %0d of %0d", n_issued, len));
      check(cycles == 32'(len + int'(MAX_LAT)) || (len == 0 && cycles == 32'(1 + int'(MAX_LAT))),
            $sformatf("cycles %0d for len %0d", cycles, len));
      check(!busy, "idle after done");
      repeat (3) @(negedge clk);
      check(done, "done held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
