// Self-checking testbench for one arithmetic cluster. The shared SRF is
// modelled here as a plain array (same-cycle writes applied in ascending
// unit order). All registers are preloaded with random data, then random
// cluster instructions are issued with random idle cycles in between; the
// final contents of the SRF, SP, every LRF0/LRF1 and the statistics
// counters are compared with the behavioural reference (sp_ref.svh). The
// reference also confirms that every source and DEST code, stale reads and
// write collisions occurred.
module tb_cluster;
  import sp_pkg::*;

  `include "sp_ref.svh"

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic               issue;
  vliw_t              inst;
  raddr_t [2*NFU-1:0] srf_ra;
  word_t  [2*NFU-1:0] srf_rd;
  wreq_t  [NFU-1:0]   srf_wr;
  logic               host_we;
  level_e             host_lvl;
  logic [2:0]         host_fu;
  raddr_t             host_addr;
  word_t              host_wdata, host_rdata;
  logic               perf_clr;
  perf_t              perf;
  logic [63:0]        srf_touch;
  logic [63:0]        srf_seen;   // SRF registers marked since perf_clr

  cluster dut (.*);

  always_ff @(posedge clk)
    if (rst || perf_clr) srf_seen <= '0;
    else                 srf_seen <= srf_seen | srf_touch;

  word_t srf_tb [64];
  always_comb for (int i = 0; i < 2*int'(NFU); i++) srf_rd[i] = srf_tb[srf_ra[i]];
  always_ff @(posedge clk)
    for (int f = 0; f < int'(NFU); f++)
      if (srf_wr[f].en) srf_tb[srf_wr[f].addr] <= srf_wr[f].data;

  int checks = 0, failures = 0;
  sp_model m;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd_addr();
    return ($urandom_range(0, 5) == 0) ? $urandom_range(0, 63) : $urandom_range(0, 4);
  endfunction

  function automatic vliw_t rnd_inst();
    vliw_t w = '0;
    for (int f = 0; f < 5; f++) begin
      int op;
      if ($urandom_range(0, 4) == 0) op = 0;
      else if (f < 2) op = $urandom_range(1, 15);
      else if (f < 4) op = 1;
      else op = $urandom_range(1, 3);
      w = enc_slot(w, f, $urandom_range(0, 3), rnd_addr(), $urandom_range(0, 3),
                   rnd_addr(), $urandom_range(0, 7), rnd_addr(), op);
    end
    return w;
  endfunction

  task automatic hw(level_e lvl, int f, int a, word_t d);
    @(negedge clk);
    host_we = 1; host_lvl = lvl; host_fu = 3'(f); host_addr = 6'(a); host_wdata = d;
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic hr(level_e lvl, int f, int a, word_t expv, string what);
    host_lvl = lvl; host_fu = 3'(f); host_addr = 6'(a);
    #1;
    checks++;
    if (host_rdata !== expv) begin
      failures++;
      if (failures < 10) $display("FAIL %s[%0d] fu%0d: %h exp %h", what, a, f, host_rdata, expv);
    end
  endtask

  initial begin
    vliw_t one [];
    issue = 0; inst = '0; host_we = 0; host_lvl = LVL_SP; host_fu = 0;
    host_addr = 0; host_wdata = 0; perf_clr = 0;
    m = new(1);
    one = new[1];
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int a = 0; a < 64; a++) begin
      word_t d;
      d = $urandom; srf_tb[a] = d; m.srf[a] = d;
      d = $urandom; hw(LVL_SP, 0, a, d); m.sp[a] = d;
      for (int f = 0; f < 5; f++) begin
        d = $urandom_range(0, 100000); hw(LVL_LRF0, f, a, d); m.lrf0[f*64 + a] = d;
        d = $urandom;                  hw(LVL_LRF1, f, a, d); m.lrf1[f*64 + a] = d;
      end
    end
    @(negedge clk);
    perf_clr = 1;
    @(negedge clk);
    perf_clr = 0;
    m.clear_stats();
    for (int i = 0; i < 600; i++) begin
      issue = ($urandom_range(0, 4) != 0);
      inst  = rnd_inst();
      one[0] = inst;
      m.step(issue, one);
      @(negedge clk);
    end
    issue = 0;
    for (int k = 0; k < int'(MAX_LAT); k++) begin
      m.step(1'b0, one);
      @(negedge clk);
    end
    for (int a = 0; a < 64; a++) begin
      checks++;
      if (srf_tb[a] !== m.srf[a]) failures++;
      hr(LVL_SP, 0, a, m.sp[a], "SP");
      for (int f = 0; f < 5; f++) begin
        hr(LVL_LRF0, f, a, m.lrf0[f*64 + a], "LRF0");
        hr(LVL_LRF1, f, a, m.lrf1[f*64 + a], "LRF1");
      end
    end
    checks += 9;
    if (perf.alu_ops != 32'(m.stat[0])) failures++;
    if (perf.mul_ops != 32'(m.stat[1])) failures++;
    if (perf.div_ops != 32'(m.stat[2])) failures++;
    if (perf.srf_acc != 32'(m.stat[3])) failures++;
    if (perf.sp_acc  != 32'(m.stat[4])) failures++;
    if (perf.lrf_acc != 32'(m.stat[5])) failures++;
    if (perf.sp_used  != 32'(m.used_sp(0)))  failures++;
    if (perf.lrf_used != 32'(m.used_lrf(0))) failures++;
    if ($countones(srf_seen) != m.used_srf()) failures++;
    for (int s = 1; s < 4; s++) begin checks++; if (m.n_src[s] == 0) failures++; end
    for (int d = 1; d < 8; d++) begin checks++; if (m.n_dst[d] == 0) failures++; end
    checks += 2;
    if (m.n_stale == 0) failures++;
    if (m.n_collide == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
