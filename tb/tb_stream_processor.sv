// End-to-end testbench of the stream processor at its default size
// (4 clusters, 256-row instruction memory).
//
// Every register of every level is preloaded with random data through the
// host port, then several random statically scheduled programs are loaded
// and run back to back. Addresses are drawn mostly from a small range so
// that results are read before their write-back (exposed pipeline), units
// collide on one register, and clusters exchange values through the SRF.
// After each run the testbench checks the run time (rows + 6 cycles), every
// register of every level and each cluster's statistics counters against
// the behavioural reference in sp_ref.svh. Finally it checks that every
// mechanism (each operand source, each DEST code, every ALU/MUL/DIV
// operation, stale reads, write collisions, cross-cluster SRF exchange)
// occurred at least once.
module tb_stream_processor;
  import sp_pkg::*;

  `include "sp_ref.svh"

  localparam int NCL   = 4;
  localparam int DEPTH = 256;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic                     imem_we;
  logic [$clog2(DEPTH)-1:0] imem_addr;
  logic [$clog2(NCL+1)-1:0] imem_cl;
  vliw_t                    imem_wdata;
  logic                     host_we;
  level_e                   host_lvl;
  logic [$clog2(NCL+1)-1:0] host_cl;
  logic [2:0]               host_fu;
  raddr_t                   host_addr;
  word_t                    host_wdata, host_rdata;
  logic                     start;
  logic [$clog2(DEPTH):0]   prog_len;
  logic                     busy, done;
  logic [31:0]              cycles;
  perf_t [NCL-1:0]          perf;
  logic [31:0]              srf_used;

  stream_processor dut (.*);

  int checks = 0, failures = 0;
  sp_model m;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("FAIL: %s", msg);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host_write(level_e lvl, int c, int f, int a, word_t d);
    @(negedge clk);
    host_we = 1; host_lvl = lvl; host_cl = 3'(c); host_fu = 3'(f);
    host_addr = 6'(a); host_wdata = d;
    @(negedge clk);
    host_we = 0;
  endtask

  function automatic word_t host_read_now();
    return host_rdata;
  endfunction

  task automatic host_read(level_e lvl, int c, int f, int a, output word_t d);
    host_we = 0; host_lvl = lvl; host_cl = 3'(c); host_fu = 3'(f);
    host_addr = 6'(a);
    #1 d = host_rdata;
  endtask

  function automatic word_t rnd_data();
    case ($urandom_range(0, 3))
      0: return word_t'($urandom_range(0, 70000));
      1: return -word_t'($urandom_range(0, 70000));
      default: return $urandom;
    endcase
  endfunction

  function automatic int rnd_addr();
    return ($urandom_range(0, 5) == 0) ? $urandom_range(0, 63) : $urandom_range(0, 5);
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

  task automatic compare_state(string tag);
    word_t d;
    int bad = 0;
    for (int a = 0; a < 64; a++) begin
      host_read(LVL_SRF, 0, 0, a, d);
      checks++; if (d !== m.srf[a]) bad++;
    end
    for (int c = 0; c < NCL; c++)
      for (int a = 0; a < 64; a++) begin
        host_read(LVL_SP, c, 0, a, d);
        checks++; if (d !== m.sp[c*64 + a]) bad++;
        for (int f = 0; f < 5; f++) begin
          host_read(LVL_LRF0, c, f, a, d);
          checks++; if (d !== m.lrf0[(c*5 + f)*64 + a]) bad++;
          host_read(LVL_LRF1, c, f, a, d);
          checks++; if (d !== m.lrf1[(c*5 + f)*64 + a]) bad++;
        end
      end
    failures += bad;
    if (bad != 0) $display("FAIL: %s: %0d registers differ", tag, bad);
  endtask

  initial begin
    vliw_t prog [][];
    imem_we = 0; imem_addr = 0; imem_cl = 0; imem_wdata = '0;
    host_we = 0; host_lvl = LVL_SRF; host_cl = 0; host_fu = 0; host_addr = 0;
    host_wdata = 0; start = 0; prog_len = 0;
    m = new(NCL);
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    // preload every register
    for (int a = 0; a < 64; a++) begin
      word_t d = rnd_data();
      host_write(LVL_SRF, 0, 0, a, d); m.srf[a] = d;
      for (int c = 0; c < NCL; c++) begin
        d = rnd_data(); host_write(LVL_SP, c, 0, a, d); m.sp[c*64 + a] = d;
        for (int f = 0; f < 5; f++) begin
          d = rnd_data(); host_write(LVL_LRF0, c, f, a, d); m.lrf0[(c*5 + f)*64 + a] = d;
          d = rnd_data(); host_write(LVL_LRF1, c, f, a, d); m.lrf1[(c*5 + f)*64 + a] = d;
        end
      end
    end
    compare_state("after preload");

    for (int run = 0; run < 4; run++) begin
      int len = (run == 3) ? DEPTH : $urandom_range(20, 80);
      vliw_t row [];
      prog = new[len];
      for (int r = 0; r < len; r++) begin
        prog[r] = new[NCL];
        for (int c = 0; c < NCL; c++) begin
          prog[r][c] = rnd_inst();
          @(negedge clk);
          imem_we = 1; imem_addr = 8'(r); imem_cl = 3'(c); imem_wdata = prog[r][c];
        end
      end
      @(negedge clk);
      imem_we = 0;
      // reference
      m.clear_stats();
      for (int r = 0; r < len; r++) m.step(1'b1, prog[r]);
      row = new[NCL];
      for (int k = 0; k < int'(MAX_LAT); k++) m.step(1'b0, row);
      // run the design
      start = 1; prog_len = 9'(len);
      @(negedge clk);
      start = 0;
      check(busy, "busy after start");
      while (!done) @(negedge clk);
      check(cycles == 32'(len + int'(MAX_LAT)),
            $sformatf("run %0d: %0d cycles for %0d rows", run, cycles, len));
      compare_state($sformatf("run %0d", run));
      for (int c = 0; c < NCL; c++) begin
        check(perf[c].alu_ops == 32'(m.stat[c*6 + 0]), $sformatf("alu_ops c%0d", c));
        check(perf[c].mul_ops == 32'(m.stat[c*6 + 1]), $sformatf("mul_ops c%0d", c));
        check(perf[c].div_ops == 32'(m.stat[c*6 + 2]), $sformatf("div_ops c%0d", c));
        check(perf[c].srf_acc == 32'(m.stat[c*6 + 3]), $sformatf("srf_acc c%0d", c));
        check(perf[c].sp_acc  == 32'(m.stat[c*6 + 4]), $sformatf("sp_acc c%0d", c));
        check(perf[c].lrf_acc == 32'(m.stat[c*6 + 5]), $sformatf("lrf_acc c%0d %0d/%0d", c, perf[c].lrf_acc, m.stat[c*6 + 5]));
        check(perf[c].sp_used  == 32'(m.used_sp(c)),  $sformatf("sp_used c%0d", c));
        check(perf[c].lrf_used == 32'(m.used_lrf(c)), $sformatf("lrf_used c%0d", c));
      end
      check(srf_used == 32'(m.used_srf()),
            $sformatf("srf_used %0d/%0d", srf_used, m.used_srf()));
      $display("run %0d: %0d rows, usage SRF %0d SP %0d LRF %0d (cluster 0)",
               run, len, srf_used, perf[0].sp_used, perf[0].lrf_used);
    end

    // every mechanism must have happened
    for (int s = 1; s < 4; s++) check(m.n_src[s] > 0, $sformatf("source %0d unused", s));
    for (int d = 1; d < 8; d++) check(m.n_dst[d] > 0, $sformatf("dest %0d unused", d));
    for (int o = 1; o <= 13; o++) check(m.n_alu_op[o] > 0, $sformatf("ALU op %0d unused", o));
    check(m.n_mul > 0, "MUL unused");
    for (int o = 1; o < 4; o++) check(m.n_div_op[o] > 0, $sformatf("DIV op %0d unused", o));
    check(m.n_stale > 0, "no read before write-back");
    check(m.n_collide > 0, "no write collision");
    check(m.n_xcluster > 0, "no cross-cluster SRF exchange");
    $display("mechanisms: stale reads %0d, collisions %0d, cross-cluster %0d, MUL %0d",
             m.n_stale, m.n_collide, m.n_xcluster, m.n_mul);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
