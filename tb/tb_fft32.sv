// Workload testbench: 32-point complex FFT on 1-, 2-, 4- and 8-cluster
// builds of the stream processor.
//
// For each cluster count the testbench generates a statically scheduled
// program for a radix-2 decimation-in-frequency FFT, 5 stages of 16
// butterflies, in Q16.16 fixed point. The 32 complex inputs live in the
// SRF (real part at n, imaginary part at 32 + n) and are transformed in
// place; the result comes out in bit-reversed order. The twiddle factors
// W^k = cos(2 pi k/32) - j sin(2 pi k/32), k = 0..15, are preloaded into
// LRF0 of both multipliers of every cluster (real part at k, imaginary at
// 16 + k). Butterfly i of a stage runs on cluster i mod NCL:
//   row A (both ALUs):  SRF[a_re] <= a_re + b_re ;  MUL-1.LRF1 <= a_re - b_re
//   row B (both ALUs):  SRF[a_im] <= a_im + b_im ;  MUL-2.LRF1 <= a_im - b_im
//   MUL-1: dr*wr -> SP, dr*wi -> SP      MUL-2: di*wi -> ALU-1.LRF1,
//                                               di*wr -> ALU-2.LRF1
//   ALU-1: SRF[b_re] <= SP - LRF1        ALU-2: SRF[b_im] <= SP + LRF1
// Butterflies whose twiddle is W^0 = 1 or W^8 = -j skip the multipliers:
// two consecutive ALU rows compute a + b and (a - b)*W directly. Ops are
// placed greedily at the earliest row their operands allow (ALU 2, MUL 4
// cycles); a stage starts once every SRF result of the previous stage is
// written. Reading both sources of a sum/difference pair in one row lets
// the results overwrite the inputs in place.
//
// The printed cycle counts of the four builds show how the run time scales
// with the number of clusters. The schedule generator and the data layout
// are this testbench's own; the benchmark (32-point FFT on 1, 2, 4 and 8
// clusters, data in the SRF, intermediate values kept in SP and LRFs of the
// same cluster) follows the document.
//
// Checks: the output equals a bit-exact fixed-point model of the same
// computation, lies within 0.01 of a double-precision DFT, the run takes
// rows + 6 cycles, and the statistics counters show 6 ALU and 4 MUL
// operations per butterfly on each cluster.
module tb_fft32;
  import sp_pkg::*;

  localparam int NCFG = 4;
  localparam int CFG_NCL [NCFG] = '{1, 2, 4, 8};
  localparam int N = 32;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, finished = 0;
  int run_cycles [NCFG];
  int run_rows   [NCFG];

  // ------------------------------------------------ shared helpers
  function automatic int bitrev5(int v);
    int r = 0;
    for (int i = 0; i < 5; i++) if (v & (1 << i)) r |= 1 << (4 - i);
    return r;
  endfunction

  function automatic word_t q16(real x);
    return word_t'(int'($floor(x * 65536.0 + 0.5)));
  endfunction

  function automatic real rabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  function automatic word_t fx_mul(word_t a, word_t b);
    longint p = longint'(int'(a)) * longint'(int'(b));
    return word_t'(p >>> 16);
  endfunction

  localparam int SLOT_BITS [5] = '{29, 29, 26, 26, 27};
  localparam int SLOT_OPW  [5] = '{4, 4, 1, 1, 2};

  function automatic vliw_t put_slot(vliw_t w, int f, int src0, int a0,
                                     int src1, int a1, int dest, int wba,
                                     int op);
    logic [28:0] raw;
    int opw = SLOT_OPW[f];
    int lsb = 137;
    for (int i = 0; i <= f; i++) lsb -= SLOT_BITS[i];
    raw = (29'(src0) << (opw + 23)) | (29'(a0) << (opw + 17))
        | (29'(src1) << (opw + 15)) | (29'(a1) << (opw + 9))
        | (29'(dest) << (opw + 6))  | (29'(wba) << opw) | 29'(op);
    for (int b = 0; b < SLOT_BITS[f]; b++) w[lsb + b] = raw[b];
    return w;
  endfunction

  // input signal and twiddles (shared by all configurations)
  word_t x_re [N], x_im [N];
  word_t w_re [16], w_im [16];
  word_t ref_re [N], ref_im [N];   // bit-exact model output (bit-reversed)
  real   dft_re [N], dft_im [N];

  initial begin : make_data
    for (int n = 0; n < N; n++) begin
      x_re[n] = q16(real'(int'($urandom_range(0, 2000)) - 1000) / 1000.0);
      x_im[n] = q16(real'(int'($urandom_range(0, 2000)) - 1000) / 1000.0);
    end
    for (int k = 0; k < 16; k++) begin
      w_re[k] = q16($cos(2.0 * 3.14159265358979 * k / N));
      w_im[k] = q16(-$sin(2.0 * 3.14159265358979 * k / N));
    end
    // double-precision DFT of the quantised input
    for (int k = 0; k < N; k++) begin
      dft_re[k] = 0.0; dft_im[k] = 0.0;
      for (int n = 0; n < N; n++) begin
        real xr, xi, ang;
        xr = real'(int'(x_re[n])) / 65536.0;
        xi = real'(int'(x_im[n])) / 65536.0;
        ang = -2.0 * 3.14159265358979 * k * n / N;
        dft_re[k] += xr * $cos(ang) - xi * $sin(ang);
        dft_im[k] += xr * $sin(ang) + xi * $cos(ang);
      end
    end
    // bit-exact fixed-point DIF model
    for (int n = 0; n < N; n++) begin ref_re[n] = x_re[n]; ref_im[n] = x_im[n]; end
    for (int s = 0; s < 5; s++) begin
      automatic int h = 16 >> s;
      for (int g = 0; g < N; g += 2 * h)
        for (int j = 0; j < h; j++) begin
          automatic int a = g + j, b = g + j + h, k = j << s;
          word_t dr, di;
          dr = ref_re[a] - ref_re[b];
          di = ref_im[a] - ref_im[b];
          ref_re[a] = ref_re[a] + ref_re[b];
          ref_im[a] = ref_im[a] + ref_im[b];
          ref_re[b] = fx_mul(w_re[k], dr) - fx_mul(w_im[k], di);
          ref_im[b] = fx_mul(w_im[k], dr) + fx_mul(w_re[k], di);
        end
    end
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
  end

  // ------------------------------------------------ one build per cluster count
  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int NCL   = CFG_NCL[g];
    localparam int DEPTH = 256;

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

    stream_processor #(.NCL(NCL), .DEPTH(DEPTH)) dut (.*);

    vliw_t prog [DEPTH][NCL];
    bit    used [DEPTH][NCL][5];
    int    nalu [NCL], nmul [NCL];
    int    nrows;

    function automatic int find_slot(int c, int f, int from);
      int r = from;
      while (used[r][c][f]) r++;
      return r;
    endfunction

    function automatic int find_pair(int c, int from);
      int r = from;
      while (used[r][c][0] || used[r][c][1]) r++;
      return r;
    endfunction

    function automatic int find_quad(int c, int from);
      int r = from;
      while (used[r][c][0] || used[r][c][1] || used[r+1][c][0] || used[r+1][c][1])
        r++;
      return r;
    endfunction

    function automatic int imax(int a, int b);
      return (a > b) ? a : b;
    endfunction

    // Build the program; returns the number of rows.
    function automatic int schedule();
      int stage_start = 0;
      foreach (prog[r, c]) prog[r][c] = '0;
      foreach (used[r, c, f]) used[r][c][f] = 1'b0;
      foreach (nalu[c]) begin nalu[c] = 0; nmul[c] = 0; end
      for (int s = 0; s < 5; s++) begin
        int h = 16 >> s;
        int stage_end = stage_start;
        int bidx = 0;
        for (int grp = 0; grp < N; grp += 2 * h)
          for (int j = 0; j < h; j++) begin
            int a = grp + j, b = grp + j + h, k = j << s;
            int c = bidx % NCL, sb = bidx / NCL;
            int rA, rB, rC, rD, rE, rF, rG, rH;
            if (k == 0 || k == 8) begin
              // W^0 = 1 and W^8 = -j need no multiply: two consecutive
              // ALU rows, so that row B still reads the inputs row A
              // overwrites (ALU results land two cycles after issue)
              rA = find_quad(c, stage_start);
              used[rA][c][0] = 1; used[rA][c][1] = 1;
              used[rA+1][c][0] = 1; used[rA+1][c][1] = 1;
              nalu[c] += 4;
              prog[rA][c] = put_slot(prog[rA][c], 0, 1, a, 1, b, 1, a, 1);
              prog[rA+1][c] = put_slot(prog[rA+1][c], 0, 1, 32 + a, 1, 32 + b, 1, 32 + a, 1);
              if (k == 0) begin   // b <= a - b
                prog[rA][c]   = put_slot(prog[rA][c], 1, 1, a, 1, b, 1, b, 2);
                prog[rA+1][c] = put_slot(prog[rA+1][c], 1, 1, 32 + a, 1, 32 + b, 1, 32 + b, 2);
              end else begin      // b_re <= a_im - b_im, b_im <= b_re - a_re
                prog[rA][c]   = put_slot(prog[rA][c], 1, 1, b, 1, a, 1, 32 + b, 2);
                prog[rA+1][c] = put_slot(prog[rA+1][c], 1, 1, 32 + a, 1, 32 + b, 1, b, 2);
              end
              stage_end = imax(stage_end, rA + 3);
              bidx++;
              continue;
            end
            nalu[c] += 6;
            nmul[c] += 4;
            // row A: a_re + b_re -> SRF[a_re]; a_re - b_re -> MUL-1.LRF1[sb]
            rA = find_pair(c, stage_start);
            used[rA][c][0] = 1; used[rA][c][1] = 1;
            prog[rA][c] = put_slot(prog[rA][c], 0, 1, a, 1, b, 1, a, 1);
            prog[rA][c] = put_slot(prog[rA][c], 1, 1, a, 1, b, 5, sb, 2);
            // row B: imaginary parts, difference -> MUL-2.LRF1[sb]
            rB = find_pair(c, stage_start);
            used[rB][c][0] = 1; used[rB][c][1] = 1;
            prog[rB][c] = put_slot(prog[rB][c], 0, 1, 32 + a, 1, 32 + b, 1, 32 + a, 1);
            prog[rB][c] = put_slot(prog[rB][c], 1, 1, 32 + a, 1, 32 + b, 6, sb, 2);
            // MUL-1: wr*dr -> SP[2sb], wi*dr -> SP[2sb+1]
            rC = find_slot(c, 2, rA + 2); used[rC][c][2] = 1;
            prog[rC][c] = put_slot(prog[rC][c], 2, 3, k, 3, sb, 2, 2 * sb, 1);
            rD = find_slot(c, 2, rA + 2); used[rD][c][2] = 1;
            prog[rD][c] = put_slot(prog[rD][c], 2, 3, 16 + k, 3, sb, 2, 2 * sb + 1, 1);
            // MUL-2: wi*di -> ALU-1.LRF1[sb], wr*di -> ALU-2.LRF1[sb]
            rE = find_slot(c, 3, rB + 2); used[rE][c][3] = 1;
            prog[rE][c] = put_slot(prog[rE][c], 3, 3, 16 + k, 3, sb, 4, sb, 1);
            rF = find_slot(c, 3, rB + 2); used[rF][c][3] = 1;
            prog[rF][c] = put_slot(prog[rF][c], 3, 3, k, 3, sb, 5, sb, 1);
            // ALU-1: SP[2sb] - LRF1[sb] -> SRF[b_re]
            rG = find_slot(c, 0, imax(rC, rE) + 4); used[rG][c][0] = 1;
            prog[rG][c] = put_slot(prog[rG][c], 0, 2, 2 * sb, 3, sb, 1, b, 2);
            // ALU-2: SP[2sb+1] + LRF1[sb] -> SRF[b_im]
            rH = find_slot(c, 1, imax(rD, rF) + 4); used[rH][c][1] = 1;
            prog[rH][c] = put_slot(prog[rH][c], 1, 2, 2 * sb + 1, 3, sb, 1, 32 + b, 1);
            stage_end = imax(stage_end, imax(rG, rH) + 2);
            bidx++;
          end
        stage_start = stage_end;
      end
      return stage_start - 1;   // the last two rows only wait for write-back
    endfunction

    task automatic hw(level_e lvl, int c, int f, int a, word_t d);
      @(negedge clk);
      host_we = 1; host_lvl = lvl; host_cl = ($clog2(NCL+1))'(c);
      host_fu = 3'(f); host_addr = 6'(a); host_wdata = d;
      @(negedge clk);
      host_we = 0;
    endtask

    initial begin
      int bad_exact = 0, bad_dft = 0;
      imem_we = 0; imem_addr = 0; imem_cl = 0; imem_wdata = '0;
      host_we = 0; host_lvl = LVL_SRF; host_cl = 0; host_fu = 0; host_addr = 0;
      host_wdata = 0; start = 0; prog_len = 0;
      @(negedge rst);
      @(negedge clk);
      nrows = schedule();
      run_rows[g] = nrows;
      checks++;
      if (nrows > DEPTH) begin
        $display("FFT-32 on %0d cluster(s): %0d rows do not fit %0d", NCL, nrows, DEPTH);
        failures++;
        nrows = DEPTH;
      end
      // stream load of the input and twiddle preload
      for (int n = 0; n < N; n++) begin
        hw(LVL_SRF, 0, 0, n, x_re[n]);
        hw(LVL_SRF, 0, 0, 32 + n, x_im[n]);
      end
      for (int c = 0; c < NCL; c++)
        for (int f = 2; f < 4; f++)
          for (int k = 0; k < 16; k++) begin
            hw(LVL_LRF0, c, f, k, w_re[k]);
            hw(LVL_LRF0, c, f, 16 + k, w_im[k]);
          end
      for (int r = 0; r < nrows; r++)
        for (int c = 0; c < NCL; c++) begin
          @(negedge clk);
          imem_we = 1; imem_addr = 8'(r); imem_cl = ($clog2(NCL+1))'(c);
          imem_wdata = prog[r][c];
        end
      @(negedge clk);
      imem_we = 0;
      start = 1; prog_len = 9'(nrows);
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      run_cycles[g] = int'(cycles);
      checks++;
      if (cycles != 32'(nrows + int'(MAX_LAT))) failures++;
      // stream store of the result
      for (int n = 0; n < N; n++) begin
        word_t re, im;
        int    k;
        host_lvl = LVL_SRF; host_addr = 6'(n);
        #1 re = host_rdata;
        host_addr = 6'(32 + n);
        #1 im = host_rdata;
        k = bitrev5(n);
        checks += 2;
        if (re !== ref_re[n] || im !== ref_im[n]) bad_exact++;
        if (rabs(real'(int'(re)) / 65536.0 - dft_re[k]) > 0.01 ||
            rabs(real'(int'(im)) / 65536.0 - dft_im[k]) > 0.01) bad_dft++;
      end
      failures += bad_exact + bad_dft;
      for (int c = 0; c < NCL; c++) begin
        checks += 2;
        if (perf[c].alu_ops != 32'(nalu[c])) failures++;
        if (perf[c].mul_ops != 32'(nmul[c])) failures++;
      end
      $display("FFT-32 on %0d cluster(s): %0d rows, %0d cycles, ALU %0d MUL %0d SRF %0d SP %0d LRF %0d (cluster 0); exact-mismatch %0d, DFT-mismatch %0d",
               NCL, nrows, cycles, perf[0].alu_ops, perf[0].mul_ops, perf[0].srf_acc,
               perf[0].sp_acc, perf[0].lrf_acc, bad_exact, bad_dft);
      begin
        int sp_tot = 0, lrf_tot = 0;
        for (int c = 0; c < NCL; c++) begin
          sp_tot += int'(perf[c].sp_used);
          lrf_tot += int'(perf[c].lrf_used);
        end
        checks++;
        if (srf_used != 32'(2 * N)) failures++;
        $display("FFT-32 on %0d cluster(s): registers used SRF %0d, SP %0d, LRF %0d (all clusters)",
                 NCL, srf_used, sp_tot, lrf_tot);
      end
      finished++;
    end
  end

  initial begin
    wait (finished == NCFG);
    // more clusters must not be slower
    for (int i = 1; i < NCFG; i++) begin
      checks++;
      if (run_cycles[i] > run_cycles[i-1]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
