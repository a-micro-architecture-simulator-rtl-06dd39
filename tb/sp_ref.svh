// Behavioural reference of the stream processor for the testbenches,
// included inside a testbench module that imports sp_pkg.
//
// `sp_model` keeps its own copy of every register level and executes
// cluster instructions cycle by cycle: operands are read in the issue
// cycle, results are written at the end of cycle issue + latency - 1
// (ALU 2, MUL 4, DIV 6). Same-cycle writes to one register are applied in
// ascending (cluster, unit) order so the last one wins. The arithmetic is
// written independently of the RTL. It also counts how often each
// mechanism of the design was exercised, and the per-cluster statistics.
//
// `enc_slot` assembles one unit instruction into its slot of a 137-bit
// cluster instruction (slot 0 = ALU-1 in the top bits ... slot 4 = DIV).

  localparam int SLOT_BITS [5] = '{29, 29, 26, 26, 27};
  localparam int SLOT_OPW  [5] = '{4, 4, 1, 1, 2};
  localparam int SLOT_LAT  [5] = '{2, 2, 4, 4, 6};

  function automatic int slot_lsb(int f);
    int pos = 137;
    for (int i = 0; i <= f; i++) pos -= SLOT_BITS[i];
    return pos;
  endfunction

  function automatic vliw_t enc_slot(vliw_t w, int f, int src0, int a0,
                                     int src1, int a1, int dest, int wba,
                                     int op);
    logic [28:0] raw;
    int opw = SLOT_OPW[f];
    raw = 0;
    raw = (29'(src0) << (opw + 23)) | (29'(a0) << (opw + 17))
        | (29'(src1) << (opw + 15)) | (29'(a1) << (opw + 9))
        | (29'(dest) << (opw + 6))  | (29'(wba) << opw) | 29'(op);
    for (int b = 0; b < SLOT_BITS[f]; b++) w[slot_lsb(f) + b] = raw[b];
    return w;
  endfunction

  function automatic word_t ref_alu(int op, word_t a, word_t b);
    int signed sa = a, sb = b;
    case (op)
      1:  return a + b;
      2:  return a - b;
      3:  return (sa < 0) ? word_t'(-sa) : a;
      4:  return a & b;
      5:  return a | b;
      6:  return a ^ b;
      7:  return ~a;
      8:  return a << (b % 32);
      9:  return a >> (b % 32);
      10: return word_t'(sa >>> (b % 32));
      11: return (sa <  sb) ? 1 : 0;
      12: return (sa <= sb) ? 1 : 0;
      13: return (a == b)   ? 1 : 0;
      default: return 0;
    endcase
  endfunction

  function automatic word_t ref_mul(word_t a, word_t b);
    longint p = longint'(int'(a)) * longint'(int'(b));
    return word_t'(p >>> 16);
  endfunction

  function automatic word_t ref_div(int op, word_t a, word_t b);
    longint sa = longint'(int'(a)), sb = longint'(int'(b));
    longint lo, hi, mid;
    case (op)
      1: if (b == 0) return 32'hFFFF_FFFF; else return word_t'(sa / sb);
      2: if (b == 0) return a;             else return word_t'(sa % sb);
      3: begin   // floor(sqrt(a)) by bisection
        lo = 0; hi = 65536;
        while (hi - lo > 1) begin
          mid = (lo + hi) / 2;
          if (mid * mid <= longint'(a)) lo = mid; else hi = mid;
        end
        return word_t'(lo);
      end
      default: return 0;
    endcase
  endfunction

  typedef struct {
    int    due;    // cycle at whose end the write happens
    int    c, f;   // writer
    int    lvl;    // 0 SRF, 1 SP, 2 LRF0, 3 LRF1
    int    tf;     // target unit for LRF0/LRF1
    int    addr;
    word_t data;
  } pend_t;

  class sp_model;
    int ncl;
    word_t srf [64];
    word_t sp   [];   // [c*64 + a]
    word_t lrf0 [];   // [(c*5 + f)*64 + a]
    word_t lrf1 [];
    pend_t pend [$];
    int    cyc;
    // statistics per cluster: alu, mul, div, srf, sp, lrf
    int    stat [];   // [c*6 + k]
    // mechanism counters
    int    n_src [4];       // operand reads per source code
    int    n_dst [8];       // results per DEST code
    int    n_alu_op [16];
    int    n_mul, n_div_op [4];
    int    n_stale;         // read of a register with a write still pending
    int    n_collide;       // same-cycle writes to one register
    int    n_xcluster;      // SRF value written by one cluster, read by another
    int    srf_writer [64];
    // register usage maps, set at issue like the hardware's
    bit    use_srf [64];
    bit    use_sp  [];    // [c*64 + a]
    bit    use_l0  [];    // [(c*5 + f)*64 + a]
    bit    use_l1  [];

    function new(int n);
      ncl = n;
      sp = new[n*64]; lrf0 = new[n*320]; lrf1 = new[n*320]; stat = new[n*6];
      foreach (srf[i]) begin srf[i] = 0; srf_writer[i] = -1; end
      foreach (sp[i]) sp[i] = 0;
      foreach (lrf0[i]) begin lrf0[i] = 0; lrf1[i] = 0; end
      foreach (stat[i]) stat[i] = 0;
      use_sp = new[n*64]; use_l0 = new[n*320]; use_l1 = new[n*320];
      clear_stats();
      cyc = 0;
    endfunction

    function void clear_stats();
      foreach (stat[i]) stat[i] = 0;
      foreach (use_srf[i]) use_srf[i] = 0;
      foreach (use_sp[i]) use_sp[i] = 0;
      foreach (use_l0[i]) begin use_l0[i] = 0; use_l1[i] = 0; end
    endfunction

    function void mark(int lvl, int c, int tf, int addr);
      case (lvl)
        0: use_srf[addr] = 1;
        1: use_sp[c*64 + addr] = 1;
        2: use_l0[(c*5 + tf)*64 + addr] = 1;
        default: use_l1[(c*5 + tf)*64 + addr] = 1;
      endcase
    endfunction

    function int used_srf();
      int n = 0;
      foreach (use_srf[i]) n += int'(use_srf[i]);
      return n;
    endfunction

    function int used_sp(int c);
      int n = 0;
      for (int a = 0; a < 64; a++) n += int'(use_sp[c*64 + a]);
      return n;
    endfunction

    function int used_lrf(int c);
      int n = 0;
      for (int i = 0; i < 320; i++) n += int'(use_l0[c*320 + i]) + int'(use_l1[c*320 + i]);
      return n;
    endfunction

    function bit pending_on(int lvl, int c, int tf, int addr);
      foreach (pend[i])
        if (pend[i].lvl == lvl && pend[i].addr == addr &&
            (lvl == 0 || (pend[i].c == c && (lvl == 1 || pend[i].tf == tf))))
          return 1;
      return 0;
    endfunction

    function word_t rd(int c, int f, int which, int src, int addr);
      int lvl;
      n_src[src]++;
      case (src)
        1: begin
          lvl = 0;
          if (srf_writer[addr] >= 0 && srf_writer[addr] != c) n_xcluster++;
        end
        2: lvl = 1;
        3: lvl = (which == 0) ? 2 : 3;
        default: return 0;
      endcase
      if (pending_on(lvl, c, f, addr)) n_stale++;
      mark(lvl, c, f, addr);
      case (lvl)
        0: return srf[addr];
        1: return sp[c*64 + addr];
        2: return lrf0[(c*5 + f)*64 + addr];
        default: return lrf1[(c*5 + f)*64 + addr];
      endcase
    endfunction

    function void bump(int c, int k);
      stat[c*6 + k] = stat[c*6 + k] + 1;
    endfunction

    function int lvl_stat(int lvl);
      return (lvl == 0) ? 3 : (lvl == 1) ? 4 : 5;
    endfunction

    // Execute one clock: insts[c] is cluster c's instruction if issue.
    function void step(bit issue, vliw_t insts []);
      pend_t  due [$];
      if (issue) begin
        for (int c = 0; c < ncl; c++) begin
          for (int f = 0; f < 5; f++) begin
            logic [28:0] raw;
            int opw, op, s0, a0, s1, a1, dst, wba;
            bit act;
            word_t d1, d2, res;
            opw = SLOT_OPW[f];
            for (int b = 0; b < 29; b++)
              raw[b] = (b < SLOT_BITS[f]) ? insts[c][slot_lsb(f) + b] : 1'b0;
            op  = int'(raw) & ((1 << opw) - 1);
            wba = (int'(raw) >> opw) & 63;
            dst = (int'(raw) >> (opw + 6)) & 7;
            a1  = (int'(raw) >> (opw + 9)) & 63;
            s1  = (int'(raw) >> (opw + 15)) & 3;
            a0  = (int'(raw) >> (opw + 17)) & 63;
            s0  = (int'(raw) >> (opw + 23)) & 3;
            act = (f < 2) ? (op >= 1 && op <= 13) : (op != 0);
            if (!act) continue;
            d1 = rd(c, f, 0, s0, a0);
            d2 = rd(c, f, 1, s1, a1);
            if (f < 2) begin res = ref_alu(op, d1, d2); bump(c, 0); n_alu_op[op]++; end
            else if (f < 4) begin res = ref_mul(d1, d2); bump(c, 1); n_mul++; end
            else begin res = ref_div(op, d1, d2); bump(c, 2); n_div_op[op]++; end
            if (s0 != 0) bump(c, lvl_stat(s0 - 1));
            if (s1 != 0) bump(c, lvl_stat(s1 - 1));
            n_dst[dst]++;
            if (dst != 0) begin
              pend_t p;
              p.due = cyc + SLOT_LAT[f] - 1; p.c = c; p.f = f; p.addr = wba; p.data = res;
              case (dst)
                1: begin p.lvl = 0; p.tf = 0; end
                2: begin p.lvl = 1; p.tf = 0; end
                3: begin p.lvl = 2; p.tf = f; end
                default: begin p.lvl = 3; p.tf = (dst - 4 < f) ? dst - 4 : dst - 3; end
              endcase
              bump(c, lvl_stat(p.lvl > 1 ? 2 : p.lvl));
              mark(p.lvl, c, p.tf, wba);
              pend.push_back(p);
            end
          end
        end
      end
      // writes due at the end of this cycle, in ascending (cluster, unit)
      for (int i = pend.size() - 1; i >= 0; i--)
        if (pend[i].due == cyc) begin due.push_back(pend[i]); pend.delete(i); end
      due.sort() with (item.c * 8 + item.f);
      for (int i = 0; i < due.size(); i++)
        for (int j = 0; j < i; j++)
          if (due[i].lvl == due[j].lvl && due[i].addr == due[j].addr &&
              (due[i].lvl == 0 || (due[i].c == due[j].c &&
               (due[i].lvl == 1 || due[i].tf == due[j].tf))))
            n_collide++;
      foreach (due[i]) begin
        case (due[i].lvl)
          0: begin srf[due[i].addr] = due[i].data; srf_writer[due[i].addr] = due[i].c; end
          1: sp[due[i].c*64 + due[i].addr] = due[i].data;
          2: lrf0[(due[i].c*5 + due[i].tf)*64 + due[i].addr] = due[i].data;
          default: lrf1[(due[i].c*5 + due[i].tf)*64 + due[i].addr] = due[i].data;
        endcase
      end
      cyc++;
    endfunction
  endclass

