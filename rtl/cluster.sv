// Arithmetic cluster: two ALUs, two multipliers, one divide unit, the
// cluster's scratch pad (SP) and two local register files per unit.
//
// Each cycle in which `issue` is high the cluster takes one 137-bit cluster
// instruction and splits it into five unit instructions (slot 0 = ALU-1 in
// the top 29 bits, then ALU-2, MUL-1, MUL-2 and DIV in the bottom 27 bits).
// In the same cycle it fetches both operands of every slot:
//   source 00 none (operand 0), 01 SRF[addr], 10 SP[addr],
//   11 the unit's own LRF0[addr] for operand 1 / LRF1[addr] for operand 2,
// and hands them to the units, which are pipelined 2 (ALU), 4 (MUL) and
// 6 (DIV) cycles deep. When a result leaves a unit it is routed by the
// instruction's DEST field: 001 SRF, 010 SP, 011 the unit's own LRF0,
// 100..111 the LRF1 of the other four units in ascending order (for FU-1
// these are FU-2..FU-5). The SRF is shared by all clusters and lives
// outside; this module exposes its 10 read ports and 5 write requests.
//
// Scheduling is static: nothing stalls, and an instruction reads whatever a
// register holds in its issue cycle. When two results address the same
// register in one cycle the unit with the higher slot number wins.
//
// The cluster also counts, from the instructions it issues, how many ALU,
// MUL and DIV operations it executes, how many times it reads or writes
// each register level, and how many distinct SP and LRF registers it has
// used (the statistics the document reports per cluster). `srf_touch`
// marks the SRF registers its issued operations use this cycle. `perf_clr`
// zeroes the counters and usage maps. The usage counts can reach at most 64 (SP) and
// 640 (LRF), so their upper bits are constant 0.
//
// A host port writes and reads the SP and the LRFs (to preload constants
// such as twiddle factors); it must only write while no instruction is in
// flight. Read data is combinational.
//
// From the document: the unit mix, the register sizes, the instruction
// formats, the source and destination codes, the LRF0/LRF1 read and write
// structure and the pipeline depths. This design's choices: slot order,
// same-cycle write priority, operand fetch in the issue cycle, counter
// widths and the host port.
module cluster
  import sp_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     issue,
  input  vliw_t                    inst,
  // shared SRF
  output raddr_t [2*NFU-1:0]       srf_ra,
  input  word_t  [2*NFU-1:0]       srf_rd,
  output wreq_t  [NFU-1:0]         srf_wr,
  // host access to SP / LRF0 / LRF1
  input  logic                     host_we,
  input  level_e                   host_lvl,
  input  logic [2:0]               host_fu,
  input  raddr_t                   host_addr,
  input  word_t                    host_wdata,
  output word_t                    host_rdata,
  // statistics
  input  logic                     perf_clr,
  output perf_t                    perf,
  output logic [NREG-1:0]          srf_touch
);

  // ------------------------------------------------------------ decode
  fu_inst_t [NFU-1:0] fi;
  logic     [NFU-1:0] act;   // slot carries an operation that executes

  for (genvar f = 0; f < int'(NFU); f++) begin : g_dec
    localparam int unsigned LSB  = fu_lsb(f);
    localparam int unsigned BITS = fu_bits(f);
    logic [ALU_BIT-1:0] raw;
    assign raw   = (ALU_BIT)'(inst[LSB +: BITS]);
    assign fi[f] = fu_decode(raw, fu_opw(f));
    if (fu_kind(f) == 0) begin : g_act_alu
      assign act[f] = issue && (fi[f].opcode != ALU_NOP)
                            && (fi[f].opcode <= ALU_EQ);
    end else begin : g_act
      assign act[f] = issue && (fi[f].opcode != '0);
    end
  end

  // ---------------------------------------------------- register arrays
  raddr_t [2*NFU:0] sp_ra;
  word_t  [2*NFU:0] sp_rd;
  wreq_t  [NFU:0]   sp_wr;

  raddr_t [NFU-1:0][1:0] l0_ra, l1_ra;
  word_t  [NFU-1:0][1:0] l0_rd, l1_rd;
  wreq_t  [NFU-1:0][1:0] l0_wr;
  wreq_t  [NFU-1:0][NFU-1:0] l1_wr;

  wb_t    [NFU-1:0] wb;
  word_t  [NFU-1:0] d1, d2;

  regfile #(.NR(2*NFU+1), .NW(NFU+1)) u_sp (
    .clk, .rst, .wr(sp_wr), .ra(sp_ra), .rd(sp_rd)
  );

  for (genvar g = 0; g < int'(NFU); g++) begin : g_lrf
    regfile #(.NR(2), .NW(2))   u_lrf0 (
      .clk, .rst, .wr(l0_wr[g]), .ra(l0_ra[g]), .rd(l0_rd[g])
    );
    regfile #(.NR(2), .NW(NFU)) u_lrf1 (
      .clk, .rst, .wr(l1_wr[g]), .ra(l1_ra[g]), .rd(l1_rd[g])
    );
  end

  // ------------------------------------------------------ operand fetch
  always_comb begin
    for (int f = 0; f < int'(NFU); f++) begin
      srf_ra[2*f]   = fi[f].addr0;
      srf_ra[2*f+1] = fi[f].addr1;
      sp_ra[2*f]    = fi[f].addr0;
      sp_ra[2*f+1]  = fi[f].addr1;
      l0_ra[f][0]   = fi[f].addr0;
      l1_ra[f][0]   = fi[f].addr1;
      l0_ra[f][1]   = host_addr;
      l1_ra[f][1]   = host_addr;
      unique case (fi[f].src0)
        SRC_SRF: d1[f] = srf_rd[2*f];
        SRC_SP:  d1[f] = sp_rd[2*f];
        SRC_LRF: d1[f] = l0_rd[f][0];
        default: d1[f] = '0;
      endcase
      unique case (fi[f].src1)
        SRC_SRF: d2[f] = srf_rd[2*f+1];
        SRC_SP:  d2[f] = sp_rd[2*f+1];
        SRC_LRF: d2[f] = l1_rd[f][0];
        default: d2[f] = '0;
      endcase
    end
    sp_ra[2*NFU] = host_addr;
  end

  // --------------------------------------------------- functional units
  for (genvar f = 0; f < int'(NFU); f++) begin : g_fu
    if (fu_kind(f) == 0) begin : g_alu
      alu_unit u_alu (
        .clk, .rst, .issue(issue), .opcode(fi[f].opcode),
        .dest(fi[f].dest), .wbaddr(fi[f].wbaddr),
        .data1(d1[f]), .data2(d2[f]), .wb(wb[f])
      );
    end else if (fu_kind(f) == 1) begin : g_mul
      mul_unit u_mul (
        .clk, .rst, .issue(issue), .opcode(fi[f].opcode[MUL_OP_W-1:0]),
        .dest(fi[f].dest), .wbaddr(fi[f].wbaddr),
        .data1(d1[f]), .data2(d2[f]), .wb(wb[f])
      );
    end else begin : g_div
      div_unit u_div (
        .clk, .rst, .issue(issue), .opcode(fi[f].opcode[DIV_OP_W-1:0]),
        .dest(fi[f].dest), .wbaddr(fi[f].wbaddr),
        .data1(d1[f]), .data2(d2[f]), .wb(wb[f])
      );
    end
  end

  // ---------------------------------------------------------- write back
  always_comb begin
    // host ports have the lowest priority (index 0)
    sp_wr[0] = '{en: host_we && host_lvl == LVL_SP, addr: host_addr,
                 data: host_wdata};
    for (int g = 0; g < int'(NFU); g++) begin
      l0_wr[g][0] = '{en: host_we && host_lvl == LVL_LRF0 && host_fu == 3'(g),
                      addr: host_addr, data: host_wdata};
      l1_wr[g][0] = '{en: host_we && host_lvl == LVL_LRF1 && host_fu == 3'(g),
                      addr: host_addr, data: host_wdata};
    end
    for (int f = 0; f < int'(NFU); f++) begin
      srf_wr[f]   = '{en: wb[f].valid && wb[f].dest == DST_SRF,
                      addr: wb[f].addr, data: wb[f].data};
      sp_wr[f+1]  = '{en: wb[f].valid && wb[f].dest == DST_SP,
                      addr: wb[f].addr, data: wb[f].data};
      l0_wr[f][1] = '{en: wb[f].valid && wb[f].dest == DST_LRF0,
                      addr: wb[f].addr, data: wb[f].data};
    end
    // LRF1 of unit g: writers are the other units in ascending order
    for (int g = 0; g < int'(NFU); g++) begin
      for (int f = 0; f < int'(NFU); f++) begin
        if (f != g) begin
          l1_wr[g][(f < g) ? f + 1 : f] =
            '{en: wb[f].valid && wb[f].dest >= DST_LRF1A
                  && lrf1_target(f, int'(wb[f].dest)) == g,
              addr: wb[f].addr, data: wb[f].data};
        end
      end
    end
  end

  // ------------------------------------------------------------ host read
  always_comb begin
    unique case (host_lvl)
      LVL_SP:   host_rdata = sp_rd[2*NFU];
      LVL_LRF0: host_rdata = (host_fu < 3'(NFU)) ? l0_rd[host_fu][1] : '0;
      LVL_LRF1: host_rdata = (host_fu < 3'(NFU)) ? l1_rd[host_fu][1] : '0;
      default:  host_rdata = '0;
    endcase
  end

  // ----------------------------------------------------------- statistics
  logic [3:0] n_alu, n_mul, n_div, n_srf, n_sp, n_lrf;
  always_comb begin
    n_alu = '0; n_mul = '0; n_div = '0;
    n_srf = '0; n_sp  = '0; n_lrf = '0;
    for (int f = 0; f < int'(NFU); f++) begin
      if (act[f]) begin
        case (fu_kind(f))
          0:       n_alu++;
          1:       n_mul++;
          default: n_div++;
        endcase
        case (fi[f].src0)
          SRC_SRF: n_srf++;
          SRC_SP:  n_sp++;
          SRC_LRF: n_lrf++;
          default: ;
        endcase
        case (fi[f].src1)
          SRC_SRF: n_srf++;
          SRC_SP:  n_sp++;
          SRC_LRF: n_lrf++;
          default: ;
        endcase
        case (fi[f].dest)
          DST_NONE: ;
          DST_SRF:  n_srf++;
          DST_SP:   n_sp++;
          default:  n_lrf++;
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst || perf_clr) begin
      perf.alu_ops <= '0; perf.mul_ops <= '0; perf.div_ops <= '0;
      perf.srf_acc <= '0; perf.sp_acc  <= '0; perf.lrf_acc <= '0;
    end else begin
      perf.alu_ops <= perf.alu_ops + 32'(n_alu);
      perf.mul_ops <= perf.mul_ops + 32'(n_mul);
      perf.div_ops <= perf.div_ops + 32'(n_div);
      perf.srf_acc <= perf.srf_acc + 32'(n_srf);
      perf.sp_acc  <= perf.sp_acc  + 32'(n_sp);
      perf.lrf_acc <= perf.lrf_acc + 32'(n_lrf);
    end
  end

  // Register usage: one bit per SP and LRF register, set when an issued
  // operation reads it or names it as destination; the counts are the
  // number of bits set. SRF registers touched this cycle go to the top
  // level, which keeps the shared SRF's usage map.
  logic [NREG-1:0]          sp_use, sp_mark;
  logic [NFU-1:0][NREG-1:0] l0_use, l0_mark, l1_use, l1_mark;

  always_comb begin
    srf_touch = '0; sp_mark = '0; l0_mark = '0; l1_mark = '0;
    for (int f = 0; f < int'(NFU); f++) begin
      if (act[f]) begin
        case (fi[f].src0)
          SRC_SRF: srf_touch[fi[f].addr0] = 1'b1;
          SRC_SP:  sp_mark[fi[f].addr0]   = 1'b1;
          SRC_LRF: l0_mark[f][fi[f].addr0] = 1'b1;
          default: ;
        endcase
        case (fi[f].src1)
          SRC_SRF: srf_touch[fi[f].addr1] = 1'b1;
          SRC_SP:  sp_mark[fi[f].addr1]   = 1'b1;
          SRC_LRF: l1_mark[f][fi[f].addr1] = 1'b1;
          default: ;
        endcase
        case (fi[f].dest)
          DST_NONE: ;
          DST_SRF:  srf_touch[fi[f].wbaddr] = 1'b1;
          DST_SP:   sp_mark[fi[f].wbaddr]   = 1'b1;
          DST_LRF0: l0_mark[f][fi[f].wbaddr] = 1'b1;
          default:  l1_mark[lrf1_target(f, int'(fi[f].dest))][fi[f].wbaddr] = 1'b1;
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst || perf_clr) begin
      sp_use <= '0; l0_use <= '0; l1_use <= '0;
    end else begin
      sp_use <= sp_use | sp_mark;
      l0_use <= l0_use | l0_mark;
      l1_use <= l1_use | l1_mark;
    end
  end

  always_comb begin
    perf.sp_used  = 32'($countones(sp_use));
    perf.lrf_used = 32'($countones(l0_use)) + 32'($countones(l1_use));
  end

endmodule
