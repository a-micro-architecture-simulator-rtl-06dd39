// Stream processor: NCL SIMD-style arithmetic clusters around a shared
// stream register file, fed by a controller from an instruction memory.
//
// Data path: the SRF (64 x 32 bits) is shared by all clusters. Every
// cluster holds two ALUs, two multipliers, one divide unit, a 64-entry
// scratch pad (SP) for exchange between its units, and two 64-entry local
// register files (LRF0, LRF1) at the inputs of each unit. Values exchanged
// between units of one cluster travel through the LRFs or the SP; values
// exchanged between clusters, and the stream inputs and outputs, go through
// the SRF. With the default NCL = 4 the register levels hold 64 (SRF),
// 4 x 64 = 256 (SP) and 4 x 5 x 2 x 64 = 2560 (LRF) words.
//
// Control: the controller issues one 137-bit cluster instruction per
// cluster per clock from the instruction memory (rows of NCL
// instructions). The schedule is static: the program must respect the
// unit latencies (ALU 2, MUL 4, DIV 6 cycles); nothing interlocks.
//
// Host interface (used while idle):
//   imem_*   load cluster instruction `imem_wdata` of cluster `imem_cl`
//            into row `imem_addr`.
//   host_*   read (combinationally) or write one register of any level:
//            host_lvl SRF, SP, LRF0 or LRF1; host_cl picks the cluster and
//            host_fu the unit (0..4 = ALU-1, ALU-2, MUL-1, MUL-2, DIV).
//            This is the path for stream loads and stores between the
//            off-chip data memory and the SRF and for preloading constants.
//   start / prog_len / busy / done / cycles: run prog_len rows; `done`
//            rises prog_len + 6 cycles after start.
//   perf     per-cluster operation, register-access and register-usage
//            counters; srf_used counts the distinct SRF registers the
//            program has used. All clear at start.
//            The usage counts are 32 bits wide like the other counters;
//            their upper bits stay 0, since at most 64 (SRF, SP) or
//            640 (LRF) registers exist per cluster.
//
// Same-cycle writes to one SRF register are resolved in favour of the
// higher cluster number, then the higher unit number. The organisation,
// sizes, formats and latencies follow the document; the host interface,
// the write priority and the instruction-memory row layout are this
// design's choices.
module stream_processor
  import sp_pkg::*;
#(
  parameter int unsigned NCL   = 4,    // number of clusters
  parameter int unsigned DEPTH = 256   // instruction memory rows
) (
  input  logic                     clk,
  input  logic                     rst,
  // program load
  input  logic                     imem_we,
  input  logic [$clog2(DEPTH)-1:0] imem_addr,
  input  logic [$clog2(NCL+1)-1:0] imem_cl,
  input  vliw_t                    imem_wdata,
  // register access (stream load/store, constant preload, result read)
  input  logic                     host_we,
  input  level_e                   host_lvl,
  input  logic [$clog2(NCL+1)-1:0] host_cl,
  input  logic [2:0]               host_fu,
  input  raddr_t                   host_addr,
  input  word_t                    host_wdata,
  output word_t                    host_rdata,
  // run control
  input  logic                     start,
  input  logic [$clog2(DEPTH):0]   prog_len,
  output logic                     busy,
  output logic                     done,
  output logic [31:0]              cycles,
  // statistics
  output perf_t [NCL-1:0]          perf,
  output logic [31:0]              srf_used
);

  logic [$clog2(DEPTH)-1:0] imem_raddr;
  vliw_t [NCL-1:0]          imem_rdata;
  vliw_t [NCL-1:0]          inst;
  logic                     issue;
  logic                     perf_clr;

  inst_mem #(.NCL(NCL), .DEPTH(DEPTH)) u_imem (
    .clk, .we(imem_we), .waddr(imem_addr), .wcl(imem_cl), .wdata(imem_wdata),
    .raddr(imem_raddr), .rdata(imem_rdata)
  );

  controller #(.NCL(NCL), .DEPTH(DEPTH)) u_ctrl (
    .clk, .rst, .start, .prog_len, .imem_raddr, .imem_rdata,
    .issue, .inst, .busy, .done, .perf_clr, .cycles
  );

  // --------------------------------------------------------------- SRF
  localparam int unsigned SRF_NR = NCL * 2 * NFU + 1;
  localparam int unsigned SRF_NW = NCL * NFU + 1;

  raddr_t [SRF_NR-1:0] srf_ra;
  word_t  [SRF_NR-1:0] srf_rd;
  wreq_t  [SRF_NW-1:0] srf_wr;

  regfile #(.NR(SRF_NR), .NW(SRF_NW)) u_srf (
    .clk, .rst, .wr(srf_wr), .ra(srf_ra), .rd(srf_rd)
  );

  assign srf_ra[SRF_NR-1] = host_addr;
  assign srf_wr[0] = '{en: host_we && host_lvl == LVL_SRF, addr: host_addr,
                       data: host_wdata};

  // ----------------------------------------------------------- clusters
  word_t [NCL-1:0]          cl_rdata;
  logic [NCL-1:0][NREG-1:0] srf_touch;

  for (genvar c = 0; c < int'(NCL); c++) begin : g_cl
    cluster u_cluster (
      .clk, .rst,
      .issue,
      .inst      (inst[c]),
      .srf_ra    (srf_ra[c*2*NFU +: 2*NFU]),
      .srf_rd    (srf_rd[c*2*NFU +: 2*NFU]),
      .srf_wr    (srf_wr[1 + c*NFU +: NFU]),
      .host_we   (host_we && int'(host_cl) == c),
      .host_lvl,
      .host_fu,
      .host_addr,
      .host_wdata,
      .host_rdata(cl_rdata[c]),
      .perf_clr,
      .perf      (perf[c]),
      .srf_touch (srf_touch[c])
    );
  end

  // Usage map of the shared SRF: registers any cluster has used since start.
  logic [NREG-1:0]          srf_use, srf_mark;

  always_comb begin
    srf_mark = '0;
    for (int c = 0; c < int'(NCL); c++) srf_mark |= srf_touch[c];
  end

  always_ff @(posedge clk) begin
    if (rst || perf_clr) srf_use <= '0;
    else                 srf_use <= srf_use | srf_mark;
  end

  assign srf_used = 32'($countones(srf_use));

  always_comb begin
    if (host_lvl == LVL_SRF)            host_rdata = srf_rd[SRF_NR-1];
    else if (int'(host_cl) < int'(NCL)) host_rdata = cl_rdata[host_cl];
    else                                host_rdata = '0;
  end

  // The host port writes only while no program runs.
  a_host_idle: assert property (@(posedge clk) disable iff (rst)
    host_we |-> !busy);
  a_imem_idle: assert property (@(posedge clk) disable iff (rst)
    imem_we |-> !busy);

endmodule
