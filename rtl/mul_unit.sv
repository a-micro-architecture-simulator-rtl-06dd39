// MUL functional unit: four-stage pipelined fixed-point multiplier.
//
// The unit has one operation (opcode 1 = MUL, 0 = none). Stage 1 captures
// the operands fetched by the cluster, stage 2 forms the 64-bit signed
// product, stage 3 scales it, stage 4 drives the result on `wb`, which the
// cluster writes at the end of that cycle: a result issued in cycle t is
// readable from cycle t+4, the four-cycle MUL time. No interlock.
//
// The document loads twiddle factors such as 0.707 and -1 into the
// multipliers' LRF0 but does not give the number format. This design treats
// words as signed fixed point with FRAC fraction bits (default 16, Q16.16):
// result = (data1 * data2) >>> FRAC, truncated to 32 bits. FRAC = 0 gives a
// plain integer multiply returning the low 32 bits.
module mul_unit
  import sp_pkg::*;
#(
  parameter int unsigned FRAC = FRAC_BITS
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                issue,
  input  logic [MUL_OP_W-1:0] opcode,
  input  dest_e               dest,
  input  raddr_t              wbaddr,
  input  word_t               data1,
  input  word_t               data2,
  output wb_t                 wb       // result, valid in cycle t+3
);

  typedef struct packed {
    logic   valid;
    dest_e  dest;
    raddr_t addr;
  } tag_t;

  tag_t               t1, t2, t3;
  word_t              a1, b1;
  logic signed [63:0] p2;
  word_t              r3;

  always_ff @(posedge clk) begin
    if (rst) begin
      t1.valid <= 1'b0;
      t2.valid <= 1'b0;
      t3.valid <= 1'b0;
    end else begin
      t1.valid <= issue && (opcode == 1'b1);
      t2.valid <= t1.valid;
      t3.valid <= t2.valid;
    end
    {t1.dest, t1.addr} <= {dest, wbaddr};
    {t2.dest, t2.addr} <= {t1.dest, t1.addr};
    {t3.dest, t3.addr} <= {t2.dest, t2.addr};
    a1 <= data1;
    b1 <= data2;
    p2 <= $signed(a1) * $signed(b1);
    r3 <= word_t'(p2 >>> FRAC);
  end

  assign wb = '{valid: t3.valid, dest: t3.dest, addr: t3.addr, data: r3};

endmodule
