// DIV functional unit: six-stage pipelined divide / remainder / square root.
//
// Opcodes (DIV kernel ISA): 00 none, 01 DIV, 10 REM, 11 SQR. Stage 1
// captures the operands fetched by the cluster, stage 2 computes the
// result, stages 3 to 5 carry it, and stage 6 drives it on `wb`, written at
// the end of that cycle: a result issued in cycle t is readable from cycle
// t+6, the six-cycle DIV time. One instruction can be issued every cycle.
// The arithmetic is placed in one stage and left to retiming; the document
// gives only the depth.
//
// Design choices: DIV and REM are signed 32-bit integer division truncating
// toward zero (data1 / data2, data1 % data2). Division by zero returns all
// ones as quotient and data1 as remainder; -2^31 / -1 returns -2^31 with
// remainder 0. The document's table names the third operation SQR while its
// prose calls it "exponent"; this unit follows the table and computes the
// integer square root floor(sqrt(data1)) of data1 taken as unsigned, as the
// divide/square-root unit of the Imagine cluster the design derives from.
module div_unit
  import sp_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                issue,
  input  logic [DIV_OP_W-1:0] opcode,
  input  dest_e               dest,
  input  raddr_t              wbaddr,
  input  word_t               data1,
  input  word_t               data2,
  output wb_t                 wb       // result, valid in cycle t+5
);

  localparam int unsigned NSTG = DIV_LAT - 1;  // register stages: 5

  function automatic word_t isqrt(word_t v);
    word_t rem, root, bitv;
    rem  = v;
    root = '0;
    bitv = word_t'(1) << (DATA_W - 2);
    for (int i = 0; i < int'(DATA_W / 2); i++) begin
      if (rem >= (root | bitv)) begin
        rem  = rem - (root | bitv);
        root = (root >> 1) | bitv;
      end else begin
        root = root >> 1;
      end
      bitv = bitv >> 2;
    end
    return root;
  endfunction

  function automatic word_t compute(div_op_e op, word_t a, word_t b);
    logic signed [DATA_W-1:0] sa, sb;
    sa = $signed(a);
    sb = $signed(b);
    case (op)
      DIV_DIV: begin
        if (b == '0)                              return '1;
        else if (a == {1'b1, {(DATA_W-1){1'b0}}} && b == '1) return a;
        else                                      return word_t'(sa / sb);
      end
      DIV_REM: begin
        if (b == '0)                              return a;
        else if (a == {1'b1, {(DATA_W-1){1'b0}}} && b == '1) return '0;
        else                                      return word_t'(sa % sb);
      end
      DIV_SQR: return isqrt(a);
      default: return '0;
    endcase
  endfunction

  logic    vld [NSTG];
  dest_e   dst [NSTG];
  raddr_t  adr [NSTG];
  word_t   dat [NSTG];
  div_op_e op1;
  word_t   a1, b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s < int'(NSTG); s++) vld[s] <= 1'b0;
    end else begin
      vld[0] <= issue && (opcode != DIV_NOP);
      for (int s = 1; s < int'(NSTG); s++) vld[s] <= vld[s-1];
    end
    dst[0] <= dest;
    adr[0] <= wbaddr;
    op1    <= div_op_e'(opcode);
    a1     <= data1;
    b1     <= data2;
    dat[0] <= '0;
    for (int s = 1; s < int'(NSTG); s++) begin
      dst[s] <= dst[s-1];
      adr[s] <= adr[s-1];
      dat[s] <= (s == 1) ? compute(op1, a1, b1) : dat[s-1];
    end
  end

  assign wb = '{valid: vld[NSTG-1], dest: dst[NSTG-1], addr: adr[NSTG-1],
                data: dat[NSTG-1]};

endmodule
