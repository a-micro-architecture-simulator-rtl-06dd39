// ALU functional unit: two-stage pipeline, 13 integer operations.
//
// Stage 1 (issue cycle): the cluster presents the decoded opcode, the
// write-back destination and the two operands it has already fetched from
// SRF / SP / LRF; they are captured in the stage register. Stage 2 (next
// cycle): the operation is computed and the result leaves on `wb`, which the
// cluster writes into the destination register at the end of that cycle.
// A result issued in cycle t is therefore readable from cycle t+2, matching
// the two-cycle ALU time; instructions are statically scheduled and the
// unit has no interlock.
//
// Operations (opcode, from the ALU kernel ISA): 0001 ADD, 0010 SUB,
// 0011 ABS, 0100 AND, 0101 OR, 0110 XOR, 0111 NOT, 1000 SLL, 1001 SRL,
// 1010 SRA, 1011 LT, 1100 LE, 1101 EQ. Opcode 0000 and the unused codes
// 1110/1111 do nothing and write nothing. Design choices where the document
// gives only the mnemonic: operands are 32-bit two's complement, ABS and NOT
// use operand 1 only, shifts move operand 1 by operand2[4:0], and the
// comparisons are signed and return 1 or 0.
module alu_unit
  import sp_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                issue,   // a slot instruction is issued
  input  logic [ALU_OP_W-1:0] opcode,
  input  dest_e               dest,
  input  raddr_t              wbaddr,
  input  word_t               data1,
  input  word_t               data2,
  output wb_t                 wb       // result, valid in cycle t+1
);

  logic    s_valid;
  alu_op_e s_op;
  dest_e   s_dest;
  raddr_t  s_addr;
  word_t   s_a, s_b;

  function automatic logic op_defined(logic [ALU_OP_W-1:0] op);
    return (op != ALU_NOP) && (op <= ALU_EQ);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      s_valid <= 1'b0;
    end else begin
      s_valid <= issue && op_defined(opcode);
    end
    s_op   <= alu_op_e'(opcode);
    s_dest <= dest;
    s_addr <= wbaddr;
    s_a    <= data1;
    s_b    <= data2;
  end

  word_t result;
  always_comb begin
    unique case (s_op)
      ALU_ADD: result = s_a + s_b;
      ALU_SUB: result = s_a - s_b;
      ALU_ABS: result = s_a[DATA_W-1] ? (~s_a + 1'b1) : s_a;
      ALU_AND: result = s_a & s_b;
      ALU_OR:  result = s_a | s_b;
      ALU_XOR: result = s_a ^ s_b;
      ALU_NOT: result = ~s_a;
      ALU_SLL: result = s_a << s_b[4:0];
      ALU_SRL: result = s_a >> s_b[4:0];
      ALU_SRA: result = word_t'($signed(s_a) >>> s_b[4:0]);
      ALU_LT:  result = word_t'($signed(s_a) <  $signed(s_b));
      ALU_LE:  result = word_t'($signed(s_a) <= $signed(s_b));
      ALU_EQ:  result = word_t'(s_a == s_b);
      default: result = '0;
    endcase
  end

  assign wb = '{valid: s_valid, dest: s_dest, addr: s_addr, data: result};

endmodule
