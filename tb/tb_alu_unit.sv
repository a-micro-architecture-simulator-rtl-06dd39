// Self-checking testbench for the ALU unit: random operations and operands
// are issued every cycle; each result is compared with an independent
// reference one cycle after issue (two-cycle ALU time), together with its
// destination tag. Invalid and NOP opcodes must not produce a result.
module tb_alu_unit;
  import sp_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic                issue;
  logic [ALU_OP_W-1:0] opcode;
  dest_e               dest;
  raddr_t              wbaddr;
  word_t               data1, data2;
  wb_t                 wb;

  alu_unit dut (.*);

  int checks = 0, failures = 0;

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

  function automatic word_t rnd_word();
    case ($urandom_range(0, 4))
      0: return 32'h8000_0000;
      1: return word_t'($urandom_range(0, 40));
      2: return 32'hFFFF_FFFF - word_t'($urandom_range(0, 40));
      default: return $urandom;
    endcase
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic   exp_v;
  word_t  exp_d;
  dest_e  exp_dest;
  raddr_t exp_addr;
  int     seen [16];

  initial begin
    issue = 0; opcode = 0; dest = DST_NONE; wbaddr = 0; data1 = 0; data2 = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    exp_v = 0; exp_d = '0; exp_dest = DST_NONE; exp_addr = '0;
    for (int i = 0; i < 3000; i++) begin
      // drive a new instruction
      @(negedge clk);
      issue  = ($urandom_range(0, 9) != 0);
      opcode = 4'($urandom_range(0, 15));
      dest   = dest_e'($urandom_range(0, 7));
      wbaddr = raddr_t'($urandom);
      data1  = rnd_word();
      data2  = (opcode >= 8 && opcode <= 10 && $urandom_range(0, 1) == 1)
               ? word_t'($urandom_range(0, 31)) : rnd_word();
      // the previous instruction's result is on wb now
      checks++;
      if (wb.valid !== exp_v ||
          (exp_v && (wb.data !== exp_d || wb.dest !== exp_dest || wb.addr !== exp_addr))) begin
        failures++;
        if (failures < 10)
          $display("ALU mismatch: valid %b/%b data %h/%h", wb.valid, exp_v, wb.data, exp_d);
      end
      exp_v    = issue && opcode >= 1 && opcode <= 13;
      exp_d    = ref_alu(int'(opcode), data1, data2);
      exp_dest = dest;
      exp_addr = wbaddr;
      if (exp_v) seen[opcode]++;
    end
    for (int op = 1; op <= 13; op++) begin
      checks++;
      if (seen[op] == 0) begin
        failures++;
        $display("opcode %0d never exercised", op);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
