// Self-checking testbench for the MUL unit: random operands (including
// twiddle-like Q16.16 constants) are issued every cycle; each result must
// appear exactly three cycles after the issue cycle (four-cycle MUL time)
// and equal (a * b) >>> 16 computed here independently.
module tb_mul_unit;
  import sp_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic                issue;
  logic [MUL_OP_W-1:0] opcode;
  dest_e               dest;
  raddr_t              wbaddr;
  word_t               data1, data2;
  wb_t                 wb;

  mul_unit dut (.*);

  int checks = 0, failures = 0;

  typedef struct { logic v; word_t d; dest_e dest; raddr_t addr; } exp_t;
  exp_t pipe [$];

  function automatic word_t ref_mul(word_t a, word_t b);
    longint pa = longint'(int'(a)) * longint'(int'(b));
    return word_t'(pa >>> 16);
  endfunction

  function automatic word_t rnd_word();
    case ($urandom_range(0, 4))
      0: return 32'h0000_B505;          // 0.7071
      1: return 32'hFFFF_0000;          // -1.0
      2: return word_t'($urandom_range(0, 1 << 20));
      3: return -word_t'($urandom_range(0, 1 << 20));
      default: return $urandom;
    endcase
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    issue = 0; opcode = 0; dest = DST_NONE; wbaddr = 0; data1 = 0; data2 = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (3) pipe.push_back('{1'b0, '0, DST_NONE, '0});
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      issue  = ($urandom_range(0, 5) != 0);
      opcode = 1'($urandom_range(0, 3) != 0);
      dest   = dest_e'($urandom_range(0, 7));
      wbaddr = raddr_t'($urandom);
      data1  = rnd_word();
      data2  = rnd_word();
      // result of the instruction issued three cycles ago
      begin
        exp_t e;
        e = pipe.pop_front();
        checks++;
        if (wb.valid !== e.v ||
            (e.v && (wb.data !== e.d || wb.dest !== e.dest || wb.addr !== e.addr))) begin
          failures++;
          if (failures < 10)
            $display("MUL mismatch: valid %b/%b data %h/%h", wb.valid, e.v, wb.data, e.d);
        end
      end
      pipe.push_back('{issue && opcode, ref_mul(data1, data2), dest, wbaddr});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
