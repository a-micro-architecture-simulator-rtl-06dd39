// Self-checking testbench for the DIV unit: random DIV / REM / SQR
// operations (with zero divisors and the -2^31 / -1 corner) are issued
// every cycle; each result must appear exactly five cycles after the issue
// cycle (six-cycle DIV time) and match an independent reference.
module tb_div_unit;
  import sp_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic                issue;
  logic [DIV_OP_W-1:0] opcode;
  dest_e               dest;
  raddr_t              wbaddr;
  word_t               data1, data2;
  wb_t                 wb;

  div_unit dut (.*);

  int checks = 0, failures = 0;
  int n_sqr = 0, n_div0 = 0;

  typedef struct { logic v; word_t d; dest_e dest; raddr_t addr; } exp_t;
  exp_t pipe [$];

  function automatic word_t ref_div(int op, word_t a, word_t b);
    longint sa = longint'(int'(a)), sb = longint'(int'(b));
    longint ua = longint'(a);
    longint r;
    case (op)
      1: if (b == 0) return 32'hFFFF_FFFF; else return word_t'(sa / sb);
      2: if (b == 0) return a;             else return word_t'(sa % sb);
      3: begin
        r = 0;
        while ((r + 1) * (r + 1) <= ua) r++;
        return word_t'(r);
      end
      default: return 0;
    endcase
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    issue = 0; opcode = 0; dest = DST_NONE; wbaddr = 0; data1 = 0; data2 = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (5) pipe.push_back('{1'b0, '0, DST_NONE, '0});
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      issue  = ($urandom_range(0, 5) != 0);
      opcode = 2'($urandom_range(0, 3));
      dest   = dest_e'($urandom_range(0, 7));
      wbaddr = raddr_t'($urandom);
      case ($urandom_range(0, 3))
        0: data1 = word_t'($urandom_range(0, 100000));
        1: data1 = 32'h8000_0000;
        default: data1 = $urandom;
      endcase
      case ($urandom_range(0, 4))
        0: data2 = 0;
        1: data2 = 32'hFFFF_FFFF;
        2: data2 = word_t'($urandom_range(1, 300));
        default: data2 = $urandom;
      endcase
      if (opcode == 3) data1 = word_t'($urandom_range(0, 1 << 20));
      begin
        exp_t e;
        e = pipe.pop_front();
        checks++;
        if (wb.valid !== e.v ||
            (e.v && (wb.data !== e.d || wb.dest !== e.dest || wb.addr !== e.addr))) begin
          failures++;
          if (failures < 10)
            $display("DIV mismatch: valid %b/%b data %h/%h", wb.valid, e.v, wb.data, e.d);
        end
      end
      if (issue && opcode == 3) n_sqr++;
      if (issue && opcode != 0 && opcode != 3 && data2 == 0) n_div0++;
      pipe.push_back('{issue && opcode != 0, ref_div(int'(opcode), data1, data2),
                       dest, wbaddr});
    end
    checks++;
    if (n_sqr == 0 || n_div0 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
