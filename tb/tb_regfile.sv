// Self-checking testbench for the register array: random writes on all
// ports (with deliberate same-address collisions) and random reads are
// compared with a behavioural copy in which the highest-numbered port wins.
// Also checks reset-to-zero and that a write is visible only in the next
// cycle.
module tb_regfile;
  import sp_pkg::*;

  localparam int unsigned NR = 4, NW = 3;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  wreq_t  [NW-1:0] wr;
  raddr_t [NR-1:0] ra;
  word_t  [NR-1:0] rd;

  regfile #(.NR(NR), .NW(NW)) dut (.*);

  int checks = 0, failures = 0, collisions = 0;
  word_t model [NREG];

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr = '0; ra = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < int'(NREG); i++) model[i] = '0;
    // after reset every register reads zero
    for (int i = 0; i < int'(NREG); i++) begin
      ra[0] = raddr_t'(i);
      #1;
      checks++;
      if (rd[0] !== '0) failures++;
    end
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      for (int p = 0; p < int'(NW); p++) begin
        wr[p].en   = ($urandom_range(0, 2) != 0);
        wr[p].addr = raddr_t'($urandom_range(0, 7));   // small range: collisions
        wr[p].data = $urandom;
      end
      for (int r = 0; r < int'(NR); r++) ra[r] = raddr_t'($urandom_range(0, 7));
      #1;
      // reads see the state before this cycle's writes
      for (int r = 0; r < int'(NR); r++) begin
        checks++;
        if (rd[r] !== model[ra[r]]) begin
          failures++;
          if (failures < 10) $display("read %0d addr %0d: %h exp %h", r, ra[r], rd[r], model[ra[r]]);
        end
      end
      if (wr[0].en && wr[1].en && wr[0].addr == wr[1].addr) collisions++;
      for (int p = 0; p < int'(NW); p++)
        if (wr[p].en) model[wr[p].addr] = wr[p].data;
    end
    checks++;
    if (collisions == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
