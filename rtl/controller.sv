// Controller: fetches cluster instructions and issues them to the clusters.
//
// After a one-cycle `start` pulse (accepted only while idle) the controller
// walks the instruction memory from row 0 to row prog_len-1, one row per
// clock, and hands word c of each row to cluster c together with a common
// `issue` strobe, so every cluster receives its own instruction stream at
// the rate of one cluster instruction per clock. The memory read is
// synchronous, so an instruction is issued the cycle after its row address
// is presented. After the last issue the controller waits MAX_LAT (= 6,
// the deepest unit) cycles so that every result has been written, then
// raises `done` (held until the next start) and returns to idle.
//
// `cycles` counts the clock cycles from start to done: prog_len + 6 for a
// program of prog_len rows (7 for an empty one). `perf_clr` pulses with the
// accepted start to clear the clusters' counters.
//
// `inst` is the instruction memory's registered read data passed straight
// through; the clusters act on it only while `issue` is high.
//
// The document says only that the controller fetches the cluster
// instructions and distributes them equally to the clusters; the fetch
// pipeline, the drain and the start/done handshake are this design's.
module controller
  import sp_pkg::*;
#(
  parameter int unsigned NCL   = 4,
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     start,
  input  logic [$clog2(DEPTH):0]   prog_len,
  output logic [$clog2(DEPTH)-1:0] imem_raddr,
  input  vliw_t [NCL-1:0]          imem_rdata,
  output logic                     issue,
  output vliw_t [NCL-1:0]          inst,
  output logic                     busy,
  output logic                     done,
  output logic                     perf_clr,
  output logic [31:0]              cycles
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;

  state_e                        state;
  logic [$clog2(DEPTH):0]        pc;
  logic [$clog2(DEPTH):0]        len;
  logic [$clog2(MAX_LAT+1)-1:0]  drain_cnt;

  assign imem_raddr = pc[$clog2(DEPTH)-1:0];
  assign inst       = imem_rdata;
  assign busy       = (state != S_IDLE);
  assign perf_clr   = start && (state == S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      pc        <= '0;
      len       <= '0;
      issue     <= 1'b0;
      done      <= 1'b0;
      drain_cnt <= '0;
      cycles    <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          issue <= 1'b0;
          if (start) begin
            state  <= S_RUN;
            pc     <= '0;
            len    <= prog_len;
            done   <= 1'b0;
            cycles <= '0;
          end
        end
        S_RUN: begin
          cycles <= cycles + 1;
          issue  <= (pc < len);
          pc     <= pc + 1;
          if (pc + 1 >= len) begin
            state     <= S_DRAIN;
            drain_cnt <= '0;
          end
        end
        S_DRAIN: begin
          cycles    <= cycles + 1;
          issue     <= 1'b0;
          drain_cnt <= drain_cnt + 1;
          if (int'(drain_cnt) == int'(MAX_LAT) - 1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A program longer than the memory cannot be run.
  a_len_fits: assert property (@(posedge clk) disable iff (rst)
    (start && state == S_IDLE) |-> (int'(prog_len) <= int'(DEPTH)));

endmodule
