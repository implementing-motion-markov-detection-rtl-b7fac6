// mesh_controller: the SIMD controller of the Associative Mesh.
//
// Holds the program (PROG_DEPTH instructions of am_pkg::instr_t, written
// through prog_we/prog_addr/prog_wdata) and, after a run pulse, executes it
// from address 0 until OP_HALT:
//   - OP_NOP is skipped;
//   - OP_ASSOC pulses net_start with the association kind, waits for the
//     association layer's done (its stability detector), then pulses
//     rin_capture so every pixel stores the result in its RIN register;
//   - every other instruction is broadcast to all synchronous units with a
//     unit_start pulse, and the controller waits for unit_done (the units run
//     in lock step, so one done stands for all).
// The source names the controller only as the receiver of the stability
// signal; the program memory, the sequencing and the handshakes are this
// design's choice.
//
// Timing: one cycle to fetch and issue each instruction, then the wait. halted
// pulses for one cycle when OP_HALT is reached; busy is high in between.
// Counters (cleared by run): cycles of the run, broadcast instructions,
// associations and cycles spent waiting for association stability.
module mesh_controller
  import am_pkg::*;
#(
  parameter int unsigned PROG_DEPTH = 256
) (
  input  logic         clk,
  input  logic         rst_n,
  // program load
  input  logic         prog_we,
  input  logic [PC_W-1:0] prog_addr,
  input  instr_t       prog_wdata,
  // run control
  input  logic         run,
  output logic         busy,
  output logic         halted,
  // synchronous units
  output logic         unit_start,
  output instr_t       unit_instr,
  input  logic         unit_done,
  // association layer
  output logic         net_start,
  output assoc_e       net_op,
  input  logic         net_done,
  output logic         rin_capture,
  // statistics
  output logic [31:0]  cnt_cycles,
  output logic [31:0]  cnt_instr,
  output logic [31:0]  cnt_assoc,
  output logic [31:0]  cnt_assoc_cycles
);

  typedef enum logic [1:0] { S_IDLE, S_FETCH, S_WAIT_UNIT, S_WAIT_NET } state_e;

  instr_t           prog [PROG_DEPTH];
  state_e           state;
  logic [PC_W-1:0]  pc;
  instr_t           cur;

  assign cur  = prog[pc];
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (prog_we) prog[prog_addr] <= prog_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state            <= S_IDLE;
      pc               <= '0;
      halted           <= 1'b0;
      unit_start       <= 1'b0;
      unit_instr       <= '0;
      net_start        <= 1'b0;
      net_op           <= AS_OR;
      rin_capture      <= 1'b0;
      cnt_cycles       <= '0;
      cnt_instr        <= '0;
      cnt_assoc        <= '0;
      cnt_assoc_cycles <= '0;
    end else begin
      halted      <= 1'b0;
      unit_start  <= 1'b0;
      net_start   <= 1'b0;
      rin_capture <= 1'b0;
      if (state != S_IDLE) cnt_cycles <= cnt_cycles + 1;
      unique case (state)
        S_IDLE: if (run) begin
          pc               <= '0;
          state            <= S_FETCH;
          cnt_cycles       <= '0;
          cnt_instr        <= '0;
          cnt_assoc        <= '0;
          cnt_assoc_cycles <= '0;
        end
        S_FETCH: begin
          unique case (cur.op)
            OP_HALT: begin
              state  <= S_IDLE;
              halted <= 1'b1;
            end
            OP_NOP: pc <= pc + 1'b1;
            OP_ASSOC: begin
              net_start <= 1'b1;
              net_op    <= cur.assoc;
              cnt_assoc <= cnt_assoc + 1;
              state     <= S_WAIT_NET;
            end
            default: begin
              unit_start <= 1'b1;
              unit_instr <= cur;
              cnt_instr  <= cnt_instr + 1;
              state      <= S_WAIT_UNIT;
            end
          endcase
        end
        S_WAIT_UNIT: if (unit_done) begin
          pc    <= pc + 1'b1;
          state <= S_FETCH;
        end
        S_WAIT_NET: begin
          cnt_assoc_cycles <= cnt_assoc_cycles + 1;
          if (net_done) begin
            rin_capture <= 1'b1;
            pc          <= pc + 1'b1;
            state       <= S_FETCH;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial assert (PROG_DEPTH <= 2**PC_W) else $fatal(1, "mesh_controller: PROG_DEPTH too large");

endmodule
