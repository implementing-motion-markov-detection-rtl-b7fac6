// tb_mesh_controller: self-check of the program sequencer.
//
// A random program of broadcast instructions, NOPs and associations ending
// in HALT is loaded and run twice. The testbench plays the synchronous units
// (done a fixed number of cycles after each unit_start) and the association
// layer (done a random number of cycles after net_start) and checks that:
// every broadcast instruction arrives in program order, NOPs are skipped,
// each association is started with the right kind and followed by exactly one
// rin_capture after its done, halted pulses once, and the counters (cycles,
// instructions, associations, cycles waiting for stability) match.
//
// The program memory, handshakes and counters under test are this design's
// own; only the wait for the stability signal comes from the original.
module tb_mesh_controller;
  import am_pkg::*;

  localparam int UNIT_LAT = 3;

  logic            clk = 0, rst_n = 0;
  logic            prog_we = 0;
  logic [PC_W-1:0] prog_addr = '0;
  instr_t          prog_wdata = '0;
  logic            run = 0, busy, halted;
  logic            unit_start, unit_done = 0;
  instr_t          unit_instr;
  logic            net_start, net_done = 0, rin_capture;
  assoc_e          net_op;
  logic [31:0]     cnt_cycles, cnt_instr, cnt_assoc, cnt_assoc_cycles;
  int              checks = 0, failures = 0;

  instr_t          program_q [$];
  instr_t          expect_q [$];   // broadcast instructions and associations in order
  int              n_instr, n_assoc, assoc_wait, run_cycles, captures, halts;

  mesh_controller #(.PROG_DEPTH(64)) dut (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_wdata, .run, .busy, .halted,
    .unit_start, .unit_instr, .unit_done, .net_start, .net_op, .net_done, .rin_capture,
    .cnt_cycles, .cnt_instr, .cnt_assoc, .cnt_assoc_cycles
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int want);
    checks++;
    if (got != want) begin failures++; $display("FAIL %s: got %0d want %0d", what, got, want); end
  endtask

  // unit and network models, and order checking
  int unit_cnt = -1, net_cnt = -1, net_lat = 0;
  logic capture_due = 0;
  always @(posedge clk) if (rst_n) begin
    unit_done <= 0;
    net_done  <= 0;
    if (busy) run_cycles++;
    if (unit_start) begin
      instr_t e;
      e = expect_q.pop_front();
      check("broadcast order", int'(unit_instr == e), 1);
      unit_cnt <= UNIT_LAT - 1;
      n_instr++;
    end else if (unit_cnt > 0) unit_cnt <= unit_cnt - 1;
    else if (unit_cnt == 0) begin unit_done <= 1; unit_cnt <= -1; end
    if (net_start) begin
      instr_t e;
      e = expect_q.pop_front();
      check("association kind", int'(net_op), int'(e.assoc));
      check("association is expected", int'(e.op), int'(OP_ASSOC));
      net_lat = $urandom_range(1, 9);
      net_cnt <= net_lat - 1;
      assoc_wait += net_lat + 2;
      n_assoc++;
    end else if (net_cnt > 0) net_cnt <= net_cnt - 1;
    else if (net_cnt == 0) begin net_done <= 1; net_cnt <= -1; capture_due <= 1; end
    if (rin_capture) begin
      check("rin_capture follows done", int'(capture_due), 1);
      capture_due <= 0;
      captures++;
    end
    if (halted) halts++;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      instr_t it;
      int kind;
      it = instr_t'({$urandom(), $urandom()});
      kind = $urandom_range(0, 9);
      if (kind < 2)      it.op = OP_NOP;
      else if (kind < 4) it.op = OP_ASSOC;
      else               it.op = opcode_e'($urandom_range(1, 8));
      if (it.op == OP_ASSOC) it.op = ($urandom_range(0, 1)) ? OP_ASSOC : OP_ALU;
      program_q.push_back(it);
    end
    begin
      instr_t h;
      h = '0;
      h.op = OP_HALT;
      program_q.push_back(h);
    end
    foreach (program_q[i]) begin
      @(negedge clk); prog_we = 1; prog_addr = PC_W'(i); prog_wdata = program_q[i];
    end
    @(negedge clk); prog_we = 0;
    for (int r = 0; r < 2; r++) begin
      int want_instr, want_assoc;
      want_instr = 0; want_assoc = 0;
      n_instr = 0; n_assoc = 0; assoc_wait = 0; run_cycles = 0; captures = 0; halts = 0;
      foreach (program_q[i]) begin
        if (program_q[i].op == OP_HALT) break;
        if (program_q[i].op != OP_NOP) expect_q.push_back(program_q[i]);
        if (program_q[i].op == OP_ASSOC) want_assoc++;
        else if (program_q[i].op != OP_NOP) want_instr++;
      end
      @(negedge clk); run = 1;
      @(negedge clk); run = 0;
      while (busy) @(negedge clk);
      repeat (3) @(negedge clk);
      check("all broadcasts issued", expect_q.size(), 0);
      check("instructions", n_instr, want_instr);
      check("associations", n_assoc, want_assoc);
      check("rin captures", captures, want_assoc);
      check("halted pulses", halts, 1);
      check("cnt_instr", cnt_instr, want_instr);
      check("cnt_assoc", cnt_assoc, want_assoc);
      check("cnt_assoc_cycles", cnt_assoc_cycles, assoc_wait);
      check("cnt_cycles", cnt_cycles, run_cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
