// tb_sync_unit: self-check of one virtualized synchronous unit (4 x 4 pixels,
// 4 SIMD lanes, 16 words per pixel).
//
// Two random planes X and Y are shifted in through the scan chain and moved
// into the memory bench; then ALU operations with every second-operand
// source (memory, immediate, RIN, LV), the carry chain, WHERE / ELSEWHERE /
// ENDWHERE, SETMG and the scan write-back are exercised. Results are observed
// on the local values, the mgraph outputs and the scan chain and compared
// with values computed here from X, Y and the injected association results.
// Every instruction must take exactly N/LANES cycles from start to done.
//
// The register set (memory, mgraph, LV, RIN) and the 4-bit ALU follow the
// original processing element; the lanes, the instruction set and the
// WHERE mechanism are this design's own.
module tb_sync_unit;
  import am_pkg::*;

  localparam int BW = 4, BH = 4, LANES = 4, DEPTH = 16, N = BW * BH, ROWS = N / LANES;

  logic    clk = 0, rst_n = 1, start = 0, rin_capture = 0, scan_en = 0;
  instr_t  instr = '0;
  logic    busy, done;
  word_t   assoc_res [N];
  word_t   lv_out    [N];
  mgraph_t mg_out    [N];
  word_t   scan_in = '0, scan_out;
  int      X [N], Y [N], R [N];
  int      checks = 0, failures = 0;

  sync_unit #(.BLK_W(BW), .BLK_H(BH), .LANES(LANES), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .start, .instr, .busy, .done, .rin_capture, .assoc_res,
    .lv_out, .mg_out, .scan_en, .scan_in, .scan_out
  );

  always #5 clk = ~clk;

  // a real falling edge on rst_n, so the asynchronous reset acts before the
  // first clock edge whatever the power-up state
  initial #1 rst_n = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  function automatic instr_t mk(opcode_e op, alu_op_e alu = ALU_ADD, src_e srcb = SRC_MEM,
                                dst_e dsel = DST_MEM, int dst = 0, int a = 0, int b = 0,
                                int imm = 0, cond_e cond = COND_NZ);
    instr_t i = '0;
    i.op = op; i.alu = alu; i.srcb = srcb; i.dst_sel = dsel; i.cond = cond;
    i.dst = maddr_t'(dst); i.a = maddr_t'(a); i.b = maddr_t'(b); i.imm = word_t'(imm);
    return i;
  endfunction

  task automatic exec(instr_t i);
    int cyc = 0;
    @(negedge clk); instr = i; start = 1;
    @(negedge clk); start = 0;
    while (!done) begin @(negedge clk); cyc++; end
    check("instruction latency", cyc, ROWS);
  endtask

  // Shift a plane in so that pixel v ends up holding plane[v].
  task automatic scan_plane(int plane [N]);
    for (int v = N - 1; v >= 0; v--) begin
      @(negedge clk); scan_en = 1; scan_in = word_t'(plane[v]);
    end
    @(negedge clk); scan_en = 0;
  endtask

  initial begin
    int o [N];
    foreach (assoc_res[v]) assoc_res[v] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int v = 0; v < N; v++) begin
      X[v] = $urandom_range(0, 15); Y[v] = $urandom_range(0, 15); R[v] = $urandom_range(0, 15);
      if (v % 5 == 0) X[v] = 0;
    end
    scan_plane(X); exec(mk(OP_SCAN_RD, .dst(0)));
    scan_plane(Y); exec(mk(OP_SCAN_RD, .dst(1)));

    // mem2 = lv = X + Y, carry out kept per pixel
    exec(mk(OP_ALU, ALU_ADD, SRC_MEM, DST_BOTH, .dst(2), .a(0), .b(1)));
    for (int v = 0; v < N; v++) check("X+Y", lv_out[v], (X[v] + Y[v]) % 16);
    exec(mk(OP_ALU, ALU_GETC, SRC_MEM, DST_LV, .a(0)));
    for (int v = 0; v < N; v++) check("carry of X+Y", lv_out[v], (X[v] + Y[v]) / 16);
    // high nibble: 0 + 0 + carry with ADC, into mem3
    exec(mk(OP_ALU, ALU_PASSB, SRC_IMM, DST_MEM, .dst(3), .imm(0)));
    exec(mk(OP_ALU, ALU_ADD, SRC_MEM, DST_NONE, .a(0), .b(1)));
    exec(mk(OP_ALU, ALU_ADC, SRC_IMM, DST_LV, .dst(3), .a(3), .imm(0)));
    for (int v = 0; v < N; v++) check("ADC high nibble", lv_out[v], (X[v] + Y[v]) / 16);

    // WHERE X != 0: lv = 7, ELSEWHERE lv = 3
    exec(mk(OP_WHERE, .a(0), .cond(COND_NZ)));
    exec(mk(OP_ALU, ALU_PASSB, SRC_IMM, DST_LV, .imm(7)));
    exec(mk(OP_ELSEWHERE));
    exec(mk(OP_ALU, ALU_PASSB, SRC_IMM, DST_LV, .imm(3)));
    exec(mk(OP_ENDWHERE));
    for (int v = 0; v < N; v++) check("WHERE/ELSEWHERE", lv_out[v], X[v] != 0 ? 7 : 3);
    // WHERE on carry: X < Y (borrow of X - Y); memory write only where active
    exec(mk(OP_ALU, ALU_CMP, SRC_MEM, DST_NONE, .a(0), .b(1)));
    exec(mk(OP_WHERE, .cond(COND_C)));
    exec(mk(OP_ALU, ALU_PASSB, SRC_MEM, DST_MEM, .dst(4), .b(1)));
    exec(mk(OP_ELSEWHERE));
    exec(mk(OP_ALU, ALU_PASSB, SRC_MEM, DST_MEM, .dst(4), .b(0)));
    exec(mk(OP_ENDWHERE));
    exec(mk(OP_ALU, ALU_PASSB, SRC_MEM, DST_LV, .b(4)));
    for (int v = 0; v < N; v++) check("max via WHERE carry", lv_out[v], X[v] < Y[v] ? Y[v] : X[v]);
    // LV as operand: lv = lv xor X
    exec(mk(OP_ALU, ALU_XOR, SRC_LV, DST_LV, .a(0)));
    for (int v = 0; v < N; v++) check("LV operand", lv_out[v], (X[v] < Y[v] ? Y[v] : X[v]) ^ X[v]);

    // mgraph from two words
    exec(mk(OP_SETMG, .a(0), .b(1)));
    for (int v = 0; v < N; v++) check("SETMG", mg_out[v], Y[v] * 16 + X[v]);

    // association result into RIN, then used as operand
    @(negedge clk);
    for (int v = 0; v < N; v++) assoc_res[v] = word_t'(R[v]);
    rin_capture = 1;
    @(negedge clk); rin_capture = 0;
    for (int v = 0; v < N; v++) assoc_res[v] = '0;
    exec(mk(OP_ALU, ALU_SUB, SRC_RIN, DST_LV, .a(1)));
    for (int v = 0; v < N; v++) check("RIN operand", lv_out[v], (Y[v] - R[v] + 16) % 16);

    // scan write-back of mem2 (X + Y) and shift out
    exec(mk(OP_SCAN_WR, .a(2)));
    for (int v = N - 1; v >= 0; v--) begin
      check("scan out", scan_out, (X[v] + Y[v]) % 16);
      @(negedge clk); scan_en = 1; scan_in = '0;
      @(negedge clk); scan_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
