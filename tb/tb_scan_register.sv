// tb_scan_register: shifts a random plane through the chain, reads it back
// through the parallel row port, overwrites some cells through the parallel
// write port (per-lane enables) and shifts everything out, comparing each
// step with a software model of the chain. Checks the shift latency: the
// first nibble shifted in appears at sout after exactly N shifts.
//
// The 4-bit scan cell per pixel follows the original design; the chain order
// and the parallel row port are this design's own.
module tb_scan_register;
  import am_pkg::*;

  localparam int N = 12, LANES = 4, ROWS = N / LANES;

  logic             clk = 0, rst_n = 0, shift_en = 0;
  word_t            sin = '0, sout;
  logic [1:0]       row = '0;
  word_t            rdata [LANES];
  logic [LANES-1:0] we = '0;
  word_t            wdata [LANES];
  int               model [N];
  int               checks = 0, failures = 0;

  scan_register #(.N(N), .LANES(LANES)) dut (.clk, .rst_n, .shift_en, .sin, .sout, .row, .rdata, .we, .wdata);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int want);
    checks++;
    if (got != want) begin failures++; $display("FAIL %s: got %0d want %0d", what, got, want); end
  endtask

  task automatic shift(int value);
    @(negedge clk); shift_en = 1; sin = word_t'(value);
    @(negedge clk); shift_en = 0;
    for (int v = N - 1; v > 0; v--) model[v] = model[v-1];
    model[0] = value;
  endtask

  initial begin
    foreach (wdata[l]) wdata[l] = '0;
    foreach (model[v]) model[v] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check("sout after reset", sout, 0);
    for (int k = 0; k < 3; k++) begin
      int first;
      first = $urandom_range(1, 15);
      for (int i = 0; i < N; i++) begin
        shift(i == 0 ? first : $urandom_range(0, 15));
        if (i < N - 1) check("sout before N shifts", sout, model[N-1]);
      end
      check("first nibble after N shifts", sout, first);
      // parallel read
      for (int r = 0; r < ROWS; r++) begin
        row = 2'(r); #1;
        for (int l = 0; l < LANES; l++) check("row read", rdata[l], model[r * LANES + l]);
      end
      // parallel write with random lane enables
      for (int r = 0; r < ROWS; r++) begin
        @(negedge clk);
        row = 2'(r); we = LANES'($urandom());
        foreach (wdata[l]) wdata[l] = word_t'($urandom_range(0, 15));
        for (int l = 0; l < LANES; l++) if (we[l]) model[r * LANES + l] = wdata[l];
        @(negedge clk); we = '0;
      end
      // shift out
      for (int i = 0; i < N; i++) begin
        check("shift out", sout, model[N-1]);
        shift(0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
