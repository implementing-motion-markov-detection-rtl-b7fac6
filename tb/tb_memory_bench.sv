// tb_memory_bench: random writes with per-lane enables against a shadow copy,
// then both read ports are compared with the shadow at random addresses.
//
// The memory organisation it checks (rows of LANES pixels, two read ports,
// per-lane write enables) is this design's own; the original gives only the
// memory bench and its 4-bit words.
module tb_memory_bench;
  import am_pkg::*;

  localparam int ROWS = 4, LANES = 3, DEPTH = 8;

  logic             clk = 0;
  logic [1:0]       row = '0;
  maddr_t           ra = '0, rb = '0, wa = '0;
  word_t            qa [LANES];
  word_t            qb [LANES];
  logic [LANES-1:0] we = '0;
  word_t            wd [LANES];
  int               shadow [ROWS][DEPTH][LANES];
  int               checks = 0, failures = 0;

  memory_bench #(.ROWS(ROWS), .LANES(LANES), .DEPTH(DEPTH)) dut (.clk, .row, .ra, .rb, .qa, .qb, .wa, .we, .wd);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (wd[l]) wd[l] = '0;
    // fill everything once
    for (int r = 0; r < ROWS; r++)
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk);
        row = r[1:0]; wa = maddr_t'(a); we = '1;
        foreach (wd[l]) begin wd[l] = word_t'($urandom_range(0, 15)); shadow[r][a][l] = wd[l]; end
      end
    @(negedge clk); we = '0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      row = 2'($urandom_range(0, ROWS - 1));
      ra = maddr_t'($urandom_range(0, DEPTH - 1));
      rb = maddr_t'($urandom_range(0, DEPTH - 1));
      wa = maddr_t'($urandom_range(0, DEPTH - 1));
      we = LANES'($urandom());
      foreach (wd[l]) wd[l] = word_t'($urandom_range(0, 15));
      #1;
      for (int l = 0; l < LANES; l++) begin
        checks += 2;
        if (qa[l] !== word_t'(shadow[row][ra][l])) begin failures++; $display("FAIL qa row %0d addr %0d lane %0d", row, ra, l); end
        if (qb[l] !== word_t'(shadow[row][rb][l])) begin failures++; $display("FAIL qb row %0d addr %0d lane %0d", row, rb, l); end
      end
      for (int l = 0; l < LANES; l++) if (we[l]) shadow[row][wa][l] = wd[l];
    end
    @(negedge clk); we = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
