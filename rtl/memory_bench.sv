// memory_bench: the all-purpose memory of a virtualized synchronous unit.
//
// Each of the N pixels served by the unit owns DEPTH words of 4 bits. The
// pixels are grouped in rows of LANES (pixel v = row * LANES + lane), and one
// memory word holds the same address of all LANES pixels of a row, so the
// SIMD lanes read and write their operands in one access. The source names
// the memory bench and its 4-bit data path; its size and port structure are
// this design's choice: two asynchronous read ports (ALU operands a and b)
// and one synchronous write port with a per-lane write enable (pixels that
// are inactive under WHERE keep their value). No reset: contents are
// undefined until written.
module memory_bench
  import am_pkg::*;
#(
  parameter int unsigned ROWS  = 64,
  parameter int unsigned LANES = 16,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned ROW_W = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic             clk,
  input  logic [ROW_W-1:0] row,
  input  maddr_t           ra,
  input  maddr_t           rb,
  output word_t            qa [LANES],
  output word_t            qb [LANES],
  input  maddr_t           wa,
  input  logic [LANES-1:0] we,
  input  word_t            wd [LANES]
);

  logic [LANES*WORD_W-1:0] mem [ROWS*DEPTH];

  function automatic int unsigned idx(logic [ROW_W-1:0] r, maddr_t a);
    return int'(r) * DEPTH + int'(a);
  endfunction

  always_comb begin
    for (int l = 0; l < int'(LANES); l++) begin
      qa[l] = mem[idx(row, ra)][l*WORD_W +: WORD_W];
      qb[l] = mem[idx(row, rb)][l*WORD_W +: WORD_W];
    end
  end

  always_ff @(posedge clk) begin
    for (int l = 0; l < int'(LANES); l++)
      if (we[l]) mem[idx(row, wa)][l*WORD_W +: WORD_W] <= wd[l];
  end

  assert property (@(posedge clk) (|we) |-> (int'(wa) < DEPTH))
    else $error("memory_bench: write beyond DEPTH");

endmodule
