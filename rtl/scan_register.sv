// scan_register: the image input/output scan register of a synchronous unit.
//
// Every pixel has a 4-bit scan cell, independent of the memory bench, so an
// image plane can be shifted in and out while the unit computes. The cells of
// a unit form one chain: on shift_en, cell 0 takes sin, cell v takes cell
// v-1, and sout is cell N-1. Units are chained through sin/sout at the top
// level. The unit moves data between the cells and its memory bench one row
// of LANES pixels at a time (pixel v = row * LANES + lane) through the
// parallel ports: rdata is the row selected by row (combinational), and on a
// clock edge with we[l] set, cell row*LANES+l takes wdata[l].
//
// The source gives the scan register's role and its 4-bit port; the chain
// order and the parallel row access are this design's choice. A parallel
// write and a shift must not happen in the same cycle. Cells reset to 0.
module scan_register
  import am_pkg::*;
#(
  parameter int unsigned N     = 1024,
  parameter int unsigned LANES = 16,
  localparam int unsigned ROWS  = N / LANES,
  localparam int unsigned ROW_W = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift_en,
  input  word_t            sin,
  output word_t            sout,
  input  logic [ROW_W-1:0] row,
  output word_t            rdata [LANES],
  input  logic [LANES-1:0] we,
  input  word_t            wdata [LANES]
);

  word_t scell [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < int'(N); v++) scell[v] <= '0;
    end else if (shift_en) begin
      scell[0] <= sin;
      for (int v = 1; v < int'(N); v++) scell[v] <= scell[v-1];
    end else begin
      for (int l = 0; l < int'(LANES); l++)
        if (we[l]) scell[int'(row) * LANES + l] <= wdata[l];
    end
  end

  always_comb
    for (int l = 0; l < int'(LANES); l++) rdata[l] = scell[int'(row) * LANES + l];

  assign sout = scell[N-1];

  assert property (@(posedge clk) disable iff (!rst_n) shift_en |-> !(|we))
    else $error("scan_register: parallel write during shift");

endmodule
