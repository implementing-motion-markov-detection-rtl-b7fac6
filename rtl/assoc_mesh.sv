// assoc_mesh: a virtualized Associative Mesh, the top level.
//
// The Associative Mesh is a SIMD image processor built on the associative
// nets model: besides local operations, each pixel can take part in
// "associations", global reductions (OR, MAX, ...) over the set of pixels
// connected by its mgraph, an 8-bit mask of the incoming edges from its
// 8 neighbours. To make the machine fit on one chip the synchronous part is
// virtualized: the IMG_W x IMG_H pixel array keeps one association node per
// pixel (assoc_network), but the processing elements are folded into
// (IMG_W/BLK_W) x (IMG_H/BLK_H) synchronous units (sync_unit), each serving
// one BLK_W x BLK_H block of pixels with LANES SIMD lanes. With the defaults
// (256 x 256 pixels, 32 x 32 blocks) that is 64 units of 1024 pixels each.
// A controller (mesh_controller) runs a program of broadcast instructions.
//
// Pixel (y, x) belongs to unit (y / BLK_H, x / BLK_W), where it is virtual
// element v = (y % BLK_H) * BLK_W + (x % BLK_W).
//
// Interface:
//   prog_we/prog_addr/prog_wdata  load the program (am_pkg::instr_t words)
//   run                           start at address 0; halted pulses at OP_HALT
//   scan_en, scan_in[r], scan_out[r]
//                                 one 4-bit scan chain per row r of units:
//                                 scan_in[r] enters unit (r, 0), passes
//                                 element 0..N-1 of each unit, left to right,
//                                 and leaves unit (r, UCOLS-1). The chains
//                                 shift independently of the program, but no
//                                 SCAN_RD/SCAN_WR may run while they shift.
//   stable                        association layer idle
//   cnt_*                         statistics of the last run
// The unit grid, block mapping and 64 units follow the source; the lane
// count, memory depth, program memory and the scan chain order are this
// design's choices.
module assoc_mesh
  import am_pkg::*;
#(
  parameter int unsigned IMG_W      = 256,
  parameter int unsigned IMG_H      = 256,
  parameter int unsigned BLK_W      = 32,
  parameter int unsigned BLK_H      = 32,
  parameter int unsigned LANES      = 16,
  parameter int unsigned DEPTH      = 64,
  parameter int unsigned PROG_DEPTH = 256,
  localparam int unsigned UCOLS  = IMG_W / BLK_W,
  localparam int unsigned UROWS  = IMG_H / BLK_H,
  localparam int unsigned NUNITS = UCOLS * UROWS,
  localparam int unsigned N      = BLK_W * BLK_H,
  localparam int unsigned NPIX   = IMG_W * IMG_H
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            prog_we,
  input  logic [PC_W-1:0] prog_addr,
  input  instr_t          prog_wdata,
  input  logic            run,
  output logic            busy,
  output logic            halted,
  input  logic            scan_en,
  input  word_t           scan_in  [UROWS],
  output word_t           scan_out [UROWS],
  output logic            stable,
  output logic [31:0]     cnt_cycles,
  output logic [31:0]     cnt_instr,
  output logic [31:0]     cnt_assoc,
  output logic [31:0]     cnt_assoc_cycles
);

  initial begin
    assert (IMG_W % BLK_W == 0 && IMG_H % BLK_H == 0)
      else $fatal(1, "assoc_mesh: blocks must tile the image");
  end

  logic    unit_start, rin_capture, net_start, net_done, net_busy;
  instr_t  unit_instr;
  assoc_e  net_op;
  logic    unit_done [NUNITS];

  word_t   lv_u   [NUNITS][N];
  mgraph_t mg_u   [NUNITS][N];
  word_t   res_u  [NUNITS][N];
  word_t   lv_all [NPIX];
  mgraph_t mg_all [NPIX];
  word_t   res_all[NPIX];
  word_t   chain  [UROWS][UCOLS+1];

  mesh_controller #(.PROG_DEPTH(PROG_DEPTH)) u_ctrl (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_wdata, .run, .busy, .halted,
    .unit_start, .unit_instr, .unit_done(unit_done[0]),
    .net_start, .net_op, .net_done, .rin_capture,
    .cnt_cycles, .cnt_instr, .cnt_assoc, .cnt_assoc_cycles
  );

  assoc_network #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_net (
    .clk, .rst_n, .start(net_start), .op(net_op), .lv(lv_all), .mg(mg_all),
    .res(res_all), .busy(net_busy), .done(net_done), .stable
  );

  for (genvar uy = 0; uy < int'(UROWS); uy++) begin : g_row
    assign chain[uy][0] = scan_in[uy];
    assign scan_out[uy] = chain[uy][UCOLS];
    for (genvar ux = 0; ux < int'(UCOLS); ux++) begin : g_col
      localparam int unsigned U = uy * UCOLS + ux;
      sync_unit #(.BLK_W(BLK_W), .BLK_H(BLK_H), .LANES(LANES), .DEPTH(DEPTH)) u_unit (
        .clk, .rst_n,
        .start(unit_start), .instr(unit_instr), .busy(), .done(unit_done[U]),
        .rin_capture, .assoc_res(res_u[U]), .lv_out(lv_u[U]), .mg_out(mg_u[U]),
        .scan_en, .scan_in(chain[uy][ux]), .scan_out(chain[uy][ux+1])
      );
    end
  end

  // Block mapping between the units' virtual elements and the pixel array.
  always_comb begin
    for (int u = 0; u < int'(NUNITS); u++) begin
      for (int v = 0; v < int'(N); v++) begin
        automatic int y = (u / int'(UCOLS)) * int'(BLK_H) + v / int'(BLK_W);
        automatic int x = (u % int'(UCOLS)) * int'(BLK_W) + v % int'(BLK_W);
        lv_all[y * int'(IMG_W) + x] = lv_u[u][v];
        mg_all[y * int'(IMG_W) + x] = mg_u[u][v];
        res_u[u][v]                 = res_all[y * int'(IMG_W) + x];
      end
    end
  end

  // The units run in lock step: unit 0's done stands for all of them.
  for (genvar u = 1; u < int'(NUNITS); u++) begin : g_lockstep
    assert property (@(posedge clk) disable iff (!rst_n) unit_done[u] == unit_done[0])
      else $error("assoc_mesh: units out of lock step");
  end

endmodule
