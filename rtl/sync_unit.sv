// sync_unit: one virtualized synchronous processing unit of the Associative
// Mesh.
//
// Virtualization gives one synchronous unit a block of BLK_W x BLK_H pixels
// (N virtual processing elements) while the association layer keeps one node
// per pixel. Per pixel the unit holds the state of the processing element:
// its words in the memory bench, its mgraph register, its local value LV
// (what it presents to the association layer), its RIN register (the
// captured association result), a carry flag and the WHERE activity flag.
// The pixels are served by LANES SIMD lanes, each with a 4-bit pe_alu, so a
// broadcast instruction is executed N/LANES rows in a row, one row of LANES
// pixels per clock: pixel v = row * LANES + lane, v = ly * BLK_W + lx.
//
// Per lane datapath (after the processing element of the source): operand a
// comes from the memory bench, operand b through a multiplexer from the
// memory bench, an immediate, RIN or LV; the result goes back to the memory
// bench and/or to LV. Instructions (am_pkg::opcode_e): ALU, WHERE /
// ELSEWHERE / ENDWHERE (activity), SETMG (mgraph <= {mem[b], mem[a]}),
// SCAN_RD / SCAN_WR (scan register <-> memory). Writes of ALU, SETMG and
// SCAN_RD/WR are made only for active pixels. The lane count, the operand
// multiplexer inputs, the activity mechanism and the instruction set are this
// design's choices; the source gives the layers, the register set and the
// 4-bit ALU, and the WHERE / ELSEWHERE style of programming.
//
// Timing: pulse start with instr; the unit is busy for N/LANES cycles and
// pulses done in the cycle after the last row. rin_capture (one cycle, while
// not busy) loads RIN of every pixel from assoc_res at once. The scan chain
// (scan_en, scan_in, scan_out) shifts independently of instructions, but an
// instruction that touches the scan cells must not run while it shifts.
module sync_unit
  import am_pkg::*;
#(
  parameter int unsigned BLK_W = 32,
  parameter int unsigned BLK_H = 32,
  parameter int unsigned LANES = 16,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned N     = BLK_W * BLK_H,
  localparam int unsigned ROWS  = N / LANES,
  localparam int unsigned ROW_W = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic    clk,
  input  logic    rst_n,
  // instruction broadcast
  input  logic    start,
  input  instr_t  instr,
  output logic    busy,
  output logic    done,
  // association layer
  input  logic    rin_capture,
  input  word_t   assoc_res [N],
  output word_t   lv_out    [N],
  output mgraph_t mg_out    [N],
  // scan chain
  input  logic    scan_en,
  input  word_t   scan_in,
  output word_t   scan_out
);

  initial begin
    assert (N % LANES == 0) else $fatal(1, "sync_unit: LANES must divide N");
    assert (DEPTH <= 2**MEM_ADDR_W) else $fatal(1, "sync_unit: DEPTH too large");
  end

  instr_t           ir;
  logic [ROW_W-1:0] row;

  word_t   lv   [N];
  mgraph_t mg   [N];
  word_t   rin  [N];
  logic    cf   [N];   // carry / borrow
  logic    act  [N];   // WHERE activity
  logic    wc   [N];   // condition of the last WHERE

  word_t            qa [LANES];
  word_t            qb [LANES];
  word_t            wd [LANES];
  logic [LANES-1:0] mem_we;
  word_t            scan_rd [LANES];
  logic [LANES-1:0] scan_we;
  word_t            opb [LANES];
  alu_res_t         ares [LANES];

  memory_bench #(.ROWS(ROWS), .LANES(LANES), .DEPTH(DEPTH)) u_mem (
    .clk, .row, .ra(ir.a), .rb(ir.b), .qa, .qb, .wa(ir.dst), .we(mem_we), .wd
  );

  scan_register #(.N(N), .LANES(LANES)) u_scan (
    .clk, .rst_n, .shift_en(scan_en), .sin(scan_in), .sout(scan_out),
    .row, .rdata(scan_rd), .we(scan_we), .wdata(qa)
  );

  for (genvar l = 0; l < int'(LANES); l++) begin : g_lane
    localparam int unsigned L = l;
    always_comb begin
      unique case (ir.srcb)
        SRC_MEM: opb[l] = qb[l];
        SRC_IMM: opb[l] = ir.imm;
        SRC_RIN: opb[l] = rin[int'(row) * LANES + L];
        default: opb[l] = lv[int'(row) * LANES + L];
      endcase
    end
    pe_alu u_alu (.op(ir.alu), .a(qa[l]), .b(opb[l]), .cin(cf[int'(row) * LANES + L]), .res(ares[l]));
  end

  // Memory and scan writes of the current row.
  always_comb begin
    for (int l = 0; l < int'(LANES); l++) begin
      automatic int v = int'(row) * int'(LANES) + l;
      mem_we[l]  = 1'b0;
      scan_we[l] = 1'b0;
      wd[l]      = ares[l].r;
      if (busy && act[v]) begin
        unique case (ir.op)
          OP_ALU:     mem_we[l] = ares[l].we && (ir.dst_sel == DST_MEM || ir.dst_sel == DST_BOTH);
          OP_SCAN_RD: begin mem_we[l] = 1'b1; wd[l] = scan_rd[l]; end
          OP_SCAN_WR: scan_we[l] = 1'b1;
          default: ;
        endcase
      end
    end
  end

  function automatic logic cond_of(cond_e c, word_t a, logic carry);
    unique case (c)
      COND_NZ: return a != '0;
      COND_Z:  return a == '0;
      COND_C:  return carry;
      default: return !carry;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ir   <= '0;
      row  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      for (int v = 0; v < int'(N); v++) begin
        lv[v] <= '0; mg[v] <= '0; rin[v] <= '0;
        cf[v] <= 1'b0; act[v] <= 1'b1; wc[v] <= 1'b0;
      end
    end else begin
      done <= 1'b0;
      if (rin_capture)
        for (int v = 0; v < int'(N); v++) rin[v] <= assoc_res[v];
      if (start && !busy) begin
        ir   <= instr;
        row  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        for (int l = 0; l < int'(LANES); l++) begin
          automatic int v = int'(row) * int'(LANES) + l;
          unique case (ir.op)
            OP_ALU: if (act[v]) begin
              if (ares[l].we && (ir.dst_sel == DST_LV || ir.dst_sel == DST_BOTH)) lv[v] <= ares[l].r;
              if (ares[l].ce) cf[v] <= ares[l].c;
            end
            OP_WHERE: begin
              act[v] <= cond_of(ir.cond, qa[l], cf[v]);
              wc[v]  <= cond_of(ir.cond, qa[l], cf[v]);
            end
            OP_ELSEWHERE: act[v] <= !wc[v];
            OP_ENDWHERE:  act[v] <= 1'b1;
            OP_SETMG:     if (act[v]) mg[v] <= {qb[l], qa[l]};
            default: ;
          endcase
        end
        if (int'(row) == int'(ROWS) - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          row <= row + 1'b1;
        end
      end
    end
  end

  assign lv_out = lv;
  assign mg_out = mg;

  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !rin_capture)
    else $error("sync_unit: RIN capture while an instruction runs");

endmodule
