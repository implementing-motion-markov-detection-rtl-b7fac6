// am_pkg: types and constants shared by the virtualized Associative Mesh.
//
// The mesh is a SIMD machine: one controller broadcasts an instruction
// (instr_t) to every synchronous unit, and each unit applies it to all the
// pixels it serves. Data words are 4 bits wide, the width of the processing
// element's ALU; wider numbers are handled a nibble at a time through a
// per-pixel carry flag. The mgraph of a pixel is 8 bits, one per incoming edge
// from the 8-connected neighbourhood.
//
// Direction numbering of the mgraph bits (this design's choice):
//   bit 0 = N, 1 = NE, 2 = E, 3 = SE, 4 = S, 5 = SW, 6 = W, 7 = NW.
// A set bit means the pixel listens to the neighbour lying in that direction.
package am_pkg;

  localparam int unsigned WORD_W     = 4;   // ALU / data word width
  localparam int unsigned MGRAPH_W   = 8;   // one bit per 8-connected neighbour
  localparam int unsigned MEM_ADDR_W = 6;   // memory bench word address
  localparam int unsigned PC_W       = 8;   // program counter

  typedef logic [WORD_W-1:0]     word_t;
  typedef logic [MGRAPH_W-1:0]   mgraph_t;
  typedef logic [MEM_ADDR_W-1:0] maddr_t;

  // Row / column offsets of the neighbour seen through mgraph bit d.
  function automatic int dir_dy(int d);
    case (d)
      0, 1, 7: return -1;
      3, 4, 5: return 1;
      default: return 0;
    endcase
  endfunction

  function automatic int dir_dx(int d);
    case (d)
      1, 2, 3: return 1;
      5, 6, 7: return -1;
      default: return 0;
    endcase
  endfunction

  // Broadcast instruction classes.
  typedef enum logic [3:0] {
    OP_NOP       = 4'd0,
    OP_ALU       = 4'd1,   // dst <= alu(mem[a], srcB) on active pixels
    OP_WHERE     = 4'd2,   // active <= cond
    OP_ELSEWHERE = 4'd3,   // active <= !cond of the last WHERE
    OP_ENDWHERE  = 4'd4,   // active <= 1
    OP_SETMG     = 4'd5,   // mgraph <= {mem[b], mem[a]}
    OP_ASSOC     = 4'd6,   // run an association on the local values, result to RIN
    OP_SCAN_RD   = 4'd7,   // mem[dst] <= scan register of the pixel
    OP_SCAN_WR   = 4'd8,   // scan register of the pixel <= mem[a]
    OP_HALT      = 4'd15
  } opcode_e;

  // 4-bit ALU operations. "c" is the per-pixel carry / borrow flag.
  typedef enum logic [3:0] {
    ALU_ADD   = 4'd0,   // a + b,        c <= carry out
    ALU_ADC   = 4'd1,   // a + b + c,    c <= carry out
    ALU_SUB   = 4'd2,   // a - b,        c <= borrow
    ALU_SBC   = 4'd3,   // a - b - c,    c <= borrow
    ALU_AND   = 4'd4,
    ALU_OR    = 4'd5,
    ALU_XOR   = 4'd6,
    ALU_PASSB = 4'd7,   // b
    ALU_RLC   = 4'd8,   // {c, r} <= {a, c}: shift left through carry
    ALU_CMP   = 4'd9,   // a - b, only c <= borrow (no write)
    ALU_CMPC  = 4'd10,  // a - b - c, only c <= borrow (no write)
    ALU_MAX   = 4'd11,
    ALU_MIN   = 4'd12,
    ALU_EQ    = 4'd13,  // r <= (a == b)
    ALU_GETC  = 4'd14,  // r <= c
    ALU_NOTA  = 4'd15   // ~a
  } alu_op_e;

  // Second ALU operand (the RIN-side multiplexer of the processing element).
  typedef enum logic [1:0] {
    SRC_MEM = 2'd0,   // mem[b]
    SRC_IMM = 2'd1,   // immediate
    SRC_RIN = 2'd2,   // association result register
    SRC_LV  = 2'd3    // local value register
  } src_e;

  // Where the ALU result goes.
  typedef enum logic [1:0] {
    DST_MEM  = 2'd0,
    DST_LV   = 2'd1,
    DST_BOTH = 2'd2,
    DST_NONE = 2'd3
  } dst_e;

  // WHERE condition.
  typedef enum logic [1:0] {
    COND_NZ  = 2'd0,  // mem[a] != 0
    COND_Z   = 2'd1,  // mem[a] == 0
    COND_C   = 2'd2,  // carry set
    COND_NC  = 2'd3   // carry clear
  } cond_e;

  // Associations available in the asynchronous layer.
  typedef enum logic [2:0] {
    AS_OR        = 3'd0,  // global OR over the mgraph connected set
    AS_MAX       = 3'd1,  // global MAX over the mgraph connected set
    AS_PLUS_STEP = 3'd2,  // local sum of the masked neighbours
    AS_OR_STEP   = 3'd3,  // local OR of the masked neighbours
    AS_AND       = 3'd4,  // global AND over the mgraph connected set
    AS_MIN       = 3'd5,  // global MIN over the mgraph connected set
    AS_MAX_STEP  = 3'd6,  // local MAX of the masked neighbours (0 if none)
    AS_MIN_STEP  = 3'd7   // local MIN of the masked neighbours (15 if none)
  } assoc_e;

  // Global associations relax until stable; the others take one step.
  function automatic logic assoc_is_global(assoc_e k);
    return k == AS_OR || k == AS_MAX || k == AS_AND || k == AS_MIN;
  endfunction

  typedef struct packed {
    opcode_e op;
    alu_op_e alu;
    src_e    srcb;
    dst_e    dst_sel;
    cond_e   cond;
    assoc_e  assoc;
    maddr_t  dst;
    maddr_t  a;
    maddr_t  b;
    word_t   imm;
  } instr_t;

  // Result of one ALU lane.
  typedef struct packed {
    word_t r;
    logic  c;
    logic  we;   // operation writes r
    logic  ce;   // operation updates the carry
  } alu_res_t;

endpackage
