// pe_alu: the 4-bit ALU of one SIMD lane of a synchronous unit.
//
// The processing element of the Associative Mesh performs its local
// operations with a 4-bit wide ALU. Numbers wider than 4 bits are processed a
// nibble at a time, least significant nibble first, by chaining the carry /
// borrow flag that each pixel keeps (ADC, SBC, CMPC, RLC). The operation set
// below (add/subtract with carry, logic, compare, min/max, shift through
// carry) is this design's choice; the source only states that the ALU is
// 4 bits wide and performs basic local operations.
//
// Purely combinational. Outputs: result r, new carry c, and whether the
// operation writes a result (we) and updates the carry (ce).
module pe_alu
  import am_pkg::*;
(
  input  alu_op_e  op,
  input  word_t    a,
  input  word_t    b,
  input  logic     cin,
  output alu_res_t res
);

  logic [WORD_W:0] sum;

  always_comb begin
    res = '{r: a, c: cin, we: 1'b1, ce: 1'b0};
    sum = '0;
    unique case (op)
      ALU_ADD: begin
        sum   = {1'b0, a} + {1'b0, b};
        res.r = sum[WORD_W-1:0]; res.c = sum[WORD_W]; res.ce = 1'b1;
      end
      ALU_ADC: begin
        sum   = {1'b0, a} + {1'b0, b} + {{WORD_W{1'b0}}, cin};
        res.r = sum[WORD_W-1:0]; res.c = sum[WORD_W]; res.ce = 1'b1;
      end
      ALU_SUB, ALU_CMP: begin
        sum   = {1'b0, a} - {1'b0, b};
        res.r = sum[WORD_W-1:0]; res.c = sum[WORD_W]; res.ce = 1'b1;
        res.we = (op == ALU_SUB);
      end
      ALU_SBC, ALU_CMPC: begin
        sum   = {1'b0, a} - {1'b0, b} - {{WORD_W{1'b0}}, cin};
        res.r = sum[WORD_W-1:0]; res.c = sum[WORD_W]; res.ce = 1'b1;
        res.we = (op == ALU_SBC);
      end
      ALU_AND:   res.r = a & b;
      ALU_OR:    res.r = a | b;
      ALU_XOR:   res.r = a ^ b;
      ALU_PASSB: res.r = b;
      ALU_RLC: begin
        res.r = {a[WORD_W-2:0], cin}; res.c = a[WORD_W-1]; res.ce = 1'b1;
      end
      ALU_MAX:   res.r = (a > b) ? a : b;
      ALU_MIN:   res.r = (a < b) ? a : b;
      ALU_EQ:    res.r = word_t'(a == b);
      ALU_GETC:  res.r = word_t'(cin);
      ALU_NOTA:  res.r = ~a;
      default:   res.r = a;
    endcase
  end

endmodule
