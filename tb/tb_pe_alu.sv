// tb_pe_alu: exhaustive self-check of the 4-bit lane ALU.
//
// Every operation is applied to every pair of 4-bit operands with both carry
// inputs, and the result, carry and write/carry-update flags are compared
// with a model written with plain integer arithmetic.
//
// The 4-bit width follows the original; the operation set is this design's.
module tb_pe_alu;
  import am_pkg::*;

  alu_op_e  op;
  word_t    a, b;
  logic     cin;
  alu_res_t res;
  int       checks = 0, failures = 0;

  pe_alu dut (.op, .a, .b, .cin, .res);

  task automatic expect_res(int r, int c, bit we, bit ce);
    checks++;
    if (res.r !== word_t'(r) || res.we !== we || res.ce !== ce || (ce && res.c !== c[0])) begin
      failures++;
      if (failures < 10)
        $display("FAIL op=%s a=%0d b=%0d cin=%0d: got r=%0d c=%0d we=%0d ce=%0d, want r=%0d c=%0d we=%0d ce=%0d",
                 op.name(), a, b, cin, res.r, res.c, res.we, res.ce, r & 15, c, we, ce);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 16; o++) begin
      for (int ia = 0; ia < 16; ia++) begin
        for (int ib = 0; ib < 16; ib++) begin
          for (int ic = 0; ic < 2; ic++) begin
            int s, r, c;
            bit we, ce;
            op = alu_op_e'(o); a = word_t'(ia); b = word_t'(ib); cin = ic[0];
            #1;
            we = 1; ce = 0; c = 0;
            case (op)
              ALU_ADD:   begin s = ia + ib;       r = s % 16; c = s / 16; ce = 1; end
              ALU_ADC:   begin s = ia + ib + ic;  r = s % 16; c = s / 16; ce = 1; end
              ALU_SUB:   begin s = ia - ib;       r = (s + 16) % 16; c = (s < 0); ce = 1; end
              ALU_SBC:   begin s = ia - ib - ic;  r = (s + 32) % 16; c = (s < 0); ce = 1; end
              ALU_CMP:   begin s = ia - ib;       r = (s + 16) % 16; c = (s < 0); ce = 1; we = 0; end
              ALU_CMPC:  begin s = ia - ib - ic;  r = (s + 32) % 16; c = (s < 0); ce = 1; we = 0; end
              ALU_AND:   r = ia & ib;
              ALU_OR:    r = ia | ib;
              ALU_XOR:   r = ia ^ ib;
              ALU_PASSB: r = ib;
              ALU_RLC:   begin r = (ia * 2 + ic) % 16; c = ia / 8; ce = 1; end
              ALU_MAX:   r = (ia > ib) ? ia : ib;
              ALU_MIN:   r = (ia < ib) ? ia : ib;
              ALU_EQ:    r = (ia == ib) ? 1 : 0;
              ALU_GETC:  r = ic;
              default:   r = 15 - ia;   // ALU_NOTA
            endcase
            expect_res(r, c, we, ce);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
