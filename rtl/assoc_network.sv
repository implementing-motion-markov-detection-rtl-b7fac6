// assoc_network: the association layer of the Associative Mesh, one node per
// pixel, 8-connected.
//
// Every pixel presents a 4-bit local value lv[p] and an 8-bit mgraph mg[p].
// Bit d of mg[p] opens the edge from the neighbour in direction d (numbering
// in am_pkg) into p: the neighbour's value passes an and-gate mask and
// reaches p's operator only when that bit is set. Edges that would leave the
// image are always masked.
//
// Associations (op):
//   AS_OR, AS_AND,   global: each pixel ends with the OR (AND, MAX, MIN) of
//   AS_MAX, AS_MIN   its own value and of every value that can reach it
//                    along open edges.
//   AS_PLUS_STEP     local: each pixel gets the sum (mod 16) of the values of
//                    its open neighbours, its own value excluded.
//   AS_OR_STEP,      local: the OR (MAX, MIN) of the open neighbours; with no
//   AS_MAX_STEP,     open neighbour the result is 0 (0, 15).
//   AS_MIN_STEP
// The operator set (logical operators, maximum and minimum, addition) is the
// original's; which of them exist as global and which as step kinds, and
// the 4-bit width of the PLUS step, are this design's choices.
//
// In silicon the global associations are asynchronous: values ripple through
// the operators with no registers until the whole net is stable. Here that
// relaxation is modelled synchronously, one hop per clock: res holds the
// current values, every cycle each node combines its value with its masked
// neighbours, and the stability detector ends the association in the first
// cycle in which no node changes. The result is the same fixed point; the
// time is one cycle per hop of the longest propagation path plus one, rather
// than the asynchronous ripple time.
//
// Timing: pulse start (one cycle) with op, lv and mg stable until done. busy
// is high from the cycle after start until done; done is a one-cycle pulse;
// res is valid from done until the next start. stable = !busy is the
// signal sent to the controller. Step associations take 1 cycle.
module assoc_network
  import am_pkg::*;
#(
  parameter int unsigned IMG_W = 256,
  parameter int unsigned IMG_H = 256,
  localparam int unsigned NPIX = IMG_W * IMG_H
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  assoc_e  op,
  input  word_t   lv  [NPIX],
  input  mgraph_t mg  [NPIX],
  output word_t   res [NPIX],
  output logic    busy,
  output logic    done,
  output logic    stable
);

  word_t  nxt [NPIX];
  word_t  step_res [NPIX];
  assoc_e op_q;
  logic   changed;

  // One relaxation step of the global operators, and the local step
  // operators, for all pixels. Loop bounds are constants.
  always_comb begin
    changed = 1'b0;
    for (int y = 0; y < int'(IMG_H); y++) begin
      for (int x = 0; x < int'(IMG_W); x++) begin
        automatic int   p = y * int'(IMG_W) + x;
        automatic word_t acc_g = res[p];
        automatic word_t acc_s = (op == AS_MIN_STEP) ? '1 : '0;
        for (int d = 0; d < 8; d++) begin
          automatic int ny = y + dir_dy(d);
          automatic int nx = x + dir_dx(d);
          if (mg[p][d] && ny >= 0 && ny < int'(IMG_H) && nx >= 0 && nx < int'(IMG_W)) begin
            automatic int q = ny * int'(IMG_W) + nx;
            case (op_q)
              AS_MAX:  acc_g = (res[q] > acc_g) ? res[q] : acc_g;
              AS_MIN:  acc_g = (res[q] < acc_g) ? res[q] : acc_g;
              AS_AND:  acc_g = acc_g & res[q];
              default: acc_g = acc_g | res[q];
            endcase
            case (op)
              AS_PLUS_STEP: acc_s = acc_s + lv[q];
              AS_MAX_STEP:  acc_s = (lv[q] > acc_s) ? lv[q] : acc_s;
              AS_MIN_STEP:  acc_s = (lv[q] < acc_s) ? lv[q] : acc_s;
              default:      acc_s = acc_s | lv[q];
            endcase
          end
        end
        nxt[p]      = acc_g;
        step_res[p] = acc_s;
        if (acc_g != res[p]) changed = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      op_q <= AS_OR;
      for (int p = 0; p < int'(NPIX); p++) res[p] <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        op_q <= op;
        if (!assoc_is_global(op)) begin
          for (int p = 0; p < int'(NPIX); p++) res[p] <= step_res[p];
          done <= 1'b1;
        end else begin
          for (int p = 0; p < int'(NPIX); p++) res[p] <= lv[p];
          busy <= 1'b1;
        end
      end else if (busy) begin
        if (changed) begin
          for (int p = 0; p < int'(NPIX); p++) res[p] <= nxt[p];
        end else begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign stable = !busy;

  // An association must not be restarted while one is in flight.
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !start)
    else $error("assoc_network: start while busy");

endmodule
