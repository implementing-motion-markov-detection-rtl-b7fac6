// tb_assoc_network: self-check of the association layer on a 7 x 5 image.
//
// Random local values and random mgraphs are applied; for every association
// the result of each pixel is compared with a reference computed here. For
// the global kinds (OR, AND, MAX, MIN) it is a depth-first search over the
// open edges, reducing over all pixels that can reach the pixel. For the step
// kinds it is a direct sum, OR, MAX or MIN over the open neighbours. The
// latency is checked as well: a step association finishes in one cycle, a
// global one in at most (pixels + 1) cycles, and a global association on an
// all-open mesh with a single non-zero value takes exactly (longest Chebyshev
// distance + 2) cycles.
//
// The association kinds and the masked 8-neighbour links follow the original;
// the one-hop-per-clock timing is this design's synchronous model of an
// asynchronous network.
module tb_assoc_network;
  import am_pkg::*;

  localparam int W = 7, H = 5, NP = W * H;

  logic    clk = 0, rst_n = 0, start = 0;
  assoc_e  op = AS_OR;
  word_t   lv  [NP];
  mgraph_t mg  [NP];
  word_t   res [NP];
  logic    busy, done, stable;
  int      checks = 0, failures = 0;

  assoc_network #(.IMG_W(W), .IMG_H(H)) dut (.clk, .rst_n, .start, .op, .lv, .mg, .res, .busy, .done, .stable);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // neighbour of p in direction d, or -1
  function automatic int nb(int p, int d);
    int y = p / W + dir_dy(d), x = p % W + dir_dx(d);
    if (y < 0 || y >= H || x < 0 || x >= W) return -1;
    return y * W + x;
  endfunction

  // reference: is q able to reach p along open edges (edge q->p open when
  // mg[p] has the bit towards q)?
  function automatic int ref_global(int p, assoc_e o);
    bit seen [NP];
    int stack [$];
    int acc = lv[p];
    foreach (seen[i]) seen[i] = 0;
    seen[p] = 1; stack.push_back(p);
    while (stack.size() > 0) begin
      int cur = stack.pop_back();
      for (int d = 0; d < 8; d++) begin
        int q = nb(cur, d);
        if (q >= 0 && mg[cur][d] && !seen[q]) begin
          seen[q] = 1; stack.push_back(q);
          if (o == AS_MAX)      acc = (lv[q] > acc) ? lv[q] : acc;
          else if (o == AS_MIN) acc = (lv[q] < acc) ? lv[q] : acc;
          else if (o == AS_AND) acc = acc & lv[q];
          else                  acc = acc | lv[q];
        end
      end
    end
    return acc;
  endfunction

  function automatic int ref_step(int p, assoc_e o);
    int acc = (o == AS_MIN_STEP) ? 15 : 0;
    for (int d = 0; d < 8; d++) begin
      int q = nb(p, d);
      if (q >= 0 && mg[p][d]) begin
        case (o)
          AS_PLUS_STEP: acc = (acc + lv[q]) % 16;
          AS_MAX_STEP:  acc = (lv[q] > acc) ? lv[q] : acc;
          AS_MIN_STEP:  acc = (lv[q] < acc) ? lv[q] : acc;
          default:      acc = acc | lv[q];
        endcase
      end
    end
    return acc;
  endfunction

  task automatic run_assoc(assoc_e o, output int cycles);
    @(negedge clk); op = o; start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    checks++;
    if (!stable) begin failures++; $display("FAIL: not stable at done"); end
  endtask

  task automatic check_all(assoc_e o);
    for (int p = 0; p < NP; p++) begin
      int want = assoc_is_global(o) ? ref_global(p, o) : ref_step(p, o);
      checks++;
      if (res[p] !== word_t'(want)) begin
        failures++;
        if (failures < 10) $display("FAIL %s pixel %0d: got %0d want %0d", o.name(), p, res[p], want);
      end
    end
  endtask

  initial begin
    int cyc;
    for (int p = 0; p < NP; p++) begin lv[p] = '0; mg[p] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 40; trial++) begin
      for (int p = 0; p < NP; p++) begin
        lv[p] = word_t'($urandom_range(0, 15));
        // sparse masks in some trials, dense in others
        mg[p] = (trial % 2) ? mgraph_t'($urandom()) : mgraph_t'($urandom() & $urandom());
        if (trial % 4 == 3) lv[p] = (p == (trial * 7) % NP) ? 4'd1 << (trial % 4) : 4'd0;
      end
      for (int o = 0; o < 8; o++) begin
        run_assoc(assoc_e'(o), cyc);
        check_all(assoc_e'(o));
        checks++;
        if (!assoc_is_global(assoc_e'(o)) && cyc != 1) begin failures++; $display("FAIL step latency %0d", cyc); end
        if (assoc_is_global(assoc_e'(o)) && cyc > NP + 1) begin failures++; $display("FAIL global latency %0d", cyc); end
      end
    end
    // Latency of a broadcast over an all-open mesh from the corner pixel:
    // the farthest pixel is max(W,H)-1 hops away; one more cycle detects
    // stability and one more delivers done.
    for (int p = 0; p < NP; p++) begin lv[p] = (p == 0) ? 4'd9 : 4'd0; mg[p] = 8'hFF; end
    run_assoc(AS_MAX, cyc);
    check_all(AS_MAX);
    checks++;
    if (cyc != W + 1) begin failures++; $display("FAIL corner broadcast took %0d cycles, want %0d", cyc, W + 1); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
