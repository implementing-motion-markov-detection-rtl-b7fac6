// tb_assoc_mesh: end-to-end test of the virtualized Associative Mesh running
// Markov-random-field motion detection.
//
// A 16 x 8 mesh with 8 x 4 pixel blocks (4 synchronous units of 32 pixels, 4
// SIMD lanes) runs three programs written with the broadcast instruction set:
//   1. Sigma-Delta pre-processing of one frame (8-bit pixels, computed a
//      nibble at a time): background M and variance V updated only where the
//      last relaxed label P is 0, observation O = |M - I|, V moved towards
//      2*O where O != 0, and the motion estimate F = (O >= V).
//   2. One image-recursive ICM relaxation of the label plane C, run 4 times:
//      s = PLUS step association of C over the 8 neighbours,
//      Um = (8 - 2s)*bs + (P ? -bp : bp) + (F ? -bf : bf) with bs=1, bp=bf=2,
//      Ua = (2*alpha*Q - alpha^2) / (4*sigma^2) = Q - 2 with alpha=4,
//      sigma^2=2 and Q the observation of C's frame, and C = (2*Um < Ua).
//   3. Hysteresis on a count plane K (number of colour planes in motion):
//      pixels with K >= sL are linked to all their neighbours, seeds are
//      K >= sH, and a global OR association marks every pixel whose connected
//      set holds a seed. Run with (sL, sH) = (1, 3) and (2, 3).
//   4. Region statistics on the connected sets of K >= 1: maximum, minimum
//      and AND of K by global associations, and a MAX step association.
// Planes go in and out through the scan chains. Each result is compared with
// a reference model written here with integer arithmetic. The testbench also
// checks the cycle count of each run (every broadcast instruction costs
// N/LANES rows plus 3 cycles of issue and handshake) and counts the mechanisms
// exercised: WHERE-inactive pixels, carry chains, step and global
// associations, multi-cycle stability waits and scan traffic; a mechanism that
// never happens counts as a failure.
//
// The algorithm (Sigma-Delta, ICM energy terms, hysteresis) follows the
// original; the parameter values beta, alpha, sigma, the nibble encoding and
// the programs themselves are this design's own.
module tb_assoc_mesh;
  import am_pkg::*;

  localparam int IW = 16, IH = 8, BW = 8, BH = 4, LANES = 4, DEPTH = 64;
  localparam int UCOLS = IW / BW, UROWS = IH / BH, N = BW * BH, ROWS = N / LANES;
  localparam int NP = IW * IH;
  localparam int WATCHDOG = 400000;

  // memory map (words per pixel)
  localparam int I0 = 0, I1 = 1, M0 = 2, M1 = 3, V0 = 4, V1 = 5, O0 = 6, O1 = 7;
  localparam int P = 9, C = 10, Q0 = 11, Q1 = 12, F = 17;
  localparam int T1 = 20, T2 = 21, T3 = 22, T5 = 23, D0 = 24, D1 = 25, D2 = 26;
  localparam int ZW = 27, ONES = 28, U0 = 29, U1 = 30, U2 = 31, TT = 32, K = 33, H = 34;
  localparam int RMAX = 35, RMIN = 36, RAND = 37, RMXS = 38;

  logic            clk = 0, rst_n = 0;
  logic            prog_we = 0;
  logic [PC_W-1:0] prog_addr = '0;
  instr_t          prog_wdata = '0;
  logic            run = 0, busy, halted, stable;
  logic            scan_en = 0;
  word_t           scan_in  [UROWS];
  word_t           scan_out [UROWS];
  logic [31:0]     cnt_cycles, cnt_instr, cnt_assoc, cnt_assoc_cycles;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_inactive = 0, n_carry = 0, n_step_assoc = 0, n_global_assoc = 0;
  int n_multi_cycle_stab = 0, n_scan_planes = 0, n_elsewhere = 0;
  int n_region_assoc = 0;

  assoc_mesh #(.IMG_W(IW), .IMG_H(IH), .BLK_W(BW), .BLK_H(BH), .LANES(LANES),
               .DEPTH(DEPTH), .PROG_DEPTH(256)) dut (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_wdata, .run, .busy, .halted,
    .scan_en, .scan_in, .scan_out, .stable, .cnt_cycles, .cnt_instr, .cnt_assoc,
    .cnt_assoc_cycles
  );

  always #5 clk = ~clk;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  // ---------------------------------------------------------------- assembler
  instr_t prog [$];

  function automatic instr_t mk(opcode_e op);
    instr_t i;
    i = '0;
    i.op = op;
    return i;
  endfunction

  // ALU: dst <= f(mem[a], b), b a memory address (SRC_MEM) or immediate (SRC_IMM)
  function automatic void alu(alu_op_e f, int dst, int a, src_e sb, int b, dst_e ds = DST_MEM);
    instr_t i = mk(OP_ALU);
    i.alu = f; i.dst = maddr_t'(dst); i.a = maddr_t'(a); i.srcb = sb; i.dst_sel = ds;
    if (sb == SRC_IMM) i.imm = word_t'(b); else i.b = maddr_t'(b);
    prog.push_back(i);
  endfunction
  function automatic void where_(cond_e c, int a = 0);
    instr_t i = mk(OP_WHERE);
    i.cond = c; i.a = maddr_t'(a);
    prog.push_back(i);
  endfunction
  function automatic void elsewhere_(); prog.push_back(mk(OP_ELSEWHERE)); endfunction
  function automatic void endwhere_();  prog.push_back(mk(OP_ENDWHERE));  endfunction
  function automatic void setmg(int a, int b);
    instr_t i = mk(OP_SETMG);
    i.a = maddr_t'(a); i.b = maddr_t'(b);
    prog.push_back(i);
  endfunction
  function automatic void assoc(assoc_e k);
    instr_t i = mk(OP_ASSOC);
    i.assoc = k;
    prog.push_back(i);
  endfunction
  function automatic void scan_rd(int dst);
    instr_t i = mk(OP_SCAN_RD);
    i.dst = maddr_t'(dst);
    prog.push_back(i);
  endfunction
  function automatic void scan_wr(int a);
    instr_t i = mk(OP_SCAN_WR);
    i.a = maddr_t'(a);
    prog.push_back(i);
  endfunction

  // Load prog (plus HALT), run it, check the cycle count.
  task automatic run_prog(string name);
    int n_bcast = 0;
    prog.push_back(mk(OP_HALT));
    foreach (prog[i]) begin
      @(negedge clk); prog_we = 1; prog_addr = PC_W'(i); prog_wdata = prog[i];
      if (prog[i].op != OP_ASSOC && prog[i].op != OP_HALT && prog[i].op != OP_NOP) n_bcast++;
    end
    @(negedge clk); prog_we = 0; run = 1;
    @(negedge clk); run = 0;
    while (!halted) @(negedge clk);
    check({name, ": broadcast count"}, cnt_instr, n_bcast);
    check({name, ": cycles"}, cnt_cycles,
          n_bcast * (ROWS + 3) + int'(cnt_assoc) + int'(cnt_assoc_cycles) + 1);
    if (cnt_assoc_cycles > 2 * cnt_assoc) n_multi_cycle_stab++;
    if (name != "scan in" && name != "scan out")
      $display("program %s: %0d broadcasts, %0d associations, %0d cycles waiting for stability, %0d cycles",
               name, cnt_instr, cnt_assoc, cnt_assoc_cycles, cnt_cycles);
    prog.delete();
  endtask

  // ------------------------------------------------------------ scan chains
  // Chain position pos of row r holds unit (r, pos / N), element pos % N.
  function automatic int pix_of(int r, int pos);
    int ux = pos / N, v = pos % N;
    return (r * BH + v / BW) * IW + ux * BW + v % BW;
  endfunction

  task automatic scan_plane_in(int plane [NP], int dst);
    for (int pos = UCOLS * N - 1; pos >= 0; pos--) begin
      @(negedge clk); scan_en = 1;
      for (int r = 0; r < UROWS; r++) scan_in[r] = word_t'(plane[pix_of(r, pos)]);
    end
    @(negedge clk); scan_en = 0;
    scan_rd(dst);
    run_prog("scan in");
    n_scan_planes++;
  endtask

  task automatic scan_plane_out(int a, output int plane [NP]);
    scan_wr(a);
    run_prog("scan out");
    for (int r = 0; r < UROWS; r++) scan_in[r] = '0;
    scan_en = 1;
    for (int pos = UCOLS * N - 1; pos >= 0; pos--) begin
      for (int r = 0; r < UROWS; r++) plane[pix_of(r, pos)] = scan_out[r];
      @(negedge clk);
    end
    scan_en = 0;
    n_scan_planes++;
  endtask

  // ----------------------------------------------------------- programs
  // 8-bit value in two nibbles: lo address, hi = lo + 1 in these helpers.
  function automatic void build_sigma_delta();
    alu(ALU_PASSB, ZW, 0, SRC_IMM, 0);
    alu(ALU_PASSB, ONES, 0, SRC_IMM, 15);
    // step 1': M moves one step towards I where P == 0
    alu(ALU_PASSB, T1, 0, SRC_IMM, 0);
    alu(ALU_PASSB, T2, 0, SRC_IMM, 0);
    where_(COND_Z, P);
    alu(ALU_CMP,  0, M0, SRC_MEM, I0);  alu(ALU_CMPC, 0, M1, SRC_MEM, I1);
    alu(ALU_GETC, T1, 0, SRC_IMM, 0);                       // M < I
    alu(ALU_CMP,  0, I0, SRC_MEM, M0);  alu(ALU_CMPC, 0, I1, SRC_MEM, M1);
    alu(ALU_GETC, T2, 0, SRC_IMM, 0);                       // M > I
    endwhere_();
    where_(COND_NZ, T1);
    alu(ALU_ADD, M0, M0, SRC_IMM, 1);   alu(ALU_ADC, M1, M1, SRC_IMM, 0);
    endwhere_();
    where_(COND_NZ, T2);
    alu(ALU_SUB, M0, M0, SRC_IMM, 1);   alu(ALU_SBC, M1, M1, SRC_IMM, 0);
    endwhere_();
    // step 2: O = |M - I|
    alu(ALU_SUB, O0, M0, SRC_MEM, I0);  alu(ALU_SBC, O1, M1, SRC_MEM, I1);
    where_(COND_C);
    alu(ALU_SUB, O0, I0, SRC_MEM, M0);  alu(ALU_SBC, O1, I1, SRC_MEM, M1);
    endwhere_();
    // step 3: V moves towards 2*O where O != 0 and P == 0
    alu(ALU_ADD, D0, O0, SRC_MEM, O0);  alu(ALU_ADC, D1, O1, SRC_MEM, O1);
    alu(ALU_GETC, D2, 0, SRC_IMM, 0);
    alu(ALU_OR,  T3, O0, SRC_MEM, O1);
    alu(ALU_EQ,  T3, T3, SRC_IMM, 0);                       // O == 0
    alu(ALU_OR,  T5, T3, SRC_MEM, P);                       // skip if O == 0 or P
    alu(ALU_PASSB, T1, 0, SRC_IMM, 0);
    alu(ALU_PASSB, T2, 0, SRC_IMM, 0);
    where_(COND_Z, T5);
    alu(ALU_CMP, 0, V0, SRC_MEM, D0);   alu(ALU_CMPC, 0, V1, SRC_MEM, D1);
    alu(ALU_CMPC, 0, ZW, SRC_MEM, D2);
    alu(ALU_GETC, T1, 0, SRC_IMM, 0);                       // V < 2O
    alu(ALU_CMP, 0, D0, SRC_MEM, V0);   alu(ALU_CMPC, 0, D1, SRC_MEM, V1);
    alu(ALU_CMPC, 0, D2, SRC_MEM, ZW);
    alu(ALU_GETC, T2, 0, SRC_IMM, 0);                       // V > 2O
    endwhere_();
    where_(COND_NZ, T1);
    alu(ALU_ADD, V0, V0, SRC_IMM, 1);   alu(ALU_ADC, V1, V1, SRC_IMM, 0);
    endwhere_();
    where_(COND_NZ, T2);
    alu(ALU_SUB, V0, V0, SRC_IMM, 1);   alu(ALU_SBC, V1, V1, SRC_IMM, 0);
    endwhere_();
    // step 4: F = !(O < V)
    alu(ALU_CMP, 0, O0, SRC_MEM, V0);   alu(ALU_CMPC, 0, O1, SRC_MEM, V1);
    alu(ALU_GETC, TT, 0, SRC_IMM, 0);
    alu(ALU_EQ,  F, TT, SRC_IMM, 0);
  endfunction

  // 12-bit signed accumulator U2:U1:U0 += / -= small constant
  function automatic void acc_imm(bit sub, int k);
    alu(sub ? ALU_SUB : ALU_ADD, U0, U0, SRC_IMM, k);
    alu(sub ? ALU_SBC : ALU_ADC, U1, U1, SRC_IMM, 0);
    alu(sub ? ALU_SBC : ALU_ADC, U2, U2, SRC_IMM, 0);
  endfunction

  function automatic void build_icm();
    setmg(ONES, ONES);
    alu(ALU_PASSB, 0, 0, SRC_MEM, C, DST_LV);
    assoc(AS_PLUS_STEP);                                   // RIN = s
    alu(ALU_PASSB, U0, 0, SRC_IMM, 8);                     // Us = 8 - 2s
    alu(ALU_PASSB, U1, 0, SRC_IMM, 0);
    alu(ALU_PASSB, U2, 0, SRC_IMM, 0);
    for (int k = 0; k < 2; k++) begin
      alu(ALU_SUB, U0, U0, SRC_RIN, 0);
      alu(ALU_SBC, U1, U1, SRC_IMM, 0);
      alu(ALU_SBC, U2, U2, SRC_IMM, 0);
    end
    where_(COND_NZ, P); acc_imm(1, 2); elsewhere_(); acc_imm(0, 2); endwhere_();
    where_(COND_NZ, F); acc_imm(1, 2); elsewhere_(); acc_imm(0, 2); endwhere_();
    alu(ALU_ADD, U0, U0, SRC_IMM, 0);                      // clear carry
    alu(ALU_RLC, U0, U0, SRC_IMM, 0);                      // 2 * Um
    alu(ALU_RLC, U1, U1, SRC_IMM, 0);
    alu(ALU_RLC, U2, U2, SRC_IMM, 0);
    acc_imm(0, 2);                                         // 2 * Um + 2
    alu(ALU_SUB, U0, U0, SRC_MEM, Q0);                     // - Q
    alu(ALU_SBC, U1, U1, SRC_MEM, Q1);
    alu(ALU_SBC, U2, U2, SRC_IMM, 0);
    alu(ALU_AND, TT, U2, SRC_IMM, 8);                      // sign: 2Um < Q - 2
    where_(COND_NZ, TT);
    alu(ALU_PASSB, C, 0, SRC_IMM, 1);
    elsewhere_();
    alu(ALU_PASSB, C, 0, SRC_IMM, 0);
    endwhere_();
  endfunction

  function automatic void build_hysteresis(int sl, int sh);
    alu(ALU_PASSB, ZW, 0, SRC_IMM, 0);
    alu(ALU_PASSB, ONES, 0, SRC_IMM, 15);
    alu(ALU_CMP, 0, K, SRC_IMM, sl);                       // c = K < sL
    where_(COND_NC); setmg(ONES, ONES); elsewhere_(); setmg(ZW, ZW); endwhere_();
    alu(ALU_CMP, 0, K, SRC_IMM, sh);
    alu(ALU_GETC, TT, 0, SRC_IMM, 0);
    alu(ALU_EQ, 0, TT, SRC_IMM, 0, DST_LV);                // seed: K >= sH
    assoc(AS_OR);
    alu(ALU_PASSB, H, 0, SRC_RIN, 0);
  endfunction

  // Region statistics over the connected sets of K >= 1: every region pixel
  // listens to all its neighbours and presents K; the others close their
  // edges and present the neutral value of the operator (0 for MAX, 15 for
  // MIN and AND). A MAX step association on the last mgraph follows.
  function automatic void region_lv(int neutral);
    alu(ALU_CMP, 0, K, SRC_IMM, 1);                        // c = K < 1
    where_(COND_NC); alu(ALU_PASSB, 0, 0, SRC_MEM, K, DST_LV);
    elsewhere_();    alu(ALU_PASSB, 0, 0, SRC_IMM, neutral, DST_LV);
    endwhere_();
  endfunction
  function automatic void build_regions();
    alu(ALU_PASSB, ZW, 0, SRC_IMM, 0);
    alu(ALU_PASSB, ONES, 0, SRC_IMM, 15);
    alu(ALU_CMP, 0, K, SRC_IMM, 1);
    where_(COND_NC); setmg(ONES, ONES); elsewhere_(); setmg(ZW, ZW); endwhere_();
    region_lv(0);  assoc(AS_MAX);      alu(ALU_PASSB, RMAX, 0, SRC_RIN, 0);
    region_lv(15); assoc(AS_MIN);      alu(ALU_PASSB, RMIN, 0, SRC_RIN, 0);
                   assoc(AS_AND);      alu(ALU_PASSB, RAND, 0, SRC_RIN, 0);
                   assoc(AS_MAX_STEP); alu(ALU_PASSB, RMXS, 0, SRC_RIN, 0);
  endfunction

  // ------------------------------------------------------- reference models
  int Iimg [NP], Mimg [NP], Vimg [NP], Pimg [NP], Cimg [NP], Qimg [NP], Kimg [NP];
  int Mref [NP], Vref [NP], Oref [NP], Fref [NP], Cref [NP], Href [NP];

  function automatic int nbr(int p, int d);
    int y = p / IW + dir_dy(d), x = p % IW + dir_dx(d);
    if (y < 0 || y >= IH || x < 0 || x >= IW) return -1;
    return y * IW + x;
  endfunction

  function automatic int sgn(int v);
    return (v > 0) ? 1 : (v < 0) ? -1 : 0;
  endfunction

  task automatic ref_sigma_delta();
    for (int p = 0; p < NP; p++) begin
      Mref[p] = Mimg[p];
      if (Pimg[p] == 0) Mref[p] += sgn(Iimg[p] - Mimg[p]);
      Oref[p] = (Mref[p] > Iimg[p]) ? Mref[p] - Iimg[p] : Iimg[p] - Mref[p];
      Vref[p] = Vimg[p];
      if (Oref[p] != 0 && Pimg[p] == 0) Vref[p] += sgn(2 * Oref[p] - Vimg[p]);
      Fref[p] = (Oref[p] < Vref[p]) ? 0 : 1;
      if (Pimg[p] != 0) n_inactive++;
      if ((Mimg[p] % 16 == 15 && Mref[p] > Mimg[p]) || (Mimg[p] % 16 == 0 && Mref[p] < Mimg[p])) n_carry++;
    end
  endtask

  task automatic ref_icm();
    int nxt [NP];
    localparam int BS = 1, BP = 2, BF = 2, ALPHA = 4, SIGMA2 = 2;
    for (int p = 0; p < NP; p++) begin
      int s = 0, um;
      for (int d = 0; d < 8; d++) if (nbr(p, d) >= 0) s += Cref[nbr(p, d)];
      um = (8 - 2 * s) * BS + (Pimg[p] ? -BP : BP) + (Fref[p] ? -BF : BF);
      // 2*Um < (2*alpha*Q - alpha^2) / (4*sigma^2), kept in integers
      nxt[p] = (2 * um * 4 * SIGMA2 < 2 * ALPHA * Qimg[p] - ALPHA * ALPHA) ? 1 : 0;
    end
    Cref = nxt;
  endtask

  task automatic ref_hysteresis(int sl, int sh);
    int seen [NP];
    int stack [$];
    foreach (seen[p]) seen[p] = 0;
    foreach (Href[p]) Href[p] = 0;
    for (int p = 0; p < NP; p++)
      if (Kimg[p] >= sh && !seen[p]) begin
        seen[p] = 1; stack.push_back(p);
        while (stack.size() > 0) begin
          int c = stack.pop_back();
          Href[c] = 1;
          for (int d = 0; d < 8; d++) begin
            int q = nbr(c, d);
            if (q >= 0 && !seen[q] && Kimg[q] >= sl) begin seen[q] = 1; stack.push_back(q); end
          end
        end
      end
  endtask

  int RmaxRef [NP], RminRef [NP], RandRef [NP], RmxsRef [NP];
  task automatic ref_regions();
    int seen [NP];
    int stack [$], members [$];
    foreach (seen[p]) seen[p] = 0;
    for (int p = 0; p < NP; p++) begin
      RmaxRef[p] = 0; RminRef[p] = 15; RandRef[p] = 15; RmxsRef[p] = 0;
      if (Kimg[p] >= 1)
        for (int d = 0; d < 8; d++)
          if (nbr(p, d) >= 0) begin
            int lvq;
            lvq = (Kimg[nbr(p, d)] >= 1) ? Kimg[nbr(p, d)] : 15;
            if (lvq > RmxsRef[p]) RmxsRef[p] = lvq;
          end
    end
    for (int p = 0; p < NP; p++)
      if (Kimg[p] >= 1 && !seen[p]) begin
        int mx, mn, an;
        mx = 0; mn = 15; an = 15;
        members.delete();
        seen[p] = 1; stack.push_back(p);
        while (stack.size() > 0) begin
          int c;
          c = stack.pop_back();
          members.push_back(c);
          if (Kimg[c] > mx) mx = Kimg[c];
          if (Kimg[c] < mn) mn = Kimg[c];
          an = an & Kimg[c];
          for (int d = 0; d < 8; d++) begin
            int q;
            q = nbr(c, d);
            if (q >= 0 && !seen[q] && Kimg[q] >= 1) begin seen[q] = 1; stack.push_back(q); end
          end
        end
        foreach (members[i]) begin
          RmaxRef[members[i]] = mx; RminRef[members[i]] = mn; RandRef[members[i]] = an;
        end
      end
  endtask

  task automatic compare(string what, int got [NP], int want [NP]);
    for (int p = 0; p < NP; p++) check($sformatf("%s pixel %0d", what, p), got[p], want[p]);
  endtask

  // --------------------------------------------------------------- main
  initial begin
    int lo [NP], hi [NP], out [NP], out_hi [NP];
    foreach (scan_in[r]) scan_in[r] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // A frame: background around 40, a bright moving square, noise.
    for (int p = 0; p < NP; p++) begin
      int y, x;
      y = p / IW; x = p % IW;
      Mimg[p] = 30 + $urandom_range(0, 20);
      Iimg[p] = Mimg[p] + $urandom_range(0, 6) - 3;
      if (x >= 5 && x < 11 && y >= 2 && y < 6) Iimg[p] = 100 + $urandom_range(0, 20);
      if (p % 7 == 0) Iimg[p] = Mimg[p];
      if (p % 11 == 0) begin Mimg[p] = 47; Iimg[p] = 60; end    // carry into the high nibble
      if (p % 13 == 0) begin Mimg[p] = 48; Iimg[p] = 20; end    // borrow from the high nibble
      Vimg[p] = $urandom_range(2, 12);
      Pimg[p] = (x >= 4 && x < 10 && y >= 2 && y < 6) ? 1 : ($urandom_range(0, 15) == 0);
      Cimg[p] = (x >= 5 && x < 11 && y >= 1 && y < 6) ? ($urandom_range(0, 7) != 0) : ($urandom_range(0, 9) == 0);
      Qimg[p] = Cimg[p] ? 60 + $urandom_range(0, 60) : $urandom_range(0, 12);
    end

    // load planes
    foreach (lo[p]) begin lo[p] = Iimg[p] % 16; hi[p] = Iimg[p] / 16; end
    scan_plane_in(lo, I0); scan_plane_in(hi, I1);
    foreach (lo[p]) begin lo[p] = Mimg[p] % 16; hi[p] = Mimg[p] / 16; end
    scan_plane_in(lo, M0); scan_plane_in(hi, M1);
    foreach (lo[p]) begin lo[p] = Vimg[p] % 16; hi[p] = Vimg[p] / 16; end
    scan_plane_in(lo, V0); scan_plane_in(hi, V1);
    foreach (lo[p]) begin lo[p] = Qimg[p] % 16; hi[p] = Qimg[p] / 16; end
    scan_plane_in(lo, Q0); scan_plane_in(hi, Q1);
    scan_plane_in(Pimg, P);
    scan_plane_in(Cimg, C);

    // Sigma-Delta
    ref_sigma_delta();
    build_sigma_delta();
    run_prog("sigma-delta");
    scan_plane_out(M0, lo); scan_plane_out(M1, hi);
    foreach (out[p]) out[p] = lo[p] + 16 * hi[p];
    compare("M", out, Mref);
    scan_plane_out(O0, lo); scan_plane_out(O1, hi);
    foreach (out[p]) out[p] = lo[p] + 16 * hi[p];
    compare("O", out, Oref);
    scan_plane_out(V0, lo); scan_plane_out(V1, hi);
    foreach (out[p]) out[p] = lo[p] + 16 * hi[p];
    compare("V", out, Vref);
    scan_plane_out(F, out);
    compare("F", out, Fref);

    // ICM, 4 image-recursive relaxations
    Cref = Cimg;
    for (int it = 0; it < 4; it++) begin
      ref_icm();
      build_icm();
      run_prog("icm");
      n_step_assoc += cnt_assoc;
      n_elsewhere++;
      scan_plane_out(C, out);
      compare($sformatf("C after ICM %0d", it + 1), out, Cref);
    end

    // Hysteresis on a count plane
    for (int p = 0; p < NP; p++) begin
      int y, x;
      y = p / IW; x = p % IW;
      Kimg[p] = $urandom_range(0, 3) * ($urandom_range(0, 2) == 0);
      if (y == 3 || y == 5) Kimg[p] = 0;                       // isolate row 4
      if (y == 4) Kimg[p] = 1 + (x % 3 == 0);                 // a long chain
      if (x == 2 && y == 4) Kimg[p] = 3;                       // seeded at one end
    end
    scan_plane_in(Kimg, K);
    for (int sl = 1; sl <= 2; sl++) begin
      ref_hysteresis(sl, 3);
      build_hysteresis(sl, 3);
      run_prog("hysteresis");
      n_global_assoc += cnt_assoc;
      scan_plane_out(H, out);
      compare($sformatf("hysteresis sL=%0d", sl), out, Href);
    end

    // Region maximum, minimum and AND (global) and a MAX step association
    ref_regions();
    build_regions();
    run_prog("regions");
    n_region_assoc += cnt_assoc;
    scan_plane_out(RMAX, out); compare("region MAX", out, RmaxRef);
    scan_plane_out(RMIN, out); compare("region MIN", out, RminRef);
    scan_plane_out(RAND, out); compare("region AND", out, RandRef);
    scan_plane_out(RMXS, out); compare("MAX step", out, RmxsRef);

    $display("mechanisms: inactive=%0d carry=%0d step_assoc=%0d global_assoc=%0d multi_cycle_stability=%0d scan_planes=%0d elsewhere=%0d region_assoc=%0d",
             n_inactive, n_carry, n_step_assoc, n_global_assoc, n_multi_cycle_stab, n_scan_planes, n_elsewhere,
             n_region_assoc);
    check("WHERE left pixels inactive", int'(n_inactive > 0), 1);
    check("carry between nibbles", int'(n_carry > 0), 1);
    check("step associations", int'(n_step_assoc > 0), 1);
    check("global associations", int'(n_global_assoc > 0), 1);
    check("multi-cycle stability wait", int'(n_multi_cycle_stab > 0), 1);
    check("scan traffic", int'(n_scan_planes > 0), 1);
    check("ELSEWHERE branches", int'(n_elsewhere > 0), 1);
    check("MAX, MIN, AND and MAX-step associations", n_region_assoc, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
