// tb_rsa_crt_workload: a complete RSA signature with the Chinese remainder
// theorem, computed by a program on the processor at its default size, with
// the key scaled down to 256 bits (S = 4 words per prime) so the whole
// signature fits in simulation time. A 1024-bit key (S = 16) would take some
// 25 million cycles, and the short word loops that are unrolled here would
// have to stay loops to fit the 1024-entry instruction memory.
//
// The program is built by the code generator in this testbench:
//   * a Montgomery multiplication subroutine (word-serial CIOS, as in the
//     full-size multiplication test) whose operands, modulus and result are
//     addressed through pointer registers; it returns by moving the saved
//     return address into the program counter. Its final-subtraction tail is
//     also entered on its own to reduce sums below the modulus;
//   * per prime: reduction of the message c (two halves, with the constants
//     R^2 and R^3 mod p, R = 2^(32S)) into Montgomery form, then left-to-right
//     square-and-multiply exponentiation over the bits of dp (dq), then
//     conversion out of Montgomery form: m1 = c^dp mod p, m2 = c^dq mod q;
//   * recombination s = m2 + q * ((m1 - m2) * qinv mod p), the last step a
//     schoolbook multiply-accumulate over words.
// The per-key constants (n0' = -1/p mod 2^32, R^2 and R^3 mod p and q,
// qinv) are computed by the testbench, as a key set-up step would.
// Checked: s < p*q, s = c^dp (mod p) and s = c^dq (mod q), with the
// exponentiations done here by plain wide arithmetic, for two keys.
module tb_rsa_crt_workload;
  import tta_pkg::*;
  localparam int unsigned NBUS = NBUS_DEFAULT, W = 32;
  localparam int S = 4;  // words per prime
  localparam int TB = 'h100, UB = 'h140;
  // data memory areas, S or 2S words each
  localparam int CB = 'h400, PP = 'h440, QQ = 'h480, DPB = 'h4C0, DQB = 'h500, QIB = 'h540,
                 R2P = 'h580, R3P = 'h5C0, R2Q = 'h600, R3Q = 'h640, ONE = 'h680, N0A = 'h6C0,
                 T1 = 'h700, T2 = 'h740, XM = 'h780, AM = 'h7C0, M1 = 'h800, M2 = 'h840,
                 DB = 'h880, HB = 'h8C0, SB = 'h900;

  logic clk = 0, rst_n = 0, run = 0;
  logic im_we = 0, dm_we = 0;
  logic [9:0] im_addr = '0;
  move_t [NBUS-1:0] im_moves = '0;
  logic [W-1:0] im_imm = '0, dm_wdata = '0, dm_rdata;
  logic [15:0] dm_addr = '0;
  logic [9:0] pc;
  cell_t [NBUS-1:0][NSOCK-1:0] bus_cfg;
  logic [NBUS-1:0][NSOCK:0] seg_act;
  logic [NBUS-1:0][NSOCK-1:0] conn_act;
  logic [NBUS-1:0] shared;

  tta_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint l_seg = 0, l_simple = 0;

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    #40000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk)
    if (run)
      for (int b = 0; b < int'(NBUS); b++) begin
        l_seg += $countones(seg_act[b]);
        if (|seg_act[b]) l_simple += NSOCK - 1;
      end

  // ------------------------------------------------------------ code generator
  // Operand: a register 0..31 (0..15 in the first file, 16..31 in the second)
  // or an immediate.
  typedef struct packed { logic imm; logic [31:0] v; } opnd_t;
  function automatic opnd_t R(int r); return '{imm: 1'b0, v: 32'(r)}; endfunction
  function automatic opnd_t I(logic [31:0] v); return '{imm: 1'b1, v: v}; endfunction

  move_t [NBUS-1:0] prog_mv [1024];
  logic [W-1:0] prog_imm [1024];
  int pcnt = 0;

  function automatic move_t mv(sock_t s, int si, sock_t d, int di);
    return '{v: 1'b1, src: s, sidx: idx_t'(si), dst: d, didx: idx_t'(di)};
  endfunction
  task automatic new_ins();
    prog_mv[pcnt] = '0;
    prog_imm[pcnt] = '0;
    pcnt++;
  endtask
  // source move of operand o on read port `port` of its register file
  task automatic src_of(input opnd_t o, input int port, output sock_t s, output int si);
    if (o.imm) begin
      s = CNTL_OUT; si = CN_IMM; prog_imm[pcnt-1] = o.v;
    end else begin
      s = (port == 0) ? rf_r0(int'(o.v) / 16) : rf_r1(int'(o.v) / 16);
      si = int'(o.v) % 16;
    end
  endtask
  // dst = a <op> b on unit fu: two instructions
  task automatic op(input int fu, input int opc, input opnd_t a, input opnd_t b, input int dst);
    sock_t sa, sb;
    int ia, ib;
    new_ins();
    src_of(a, 0, sa, ia);
    // second operand from the other read port when both come from one file
    src_of(b, (!a.imm && !b.imm && a.v / 16 == b.v / 16 && a.v != b.v) ? 1 : 0, sb, ib);
    prog_mv[pcnt-1][0] = mv(sa, ia, fu_o(fu), 0);
    prog_mv[pcnt-1][1] = mv(sb, ib, fu_t(fu), opc);
    new_ins();
    prog_mv[pcnt-1][0] = mv(fu_r(fu), 0, rf_w(dst / 16), dst % 16);
  endtask
  task automatic load(input opnd_t addr, input int dst);
    sock_t s;
    int si;
    new_ins();
    src_of(addr, 0, s, si);
    prog_mv[pcnt-1][0] = mv(s, si, fu_t(FU_LSU), OP_LD);
    new_ins();
    prog_mv[pcnt-1][0] = mv(fu_r(FU_LSU), 0, rf_w(dst / 16), dst % 16);
  endtask
  task automatic store(input opnd_t addr, input opnd_t data);
    sock_t sa, sd;
    int ia, id;
    new_ins();
    src_of(data, 0, sd, id);
    src_of(addr, (!addr.imm && !data.imm && addr.v / 16 == data.v / 16) ? 1 : 0, sa, ia);
    prog_mv[pcnt-1][0] = mv(sd, id, fu_o(FU_LSU), 0);
    prog_mv[pcnt-1][1] = mv(sa, ia, fu_t(FU_LSU), OP_ST);
  endtask
  task automatic copy(input opnd_t a, input int dst);
    sock_t s;
    int si;
    new_ins();
    src_of(a, 0, s, si);
    prog_mv[pcnt-1][0] = mv(s, si, rf_w(dst / 16), dst % 16);
  endtask
  task automatic cjump(input int target);
    new_ins();
    prog_imm[pcnt-1] = 32'(target);
    prog_mv[pcnt-1][0] = mv(CNTL_OUT, CN_IMM, CNTL_IN, CN_CJUMP);
  endtask
  task automatic jump(input int target);
    new_ins();
    prog_imm[pcnt-1] = 32'(target);
    prog_mv[pcnt-1][0] = mv(CNTL_OUT, CN_IMM, CNTL_IN, CN_JUMP);
  endtask
  task automatic cjumpn(input int target);
    new_ins();
    prog_imm[pcnt-1] = 32'(target);
    prog_mv[pcnt-1][0] = mv(CNTL_OUT, CN_IMM, CNTL_IN, CN_CJUMPN);
  endtask

  // register map: pointers and return address, exponent loop, multiplier
  localparam int PA = 0, PB = 1, PN = 2, PR = 3, RET = 4, WI = 5, EW = 6, BC = 7;
  localparam int RI = 8, RJ = 9, RC = 10, BI = 11, RM = 12, NP = 13, SRC = 14;
  localparam int X = 16, TA = 17, AJ = 18, TJ = 19, LO = 20, HI = 21, S1 = 22, S2 = 23, C1 = 24, C2 = 25, NJ = 26;
  int n_a, len0, n_b, n_ia, len1, n_ib, len2, n_ic, len_i, n_c, len_s, n_d, n_e, len_c;
  int mm, tail, n_calls = 0;

  task automatic jump_r(input int r);
    sock_t s;
    int si;
    new_ins();
    src_of(R(r), 0, s, si);
    prog_mv[pcnt-1][0] = mv(s, si, CNTL_IN, CN_JUMP);
  endtask
  task automatic call(input int target);
    copy(I(pcnt + 2), RET);
    jump(target);
    n_calls++;
  endtask
  task automatic mont(input int a, input int b, input int r);   // r = a*b/R mod modulus in PN
    copy(I(a), PA); copy(I(b), PB); copy(I(r), PR);
    call(mm);
  endtask

  // Montgomery multiplication subroutine: mem[PR] = mem[PA] * mem[PB] / R mod mem[PN]
  task automatic build_mm();
    int l0, li, lj1, lj2, ls, lc, p0;
    mm = pcnt;
    copy(I(0), RJ);
    l0 = pcnt;                                          // clear t[0..S+1]
    op(FU_ADD1, OP_ADD, R(RJ), I(TB), X); store(R(X), I(0));
    op(FU_ADD1, OP_ADD, R(RJ), I(1), RJ); op(FU_CMP, OP_LTU, R(RJ), I(S + 2), X);
    cjump(l0);
    len0 = pcnt - l0;
    copy(I(0), RI);
    n_b = 1;
    li = pcnt;                                          // outer loop over b[i]
    op(FU_ADD1, OP_ADD, R(RI), R(PB), X); load(R(X), BI);
    copy(I(0), RC); copy(I(0), RJ);
    n_ia = pcnt - li;
    lj1 = pcnt;                                         // t += a * b[i]
    op(FU_ADD1, OP_ADD, R(RJ), R(PA), X); load(R(X), AJ);
    op(FU_ADD1, OP_ADD, R(RJ), I(TB), TA); load(R(TA), TJ);
    op(FU_MUL, OP_MULLO, R(AJ), R(BI), LO); op(FU_MUL, OP_MULHI, R(AJ), R(BI), HI);
    op(FU_ADD0, OP_ADD, R(TJ), R(LO), S1); op(FU_CMP, OP_LTU, R(S1), R(LO), C1);
    op(FU_ADD0, OP_ADD, R(S1), R(RC), S2); op(FU_CMP, OP_LTU, R(S2), R(RC), C2);
    store(R(TA), R(S2));
    op(FU_ADD0, OP_ADD, R(HI), R(C1), RC); op(FU_ADD0, OP_ADD, R(RC), R(C2), RC);
    op(FU_ADD1, OP_ADD, R(RJ), I(1), RJ); op(FU_CMP, OP_LTU, R(RJ), I(S), X);
    cjump(lj1);
    len1 = pcnt - lj1;
    p0 = pcnt;
    load(I(TB + S), TJ); op(FU_ADD0, OP_ADD, R(TJ), R(RC), S1); op(FU_CMP, OP_LTU, R(S1), R(RC), C1);
    store(I(TB + S), R(S1)); store(I(TB + S + 1), R(C1));
    load(I(TB), TJ); op(FU_MUL, OP_MULLO, R(TJ), R(NP), RM);       // m = t[0] * n0'
    load(R(PN), NJ); op(FU_MUL, OP_MULLO, R(RM), R(NJ), LO); op(FU_MUL, OP_MULHI, R(RM), R(NJ), HI);
    op(FU_ADD0, OP_ADD, R(TJ), R(LO), S1); op(FU_CMP, OP_LTU, R(S1), R(LO), C1);
    op(FU_ADD0, OP_ADD, R(HI), R(C1), RC);
    copy(I(1), RJ);
    n_ib = pcnt - p0;
    lj2 = pcnt;                                         // t = (t + m * n) / 2^32
    op(FU_ADD1, OP_ADD, R(RJ), R(PN), X); load(R(X), NJ);
    op(FU_ADD1, OP_ADD, R(RJ), I(TB), TA); load(R(TA), TJ);
    op(FU_MUL, OP_MULLO, R(RM), R(NJ), LO); op(FU_MUL, OP_MULHI, R(RM), R(NJ), HI);
    op(FU_ADD0, OP_ADD, R(TJ), R(LO), S1); op(FU_CMP, OP_LTU, R(S1), R(LO), C1);
    op(FU_ADD0, OP_ADD, R(S1), R(RC), S2); op(FU_CMP, OP_LTU, R(S2), R(RC), C2);
    op(FU_ADD0, OP_SUB, R(TA), I(1), TA); store(R(TA), R(S2));
    op(FU_ADD0, OP_ADD, R(HI), R(C1), RC); op(FU_ADD0, OP_ADD, R(RC), R(C2), RC);
    op(FU_ADD1, OP_ADD, R(RJ), I(1), RJ); op(FU_CMP, OP_LTU, R(RJ), I(S), X);
    cjump(lj2);
    len2 = pcnt - lj2;
    p0 = pcnt;
    load(I(TB + S), TJ); op(FU_ADD0, OP_ADD, R(TJ), R(RC), S1); op(FU_CMP, OP_LTU, R(S1), R(RC), C1);
    store(I(TB + S - 1), R(S1));
    load(I(TB + S + 1), TJ); op(FU_ADD0, OP_ADD, R(TJ), R(C1), S1); store(I(TB + S), R(S1));
    op(FU_ADD1, OP_ADD, R(RI), I(1), RI); op(FU_CMP, OP_LTU, R(RI), I(S), X);
    cjump(li);
    n_ic = pcnt - p0;
    len_i = pcnt - li;
    tail = pcnt;
    copy(I(0), RC); copy(I(0), RJ);                     // u = t - n
    n_c = 2;
    ls = pcnt;
    op(FU_ADD1, OP_ADD, R(RJ), I(TB), X); load(R(X), TJ);
    op(FU_ADD1, OP_ADD, R(RJ), R(PN), X); load(R(X), NJ);
    op(FU_ADD0, OP_SUB, R(TJ), R(NJ), S1); op(FU_CMP, OP_LTU, R(TJ), R(NJ), C1);
    op(FU_ADD0, OP_SUB, R(S1), R(RC), S2); op(FU_CMP, OP_LTU, R(S1), R(RC), C2);
    op(FU_LOGIC, OP_OR, R(C1), R(C2), RC);
    op(FU_ADD1, OP_ADD, R(RJ), I(UB), X); store(R(X), R(S2));
    op(FU_ADD1, OP_ADD, R(RJ), I(1), RJ); op(FU_CMP, OP_LTU, R(RJ), I(S), X);
    cjump(ls);
    len_s = pcnt - ls;
    p0 = pcnt;
    load(I(TB + S), TJ); op(FU_CMP, OP_LTU, R(TJ), R(RC), X);   // final borrow
    copy(I(UB), SRC);
    n_d = pcnt - p0 + 1;
    cjumpn(pcnt + 2);                                   // no borrow: keep t - n
    copy(I(TB), SRC);                                   // borrow: keep t
    n_e = 1;
    copy(I(0), RJ);
    lc = pcnt;
    op(FU_ADD1, OP_ADD, R(RJ), R(SRC), X); load(R(X), TJ);
    op(FU_ADD1, OP_ADD, R(RJ), R(PR), X); store(R(X), R(TJ));
    op(FU_ADD1, OP_ADD, R(RJ), I(1), RJ); op(FU_CMP, OP_LTU, R(RJ), I(S), X);
    cjump(lc);
    len_c = pcnt - lc;
    jump_r(RET);
  endtask

  // TB[0..S] = a + b (S words and carry), then reduce below the modulus into r
  task automatic add_reduce(input int a, input int b, input int r);
    copy(I(0), RC);
    for (int j = 0; j < S; j++) begin
      load(I(a + j), TJ); load(I(b + j), NJ);
      op(FU_ADD0, OP_ADD, R(TJ), R(NJ), S1); op(FU_CMP, OP_LTU, R(S1), R(TJ), C1);
      op(FU_ADD0, OP_ADD, R(S1), R(RC), S2); op(FU_CMP, OP_LTU, R(S2), R(RC), C2);
      op(FU_LOGIC, OP_OR, R(C1), R(C2), RC);
      store(I(TB + j), R(S2));
    end
    store(I(TB + S), R(RC));
    copy(I(r), PR);
    call(tail);
  endtask

  // out = base^e mod p, base given in Montgomery form at XM
  task automatic modexp(input int e, input int r2, input int out);
    int lw, lb, skip_at;
    mont(ONE, r2, AM);                                           // Montgomery one
    copy(I(S - 1), WI);
    lw = pcnt;
    op(FU_ADD1, OP_ADD, R(WI), I(e), X); load(R(X), EW);
    copy(I(32), BC);
    lb = pcnt;
    mont(AM, AM, AM);
    op(FU_SHIFT, OP_SHR, R(EW), I(31), X); op(FU_CMP, OP_NE, R(X), I(0), X);
    skip_at = pcnt;
    cjumpn(0);
    mont(AM, XM, AM);
    prog_imm[skip_at] = 32'(pcnt);
    op(FU_SHIFT, OP_SHL, R(EW), I(1), EW);
    op(FU_ADD0, OP_SUB, R(BC), I(1), BC); op(FU_CMP, OP_NE, R(BC), I(0), X);
    cjump(lb);
    op(FU_ADD0, OP_SUB, R(WI), I(1), WI); op(FU_CMP, OP_GE, R(WI), I(0), X);
    cjump(lw);
    mont(AM, ONE, out);
  endtask

  task automatic build();
    int entry;
    pcnt = 0;
    jump(0);                                                     // to the main program
    build_mm();
    entry = pcnt;
    prog_imm[0] = 32'(entry);
    for (int h = 0; h < 2; h++) begin
      load(I(N0A + h), NP);
      copy(I(h == 0 ? PP : QQ), PN);
      mont(CB, h == 0 ? R2P : R2Q, T1);                          // c_low * R mod p
      mont(CB + S, h == 0 ? R3P : R3Q, T2);                      // c_high * R^2 mod p
      add_reduce(T1, T2, XM);                                    // c * R mod p
      modexp(h == 0 ? DPB : DQB, h == 0 ? R2P : R2Q, h == 0 ? M1 : M2);
    end
    load(I(N0A), NP); copy(I(PP), PN);
    copy(I(0), RC);                                              // DB = p - m2
    for (int j = 0; j < S; j++) begin
      load(I(PP + j), TJ); load(I(M2 + j), NJ);
      op(FU_ADD0, OP_SUB, R(TJ), R(NJ), S1); op(FU_CMP, OP_LTU, R(TJ), R(NJ), C1);
      op(FU_ADD0, OP_SUB, R(S1), R(RC), S2); op(FU_CMP, OP_LTU, R(S1), R(RC), C2);
      op(FU_LOGIC, OP_OR, R(C1), R(C2), RC);
      store(I(DB + j), R(S2));
    end
    add_reduce(M1, DB, DB);                                      // (m1 - m2) mod p
    mont(DB, QIB, HB);
    mont(HB, R2P, HB);                                           // h = (m1 - m2) qinv mod p
    for (int j = 0; j < S; j++) begin                            // s = m2, zero extended
      load(I(M2 + j), TJ); store(I(SB + j), R(TJ)); store(I(SB + S + j), I(0));
    end
    for (int i = 0; i < S; i++) begin                            // s += h * q
      load(I(HB + i), BI); copy(I(0), RC);
      for (int j = 0; j < S; j++) begin
        load(I(QQ + j), AJ); load(I(SB + i + j), TJ);
        op(FU_MUL, OP_MULLO, R(AJ), R(BI), LO); op(FU_MUL, OP_MULHI, R(AJ), R(BI), HI);
        op(FU_ADD0, OP_ADD, R(TJ), R(LO), S1); op(FU_CMP, OP_LTU, R(S1), R(LO), C1);
        op(FU_ADD0, OP_ADD, R(S1), R(RC), S2); op(FU_CMP, OP_LTU, R(S2), R(RC), C2);
        store(I(SB + i + j), R(S2));
        op(FU_ADD0, OP_ADD, R(HI), R(C1), RC); op(FU_ADD0, OP_ADD, R(RC), R(C2), RC);
      end
      store(I(SB + i + S), R(RC));
    end
    jump(pcnt);
  endtask

  // ------------------------------------------------------------ reference
  typedef logic [64*S*2-1:0] big_t;
  typedef logic signed [64*S*2:0] sbig_t;
  localparam big_t RR = big_t'(1) << (32 * S);

  task automatic host_wr(input int a, input logic [31:0] d);
    @(negedge clk); dm_we = 1; dm_addr = 16'(a); dm_wdata = d;
    @(negedge clk); dm_we = 0;
  endtask
  task automatic host_wr_big(input int a, input big_t v, input int words);
    for (int k = 0; k < words; k++) host_wr(a + k, v[32*k +: 32]);
  endtask
  function automatic big_t modexp_ref(big_t b, big_t e, big_t m);
    big_t r = 1;
    b = b % m;
    for (int i = 32 * S - 1; i >= 0; i--) begin
      r = (r * r) % m;
      if (e[i]) r = (r * b) % m;
    end
    return r;
  endfunction
  // inverse of a modulo m by the extended Euclidean algorithm, 0 if none
  function automatic big_t inv_mod(big_t a, big_t m);
    sbig_t r0 = sbig_t'(m), r1 = sbig_t'(a % m), t0 = 0, t1 = 1, qq, tmp;
    while (r1 != 0) begin
      qq = r0 / r1;
      tmp = r0 - qq * r1; r0 = r1; r1 = tmp;
      tmp = t0 - qq * t1; t0 = t1; t1 = tmp;
    end
    if (r0 != 1) return 0;
    if (t0 < 0) t0 += sbig_t'(m);
    return big_t'(t0);
  endfunction
  function automatic logic [31:0] n0_of(logic [31:0] n);
    logic [31:0] inv = 1;
    for (int k = 0; k < 5; k++) inv = inv * (32'd2 - n * inv);
    return -inv;
  endfunction
  function automatic big_t rand_words(int words);
    big_t v = 0;
    for (int k = 0; k < words; k++) v[32*k +: 32] = $urandom();
    return v;
  endfunction

  initial begin
    big_t p, q, c, dp, dq, qi, s, t;
    int cycles;
    build();
    $display("program: %0d instructions, %0d subroutine calls in the text", pcnt, n_calls);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < pcnt; k++) begin
      @(negedge clk); im_we = 1; im_addr = 10'(k); im_moves = prog_mv[k]; im_imm = prog_imm[k];
    end
    @(negedge clk); im_we = 0;
    host_wr_big(ONE, 1, S);
    for (int key = 0; key < 2; key++) begin
      do begin                                                   // odd p > q, coprime, full size
        p = rand_words(S); p[0] = 1; p[32*S-1] = 1;
        q = rand_words(S); q[0] = 1; q[32*S-1] = 1;
        if (q > p) begin t = p; p = q; q = t; end
        qi = (p == q) ? 0 : inv_mod(q, p);
      end while (qi == 0);
      c = rand_words(2 * S) % (p * q);
      dp = rand_words(S) % p;
      dq = rand_words(S) % q;
      host_wr_big(CB, c, 2 * S);
      host_wr_big(PP, p, S); host_wr_big(QQ, q, S);
      host_wr_big(DPB, dp, S); host_wr_big(DQB, dq, S); host_wr_big(QIB, qi, S);
      host_wr_big(R2P, (RR * RR) % p, S); host_wr_big(R3P, (((RR * RR) % p) * RR) % p, S);
      host_wr_big(R2Q, (RR * RR) % q, S); host_wr_big(R3Q, (((RR * RR) % q) * RR) % q, S);
      host_wr(N0A, n0_of(p[31:0])); host_wr(N0A + 1, n0_of(q[31:0]));
      @(negedge clk); run = 1;
      cycles = 0;
      while (pc != 10'(pcnt - 1) && cycles < 3000000) begin
        @(posedge clk); #1;
        cycles++;
      end
      check(int'(cycles < 3000000), 1, "program reaches its end");
      @(negedge clk); run = 0;
      s = 0;
      for (int k = 0; k < 2 * S; k++) begin
        dm_addr = 16'(SB + k);
        #1 s[32*k +: 32] = dm_rdata;
      end
      check(int'(s < p * q), 1, $sformatf("key %0d: signature below p*q", key));
      check(int'(s % p == modexp_ref(c, dp, p)), 1, $sformatf("key %0d: s = c^dp mod p", key));
      check(int'(s % q == modexp_ref(c, dq, q)), 1, $sformatf("key %0d: s = c^dq mod q", key));
      $display("key %0d: signature in %0d cycles", key, cycles);
    end
    check(int'(l_seg < l_simple), 1, "segmented active length below simple bus");
    $display("active bus length: segmented %0d, simple bus %0d (segment units), ratio %0.2f",
             l_seg, l_simple, real'(l_simple) / real'(l_seg));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
