// tb_rsa_workload: runs a 1024-bit Montgomery modular multiplication as a
// program on the processor at its default size. Modular multiplication is
// the step that an RSA-1024 signature repeats; multiplication is the key
// operation of that workload.
//
// The program, produced by a small code generator in this testbench (each
// operation = operand moves into a unit, then a move of the result into a
// register), implements the word-serial CIOS method with 32 words of 32 bits:
// for every word b[i] it adds a*b[i] into the accumulator t, then adds m*n
// with m = t[0]*n0' mod 2^32 and drops the low word. 64-bit partial products
// come from the multiplier's low and high results, carries from unsigned
// comparisons. A final conditional subtraction (multi-word subtract with
// borrow, then a conditional jump on the final borrow) brings the result
// below n, and a copy loop stores it.
//
// The result is checked against a reference computed here with full-width
// arithmetic, REDC(a*b) = (a*b + M*n) / 2^1024 with M = a*b*(-1/n) mod 2^1024,
// followed by the same conditional subtraction; and against the defining
// property result * 2^1024 = a*b (mod n). Two operand sets are run. The cycle
// count must equal the number of instructions the program executes.
module tb_rsa_workload;
  import tta_pkg::*;
  localparam int unsigned NBUS = NBUS_DEFAULT, W = 32;
  localparam int S = 32;  // words per operand
  localparam int AB = 'h000, BB = 'h040, NB = 'h080, TB = 'h0C0, UB = 'h100, RB = 'h180, N0P = 'h1F0;

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
    #20000000;
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

  // register map
  localparam int RI = 8, RJ = 9, RC = 10, BI = 11, RM = 12, NP = 13, SRC = 14;
  localparam int X = 16, TA = 17, AJ = 18, TJ = 19, LO = 20, HI = 21, S1 = 22, S2 = 23, C1 = 24, C2 = 25, NJ = 26;
  int n_a, len0, n_b, n_ia, len1, n_ib, len2, n_ic, len_i, n_c, len_s, n_d, n_e, len_c, n_f;

  task automatic build();
    int l0, li, lj1, lj2, ls, lc, p0;
    pcnt = 0;
    load(I(N0P), NP);
    copy(I(0), RJ);
    n_a = pcnt;
    l0 = pcnt;                                          // clear t[0..S+1]
    op(FU_ADD1, OP_ADD, R(RJ), I(TB), X); store(R(X), I(0));
    op(FU_ADD1, OP_ADD, R(RJ), I(1), RJ); op(FU_CMP, OP_LTU, R(RJ), I(S + 2), X);
    cjump(l0);
    len0 = pcnt - l0;
    copy(I(0), RI);
    n_b = 1;
    li = pcnt;                                          // outer loop over b[i]
    op(FU_ADD1, OP_ADD, R(RI), I(BB), X); load(R(X), BI);
    copy(I(0), RC); copy(I(0), RJ);
    n_ia = pcnt - li;
    lj1 = pcnt;                                         // t += a * b[i]
    op(FU_ADD1, OP_ADD, R(RJ), I(AB), X); load(R(X), AJ);
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
    load(I(NB), NJ); op(FU_MUL, OP_MULLO, R(RM), R(NJ), LO); op(FU_MUL, OP_MULHI, R(RM), R(NJ), HI);
    op(FU_ADD0, OP_ADD, R(TJ), R(LO), S1); op(FU_CMP, OP_LTU, R(S1), R(LO), C1);
    op(FU_ADD0, OP_ADD, R(HI), R(C1), RC);
    copy(I(1), RJ);
    n_ib = pcnt - p0;
    lj2 = pcnt;                                         // t = (t + m * n) / 2^32
    op(FU_ADD1, OP_ADD, R(RJ), I(NB), X); load(R(X), NJ);
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
    copy(I(0), RC); copy(I(0), RJ);                     // u = t - n
    n_c = 2;
    ls = pcnt;
    op(FU_ADD1, OP_ADD, R(RJ), I(TB), X); load(R(X), TJ);
    op(FU_ADD1, OP_ADD, R(RJ), I(NB), X); load(R(X), NJ);
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
    op(FU_ADD1, OP_ADD, R(RJ), I(RB), X); store(R(X), R(TJ));
    op(FU_ADD1, OP_ADD, R(RJ), I(1), RJ); op(FU_CMP, OP_LTU, R(RJ), I(S), X);
    cjump(lc);
    len_c = pcnt - lc;
    n_f = 1;
    jump(pcnt);
  endtask

  // ------------------------------------------------------------ reference
  typedef logic [2*32*S+31:0] wide_t;
  task automatic host_wr(input int a, input logic [31:0] d);
    @(negedge clk); dm_we = 1; dm_addr = 16'(a); dm_wdata = d;
    @(negedge clk); dm_we = 0;
  endtask

  // -1/n mod 2^1024 by Newton iteration
  function automatic wide_t neg_inv(input logic [32*S-1:0] n);
    wide_t inv, mask;
    mask = (wide_t'(1) << (32 * S)) - 1;
    inv = 1;
    for (int k = 0; k < 11; k++) inv = (inv * (wide_t'(2) - wide_t'(n) * inv)) & mask;
    return ((wide_t'(1) << (32 * S)) - inv) & mask;
  endfunction
  // Montgomery reduction of a*b before the final subtraction
  function automatic wide_t redc_raw(input logic [32*S-1:0] a, input logic [32*S-1:0] b,
                                     input logic [32*S-1:0] n);
    wide_t ab, mm, mask;
    mask = (wide_t'(1) << (32 * S)) - 1;
    ab = wide_t'(a) * wide_t'(b);
    mm = ((ab & mask) * neg_inv(n)) & mask;
    return (ab + mm * wide_t'(n)) >> (32 * S);
  endfunction

  int n_sub_taken = 0, n_sub_skipped = 0;

  task automatic run_mul(input logic [32*S-1:0] a, input logic [32*S-1:0] b, input logic [32*S-1:0] n,
                         input string name);
    wide_t ab, inv, traw, expv, lhs, rhs;
    logic [31:0] np;
    logic borrow;
    int cycles, expected;
    inv = neg_inv(n);
    np = inv[31:0];
    ab = wide_t'(a) * wide_t'(b);
    traw = redc_raw(a, b, n);
    borrow = traw < wide_t'(n);
    expv = borrow ? traw : traw - wide_t'(n);
    lhs = (expv << (32 * S)) % wide_t'(n);
    rhs = ab % wide_t'(n);
    check(int'(lhs == rhs), 1, {name, ": reference satisfies result*R = a*b mod n"});
    for (int k = 0; k < S; k++) begin
      host_wr(AB + k, a[32*k +: 32]);
      host_wr(BB + k, b[32*k +: 32]);
      host_wr(NB + k, n[32*k +: 32]);
    end
    host_wr(N0P, np);
    @(negedge clk); run = 1;
    cycles = 0;
    while (pc != 10'(pcnt - 1) && cycles < 1000000) begin
      @(posedge clk); #1;
      cycles++;
    end
    expected = 2 + n_a - 2 + (S + 2) * len0 + n_b + S * (n_ia + S * len1 + n_ib + (S - 1) * len2 + n_ic)
               + n_c + S * len_s + n_d + (borrow ? n_e : 0) + 1 + S * len_c;
    check(cycles, expected, {name, ": cycles"});
    @(negedge clk); run = 0;
    for (int k = 0; k < S; k++) begin
      dm_addr = 16'(RB + k);
      #1 check(dm_rdata, expv[32*k +: 32], $sformatf("%s: result word %0d", name, k));
    end
    if (borrow) n_sub_skipped++; else n_sub_taken++;
    $display("%s: %0d cycles, final subtraction %0s", name, cycles, borrow ? "skipped" : "taken");
  endtask

  function automatic logic [32*S-1:0] rand_wide();
    logic [32*S-1:0] v;
    for (int k = 0; k < S; k++) v[32*k +: 32] = $urandom();
    return v;
  endfunction

  initial begin
    logic [32*S-1:0] n, a, b;
    build();
    $display("program: %0d instructions", pcnt);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < pcnt; k++) begin
      @(negedge clk); im_we = 1; im_addr = 10'(k); im_moves = prog_mv[k]; im_imm = prog_imm[k];
    end
    @(negedge clk); im_we = 0;
    // set 0: random operands; set 1: operands picked so that the final
    // subtraction is needed (tried against the reference until one is found)
    for (int set = 0; set < 2; set++) begin
      int tries;
      tries = 0;
      do begin
        n = rand_wide();
        n[0] = 1'b1;
        n[32*S-1] = $urandom_range(0, 1);
        a = rand_wide() % n;
        b = rand_wide() % n;
        tries++;
      end while (set == 1 && redc_raw(a, b, n) < wide_t'(n) && tries < 500);
      run_mul(a, b, n, $sformatf("operand set %0d", set));
    end
    check(int'(n_sub_taken > 0 && n_sub_skipped > 0), 1, "final subtraction both taken and skipped");
    check(int'(l_seg < l_simple), 1, "segmented active length below simple bus");
    $display("active bus length: segmented %0d, simple bus %0d (segment units), ratio %0.2f",
             l_seg, l_simple, real'(l_simple) / real'(l_seg));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
