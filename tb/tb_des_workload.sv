// tb_des_workload: DES and triple DES (encrypt-decrypt-encrypt with three
// keys) as one program on the processor at its default size, two of the
// symmetric-cipher workloads the segmented network was evaluated with.
//
// The program uses the common table form of DES software. The initial and
// final permutations are done one input byte at a time: a table per byte
// position gives that byte's contribution to both output words. The round
// function rotates the right half so that each 6-bit group of the expansion
// lands in the top bits, shifts it down, XORs the subkey group and looks up a
// table that combines S-box and P permutation. The testbench builds all the
// tables from the standard bit tables of DES and computes the subkeys with
// the standard key schedule; for triple DES the middle key's subkeys are
// stored in reverse order, so one pass program serves both directions. The
// number of passes (1 or 3) is read from data memory.
// Checked: the reference model against a published DES example, triple DES
// with three equal keys against single DES, every block against the
// reference model, and the cycle count of both runs.
module tb_des_workload;
  import tta_pkg::*;
  localparam int unsigned NBUS = NBUS_DEFAULT, W = 32;
  localparam int NBLK = 4;
  localparam int IPB = 'h0000, FPB = 'h1000, SPB = 'h2000, KB = 'h2200, NPA = 'h2400, DB = 'h3000;

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

  // ------------------------------------------------------------ DES tables
  // Bit numbers count from 1 at the most significant bit, as in the standard.
  localparam int PC1 [56] = '{57, 49, 41, 33, 25, 17, 9, 1, 58, 50, 42, 34, 26, 18,
                              10, 2, 59, 51, 43, 35, 27, 19, 11, 3, 60, 52, 44, 36,
                              63, 55, 47, 39, 31, 23, 15, 7, 62, 54, 46, 38, 30, 22,
                              14, 6, 61, 53, 45, 37, 29, 21, 13, 5, 28, 20, 12, 4};
  localparam int PC2 [48] = '{14, 17, 11, 24, 1, 5, 3, 28, 15, 6, 21, 10,
                              23, 19, 12, 4, 26, 8, 16, 7, 27, 20, 13, 2,
                              41, 52, 31, 37, 47, 55, 30, 40, 51, 45, 33, 48,
                              44, 49, 39, 56, 34, 53, 46, 42, 50, 36, 29, 32};
  localparam int SHIFTS [16] = '{1, 1, 2, 2, 2, 2, 2, 2, 1, 2, 2, 2, 2, 2, 2, 1};
  localparam int PERM [32] = '{16, 7, 20, 21, 29, 12, 28, 17, 1, 15, 23, 26, 5, 18, 31, 10,
                               2, 8, 24, 14, 32, 27, 3, 9, 19, 13, 30, 6, 22, 11, 4, 25};
  localparam logic [3:0] SBOX [8][64] = '{
    '{14, 4, 13, 1, 2, 15, 11, 8, 3, 10, 6, 12, 5, 9, 0, 7,  0, 15, 7, 4, 14, 2, 13, 1, 10, 6, 12, 11, 9, 5, 3, 8,
      4, 1, 14, 8, 13, 6, 2, 11, 15, 12, 9, 7, 3, 10, 5, 0,  15, 12, 8, 2, 4, 9, 1, 7, 5, 11, 3, 14, 10, 0, 6, 13},
    '{15, 1, 8, 14, 6, 11, 3, 4, 9, 7, 2, 13, 12, 0, 5, 10,  3, 13, 4, 7, 15, 2, 8, 14, 12, 0, 1, 10, 6, 9, 11, 5,
      0, 14, 7, 11, 10, 4, 13, 1, 5, 8, 12, 6, 9, 3, 2, 15,  13, 8, 10, 1, 3, 15, 4, 2, 11, 6, 7, 12, 0, 5, 14, 9},
    '{10, 0, 9, 14, 6, 3, 15, 5, 1, 13, 12, 7, 11, 4, 2, 8,  13, 7, 0, 9, 3, 4, 6, 10, 2, 8, 5, 14, 12, 11, 15, 1,
      13, 6, 4, 9, 8, 15, 3, 0, 11, 1, 2, 12, 5, 10, 14, 7,  1, 10, 13, 0, 6, 9, 8, 7, 4, 15, 14, 3, 11, 5, 2, 12},
    '{7, 13, 14, 3, 0, 6, 9, 10, 1, 2, 8, 5, 11, 12, 4, 15,  13, 8, 11, 5, 6, 15, 0, 3, 4, 7, 2, 12, 1, 10, 14, 9,
      10, 6, 9, 0, 12, 11, 7, 13, 15, 1, 3, 14, 5, 2, 8, 4,  3, 15, 0, 6, 10, 1, 13, 8, 9, 4, 5, 11, 12, 7, 2, 14},
    '{2, 12, 4, 1, 7, 10, 11, 6, 8, 5, 3, 15, 13, 0, 14, 9,  14, 11, 2, 12, 4, 7, 13, 1, 5, 0, 15, 10, 3, 9, 8, 6,
      4, 2, 1, 11, 10, 13, 7, 8, 15, 9, 12, 5, 6, 3, 0, 14,  11, 8, 12, 7, 1, 14, 2, 13, 6, 15, 0, 9, 10, 4, 5, 3},
    '{12, 1, 10, 15, 9, 2, 6, 8, 0, 13, 3, 4, 14, 7, 5, 11,  10, 15, 4, 2, 7, 12, 9, 5, 6, 1, 13, 14, 0, 11, 3, 8,
      9, 14, 15, 5, 2, 8, 12, 3, 7, 0, 4, 10, 1, 13, 11, 6,  4, 3, 2, 12, 9, 5, 15, 10, 11, 14, 1, 7, 6, 0, 8, 13},
    '{4, 11, 2, 14, 15, 0, 8, 13, 3, 12, 9, 7, 5, 10, 6, 1,  13, 0, 11, 7, 4, 9, 1, 10, 14, 3, 5, 12, 2, 15, 8, 6,
      1, 4, 11, 13, 12, 3, 7, 14, 10, 15, 6, 8, 0, 5, 9, 2,  6, 11, 13, 8, 1, 4, 10, 7, 9, 5, 0, 15, 14, 2, 3, 12},
    '{13, 2, 8, 4, 6, 15, 11, 1, 10, 9, 3, 14, 5, 0, 12, 7,  1, 15, 13, 8, 10, 3, 7, 4, 12, 5, 6, 11, 0, 14, 9, 2,
      7, 11, 4, 1, 9, 12, 14, 2, 0, 6, 10, 13, 15, 3, 5, 8,  2, 1, 14, 7, 4, 10, 8, 13, 15, 12, 9, 0, 3, 5, 6, 11}};

  // initial permutation: output bit i takes input bit ip(i); rows of 8 run
  // over input bits 58, 60, 62, 64, 57, 59, 61, 63 downward in steps of 8
  function automatic int ip(int i);
    int r = (i - 1) / 8, c = (i - 1) % 8;
    return (r < 4 ? 58 + 2 * r : 57 + 2 * (r - 4)) - 8 * c;
  endfunction
  function automatic logic bit64(logic [63:0] x, int i); return x[64 - i]; endfunction
  function automatic logic [63:0] perm_ip(logic [63:0] x);
    logic [63:0] y;
    for (int i = 1; i <= 64; i++) y[64 - i] = bit64(x, ip(i));
    return y;
  endfunction
  function automatic logic [63:0] perm_fp(logic [63:0] x);           // inverse of ip
    logic [63:0] y;
    for (int i = 1; i <= 64; i++) y[64 - ip(i)] = bit64(x, i);
    return y;
  endfunction
  function automatic logic [3:0] sbox(int g, logic [5:0] b);
    return SBOX[g][{b[5], b[0], b[4:1]}];
  endfunction
  // P applied to a word holding S-box output g in bits 4g+1..4g+4
  function automatic logic [31:0] perm_p(logic [31:0] x);
    logic [31:0] y;
    for (int i = 1; i <= 32; i++) y[32 - i] = x[32 - PERM[i - 1]];
    return y;
  endfunction
  function automatic logic [31:0] f_ref(logic [31:0] r, logic [47:0] k);
    logic [47:0] e;
    logic [31:0] s;
    for (int i = 1; i <= 48; i++) begin                         // expansion
      int g = (i - 1) / 6, j = (i - 1) % 6;
      int b = 4 * g + j;                                         // 0 .. 33, wraps
      b = (b == 0) ? 32 : (b == 33 ? 1 : b);
      e[48 - i] = r[32 - b];
    end
    e ^= k;
    for (int g = 0; g < 8; g++) s[31 - 4 * g -: 4] = sbox(g, e[47 - 6 * g -: 6]);
    return perm_p(s);
  endfunction
  task automatic key_sched(input logic [63:0] key, output logic [47:0] ks [16]);
    logic [27:0] c, d;
    logic [55:0] cd;
    for (int i = 1; i <= 56; i++) cd[56 - i] = bit64(key, PC1[i - 1]);
    c = cd[55:28]; d = cd[27:0];
    for (int n = 0; n < 16; n++) begin
      for (int s = 0; s < SHIFTS[n]; s++) begin
        c = {c[26:0], c[27]};
        d = {d[26:0], d[27]};
      end
      cd = {c, d};
      for (int i = 1; i <= 48; i++) ks[n][48 - i] = cd[56 - PC2[i - 1]];
    end
  endtask
  function automatic logic [63:0] des_ref(logic [63:0] x, logic [47:0] ks [16], bit dec);
    logic [31:0] l, r, t;
    x = perm_ip(x);
    l = x[63:32]; r = x[31:0];
    for (int n = 0; n < 16; n++) begin
      t = r;
      r = l ^ f_ref(r, ks[dec ? 15 - n : n]);
      l = t;
    end
    return perm_fp({r, l});
  endfunction

  // ------------------------------------------------------------ program
  localparam int L = 0, RR = 1, ACC = 2, KP = 3, BP = 4, PS = 5, HI = 6, LO = 7, RC = 8, NP = 9;
  localparam int X = 16, Y = 17, Z = 18;
  int n_pre, len_a, len_p1, len_r, len_p2, len_b;

  // byte p (0..7) of the pair (w0, w1), most significant first, into X
  task automatic byte_of(input int w0, input int w1, input int p);
    int s = (p < 4) ? w0 : w1, sh = 24 - 8 * (p % 4);
    if (sh == 24) op(FU_SHIFT, OP_SHR, R(s), I(24), X);
    else begin
      if (sh != 0) op(FU_SHIFT, OP_SHR, R(s), I(sh), X);
      op(FU_LOGIC, OP_AND, R(sh != 0 ? X : s), I(32'hff), X);
    end
  endtask
  // (o0, o1) = table permutation at base of the pair (w0, w1)
  task automatic permute(input int w0, input int w1, input int base, input int o0, input int o1);
    copy(I(0), o0); copy(I(0), o1);
    for (int p = 0; p < 8; p++) begin
      byte_of(w0, w1, p);
      op(FU_ADD1, OP_ADD, R(X), I(base + 512 * p), X); load(R(X), Y);
      op(FU_LOGIC, OP_XOR, R(o0), R(Y), o0);
      op(FU_ADD1, OP_ADD, R(X), I(256), X); load(R(X), Y);
      op(FU_LOGIC, OP_XOR, R(o1), R(Y), o1);
    end
  endtask

  task automatic build();
    int lb, lp, lr, p0, b0;
    pcnt = 0;
    copy(I(DB), BP);
    load(I(NPA), NP);
    n_pre = pcnt;
    lb = pcnt;                                                   // block loop
    load(R(BP), HI); op(FU_ADD1, OP_ADD, R(BP), I(1), X); load(R(X), LO);
    copy(I(KB), KP); copy(I(0), PS);
    len_a = pcnt - lb;
    lp = pcnt;                                                   // pass loop
    permute(HI, LO, IPB, L, RR);
    copy(I(0), RC);
    len_p1 = pcnt - lp;
    lr = pcnt;                                                   // 16 rounds
    copy(R(L), ACC);
    for (int g = 0; g < 8; g++) begin
      op(FU_SHIFT, OP_ROTL, R(RR), I((4 * g + 31) % 32), X);
      op(FU_SHIFT, OP_SHR, R(X), I(26), X);
      op(FU_ADD0, OP_ADD, R(KP), I(g), Z); load(R(Z), Z);
      op(FU_LOGIC, OP_XOR, R(X), R(Z), X);
      op(FU_ADD1, OP_ADD, R(X), I(SPB + 64 * g), X); load(R(X), Y);
      op(FU_LOGIC, OP_XOR, R(ACC), R(Y), ACC);
    end
    copy(R(RR), L); copy(R(ACC), RR);
    op(FU_ADD0, OP_ADD, R(KP), I(8), KP);
    op(FU_ADD1, OP_ADD, R(RC), I(1), RC); op(FU_CMP, OP_LTU, R(RC), I(16), X);
    cjump(lr);
    len_r = pcnt - lr;
    p0 = pcnt;
    permute(RR, L, FPB, HI, LO);                                 // halves swapped
    op(FU_ADD1, OP_ADD, R(PS), I(1), PS); op(FU_CMP, OP_LTU, R(PS), R(NP), X);
    cjump(lp);
    len_p2 = pcnt - p0;
    b0 = pcnt;
    store(R(BP), R(HI)); op(FU_ADD1, OP_ADD, R(BP), I(1), X); store(R(X), R(LO));
    op(FU_ADD1, OP_ADD, R(BP), I(2), BP); op(FU_CMP, OP_LTU, R(BP), I(DB + 2 * NBLK), X);
    cjump(lb);
    len_b = pcnt - b0;
    jump(pcnt);
  endtask

  task automatic host_wr(input int a, input logic [31:0] d);
    @(negedge clk); dm_we = 1; dm_addr = 16'(a); dm_wdata = d;
    @(negedge clk); dm_we = 0;
  endtask

  task automatic write_keys(input logic [47:0] ks [16], input int pass, input bit rev);
    logic [47:0] k;
    for (int n = 0; n < 16; n++) begin
      k = ks[rev ? 15 - n : n];
      for (int g = 0; g < 8; g++) host_wr(KB + 128 * pass + 8 * n + g, 32'(k[47 - 6 * g -: 6]));
    end
  endtask

  // run the loaded program over NBLK blocks with np passes, check against exp
  task automatic run_blocks(input logic [63:0] pt [NBLK], input logic [63:0] exp [NBLK],
                            input int np, input string name);
    int cycles, expected;
    host_wr(NPA, np);
    for (int b = 0; b < NBLK; b++) begin
      host_wr(DB + 2 * b, pt[b][63:32]);
      host_wr(DB + 2 * b + 1, pt[b][31:0]);
    end
    @(negedge clk); run = 1;
    cycles = 0;
    while (pc != 10'(pcnt - 1) && cycles < 1000000) begin
      @(posedge clk); #1;
      cycles++;
    end
    expected = n_pre + NBLK * (len_a + np * (len_p1 + 16 * len_r + len_p2) + len_b);
    check(cycles, expected, {name, ": cycles"});
    @(negedge clk); run = 0;
    for (int b = 0; b < NBLK; b++) begin
      dm_addr = 16'(DB + 2 * b);
      #1 check(dm_rdata, exp[b][63:32], $sformatf("%s: block %0d high word", name, b));
      dm_addr = 16'(DB + 2 * b + 1);
      #1 check(dm_rdata, exp[b][31:0], $sformatf("%s: block %0d low word", name, b));
    end
    $display("%s: %0d blocks, %0d cycles, %0d per block", name, NBLK, cycles, cycles / NBLK);
  endtask

  initial begin
    logic [47:0] k1 [16], k2 [16], k3 [16];
    logic [63:0] pt [NBLK], ct [NBLK], v;
    logic [63:0] x;
    logic [31:0] w;
    // reference model against the published example
    key_sched(64'h133457799BBCDFF1, k1);
    check(64'(des_ref(64'h0123456789ABCDEF, k1, 0)), 64'h85E813540F0AB405, "reference model, DES example");
    check(64'(des_ref(64'h85E813540F0AB405, k1, 1)), 64'h0123456789ABCDEF, "reference model, DES decryption");
    build();
    $display("program: %0d instructions", pcnt);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < pcnt; k++) begin
      @(negedge clk); im_we = 1; im_addr = 10'(k); im_moves = prog_mv[k]; im_imm = prog_imm[k];
    end
    @(negedge clk); im_we = 0;
    // permutation tables: entry v of byte position p is the permutation of a
    // block holding v at byte p and zeros elsewhere
    for (int p = 0; p < 8; p++)
      for (int v = 0; v < 256; v++) begin
        x = perm_ip(64'(v) << (56 - 8 * p));
        host_wr(IPB + 512 * p + v, x[63:32]); host_wr(IPB + 512 * p + 256 + v, x[31:0]);
        x = perm_fp(64'(v) << (56 - 8 * p));
        host_wr(FPB + 512 * p + v, x[63:32]); host_wr(FPB + 512 * p + 256 + v, x[31:0]);
      end
    // S-box g followed by P, for every 6-bit input
    for (int g = 0; g < 8; g++)
      for (int b = 0; b < 64; b++) begin
        w = 32'(sbox(g, 6'(b))) << (28 - 4 * g);
        host_wr(SPB + 64 * g + b, perm_p(w));
      end
    // DES: block 0 is the published example
    write_keys(k1, 0, 0);
    for (int b = 0; b < NBLK; b++) begin
      pt[b] = (b == 0) ? 64'h0123456789ABCDEF : {$urandom(), $urandom()};
      ct[b] = des_ref(pt[b], k1, 0);
    end
    run_blocks(pt, ct, 1, "DES");
    // triple DES with three equal keys equals single DES
    write_keys(k1, 1, 1);
    write_keys(k1, 2, 0);
    run_blocks(pt, ct, 3, "3DES, equal keys");
    // triple DES with three random keys
    key_sched({$urandom(), $urandom()}, k1);
    key_sched({$urandom(), $urandom()}, k2);
    key_sched({$urandom(), $urandom()}, k3);
    write_keys(k1, 0, 0);
    write_keys(k2, 1, 1);
    write_keys(k3, 2, 0);
    for (int b = 0; b < NBLK; b++) begin
      pt[b] = {$urandom(), $urandom()};
      v = des_ref(pt[b], k1, 0);
      v = des_ref(v, k2, 1);
      ct[b] = des_ref(v, k3, 0);
    end
    run_blocks(pt, ct, 3, "3DES");
    check(int'(l_seg < l_simple), 1, "segmented active length below simple bus");
    $display("active bus length: segmented %0d, simple bus %0d (segment units), ratio %0.2f",
             l_seg, l_simple, real'(l_simple) / real'(l_seg));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
