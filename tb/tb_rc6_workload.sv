// tb_rc6_workload: RC6 block encryption (32-bit words, 20 rounds, 16-byte
// key) as a program on the processor at its default size, one of the
// symmetric-cipher workloads the segmented network was evaluated with. Each
// round squares-and-rotates two words with the multiplier and the rotator,
// rotates by data-dependent amounts and adds round keys loaded from memory.
//
// The round keys S[0..43] are expanded by the testbench's reference model and
// written to data memory; the processor then encrypts NBLK consecutive
// 128-bit blocks in place, looping over blocks and rounds with conditional
// jumps. Checked: the reference model against the published all-zero test
// vector, every ciphertext word against the model, and the cycle count (one
// instruction per cycle).
module tb_rc6_workload;
  import tta_pkg::*;
  localparam int unsigned NBUS = NBUS_DEFAULT, W = 32;
  localparam int NBLK = 16;
  localparam int SB = 'h000, DB = 'h100;
  localparam logic [31:0] P32 = 32'hB7E15163, Q32 = 32'h9E3779B9;

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

  // register map: A..D, round-key pointer, block pointer, end pointers
  localparam int RA = 0, RB = 1, RC = 2, RD = 3, KP = 4, BP = 5, RK = 6;
  localparam int T = 16, U = 17, X = 18, Y = 19, K0 = 20;
  int n_pre, len_blk_a, len_r, len_blk_b, n_post;

  task automatic build();
    int lb, lr, p0;
    pcnt = 0;
    copy(I(DB), BP);
    n_pre = pcnt;
    lb = pcnt;                                                   // block loop
    load(R(BP), RA);
    op(FU_ADD1, OP_ADD, R(BP), I(1), X); load(R(X), RB);
    op(FU_ADD1, OP_ADD, R(BP), I(2), X); load(R(X), RC);
    op(FU_ADD1, OP_ADD, R(BP), I(3), X); load(R(X), RD);
    load(I(SB), K0); op(FU_ADD0, OP_ADD, R(RB), R(K0), RB);
    load(I(SB + 1), K0); op(FU_ADD0, OP_ADD, R(RD), R(K0), RD);
    copy(I(SB + 2), KP);
    len_blk_a = pcnt - lb;
    lr = pcnt;                                                   // round loop
    op(FU_ADD0, OP_ADD, R(RB), R(RB), T); op(FU_ADD1, OP_ADD, R(T), I(1), T);
    op(FU_MUL, OP_MULLO, R(RB), R(T), T); op(FU_SHIFT, OP_ROTL, R(T), I(5), T);
    op(FU_ADD0, OP_ADD, R(RD), R(RD), U); op(FU_ADD1, OP_ADD, R(U), I(1), U);
    op(FU_MUL, OP_MULLO, R(RD), R(U), U); op(FU_SHIFT, OP_ROTL, R(U), I(5), U);
    op(FU_LOGIC, OP_XOR, R(RA), R(T), X); op(FU_SHIFT, OP_ROTL, R(X), R(U), X);
    load(R(KP), K0); op(FU_ADD0, OP_ADD, R(X), R(K0), X);
    op(FU_LOGIC, OP_XOR, R(RC), R(U), Y); op(FU_SHIFT, OP_ROTL, R(Y), R(T), Y);
    op(FU_ADD1, OP_ADD, R(KP), I(1), RK); load(R(RK), K0); op(FU_ADD0, OP_ADD, R(Y), R(K0), Y);
    copy(R(RB), RA); copy(R(Y), RB); copy(R(RD), RC); copy(R(X), RD);   // (A,B,C,D) = (B,C',D,A')
    op(FU_ADD1, OP_ADD, R(KP), I(2), KP); op(FU_CMP, OP_LTU, R(KP), I(SB + 42), X);
    cjump(lr);
    len_r = pcnt - lr;
    p0 = pcnt;
    load(I(SB + 42), K0); op(FU_ADD0, OP_ADD, R(RA), R(K0), RA);
    load(I(SB + 43), K0); op(FU_ADD0, OP_ADD, R(RC), R(K0), RC);
    store(R(BP), R(RA));
    op(FU_ADD1, OP_ADD, R(BP), I(1), X); store(R(X), R(RB));
    op(FU_ADD1, OP_ADD, R(BP), I(2), X); store(R(X), R(RC));
    op(FU_ADD1, OP_ADD, R(BP), I(3), X); store(R(X), R(RD));
    op(FU_ADD1, OP_ADD, R(BP), I(4), BP); op(FU_CMP, OP_LTU, R(BP), I(DB + 4 * NBLK), X);
    cjump(lb);
    len_blk_b = pcnt - p0;
    n_post = 1;
    jump(pcnt);
  endtask

  // ------------------------------------------------------------ reference
  function automatic logic [31:0] rl(logic [31:0] x, logic [31:0] n);
    return (x << n[4:0]) | ((n[4:0] == 0) ? 32'h0 : (x >> (32 - n[4:0])));
  endfunction
  task automatic key_sched(input logic [31:0] key [4], output logic [31:0] s [44]);
    logic [31:0] l [4];
    logic [31:0] a, b;
    int i, j;
    for (int k = 0; k < 4; k++) l[k] = key[k];
    s[0] = P32;
    for (int k = 1; k < 44; k++) s[k] = s[k-1] + Q32;
    a = 0; b = 0; i = 0; j = 0;
    for (int k = 0; k < 132; k++) begin
      s[i] = rl(s[i] + a + b, 3); a = s[i];
      l[j] = rl(l[j] + a + b, a + b); b = l[j];
      i = (i + 1) % 44; j = (j + 1) % 4;
    end
  endtask
  task automatic encrypt(input logic [31:0] s [44], inout logic [31:0] v [4]);
    logic [31:0] a, b, c, d, t, u, x;
    a = v[0]; b = v[1] + s[0]; c = v[2]; d = v[3] + s[1];
    for (int i = 1; i <= 20; i++) begin
      t = rl(b * (2 * b + 1), 5);
      u = rl(d * (2 * d + 1), 5);
      a = rl(a ^ t, u) + s[2 * i];
      c = rl(c ^ u, t) + s[2 * i + 1];
      x = a; a = b; b = c; c = d; d = x;
    end
    v[0] = a + s[42]; v[1] = b; v[2] = c + s[43]; v[3] = d;
  endtask

  task automatic host_wr(input int a, input logic [31:0] d);
    @(negedge clk); dm_we = 1; dm_addr = 16'(a); dm_wdata = d;
    @(negedge clk); dm_we = 0;
  endtask

  initial begin
    logic [31:0] key [4];
    logic [31:0] s [44];
    logic [31:0] v [4];
    logic [31:0] pt [NBLK*4];
    int cycles, expected;
    // reference model against the published vector: zero key, zero plaintext
    for (int k = 0; k < 4; k++) begin key[k] = 0; v[k] = 0; end
    key_sched(key, s);
    encrypt(s, v);
    check(v[0], 32'h36a5c38f, "reference vector word 0");
    check(v[1], 32'h78f7b156, "reference vector word 1");
    check(v[2], 32'h4edf29c1, "reference vector word 2");
    check(v[3], 32'h1ea44898, "reference vector word 3");
    // random key and data; block 0 is all zero
    for (int k = 0; k < 4; k++) key[k] = $urandom();
    key_sched(key, s);
    for (int k = 0; k < NBLK * 4; k++) pt[k] = (k < 4) ? 0 : $urandom();
    build();
    $display("program: %0d instructions", pcnt);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < pcnt; k++) begin
      @(negedge clk); im_we = 1; im_addr = 10'(k); im_moves = prog_mv[k]; im_imm = prog_imm[k];
    end
    @(negedge clk); im_we = 0;
    for (int k = 0; k < 44; k++) host_wr(SB + k, s[k]);
    for (int k = 0; k < NBLK * 4; k++) host_wr(DB + k, pt[k]);
    @(negedge clk); run = 1;
    cycles = 0;
    while (pc != 10'(pcnt - 1) && cycles < 1000000) begin
      @(posedge clk); #1;
      cycles++;
    end
    expected = n_pre + NBLK * (len_blk_a + 20 * len_r + len_blk_b);
    check(cycles, expected, "cycles");
    @(negedge clk); run = 0;
    for (int blk = 0; blk < NBLK; blk++) begin
      for (int k = 0; k < 4; k++) v[k] = pt[4 * blk + k];
      encrypt(s, v);
      for (int k = 0; k < 4; k++) begin
        dm_addr = 16'(DB + 4 * blk + k);
        #1 check(dm_rdata, v[k], $sformatf("block %0d word %0d", blk, k));
      end
    end
    $display("%0d blocks: %0d cycles, %0d per block", NBLK, cycles, cycles / NBLK);
    check(int'(l_seg < l_simple), 1, "segmented active length below simple bus");
    $display("active bus length: segmented %0d, simple bus %0d (segment units), ratio %0.2f",
             l_seg, l_simple, real'(l_simple) / real'(l_seg));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
