// tb_sha256_workload: runs the SHA-256 compression of one 512-bit block as a
// program on the processor at its default size, the core of the security-hash
// workload the segmented network was evaluated with.
//
// A small code generator in this testbench turns each operation into moves:
// one instruction moves the two operands into a unit's operand and trigger
// sockets, the next moves the result into a register; loads, stores and
// register copies take one or two instructions. The program first expands
// the message schedule W[16..63] in a loop, then runs the 64 rounds in a
// second loop, adds the initial hash value and stores the digest. Both loops
// end with a comparison and a conditional jump.
//
// Two blocks are hashed: the padded message "abc", whose digest is the
// published test vector, and a random block checked against a reference model
// written in this testbench. The cycle count must equal the number of
// instructions the program executes (one per cycle). The active bus length of
// the segmented network is compared with that of a simple bus.
module tb_sha256_workload;
  import tta_pkg::*;
  localparam int unsigned NBUS = NBUS_DEFAULT, W = 32;
  localparam int KBASE = 'h100, WBASE = 'h200, HBASE = 'h300;

  localparam logic [31:0] KC [64] = '{
    32'h428a2f98, 32'h71374491, 32'hb5c0fbcf, 32'he9b5dba5, 32'h3956c25b, 32'h59f111f1, 32'h923f82a4, 32'hab1c5ed5,
    32'hd807aa98, 32'h12835b01, 32'h243185be, 32'h550c7dc3, 32'h72be5d74, 32'h80deb1fe, 32'h9bdc06a7, 32'hc19bf174,
    32'he49b69c1, 32'hefbe4786, 32'h0fc19dc6, 32'h240ca1cc, 32'h2de92c6f, 32'h4a7484aa, 32'h5cb0a9dc, 32'h76f988da,
    32'h983e5152, 32'ha831c66d, 32'hb00327c8, 32'hbf597fc7, 32'hc6e00bf3, 32'hd5a79147, 32'h06ca6351, 32'h14292967,
    32'h27b70a85, 32'h2e1b2138, 32'h4d2c6dfc, 32'h53380d13, 32'h650a7354, 32'h766a0abb, 32'h81c2c92e, 32'h92722c85,
    32'ha2bfe8a1, 32'ha81a664b, 32'hc24b8b70, 32'hc76c51a3, 32'hd192e819, 32'hd6990624, 32'hf40e3585, 32'h106aa070,
    32'h19a4c116, 32'h1e376c08, 32'h2748774c, 32'h34b0bcb5, 32'h391c0cb3, 32'h4ed8aa4a, 32'h5b9cca4f, 32'h682e6ff3,
    32'h748f82ee, 32'h78a5636f, 32'h84c87814, 32'h8cc70208, 32'h90befffa, 32'ha4506ceb, 32'hbef9a3f7, 32'hc67178f2};
  localparam logic [31:0] HI [8] = '{32'h6a09e667, 32'hbb67ae85, 32'h3c6ef372, 32'ha54ff53a,
                                      32'h510e527f, 32'h9b05688c, 32'h1f83d9ab, 32'h5be0cd19};
  localparam logic [31:0] ABC [8] = '{32'hba7816bf, 32'h8f01cfea, 32'h414140de, 32'h5dae2223,
                                       32'hb00361a3, 32'h96177a9c, 32'hb410ff61, 32'hf20015ad};

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
    #2000000;
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
  // rotr(x,a) ^ rotr(x,b) ^ (rotr(x,c) or x>>c) into dst, using t1 as scratch
  task automatic sigma(input int x, input int a, input int b, input int c, input logic last_rot,
                       input int dst, input int t1);
    op(FU_SHIFT, OP_ROTR, R(x), I(a), dst);
    op(FU_SHIFT, OP_ROTR, R(x), I(b), t1);
    op(FU_LOGIC, OP_XOR, R(dst), R(t1), dst);
    op(FU_SHIFT, last_rot ? OP_ROTR : OP_SHR, R(x), I(c), t1);
    op(FU_LOGIC, OP_XOR, R(dst), R(t1), dst);
  endtask

  // register map: a..h = 0..7, loop index = 8, scratch in the second file
  localparam int RA = 0, RB = 1, RC = 2, RD = 3, RE = 4, RF_ = 5, RG = 6, RH = 7, RI = 8;
  localparam int T0 = 16, T1 = 17, T2 = 18, T3 = 19, T4 = 20, T5 = 21, T6 = 22, T7 = 23;
  int n_pre, len_w, n_mid, len_r, n_post, l_w, l_r;

  task automatic build();
    pcnt = 0;
    // message schedule
    copy(I(16), RI);
    n_pre = pcnt;
    l_w = pcnt;
    op(FU_ADD1, OP_ADD, R(RI), I(WBASE - 2), T0);  load(R(T0), T1);
    sigma(T1, 17, 19, 10, 1'b0, T2, T3);
    op(FU_ADD1, OP_ADD, R(RI), I(WBASE - 15), T0); load(R(T0), T1);
    sigma(T1, 7, 18, 3, 1'b0, T4, T3);
    op(FU_ADD1, OP_ADD, R(RI), I(WBASE - 7), T0);  load(R(T0), T1);
    op(FU_ADD0, OP_ADD, R(T2), R(T1), T2);
    op(FU_ADD1, OP_ADD, R(RI), I(WBASE - 16), T0); load(R(T0), T1);
    op(FU_ADD0, OP_ADD, R(T2), R(T1), T2);
    op(FU_ADD0, OP_ADD, R(T2), R(T4), T2);
    op(FU_ADD1, OP_ADD, R(RI), I(WBASE), T0);
    store(R(T0), R(T2));
    op(FU_ADD1, OP_ADD, R(RI), I(1), RI);
    op(FU_CMP, OP_LTU, R(RI), I(64), T0);
    cjump(l_w);
    len_w = pcnt - l_w;
    // rounds
    for (int k = 0; k < 8; k++) copy(I(HI[k]), RA + k);
    copy(I(0), RI);
    n_mid = pcnt - l_w - len_w;
    l_r = pcnt;
    sigma(RE, 6, 11, 25, 1'b1, T1, T0);                         // S1
    op(FU_LOGIC, OP_AND, R(RE), R(RF_), T2);
    op(FU_LOGIC, OP_ANDN, R(RG), R(RE), T3);
    op(FU_LOGIC, OP_XOR, R(T2), R(T3), T2);                     // ch
    op(FU_ADD0, OP_ADD, R(RH), R(T1), T1);
    op(FU_ADD0, OP_ADD, R(T1), R(T2), T1);
    op(FU_ADD1, OP_ADD, R(RI), I(KBASE), T0); load(R(T0), T3);
    op(FU_ADD0, OP_ADD, R(T1), R(T3), T1);
    op(FU_ADD1, OP_ADD, R(RI), I(WBASE), T0); load(R(T0), T3);
    op(FU_ADD0, OP_ADD, R(T1), R(T3), T1);                      // T1
    sigma(RA, 2, 13, 22, 1'b1, T4, T0);                         // S0
    op(FU_LOGIC, OP_AND, R(RA), R(RB), T5);
    op(FU_LOGIC, OP_AND, R(RA), R(RC), T6);
    op(FU_LOGIC, OP_XOR, R(T5), R(T6), T5);
    op(FU_LOGIC, OP_AND, R(RB), R(RC), T6);
    op(FU_LOGIC, OP_XOR, R(T5), R(T6), T5);                     // maj
    op(FU_ADD0, OP_ADD, R(T4), R(T5), T4);                      // T2
    op(FU_ADD0, OP_ADD, R(RD), R(T1), T6);                      // new e
    op(FU_ADD0, OP_ADD, R(T1), R(T4), T7);                      // new a
    copy(R(RG), RH); copy(R(RF_), RG); copy(R(RE), RF_); copy(R(T6), RE);
    copy(R(RC), RD); copy(R(RB), RC); copy(R(RA), RB); copy(R(T7), RA);
    op(FU_ADD1, OP_ADD, R(RI), I(1), RI);
    op(FU_CMP, OP_LTU, R(RI), I(64), T0);
    cjump(l_r);
    len_r = pcnt - l_r;
    // digest
    for (int k = 0; k < 8; k++) begin
      op(FU_ADD0, OP_ADD, R(RA + k), I(HI[k]), T0);
      store(I(HBASE + k), R(T0));
    end
    n_post = pcnt - l_r - len_r;
    jump(pcnt);
  endtask

  // ------------------------------------------------------------ reference
  function automatic logic [31:0] rr(logic [31:0] x, int n); return (x >> n) | (x << (32 - n)); endfunction
  task automatic sha_ref(input logic [31:0] m [16], output logic [31:0] dg [8]);
    logic [31:0] w [64];
    logic [31:0] s [8];
    logic [31:0] t1, t2;
    for (int t = 0; t < 64; t++)
      w[t] = (t < 16) ? m[t] : (rr(w[t-2], 17) ^ rr(w[t-2], 19) ^ (w[t-2] >> 10)) + w[t-7] +
                                (rr(w[t-15], 7) ^ rr(w[t-15], 18) ^ (w[t-15] >> 3)) + w[t-16];
    for (int k = 0; k < 8; k++) s[k] = HI[k];
    for (int t = 0; t < 64; t++) begin
      t1 = s[7] + (rr(s[4], 6) ^ rr(s[4], 11) ^ rr(s[4], 25)) + ((s[4] & s[5]) ^ (~s[4] & s[6])) + KC[t] + w[t];
      t2 = (rr(s[0], 2) ^ rr(s[0], 13) ^ rr(s[0], 22)) + ((s[0] & s[1]) ^ (s[0] & s[2]) ^ (s[1] & s[2]));
      for (int k = 7; k > 0; k--) s[k] = s[k-1];
      s[4] = s[4] + t1;
      s[0] = t1 + t2;
    end
    for (int k = 0; k < 8; k++) dg[k] = s[k] + HI[k];
  endtask

  task automatic host_wr(input int a, input logic [31:0] d);
    @(negedge clk); dm_we = 1; dm_addr = 16'(a); dm_wdata = d;
    @(negedge clk); dm_we = 0;
  endtask

  task automatic run_block(input logic [31:0] m [16], input logic [31:0] exp [8], input string name);
    int cycles, expected;
    for (int t = 0; t < 16; t++) host_wr(WBASE + t, m[t]);
    @(negedge clk); run = 1;
    cycles = 0;
    while (pc != 10'(pcnt - 1) && cycles < 100000) begin
      @(posedge clk); #1;
      cycles++;
    end
    expected = n_pre + 48 * len_w + n_mid + 64 * len_r + n_post;
    check(cycles, expected, {name, ": cycles"});
    @(negedge clk); run = 0;
    for (int k = 0; k < 8; k++) begin
      dm_addr = 16'(HBASE + k);
      #1 check(dm_rdata, exp[k], $sformatf("%s: digest word %0d", name, k));
    end
    $display("%s: %0d cycles", name, cycles);
  endtask

  initial begin
    logic [31:0] m [16];
    logic [31:0] dg [8];
    build();
    $display("program: %0d instructions, schedule loop %0d, round loop %0d", pcnt, len_w, len_r);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < pcnt; a++) begin
      @(negedge clk); im_we = 1; im_addr = 10'(a); im_moves = prog_mv[a]; im_imm = prog_imm[a];
    end
    @(negedge clk); im_we = 0;
    for (int t = 0; t < 64; t++) host_wr(KBASE + t, KC[t]);
    // "abc"
    for (int t = 0; t < 16; t++) m[t] = 0;
    m[0] = 32'h61626380;
    m[15] = 32'h18;
    sha_ref(m, dg);
    for (int k = 0; k < 8; k++) check(dg[k], ABC[k], "reference model against test vector");
    run_block(m, ABC, "abc");
    // random block
    for (int t = 0; t < 16; t++) m[t] = $urandom();
    sha_ref(m, dg);
    run_block(m, dg, "random block");
    check(int'(l_seg < l_simple), 1, "segmented active length below simple bus");
    $display("active bus length: segmented %0d, simple bus %0d (segment units), ratio %0.2f",
             l_seg, l_simple, real'(l_simple) / real'(l_seg));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
