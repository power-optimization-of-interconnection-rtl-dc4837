// tb_aes_workload: AES-128 block encryption as a program on the processor at
// its default size, one of the symmetric-cipher workloads the segmented
// network was evaluated with.
//
// The program uses the usual table form of AES: each round output word is
// four table lookups, selected by one byte of each of four state words,
// XORed with a round-key word. Byte selection takes the shifter and the logic
// unit, the address an adder, the lookup the load/store unit. The last round
// looks up the S-box and shifts each byte into place. The testbench builds
// the S-box from its definition (inverse in GF(2^8) followed by the affine
// map), the four round tables from it, and the round keys by the standard key
// expansion, and writes them to data memory. The processor then encrypts
// NBLK consecutive blocks in place, looping over rounds and blocks.
// Checked: block 0 is the FIPS-197 example and must give its published
// ciphertext; every block against a byte-level reference model; the cycle
// count (one instruction per cycle).
module tb_aes_workload;
  import tta_pkg::*;
  localparam int unsigned NBUS = NBUS_DEFAULT, W = 32;
  localparam int NBLK = 16;
  localparam int TE = 'h1000, SBX = 'h1400, RKB = 'h1500, DB = 'h2000;

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

  // register map: state s0..s3, next state t0..t3, key and block pointers
  localparam int S0 = 0, T0 = 4, KP = 8, BP = 9;
  localparam int X = 16, Y = 17;
  int n_pre, len_a, len_r, len_b;

  // Y = table[byte of register s at bit position sh]
  task automatic lookup(input int s, input int sh, input int base);
    if (sh == 24) op(FU_SHIFT, OP_SHR, R(s), I(24), X);
    else begin
      if (sh != 0) op(FU_SHIFT, OP_SHR, R(s), I(sh), X);
      op(FU_LOGIC, OP_AND, R(sh != 0 ? X : s), I(32'hff), X);
    end
    op(FU_ADD1, OP_ADD, R(X), I(base), X);
    load(R(X), Y);
  endtask

  // t_c = rk[KP + c] ^ four lookups; last round uses the S-box
  task automatic round_body(input bit last);
    for (int c = 0; c < 4; c++) begin
      op(FU_ADD1, OP_ADD, R(KP), I(c), X); load(R(X), T0 + c);
      for (int k = 0; k < 4; k++) begin
        lookup(S0 + (c + k) % 4, 24 - 8 * k, last ? SBX : TE + 256 * k);
        if (last && k != 3) op(FU_SHIFT, OP_SHL, R(Y), I(24 - 8 * k), Y);
        op(FU_LOGIC, OP_XOR, R(T0 + c), R(Y), T0 + c);
      end
    end
  endtask

  task automatic build();
    int lb, lr, p0;
    pcnt = 0;
    copy(I(DB), BP);
    n_pre = pcnt;
    lb = pcnt;                                                   // block loop
    for (int c = 0; c < 4; c++) begin
      op(FU_ADD1, OP_ADD, R(BP), I(c), X); load(R(X), S0 + c);
      load(I(RKB + c), Y); op(FU_LOGIC, OP_XOR, R(S0 + c), R(Y), S0 + c);
    end
    copy(I(RKB + 4), KP);
    len_a = pcnt - lb;
    lr = pcnt;                                                   // rounds 1..9
    round_body(0);
    for (int c = 0; c < 4; c++) copy(R(T0 + c), S0 + c);
    op(FU_ADD0, OP_ADD, R(KP), I(4), KP); op(FU_CMP, OP_LTU, R(KP), I(RKB + 40), X);
    cjump(lr);
    len_r = pcnt - lr;
    p0 = pcnt;                                                   // round 10, store
    round_body(1);
    for (int c = 0; c < 4; c++) begin
      op(FU_ADD1, OP_ADD, R(BP), I(c), X); store(R(X), R(T0 + c));
    end
    op(FU_ADD0, OP_ADD, R(BP), I(4), BP); op(FU_CMP, OP_LTU, R(BP), I(DB + 4 * NBLK), X);
    cjump(lb);
    len_b = pcnt - p0;
    jump(pcnt);
  endtask

  // ------------------------------------------------------------ reference
  function automatic logic [7:0] xt(logic [7:0] a); return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00); endfunction
  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = xt(a);
    end
    return p;
  endfunction
  function automatic logic [7:0] sbox(logic [7:0] x);
    logic [7:0] inv = 8'h01, b;
    for (int i = 0; i < 254; i++) inv = gmul(inv, x);           // x^254 = x^-1, 0 -> 0
    if (x == 0) inv = 0;
    b = inv;
    for (int i = 1; i < 5; i++) b ^= (inv << i) | (inv >> (8 - i));
    return b ^ 8'h63;
  endfunction

  logic [7:0] sb [256];
  logic [31:0] rk [44];

  task automatic key_exp(input logic [7:0] key [16]);
    logic [31:0] t;
    logic [7:0] rc = 8'h01;
    for (int i = 0; i < 4; i++) rk[i] = {key[4*i], key[4*i+1], key[4*i+2], key[4*i+3]};
    for (int i = 4; i < 44; i++) begin
      t = rk[i-1];
      if (i % 4 == 0) begin
        t = {sb[t[23:16]], sb[t[15:8]], sb[t[7:0]], sb[t[31:24]]} ^ {rc, 24'h0};
        rc = xt(rc);
      end
      rk[i] = rk[i-4] ^ t;
    end
  endtask

  // byte-level cipher: state byte 4c+r is row r of column c
  task automatic encrypt(inout logic [31:0] w [4]);
    logic [7:0] st [16], tmp [16];
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) st[4*c+r] = w[c][31-8*r -: 8];
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) st[4*c+r] ^= rk[c][31-8*r -: 8];
    for (int n = 1; n <= 10; n++) begin
      for (int i = 0; i < 16; i++) st[i] = sb[st[i]];
      for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) tmp[4*c+r] = st[4*((c+r)%4)+r];
      st = tmp;
      if (n != 10)
        for (int c = 0; c < 4; c++) begin
          tmp[4*c]   = xt(st[4*c]) ^ gmul(st[4*c+1], 3) ^ st[4*c+2] ^ st[4*c+3];
          tmp[4*c+1] = st[4*c] ^ xt(st[4*c+1]) ^ gmul(st[4*c+2], 3) ^ st[4*c+3];
          tmp[4*c+2] = st[4*c] ^ st[4*c+1] ^ xt(st[4*c+2]) ^ gmul(st[4*c+3], 3);
          tmp[4*c+3] = gmul(st[4*c], 3) ^ st[4*c+1] ^ st[4*c+2] ^ xt(st[4*c+3]);
        end
      st = tmp;
      for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) st[4*c+r] ^= rk[4*n+c][31-8*r -: 8];
    end
    for (int c = 0; c < 4; c++) w[c] = {st[4*c], st[4*c+1], st[4*c+2], st[4*c+3]};
  endtask

  task automatic host_wr(input int a, input logic [31:0] d);
    @(negedge clk); dm_we = 1; dm_addr = 16'(a); dm_wdata = d;
    @(negedge clk); dm_we = 0;
  endtask

  localparam logic [31:0] FIPS_PT [4] = '{32'h00112233, 32'h44556677, 32'h8899aabb, 32'hccddeeff};
  localparam logic [31:0] FIPS_CT [4] = '{32'h69c4e0d8, 32'h6a7b0430, 32'hd8cdb780, 32'h70b4c55a};

  initial begin
    logic [7:0] key [16];
    logic [31:0] v [4];
    logic [31:0] pt [NBLK*4];
    logic [31:0] te0;
    int cycles, expected;
    for (int i = 0; i < 256; i++) sb[i] = sbox(8'(i));
    check(sb[0], 8'h63, "S-box entry 00");
    check(sb[8'h53], 8'hed, "S-box entry 53");
    for (int i = 0; i < 16; i++) key[i] = 8'(i);                // FIPS-197 example key
    key_exp(key);
    for (int k = 0; k < NBLK * 4; k++) pt[k] = (k < 4) ? FIPS_PT[k] : $urandom();
    build();
    $display("program: %0d instructions", pcnt);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < pcnt; k++) begin
      @(negedge clk); im_we = 1; im_addr = 10'(k); im_moves = prog_mv[k]; im_imm = prog_imm[k];
    end
    @(negedge clk); im_we = 0;
    // round table j holds, for byte x, the MixColumns column of S(x) rotated right by 8j
    for (int i = 0; i < 256; i++) begin
      te0 = {xt(sb[i]), sb[i], sb[i], xt(sb[i]) ^ sb[i]};
      for (int j = 0; j < 4; j++) host_wr(TE + 256 * j + i, (te0 >> (8 * j)) | (te0 << (32 - 8 * j)));
      host_wr(SBX + i, 32'(sb[i]));
    end
    for (int k = 0; k < 44; k++) host_wr(RKB + k, rk[k]);
    for (int k = 0; k < NBLK * 4; k++) host_wr(DB + k, pt[k]);
    @(negedge clk); run = 1;
    cycles = 0;
    while (pc != 10'(pcnt - 1) && cycles < 1000000) begin
      @(posedge clk); #1;
      cycles++;
    end
    expected = n_pre + NBLK * (len_a + 9 * len_r + len_b);
    check(cycles, expected, "cycles");
    @(negedge clk); run = 0;
    for (int blk = 0; blk < NBLK; blk++) begin
      for (int k = 0; k < 4; k++) v[k] = pt[4 * blk + k];
      encrypt(v);
      for (int k = 0; k < 4; k++) begin
        if (blk == 0) check(v[k], FIPS_CT[k], $sformatf("reference model, FIPS-197 word %0d", k));
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
