// tb_sha1_workload: SHA-1 compression of one 512-bit block as a program on
// the processor at its default size (part of the security-hash workload).
// The program expands the message schedule W[16..79] in a loop, then runs the
// 80 rounds as four loops of 20, one per round function (choose, parity,
// majority, parity) and constant, adds the initial value and stores the
// digest. Checked: the padded message "abc" against its published digest, a
// random block against a reference model, and the cycle count.
module tb_sha1_workload;
  import tta_pkg::*;
  localparam int unsigned NBUS = NBUS_DEFAULT, W = 32;
  localparam int WBASE = 'h200, HBASE = 'h300;
  localparam logic [31:0] HI [5] = '{32'h67452301, 32'hEFCDAB89, 32'h98BADCFE, 32'h10325476, 32'hC3D2E1F0};
  localparam logic [31:0] KR [4] = '{32'h5A827999, 32'h6ED9EBA1, 32'h8F1BBCDC, 32'hCA62C1D6};
  localparam logic [31:0] ABC [5] = '{32'ha9993e36, 32'h4706816a, 32'hba3e2571, 32'h7850c26c, 32'h9cd0d89d};

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

  localparam int RA = 0, RB = 1, RC = 2, RD = 3, RE = 4, RI = 8;
  localparam int T0 = 16, T1 = 17, T2 = 18, T3 = 19;
  int n_pre, len_w, n_mid [4], len_r [4], n_post;

  task automatic build();
    int l, p0;
    pcnt = 0;
    copy(I(WBASE + 16), RI);
    n_pre = pcnt;
    l = pcnt;                                                    // schedule
    op(FU_ADD1, OP_SUB, R(RI), I(3), T0); load(R(T0), T1);
    op(FU_ADD1, OP_SUB, R(RI), I(8), T0); load(R(T0), T2);
    op(FU_LOGIC, OP_XOR, R(T1), R(T2), T1);
    op(FU_ADD1, OP_SUB, R(RI), I(14), T0); load(R(T0), T2);
    op(FU_LOGIC, OP_XOR, R(T1), R(T2), T1);
    op(FU_ADD1, OP_SUB, R(RI), I(16), T0); load(R(T0), T2);
    op(FU_LOGIC, OP_XOR, R(T1), R(T2), T1);
    op(FU_SHIFT, OP_ROTL, R(T1), I(1), T1);
    store(R(RI), R(T1));
    op(FU_ADD1, OP_ADD, R(RI), I(1), RI); op(FU_CMP, OP_LTU, R(RI), I(WBASE + 80), T0);
    cjump(l);
    len_w = pcnt - l;
    for (int r = 0; r < 4; r++) begin
      p0 = pcnt;
      if (r == 0) begin
        for (int k = 0; k < 5; k++) copy(I(HI[k]), RA + k);
        copy(I(WBASE), RI);
      end
      n_mid[r] = pcnt - p0;
      l = pcnt;
      case (r)                                                   // round function into T1
        0: begin
          op(FU_LOGIC, OP_AND, R(RB), R(RC), T1);
          op(FU_LOGIC, OP_ANDN, R(RD), R(RB), T2);
          op(FU_LOGIC, OP_OR, R(T1), R(T2), T1);
        end
        2: begin
          op(FU_LOGIC, OP_AND, R(RB), R(RC), T1);
          op(FU_LOGIC, OP_AND, R(RB), R(RD), T2);
          op(FU_LOGIC, OP_OR, R(T1), R(T2), T1);
          op(FU_LOGIC, OP_AND, R(RC), R(RD), T2);
          op(FU_LOGIC, OP_OR, R(T1), R(T2), T1);
        end
        default: begin
          op(FU_LOGIC, OP_XOR, R(RB), R(RC), T1);
          op(FU_LOGIC, OP_XOR, R(T1), R(RD), T1);
        end
      endcase
      op(FU_SHIFT, OP_ROTL, R(RA), I(5), T2);
      op(FU_ADD0, OP_ADD, R(T1), R(T2), T1);
      op(FU_ADD0, OP_ADD, R(T1), R(RE), T1);
      op(FU_ADD0, OP_ADD, R(T1), I(KR[r]), T1);
      load(R(RI), T3);
      op(FU_ADD0, OP_ADD, R(T1), R(T3), T1);
      copy(R(RD), RE); copy(R(RC), RD);
      op(FU_SHIFT, OP_ROTL, R(RB), I(30), RC);
      copy(R(RA), RB); copy(R(T1), RA);
      op(FU_ADD1, OP_ADD, R(RI), I(1), RI); op(FU_CMP, OP_LTU, R(RI), I(WBASE + 20 * (r + 1)), T0);
      cjump(l);
      len_r[r] = pcnt - l;
    end
    p0 = pcnt;
    for (int k = 0; k < 5; k++) begin
      op(FU_ADD0, OP_ADD, R(RA + k), I(HI[k]), T0);
      store(I(HBASE + k), R(T0));
    end
    n_post = pcnt - p0;
    jump(pcnt);
  endtask

  function automatic logic [31:0] rl(logic [31:0] x, int n); return (x << n) | (x >> (32 - n)); endfunction
  task automatic sha1_ref(input logic [31:0] m [16], output logic [31:0] dg [5]);
    logic [31:0] w [80];
    logic [31:0] a, b, c, d, e, f, t;
    for (int i = 0; i < 80; i++) w[i] = (i < 16) ? m[i] : rl(w[i-3] ^ w[i-8] ^ w[i-14] ^ w[i-16], 1);
    a = HI[0]; b = HI[1]; c = HI[2]; d = HI[3]; e = HI[4];
    for (int i = 0; i < 80; i++) begin
      if (i < 20) f = (b & c) | (~b & d);
      else if (i < 40 || i >= 60) f = b ^ c ^ d;
      else f = (b & c) | (b & d) | (c & d);
      t = rl(a, 5) + f + e + KR[i / 20] + w[i];
      e = d; d = c; c = rl(b, 30); b = a; a = t;
    end
    dg[0] = a + HI[0]; dg[1] = b + HI[1]; dg[2] = c + HI[2]; dg[3] = d + HI[3]; dg[4] = e + HI[4];
  endtask

  task automatic host_wr(input int a, input logic [31:0] d);
    @(negedge clk); dm_we = 1; dm_addr = 16'(a); dm_wdata = d;
    @(negedge clk); dm_we = 0;
  endtask

  task automatic run_block(input logic [31:0] m [16], input logic [31:0] exp [5], input string name);
    int cycles, expected;
    for (int t = 0; t < 16; t++) host_wr(WBASE + t, m[t]);
    @(negedge clk); run = 1;
    cycles = 0;
    while (pc != 10'(pcnt - 1) && cycles < 100000) begin
      @(posedge clk); #1;
      cycles++;
    end
    expected = n_pre + 64 * len_w + n_post;
    for (int r = 0; r < 4; r++) expected += n_mid[r] + 20 * len_r[r];
    check(cycles, expected, {name, ": cycles"});
    @(negedge clk); run = 0;
    for (int k = 0; k < 5; k++) begin
      dm_addr = 16'(HBASE + k);
      #1 check(dm_rdata, exp[k], $sformatf("%s: digest word %0d", name, k));
    end
    $display("%s: %0d cycles", name, cycles);
  endtask

  initial begin
    logic [31:0] m [16];
    logic [31:0] dg [5];
    build();
    $display("program: %0d instructions", pcnt);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < pcnt; a++) begin
      @(negedge clk); im_we = 1; im_addr = 10'(a); im_moves = prog_mv[a]; im_imm = prog_imm[a];
    end
    @(negedge clk); im_we = 0;
    for (int t = 0; t < 16; t++) m[t] = 0;
    m[0] = 32'h61626380;
    m[15] = 32'h18;
    sha1_ref(m, dg);
    for (int k = 0; k < 5; k++) check(dg[k], ABC[k], "reference model against test vector");
    run_block(m, ABC, "abc");
    for (int t = 0; t < 16; t++) m[t] = $urandom();
    sha1_ref(m, dg);
    run_block(m, dg, "random block");
    check(int'(l_seg < l_simple), 1, "segmented active length below simple bus");
    $display("active bus length: segmented %0d, simple bus %0d (segment units), ratio %0.2f",
             l_seg, l_simple, real'(l_simple) / real'(l_seg));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
