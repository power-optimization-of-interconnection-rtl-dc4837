// tb_md5_workload: MD5 compression of one 512-bit block as a program on the
// processor at its default size (part of the security-hash workload).
// The 64 steps run as four loops of 16, one per round function. The step
// constants K[i] = floor(|sin(i+1)| * 2^32), the rotation amounts and the
// message word index of every step are tables in data memory, built by the
// testbench; the rotator takes its amount from a register. Checked: the
// message "abc" against its published digest, a random block against a
// reference model, and the cycle count.
module tb_md5_workload;
  import tta_pkg::*;
  localparam int unsigned NBUS = NBUS_DEFAULT, W = 32;
  localparam int KB = 'h100, SB = 'h140, GB = 'h180, MB = 'h200, HB = 'h300;
  localparam logic [31:0] HI [4] = '{32'h67452301, 32'hefcdab89, 32'h98badcfe, 32'h10325476};
  localparam logic [31:0] ABC [4] = '{32'h98500190, 32'hb04fd23c, 32'h7d3f96d6, 32'h727fe128};
  localparam int SR [4][4] = '{'{7, 12, 17, 22}, '{5, 9, 14, 20}, '{4, 11, 16, 23}, '{6, 10, 15, 21}};

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

  localparam int RA = 0, RB = 1, RC = 2, RD = 3, RI = 8;
  localparam int T0 = 16, T1 = 17, T2 = 18, T3 = 19;
  int n_pre, len_r [4], n_post;

  task automatic build();
    int l, p0;
    pcnt = 0;
    for (int k = 0; k < 4; k++) copy(I(HI[k]), RA + k);
    copy(I(0), RI);
    n_pre = pcnt;
    for (int r = 0; r < 4; r++) begin
      l = pcnt;
      case (r)                                                   // round function into T1
        0: begin
          op(FU_LOGIC, OP_AND, R(RB), R(RC), T1);
          op(FU_LOGIC, OP_ANDN, R(RD), R(RB), T2);
          op(FU_LOGIC, OP_OR, R(T1), R(T2), T1);
        end
        1: begin
          op(FU_LOGIC, OP_AND, R(RD), R(RB), T1);
          op(FU_LOGIC, OP_ANDN, R(RC), R(RD), T2);
          op(FU_LOGIC, OP_OR, R(T1), R(T2), T1);
        end
        2: begin
          op(FU_LOGIC, OP_XOR, R(RB), R(RC), T1);
          op(FU_LOGIC, OP_XOR, R(T1), R(RD), T1);
        end
        default: begin
          op(FU_LOGIC, OP_XOR, R(RD), I(32'hFFFF_FFFF), T1);
          op(FU_LOGIC, OP_OR, R(RB), R(T1), T1);
          op(FU_LOGIC, OP_XOR, R(RC), R(T1), T1);
        end
      endcase
      op(FU_ADD0, OP_ADD, R(T1), R(RA), T1);
      op(FU_ADD1, OP_ADD, R(RI), I(KB), T0); load(R(T0), T2);
      op(FU_ADD0, OP_ADD, R(T1), R(T2), T1);
      op(FU_ADD1, OP_ADD, R(RI), I(GB), T0); load(R(T0), T0); load(R(T0), T2);
      op(FU_ADD0, OP_ADD, R(T1), R(T2), T1);
      op(FU_ADD1, OP_ADD, R(RI), I(SB), T0); load(R(T0), T3);
      op(FU_SHIFT, OP_ROTL, R(T1), R(T3), T1);
      copy(R(RD), RA); copy(R(RC), RD); copy(R(RB), RC);
      op(FU_ADD0, OP_ADD, R(RB), R(T1), RB);
      op(FU_ADD1, OP_ADD, R(RI), I(1), RI); op(FU_CMP, OP_LTU, R(RI), I(16 * (r + 1)), T0);
      cjump(l);
      len_r[r] = pcnt - l;
    end
    p0 = pcnt;
    for (int k = 0; k < 4; k++) begin
      op(FU_ADD0, OP_ADD, R(RA + k), I(HI[k]), T0);
      store(I(HB + k), R(T0));
    end
    n_post = pcnt - p0;
    jump(pcnt);
  endtask

  function automatic logic [31:0] rl(logic [31:0] x, int n); return (x << n) | (x >> (32 - n)); endfunction
  function automatic logic [31:0] kconst(int i);
    real v;
    v = $sin(real'(i + 1));
    if (v < 0.0) v = -v;
    return 32'(longint'($floor(v * 4294967296.0)));
  endfunction
  function automatic int gidx(int i);
    case (i / 16)
      0: return i;
      1: return (5 * i + 1) % 16;
      2: return (3 * i + 5) % 16;
      default: return (7 * i) % 16;
    endcase
  endfunction
  task automatic md5_ref(input logic [31:0] m [16], output logic [31:0] dg [4]);
    logic [31:0] a, b, c, d, f, t;
    a = HI[0]; b = HI[1]; c = HI[2]; d = HI[3];
    for (int i = 0; i < 64; i++) begin
      case (i / 16)
        0: f = (b & c) | (~b & d);
        1: f = (d & b) | (~d & c);
        2: f = b ^ c ^ d;
        default: f = c ^ (b | ~d);
      endcase
      t = d; d = c; c = b;
      b = b + rl(a + f + kconst(i) + m[gidx(i)], SR[i / 16][i % 4]);
      a = t;
    end
    dg[0] = a + HI[0]; dg[1] = b + HI[1]; dg[2] = c + HI[2]; dg[3] = d + HI[3];
  endtask

  task automatic host_wr(input int a, input logic [31:0] d);
    @(negedge clk); dm_we = 1; dm_addr = 16'(a); dm_wdata = d;
    @(negedge clk); dm_we = 0;
  endtask

  task automatic run_block(input logic [31:0] m [16], input logic [31:0] exp [4], input string name);
    int cycles, expected;
    for (int t = 0; t < 16; t++) host_wr(MB + t, m[t]);
    @(negedge clk); run = 1;
    cycles = 0;
    while (pc != 10'(pcnt - 1) && cycles < 100000) begin
      @(posedge clk); #1;
      cycles++;
    end
    expected = n_pre + n_post;
    for (int r = 0; r < 4; r++) expected += 16 * len_r[r];
    check(cycles, expected, {name, ": cycles"});
    @(negedge clk); run = 0;
    for (int k = 0; k < 4; k++) begin
      dm_addr = 16'(HB + k);
      #1 check(dm_rdata, exp[k], $sformatf("%s: digest word %0d", name, k));
    end
    $display("%s: %0d cycles", name, cycles);
  endtask

  initial begin
    logic [31:0] m [16];
    logic [31:0] dg [4];
    build();
    $display("program: %0d instructions", pcnt);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < pcnt; a++) begin
      @(negedge clk); im_we = 1; im_addr = 10'(a); im_moves = prog_mv[a]; im_imm = prog_imm[a];
    end
    @(negedge clk); im_we = 0;
    for (int i = 0; i < 64; i++) begin
      host_wr(KB + i, kconst(i));
      host_wr(SB + i, SR[i / 16][i % 4]);
      host_wr(GB + i, MB + gidx(i));
    end
    for (int t = 0; t < 16; t++) m[t] = 0;
    m[0] = 32'h80636261;
    m[14] = 32'h18;
    md5_ref(m, dg);
    for (int k = 0; k < 4; k++) check(dg[k], ABC[k], "reference model against test vector");
    run_block(m, ABC, "abc");
    for (int t = 0; t < 16; t++) m[t] = $urandom();
    md5_ref(m, dg);
    run_block(m, dg, "random block");
    check(int'(l_seg < l_simple), 1, "segmented active length below simple bus");
    $display("active bus length: segmented %0d, simple bus %0d (segment units), ratio %0.2f",
             l_seg, l_simple, real'(l_simple) / real'(l_seg));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
