// tb_tta_top: end-to-end test of the processor at its default size.
//
// A small program is loaded through the host ports and run. Its loop walks
// over N data words x and mixes them into a hash-like state,
//   h = rotl(h ^ x, 5) + x * K,
// using the logic unit, the rotator, the multiplier, an adder, the
// comparator, a conditional jump, loads and both register files; a tail then
// exercises subtract, shift right, and-not, the high product word, a
// not-taken inverted conditional jump, the return-address source and stores.
// The results are read back through the data memory host port and compared
// with values the testbench computes itself; the cycle count (one instruction
// per cycle, 11 + 4*N instructions) is checked too.
//
// Along the way the testbench counts the network mechanisms seen on the
// observation outputs: bus sharing by moves with a common source, connectors
// in transition, sockets attached to the left and to the right segment,
// sockets tapped between the two ends of a shared route, taken and not-taken
// conditional jumps. Each must occur at least once. It also sums the active
// bus length (segments carrying data) and compares it with what a simple
// unsegmented bus would switch for the same moves (the whole bus length for
// each used bus).
module tb_tta_top;
  import tta_pkg::*;
  localparam int unsigned NBUS = NBUS_DEFAULT, W = 32;
  localparam int N = 8;
  localparam logic [31:0] H0 = 32'h1234_5678, K = 32'h9E37_79B9;

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
  int n_shared = 0, n_transit = 0, n_left = 0, n_right = 0, n_interior = 0;
  int n_taken = 0, n_not_taken = 0;
  longint l_seg = 0, l_simple = 0;

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ assembler
  move_t [NBUS-1:0] prog_mv [16];
  logic [W-1:0] prog_imm [16];
  int nslot;
  int cur;

  function automatic move_t mv(sock_t s, int si, sock_t d, int di);
    return '{v: 1'b1, src: s, sidx: idx_t'(si), dst: d, didx: idx_t'(di)};
  endfunction
  task automatic ins(input logic [W-1:0] imm);
    cur++;
    prog_mv[cur] = '0;
    prog_imm[cur] = imm;
    nslot = 0;
  endtask
  task automatic m(input sock_t s, input int si, input sock_t d, input int di);
    prog_mv[cur][nslot] = mv(s, si, d, di);
    nslot++;
  endtask

  function automatic logic [31:0] rotl(input logic [31:0] a, input int s);
    return (a << s) | (a >> (32 - s));
  endfunction

  // ------------------------------------------------------- observation
  logic [9:0] pc_prev;
  always @(posedge clk) begin
    if (run) begin
      for (int b = 0; b < int'(NBUS); b++) begin
        n_shared += int'(shared[b]);
        l_seg += $countones(seg_act[b]);
        if (|seg_act[b]) l_simple += NSOCK - 1;
        for (int p = 0; p < int'(NSOCK); p++) begin
          n_transit  += int'(bus_cfg[b][p].close && !bus_cfg[b][p].tap);
          n_interior += int'(bus_cfg[b][p].close && bus_cfg[b][p].tap);
          n_left     += int'(!bus_cfg[b][p].close && bus_cfg[b][p].tap && !bus_cfg[b][p].side_r);
          n_right    += int'(!bus_cfg[b][p].close && bus_cfg[b][p].tap && bus_cfg[b][p].side_r);
        end
      end
    end
  end

  initial begin
    logic [31:0] x [N];
    logic [31:0] h, e101, e102;
    longint unsigned kk;
    int cycles;
    sock_t CNo, CNi, RF0w, RF0a, RF0b, RF1w, RF1a, RF1b;
    CNo = CNTL_OUT; CNi = CNTL_IN;
    RF0w = rf_w(0); RF0a = rf_r0(0); RF0b = rf_r1(0);
    RF1w = rf_w(1); RF1a = rf_r0(1); RF1b = rf_r1(1);

    // program
    cur = -1;
    for (int a = 0; a < 16; a++) begin prog_mv[a] = '0; prog_imm[a] = '0; end
    ins(0);   m(CNo, CN_IMM, RF0w, 0); m(CNo, CN_IMM, fu_t(FU_LSU), OP_LD);        // i = 0, load x[0]
    ins(N);   m(CNo, CN_IMM, RF1w, 2);                                            // N
    ins(H0);  m(CNo, CN_IMM, RF0w, 1);                                            // h
    ins(K);   m(CNo, CN_IMM, RF1w, 0);                                            // K
    // loop, address 4
    ins(1);   m(RF0a, 1, fu_o(FU_LOGIC), 0); m(fu_r(FU_LSU), 0, fu_t(FU_LOGIC), OP_XOR);
              m(fu_r(FU_LSU), 0, fu_o(FU_MUL), 0); m(RF1a, 0, fu_t(FU_MUL), OP_MULLO);
              m(RF0b, 0, fu_o(FU_ADD1), 0); m(CNo, CN_IMM, fu_t(FU_ADD1), OP_ADD);
    ins(5);   m(fu_r(FU_LOGIC), 0, fu_o(FU_SHIFT), 0); m(CNo, CN_IMM, fu_t(FU_SHIFT), OP_ROTL);
              m(fu_r(FU_ADD1), 0, RF0w, 0); m(fu_r(FU_ADD1), 0, fu_t(FU_LSU), OP_LD);
              m(fu_r(FU_ADD1), 0, fu_o(FU_CMP), 0); m(RF1b, 2, fu_t(FU_CMP), OP_LTU);
    ins(0);   m(fu_r(FU_SHIFT), 0, fu_o(FU_ADD0), 0); m(fu_r(FU_MUL), 0, fu_t(FU_ADD0), OP_ADD);
    ins(4);   m(fu_r(FU_ADD0), 0, RF0w, 1); m(CNo, CN_IMM, CNi, CN_CJUMP);
    // tail
    ins(100); m(RF0a, 1, fu_o(FU_LSU), 0); m(CNo, CN_IMM, fu_t(FU_LSU), OP_ST);
    ins(7);   m(RF0a, 1, fu_o(FU_ADD0), 0); m(CNo, CN_IMM, fu_t(FU_ADD0), OP_SUB);
              m(RF0a, 1, fu_o(FU_SHIFT), 0); m(CNo, CN_IMM, fu_t(FU_SHIFT), OP_SHR);
              m(RF1a, 0, fu_o(FU_MUL), 0); m(RF1a, 0, fu_t(FU_MUL), OP_MULHI);
    ins(101); m(fu_r(FU_ADD0), 0, fu_o(FU_LOGIC), 0); m(fu_r(FU_SHIFT), 0, fu_t(FU_LOGIC), OP_ANDN);
              m(fu_r(FU_MUL), 0, fu_o(FU_LSU), 0); m(CNo, CN_IMM, fu_t(FU_LSU), OP_ST);
    ins(102); m(fu_r(FU_LOGIC), 0, fu_o(FU_LSU), 0); m(CNo, CN_IMM, fu_t(FU_LSU), OP_ST);
    ins(0);   m(CNo, CN_RET, RF1w, 5); m(RF0a, 1, fu_o(FU_CMP), 0); m(RF0a, 1, fu_t(FU_CMP), OP_EQ);
    ins(15);  m(CNo, CN_IMM, CNi, CN_CJUMPN); m(RF1b, 5, fu_o(FU_LSU), 0);
    ins(103); m(CNo, CN_IMM, fu_t(FU_LSU), OP_ST);
    ins(15);  m(CNo, CN_IMM, CNi, CN_JUMP);                                       // stop: jump to self

    // expected results
    h = H0;
    for (int i = 0; i < N; i++) begin
      x[i] = $urandom();
      kk = longint'(x[i]) * longint'(K);
      h = rotl(h ^ x[i], 5) + kk[31:0];
    end
    kk = longint'(K) * longint'(K);
    e101 = kk[63:32];
    e102 = (h - 32'd7) & ~(h >> 7);

    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 16; a++) begin
      @(negedge clk); im_we = 1; im_addr = 10'(a); im_moves = prog_mv[a]; im_imm = prog_imm[a];
    end
    for (int i = 0; i < N; i++) begin
      @(negedge clk); im_we = 0; dm_we = 1; dm_addr = 16'(i); dm_wdata = x[i];
    end
    @(negedge clk); dm_we = 0;
    run = 1;
    cycles = 0;
    pc_prev = 0;
    while (pc != 10'd15 && cycles < 1000) begin
      @(posedge clk); #1;
      cycles++;
      if (pc_prev == 10'd7) begin
        if (pc == 10'd4) n_taken++; else n_not_taken++;
      end
      if (pc_prev == 10'd13) n_not_taken += int'(pc == 10'd14);
      pc_prev = pc;
    end
    check(cycles, 11 + 4 * N, "cycles to finish");
    repeat (3) @(posedge clk);
    check(pc, 15, "stays at stop");
    @(negedge clk); run = 0;
    dm_addr = 100; #1 check(dm_rdata, h, "hash result");
    dm_addr = 101; #1 check(dm_rdata, e101, "high product");
    dm_addr = 102; #1 check(dm_rdata, e102, "sub/shift/and-not");
    dm_addr = 103; #1 check(dm_rdata, 13, "return address");
    $display("mechanisms: shared %0d transition %0d left %0d right %0d interior %0d taken %0d not-taken %0d",
             n_shared, n_transit, n_left, n_right, n_interior, n_taken, n_not_taken);
    check(int'(n_shared > 0), 1, "bus sharing occurred");
    check(int'(n_transit > 0), 1, "transition occurred");
    check(int'(n_left > 0), 1, "left attachment occurred");
    check(int'(n_right > 0), 1, "right attachment occurred");
    check(int'(n_interior > 0), 1, "interior tap occurred");
    check(n_taken, N - 1, "taken conditional jumps");
    check(n_not_taken, 2, "not-taken conditional jumps");
    check(int'(l_seg < l_simple), 1, "segmented active length below simple bus");
    $display("active bus length: segmented %0d, simple bus %0d (segment units)", l_seg, l_simple);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
