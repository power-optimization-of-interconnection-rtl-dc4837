// tb_route_decoder: random instructions of six moves, with sources often
// repeated so that bus sharing happens, on a scrambled placement
// (position = 7*socket mod 29). For every instruction the testbench works out
// which bus each move must ride on (its own, or that of the first earlier
// move with the same source and source index) and the span of every bus, and
// checks the crossing settings, the input socket selects and enables, the
// index fields and the shared flags.
module tb_route_decoder;
  import tta_pkg::*;
  localparam int unsigned NBUS = 6;

  function automatic logic [NSOCK-1:0][POSW-1:0] scrambled();
    logic [NSOCK-1:0][POSW-1:0] p;
    for (int s = 0; s < int'(NSOCK); s++) p[s] = POSW'((7 * s) % int'(NSOCK));
    return p;
  endfunction
  localparam logic [NSOCK-1:0][POSW-1:0] POS = scrambled();

  move_t [NBUS-1:0]            moves;
  cell_t [NBUS-1:0][NSOCK-1:0] cfg;
  logic  [NSOCK-1:0][NBUS-1:0] in_sel;
  logic  [NSOCK-1:0]           in_we;
  idx_t  [NSOCK-1:0]           sock_idx;
  logic  [NBUS-1:0]            shared;
  int checks = 0, failures = 0;
  int n_shared = 0, n_interior = 0;

  route_decoder #(.NBUS(NBUS), .SOCK_POS(POS)) dut (.*);

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic sock_t rand_out();
    sock_t s;
    do s = sock_t'($urandom_range(0, NSOCK - 1)); while (!is_output(s));
    return s;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bus_of [NBUS];
    int lo [NBUS], hi [NBUS];
    logic [NSOCK-1:0] partp [NBUS];
    logic [NSOCK-1:0] used_dst;
    for (int it = 0; it < 2000; it++) begin
      used_dst = '0;
      for (int j = 0; j < NBUS; j++) begin
        sock_t d;
        moves[j].v = ($urandom_range(0, 4) != 0);
        if (j > 0 && $urandom_range(0, 2) == 0) begin
          moves[j].src  = moves[j-1].src;
          moves[j].sidx = moves[j-1].sidx;
        end else begin
          moves[j].src  = rand_out();
          moves[j].sidx = idx_t'(moves[j].src[1:0]);
        end
        do d = sock_t'($urandom_range(0, NSOCK - 1)); while (is_output(d) || used_dst[d]);
        used_dst[d] = 1'b1;
        moves[j].dst  = d;
        moves[j].didx = idx_t'($urandom());
      end
      #1;
      // expected routing
      for (int b = 0; b < NBUS; b++) begin lo[b] = NSOCK; hi[b] = -1; partp[b] = '0; end
      for (int j = 0; j < NBUS; j++) begin
        bus_of[j] = j;
        for (int i = 0; i < j; i++)
          if (bus_of[j] == j && moves[i].v && moves[j].v && moves[i].src == moves[j].src &&
              moves[i].sidx == moves[j].sidx) bus_of[j] = i;
        if (moves[j].v) begin
          int ps, pd, b;
          ps = int'(POS[moves[j].src]);
          pd = int'(POS[moves[j].dst]);
          b  = bus_of[j];
          partp[b][ps] = 1'b1; partp[b][pd] = 1'b1;
          lo[b] = (ps < lo[b]) ? ps : lo[b]; lo[b] = (pd < lo[b]) ? pd : lo[b];
          hi[b] = (ps > hi[b]) ? ps : hi[b]; hi[b] = (pd > hi[b]) ? pd : hi[b];
          check(int'(in_we[moves[j].dst]), 1, "in_we");
          check(int'(in_sel[moves[j].dst]), 1 << b, "in_sel");
          check(int'(sock_idx[moves[j].dst]), int'(moves[j].didx), "didx");
          check(int'(sock_idx[moves[j].src]), int'(moves[j].sidx), "sidx");
          check(int'(shared[j]), int'(b != j), "shared");
          if (b != j) n_shared++;
        end
      end
      begin
        int nv;
        nv = 0;
        for (int j = 0; j < NBUS; j++) nv += int'(moves[j].v);
        check($countones(in_we), nv, "in_we count");
      end
      for (int b = 0; b < NBUS; b++) begin
        for (int p = 0; p < int'(NSOCK); p++) begin
          check(int'(cfg[b][p].close), int'(p > lo[b] && p < hi[b]), $sformatf("close b%0d p%0d", b, p));
          check(int'(cfg[b][p].tap), int'(partp[b][p]), $sformatf("tap b%0d p%0d", b, p));
          check(int'(cfg[b][p].drive), int'(hi[b] >= 0 && p == int'(POS[moves[b].src])), $sformatf("drive b%0d p%0d", b, p));
          if (partp[b][p] && p != hi[b] && p != lo[b]) n_interior++;
          if (p == lo[b] && hi[b] >= 0) check(int'(cfg[b][p].side_r), 1, "left end attaches right");
          if (p == hi[b] && hi[b] >= 0) check(int'(cfg[b][p].side_r), 0, "right end attaches left");
        end
      end
    end
    check(int'(n_shared > 0), 1, "sharing happened");
    check(int'(n_interior > 0), 1, "interior taps happened");
    $display("shared moves %0d, interior taps %0d", n_shared, n_interior);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
