// tb_seg_network: the whole move network (six segmented buses and their
// sockets) on a scrambled placement. Random instructions are routed by
// route_decoder; every output socket offers a random value. The testbench
// checks that every input socket named by a move receives exactly its
// source's value, that input sockets not named stay at zero, and that the
// number of active segments on each bus equals the distance between the
// outermost sockets of its moves (the active length of the energy model).
module tb_seg_network;
  import tta_pkg::*;
  localparam int unsigned NBUS = 6;
  localparam int unsigned W    = 32;

  function automatic logic [NSOCK-1:0][POSW-1:0] scrambled();
    logic [NSOCK-1:0][POSW-1:0] p;
    for (int s = 0; s < int'(NSOCK); s++) p[s] = POSW'((11 * s + 3) % int'(NSOCK));
    return p;
  endfunction
  localparam logic [NSOCK-1:0][POSW-1:0] POS = scrambled();

  move_t [NBUS-1:0]            moves;
  cell_t [NBUS-1:0][NSOCK-1:0] cfg;
  logic  [NSOCK-1:0][NBUS-1:0] in_sel;
  logic  [NSOCK-1:0]           in_we;
  idx_t  [NSOCK-1:0]           sock_idx;
  logic  [NBUS-1:0]            shared;
  logic  [NSOCK-1:0][W-1:0]    out_data, in_data;
  logic  [NBUS-1:0][NSOCK:0]   seg_act;
  logic  [NBUS-1:0][NSOCK-1:0] conn_act;
  int checks = 0, failures = 0;
  longint l_seg = 0, l_simple = 0;

  route_decoder #(.NBUS(NBUS), .SOCK_POS(POS)) u_route (.*);
  seg_network #(.NBUS(NBUS), .W(W), .SOCK_POS(POS)) dut (.*);

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic sock_t rand_sock(input logic want_out);
    sock_t s;
    do s = sock_t'($urandom_range(0, NSOCK - 1)); while (is_output(s) != want_out);
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
    logic [NSOCK-1:0] named;
    int lo [NBUS], hi [NBUS], own [NBUS];
    for (int it = 0; it < 2000; it++) begin
      named = '0;
      for (int s = 0; s < int'(NSOCK); s++) out_data[s] = $urandom();
      for (int j = 0; j < NBUS; j++) begin
        sock_t d;
        moves[j].v = ($urandom_range(0, 3) != 0);
        moves[j].src = (j > 0 && $urandom_range(0, 3) == 0) ? moves[j-1].src : rand_sock(1'b1);
        moves[j].sidx = '0;
        do d = rand_sock(1'b0); while (named[d]);
        named[d] = moves[j].v;
        moves[j].dst = d;
        moves[j].didx = '0;
      end
      #1;
      for (int b = 0; b < NBUS; b++) begin lo[b] = NSOCK; hi[b] = -1; end
      for (int j = 0; j < NBUS; j++) begin
        own[j] = j;
        for (int i = j - 1; i >= 0; i--)
          if (moves[i].v && moves[j].v && moves[i].src == moves[j].src) own[j] = i;
        if (moves[j].v) begin
          int a, c;
          a = int'(POS[moves[j].src]);
          c = int'(POS[moves[j].dst]);
          if (a < lo[own[j]]) lo[own[j]] = a;
          if (c < lo[own[j]]) lo[own[j]] = c;
          if (a > hi[own[j]]) hi[own[j]] = a;
          if (c > hi[own[j]]) hi[own[j]] = c;
          check(in_data[moves[j].dst], out_data[moves[j].src], $sformatf("move %0d value", j));
        end
      end
      for (int s = 0; s < int'(NSOCK); s++)
        if (!is_output(sock_t'(s)) && !named[s]) check(in_data[s], 0, "unnamed input socket");
      for (int b = 0; b < NBUS; b++) begin
        check($countones(seg_act[b]), (hi[b] >= 0) ? hi[b] - lo[b] : 0, $sformatf("active length bus %0d", b));
        check($countones(conn_act[b]), (hi[b] >= 0) ? hi[b] - lo[b] - 1 : 0, $sformatf("active connectors bus %0d", b));
        l_seg += $countones(seg_act[b]);
        if (hi[b] >= 0) l_simple += NSOCK - 1;
      end
    end
    check(int'(l_seg < l_simple), 1, "segmented length below simple-bus length");
    $display("active length: segmented %0d, simple bus %0d", l_seg, l_simple);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
