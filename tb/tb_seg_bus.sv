// tb_seg_bus: drives one segmented bus with single-source moves, routed by
// hand in the testbench (source and destination attached towards each other,
// connectors strictly between them closed), and checks that
//  - every destination reads the source value,
//  - sockets outside the span read zero when tapped,
//  - exactly the segments between source and destination are active and
//    exactly the connectors between them pass data,
//  - a route with one connector left open does not reach the destination,
//  - a shared route (source in the middle, destinations on both sides) reaches
//    both destinations.
module tb_seg_bus;
  import tta_pkg::cell_t;
  localparam int unsigned NPOS = 10;
  localparam int unsigned W    = 16;

  cell_t [NPOS-1:0]        cfg;
  logic  [NPOS-1:0][W-1:0] drv_data;
  logic  [NPOS-1:0][W-1:0] rd_data;
  logic  [NPOS:0]          seg_act;
  logic  [NPOS-1:0]        conn_act;
  int checks = 0, failures = 0;

  seg_bus #(.NPOS(NPOS), .W(W)) dut (.*);

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, d, lo, hi, o;
    logic [W-1:0] v;
    for (int it = 0; it < 300; it++) begin
      s = $urandom_range(0, NPOS - 1);
      do d = $urandom_range(0, NPOS - 1); while (d == s);
      lo = (s < d) ? s : d;
      hi = (s < d) ? d : s;
      v  = W'($urandom());
      for (int p = 0; p < NPOS; p++) drv_data[p] = W'($urandom());
      drv_data[s] = v;
      cfg = '0;
      for (int p = lo + 1; p < hi; p++) cfg[p].close = 1'b1;
      cfg[s].tap = 1'b1; cfg[s].drive = 1'b1; cfg[s].side_r = (s == lo);
      cfg[d].tap = 1'b1; cfg[d].side_r = (d == lo);
      // an uninvolved tapped socket outside the span, when there is one
      o = -1;
      if (lo > 0) o = lo - 1; else if (hi < NPOS - 1) o = hi + 1;
      if (o >= 0) begin cfg[o].tap = 1'b1; cfg[o].side_r = (o > hi); end
      #1;
      check(int'(rd_data[d]), int'(v), "destination value");
      if (o >= 0) check(int'(rd_data[o]), 0, "outside socket");
      for (int k = 0; k <= NPOS; k++)
        check(int'(seg_act[k]), int'(k > lo && k <= hi), $sformatf("seg_act[%0d] s=%0d d=%0d", k, s, d));
      for (int p = 0; p < NPOS; p++)
        check(int'(conn_act[p]), int'(p > lo && p < hi), $sformatf("conn_act[%0d]", p));
      // break the route in the middle
      if (hi - lo >= 2) begin
        cfg[(lo + hi) / 2].close = 1'b0;
        #1;
        check(int'(rd_data[d]), 0, "broken route");
      end
    end
    // shared route: source at 4, destinations at 1 and 8
    cfg = '0;
    drv_data = '0;
    drv_data[4] = 16'hBEEF;
    for (int p = 2; p < 8; p++) cfg[p].close = 1'b1;
    cfg[4].tap = 1'b1; cfg[4].drive = 1'b1;
    cfg[1].tap = 1'b1; cfg[1].side_r = 1'b1;
    cfg[8].tap = 1'b1;
    #1;
    check(int'(rd_data[1]), 'hBEEF, "shared left destination");
    check(int'(rd_data[8]), 'hBEEF, "shared right destination");
    check($countones(seg_act), 7, "shared active segments");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
