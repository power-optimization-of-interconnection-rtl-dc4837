// tb_bus_connector: checks that a bus connector passes both one-way chains
// (data and activity flag) when closed and blocks them when open, on random
// values.
module tb_bus_connector;
  localparam int unsigned W = 32;
  logic close, r_in_act, l_in_act, r_out_act, l_out_act;
  logic [W-1:0] r_in, l_in, r_out, l_out;
  int checks = 0, failures = 0;

  bus_connector #(.W(W)) dut (.*);

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
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
    for (int i = 0; i < 200; i++) begin
      close    = (i % 2) == 0;
      r_in     = $urandom();
      l_in     = $urandom();
      r_in_act = $urandom_range(0, 1);
      l_in_act = $urandom_range(0, 1);
      #1;
      check(r_out, close ? r_in : '0, "r_out");
      check(l_out, close ? l_in : '0, "l_out");
      check(W'(r_out_act), W'(close & r_in_act), "r_out_act");
      check(W'(l_out_act), W'(close & l_in_act), "l_out_act");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
