// tb_tta_rf: random writes through the write socket and reads on both read
// sockets, compared with a reference register array. Reads are asynchronous
// and see a write from the previous cycle; all registers read zero after reset.
module tb_tta_rf;
  import tta_pkg::*;
  localparam int unsigned W = 32, NREG = 16;

  logic clk = 0, rst_n = 0, we;
  idx_t widx, ridx0, ridx1;
  logic [W-1:0] wdata, rdata0, rdata1;
  logic [W-1:0] ref_r [NREG];
  int checks = 0, failures = 0;

  tta_rf #(.W(W), .NREG(NREG)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; widx = 0; wdata = 0; ridx0 = 0; ridx1 = 0;
    for (int r = 0; r < NREG; r++) ref_r[r] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < NREG; r++) begin
      ridx0 = idx_t'(r); ridx1 = idx_t'(NREG - 1 - r);
      #1;
      check(rdata0, '0, "reset value port 0");
      check(rdata1, '0, "reset value port 1");
    end
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); widx = idx_t'($urandom()); wdata = $urandom();
      ridx0 = idx_t'($urandom()); ridx1 = idx_t'($urandom());
      #1;
      check(rdata0, ref_r[ridx0], "read port 0");
      check(rdata1, ref_r[ridx1], "read port 1");
      @(posedge clk);
      if (we) ref_r[widx] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
