// tb_tta_lsu: fills part of the data memory through the host port, then runs
// random loads and stores through the operand/trigger registers against a
// reference array kept by the testbench. A load result must appear one cycle
// after its trigger; a store with its data moved in the same cycle must store
// that new data; host reads must show every store.
module tb_tta_lsu;
  import tta_pkg::*;
  localparam int unsigned W = 32, DEPTH = 64, AW = 6;

  logic clk = 0, rst_n = 0;
  logic o_we, t_we, h_we;
  logic [W-1:0] o_data, t_data, result, h_wdata, h_rdata;
  logic [AW-1:0] h_addr;
  idx_t t_op;
  logic [W-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  tta_lsu #(.W(W), .DEPTH(DEPTH)) dut (.*);
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
    logic [W-1:0] oreg, exp_r;
    o_we = 0; t_we = 0; h_we = 0; o_data = 0; t_data = 0; t_op = OP_LD; h_addr = 0; h_wdata = 0;
    oreg = 0; exp_r = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      h_we = 1; h_addr = AW'(a); h_wdata = $urandom(); ref_mem[a] = h_wdata;
    end
    @(negedge clk); h_we = 0;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      o_we   = $urandom_range(0, 1);
      o_data = $urandom();
      t_we   = $urandom_range(0, 1);
      t_data = {$urandom_range(0, 1000), 6'($urandom_range(0, DEPTH - 1))};
      t_op   = $urandom_range(0, 1) ? OP_ST : OP_LD;
      if (o_we) oreg = o_data;
      @(posedge clk);
      #1;
      if (t_we && t_op == OP_LD) exp_r = ref_mem[t_data[AW-1:0]];
      if (t_we && t_op == OP_ST) ref_mem[t_data[AW-1:0]] = oreg;
      check(result, exp_r, "load result");
    end
    @(negedge clk); t_we = 0; o_we = 0;
    for (int a = 0; a < DEPTH; a++) begin
      h_addr = AW'(a);
      #1;
      check(h_rdata, ref_mem[a], "host read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
