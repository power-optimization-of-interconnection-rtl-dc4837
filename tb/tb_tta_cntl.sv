// tb_tta_cntl: loads random instructions through the host port, then runs the
// controller with random jump moves. Checked every cycle: the issued moves
// are the stored ones at pc (all invalid while run is low), the output socket
// gives the immediate or pc+1, and pc follows pc+1 or the jump target
// according to the jump kind and the comparator flag. Counts taken and
// not-taken conditional jumps of both senses.
module tb_tta_cntl;
  import tta_pkg::*;
  localparam int unsigned NBUS = 6, W = 32, IDEPTH = 32, PCW = 5;

  logic clk = 0, rst_n = 0, run = 0, h_we = 0, j_we = 0, flag = 0;
  logic [PCW-1:0] h_addr = '0, pc;
  move_t [NBUS-1:0] h_moves, moves;
  logic [W-1:0] h_imm, j_data, out_data;
  idx_t j_op, out_sel;
  move_t [NBUS-1:0] ref_mv [IDEPTH];
  logic [W-1:0] ref_imm [IDEPTH];
  int checks = 0, failures = 0;
  int n_taken = 0, n_not = 0;

  tta_cntl #(.NBUS(NBUS), .W(W), .IDEPTH(IDEPTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
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
    logic [PCW-1:0] exp_pc;
    logic take;
    h_moves = '0; h_imm = '0; j_data = '0; j_op = '0; out_sel = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < IDEPTH; a++) begin
      @(negedge clk);
      h_we = 1; h_addr = PCW'(a);
      for (int j = 0; j < NBUS; j++) h_moves[j] = move_t'({$urandom(), $urandom()});
      h_imm = $urandom();
      ref_mv[a] = h_moves; ref_imm[a] = h_imm;
    end
    @(negedge clk); h_we = 0;
    #1;
    check(pc, 0, "pc held while stopped");
    for (int j = 0; j < NBUS; j++) check(moves[j].v, 0, "no moves while stopped");
    run = 1;
    exp_pc = 1;  // one clock edge passes with run high before the first check
    for (int it = 0; it < 1000; it++) begin
      @(negedge clk);
      j_we = $urandom_range(0, 2) == 0;
      j_op = idx_t'($urandom_range(0, 2));
      j_data = $urandom();
      flag = $urandom_range(0, 1);
      out_sel = idx_t'($urandom_range(0, 1));
      #1;
      check(pc, exp_pc, "pc");
      for (int j = 0; j < NBUS; j++) begin
        move_t e;
        e = ref_mv[exp_pc][j];
        check(moves[j], e, "issued move");
      end
      check(out_data, (out_sel == CN_RET) ? W'(exp_pc + 1'b1) : ref_imm[exp_pc], "output socket");
      take = j_we && (j_op == CN_JUMP || (j_op == CN_CJUMP && flag) || (j_op == CN_CJUMPN && !flag));
      if (j_we && j_op != CN_JUMP) begin
        if (take) n_taken++; else n_not++;
      end
      exp_pc = take ? j_data[PCW-1:0] : exp_pc + 1'b1;
    end
    @(negedge clk); run = 0; j_we = 0;
    @(negedge clk);
    check(pc, 0, "pc back to 0 when stopped");
    check(int'(n_taken > 0 && n_not > 0), 1, "conditional jumps taken and not taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
