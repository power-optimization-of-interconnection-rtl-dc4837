// tb_tta_fu: one function unit of each kind (adder, logic, shift/rotate,
// multiplier, comparator) receives random operand and trigger moves with
// random operations. The testbench computes each result itself and checks it
// one cycle after the trigger (latency one), checks that an operand moved in
// the same cycle as the trigger is the one used, and that the result register
// holds its value when no trigger arrives.
module tb_tta_fu;
  import tta_pkg::*;
  localparam int unsigned W = 32;
  localparam int NK = 5;
  localparam fu_kind_e KINDS [NK] = '{K_ADD, K_LOGIC, K_SHIFT, K_MUL, K_CMP};
  localparam int NOPS [NK] = '{2, 4, 5, 2, 6};

  logic clk = 0, rst_n = 0;
  logic [NK-1:0] o_we, t_we, flag;
  logic [W-1:0] o_data [NK];
  logic [W-1:0] t_data [NK];
  logic [W-1:0] result [NK];
  idx_t t_op [NK];
  int checks = 0, failures = 0;

  for (genvar k = 0; k < NK; k++) begin : g_dut
    tta_fu #(.KIND(KINDS[k]), .W(W)) dut (
      .clk, .rst_n, .o_we(o_we[k]), .o_data(o_data[k]), .t_we(t_we[k]),
      .t_data(t_data[k]), .t_op(t_op[k]), .result(result[k]), .flag(flag[k]));
  end

  always #5 clk = ~clk;

  function automatic logic [W-1:0] model(input int k, input int op, input logic [W-1:0] a,
                                         input logic [W-1:0] b);
    longint unsigned p;
    int s;
    s = int'(b[4:0]);
    case (k)
      0: return (op == 1) ? a - b : a + b;
      1: case (op) 0: return a & b; 1: return a | b; 2: return a ^ b; default: return a & ~b; endcase
      2: case (op)
           0: return a << s;
           1: return a >> s;
           2: return W'($signed(a) >>> s);
           3: return W'({a, a} >> (W - s)) ;
           default: return W'({a, a} >> s);
         endcase
      3: begin p = longint'(a) * longint'(b); return (op == 1) ? p[63:32] : p[31:0]; end
      default: case (op)
           0: return W'(a == b); 1: return W'(a != b); 2: return W'(a < b);
           3: return W'($signed(a) < $signed(b)); 4: return W'(a >= b);
           default: return W'($signed(a) >= $signed(b));
         endcase
    endcase
  endfunction

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] oreg [NK];
    logic [W-1:0] exp [NK];
    o_we = '0; t_we = '0;
    for (int k = 0; k < NK; k++) begin o_data[k] = '0; t_data[k] = '0; t_op[k] = '0; oreg[k] = '0; exp[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      for (int k = 0; k < NK; k++) begin
        o_we[k]   = $urandom_range(0, 1);
        t_we[k]   = $urandom_range(0, 2) != 0;
        o_data[k] = (it % 7 == 0) ? t_data[k] : $urandom();
        t_data[k] = $urandom();
        if (k == 2 && it % 11 == 0) t_data[k] = 0;   // zero shift amount
        t_op[k]   = idx_t'($urandom_range(0, NOPS[k] - 1));
        if (o_we[k]) oreg[k] = o_data[k];
        if (t_we[k]) exp[k] = model(k, int'(t_op[k]), oreg[k], t_data[k]);
      end
      @(posedge clk);
      #1;
      for (int k = 0; k < NK; k++) begin
        check(result[k], exp[k], $sformatf("kind %0d op %0d", k, t_op[k]));
        if (k == 4) check(W'(flag[k]), W'(exp[k][0]), "flag");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
