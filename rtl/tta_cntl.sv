// tta_cntl: network controller and instruction unit (CNTL).
//
// Holds the program counter and the instruction memory. Each instruction is
// NBUS move slots plus one long immediate. While `run` is high the controller
// issues the instruction at pc every cycle (one instruction per cycle, moves of
// an instruction all happen in that cycle) and advances pc; while `run` is low
// pc is held at 0 and no moves are issued, and the host may load the
// instruction memory through the h_* port.
//
// Control flow goes through the network, as the program counter is a visible
// destination and source: a move into the input socket (j_we/j_data) with
// index CN_JUMP loads pc with the moved value in the next cycle, CN_CJUMP does
// so only when `flag` (the comparator's result) is 1 and CN_CJUMPN only when
// it is 0. The output socket offers the instruction's long immediate
// (index CN_IMM) or the return address pc+1 (CN_RET); out_sel is the index
// field of the move that reads it. The instruction format, the immediate and
// the conditional jump on the comparator flag are this design's choices.
module tta_cntl
  import tta_pkg::*;
#(
  parameter int unsigned NBUS  = tta_pkg::NBUS_DEFAULT,
  parameter int unsigned W     = tta_pkg::BUS_W,
  parameter int unsigned IDEPTH = 1024,
  parameter int unsigned PCW   = $clog2(IDEPTH)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   run,
  // host port to the instruction memory
  input  logic                   h_we,
  input  logic [PCW-1:0]         h_addr,
  input  move_t [NBUS-1:0]       h_moves,
  input  logic [W-1:0]           h_imm,
  // issued instruction
  output move_t [NBUS-1:0]       moves,
  output logic [PCW-1:0]         pc,
  // input socket: program counter as destination
  input  logic                   j_we,
  input  logic [W-1:0]           j_data,
  input  idx_t                   j_op,
  input  logic                   flag,
  // output socket
  input  idx_t                   out_sel,
  output logic [W-1:0]           out_data
);
  move_t [NBUS-1:0] imem_mv  [IDEPTH];
  logic  [W-1:0]    imem_imm [IDEPTH];
  logic             take;

  always_ff @(posedge clk) begin
    if (h_we) begin
      imem_mv[h_addr]  <= h_moves;
      imem_imm[h_addr] <= h_imm;
    end
  end

  always_comb begin
    for (int j = 0; j < int'(NBUS); j++) begin
      moves[j]   = imem_mv[pc][j];
      moves[j].v = imem_mv[pc][j].v & run;
    end
  end

  always_comb begin
    take = 1'b0;
    if (j_we) begin
      case (j_op)
        CN_JUMP:   take = 1'b1;
        CN_CJUMP:  take = flag;
        CN_CJUMPN: take = ~flag;
        default:   take = 1'b0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     pc <= '0;
    else if (!run)  pc <= '0;
    else if (take)  pc <= j_data[PCW-1:0];
    else            pc <= pc + 1'b1;
  end

  assign out_data = (out_sel == CN_RET) ? W'(pc + 1'b1) : imem_imm[pc];
endmodule
