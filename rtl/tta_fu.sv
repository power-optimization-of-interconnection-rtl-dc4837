// tta_fu: a function unit of the transport triggered processor.
//
// Like every TTA function unit it is seen from the network as registers: an
// operand register O (input socket), a trigger register T (input socket) and a
// result register R (output socket). A move into O only stores the value; a
// move into T starts the operation, which is selected by the index field of
// that move (the destination names the operation). The operation uses the
// value arriving at T and the value of O, taking the new O if O is written in
// the same cycle, and the result appears in R at the next clock edge (latency
// one cycle). R holds its value until the next trigger.
//
// KIND selects which operations the unit carries (tta_pkg::fu_kind_e):
//   K_ADD   add O+T, sub O-T          K_LOGIC and, or, xor, and-not (O & ~T)
//   K_SHIFT O shifted/rotated by T[4:0]: shl, shr, sra, rotl, rotr
//   K_MUL   low or high word of the unsigned product O*T
//   K_CMP   1/0 for O==T, O!=T, O<T (unsigned/signed), O>=T (unsigned/signed)
// The operation sets are this design's choice, picked for bit manipulation
// and multiplication, which dominate the cryptographic programs the network
// was evaluated with. flag = R[0] is the comparison result used by the
// controller for conditional jumps.
module tta_fu
  import tta_pkg::*;
#(
  parameter fu_kind_e    KIND = K_ADD,
  parameter int unsigned W    = tta_pkg::BUS_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         o_we,
  input  logic [W-1:0] o_data,
  input  logic         t_we,
  input  logic [W-1:0] t_data,
  input  idx_t         t_op,
  output logic [W-1:0] result,
  output logic         flag
);
  localparam int unsigned SHW = $clog2(W);

  logic [W-1:0] o_q, o_n, res_n;
  logic [SHW-1:0] sh;
  logic [2*W-1:0] prod;

  assign o_n  = o_we ? o_data : o_q;
  assign sh   = t_data[SHW-1:0];
  assign prod = {{W{1'b0}}, o_n} * {{W{1'b0}}, t_data};

  always_comb begin
    res_n = '0;
    unique case (KIND)
      K_ADD:   res_n = (t_op == OP_SUB) ? o_n - t_data : o_n + t_data;
      K_LOGIC:
        case (t_op)
          OP_AND:  res_n = o_n & t_data;
          OP_OR:   res_n = o_n | t_data;
          OP_XOR:  res_n = o_n ^ t_data;
          default: res_n = o_n & ~t_data;
        endcase
      K_SHIFT:
        case (t_op)
          OP_SHL:  res_n = o_n << sh;
          OP_SHR:  res_n = o_n >> sh;
          OP_SRA:  res_n = W'($signed(o_n) >>> sh);
          OP_ROTL: res_n = (o_n << sh) | ((sh == '0) ? '0 : (o_n >> (SHW'(W) - sh)));
          default: res_n = (o_n >> sh) | ((sh == '0) ? '0 : (o_n << (SHW'(W) - sh)));
        endcase
      K_MUL:   res_n = (t_op == OP_MULHI) ? prod[2*W-1:W] : prod[W-1:0];
      K_CMP:
        case (t_op)
          OP_EQ:   res_n = W'(o_n == t_data);
          OP_NE:   res_n = W'(o_n != t_data);
          OP_LTU:  res_n = W'(o_n < t_data);
          OP_LT:   res_n = W'($signed(o_n) < $signed(t_data));
          OP_GEU:  res_n = W'(o_n >= t_data);
          default: res_n = W'($signed(o_n) >= $signed(t_data));
        endcase
      default: res_n = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_q    <= '0;
      result <= '0;
    end else begin
      o_q <= o_n;
      if (t_we) result <= res_n;
    end
  end

  assign flag = result[0];
endmodule
