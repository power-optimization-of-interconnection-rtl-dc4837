// tta_lsu: load/store unit with its data memory.
//
// Seen from the network like any function unit: operand register O (the store
// data), trigger T (the word address; the move's index field selects load or
// store) and result register R (the loaded word). A load moves mem[T] into R at
// the next clock edge (latency one cycle); a store writes O (the new O when it
// is moved in the same cycle) to mem[T] at the next edge. Addresses are word
// addresses and wrap modulo DEPTH. The memory is an array of DEPTH words.
//
// A host port (h_*) lets a system outside the processor fill and read the
// memory; a host write wins over a store in the same cycle, and h_rdata is an
// asynchronous read. Memory size, word addressing and the host port are
// choices of this design.
module tta_lsu
  import tta_pkg::*;
#(
  parameter int unsigned W     = tta_pkg::BUS_W,
  parameter int unsigned DEPTH = 65536,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          o_we,
  input  logic [W-1:0]  o_data,
  input  logic          t_we,
  input  logic [W-1:0]  t_data,
  input  idx_t          t_op,
  output logic [W-1:0]  result,
  input  logic          h_we,
  input  logic [AW-1:0] h_addr,
  input  logic [W-1:0]  h_wdata,
  output logic [W-1:0]  h_rdata
);
  logic [W-1:0] mem [DEPTH];
  logic [W-1:0] o_q, o_n;
  logic [AW-1:0] a;

  assign o_n = o_we ? o_data : o_q;
  assign a   = t_data[AW-1:0];

  always_ff @(posedge clk) begin
    if (h_we)
      mem[h_addr] <= h_wdata;
    else if (t_we && t_op == OP_ST)
      mem[a] <= o_n;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_q    <= '0;
      result <= '0;
    end else begin
      o_q <= o_n;
      if (t_we && t_op == OP_LD) result <= mem[a];
    end
  end

  assign h_rdata = mem[h_addr];
endmodule
