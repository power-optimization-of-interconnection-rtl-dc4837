// tta_rf: general purpose register file of the processor.
//
// NREG registers of W bits, with one input socket (write port) and two output
// sockets (read ports). A move into the write socket stores the bus value into
// register widx at the clock edge. A read socket drives register ridx onto its
// bus in the same cycle (asynchronous read), so a value written in one
// instruction can be read by the next. All registers reset to zero. The
// number of registers and ports is this design's choice.
module tta_rf
  import tta_pkg::idx_t, tta_pkg::IDXW;
#(
  parameter int unsigned W    = tta_pkg::BUS_W,
  parameter int unsigned NREG = tta_pkg::NREG_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,
  input  idx_t         widx,
  input  logic [W-1:0] wdata,
  input  idx_t         ridx0,
  output logic [W-1:0] rdata0,
  input  idx_t         ridx1,
  output logic [W-1:0] rdata1
);
  localparam int unsigned RW = (NREG > 1) ? $clog2(NREG) : 1;

  logic [NREG-1:0][W-1:0] regs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) regs <= '0;
    else if (we) regs[RW'(widx)] <= wdata;
  end

  assign rdata0 = regs[RW'(ridx0)];
  assign rdata1 = regs[RW'(ridx1)];

  initial assert (NREG <= 2**IDXW) else $error("tta_rf: NREG exceeds the index field");
endmodule
