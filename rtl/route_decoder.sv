// route_decoder: routes the moves of one instruction over the segmented buses.
//
// Move slot j of an instruction owns bus j. Routing a move means attaching its
// source and destination sockets to that bus and closing the bus connectors
// that lie strictly between them; every other connector stays open, so the
// rest of the bus is isolated and idle. When two moves of one instruction read
// the same source (same socket and same source index) they share one bus: the
// later slot is merged onto the bus of the earliest such slot, whose span then
// runs from its leftmost to its rightmost participant, and the later slot's own
// bus stays idle. Routing is done by this decoder alone, so programs for a
// simple-bus machine run unchanged.
//
// Positions come from the placement parameter SOCK_POS (socket -> position).
// Outputs, all combinational from `moves`:
//   cfg[b][p]  crossing setting of bus b at position p (tta_pkg::cell_t)
//   in_we[s]   input socket s receives a value this cycle, from bus in_sel[s]
//   sock_idx   index field (register number / opcode) seen by each socket
//   shared[j]  slot j rides on an earlier slot's bus
// The encoding of a "shared" route, and the attach-side rule (left end attaches
// right, right end attaches left) are choices of this design.
module route_decoder
  import tta_pkg::move_t, tta_pkg::cell_t, tta_pkg::idx_t, tta_pkg::NSOCK, tta_pkg::POSW;
#(
  parameter int unsigned NBUS = tta_pkg::NBUS_DEFAULT,
  parameter logic [NSOCK-1:0][POSW-1:0] SOCK_POS = tta_pkg::default_pos()
) (
  input  move_t [NBUS-1:0]             moves,
  output cell_t [NBUS-1:0][NSOCK-1:0]  cfg,
  output logic  [NSOCK-1:0][NBUS-1:0]  in_sel,
  output logic  [NSOCK-1:0]            in_we,
  output idx_t  [NSOCK-1:0]            sock_idx,
  output logic  [NBUS-1:0]             shared
);
  localparam int unsigned BW = (NBUS > 1) ? $clog2(NBUS) : 1;

  logic [NBUS-1:0][BW-1:0]    owner;
  logic [NBUS-1:0][NSOCK-1:0] part;   // participant positions per bus
  logic [NBUS-1:0][POSW-1:0]  lo, hi;
  logic [NBUS-1:0]            used;

  always_comb begin
    // Assign each slot to a bus.
    for (int j = 0; j < int'(NBUS); j++) begin
      owner[j]  = BW'(j);
      shared[j] = 1'b0;
      for (int i = j - 1; i >= 0; i--) begin
        if (moves[j].v && moves[i].v && moves[i].src == moves[j].src &&
            moves[i].sidx == moves[j].sidx) begin
          owner[j]  = BW'(i);
          shared[j] = 1'b1;
        end
      end
    end
    // Collect participants and the span of every bus.
    in_sel   = '0;
    in_we    = '0;
    sock_idx = '0;
    for (int b = 0; b < int'(NBUS); b++) begin
      part[b] = '0;
      used[b] = 1'b0;
      lo[b]   = '1;
      hi[b]   = '0;
    end
    for (int j = 0; j < int'(NBUS); j++) begin
      if (moves[j].v) begin
        automatic int b = int'(owner[j]);
        automatic logic [POSW-1:0] ps = SOCK_POS[moves[j].src];
        automatic logic [POSW-1:0] pd = SOCK_POS[moves[j].dst];
        used[b]     = 1'b1;
        part[b][ps] = 1'b1;
        part[b][pd] = 1'b1;
        if (ps < lo[b]) lo[b] = ps;
        if (pd < lo[b]) lo[b] = pd;
        if (ps > hi[b]) hi[b] = ps;
        if (pd > hi[b]) hi[b] = pd;
        in_we[moves[j].dst]     = 1'b1;
        in_sel[moves[j].dst]    = '0;
        in_sel[moves[j].dst][b] = 1'b1;
        sock_idx[moves[j].dst]  = moves[j].didx;
        sock_idx[moves[j].src]  = moves[j].sidx;
      end
    end
    // Crossing settings.
    for (int b = 0; b < int'(NBUS); b++) begin
      for (int p = 0; p < int'(NSOCK); p++) begin
        cfg[b][p].close  = used[b] && (POSW'(p) > lo[b]) && (POSW'(p) < hi[b]);
        cfg[b][p].tap    = part[b][p];
        cfg[b][p].side_r = part[b][p] && (POSW'(p) == lo[b]);
        cfg[b][p].drive  = 1'b0;
      end
      if (used[b]) cfg[b][SOCK_POS[moves[b].src]].drive = 1'b1;
    end
  end
endmodule
