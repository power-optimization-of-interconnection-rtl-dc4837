// seg_bus: one segmented move bus.
//
// The bus is cut by a bus connector at each of the NPOS socket positions, so
// it consists of NPOS+1 segments: segment k lies left of position k and
// segment k+1 right of it. The socket at a position attaches either to its
// left or to its right segment (or to neither). A source socket puts its
// value on the segment it is attached to; the value travels right through
// every closed connector on a rightward AND/OR chain and left on a leftward
// chain, and stops at the first open connector. A destination socket reads
// the segment it is attached to. Segments that no transport reaches stay at
// zero; `seg_act` marks the segments that carry the transport of this cycle
// and `conn_act` the connectors it passes, which together give the active
// length and connector count of the energy model E = K_L*L + K_BC*N_BC.
//
// Interface: cfg[p] is the crossing setting at position p (see
// tta_pkg::cell_t), drv_data[p] the value offered by the socket at p,
// rd_data[p] the value seen by the socket at p (zero when it is not tapped).
// Purely combinational; one move (possibly to several destinations) per bus.
module seg_bus
  import tta_pkg::*;
#(
  parameter int unsigned NPOS = tta_pkg::NSOCK,
  parameter int unsigned W    = tta_pkg::BUS_W
) (
  input  cell_t [NPOS-1:0]        cfg,
  input  logic  [NPOS-1:0][W-1:0] drv_data,
  output logic  [NPOS-1:0][W-1:0] rd_data,
  output logic  [NPOS:0]          seg_act,
  output logic  [NPOS-1:0]        conn_act
);
  // Value and activity put onto each segment by the sockets attached to it.
  logic [W-1:0] segd [NPOS+1];
  logic         sega [NPOS+1];
  // Rightward and leftward chains, per segment, and the connector outputs.
  logic [W-1:0] rch [NPOS+1];
  logic         rca [NPOS+1];
  logic [W-1:0] lch [NPOS+1];
  logic         lca [NPOS+1];
  logic [W-1:0] rc_out [NPOS];
  logic         rc_act [NPOS];
  logic [W-1:0] lc_out [NPOS];
  logic         lc_act [NPOS];

  always_comb begin
    for (int k = 0; k <= int'(NPOS); k++) begin
      segd[k] = '0;
      sega[k] = 1'b0;
    end
    for (int p = 0; p < int'(NPOS); p++) begin
      if (cfg[p].tap && cfg[p].drive) begin
        if (cfg[p].side_r) begin
          segd[p+1] = segd[p+1] | drv_data[p];
          sega[p+1] = 1'b1;
        end else begin
          segd[p] = segd[p] | drv_data[p];
          sega[p] = 1'b1;
        end
      end
    end
  end

  for (genvar p = 0; p < NPOS; p++) begin : g_conn
    bus_connector #(.W(W)) u_bc (
      .close    (cfg[p].close),
      .r_in     (rch[p]),
      .r_in_act (rca[p]),
      .l_in     (lch[p+1]),
      .l_in_act (lca[p+1]),
      .r_out    (rc_out[p]),
      .r_out_act(rc_act[p]),
      .l_out    (lc_out[p]),
      .l_out_act(lc_act[p])
    );
  end

  assign rch[0]    = segd[0];
  assign rca[0]    = sega[0];
  assign lch[NPOS] = segd[NPOS];
  assign lca[NPOS] = sega[NPOS];
  for (genvar k = 1; k <= NPOS; k++) begin : g_rchain
    assign rch[k] = segd[k] | rc_out[k-1];
    assign rca[k] = sega[k] | rc_act[k-1];
  end
  for (genvar k = 0; k < NPOS; k++) begin : g_lchain
    assign lch[k] = segd[k] | lc_out[k];
    assign lca[k] = sega[k] | lc_act[k];
  end

  always_comb begin
    for (int k = 0; k <= int'(NPOS); k++) seg_act[k] = rca[k] | lca[k];
    for (int p = 0; p < int'(NPOS); p++) begin
      conn_act[p] = rc_act[p] | lc_act[p];
      if (!cfg[p].tap)
        rd_data[p] = '0;
      else if (cfg[p].side_r)
        rd_data[p] = rch[p+1] | lch[p+1];
      else
        rd_data[p] = rch[p] | lch[p];
    end
  end

  // One source per bus and cycle.
  always_comb begin
    int n;
    n = 0;
    for (int p = 0; p < int'(NPOS); p++) n += int'(cfg[p].tap && cfg[p].drive);
    assert (n <= 1) else $error("seg_bus: %0d sources on one bus", n);
  end
endmodule
