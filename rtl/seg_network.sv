// seg_network: the move interconnection network of the processor: NBUS
// segmented buses (seg_bus) plus the sockets that join the units to them.
//
// Every socket sits at one position along the buses (placement parameter
// SOCK_POS). An output socket is a demultiplexer: it offers its unit's value
// out_data[s] at its position on every bus, and the crossing setting decides
// on which bus (and on which side of the connector) it is actually driven. An
// input socket is a multiplexer: it takes the value of the bus selected by
// in_sel[s] at its position. The crossing settings come from route_decoder.
// seg_act/conn_act report, per bus, the segments and connectors that carry a
// transport in this cycle. Purely combinational.
module seg_network
  import tta_pkg::cell_t, tta_pkg::NSOCK, tta_pkg::POSW;
#(
  parameter int unsigned NBUS = tta_pkg::NBUS_DEFAULT,
  parameter int unsigned W    = tta_pkg::BUS_W,
  parameter logic [NSOCK-1:0][POSW-1:0] SOCK_POS = tta_pkg::default_pos()
) (
  input  cell_t [NBUS-1:0][NSOCK-1:0]  cfg,
  input  logic  [NSOCK-1:0][W-1:0]     out_data,
  input  logic  [NSOCK-1:0][NBUS-1:0]  in_sel,
  output logic  [NSOCK-1:0][W-1:0]     in_data,
  output logic  [NBUS-1:0][NSOCK:0]    seg_act,
  output logic  [NBUS-1:0][NSOCK-1:0]  conn_act
);
  logic [NSOCK-1:0][W-1:0] pos_data;               // output socket value by position
  logic [NBUS-1:0][NSOCK-1:0][W-1:0] rd;           // bus value seen at each position

  always_comb begin
    pos_data = '0;
    for (int s = 0; s < int'(NSOCK); s++) pos_data[SOCK_POS[s]] = out_data[s];
  end

  for (genvar b = 0; b < NBUS; b++) begin : g_bus
    seg_bus #(.NPOS(NSOCK), .W(W)) u_bus (
      .cfg     (cfg[b]),
      .drv_data(pos_data),
      .rd_data (rd[b]),
      .seg_act (seg_act[b]),
      .conn_act(conn_act[b])
    );
  end

  // Input sockets.
  always_comb begin
    for (int s = 0; s < int'(NSOCK); s++) begin
      in_data[s] = '0;
      for (int b = 0; b < int'(NBUS); b++)
        if (in_sel[s][b]) in_data[s] = in_data[s] | rd[b][SOCK_POS[s]];
    end
  end
endmodule
