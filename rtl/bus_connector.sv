// bus_connector: the switch placed on a bus at a socket position, joining
// the segment to its left with the segment to its right.
//
// The buses are built as AND/OR buses, so a data transport is carried by two
// one-way chains: one running to the right and one running to the left. When
// `close` is set the connector passes both chains through (with an "active"
// flag that marks a segment carrying a transport); when it is clear both
// outputs are held at zero, so the segment beyond the connector stays quiet.
// This is the "few gates" connector of the design: one AND gate per bit and
// direction. It is purely combinational.
module bus_connector #(
  parameter int unsigned W = tta_pkg::BUS_W
) (
  input  logic         close,    // join the two segments
  input  logic [W-1:0] r_in,     // rightward data from the left segment
  input  logic         r_in_act, // left segment carries a rightward transport
  input  logic [W-1:0] l_in,     // leftward data from the right segment
  input  logic         l_in_act, // right segment carries a leftward transport
  output logic [W-1:0] r_out,    // rightward data into the right segment
  output logic         r_out_act,
  output logic [W-1:0] l_out,    // leftward data into the left segment
  output logic         l_out_act
);
  always_comb begin
    r_out     = r_in & {W{close}};
    r_out_act = r_in_act & close;
    l_out     = l_in & {W{close}};
    l_out_act = l_in_act & close;
  end
endmodule
