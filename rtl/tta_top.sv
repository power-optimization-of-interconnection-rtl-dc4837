// tta_top: transport triggered processor with a segmented-bus move network.
//
// The machine follows the TTA concept: seven function units (two adders, a
// logic unit, a shifter/rotator, a multiplier, a comparator and a load/store
// unit), two register files and the network controller, joined by NBUS
// move buses of W bits through sockets. An instruction is NBUS moves; each
// move copies a source register (a function unit result, a register or the
// controller's immediate/return address) into a destination register (an
// operand, a trigger that starts an operation, a register or the program
// counter). Every move slot owns one bus.
//
// The buses are segmented: a bus connector sits at every socket position,
// and the route decoder in the instruction decode path closes only the
// connectors between the source and destination of each move, so only that
// part of the bus carries (and toggles with) the data; the other segments are
// isolated. Two moves of one instruction that read the same source share one
// bus. The positions of the sockets along the buses (SOCK_POS) come from the
// placement of the macro blocks, which is done before synthesis.
//
// Timing: one instruction per cycle. A move's source is read and its
// destination written in the same cycle; a triggered operation's result is
// readable by the next instruction; a jump takes effect on the next
// instruction (no delay slot). `run` low holds the program counter at 0 and
// lets a host load the instruction and data memories.
//
// Observation outputs: bus_cfg (crossing settings), seg_act and conn_act
// (segments and connectors that carry data this cycle, the inputs of the
// network energy estimate) and shared (move slots riding on another bus).
module tta_top
  import tta_pkg::*;
#(
  parameter int unsigned NBUS   = tta_pkg::NBUS_DEFAULT,
  parameter int unsigned W      = tta_pkg::BUS_W,
  parameter int unsigned NREG   = tta_pkg::NREG_DEFAULT,
  parameter int unsigned IDEPTH = 1024,
  parameter int unsigned DDEPTH = 65536,
  parameter logic [NSOCK-1:0][POSW-1:0] SOCK_POS = tta_pkg::default_pos(),
  localparam int unsigned PCW   = $clog2(IDEPTH),
  localparam int unsigned DAW   = $clog2(DDEPTH)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        run,
  // instruction memory host port
  input  logic                        im_we,
  input  logic [PCW-1:0]              im_addr,
  input  move_t [NBUS-1:0]            im_moves,
  input  logic [W-1:0]                im_imm,
  // data memory host port
  input  logic                        dm_we,
  input  logic [DAW-1:0]              dm_addr,
  input  logic [W-1:0]                dm_wdata,
  output logic [W-1:0]                dm_rdata,
  // status and observation
  output logic [PCW-1:0]              pc,
  output cell_t [NBUS-1:0][NSOCK-1:0] bus_cfg,
  output logic [NBUS-1:0][NSOCK:0]    seg_act,
  output logic [NBUS-1:0][NSOCK-1:0]  conn_act,
  output logic [NBUS-1:0]             shared
);
  move_t [NBUS-1:0]           moves;
  logic  [NSOCK-1:0][NBUS-1:0] in_sel;
  logic  [NSOCK-1:0]          in_we;
  idx_t  [NSOCK-1:0]          sock_idx;
  logic  [NSOCK-1:0][W-1:0]   out_data;
  logic  [NSOCK-1:0][W-1:0]   in_data;
  logic  [NFU-1:0]            fu_flag;

  // ---------------------------------------------------------------- control
  tta_cntl #(.NBUS(NBUS), .W(W), .IDEPTH(IDEPTH)) u_cntl (
    .clk, .rst_n, .run,
    .h_we   (im_we),
    .h_addr (im_addr),
    .h_moves(im_moves),
    .h_imm  (im_imm),
    .moves  (moves),
    .pc     (pc),
    .j_we   (in_we[CNTL_IN]),
    .j_data (in_data[CNTL_IN]),
    .j_op   (sock_idx[CNTL_IN]),
    .flag   (fu_flag[FU_CMP]),
    .out_sel(sock_idx[CNTL_OUT]),
    .out_data(out_data[CNTL_OUT])
  );
  assign out_data[CNTL_IN] = '0;

  route_decoder #(.NBUS(NBUS), .SOCK_POS(SOCK_POS)) u_route (
    .moves   (moves),
    .cfg     (bus_cfg),
    .in_sel  (in_sel),
    .in_we   (in_we),
    .sock_idx(sock_idx),
    .shared  (shared)
  );

  // ---------------------------------------------------------------- network
  seg_network #(.NBUS(NBUS), .W(W), .SOCK_POS(SOCK_POS)) u_net (
    .cfg     (bus_cfg),
    .out_data(out_data),
    .in_sel  (in_sel),
    .in_data (in_data),
    .seg_act (seg_act),
    .conn_act(conn_act)
  );

  // ---------------------------------------------------------- function units
  localparam fu_kind_e KINDS [NFU] = '{K_ADD, K_LOGIC, K_SHIFT, K_MUL, K_CMP, K_ADD, K_ADD};

  for (genvar f = 0; f < NFU; f++) begin : g_fu
    if (f == FU_LSU) begin : g_lsu
      tta_lsu #(.W(W), .DEPTH(DDEPTH)) u_lsu (
        .clk, .rst_n,
        .o_we   (in_we[3*f]),
        .o_data (in_data[3*f]),
        .t_we   (in_we[3*f+1]),
        .t_data (in_data[3*f+1]),
        .t_op   (sock_idx[3*f+1]),
        .result (out_data[3*f+2]),
        .h_we   (dm_we),
        .h_addr (dm_addr),
        .h_wdata(dm_wdata),
        .h_rdata(dm_rdata)
      );
      assign fu_flag[f] = 1'b0;
    end else begin : g_alu
      tta_fu #(.KIND(KINDS[f]), .W(W)) u_fu (
        .clk, .rst_n,
        .o_we  (in_we[3*f]),
        .o_data(in_data[3*f]),
        .t_we  (in_we[3*f+1]),
        .t_data(in_data[3*f+1]),
        .t_op  (sock_idx[3*f+1]),
        .result(out_data[3*f+2]),
        .flag  (fu_flag[f])
      );
    end
    assign out_data[3*f]   = '0;
    assign out_data[3*f+1] = '0;
  end

  // ---------------------------------------------------------- register files
  for (genvar r = 0; r < NRF; r++) begin : g_rf
    tta_rf #(.W(W), .NREG(NREG)) u_rf (
      .clk, .rst_n,
      .we    (in_we[3*NFU+3*r]),
      .widx  (sock_idx[3*NFU+3*r]),
      .wdata (in_data[3*NFU+3*r]),
      .ridx0 (sock_idx[3*NFU+3*r+1]),
      .rdata0(out_data[3*NFU+3*r+1]),
      .ridx1 (sock_idx[3*NFU+3*r+2]),
      .rdata1(out_data[3*NFU+3*r+2])
    );
    assign out_data[3*NFU+3*r] = '0;
  end

  // -------------------------------------------------------------- program rules
  // Sources must be output sockets, destinations input sockets, and a
  // destination takes at most one move per instruction.
  for (genvar j = 0; j < NBUS; j++) begin : g_rules
    a_dir: assert property (@(posedge clk) disable iff (!rst_n)
                            moves[j].v |-> (is_output(moves[j].src) && !is_output(moves[j].dst)))
      else $error("tta_top: slot %0d moves from socket %0d to socket %0d", j, moves[j].src, moves[j].dst);
    for (genvar i = 0; i < j; i++) begin : g_pair
      a_dst: assert property (@(posedge clk) disable iff (!rst_n)
                              !(moves[i].v && moves[j].v && moves[i].dst == moves[j].dst))
        else $error("tta_top: slots %0d and %0d write socket %0d", i, j, moves[j].dst);
    end
  end
endmodule
