// tta_pkg: shared constants and types of the transport triggered processor
// with a segmented-bus move network.
//
// A TTA program only describes data transports ("moves"). Every move names a
// source socket and a destination socket; the destination socket implicitly
// selects the operation. Each move slot of an instruction owns one bus. The
// buses are cut into segments at every socket position by bus connectors, and
// the route decoder closes only the connectors that lie between the source
// and the destination of a move, so only the needed part of a bus toggles.
//
// This package fixes the socket numbering of the default machine: seven
// function units, two register files and the network controller (CNTL), as
// in the TTA concept figure of the design. Which operations the seven function
// units carry, the number of registers and the instruction encoding are
// choices of this implementation; the source leaves them open.
package tta_pkg;

  // Bus (data) width: the buses of the evaluated machines are 32 bits wide.
  localparam int unsigned BUS_W = 32;
  // Number of move buses (= move slots per instruction) of the concept machine.
  localparam int unsigned NBUS_DEFAULT = 6;

  // Per-move index field: register number for register-file sockets,
  // operation code for trigger sockets, function select for CNTL sockets.
  localparam int unsigned IDXW = 4;

  // ---------------------------------------------------------------------
  // Sockets. Every socket sits at one position along the buses.
  // ---------------------------------------------------------------------
  localparam int unsigned NFU   = 7;   // function units, load/store unit included
  localparam int unsigned NRF   = 2;   // register files
  localparam int unsigned NSOCK = 3 * NFU + 3 * NRF + 2;  // 29
  localparam int unsigned SOCKW = $clog2(NSOCK);          // 5
  localparam int unsigned POSW  = $clog2(NSOCK);          // one position per socket

  typedef logic [SOCKW-1:0] sock_t;
  typedef logic [POSW-1:0]  pos_t;
  typedef logic [IDXW-1:0]  idx_t;

  // Function units: sockets 3*f (operand O), 3*f+1 (trigger T), 3*f+2 (result R).
  localparam int unsigned FU_ADD0  = 0;
  localparam int unsigned FU_LOGIC = 1;
  localparam int unsigned FU_SHIFT = 2;
  localparam int unsigned FU_MUL   = 3;
  localparam int unsigned FU_CMP   = 4;
  localparam int unsigned FU_LSU   = 5;
  localparam int unsigned FU_ADD1  = 6;

  function automatic sock_t fu_o(int unsigned f); return sock_t'(3 * f);     endfunction
  function automatic sock_t fu_t(int unsigned f); return sock_t'(3 * f + 1); endfunction
  function automatic sock_t fu_r(int unsigned f); return sock_t'(3 * f + 2); endfunction

  // Register files: write socket, read port 0, read port 1.
  localparam int unsigned NREG_DEFAULT = 16;
  function automatic sock_t rf_w (int unsigned r); return sock_t'(3 * NFU + 3 * r);     endfunction
  function automatic sock_t rf_r0(int unsigned r); return sock_t'(3 * NFU + 3 * r + 1); endfunction
  function automatic sock_t rf_r1(int unsigned r); return sock_t'(3 * NFU + 3 * r + 2); endfunction

  // Network controller: input socket (program counter as destination) and
  // output socket (long immediate or return address as source).
  localparam sock_t CNTL_IN  = sock_t'(NSOCK - 2);
  localparam sock_t CNTL_OUT = sock_t'(NSOCK - 1);

  // Operation codes (index field of a move into a trigger socket).
  typedef enum logic [IDXW-1:0] {
    OP_ADD = 4'd0, OP_SUB = 4'd1
  } add_op_e;
  typedef enum logic [IDXW-1:0] {
    OP_AND = 4'd0, OP_OR = 4'd1, OP_XOR = 4'd2, OP_ANDN = 4'd3
  } logic_op_e;
  typedef enum logic [IDXW-1:0] {
    OP_SHL = 4'd0, OP_SHR = 4'd1, OP_SRA = 4'd2, OP_ROTL = 4'd3, OP_ROTR = 4'd4
  } shift_op_e;
  typedef enum logic [IDXW-1:0] {
    OP_MULLO = 4'd0, OP_MULHI = 4'd1
  } mul_op_e;
  typedef enum logic [IDXW-1:0] {
    OP_EQ = 4'd0, OP_NE = 4'd1, OP_LTU = 4'd2, OP_LT = 4'd3, OP_GEU = 4'd4, OP_GE = 4'd5
  } cmp_op_e;
  typedef enum logic [IDXW-1:0] {
    OP_LD = 4'd0, OP_ST = 4'd1
  } lsu_op_e;
  // Index field of a move into CNTL_IN.
  typedef enum logic [IDXW-1:0] {
    CN_JUMP = 4'd0, CN_CJUMP = 4'd1, CN_CJUMPN = 4'd2
  } cntl_op_e;
  // Index field of a move from CNTL_OUT.
  typedef enum logic [IDXW-1:0] {
    CN_IMM = 4'd0, CN_RET = 4'd1
  } cntl_src_e;

  typedef enum logic [2:0] {
    K_ADD, K_LOGIC, K_SHIFT, K_MUL, K_CMP
  } fu_kind_e;

  // One move slot of an instruction.
  typedef struct packed {
    logic  v;     // slot carries a move
    sock_t src;   // source socket
    idx_t  sidx;  // source index (register number / CNTL source select)
    sock_t dst;   // destination socket
    idx_t  didx;  // destination index (register number / operation code)
  } move_t;

  // Setting of one crossing of a bus and a socket position.
  //   close  : the bus connector at this position joins the left and right segments
  //   tap    : the socket at this position is attached to this bus
  //   side_r : the socket is attached to the right segment (else the left one)
  //   drive  : the attached socket is the source of the bus
  // The four socket states of the design map onto it as
  //   connected with left bus  : tap, !side_r      connected with right bus : tap, side_r
  //   transition               : close, !tap       broken                   : !close, !tap
  // and a socket between the two ends of a shared move has tap and close set.
  typedef struct packed {
    logic close;
    logic tap;
    logic side_r;
    logic drive;
  } cell_t;

  // Default placement: position of every socket along the buses, as delivered
  // by the placement step. Sockets are evenly spaced; CNTL sits at the end.
  function automatic logic [NSOCK-1:0][POSW-1:0] default_pos();
    logic [NSOCK-1:0][POSW-1:0] p;
    for (int unsigned s = 0; s < NSOCK; s++) p[s] = POSW'(s);
    return p;
  endfunction

  function automatic logic is_output(sock_t s);
    if (s == CNTL_OUT) return 1'b1;
    if (s == CNTL_IN) return 1'b0;
    if (int'(s) < 3 * NFU) return (int'(s) % 3) == 2;
    return (int'(s) - 3 * int'(NFU)) % 3 != 0;
  endfunction

endpackage
