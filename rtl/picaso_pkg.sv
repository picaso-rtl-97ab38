// Shared types and constants of the PiCaSO processor-in-memory overlay.
//
// A PE-block is one 18 Kb block RAM, used as a 1024 x 16 register file, plus
// 16 bit-serial processing elements (one per RAM column), an operand
// multiplexer (OpMux) and one network node. Every PE-block of an array runs
// the same instruction, which is broadcast each clock cycle as a pim_instr_t.
// The instruction carries addresses and control for all pipeline stages; each
// PE-block delays the fields internally so that every stage sees the fields
// that belong to the data it holds.
//
// From the published design: 16 PEs per block RAM, the A/B/NET to X/Y operand
// multiplexer with two folding patterns, the binary-hopping network with a
// 3-bit level configuration, 8-bit node identifiers and the four pipeline
// configurations. The field layout, the encodings and the ALU operation set
// are this design's own choices.
package picaso_pkg;

  // PEs per PE-block: one per column of the 16-bit wide RAM port.
  localparam int unsigned PE_W = 16;
  // Rows of the register file (18 Kb RAM in 1024 x 16 (+2 parity) mode).
  localparam int unsigned RF_DEPTH = 1024;
  localparam int unsigned RF_AW = $clog2(RF_DEPTH);
  // Width of a node identifier along one axis (256 x 256 blocks x 16 PEs = 1M PEs).
  localparam int unsigned NODE_ID_W = 8;
  // Width of the hop-level configuration register (levels 0..7).
  localparam int unsigned NET_LVL_W = 3;
  // Width of the fold-level field: fold levels 1..log2(PE_W), stored minus one.
  localparam int unsigned FOLD_W = 2;

  // Operand multiplexer modes: how the A, B and NET words become X and Y.
  typedef enum logic [1:0] {
    OPM_AB     = 2'd0,  // X = A, Y = B
    OPM_A_NET  = 2'd1,  // X = A, Y = NET
    OPM_FOLD_A = 2'd2,  // X = A, Y = A folded by halves   (published "folding pattern a")
    OPM_FOLD_B = 2'd3   // X = A, Y = A folded by neighbours (published "folding pattern b")
  } opmux_mode_e;

  // Bit-serial ALU operations (one result bit per PE per cycle).
  typedef enum logic [3:0] {
    ALU_CPX   = 4'd0,   // R = X
    ALU_CPY   = 4'd1,   // R = Y
    ALU_AND   = 4'd2,   // R = X & Y
    ALU_OR    = 4'd3,   // R = X | Y
    ALU_XOR   = 4'd4,   // R = X ^ Y
    ALU_ADD   = 4'd5,   // R = X + Y + carry        (carry cleared on 'first')
    ALU_SUB   = 4'd6,   // R = X + ~Y + carry       (carry set on 'first')
    ALU_BLD   = 4'd7,   // Booth: prev <= cur, cur <= X ('first' clears prev); R = X
    ALU_BOOTH = 4'd8    // Booth step: R = X + Y, X - Y or X by the {cur, prev} pair
  } alu_op_e;

  // Network node roles, decoded from the hop level and the node position.
  typedef enum logic [1:0] {
    NET_RX   = 2'd0,    // receiver: consumes the captured stream
    NET_TX   = 2'd1,    // transmitter: sends its register-file bit
    NET_PASS = 2'd2     // pass: forwards the captured stream
  } net_role_e;

  // Axis along which the hopping network moves data.
  typedef enum logic {
    AXIS_ROW = 1'b0,    // along a row, east to west (towards column 0)
    AXIS_COL = 1'b1     // along a column, south to north (towards row 0)
  } net_axis_e;

  // One broadcast instruction (one clock cycle of the array).
  typedef struct packed {
    // Register-file stage
    logic                 rd_a;       // read port A at raddr_a
    logic [RF_AW-1:0]     raddr_a;
    logic                 rd_b;       // read port B at raddr_b
    logic [RF_AW-1:0]     raddr_b;
    // Write-back stage (port B)
    logic                 we;
    logic [RF_AW-1:0]     waddr;
    // OpMux stage
    opmux_mode_e          opm;
    logic [FOLD_W-1:0]    fold;       // fold level minus one
    logic                 net_hop;    // NET carries the hopping stream, else the shift register
    // ALU stage
    alu_op_e              alu_op;
    logic                 first;      // first (least significant) bit of a serial operation
    // Network node
    logic                 hop_en;     // capture and forward the hopping stream this cycle
    net_axis_e            axis;
    logic                 conf_we;    // load the hop-level configuration register
    logic [NET_LVL_W-1:0] conf_lvl;
    logic                 sh_en;      // shift the column shift chain by one block
    logic                 sh_load;    // load the shift register from the A operand word
  } pim_instr_t;

  localparam pim_instr_t PIM_NOP = '0;

endpackage
