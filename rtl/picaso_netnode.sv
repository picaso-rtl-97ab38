// Network node of a PE-block: one node of the binary-hopping data network.
//
// The nodes form a NEWS mesh, one node per PE-block. For reductions across
// blocks the network runs in levels: at level L, along the chosen axis, the
// node whose position p satisfies p mod 2^(L+1) = 0 is a receiver (R),
// the node with p mod 2^(L+1) = 2^L is a transmitter (T) and every other
// node passes the stream on (P). Data moves towards position 0: westwards
// along a row, northwards along a column. This gives the published design's hopping
// pattern, e.g. for 8 nodes: L=0 R T R T R T R T, L=1 R P T P R P T P,
// L=2 R P P P T P P P.
//
// Inside, following the published design's node figure: a configuration register
// (Conf, 3 bits, the hop level) feeds a decoder that, with the node's fixed
// position, selects the role. The RX multiplexer picks the neighbour input
// (east for rows, south for columns) and a Capture flip-flop samples it.
// The TX multiplexer drives either the PE-block's register-file bit
// (transmitter) or the captured bit (pass and receiver) onto the single
// output that all four neighbours see. Each hop therefore costs one cycle,
// so a level-L transfer arrives 2^L cycles after it was sent. A receiver
// presents the captured bit as NET bit 0 (the PE that holds a block's folded
// sum); in all other nodes, and in the other bits, hopping NET is zero, so an
// addition of NET changes nothing there.
//
// The node also holds the word shift register of the figure (Shift-In,
// Shift-Out). The registers of a column of blocks form a chain that moves
// one W-bit word per cycle from block row to block row, for loading and
// unloading data. This design adds a parallel load from the A operand word so
// that results can be shifted out. When net_hop is low, NET is the shift
// register.
//
// All inputs act in the operand stage of the PE-block and take effect on the
// clock edge; tx and net are functions of the registered state and of
// tx_bit. The encodings, the chain direction and the parallel load are this
// design's choices.
module picaso_netnode
  import picaso_pkg::*;
#(
  parameter int unsigned W     = PE_W,
  parameter int unsigned ID_W  = NODE_ID_W,
  parameter int unsigned LVL_W = NET_LVL_W
) (
  input  logic             clk,
  input  logic             rst_n,
  // Fixed position of the node in the array
  input  logic [ID_W-1:0]  row_id,
  input  logic [ID_W-1:0]  col_id,
  // Control (operand stage)
  input  logic             conf_we,
  input  logic [LVL_W-1:0] conf_lvl,
  input  logic             hop_en,
  input  net_axis_e        axis,
  input  logic             net_hop,
  input  logic             sh_en,
  input  logic             sh_load,
  // Hopping network
  input  logic             tx_bit,   // bit from the register file (A word, PE 0)
  input  logic             rx_e,     // from the east neighbour
  input  logic             rx_s,     // from the south neighbour
  output logic             tx,       // to all four neighbours
  // Shift chain
  input  logic [W-1:0]     sh_in,
  input  logic [W-1:0]     load_word,
  output logic [W-1:0]     sh_out,
  // To the OpMux
  output logic [W-1:0]     net,
  output net_role_e        role
);

  logic [LVL_W-1:0] conf_q;
  logic             capture_q;
  logic [W-1:0]     sreg_q;

  // Decoder: role from the level and the position along the axis.
  always_comb begin
    logic [ID_W:0] pos, mask, low;
    pos  = {1'b0, (axis == AXIS_ROW) ? col_id : row_id};
    mask = (({{ID_W{1'b0}}, 1'b1} << conf_q) << 1) - 1'b1;
    low  = pos & mask;
    if (low == '0)                                role = NET_RX;
    else if (low == ({{ID_W{1'b0}}, 1'b1} << conf_q)) role = NET_TX;
    else                                          role = NET_PASS;
  end

  assign tx     = (role == NET_TX) ? tx_bit : capture_q;
  assign sh_out = sreg_q;

  always_comb begin
    if (net_hop) begin
      net    = '0;
      net[0] = (role == NET_RX) & capture_q;
    end else begin
      net = sreg_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      conf_q    <= '0;
      capture_q <= 1'b0;
      sreg_q    <= '0;
    end else begin
      if (conf_we) conf_q <= conf_lvl;
      if (hop_en)  capture_q <= (axis == AXIS_ROW) ? rx_e : rx_s;
      if (sh_load)    sreg_q <= load_word;
      else if (sh_en) sreg_q <= sh_in;
    end
  end

endmodule
