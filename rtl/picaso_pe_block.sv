// PE-block: the processor-in-memory unit of the overlay.
//
// One block RAM register file (picaso_regfile), the operand multiplexer
// (picaso_opmux), W bit-serial PEs (picaso_alu) and a network node
// (picaso_netnode). The dataflow is the published design's: the register file
// delivers words A and B, A also goes to the network node, the node delivers
// NET, the OpMux turns A/B/NET into X/Y, the ALU produces R and R is written
// back through port B of the register file.
//
// Pipeline. The published design names three optional pipeline registers and four
// configurations: Single-Cycle (none), RF-Pipe (after the RAM), Op-Pipe
// (after the OpMux) and Full-Pipe (all three, the main configuration and the
// default here). RF_PIPE, OP_PIPE and ALU_PIPE enable the register after the
// RAM, the OpMux and the ALU. The RAM read itself always takes one clock.
// An instruction issued in cycle t
//   reads the RAM in cycle t,
//   is in the operand stage (OpMux, network node) in cycle t + 1 + RF_PIPE,
//   is in the ALU in cycle t + 1 + RF_PIPE + OP_PIPE,
//   writes port B in cycle t + LAT, LAT = 1 + RF_PIPE + OP_PIPE + ALU_PIPE,
// so the result is visible to a read issued in cycle t + LAT + 1 or later.
// The instruction fields are delayed with the data, so each stage acts on
// the fields of the instruction it holds.
//
// Port B. A write-back uses port B, so an instruction that reads port B must
// not be issued in a cycle in which a write-back takes place; the issuing
// controller schedules this (an assertion checks it, and the write wins).
// Operations that read A and B therefore run at one bit per two cycles;
// folds and network transfers, which read only A, run at one bit per cycle.
//
// Network. The node's transmit bit is PE 0's bit of the A word in the
// operand stage. IDs give the block's place in the array.
module picaso_pe_block
  import picaso_pkg::*;
#(
  parameter int unsigned W        = PE_W,
  parameter int unsigned DEPTH    = RF_DEPTH,
  parameter int unsigned ID_W     = NODE_ID_W,
  parameter bit          RF_PIPE  = 1'b1,
  parameter bit          OP_PIPE  = 1'b1,
  parameter bit          ALU_PIPE = 1'b1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  pim_instr_t      instr,
  input  logic [ID_W-1:0] row_id,
  input  logic [ID_W-1:0] col_id,
  // Hopping network
  input  logic            rx_e,
  input  logic            rx_s,
  output logic            tx,
  // Shift chain
  input  logic [W-1:0]    sh_in,
  output logic [W-1:0]    sh_out,
  output net_role_e       role
);

  localparam int unsigned AW = $clog2(DEPTH);

  // ---------------------------------------------------------------- control
  pim_instr_t ctl_rf, ctl_op, ctl_alu, ctl_wb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ctl_rf <= PIM_NOP;
    else        ctl_rf <= instr;
  end

  if (RF_PIPE) begin : g_rf_ctl
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) ctl_op <= PIM_NOP;
      else        ctl_op <= ctl_rf;
    end
  end else begin : g_rf_ctl_n
    assign ctl_op = ctl_rf;
  end

  if (OP_PIPE) begin : g_op_ctl
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) ctl_alu <= PIM_NOP;
      else        ctl_alu <= ctl_op;
    end
  end else begin : g_op_ctl_n
    assign ctl_alu = ctl_op;
  end

  if (ALU_PIPE) begin : g_alu_ctl
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) ctl_wb <= PIM_NOP;
      else        ctl_wb <= ctl_alu;
    end
  end else begin : g_alu_ctl_n
    assign ctl_wb = ctl_alu;
  end

  // ---------------------------------------------------------- register file
  logic [W-1:0] a_ram, b_ram, a_op, b_op, r_alu, r_wb;

  picaso_regfile #(.W(W), .DEPTH(DEPTH)) u_rf (
    .clk    (clk),
    .a_en   (instr.rd_a),
    .a_addr (instr.raddr_a[AW-1:0]),
    .a_dout (a_ram),
    .b_en   (instr.rd_b | ctl_wb.we),
    .b_we   (ctl_wb.we),
    .b_addr (ctl_wb.we ? ctl_wb.waddr[AW-1:0] : instr.raddr_b[AW-1:0]),
    .b_din  (r_wb),
    .b_dout (b_ram)
  );

  if (RF_PIPE) begin : g_rf_pipe
    always_ff @(posedge clk) begin
      a_op <= a_ram;
      b_op <= b_ram;
    end
  end else begin : g_rf_pipe_n
    assign a_op = a_ram;
    assign b_op = b_ram;
  end

  // ------------------------------------------------------------ network node
  logic [W-1:0] net;

  picaso_netnode #(.W(W), .ID_W(ID_W), .LVL_W(NET_LVL_W)) u_node (
    .clk       (clk),
    .rst_n     (rst_n),
    .row_id    (row_id),
    .col_id    (col_id),
    .conf_we   (ctl_op.conf_we),
    .conf_lvl  (ctl_op.conf_lvl),
    .hop_en    (ctl_op.hop_en),
    .axis      (ctl_op.axis),
    .net_hop   (ctl_op.net_hop),
    .sh_en     (ctl_op.sh_en),
    .sh_load   (ctl_op.sh_load),
    .tx_bit    (a_op[0]),
    .rx_e      (rx_e),
    .rx_s      (rx_s),
    .tx        (tx),
    .sh_in     (sh_in),
    .load_word (a_op),
    .sh_out    (sh_out),
    .net       (net),
    .role      (role)
  );

  // ------------------------------------------------------------------ OpMux
  logic [W-1:0] x_mux, y_mux, x_alu, y_alu;

  picaso_opmux #(.W(W)) u_opmux (
    .mode (ctl_op.opm),
    .fold (ctl_op.fold),
    .a    (a_op),
    .b    (b_op),
    .net  (net),
    .x    (x_mux),
    .y    (y_mux)
  );

  if (OP_PIPE) begin : g_op_pipe
    always_ff @(posedge clk) begin
      x_alu <= x_mux;
      y_alu <= y_mux;
    end
  end else begin : g_op_pipe_n
    assign x_alu = x_mux;
    assign y_alu = y_mux;
  end

  // -------------------------------------------------------------------- ALU
  picaso_alu #(.W(W)) u_alu (
    .clk   (clk),
    .rst_n (rst_n),
    .op    (ctl_alu.alu_op),
    .first (ctl_alu.first),
    .x     (x_alu),
    .y     (y_alu),
    .r     (r_alu)
  );

  if (ALU_PIPE) begin : g_alu_pipe
    always_ff @(posedge clk) r_wb <= r_alu;
  end else begin : g_alu_pipe_n
    assign r_wb = r_alu;
  end

  // -------------------------------------------------------------- checking
  // A port-B read may not be issued in a write-back cycle.
  a_portb_free : assert property (@(posedge clk) disable iff (!rst_n)
                                  !(instr.rd_b && ctl_wb.we))
    else $error("port B read issued during a write-back");

endmodule
