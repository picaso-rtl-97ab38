// PiCaSO tile: a ROWS x COLS array of PE-blocks, the top of this design.
//
// The overlay is an array processor: every PE-block (one block RAM with 16
// bit-serial PEs) executes the same instruction, broadcast each cycle on
// 'instr' by a controller outside the tile. The PE-blocks' network nodes
// form a NEWS mesh: each node's single transmit output reaches its four
// neighbours, and a node listens to its east neighbour for row transfers and
// to its south neighbour for column transfers. Nodes at the east and south
// edges receive zero. With the binary-hopping levels of picaso_netnode a
// reduction of the blocks' partial sums to block (0,0) takes log2(COLS)
// row levels and log2(ROWS) column levels.
//
// Each column of blocks has a shift chain: shift_in[c] enters block row 0,
// each shift moves every word one block row down, and shift_out[c] is the
// word of the last block row. It loads words into the array and, after a
// parallel load from the register files, unloads them.
//
// The published design evaluates tiles of 4 x 4 PE-blocks, which is the default here,
// in the Full-Pipe configuration. Array size and pipeline configuration are
// parameters. Timing is that of picaso_pe_block: all blocks are in the same
// pipeline state at all times.
module picaso_tile
  import picaso_pkg::*;
#(
  parameter int unsigned ROWS     = 4,
  parameter int unsigned COLS     = 4,
  parameter int unsigned W        = PE_W,
  parameter int unsigned DEPTH    = RF_DEPTH,
  parameter bit          RF_PIPE  = 1'b1,
  parameter bit          OP_PIPE  = 1'b1,
  parameter bit          ALU_PIPE = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  pim_instr_t   instr,
  input  logic [W-1:0] shift_in  [COLS],
  output logic [W-1:0] shift_out [COLS],
  output net_role_e    role      [ROWS][COLS]
);

  logic         tx   [ROWS][COLS];
  logic [W-1:0] shw  [ROWS][COLS];

  for (genvar r = 0; r < int'(ROWS); r++) begin : g_row
    for (genvar c = 0; c < int'(COLS); c++) begin : g_col
      logic         rx_e, rx_s;
      logic [W-1:0] sh_in;

      if (c + 1 < int'(COLS)) begin : g_e
        assign rx_e = tx[r][c+1];
      end else begin : g_e_edge
        assign rx_e = 1'b0;
      end

      if (r + 1 < int'(ROWS)) begin : g_s
        assign rx_s = tx[r+1][c];
      end else begin : g_s_edge
        assign rx_s = 1'b0;
      end

      if (r == 0) begin : g_top
        assign sh_in = shift_in[c];
      end else begin : g_mid
        assign sh_in = shw[r-1][c];
      end

      picaso_pe_block #(
        .W        (W),
        .DEPTH    (DEPTH),
        .ID_W     (NODE_ID_W),
        .RF_PIPE  (RF_PIPE),
        .OP_PIPE  (OP_PIPE),
        .ALU_PIPE (ALU_PIPE)
      ) u_pb (
        .clk    (clk),
        .rst_n  (rst_n),
        .instr  (instr),
        .row_id (NODE_ID_W'(r)),
        .col_id (NODE_ID_W'(c)),
        .rx_e   (rx_e),
        .rx_s   (rx_s),
        .tx     (tx[r][c]),
        .sh_in  (sh_in),
        .sh_out (shw[r][c]),
        .role   (role[r][c])
      );
    end
  end

  for (genvar c = 0; c < int'(COLS); c++) begin : g_out
    assign shift_out[c] = shw[ROWS-1][c];
  end

endmodule
