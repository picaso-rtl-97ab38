// Register file of one PE-block: a two-port block RAM, W bits wide.
//
// Each column of the RAM belongs to one bit-serial PE, so a row holds one bit
// of the same operand for all W PEs, and a q-bit operand of a PE occupies q
// consecutive rows. The published design maps the register file onto one 18 Kb FPGA
// block RAM with 16 PEs; with a 16-bit port that RAM holds 1024 rows.
//
// Port A only reads. Port B either reads or writes in a cycle, like a port of
// a true dual-port block RAM: a binary operation that reads two operands and
// writes one result therefore needs two RAM cycles per bit, while an
// operation that reads one row (a fold or a network transfer) reads on A and
// writes on B in the same cycle. If b_we is set the port writes and b_dout
// keeps its last value. Both reads are synchronous: data appears on the
// output one clock after the address, as in a block RAM. A read of a row that
// port B writes in the same cycle returns the old contents (read-first).
// The contents start at zero, as a block RAM configured without an INIT
// pattern does.
module picaso_regfile #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  // Port A: read only
  input  logic          a_en,
  input  logic [AW-1:0] a_addr,
  output logic [W-1:0]  a_dout,
  // Port B: read or write
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [W-1:0]  b_din,
  output logic [W-1:0]  b_dout
);

  logic [W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (a_en) a_dout <= mem[a_addr];
  end

  always_ff @(posedge clk) begin
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_din;
      else      b_dout      <= mem[b_addr];
    end
  end

endmodule
