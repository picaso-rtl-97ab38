// Bit-serial ALU of a PE-block: W processing elements working in lock-step.
//
// Every cycle each PE takes one bit of X and one of Y and produces one result
// bit R, least significant bit first. A PE is a full adder with a carry
// flip-flop plus the logic gates, so an addition of q-bit numbers takes q
// cycles. The 'first' input marks the least significant bit: it clears the
// carry for ALU_ADD and sets it for ALU_SUB (two's complement X - Y).
//
// The published design states that the PEs support Booth's multiplication. This
// design does it with two flip-flops per PE, cur and prev, that hold the
// current pair of multiplier bits (m_i, m_i-1):
//   ALU_BLD    prev <= cur, cur <= X  ('first' clears prev, i.e. m_-1 = 0)
//   ALU_BOOTH  pair 01: R = X + Y; pair 10: R = X - Y; otherwise R = X
// Since each PE holds its own pair, every PE multiplies by its own
// multiplier while all run the same instruction. ALU_BLD takes the
// multiplier bit from X (port A), so it needs no port-B read and can be
// issued in a cycle in which port B is busy with a write-back. The operation set and its
// encoding are this design's choice; the published design gives only "full adder"
// style PEs with bitwise operations and Booth support.
//
// R is combinational from X, Y and the state; the carry and the Booth pair
// update on the clock edge. The optional pipeline register after the ALU is
// in the PE-block.
module picaso_alu
  import picaso_pkg::*;
#(
  parameter int unsigned W = PE_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  alu_op_e      op,
  input  logic         first,
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] r
);

  logic [W-1:0] carry_q, cur_q, prev_q;
  logic [W-1:0] carry_d, cur_d, prev_d;

  always_comb begin
    carry_d = carry_q;
    cur_d   = cur_q;
    prev_d  = prev_q;
    r       = '0;
    for (int i = 0; i < W; i++) begin
      logic cin, yy, do_arith, sub;
      do_arith = 1'b0;
      cin      = 1'b0;
      yy       = 1'b0;
      sub      = 1'b0;
      unique case (op)
        ALU_CPX: r[i] = x[i];
        ALU_CPY: r[i] = y[i];
        ALU_AND: r[i] = x[i] & y[i];
        ALU_OR:  r[i] = x[i] | y[i];
        ALU_XOR: r[i] = x[i] ^ y[i];
        ALU_ADD: do_arith = 1'b1;
        ALU_SUB: begin do_arith = 1'b1; sub = 1'b1; end
        ALU_BLD: begin
          r[i]      = x[i];
          cur_d[i]  = x[i];
          prev_d[i] = first ? 1'b0 : cur_q[i];
        end
        ALU_BOOTH: begin
          r[i] = x[i];
          if (cur_q[i] != prev_q[i]) begin
            do_arith = 1'b1;
            sub      = cur_q[i];        // pair 10 subtracts, 01 adds
          end
        end
        default: r[i] = x[i];
      endcase
      if (do_arith) begin
        cin        = first ? sub : carry_q[i];
        yy         = y[i] ^ sub;
        r[i]       = x[i] ^ yy ^ cin;
        carry_d[i] = (x[i] & yy) | (x[i] & cin) | (yy & cin);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      carry_q <= '0;
      cur_q   <= '0;
      prev_q  <= '0;
    end else begin
      carry_q <= carry_d;
      cur_q   <= cur_d;
      prev_q  <= prev_d;
    end
  end

endmodule
