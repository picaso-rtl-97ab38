// Operand multiplexer (OpMux) of a PE-block.
//
// Turns the three words that reach the PEs, A and B from the register file
// and NET from the network node, into the two ALU operand words X and Y.
// Bit i of each word belongs to PE i. X is always A (the published design's figure
// shows A, B and NET entering and X, Y leaving); Y is chosen by the mode:
//   OPM_AB     Y = B
//   OPM_A_NET  Y = NET
//   OPM_FOLD_A Y = A folded by halves: at fold level f (1..log2 W) the
//              distance is D = W >> f and PE i < D receives A[i + D]
//   OPM_FOLD_B Y = A folded by neighbours: the distance is D = 1 << (f-1)
//              and PE i with i mod 2D = 0 receives A[i + D]
// PEs that receive nothing in a fold get Y = 0, so an addition leaves their
// value unchanged. The two folding patterns are the two the published design draws;
// log2 W successive folds leave the sum of all W PEs in PE 0. Folding reads a
// single row, so it needs no copy between bit columns and leaves port B of
// the register file free for the write-back.
//
// Purely combinational; the optional pipeline register after it is in the
// PE-block. The fold input is the fold level minus one.
module picaso_opmux
  import picaso_pkg::*;
#(
  parameter int unsigned W = PE_W
) (
  input  opmux_mode_e       mode,
  input  logic [FOLD_W-1:0] fold,
  input  logic [W-1:0]      a,
  input  logic [W-1:0]      b,
  input  logic [W-1:0]      net,
  output logic [W-1:0]      x,
  output logic [W-1:0]      y
);

  int unsigned lvl;
  int unsigned fdist;

  always_comb begin
    x    = a;
    y    = '0;
    lvl  = int'(fold) + 1;
    fdist = 0;
    unique case (mode)
      OPM_AB:    y = b;
      OPM_A_NET: y = net;
      OPM_FOLD_A: begin
        fdist = W >> lvl;
        for (int unsigned i = 0; i < W; i++)
          if (i < fdist) y[i] = a[i + fdist];
      end
      OPM_FOLD_B: begin
        fdist = 1 << (lvl - 1);
        for (int unsigned i = 0; i < W; i++)
          if ((i % (2 * fdist)) == 0 && (i + fdist) < W) y[i] = a[i + fdist];
      end
      default: y = '0;
    endcase
  end

endmodule
