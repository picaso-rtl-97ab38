// Self-checking testbench of picaso_alu (16 bit-serial PEs).
//
// Streams random 12-bit operands through the ALU least significant bit
// first, one bit per clock, and compares each PE's result with integer
// arithmetic: add, subtract (mod 2^12) and the bitwise operations. Then runs
// a full radix-2 Booth multiplication of signed 6-bit numbers, with the
// testbench playing the register file (partial product of 12 bits), and
// compares with the signed product. Each PE gets its own operands.
module tb_picaso_alu;
  import picaso_pkg::*;

  localparam int W = 16;
  localparam int N = 12;

  logic         clk = 0, rst_n = 0;
  alu_op_e      op;
  logic         first;
  logic [W-1:0] x, y, r;
  int checks = 0, failures = 0;

  picaso_alu dut (.clk, .rst_n, .op, .first, .x, .y, .r);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One bit-serial step: drive, sample the combinational result, clock.
  task automatic step(alu_op_e o, logic f, logic [W-1:0] xx, logic [W-1:0] yy,
                      output logic [W-1:0] rr);
    op = o; first = f; x = xx; y = yy;
    #1 rr = r;
    @(posedge clk); #1;
  endtask

  function automatic int ref_op(alu_op_e o, int a, int b);
    case (o)
      ALU_ADD: return (a + b) & ((1 << N) - 1);
      ALU_SUB: return (a - b) & ((1 << N) - 1);
      ALU_AND: return a & b;
      ALU_OR:  return a | b;
      ALU_XOR: return a ^ b;
      ALU_CPY: return b;
      default: return a;
    endcase
  endfunction

  initial begin
    op = ALU_CPX; first = 0; x = '0; y = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    for (int t = 0; t < 300; t++) begin
      alu_op_e o;
      int av [W], bv [W], rv [W];
      logic [W-1:0] xx, yy, rr;
      o = alu_op_e'($urandom_range(0, 6));
      for (int i = 0; i < W; i++) begin
        av[i] = $urandom_range(0, (1 << N) - 1);
        bv[i] = $urandom_range(0, (1 << N) - 1);
        rv[i] = 0;
      end
      for (int k = 0; k < N; k++) begin
        for (int i = 0; i < W; i++) begin xx[i] = av[i][k]; yy[i] = bv[i][k]; end
        step(o, k == 0, xx, yy, rr);
        for (int i = 0; i < W; i++) rv[i] |= int'(rr[i]) << k;
      end
      for (int i = 0; i < W; i++) begin
        checks++;
        if (rv[i] != ref_op(o, av[i], bv[i])) begin
          failures++;
          if (failures < 10)
            $display("FAIL op=%s pe=%0d a=%0d b=%0d r=%0d exp=%0d", o.name(), i, av[i], bv[i],
                     rv[i], ref_op(o, av[i], bv[i]));
        end
      end
    end

    // Booth multiplication: P(2M bits) = mcand(M) * mplier(M), signed.
    for (int t = 0; t < 20; t++) begin
      localparam int M = 6;
      int mc [W], mp [W], p [W];
      logic [W-1:0] xx, yy, rr;
      for (int i = 0; i < W; i++) begin
        mc[i] = $urandom_range(0, (1 << M) - 1);
        mp[i] = $urandom_range(0, (1 << M) - 1);
        if (t == 0) begin mc[i] = 6'h20; mp[i] = 6'h20; end   // -32 * -32
        p[i] = 0;
      end
      for (int s = 0; s < M; s++) begin
        for (int i = 0; i < W; i++) yy[i] = mp[i][s];
        step(ALU_BLD, s == 0, yy, '0, rr);
        for (int j = 0; j < 2 * M - s; j++) begin
          for (int i = 0; i < W; i++) begin
            xx[i] = p[i][s + j];
            yy[i] = mc[i][(j < M) ? j : M - 1];   // sign extension of the multiplicand
          end
          step(ALU_BOOTH, j == 0, xx, yy, rr);
          for (int i = 0; i < W; i++) p[i][s + j] = rr[i];
        end
      end
      for (int i = 0; i < W; i++) begin
        int sa, sb, prod;
        sa = (mc[i] >= 32) ? mc[i] - 64 : mc[i];
        sb = (mp[i] >= 32) ? mp[i] - 64 : mp[i];
        prod = (sa * sb) & 12'hfff;
        checks++;
        if (p[i] != prod) begin
          failures++;
          if (failures < 10) $display("FAIL booth pe=%0d %0d*%0d got %h exp %h", i, sa, sb, p[i], prod);
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
