// Self-checking testbench of picaso_opmux.
//
// Drives random A, B and NET words in every mode and at every fold level and
// compares X and Y with a reference: fold pattern a as a right shift of A by
// D = 16 >> f masked to D bits, fold pattern b as an explicit list of the
// receiving PEs. Also checks that log2(16) folds of pattern a and of pattern
// b, applied with additions, gather the sum of all PEs in PE 0.
module tb_picaso_opmux;
  import picaso_pkg::*;

  localparam int W = 16;

  opmux_mode_e       mode;
  logic [FOLD_W-1:0] fold;
  logic [W-1:0]      a, b, net, x, y;
  int checks = 0, failures = 0;

  picaso_opmux dut (.mode(mode), .fold(fold), .a(a), .b(b), .net(net), .x(x), .y(y));

  function automatic logic [W-1:0] ref_y(opmux_mode_e m, int f, logic [W-1:0] aa,
                                         logic [W-1:0] bb, logic [W-1:0] nn);
    logic [W-1:0] r;
    int d;
    r = '0;
    case (m)
      OPM_AB:    r = bb;
      OPM_A_NET: r = nn;
      OPM_FOLD_A: begin
        d = W >> f;
        r = (aa >> d) & ((W'(1) << d) - 1);
      end
      default: begin
        d = 1 << (f - 1);
        for (int i = 0; i + d < W; i += 2 * d) r[i] = aa[i + d];
      end
    endcase
    return r;
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Fixed points taken from the folding-pattern drawing (8 of 16 PEs shown):
    // pattern a, level 1 sends PE 8 to PE 0; pattern b, level 1 sends PE 1 to 0.
    a = 16'h0100; b = '0; net = '0; mode = OPM_FOLD_A; fold = 2'd0; #1;
    checks++; if (y !== 16'h0001) begin failures++; $display("FAIL fold-a L1 fixed y=%h", y); end
    a = 16'h0002; mode = OPM_FOLD_B; #1;
    checks++; if (y !== 16'h0001) begin failures++; $display("FAIL fold-b L1 fixed y=%h", y); end
    a = 16'h0100; #1;  // pattern b level 1: PE 8 receives PE 9, PE 0 gets nothing
    checks++; if (y !== 16'h0000) begin failures++; $display("FAIL fold-b L1 fixed2 y=%h", y); end
    a = 16'h0004; fold = 2'd1; #1; // pattern b level 2: PE 2 -> PE 0
    checks++; if (y !== 16'h0001) begin failures++; $display("FAIL fold-b L2 fixed y=%h", y); end

    for (int n = 0; n < 2000; n++) begin
      a    = W'($urandom);
      b    = W'($urandom);
      net  = W'($urandom);
      mode = opmux_mode_e'($urandom_range(0, 3));
      fold = FOLD_W'($urandom_range(0, 3));
      #1;
      checks++;
      if (x !== a || y !== ref_y(mode, int'(fold) + 1, a, b, net)) begin
        failures++;
        if (failures < 10)
          $display("FAIL mode=%0d fold=%0d a=%h b=%h net=%h x=%h y=%h exp=%h", mode, fold,
                   a, b, net, x, y, ref_y(mode, int'(fold) + 1, a, b, net));
      end
    end

    // Reduction with word-level adds: sum of 16 lane values ends in lane 0.
    for (int p = 0; p < 2; p++) begin
      int vals [W];
      int sum;
      sum = 0;
      for (int i = 0; i < W; i++) begin vals[i] = $urandom_range(0, 255); sum += vals[i]; end
      for (int f = 1; f <= 4; f++) begin
        int nv [W];
        // apply the multiplexer to each bit-plane of the 12-bit values
        for (int i = 0; i < W; i++) nv[i] = vals[i];
        for (int bit_i = 0; bit_i < 12; bit_i++) begin
          for (int i = 0; i < W; i++) a[i] = vals[i][bit_i];
          mode = (p == 0) ? OPM_FOLD_A : OPM_FOLD_B;
          fold = FOLD_W'(f - 1);
          #1;
          for (int i = 0; i < W; i++) if (y[i]) nv[i] += (1 << bit_i);
        end
        vals = nv;
      end
      checks++;
      if (vals[0] != sum) begin
        failures++;
        $display("FAIL reduction pattern %0d: lane0=%0d sum=%0d", p, vals[0], sum);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
