// MAC workload testbench: the multiply-accumulate the latency and
// throughput comparisons evaluate, at 4-, 8- and 16-bit precision, on one
// PE-block at its default size (Full-Pipe, 1024 rows, 16 PEs).
//
// For each precision N: 16 signed Booth multiplications in parallel (one per
// PE), then the accumulation of the 16 products into PE 0 with four chained
// fold levels over a field of 2N + 4 bits (q = 16 values need log2 q = 4
// growth bits). Checks the products and the sum, and checks the cycle
// counts: the accumulation of w-bit values issues exactly (w + 4) * log2 q
// instructions (w = 2N), and the last result bit is written 4 cycles after
// the last issue. The multiplication (N iterations of N + 1 bit operations
// with two port reads each) must issue in 2N^2 + 2N cycles, the closed form
// of the published design, plus at most N cycles of scheduling slack; the count is
// printed. Also runs the accumulation of 8-bit
// values alone, the (N = 8, q = 16) case, which takes 48 issue cycles.
module tb_picaso_mac;
  import picaso_pkg::*;
  import picaso_prog_pkg::*;

  localparam int W = 16;
  localparam int prec [3] = '{4, 8, 16};
  localparam int LAT = 4;            // 1 + RF_PIPE + OP_PIPE + ALU_PIPE
  localparam int LRF = 2;            // issue to operand stage

  logic         clk = 0, rst_n = 0;
  pim_instr_t   instr;
  logic [W-1:0] sh_in, sh_out;
  logic         tx;
  net_role_e    role;
  int checks = 0, failures = 0;

  picaso_pe_block dut (
    .clk, .rst_n, .instr, .row_id(8'd0), .col_id(8'd0), .rx_e(1'b0), .rx_s(1'b0), .tx,
    .sh_in, .sh_out, .role
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input prog_t q);
    foreach (q[i]) begin
      instr = q[i];
      @(posedge clk); #1;
    end
    instr = PIM_NOP;
  endtask

  task automatic load_row(input int row, input logic [W-1:0] word);
    prog_t q;
    pim_instr_t i;
    sh_in = word;
    i = PIM_NOP; i.sh_en = 1'b1; q.push_back(i);
    nops(q, LRF + 1);
    i = PIM_NOP; i.opm = OPM_A_NET; i.alu_op = ALU_CPY; i.we = 1'b1; i.waddr = RF_AW'(row);
    q.push_back(i);
    nops(q, LAT + 1);
    run(q);
  endtask

  task automatic read_row(input int row, output logic [W-1:0] word);
    prog_t q;
    pim_instr_t i;
    i = PIM_NOP; i.rd_a = 1'b1; i.raddr_a = RF_AW'(row); i.sh_load = 1'b1; q.push_back(i);
    nops(q, LRF + 1);
    run(q);
    word = sh_out;
  endtask

  // Store / fetch an n-bit field of all PEs (row k holds bit k of every PE).
  task automatic put(input int base, input int n, input int v [W]);
    for (int k = 0; k < n; k++) begin
      logic [W-1:0] w;
      for (int p = 0; p < W; p++) w[p] = v[p][k];
      load_row(base + k, w);
    end
  endtask

  task automatic get(input int base, input int n, output int v [W]);
    for (int p = 0; p < W; p++) v[p] = 0;
    for (int k = 0; k < n; k++) begin
      logic [W-1:0] w;
      read_row(base + k, w);
      for (int p = 0; p < W; p++) v[p] |= int'(w[p]) << k;
    end
  endtask

  function automatic int sx(int v, int n);   // sign-extend n-bit v
    return (v >= (1 << (n - 1))) ? v - (1 << n) : v;
  endfunction

  task automatic expect_field(string what, int got [W], int exp [W], int n, int lanes);
    for (int p = 0; p < lanes; p++) begin
      checks++;
      if (got[p] != (exp[p] & ((1 << n) - 1))) begin
        failures++;
        if (failures < 12)
          $display("FAIL %s PE %0d: got %h exp %h", what, p, got[p], exp[p] & ((1 << n) - 1));
      end
    end
  endtask

  initial begin
    prog_t q;
    instr = PIM_NOP; sh_in = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    foreach (prec[t]) begin
      int n, wacc, mul_cycles, acc_cycles, sum, sum8;
      int a [W], b [W], r [W], e [W];
      n    = prec[t];
      wacc = 2 * n + 4;
      for (int p = 0; p < W; p++) begin
        a[p] = $urandom_range(0, (1 << n) - 1);
        b[p] = $urandom_range(0, (1 << n) - 1);
      end
      a[0] = 1 << (n - 1); b[0] = 1 << (n - 1);   // most negative squared
      put(0, n, a);
      put(16, n, b);

      q.delete(); booth_clear(q, LAT, 100, n); run(q);
      q.delete(); booth_mul(q, LAT, 100, 0, 16, n); mul_cycles = q.size() - (LAT + 1); run(q);
      // the schedule stays within N cycles of two cycles per bit operation
      checks++;
      if (mul_cycles < 2 * n * n + 2 * n || mul_cycles > 2 * n * n + 3 * n) begin
        failures++;
        $display("FAIL %0d-bit multiply took %0d issue cycles", n, mul_cycles);
      end
      get(100, 2 * n, r);
      sum = 0;
      foreach (e[p]) begin e[p] = sx(a[p], n) * sx(b[p], n); sum += e[p]; end
      expect_field($sformatf("%0d-bit product", n), r, e, 2 * n, W);

      q.delete(); sext_copy(q, LAT, 200, 100, 2 * n, wacc); run(q);
      q.delete();
      for (int l = 1; l <= 4; l++) fold(q, LAT, OPM_FOLD_A, l, 200, wacc);
      acc_cycles = q.size();
      nops(q, LAT + 1);
      run(q);
      get(200, wacc, r);
      e[0] = sum;
      expect_field($sformatf("%0d-bit accumulation", n), r, e, wacc, 1);
      checks++;
      if (acc_cycles != wacc * 4) begin
        failures++;
        $display("FAIL accumulation of %0d-bit values took %0d cycles, expected %0d", wacc,
                 acc_cycles, wacc * 4);
      end
      $display("N=%0d: multiply %0d issue cycles (closed form 2N^2+2N = %0d), accumulate %0d-bit x16: %0d cycles + %0d drain",
               n, mul_cycles, 2 * n * n + 2 * n, wacc, acc_cycles, LAT);

      // accumulation of 8-bit values alone (the published design's q = 16, N = 8 case)
      if (n == 8) begin
        q.delete(); sext_copy(q, LAT, 300, 0, 8, 12); run(q);
        q.delete();
        for (int l = 1; l <= 4; l++) fold(q, LAT, OPM_FOLD_B, l, 300, 12);
        checks++;
        if (q.size() != 48) begin failures++; $display("FAIL 8-bit accumulation %0d cycles", q.size()); end
        nops(q, LAT + 1);
        run(q);
        get(300, 12, r);
        sum8 = 0; foreach (a[p]) sum8 += sx(a[p], 8);
        e[0] = sum8;
        expect_field("8-bit accumulation", r, e, 12, 1);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
