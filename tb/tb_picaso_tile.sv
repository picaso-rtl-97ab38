// End-to-end testbench of picaso_tile at its default size: 4 x 4 PE-blocks,
// 16 PEs each (256 PEs), 1024-row register files, Full-Pipe.
//
// Plays the controller: loads two random signed 8-bit operands into every
// PE through the column shift chains, adds and subtracts them, multiplies
// them with the Booth sequence, then reduces all 256 products to one sum:
// four fold levels (pattern a) inside each block, then binary hopping along
// the rows (levels 0 and 1) and along the columns (levels 0 and 1). Level 1
// crosses a pass node. Finally reduces the sums inside each block with fold
// pattern b. Every result is read back through the shift chains and
// compared with integer arithmetic. Counts how often each mechanism ran and
// fails if one never did.
module tb_picaso_tile;
  import picaso_pkg::*;
  import picaso_prog_pkg::*;

  localparam int R = 4, C = 4, W = 16, N = 8;
  localparam int LAT = 4;            // write-back latency, Full-Pipe
  localparam int LRF = 2;            // issue to operand stage
  localparam int NA  = 24;           // width of the accumulation field

  logic         clk = 0, rst_n = 0;
  pim_instr_t   instr;
  logic [W-1:0] shift_in  [C];
  logic [W-1:0] shift_out [C];
  net_role_e    role      [R][C];
  int checks = 0, failures = 0;

  typedef int field_t [R][C][W];

  picaso_tile dut (.clk, .rst_n, .instr, .shift_in, .shift_out, .role);

  always #5 clk = ~clk;

  // mechanism counters
  int n_shift_in = 0, n_shift_out = 0, n_add = 0, n_sub = 0, n_booth = 0;
  int n_booth_add = 0, n_booth_sub = 0, n_fold_a = 0, n_fold_b = 0;
  int n_hop_row = 0, n_hop_col = 0, n_pass = 0, n_rx = 0, n_tx = 0;

  // hop_en of the instruction now in the operand stage (issued LRF cycles ago)
  logic [LRF-1:0] hop_hist = '0;
  always @(posedge clk) hop_hist <= {hop_hist[LRF-2:0], instr.hop_en};

  always @(posedge clk) if (hop_hist[LRF-1]) begin
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        if (role[r][c] == NET_PASS) n_pass++;
        if (role[r][c] == NET_RX)   n_rx++;
        if (role[r][c] == NET_TX)   n_tx++;
      end
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  task automatic shift_step();
    prog_t q;
    pim_instr_t i;
    i = PIM_NOP; i.sh_en = 1'b1; q.push_back(i);
    nops(q, LRF + 1);
    run(q);
  endtask

  // Row 'row' of every block <= words[r][c]
  task automatic load_row(input int row, input logic [W-1:0] words [R][C]);
    prog_t q;
    pim_instr_t i;
    for (int s = 0; s < R; s++) begin
      for (int c = 0; c < C; c++) shift_in[c] = words[R - 1 - s][c];
      shift_step();
    end
    i = PIM_NOP; i.opm = OPM_A_NET; i.alu_op = ALU_CPY; i.we = 1'b1; i.waddr = RF_AW'(row);
    q.push_back(i);
    nops(q, LAT + 1);
    run(q);
    n_shift_in++;
  endtask

  task automatic read_row(input int row, output logic [W-1:0] words [R][C]);
    prog_t q;
    pim_instr_t i;
    i = PIM_NOP; i.rd_a = 1'b1; i.raddr_a = RF_AW'(row); i.sh_load = 1'b1; q.push_back(i);
    nops(q, LRF + 1);
    run(q);
    for (int s = 0; s < R; s++) begin
      for (int c = 0; c < C; c++) words[R - 1 - s][c] = shift_out[c];
      shift_step();
    end
    n_shift_out++;
  endtask

  task automatic put(input int base, input int n, input field_t v);
    for (int k = 0; k < n; k++) begin
      logic [W-1:0] w [R][C];
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++)
          for (int p = 0; p < W; p++) w[r][c][p] = v[r][c][p][k];
      load_row(base + k, w);
    end
  endtask

  task automatic get(input int base, input int n, output field_t v);
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++)
        for (int p = 0; p < W; p++) v[r][c][p] = 0;
    for (int k = 0; k < n; k++) begin
      logic [W-1:0] w [R][C];
      read_row(base + k, w);
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++)
          for (int p = 0; p < W; p++) v[r][c][p] |= int'(w[r][c][p]) << k;
    end
  endtask

  function automatic int sx(int v, int n);
    return (v >= (1 << (n - 1))) ? v - (1 << n) : v;
  endfunction

  task automatic expect1(string what, int r, int c, int p, int got, int exp, int n);
    checks++;
    if (got != (exp & ((1 << n) - 1))) begin
      failures++;
      if (failures < 12)
        $display("FAIL %s block(%0d,%0d) PE %0d: got %h exp %h", what, r, c, p, got,
                 exp & ((1 << n) - 1));
    end
  endtask

  initial begin
    field_t a, b, got;
    int prod [R][C][W];
    int bsum [R][C];            // per-block sum of products
    int rsum [R];               // per-row sum of products
    int total;
    prog_t q;

    instr = PIM_NOP;
    for (int c = 0; c < C; c++) shift_in[c] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++)
        for (int p = 0; p < W; p++) begin
          a[r][c][p] = $urandom_range(0, 255);
          b[r][c][p] = $urandom_range(0, 255);
        end
    a[3][3][15] = 8'h80; b[3][3][15] = 8'h80;

    // ---- load through the shift chains
    put(0, N, a);
    put(8, N, b);
    get(0, N, got);
    foreach (got[r, c, p]) expect1("load", r, c, p, got[r][c][p], a[r][c][p], N);

    // ---- element-wise add and subtract
    q.delete(); bin_op(q, LAT, ALU_ADD, 16, 0, 8, N); run(q); n_add++;
    q.delete(); bin_op(q, LAT, ALU_SUB, 24, 0, 8, N); run(q); n_sub++;
    get(16, N, got);
    foreach (got[r, c, p]) expect1("add", r, c, p, got[r][c][p], a[r][c][p] + b[r][c][p], N);
    get(24, N, got);
    foreach (got[r, c, p]) expect1("sub", r, c, p, got[r][c][p], a[r][c][p] - b[r][c][p], N);

    // ---- Booth multiplication in all 256 PEs
    q.delete(); booth_clear(q, LAT, 100, N); booth_mul(q, LAT, 100, 0, 8, N); run(q); n_booth++;
    get(100, 2 * N, got);
    total = 0;
    for (int r = 0; r < R; r++) begin
      rsum[r] = 0;
      for (int c = 0; c < C; c++) begin
        bsum[r][c] = 0;
        for (int p = 0; p < W; p++) begin
          int prev;
          prod[r][c][p] = sx(a[r][c][p], N) * sx(b[r][c][p], N);
          bsum[r][c] += prod[r][c][p];
          expect1("booth", r, c, p, got[r][c][p], prod[r][c][p], 2 * N);
          prev = 0;
          for (int s = 0; s < N; s++) begin     // count Booth add/subtract steps
            if (b[r][c][p][s] && !prev) n_booth_sub++;
            if (!b[r][c][p][s] && prev) n_booth_add++;
            prev = b[r][c][p][s];
          end
        end
        rsum[r] += bsum[r][c];
      end
      total += rsum[r];
    end

    // ---- reduction, step 1: fold pattern a inside every block
    q.delete();
    sext_copy(q, LAT, 200, 100, 2 * N, NA);
    for (int l = 1; l <= 4; l++) begin fold(q, LAT, OPM_FOLD_A, l, 200, NA); n_fold_a++; end
    nops(q, LAT + 1);
    run(q);
    get(200, NA, got);
    foreach (bsum[r, c]) expect1("fold-a block sum", r, c, 0, got[r][c][0], bsum[r][c], NA);

    // ---- step 2: binary hopping along the rows, to column 0
    for (int l = 0; l < 2; l++) begin
      q.delete();
      hop(q, LAT, AXIS_ROW, l, 300, 200, NA);
      bin_op(q, LAT, ALU_ADD, 200, 200, 300, NA);
      run(q);
      n_hop_row++;
    end
    get(200, NA, got);
    for (int r = 0; r < R; r++) begin
      expect1("row sum", r, 0, 0, got[r][0][0], rsum[r], NA);
      // column 1 was a transmitter, then a pass node: unchanged
      expect1("pass/tx unchanged", r, 1, 0, got[r][1][0], bsum[r][1], NA);
      // column 2 was a receiver at level 0 only
      expect1("level-0 receiver", r, 2, 0, got[r][2][0], bsum[r][2] + bsum[r][3], NA);
    end

    // ---- step 3: binary hopping along the columns, to row 0
    for (int l = 0; l < 2; l++) begin
      q.delete();
      hop(q, LAT, AXIS_COL, l, 300, 200, NA);
      bin_op(q, LAT, ALU_ADD, 200, 200, 300, NA);
      run(q);
      n_hop_col++;
    end
    get(200, NA, got);
    expect1("total", 0, 0, 0, got[0][0][0], total, NA);
    expect1("row 2 partial", 2, 0, 0, got[2][0][0], rsum[2] + rsum[3], NA);

    // ---- fold pattern b on the 8-bit sums, per block
    q.delete();
    sext_copy(q, LAT, 400, 16, N, 12);
    for (int l = 1; l <= 4; l++) begin fold(q, LAT, OPM_FOLD_B, l, 400, 12); n_fold_b++; end
    nops(q, LAT + 1);
    run(q);
    get(400, 12, got);
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        int s;
        s = 0;
        for (int p = 0; p < W; p++) s += sx((a[r][c][p] + b[r][c][p]) & 255, N);
        expect1("fold-b block sum", r, c, 0, got[r][c][0], s, 12);
      end

    // ---- every mechanism must have happened
    $display("mechanisms: shift-in rows %0d, shift-out rows %0d, add %0d, sub %0d, booth mul %0d",
             n_shift_in, n_shift_out, n_add, n_sub, n_booth);
    $display("            booth add steps %0d, booth sub steps %0d, fold-a levels %0d, fold-b levels %0d",
             n_booth_add, n_booth_sub, n_fold_a, n_fold_b);
    $display("            row hops %0d, column hops %0d, node-cycles as RX %0d TX %0d PASS %0d",
             n_hop_row, n_hop_col, n_rx, n_tx, n_pass);
    begin
      int m [14];
      m = '{n_shift_in, n_shift_out, n_add, n_sub, n_booth, n_booth_add, n_booth_sub, n_fold_a,
            n_fold_b, n_hop_row, n_hop_col, n_rx, n_tx, n_pass};
      foreach (m[i]) begin
        checks++;
        if (m[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
