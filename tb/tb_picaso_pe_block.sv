// Self-checking testbench of picaso_pe_block in the Full-Pipe configuration.
//
// Loads random 8-bit operands for the 16 PEs through the shift register,
// runs bit-serial add, subtract, AND, OR, XOR and a signed Booth multiply,
// reduces the products to PE 0 with fold pattern a and the sums with fold
// pattern b, and reads every result back through the shift register.
// References are computed with integer arithmetic. Also checks the
// write-back latency of four cycles: a row written by an instruction issued
// in cycle t is still old for a read issued in cycle t+4 and new for one
// issued in cycle t+5. That latency is the "+4" of the per-level fold time.
module tb_picaso_pe_block;
  import picaso_pkg::*;
  import picaso_prog_pkg::*;

  localparam int W = 16, N = 8;
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
    int a [W], b [W], r [W], e [W];
    prog_t q;
    instr = PIM_NOP; sh_in = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    for (int p = 0; p < W; p++) begin
      a[p] = $urandom_range(0, 255);
      b[p] = $urandom_range(0, 255);
    end
    a[0] = 8'h80; b[0] = 8'h80;    // most negative times most negative
    a[1] = 8'h7f; b[1] = 8'h81;
    put(0, N, a);
    put(8, N, b);
    get(0, N, r);
    expect_field("load", r, a, N, W);

    // ---- element-wise operations
    q.delete(); bin_op(q, LAT, ALU_ADD, 16, 0, 8, N); run(q);
    q.delete(); bin_op(q, LAT, ALU_SUB, 24, 0, 8, N); run(q);
    q.delete(); bin_op(q, LAT, ALU_AND, 32, 0, 8, N); run(q);
    q.delete(); bin_op(q, LAT, ALU_OR,  40, 0, 8, N); run(q);
    q.delete(); bin_op(q, LAT, ALU_XOR, 48, 0, 8, N); run(q);
    get(16, N, r); foreach (e[p]) e[p] = a[p] + b[p]; expect_field("add", r, e, N, W);
    get(24, N, r); foreach (e[p]) e[p] = a[p] - b[p]; expect_field("sub", r, e, N, W);
    get(32, N, r); foreach (e[p]) e[p] = a[p] & b[p]; expect_field("and", r, e, N, W);
    get(40, N, r); foreach (e[p]) e[p] = a[p] | b[p]; expect_field("or",  r, e, N, W);
    get(48, N, r); foreach (e[p]) e[p] = a[p] ^ b[p]; expect_field("xor", r, e, N, W);

    // ---- Booth multiplication, 8 x 8 -> 16 bits, signed
    q.delete(); booth_clear(q, LAT, 100, N); booth_mul(q, LAT, 100, 0, 8, N); run(q);
    get(100, 2 * N, r);
    foreach (e[p]) e[p] = sx(a[p], N) * sx(b[p], N);
    expect_field("booth", r, e, 2 * N, W);

    // ---- fold pattern a: sum of the 16 products into PE 0 (20-bit field)
    q.delete();
    sext_copy(q, LAT, 200, 100, 2 * N, 20);
    for (int l = 1; l <= 4; l++) fold(q, LAT, OPM_FOLD_A, l, 200, 20);
    nops(q, LAT + 1);
    run(q);
    get(200, 20, r);
    e[0] = 0; foreach (a[p]) e[0] += sx(a[p], N) * sx(b[p], N);
    expect_field("fold-a sum", r, e, 20, 1);

    // ---- fold pattern b: sum of the 8-bit signed sums into PE 0 (12 bits)
    q.delete();
    sext_copy(q, LAT, 300, 16, N, 12);
    for (int l = 1; l <= 4; l++) fold(q, LAT, OPM_FOLD_B, l, 300, 12);
    nops(q, LAT + 1);
    run(q);
    get(300, 12, r);
    e[0] = 0; foreach (a[p]) e[0] += sx((a[p] + b[p]) & 255, N);
    expect_field("fold-b sum", r, e, 12, 1);
    // PE 1 is never a receiver in pattern b: its value must be unchanged
    e[1] = sx((a[1] + b[1]) & 255, N);
    expect_field("fold-b untouched PE", r, e, 12, 2);

    // ---- write-back latency
    for (int late = 0; late < 2; late++) begin
      pim_instr_t i;
      logic [W-1:0] w;
      q.delete();
      i = PIM_NOP; i.rd_a = 1'b1; i.raddr_a = RF_AW'(0); i.we = 1'b1; i.waddr = RF_AW'(500);
      i.alu_op = ALU_CPX;
      q.push_back(i);                         // cycle t: row 500 <= row 0
      nops(q, LAT - 1 + late);
      i = PIM_NOP; i.rd_a = 1'b1; i.raddr_a = RF_AW'(500); i.sh_load = 1'b1;
      q.push_back(i);                         // cycle t + LAT (+1): read row 500
      nops(q, LRF + 1);
      run(q);
      w = sh_out;
      begin
        logic [W-1:0] exp_w;
        for (int p = 0; p < W; p++) exp_w[p] = a[p][0];
        checks++;
        if (late == 0 ? (w !== '0) : (w !== exp_w)) begin
          failures++;
          $display("FAIL latency: read at t+%0d gave %h", LAT + late, w);
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
