// Test driver for one pipeline configuration of picaso_tile (2 x 4 blocks).
//
// Used by tb_picaso_pipe_configs. Runs, with the write-back latency of its
// configuration: operand load through the shift chains, add, a Booth
// multiply, a reduction of the sums with four fold levels, two row-hop levels (the second
// crossing a pass node) and one column-hop level, and checks every result
// against integer arithmetic. Reports its counts on the ports when done.
module picaso_cfg_run
  import picaso_pkg::*;
  import picaso_prog_pkg::*;
#(
  parameter bit RF_PIPE  = 1'b1,
  parameter bit OP_PIPE  = 1'b1,
  parameter bit ALU_PIPE = 1'b1
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int R = 2, C = 4, W = 16, N = 8, NA = 16;
  localparam int LAT = 1 + int'(RF_PIPE) + int'(OP_PIPE) + int'(ALU_PIPE);
  localparam int LRF = 1 + int'(RF_PIPE);

  logic         clk = 0, rst_n = 0;
  pim_instr_t   instr;
  logic [W-1:0] shift_in  [C];
  logic [W-1:0] shift_out [C];
  net_role_e    role      [R][C];

  typedef int field_t [R][C][W];

  picaso_tile #(.ROWS(R), .COLS(C), .RF_PIPE(RF_PIPE), .OP_PIPE(OP_PIPE), .ALU_PIPE(ALU_PIPE))
    dut (.clk, .rst_n, .instr, .shift_in, .shift_out, .role);

  always #5 clk = ~clk;

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
  endtask

  task automatic put(input int base, input int n, input field_t v);
    for (int k = 0; k < n; k++) begin
      logic [W-1:0] w [R][C];
      foreach (w[r, c]) for (int p = 0; p < W; p++) w[r][c][p] = v[r][c][p][k];
      load_row(base + k, w);
    end
  endtask

  task automatic get(input int base, input int n, output field_t v);
    foreach (v[r, c, p]) v[r][c][p] = 0;
    for (int k = 0; k < n; k++) begin
      logic [W-1:0] w [R][C];
      read_row(base + k, w);
      foreach (v[r, c, p]) v[r][c][p] |= int'(w[r][c][p]) << k;
    end
  endtask

  function automatic int sx(int v, int n);
    return (v >= (1 << (n - 1))) ? v - (1 << n) : v;
  endfunction

  task automatic expect1(string what, int got, int exp, int n);
    checks++;
    if (got != (exp & ((1 << n) - 1))) begin
      failures++;
      $display("FAIL config RF=%0d OP=%0d ALU=%0d %s: got %h exp %h", RF_PIPE, OP_PIPE, ALU_PIPE,
               what, got, exp & ((1 << n) - 1));
    end
  endtask

  initial begin
    field_t a, b, got;
    int total, row0, row1;
    prog_t q;
    done = 0; checks = 0; failures = 0;
    instr = PIM_NOP;
    foreach (shift_in[c]) shift_in[c] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    foreach (a[r, c, p]) begin
      a[r][c][p] = $urandom_range(0, 255);
      b[r][c][p] = $urandom_range(0, 255);
    end
    put(0, N, a);
    put(8, N, b);

    q.delete(); bin_op(q, LAT, ALU_ADD, 16, 0, 8, N); run(q);
    get(16, N, got);
    foreach (got[r, c, p]) expect1("add", got[r][c][p], a[r][c][p] + b[r][c][p], N);

    q.delete(); booth_clear(q, LAT, 100, N); booth_mul(q, LAT, 100, 0, 8, N); run(q);
    get(100, 2 * N, got);
    foreach (got[r, c, p])
      expect1("booth", got[r][c][p], sx(a[r][c][p], N) * sx(b[r][c][p], N), 2 * N);

    // reduce the sums a + b (8-bit, signed) of all 128 PEs to block (0,0)
    q.delete();
    sext_copy(q, LAT, 200, 16, N, NA);
    for (int l = 1; l <= 4; l++) fold(q, LAT, OPM_FOLD_A, l, 200, NA);
    nops(q, LAT + 1);
    for (int l = 0; l < 2; l++) begin
      hop(q, LAT, AXIS_ROW, l, 300, 200, NA);
      bin_op(q, LAT, ALU_ADD, 200, 200, 300, NA);
    end
    run(q);
    get(200, NA, got);
    row0 = 0; row1 = 0;
    foreach (a[r, c, p]) begin
      if (r == 0) row0 += sx((a[r][c][p] + b[r][c][p]) & 255, N);
      else        row1 += sx((a[r][c][p] + b[r][c][p]) & 255, N);
    end
    expect1("row 0 sum", got[0][0][0], row0, NA);
    expect1("row 1 sum", got[1][0][0], row1, NA);
    q.delete();
    hop(q, LAT, AXIS_COL, 0, 300, 200, NA);
    bin_op(q, LAT, ALU_ADD, 200, 200, 300, NA);
    run(q);
    get(200, NA, got);
    total = row0 + row1;
    expect1("total", got[0][0][0], total, NA);

    done = 1;
  end
endmodule
