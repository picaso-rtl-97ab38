// Self-checking testbench of picaso_regfile (1024 x 16, two ports).
//
// Random mix of port-A reads, port-B reads and port-B writes against a
// reference array. Checks the one-cycle read latency, read-first behaviour
// when port A reads the row port B writes, that port B's output holds while
// it writes, and that the contents start at zero.
module tb_picaso_regfile;
  localparam int W = 16, DEPTH = 1024, AW = 10;

  logic          clk = 0;
  logic          a_en, b_en, b_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [W-1:0]  a_dout, b_din, b_dout;
  logic [W-1:0]  model [DEPTH];
  int checks = 0, failures = 0;

  picaso_regfile dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp_a, exp_b, hold_b;
    logic         chk_a, chk_b;
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    a_en = 0; b_en = 0; b_we = 0; a_addr = '0; b_addr = '0; b_din = '0;
    @(negedge clk);
    // contents start at zero
    a_en = 1; a_addr = 10'd513;
    @(negedge clk);
    checks++; if (a_dout !== '0) begin failures++; $display("FAIL initial contents %h", a_dout); end

    for (int n = 0; n < 20000; n++) begin
      a_en   = $urandom_range(0, 1);
      b_en   = $urandom_range(0, 1);
      b_we   = b_en & $urandom_range(0, 1);
      a_addr = AW'($urandom_range(0, 31));   // small window: many collisions
      b_addr = AW'($urandom_range(0, 31));
      if ($urandom_range(0, 3) == 0) b_addr = a_addr;
      b_din  = W'($urandom);
      chk_a  = a_en;
      chk_b  = b_en && !b_we;
      exp_a  = model[a_addr];              // read-first
      exp_b  = model[b_addr];
      hold_b = b_dout;
      if (b_en && b_we) model[b_addr] = b_din;
      @(negedge clk);
      if (chk_a) begin
        checks++;
        if (a_dout !== exp_a) begin failures++; if (failures < 10) $display("FAIL A %h exp %h", a_dout, exp_a); end
      end
      if (chk_b) begin
        checks++;
        if (b_dout !== exp_b) begin failures++; if (failures < 10) $display("FAIL B %h exp %h", b_dout, exp_b); end
      end else if (b_en && b_we) begin
        checks++;
        if (b_dout !== hold_b) begin failures++; if (failures < 10) $display("FAIL B hold"); end
      end
    end
    // the whole depth is addressable
    b_en = 1; b_we = 1; b_addr = 10'd1023; b_din = 16'hbeef; a_en = 0;
    @(negedge clk);
    b_we = 0; a_en = 1; a_addr = 10'd1023;
    @(negedge clk);
    checks++; if (a_dout !== 16'hbeef || b_dout !== 16'hbeef) begin failures++; $display("FAIL top row"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
