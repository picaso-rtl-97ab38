// Testbench of the four pipeline configurations the published design names:
// Single-Cycle (no pipeline register), RF-Pipe (register after the RAM),
// Op-Pipe (register after the OpMux) and Full-Pipe (all three). Each runs
// the same program, scheduled for its own write-back latency, on a 2 x 4
// tile (picaso_cfg_run) and must produce the same, correct results.
module tb_picaso_pipe_configs;
  logic done [4];
  int   chk  [4];
  int   fail [4];
  int   checks, failures;

  picaso_cfg_run #(.RF_PIPE(1'b0), .OP_PIPE(1'b0), .ALU_PIPE(1'b0)) u_single
    (.done(done[0]), .checks(chk[0]), .failures(fail[0]));
  picaso_cfg_run #(.RF_PIPE(1'b1), .OP_PIPE(1'b0), .ALU_PIPE(1'b0)) u_rf
    (.done(done[1]), .checks(chk[1]), .failures(fail[1]));
  picaso_cfg_run #(.RF_PIPE(1'b0), .OP_PIPE(1'b1), .ALU_PIPE(1'b0)) u_op
    (.done(done[2]), .checks(chk[2]), .failures(fail[2]));
  picaso_cfg_run #(.RF_PIPE(1'b1), .OP_PIPE(1'b1), .ALU_PIPE(1'b1)) u_full
    (.done(done[3]), .checks(chk[3]), .failures(fail[3]));

  initial begin : watchdog
    #5000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2] + chk[3],
             fail[0] + fail[1] + fail[2] + fail[3] + 1);
    $finish;
  end

  initial begin
    #100;                       // let the drivers clear their flags first
    wait (done[0] && done[1] && done[2] && done[3]);
    checks = 0; failures = 0;
    for (int i = 0; i < 4; i++) begin
      checks += chk[i]; failures += fail[i];
      if (chk[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
