// tb_vl_regmgr_configs: runs the register manager in the configurations the
// evaluation uses besides the default: 80, 128 and 160 physical registers with both
// reuse schemes (the window grows to at least the register count), and 80
// registers with only the 0/1 static mappings, and the default 60 registers with a
// third reserved value (2, in P2), which the two-bit value state can also encode,
// the default size with source-tag update in place of Alias Table reads, without
// writes of Value-Cache duplicates, and with the plain Alias Table scheme (duplicate
// registers freed at once) with a zero- and a one-cycle Alias Table. Each instance
// is driven by its own core model; the instances run one after another and their results are summed.
module tb_vl_regmgr_configs;
  localparam int N = 9;
  logic clk = 0;
  logic done [N];
  int   chk [N], fl [N];

  always #5 clk = ~clk;

  regmgr_core_model #(.NP(80),  .ENT(128), .DYN(1'b1), .CYCLES(12000)) m80  (.clk, .start(1'b1), .done(done[0]), .checks(chk[0]), .failures(fl[0]));
  regmgr_core_model #(.NP(128), .ENT(128), .DYN(1'b1), .CYCLES(12000)) m128 (.clk, .start(done[0]), .done(done[1]), .checks(chk[1]), .failures(fl[1]));
  regmgr_core_model #(.NP(160), .ENT(160), .DYN(1'b1), .CYCLES(12000)) m160 (.clk, .start(done[1]), .done(done[2]), .checks(chk[2]), .failures(fl[2]));
  regmgr_core_model #(.NP(80),  .ENT(128), .DYN(1'b0), .CYCLES(12000)) m80s (.clk, .start(done[2]), .done(done[3]), .checks(chk[3]), .failures(fl[3]));
  regmgr_core_model #(.NP(60),  .ENT(128), .DYN(1'b1), .NSTAT(3), .CYCLES(12000)) m60v2 (.clk, .start(done[3]), .done(done[4]), .checks(chk[4]), .failures(fl[4]));
  regmgr_core_model #(.NP(60),  .ENT(128), .DYN(1'b1), .TAGUPD(1'b1), .CYCLES(12000)) m60tu (.clk, .start(done[4]), .done(done[5]), .checks(chk[5]), .failures(fl[5]));
  regmgr_core_model #(.NP(60),  .ENT(128), .DYN(1'b1), .AFREE(1'b1), .APEN(1'b1), .CYCLES(12000)) m60ap (.clk, .start(done[5]), .done(done[6]), .checks(chk[6]), .failures(fl[6]));
  regmgr_core_model #(.NP(60),  .ENT(128), .DYN(1'b1), .SKIPW(1'b1), .CYCLES(12000)) m60sk (.clk, .start(done[6]), .done(done[7]), .checks(chk[7]), .failures(fl[7]));
  regmgr_core_model #(.NP(60),  .ENT(128), .DYN(1'b1), .AFREE(1'b1), .CYCLES(12000)) m60af (.clk, .start(done[7]), .done(done[8]), .checks(chk[8]), .failures(fl[8]));

  initial begin
    int checks, failures;
    checks = 0; failures = 0;
    fork
      begin
        repeat (2) @(posedge clk);
        wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5] && done[6] && done[7] && done[8]);
      end
      begin
        repeat (N * 17000) @(posedge clk);
        failures++; $display("watchdog expired");
      end
    join_any
    for (int i = 0; i < N; i++) begin checks += chk[i]; failures += fl[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
