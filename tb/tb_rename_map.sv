// tb_rename_map: random self-checking test of the many-to-one rename map.
// A model keeps the speculative and committed maps. Each cycle it predicts source
// lookups (with a same-cycle re-mapping forwarded), whether a re-mapping writes
// the map (only when the logical register still holds the expected register and
// the same-cycle rename does not target it), the released committed mapping, and
// the map contents after flushes.
module tb_rename_map;
  localparam int unsigned NP = 60, NL = 32, TW = $clog2(NP), LW = $clog2(NL);
  logic clk = 0, rst_n = 0;
  logic [LW-1:0] rs_lreg [2];
  logic [TW-1:0] rs_preg [2];
  logic rn_valid, rm_valid, rm_done, cm_valid, cm_old_valid, flush;
  logic [LW-1:0] rn_lreg, rm_lreg, cm_lreg;
  logic [TW-1:0] rn_preg, rm_expect, rm_preg, cm_preg, cm_old_preg;
  logic [TW-1:0] commit_map [NL];
  int checks = 0, failures = 0, n_done = 0, n_skip = 0;
  int spec [NL], comm [NL];

  rename_map #(.NUM_PREGS(NP), .NUM_LREGS(NL)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    rn_valid = 0; rm_valid = 0; cm_valid = 0; flush = 0;
    rn_lreg = '0; rn_preg = '0; rm_lreg = '0; rm_expect = '0; rm_preg = '0; cm_lreg = '0; cm_preg = '0;
    rs_lreg[0] = '0; rs_lreg[1] = '0;
    foreach (spec[l]) begin spec[l] = 0; comm[l] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      bit hit, done;
      @(negedge clk);
      rs_lreg[0] = LW'($urandom % NL); rs_lreg[1] = LW'($urandom % NL);
      rn_valid = $urandom % 2; rn_lreg = LW'($urandom % 8); rn_preg = TW'($urandom % NP);
      rm_valid = $urandom % 2; rm_lreg = LW'($urandom % 8);
      rm_expect = ($urandom % 3 != 0) ? TW'(spec[rm_lreg]) : TW'($urandom % NP);
      rm_preg = TW'($urandom % NP);
      cm_valid = $urandom % 2; cm_lreg = LW'($urandom % NL); cm_preg = TW'($urandom % NP);
      flush = (cyc % 700) == 699;
      #1;
      hit  = rm_valid && spec[rm_lreg] == int'(rm_expect);
      done = hit && !(rn_valid && rn_lreg == rm_lreg);
      check("rm_done", rm_done == done);
      if (done) n_done++; else if (hit) n_skip++;
      for (int i = 0; i < 2; i++)
        check("rs_preg", int'(rs_preg[i]) == ((hit && rm_lreg == rs_lreg[i]) ? int'(rm_preg) : spec[rs_lreg[i]]));
      check("cm_old", !cm_valid || (cm_old_valid && int'(cm_old_preg) == comm[cm_lreg]));
      for (int l = 0; l < NL; l++) check("commit_map", int'(commit_map[l]) == comm[l]);
      @(posedge clk);
      if (cm_valid) comm[cm_lreg] = int'(cm_preg);
      if (flush) spec = comm;
      else begin
        if (done) spec[rm_lreg] = int'(rm_preg);
        if (rn_valid) spec[rn_lreg] = int'(rn_preg);
      end
    end
    check("remaps done", n_done > 100);
    check("remaps skipped by later rename", n_skip > 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
