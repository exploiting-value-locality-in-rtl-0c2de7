// tb_alias_table: random self-checking test of the Alias Table. A model entry
// <new, valid> per old register follows creates (only for registers whose entry
// is not live), frees by new-register mask and flushes; both lookup ports and the
// live vector are compared every cycle.
module tb_alias_table;
  localparam int unsigned NP = 60, TW = $clog2(NP);
  logic clk = 0, rst_n = 0;
  logic create_valid, flush;
  logic [TW-1:0] create_old, create_new;
  logic [NP-1:0] free_mask, live;
  logic [TW-1:0] lk_tag [2];
  logic lk_hit [2];
  logic [TW-1:0] lk_new [2];
  int checks = 0, failures = 0, n_hit = 0, n_freed = 0;
  bit mv [NP];
  int mn [NP];

  alias_table #(.NUM_PREGS(NP)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    create_valid = 0; create_old = '0; create_new = '0; flush = 0; free_mask = '0;
    lk_tag[0] = '0; lk_tag[1] = '0;
    foreach (mv[p]) mv[p] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      create_old = TW'($urandom % NP);
      create_new = TW'($urandom % NP);
      create_valid = ($urandom % 2) && !mv[create_old] && !live[create_old];
      free_mask = '0;
      if ($urandom % 4 == 0) free_mask[$urandom % NP] = 1;
      flush = (cyc % 1500) == 1499;
      lk_tag[0] = TW'($urandom % NP);
      lk_tag[1] = TW'($urandom % NP);
      #1;
      for (int i = 0; i < 2; i++) begin
        checks++;
        if (lk_hit[i] !== mv[lk_tag[i]] || (mv[lk_tag[i]] && int'(lk_new[i]) != mn[lk_tag[i]])) begin
          failures++; $display("FAIL cyc %0d port %0d tag %0d", cyc, i, lk_tag[i]);
        end
        if (mv[lk_tag[i]]) n_hit++;
      end
      for (int p = 0; p < NP; p++) begin
        checks++;
        if (live[p] !== mv[p]) begin failures++; $display("FAIL cyc %0d live[%0d]", cyc, p); end
      end
      @(posedge clk);
      if (flush) foreach (mv[p]) mv[p] = 0;
      else begin
        for (int p = 0; p < NP; p++) if (mv[p] && free_mask[mn[p]]) begin mv[p] = 0; n_freed++; end
        if (create_valid) begin mv[create_old] = 1; mn[create_old] = int'(create_new); end
      end
    end
    checks++;
    if (n_hit < 100 || n_freed < 50) begin failures++; $display("FAIL coverage %0d %0d", n_hit, n_freed); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
