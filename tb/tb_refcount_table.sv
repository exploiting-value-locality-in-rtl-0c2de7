// tb_refcount_table: random self-checking test of the reference counts.
// Legal operation mixes are generated each cycle (allocate a free register, reuse
// a counted one, drop a freshly allocated one, release a counted one); a model
// count per register predicts the counts and which registers each cycle frees,
// and by which cause. A flush with a random committed map checks the rebuild.
module tb_refcount_table;
  localparam int unsigned NP = 60, NS = 2, NL = 32, CW = 8, TW = $clog2(NP);
  logic clk = 0, rst_n = 0;
  logic alloc_valid, inc_valid, drop_valid, rel_valid, flush;
  logic [TW-1:0] alloc_preg, inc_preg, drop_preg, rel_preg;
  logic [TW-1:0] commit_map [NL];
  logic [NP-1:0] free_normal, free_remap, flush_free;
  logic [CW-1:0] count [NP];
  int checks = 0, failures = 0, n_free_n = 0, n_free_r = 0;
  int m [NP];

  refcount_table #(.NUM_PREGS(NP), .NUM_STATIC(NS), .NUM_LREGS(NL), .CNT_W(CW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int pick(input int want);  // want: 0 zero, 1 exactly one, 2 nonzero
    for (int t = 0; t < 200; t++) begin
      int p = NS + $urandom % (NP - NS);
      if ((want == 0 && m[p] == 0) || (want == 1 && m[p] == 1) || (want == 2 && m[p] > 0)) return p;
    end
    return -1;
  endfunction

  initial begin
    alloc_valid = 0; inc_valid = 0; drop_valid = 0; rel_valid = 0; flush = 0;
    alloc_preg = '0; inc_preg = '0; drop_preg = '0; rel_preg = '0;
    foreach (commit_map[l]) commit_map[l] = '0;
    foreach (m[p]) m[p] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      int a, i, d, r;
      logic [NP-1:0] en, er;
      @(negedge clk);
      a = ($urandom % 2) ? pick(0) : -1;
      d = ($urandom % 3 == 0) ? pick(1) : -1;
      i = ($urandom % 3 == 0) ? pick(2) : -1;
      r = ($urandom % 2) ? pick(2) : -1;
      if (i == d) i = -1;
      if (r == d) r = -1;
      if (r >= 0 && i < 0 && $urandom % 8 == 0) i = r;   // reuse and release of one register
      alloc_valid = a >= 0; alloc_preg = TW'(a < 0 ? 0 : a);
      inc_valid   = i >= 0; inc_preg   = TW'(i < 0 ? 0 : i);
      drop_valid  = d >= 0; drop_preg  = TW'(d < 0 ? 0 : d);
      rel_valid   = r >= 0; rel_preg   = TW'(r < 0 ? 0 : r);
      if ($urandom % 16 == 0) begin r = -1; rel_valid = 1; rel_preg = TW'($urandom % NS); end  // static: ignored
      #1;
      en = '0; er = '0;
      for (int p = NS; p < NP; p++) begin
        int n;
        n = m[p] + (i == p) - (r == p) - (d == p);
        if (a == p) n = 1;
        else if (m[p] != 0 && n == 0) begin if (d == p) er[p] = 1; else en[p] = 1; end
      end
      checks++;
      if (free_normal !== en || free_remap !== er) begin
        failures++; $display("FAIL cyc %0d free masks %h/%h exp %h/%h", cyc, free_normal, free_remap, en, er);
      end
      n_free_n += $countones(en); n_free_r += $countones(er);
      @(posedge clk);
      for (int p = NS; p < NP; p++) begin
        if (a == p) m[p] = 1; else m[p] = m[p] + (i == p) - (r == p) - (d == p);
      end
      #1;
      for (int p = 0; p < NP; p++) begin
        checks++;
        if (int'(count[p]) != m[p]) begin failures++; $display("FAIL cyc %0d count[%0d]=%0d exp %0d", cyc, p, count[p], m[p]); end
      end
      if (cyc % 1000 == 999) begin
        // flush: rebuild from a random committed map
        @(negedge clk);
        alloc_valid = 0; inc_valid = 0; drop_valid = 0; rel_valid = 0; flush = 1;
        foreach (commit_map[l]) commit_map[l] = TW'($urandom % 12);
        #1;
        for (int p = 0; p < NP; p++) begin
          int c;
          c = 0;
          foreach (commit_map[l]) if (int'(commit_map[l]) == p) c++;
          if (p < NS) c = 0;
          m[p] = c;
          checks++;
          if (flush_free[p] !== (p >= NS && c == 0)) begin failures++; $display("FAIL flush_free[%0d]", p); end
        end
        @(posedge clk); #1 flush = 0;
        for (int p = 0; p < NP; p++) begin
          checks++;
          if (int'(count[p]) != m[p]) begin failures++; $display("FAIL flush count[%0d]=%0d exp %0d", p, count[p], m[p]); end
        end
      end
    end
    checks++;
    if (n_free_n < 50 || n_free_r < 50) begin failures++; $display("FAIL few frees %0d %0d", n_free_n, n_free_r); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
