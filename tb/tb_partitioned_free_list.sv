// tb_partitioned_free_list: random self-checking test of the two-partition free
// list. A model keeps both partitions as sets; registers held by the test are
// freed at random into partition 1 or 2. Each grant must be the lowest register
// of partition 1, or of partition 2 only when partition 1 is empty, with the
// matching alloc_from_p2 flag; occupancies and a flush reload are checked too.
module tb_partitioned_free_list;
  localparam int unsigned NP = 60, NS = 2, TW = $clog2(NP);
  logic clk = 0, rst_n = 0;
  logic alloc_req, alloc_valid, alloc_from_p2, flush;
  logic [TW-1:0] alloc_preg;
  logic [NP-1:0] free1_mask, free2_mask, flush_free;
  logic [TW:0] count1, count2;
  int checks = 0, failures = 0, n_p2 = 0, n_empty = 0;
  bit m1 [NP], m2 [NP], held [NP];

  partitioned_free_list #(.NUM_PREGS(NP), .NUM_STATIC(NS)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    alloc_req = 0; free1_mask = '0; free2_mask = '0; flush = 0; flush_free = '0;
    for (int p = 0; p < NP; p++) begin m1[p] = p >= NS; m2[p] = 0; held[p] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      int e1, e2, c1, c2, fr;
      bit to2;
      @(negedge clk);
      // bias: allocate more in the first half of each 200-cycle phase, free more in the second
      alloc_req  = ($urandom % 100) < ((cyc % 200) < 100 ? 80 : 20);
      free1_mask = '0; free2_mask = '0;
      fr = -1;
      if (($urandom % 100) < ((cyc % 200) < 100 ? 30 : 80)) begin
        for (int t = 0; t < 50 && fr < 0; t++) begin
          int p; p = NS + $urandom % (NP - NS);
          if (held[p]) fr = p;
        end
      end
      to2 = $urandom % 2;
      if (fr >= 0) begin if (to2) free2_mask[fr] = 1; else free1_mask[fr] = 1; end
      #1;
      e1 = -1; e2 = -1; c1 = 0; c2 = 0;
      for (int p = NP - 1; p >= 0; p--) begin
        if (m1[p]) begin e1 = p; c1++; end
        if (m2[p]) begin e2 = p; c2++; end
      end
      check("count1", int'(count1) == c1);
      check("count2", int'(count2) == c2);
      check("alloc_valid", alloc_valid == (alloc_req && (e1 >= 0 || e2 >= 0)));
      if (alloc_req && e1 < 0 && e2 < 0) n_empty++;
      if (alloc_valid) begin
        check("alloc_preg", int'(alloc_preg) == (e1 >= 0 ? e1 : e2));
        check("from_p2", alloc_from_p2 == (e1 < 0));
        if (e1 < 0) n_p2++;
      end
      @(posedge clk);
      if (alloc_valid) begin m1[alloc_preg] = 0; m2[alloc_preg] = 0; held[alloc_preg] = 1; end
      if (fr >= 0) begin held[fr] = 0; if (to2) m2[fr] = 1; else m1[fr] = 1; end
      if (cyc == 3000) begin
        @(negedge clk);
        alloc_req = 0; free1_mask = '0; free2_mask = '0; flush = 1;
        for (int p = 0; p < NP; p++) flush_free[p] = $urandom % 2;
        @(posedge clk);
        #1 flush = 0;
        for (int p = 0; p < NP; p++) begin m1[p] = flush_free[p] && p >= NS; m2[p] = 0; held[p] = !m1[p] && p >= NS; end
      end
    end
    check("partition 2 used", n_p2 > 20);
    check("list ran empty", n_empty > 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
