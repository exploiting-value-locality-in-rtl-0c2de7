// tb_value_cache: random self-checking test of the value-to-register CAM.
// A reference model (valid bit and value per register, lowest-index hit) is
// updated with the same inserts and invalidations; every cycle a value drawn
// from a small pool (so hits and misses both occur) is searched and the hit and
// returned register are compared with the model.
module tb_value_cache;
  localparam int unsigned NP = 60, XL = 64, NS = 2, TW = $clog2(NP);
  logic clk = 0, rst_n = 0;
  logic [XL-1:0] lookup_value, ins_value;
  logic lookup_hit, ins_valid;
  logic [TW-1:0] lookup_preg, ins_preg;
  logic [NP-1:0] inv_mask;
  int checks = 0, failures = 0, hits = 0;
  logic          m_valid [NP];
  logic [XL-1:0] m_value [NP];
  logic [XL-1:0] pool [8] = '{64'd2, 64'd3, 64'd32, 64'h0000_0001_4000_0000, 64'hFFFF_FFFF_FFFF_FFFF,
                              64'd4831843632, 64'd65536, 64'd101};

  value_cache #(.NUM_PREGS(NP), .XLEN(XL), .NUM_STATIC(NS)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    ins_valid = 0; ins_preg = '0; ins_value = '0; inv_mask = '0; lookup_value = '0;
    foreach (m_valid[p]) m_valid[p] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      ins_valid    = ($urandom % 2) == 0;
      ins_preg     = TW'(NS + $urandom % (NP - NS));
      ins_value    = pool[$urandom % 8];
      inv_mask     = '0;
      if ($urandom % 3 == 0) inv_mask[$urandom % NP] = 1'b1;
      lookup_value = pool[$urandom % 8];
      #1;
      begin
        logic eh; logic [TW-1:0] ep;
        eh = 0; ep = '0;
        for (int p = NP - 1; p >= NS; p--) if (m_valid[p] && m_value[p] == lookup_value) begin eh = 1; ep = TW'(p); end
        checks++;
        if (lookup_hit !== eh || (eh && lookup_preg !== ep)) begin
          failures++;
          $display("FAIL cyc %0d: value %h hit %0d/%0d preg %0d/%0d", cyc, lookup_value, lookup_hit, eh, lookup_preg, ep);
        end
        if (eh) hits++;
      end
      @(posedge clk);
      for (int p = 0; p < NP; p++) if (inv_mask[p]) m_valid[p] = 0;
      if (ins_valid) begin m_valid[ins_preg] = 1; m_value[ins_preg] = ins_value; end
    end
    checks++;
    if (hits < 100) begin failures++; $display("FAIL too few hits %0d", hits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
