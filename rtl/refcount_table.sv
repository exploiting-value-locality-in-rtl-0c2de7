// refcount_table: reference counts that let several logical registers share one
// physical register.
//
// A count is set to one when its register is allocated at rename, incremented
// when a later result is found to duplicate the register's value (another logical
// register is mapped onto it), and decremented when the condition that would free
// the register in a conventional machine is met: a committing instruction
// overwrites a committed mapping to it. A register is free when its count reaches
// zero. The register allocated to a result that turned out to be a duplicate is
// given up at once (its single reference dropped). These rules follow the document.
//
// This design's choices: the reserved static registers keep count zero and are
// never reported free; freeing is reported on two masks, by cause, so the free
// list can put re-mapped registers in its second partition; a flush (recovery
// after all uncommitted work is discarded) rebuilds every count from the
// committed map.
//
// Timing: all updates of one cycle (allocation, reuse increment, drop, commit
// release) are combined into one next-count per register, written at the rising
// edge; the free masks are combinational for that same cycle.
module refcount_table #(
  parameter int unsigned NUM_PREGS  = 60,
  parameter int unsigned NUM_STATIC = 2,
  parameter int unsigned NUM_LREGS  = 32,
  parameter int unsigned CNT_W      = 8,
  localparam int unsigned TAGW      = $clog2(NUM_PREGS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 alloc_valid,
  input  logic [TAGW-1:0]      alloc_preg,
  input  logic                 inc_valid,
  input  logic [TAGW-1:0]      inc_preg,
  input  logic                 drop_valid,
  input  logic [TAGW-1:0]      drop_preg,
  input  logic                 rel_valid,
  input  logic [TAGW-1:0]      rel_preg,
  input  logic                 flush,
  input  logic [TAGW-1:0]      commit_map [NUM_LREGS],
  output logic [NUM_PREGS-1:0] free_normal,
  output logic [NUM_PREGS-1:0] free_remap,
  output logic [NUM_PREGS-1:0] flush_free,
  output logic [CNT_W-1:0]     count [NUM_PREGS]
);

  logic [CNT_W-1:0] cnt_q   [NUM_PREGS];
  logic [CNT_W-1:0] cnt_d   [NUM_PREGS];
  logic [CNT_W-1:0] cnt_fl  [NUM_PREGS];

  always_comb begin
    for (int unsigned p = 0; p < NUM_PREGS; p++) begin
      logic inc, dec_r, dec_d;
      inc   = inc_valid  && inc_preg  == TAGW'(p);
      dec_r = rel_valid  && rel_preg  == TAGW'(p);
      dec_d = drop_valid && drop_preg == TAGW'(p);
      cnt_d[p]       = cnt_q[p] + CNT_W'(inc) - CNT_W'(dec_r) - CNT_W'(dec_d);
      free_normal[p] = 1'b0;
      free_remap[p]  = 1'b0;
      if (p < NUM_STATIC) begin
        cnt_d[p] = '0;
      end else if (alloc_valid && alloc_preg == TAGW'(p)) begin
        cnt_d[p] = CNT_W'(1);
      end else if (cnt_q[p] != '0 && cnt_d[p] == '0) begin
        free_remap[p]  = dec_d;
        free_normal[p] = !dec_d;
      end
      // rebuild from the committed map
      cnt_fl[p] = '0;
      for (int unsigned l = 0; l < NUM_LREGS; l++)
        if (commit_map[l] == TAGW'(p)) cnt_fl[p] = cnt_fl[p] + CNT_W'(1);
      if (p < NUM_STATIC) cnt_fl[p] = '0;
      flush_free[p] = (p >= NUM_STATIC) && cnt_fl[p] == '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned p = 0; p < NUM_PREGS; p++) cnt_q[p] <= '0;
    end else if (flush) begin
      cnt_q <= cnt_fl;
    end else begin
      cnt_q <= cnt_d;
    end
  end

  assign count = cnt_q;

  // A count never underflows.
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    (!flush && rel_valid && rel_preg >= TAGW'(NUM_STATIC)) |->
      (cnt_q[rel_preg] != '0 || (inc_valid && inc_preg == rel_preg)))
    else $error("refcount underflow on release of P%0d", rel_preg);
  a_drop_unshared: assert property (@(posedge clk) disable iff (!rst_n)
    (!flush && drop_valid) |-> cnt_q[drop_preg] == CNT_W'(1))
    else $error("drop of shared P%0d", drop_preg);

endmodule
