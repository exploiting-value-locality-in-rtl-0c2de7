// value_cache: content-addressable map from values to the physical registers that hold them.
//
// When a result is produced its value is searched among the values already held
// in physical registers; a hit returns that register so the destination can be
// re-mapped to it instead of occupying a register of its own. On a miss the
// caller creates an entry <value, allocated register>. When a register goes back
// to the free pool its entry is invalidated. This behaviour follows the document.
//
// Organisation (this design's choice): one entry per physical register, indexed by
// register number, holding a valid bit and the value, so the cache can never
// overflow. The reserved registers for 0/1 are never entered. The search is a
// full parallel compare with a lowest-index priority pick.
//
// Timing: lookup is combinational; insert and invalidate take effect at the next
// rising clock edge. Invalidation is applied before insertion in the same cycle.
module value_cache #(
  parameter int unsigned NUM_PREGS  = 60,
  parameter int unsigned XLEN       = 64,
  parameter int unsigned NUM_STATIC = 2,
  localparam int unsigned TAGW      = $clog2(NUM_PREGS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // search
  input  logic [XLEN-1:0]      lookup_value,
  output logic                 lookup_hit,
  output logic [TAGW-1:0]      lookup_preg,
  // create an entry
  input  logic                 ins_valid,
  input  logic [TAGW-1:0]      ins_preg,
  input  logic [XLEN-1:0]      ins_value,
  // registers returned to the free pool this cycle
  input  logic [NUM_PREGS-1:0] inv_mask
);

  logic [NUM_PREGS-1:0] valid_q;
  logic [XLEN-1:0]      value_q [NUM_PREGS];

  always_comb begin
    lookup_hit  = 1'b0;
    lookup_preg = '0;
    for (int unsigned p = NUM_PREGS; p > NUM_STATIC; p--) begin
      if (valid_q[p-1] && value_q[p-1] == lookup_value) begin
        lookup_hit  = 1'b1;
        lookup_preg = TAGW'(p-1);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
    end else begin
      valid_q <= valid_q & ~inv_mask;
      if (ins_valid && ins_preg >= TAGW'(NUM_STATIC)) valid_q[ins_preg] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (ins_valid) value_q[ins_preg] <= ins_value;
  end

endmodule
