// phys_regfile: physical register file with the reserved constant registers removed
// from the storage array, write suppression for constants and read elimination for
// operands of known value.
//
// Registers P0..P(NUM_STATIC-1) are names for the constants 0..NUM_STATIC-1 and
// take no storage: the array covers P(NUM_STATIC)..P(NUM_PREGS-1). A result
// write marked wr_static (its value is a reserved constant) is not performed; the
// rename map and the consumers' state bits carry the value instead. A read whose
// operand value state is a known constant returns that constant without an array
// access. These behaviours follow the document; the counters make the saved
// accesses visible (the quantities the document measures).
//
// This design's choices: one write port and NRD (2) read ports; a read of the
// register being written in the same cycle returns the stored (old) contents, so
// the caller must not issue a consumer in the cycle its producer writes; 32-bit
// wrapping counters; the array is not reset.
//
// Timing: reads are combinational; the write and the counters update at the next
// rising edge.
module phys_regfile
  import vl_pkg::*;
#(
  parameter int unsigned NUM_PREGS  = 60,
  parameter int unsigned XLEN       = 64,
  parameter int unsigned NUM_STATIC = 2,
  parameter int unsigned NRD        = 2,
  localparam int unsigned TAGW      = $clog2(NUM_PREGS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            wr_valid,
  input  logic [TAGW-1:0] wr_preg,
  input  logic [XLEN-1:0] wr_value,
  input  logic            wr_static,
  input  logic            rd_valid  [NRD],
  input  vstate_e         rd_vstate [NRD],
  input  logic [TAGW-1:0] rd_tag    [NRD],
  output logic [XLEN-1:0] rd_data   [NRD],
  output logic [31:0]     n_wr,
  output logic [31:0]     n_wr_supp,
  output logic [31:0]     n_rd,
  output logic [31:0]     n_rd_elim
);

  logic [XLEN-1:0] mem [NUM_STATIC:NUM_PREGS-1];
  logic            rd_access [NRD];
  logic [31:0]     n_acc, n_elim;

  always_comb begin
    n_acc  = '0;
    n_elim = '0;
    for (int unsigned i = 0; i < NRD; i++) begin
      rd_access[i] = rd_valid[i] && rd_vstate[i] == VS_REG && rd_tag[i] >= TAGW'(NUM_STATIC);
      if (rd_vstate[i] != VS_REG || rd_tag[i] < TAGW'(NUM_STATIC))
        rd_data[i] = (rd_vstate[i] != VS_REG) ? XLEN'(vstate_value(rd_vstate[i])) : XLEN'(rd_tag[i]);
      else
        rd_data[i] = mem[rd_tag[i]];
      n_acc  = n_acc + 32'(rd_access[i]);
      n_elim = n_elim + 32'(rd_valid[i] && !rd_access[i]);
    end
  end

  always_ff @(posedge clk) begin
    if (wr_valid && !wr_static && wr_preg >= TAGW'(NUM_STATIC)) mem[wr_preg] <= wr_value;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_wr <= '0; n_wr_supp <= '0; n_rd <= '0; n_rd_elim <= '0;
    end else begin
      n_rd      <= n_rd + n_acc;
      n_rd_elim <= n_rd_elim + n_elim;
      if (wr_valid && !wr_static)  n_wr      <= n_wr + 32'd1;
      if (wr_valid && wr_static)   n_wr_supp <= n_wr_supp + 32'd1;
    end
  end

endmodule
