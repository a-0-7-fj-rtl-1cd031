// nor_tcam_word: one K-bit NOR-type ternary CAM word of the main bank.
//
// Each cell stores a value and a don't-care bit. In the NOR arrangement every
// cell that mismatches pulls the precharged match line down in parallel, so
// the match line `ml` stays high only if no cell mismatches; a don't-care cell
// never pulls down. This is the fast half of the hybrid: the whole word
// resolves at once instead of along a series chain. The search is
// combinational; a write (`we`) loads value and don't-care bits at the rising
// clock edge. Storage has no reset, like the SRAM it models. The NOR
// arrangement follows the published architecture; the ternary cell encoding
// (value plus don't-care bit) is taken over from its NAND cell.
module nor_tcam_word
  import tcam_pkg::*;
#(
  parameter int unsigned K = K_BITS
) (
  input  logic         clk,
  input  logic         we,
  input  logic [K-1:0] wval,
  input  logic [K-1:0] wdc,
  input  logic [K-1:0] key,
  output logic         ml,       // high: stored word matches key
  output logic [K-1:0] rd_val,
  output logic [K-1:0] rd_dc
);
  logic [K-1:0] val, dc;
  logic [K-1:0] pd;        // per-cell discharge path turned on

  always_ff @(posedge clk) begin
    if (we) begin
      val <= wval;
      dc  <= wdc;
    end
  end

  always_comb begin
    pd = ~dc & (val ^ key);
    ml       = ~|pd;
    rd_val   = val;
    rd_dc    = dc;
  end
endmodule
