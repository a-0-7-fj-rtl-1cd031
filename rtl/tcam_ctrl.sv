// tcam_ctrl: control part of the hybrid TCAM for reads and writes.
//
// The address of an entry is {MSB, word line, column}. The MSB field selects
// the main-bank word line: 0 is WL_0 (the extra bank), n = 1..N_SUB is WL_n
// (MF word n and sub-bank n). For reads and writes the controller raises
// that one word line; for searches and idle cycles it raises none.
//
// The MF of a sub-bank is shared by all its entries, so the k-bit MF word must
// not change while writes keep the same MSB address. The controller remembers
// the MSB of the last write and enables the MF write (`mf_we`) only for a
// sub-bank write whose MSB differs from it (or for the first write after
// reset). Writes with the same MSB change only the individual field.
// `op` and `msb` are the registered command of the current cycle; the
// remembered MSB updates at the rising edge that ends a write cycle.
// The rule follows the published architecture; keying it to the previous write's MSB
// is this design's reading of it.
module tcam_ctrl
  import tcam_pkg::*;
#(
  parameter int unsigned N_SUB = N_SUBBANK,
  localparam int unsigned MSBW = $clog2(N_SUB + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  op_e             op,
  input  logic [MSBW-1:0] msb,
  output logic [N_SUB:0]  wl,       // one-hot main-bank word lines
  output logic            mf_we     // write the MF word on the active line
);
  logic [MSBW-1:0] last_msb;
  logic            last_valid;

  always_comb begin
    wl = '0;
    if ((op == OP_WRITE || op == OP_READ) && int'(msb) <= int'(N_SUB)) wl[msb] = 1'b1;
    mf_we = (op == OP_WRITE) && (msb != '0) && (int'(msb) <= int'(N_SUB))
            && (!last_valid || msb != last_msb);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_msb   <= '0;
      last_valid <= 1'b0;
    end else if (op == OP_WRITE) begin
      last_msb   <= msb;
      last_valid <= 1'b1;
    end
  end
endmodule
