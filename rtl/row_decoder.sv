// row_decoder: one per row of the bank array, chained top to bottom.
//
// It checks its row branch address: when RBA is zero and ME is high it raises
// the row branch trigger RBT for the leftmost bank of its row, together with
// the 64 word lines pre-decoded from the row address (WL = 1 << RA[5:0]; RA[6]
// is the reserved bit, since a bank has only 64 word lines). Downwards it
// passes RBA-1, ME and RA to the next row decoder.
//
// Timing: all outputs registered on the rising clock edge, one cycle per
// decoder. ME and RBT are reset (this design's choice); the rest are not.
module row_decoder
  import pm_pkg::*;
#(
  parameter int unsigned N  = 4,
  localparam int unsigned LG = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  // from the primary decoder or the previous row decoder
  input  logic [LG-1:0] rba_i,
  input  logic          me_i,
  input  ra_t           ra_i,
  // to the next row decoder (vertical)
  output logic [LG-1:0] rba_o,
  output logic          me_o,
  output ra_t           ra_o,
  // to the bank on the right (horizontal)
  output logic          rbt_o,
  output wl_t           wl_o
);

  logic rbt_d;
  wl_t  wl_d;

  always_comb begin
    rbt_d = me_i && (rba_i == '0);
    wl_d  = '0;
    wl_d[ra_i[WL_AW-1:0]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      me_o  <= 1'b0;
      rbt_o <= 1'b0;
    end else begin
      me_o  <= me_i;
      rbt_o <= rbt_d;
    end
  end

  always_ff @(posedge clk) begin
    rba_o <= rba_i - 1'b1;
    ra_o  <= ra_i;
    wl_o  <= wl_d;
  end

endmodule
