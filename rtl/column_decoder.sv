// column_decoder: one per column of the bank array, chained left to right.
//
// It checks its column branch address: when CBA is zero and the memory enable
// ME is high it raises the column branch trigger CBT for the bank below it.
// Downwards it sends CBT, PD (unchanged), R/W and DATA to the top bank of its
// column; to the right it sends CBA-1 and PD-1 together with DATA, R/W, ME,
// the mode bit MD and the port address PA to the next column decoder. MD and
// PA are not used by the memory; they ride along for the switch's address
// controller, which taps them after the last column decoder. The
// decrementors wrap; a wrapped CBA cannot reach zero again within N stages.
//
// Timing: all outputs registered on the rising clock edge, one cycle per
// decoder. ME and CBT are reset (this design's choice); the rest are not.
module column_decoder
  import pm_pkg::*;
#(
  parameter int unsigned N  = 4,
  localparam int unsigned LG = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  // from the primary decoder or the previous column decoder
  input  logic [LG-1:0] cba_i,
  input  logic [LG-1:0] pd_i,
  input  word_t         data_i,
  input  rw_e           rw_i,
  input  logic          me_i,
  input  logic          md_i,
  input  pa_t           pa_i,
  // to the next column decoder (horizontal)
  output logic [LG-1:0] cba_o,
  output logic [LG-1:0] pd_o,
  output word_t         data_o,
  output rw_e           rw_o,
  output logic          me_o,
  output logic          md_o,
  output pa_t           pa_o,
  // to the bank below (vertical); R/W and DATA are data_o and rw_o
  output logic          cbt_o,
  output logic [LG-1:0] bank_pd_o
);

  logic cbt_d;
  assign cbt_d = me_i && (cba_i == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      me_o  <= 1'b0;
      cbt_o <= 1'b0;
    end else begin
      me_o  <= me_i;
      cbt_o <= cbt_d;
    end
  end

  always_ff @(posedge clk) begin
    cba_o     <= cba_i - 1'b1;
    pd_o      <= pd_i - 1'b1;
    bank_pd_o <= pd_i;
    data_o    <= data_i;
    rw_o      <= rw_i;
    md_o      <= md_i;
    pa_o      <= pa_i;
  end

endmodule
