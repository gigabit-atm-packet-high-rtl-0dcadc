// primary_decoder: first pipeline stage of the pipelined bank-array memory.
//
// The input address carries two log2(N)-bit bank indices, x = ADDR[3 +: LG]
// (the bank row) and y = ADDR[3+LG +: LG] (the bank column); the remaining
// bits, {ADDR[top:3+2LG], ADDR[2:0]}, form the 7-bit row address RA. The
// decoder subtracts Temp = x - y and lets the borrow choose:
//   no borrow (x >= y): RBA = Temp,  CBA = 0,     PD = x
//   borrow    (x <  y): RBA = 0,     CBA = -Temp, PD = y
// so the access path starts at bank (x-y, 0) on the left edge or at bank
// (0, y-x) on the top edge and then runs diagonally, PD counting the banks
// still to go before the addressed bank (x, y) is reached. CBA is the two's
// complement of Temp, as in the prototype's block diagram.
//
// Interface: ADDR, DATA, R/W, ME, MD, PA in; everything registered on the
// rising clock edge (the prototype's CLKB input latch plus CLK output latch
// pair) and sent on: CBA, PD, DATA, R/W, ME, MD, PA to column decoder 0 and
// RBA, RA, ME to row decoder 0. Latency one cycle. Only ME is reset (this
// design's choice) so that the pipeline starts empty.
module primary_decoder
  import pm_pkg::*;
#(
  parameter int unsigned N      = 4,
  localparam int unsigned LG     = $clog2(N),
  localparam int unsigned ADDR_W = RA_W + 2 * LG
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] addr_i,
  input  word_t             data_i,
  input  rw_e               rw_i,
  input  logic              me_i,
  input  logic              md_i,
  input  pa_t               pa_i,
  // to column decoder 0
  output logic [LG-1:0]     cba_o,
  output logic [LG-1:0]     pd_o,
  output word_t             data_o,
  output rw_e               rw_o,
  output logic              me_o,
  output logic              md_o,
  output pa_t               pa_o,
  // to row decoder 0 (ME above is shared)
  output logic [LG-1:0]     rba_o,
  output ra_t               ra_o
);

  logic [LG-1:0] x, y, temp;
  logic          borrow;
  logic [LG-1:0] cba_d, rba_d, pd_d;

  always_comb begin
    x = addr_i[LOW_W +: LG];
    y = addr_i[LOW_W + LG +: LG];
    {borrow, temp} = {1'b0, x} - {1'b0, y};
    if (!borrow) begin
      rba_d = temp;
      cba_d = '0;
      pd_d  = x;
    end else begin
      rba_d = '0;
      cba_d = -temp;
      pd_d  = y;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) me_o <= 1'b0;
    else        me_o <= me_i;
  end

  always_ff @(posedge clk) begin
    cba_o  <= cba_d;
    rba_o  <= rba_d;
    pd_o   <= pd_d;
    ra_o   <= {addr_i[ADDR_W-1 : LOW_W + 2*LG], addr_i[LOW_W-1:0]};
    data_o <= data_i;
    rw_o   <= rw_i;
    md_o   <= md_i;
    pa_o   <= pa_i;
  end

  initial assert (N >= 2 && (1 << LG) == N)
    else $error("primary_decoder: N must be a power of two, at least 2");

endmodule
