// memory_bank: one SRAM bank of the array, 64 words x 65 bits (4160 bits).
//
// A bank receives a vertical bundle (CBT, PD, R/W, DATA) from above or from
// the upper-left neighbour and a horizontal bundle (RBT, WL) from the left or
// from the upper-left neighbour. The two trigger bits decide what it does in
// the cycle:
//   CBT only       pass the vertical bundle down, PD decremented
//   RBT only       pass the horizontal bundle right
//   CBT and RBT    pass both bundles diagonally (down-right), PD decremented;
//                  if PD is zero the bank also accesses its own array with
//                  the word line on WL: a write stores DATA, a read replaces
//                  DATA with the stored word before it leaves the bank.
// The three output trigger bits down_o, right_o and diag_o are those three
// cases; they share one set of data registers (pd_o, rw_o, data_o, wl_o).
//
// Gated clock: the vertical data registers load only when the incoming CBT is
// high and the horizontal ones only when the incoming RBT is high, so idle
// banks do not toggle. The enables stand for the per-bank gated latch clocks
// of the prototype; the trigger registers themselves always load.
//
// Timing: one cycle per bank, rising clock edge. The array is written on the
// same edge that registers the outgoing bundle and is read combinationally
// within the cycle. Only the triggers are reset (this design's choice).
module memory_bank
  import pm_pkg::*;
#(
  parameter int unsigned N  = 4,
  localparam int unsigned LG = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  // vertical input bundle
  input  logic          cbt_i,
  input  logic [LG-1:0] pd_i,
  input  rw_e           rw_i,
  input  word_t         data_i,
  // horizontal input bundle
  input  logic          rbt_i,
  input  wl_t           wl_i,
  // output triggers: one per direction
  output logic          down_o,
  output logic          right_o,
  output logic          diag_o,
  // shared output data
  output logic [LG-1:0] pd_o,
  output rw_e           rw_o,
  output word_t         data_o,
  output wl_t           wl_o
);

  word_t mem [WORDS];

  logic             cbt_q, rbt_q;
  logic             access;
  logic [WL_AW-1:0] row;

  assign access = cbt_i && rbt_i && (pd_i == '0);
  assign row    = wl_index(wl_i);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cbt_q <= 1'b0;
      rbt_q <= 1'b0;
    end else begin
      cbt_q <= cbt_i;
      rbt_q <= rbt_i;
    end
  end

  // vertical data: loaded only under CBT
  always_ff @(posedge clk) begin
    if (cbt_i) begin
      pd_o <= pd_i - 1'b1;
      rw_o <= rw_i;
      if (access && rw_i == RW_READ) data_o <= mem[row];
      else                           data_o <= data_i;
    end
  end

  // horizontal data: loaded only under RBT
  always_ff @(posedge clk) begin
    if (rbt_i) wl_o <= wl_i;
  end

  // memory cell array
  always_ff @(posedge clk) begin
    if (access && rw_i == RW_WRITE) mem[row] <= data_i;
  end

  assign down_o  = cbt_q && !rbt_q;
  assign right_o = rbt_q && !cbt_q;
  assign diag_o  = cbt_q && rbt_q;

endmodule
