// output_buffer: drives one diagonal's result onto the shared output data bus.
//
// One buffer sits where each diagonal access path leaves the bank array (below
// the bottom row and right of the right column, 2N-1 in all). When the
// incoming bundle carries both triggers (the diagonal path) and R/W says read,
// the buffer registers DATA and puts it on the bus in the next cycle; in every
// other cycle it drives zeros. The bus is the OR of all buffers; the pipeline
// guarantees that at most one buffer is valid per cycle. The zero-when-idle
// AND-OR bus in place of a three-state bus is this design's choice.
//
// Timing: one cycle, rising clock edge; valid_o is reset.
module output_buffer
  import pm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  trig_i,   // CBT and RBT both high (diagonal path)
  input  rw_e   rw_i,
  input  word_t data_i,
  output logic  valid_o,
  output word_t bus_o
);

  logic  load;
  word_t data_q;

  assign load = trig_i && rw_i == RW_READ;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_o <= 1'b0;
    else        valid_o <= load;
  end

  always_ff @(posedge clk) begin
    if (load) data_q <= data_i;
  end

  assign bus_o = valid_o ? data_q : '0;

endmodule
