// pipelined_memory: scalable pipelined shared-buffer memory for an ATM switch.
//
// A large buffer is split into an N x N array of small SRAM banks (default
// 4 x 4 banks of 64 x 65 bits: 66560 bits, 128 ATM cells of 64 bytes with an
// 8-bit next-cell address each). Every bank, decoder and output buffer is one
// pipeline stage, so the cycle time is that of one small bank whatever N is.
//
// Data flow. The primary decoder turns the bank indices x (row) and y (column)
// of ADDR into CBA, RBA and PD. Column decoders along the top pass the
// vertical bundle (CBT, PD, R/W, DATA) right and down; row decoders along the
// left pass the horizontal bundle (RBT, word lines) down and right. Exactly
// one column decoder raises CBT and one row decoder raises RBT; they meet at a
// bank on the top or left edge, from which both bundles travel diagonally
// down-right, PD falling by one per bank, until PD is zero at bank (x, y),
// which reads or writes. The bundles then continue along the diagonal to the
// output buffer at the array's edge. Bank (i, j) is always reached in stage
// max(i, j) + 3, so every path is the same length: a read returns its word
// N + 3 cycles after the address is presented (7 for 4 x 4), a write lands in
// the bank in order with the reads around it, R/W may change every cycle, and
// only one output buffer is ever valid in a cycle.
//
// Interface: one operation per cycle on addr_i/data_i/rw_i/me_i/md_i/pa_i
// (ME low makes a bubble). odata_o/ovalid_o carry read data. md_o, pa_o and
// me_o are MD, PA and ME after the last column decoder (N + 1 cycles later)
// for the switch's address controller. ADDR is 7 + 2*log2(N) bits: bits [2:0]
// select the word within a cell, the next 2*log2(N) bits the bank (row index
// first), the rest the cell within the bank; the top bit of the row address
// is reserved and ignored.
//
// Follows the published architecture: the stage structure, the decoding
// algorithm, the trigger rules and the N + 3 latency. This design's own
// choices: a bank forwards diagonally when both triggers are high, flip-flops
// for the latch pairs, and an AND-OR output bus.
module pipelined_memory
  import pm_pkg::*;
#(
  parameter int unsigned N       = 4,
  localparam int unsigned LG      = $clog2(N),
  localparam int unsigned ADDR_W  = RA_W + 2 * LG
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] addr_i,
  input  word_t             data_i,
  input  rw_e               rw_i,
  input  logic              me_i,
  input  logic              md_i,
  input  pa_t               pa_i,
  output word_t             odata_o,
  output logic              ovalid_o,
  output logic              md_o,
  output pa_t               pa_o,
  output logic              me_o
);

  // ---------------- primary decoder ----------------
  logic [LG-1:0] p_cba, p_pd, p_rba;
  word_t         p_data;
  rw_e           p_rw;
  logic          p_me, p_md;
  pa_t           p_pa;
  ra_t           p_ra;

  primary_decoder #(.N(N)) u_primary (
    .clk, .rst_n,
    .addr_i, .data_i, .rw_i, .me_i, .md_i, .pa_i,
    .cba_o(p_cba), .pd_o(p_pd), .data_o(p_data), .rw_o(p_rw),
    .me_o(p_me), .md_o(p_md), .pa_o(p_pa), .rba_o(p_rba), .ra_o(p_ra)
  );

  // ---------------- column decoders ----------------
  logic [LG-1:0] c_cba [N];
  logic [LG-1:0] c_pd  [N];
  word_t         c_data[N];
  rw_e           c_rw  [N];
  logic          c_me  [N];
  logic          c_md  [N];
  pa_t           c_pa  [N];
  logic          c_cbt [N];
  logic [LG-1:0] c_bpd [N];

  for (genvar j = 0; j < N; j++) begin : g_col
    column_decoder #(.N(N)) u_col (
      .clk, .rst_n,
      .cba_i (j == 0 ? p_cba  : c_cba [j==0 ? 0 : j-1]),
      .pd_i  (j == 0 ? p_pd   : c_pd  [j==0 ? 0 : j-1]),
      .data_i(j == 0 ? p_data : c_data[j==0 ? 0 : j-1]),
      .rw_i  (j == 0 ? p_rw   : c_rw  [j==0 ? 0 : j-1]),
      .me_i  (j == 0 ? p_me   : c_me  [j==0 ? 0 : j-1]),
      .md_i  (j == 0 ? p_md   : c_md  [j==0 ? 0 : j-1]),
      .pa_i  (j == 0 ? p_pa   : c_pa  [j==0 ? 0 : j-1]),
      .cba_o(c_cba[j]), .pd_o(c_pd[j]), .data_o(c_data[j]), .rw_o(c_rw[j]),
      .me_o(c_me[j]), .md_o(c_md[j]), .pa_o(c_pa[j]),
      .cbt_o(c_cbt[j]), .bank_pd_o(c_bpd[j])
    );
  end

  assign md_o = c_md[N-1];
  assign pa_o = c_pa[N-1];
  assign me_o = c_me[N-1];

  // ---------------- row decoders ----------------
  logic [LG-1:0] r_rba[N];
  logic          r_me [N];
  ra_t           r_ra [N];
  logic          r_rbt[N];
  wl_t           r_wl [N];

  for (genvar i = 0; i < N; i++) begin : g_row
    row_decoder #(.N(N)) u_row (
      .clk, .rst_n,
      .rba_i(i == 0 ? p_rba : r_rba[i==0 ? 0 : i-1]),
      .me_i (i == 0 ? p_me  : r_me [i==0 ? 0 : i-1]),
      .ra_i (i == 0 ? p_ra  : r_ra [i==0 ? 0 : i-1]),
      .rba_o(r_rba[i]), .me_o(r_me[i]), .ra_o(r_ra[i]),
      .rbt_o(r_rbt[i]), .wl_o(r_wl[i])
    );
  end

  // ---------------- bank array ----------------
  logic          b_down [N][N];
  logic          b_right[N][N];
  logic          b_diag [N][N];
  logic [LG-1:0] b_pd   [N][N];
  rw_e           b_rw   [N][N];
  word_t         b_data [N][N];
  wl_t           b_wl   [N][N];

  for (genvar i = 0; i < N; i++) begin : g_bi
    for (genvar j = 0; j < N; j++) begin : g_bj
      logic          v_cbt, h_rbt;
      logic [LG-1:0] v_pd;
      rw_e           v_rw;
      word_t         v_data;
      wl_t           h_wl;

      // vertical bundle: column decoder, bank above, or upper-left diagonal
      if (i == 0) begin : g_vtop
        assign v_cbt  = c_cbt[j];
        assign v_pd   = c_bpd[j];
        assign v_rw   = c_rw[j];
        assign v_data = c_data[j];
      end else if (j == 0) begin : g_vleft
        assign v_cbt  = b_down[i-1][0];
        assign v_pd   = b_pd  [i-1][0];
        assign v_rw   = b_rw  [i-1][0];
        assign v_data = b_data[i-1][0];
      end else begin : g_vin
        logic from_diag;
        assign from_diag = b_diag[i-1][j-1];
        assign v_cbt  = b_down[i-1][j] || from_diag;
        assign v_pd   = from_diag ? b_pd  [i-1][j-1] : b_pd  [i-1][j];
        assign v_rw   = from_diag ? b_rw  [i-1][j-1] : b_rw  [i-1][j];
        assign v_data = from_diag ? b_data[i-1][j-1] : b_data[i-1][j];
      end

      // horizontal bundle: row decoder, bank on the left, or upper-left diagonal
      if (j == 0) begin : g_hleft
        assign h_rbt = r_rbt[i];
        assign h_wl  = r_wl[i];
      end else if (i == 0) begin : g_htop
        assign h_rbt = b_right[0][j-1];
        assign h_wl  = b_wl   [0][j-1];
      end else begin : g_hin
        assign h_rbt = b_right[i][j-1] || b_diag[i-1][j-1];
        assign h_wl  = b_diag[i-1][j-1] ? b_wl[i-1][j-1] : b_wl[i][j-1];
      end

      memory_bank #(.N(N)) u_bank (
        .clk, .rst_n,
        .cbt_i(v_cbt), .pd_i(v_pd), .rw_i(v_rw), .data_i(v_data),
        .rbt_i(h_rbt), .wl_i(h_wl),
        .down_o(b_down[i][j]), .right_o(b_right[i][j]), .diag_o(b_diag[i][j]),
        .pd_o(b_pd[i][j]), .rw_o(b_rw[i][j]), .data_o(b_data[i][j]),
        .wl_o(b_wl[i][j])
      );
    end
  end

  // ---------------- output buffers and output data bus ----------------
  // Buffer k < N sits below bank (N-1, k); buffer N + k sits right of bank
  // (k, N-1) for k < N-1. Bank (N-1, N-1) feeds the buffer below it.
  localparam int unsigned NBUF = 2 * N - 1;
  logic  ob_valid[NBUF];
  word_t ob_bus  [NBUF];

  for (genvar k = 0; k < NBUF; k++) begin : g_ob
    localparam int unsigned BI = (k < N) ? N - 1 : k - N;
    localparam int unsigned BJ = (k < N) ? k     : N - 1;
    output_buffer u_ob (
      .clk, .rst_n,
      .trig_i(b_diag[BI][BJ]), .rw_i(b_rw[BI][BJ]), .data_i(b_data[BI][BJ]),
      .valid_o(ob_valid[k]), .bus_o(ob_bus[k])
    );
  end

  always_comb begin
    odata_o  = '0;
    ovalid_o = 1'b0;
    for (int k = 0; k < NBUF; k++) begin
      odata_o  |= ob_bus[k];
      ovalid_o |= ob_valid[k];
    end
  end

  // At most one output buffer drives the bus in any cycle.
  logic [NBUF-1:0] ob_valid_vec;
  always_comb begin
    for (int k = 0; k < NBUF; k++) ob_valid_vec[k] = ob_valid[k];
  end

  a_one_driver: assert property (@(posedge clk) disable iff (!rst_n)
                                 $onehot0(ob_valid_vec))
    else $error("pipelined_memory: more than one output buffer valid");

endmodule
