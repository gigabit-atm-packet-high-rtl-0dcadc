// tb_pipelined_memory_n2: end-to-end test of the pipelined memory in a 2 x 2 array, to show that the same RTL scales.
//
// pm_stim drives one operation per cycle and checks read data, the N + 3
// cycle latency, the output buffer used and the signals for the address
// controller against an array model; see pm_stim for the sequence and the
// mechanisms it counts. A watchdog ends the run as failed if it hangs.
module tb_pipelined_memory_n2;
  import pm_pkg::*;

  localparam int unsigned N      = 2;
  localparam int unsigned LG     = $clog2(N);
  localparam int unsigned ADDR_W = RA_W + 2 * LG;
  localparam int unsigned NBUF   = 2 * N - 1;

  logic clk = 1'b0;
  logic rst_n;
  logic [ADDR_W-1:0] addr;
  word_t data, odata;
  rw_e rw;
  logic me, md, ovalid, md_o, me_o, done;
  pa_t pa, pa_o;
  int checks, failures;

  // banks whose registers hold a trigger this cycle
  logic [N*N-1:0] bank_act;
  for (genvar i = 0; i < N; i++) begin : g_ai
    for (genvar j = 0; j < N; j++) begin : g_aj
      assign bank_act[i*N+j] = dut.g_bi[i].g_bj[j].u_bank.down_o ||
                               dut.g_bi[i].g_bj[j].u_bank.right_o ||
                               dut.g_bi[i].g_bj[j].u_bank.diag_o;
    end
  end

  pipelined_memory #(.N(N)) dut (
    .clk, .rst_n, .addr_i(addr), .data_i(data), .rw_i(rw), .me_i(me),
    .md_i(md), .pa_i(pa), .odata_o(odata), .ovalid_o(ovalid), .md_o(md_o),
    .pa_o(pa_o), .me_o(me_o)
  );

  pm_stim #(.N(N), .NOPS(20000)) stim (
    .clk, .rst_n, .addr, .data, .rw, .me, .md, .pa, .odata, .ovalid,
    .md_o, .pa_o, .me_o, .ob_valid(dut.ob_valid_vec),
    .active_banks($countones(bank_act)), .done, .checks, .failures
  );

  always #5 clk = ~clk;

  initial begin
    #1 wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
