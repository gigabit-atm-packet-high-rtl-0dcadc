// tb_column_decoder: random check of one column decoder stage.
//
// Random inputs each cycle; one cycle later the test expects CBT = ME and
// (CBA == 0), the decremented CBA and PD towards the next decoder, the
// unchanged PD towards the bank, and DATA, R/W, ME, MD, PA passed through.
module tb_column_decoder;
  import pm_pkg::*;

  localparam int unsigned N = 4;
  localparam int unsigned LG = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [LG-1:0] cba, pd, cba_o, pd_o, bank_pd_o;
  word_t data, data_o;
  rw_e rw, rw_o;
  logic me, md, me_o, md_o, cbt_o;
  pa_t pa, pa_o;
  int checks = 0, failures = 0;
  int n_cbt = 0;

  column_decoder #(.N(N)) dut (
    .clk, .rst_n, .cba_i(cba), .pd_i(pd), .data_i(data), .rw_i(rw),
    .me_i(me), .md_i(md), .pa_i(pa), .cba_o, .pd_o, .data_o, .rw_o, .me_o,
    .md_o, .pa_o, .cbt_o, .bank_pd_o
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s cba=%0d pd=%0d me=%0b", what, cba, pd, me);
    end
  endtask

  initial begin
    cba = '0; pd = '0; data = '0; rw = RW_WRITE; me = 1'b1; md = 1'b0; pa = '0;
    @(posedge clk); #1;
    check(cbt_o == 1'b0 && me_o == 1'b0, "reset");
    rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      cba = LG'($urandom); pd = LG'($urandom);
      data = {$urandom, $urandom, $urandom};
      rw = rw_e'($urandom_range(1)); me = 1'($urandom); md = 1'($urandom);
      pa = pa_t'($urandom);
      @(posedge clk); #1;
      check(cbt_o == (me && cba == 0), "CBT");
      if (cbt_o) n_cbt++;
      check(cba_o == LG'((int'(cba) + N - 1) % N), "CBA-1");
      check(pd_o == LG'((int'(pd) + N - 1) % N), "PD-1");
      check(bank_pd_o == pd, "PD to bank");
      check(data_o == data && rw_o == rw && me_o == me && md_o == md && pa_o == pa,
            "pass-through");
    end
    check(n_cbt > 0, "CBT never raised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
