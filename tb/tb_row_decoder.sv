// tb_row_decoder: random check of one row decoder stage.
//
// Random inputs each cycle; one cycle later the test expects RBT = ME and
// (RBA == 0), exactly one word line set at RA[5:0] (RA[6] ignored), RBA-1,
// ME and RA passed to the next decoder.
module tb_row_decoder;
  import pm_pkg::*;

  localparam int unsigned N = 4;
  localparam int unsigned LG = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [LG-1:0] rba, rba_o;
  logic me, me_o, rbt_o;
  ra_t ra, ra_o;
  wl_t wl_o;
  int checks = 0, failures = 0;
  int n_rbt = 0;

  row_decoder #(.N(N)) dut (
    .clk, .rst_n, .rba_i(rba), .me_i(me), .ra_i(ra), .rba_o, .me_o, .ra_o,
    .rbt_o, .wl_o
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
      $display("FAIL %s rba=%0d ra=%0d me=%0b", what, rba, ra, me);
    end
  endtask

  initial begin
    int ones, pos;
    rba = '0; me = 1'b1; ra = '0;
    @(posedge clk); #1;
    check(rbt_o == 1'b0 && me_o == 1'b0, "reset");
    rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      rba = LG'($urandom); me = 1'($urandom); ra = ra_t'($urandom);
      @(posedge clk); #1;
      check(rbt_o == (me && rba == 0), "RBT");
      if (rbt_o) n_rbt++;
      ones = 0; pos = -1;
      for (int k = 0; k < WORDS; k++) if (wl_o[k]) begin ones++; pos = k; end
      check(ones == 1 && pos == int'(ra) % 64, "word line decode");
      check(rba_o == LG'((int'(rba) + N - 1) % N), "RBA-1");
      check(me_o == me && ra_o == ra, "pass-through");
    end
    check(n_rbt > 0, "RBT never raised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
