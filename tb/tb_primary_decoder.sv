// tb_primary_decoder: exhaustive check of the primary decoder for a 4 x 4 array.
//
// Every address is applied once with random side data. The check does not
// repeat the decoder's formula: it follows the path the outputs describe
// (column decoders decrement PD once per column, banks once per row or
// diagonal step) and checks that it starts on the top or left edge and that
// PD reaches zero exactly at bank (x, y) = (ADDR[4:3], ADDR[6:5]). It also
// checks the row address, the pass-through signals and the one-cycle latency.
module tb_primary_decoder;
  import pm_pkg::*;

  localparam int unsigned N = 4;
  localparam int unsigned LG = 2;
  localparam int unsigned ADDR_W = RA_W + 2 * LG;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [ADDR_W-1:0] addr;
  word_t data, data_o;
  rw_e rw, rw_o;
  logic me, md, me_o, md_o;
  pa_t pa, pa_o;
  logic [LG-1:0] cba_o, pd_o, rba_o;
  ra_t ra_o;
  int checks = 0, failures = 0;

  primary_decoder #(.N(N)) dut (
    .clk, .rst_n, .addr_i(addr), .data_i(data), .rw_i(rw), .me_i(me),
    .md_i(md), .pa_i(pa), .cba_o, .pd_o, .data_o, .rw_o, .me_o, .md_o,
    .pa_o, .rba_o, .ra_o
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
      $display("FAIL %s addr=%h", what, addr);
    end
  endtask

  initial begin
    int x, y, r, c, p, k;
    addr = '0; data = '0; rw = RW_WRITE; me = 1'b0; md = 1'b0; pa = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int a = 0; a < (1 << ADDR_W); a++) begin
      @(negedge clk);
      addr = ADDR_W'(a);
      data = {$urandom, $urandom, $urandom};
      rw = rw_e'($urandom_range(1));
      me = 1'($urandom);
      md = 1'($urandom);
      pa = pa_t'($urandom);
      @(posedge clk); #1;
      x = (a >> 3) & 3;
      y = (a >> 5) & 3;
      r = int'(rba_o); c = int'(cba_o); p = int'(pd_o);
      check(r == 0 || c == 0, "start not on an edge");
      k = p - c - r;              // diagonal steps after the start bank
      check(k >= 0, "PD too small for the start bank");
      check(r + k == x && c + k == y, "path does not end at bank (x,y)");
      check(ra_o == {addr[10:7], addr[2:0]}, "row address");
      check(data_o == data && rw_o == rw && me_o == me && md_o == md && pa_o == pa,
            "pass-through");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
