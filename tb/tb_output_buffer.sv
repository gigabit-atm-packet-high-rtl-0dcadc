// tb_output_buffer: random check of one output buffer.
//
// A word must appear on the bus, with valid high, one cycle after a bundle
// with the diagonal trigger and R/W = read; in every other cycle the bus must
// be zero and valid low.
module tb_output_buffer;
  import pm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic trig, valid_o;
  rw_e rw;
  word_t data, bus_o;
  int checks = 0, failures = 0;
  int n_valid = 0;

  output_buffer dut (.clk, .rst_n, .trig_i(trig), .rw_i(rw), .data_i(data),
                     .valid_o, .bus_o);

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
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    bit exp_v;
    trig = 1'b1; rw = RW_READ; data = '1;
    @(posedge clk); #1;
    check(valid_o == 1'b0 && bus_o == '0, "reset");
    rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      trig = 1'($urandom); rw = rw_e'($urandom_range(1));
      data = {$urandom, $urandom, $urandom};
      exp_v = trig && rw == RW_READ;
      @(posedge clk); #1;
      check(valid_o == exp_v, "valid");
      check(bus_o == (exp_v ? data : '0), "bus data");
      if (valid_o) n_valid++;
    end
    check(n_valid > 0, "never valid");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
