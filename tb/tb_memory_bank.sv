// tb_memory_bank: directed and random check of one SRAM bank.
//
// Each cycle the test drives a random mix of the three cases (CBT only, RBT
// only, both) with random PD, R/W, DATA and a random one-hot word line, keeps
// its own 64-word model of the array, and one cycle later checks:
//   - the direction bits down/right/diag against the input triggers,
//   - PD - 1 and R/W on the vertical outputs, the word lines on the
//     horizontal outputs,
//   - DATA: the stored word after a read access (both triggers, PD = 0,
//     R/W = read), the input DATA otherwise,
//   - that registers whose trigger was low keep their old value (gated clock).
// A write with PD != 0 or a missing trigger must not change the array.
module tb_memory_bank;
  import pm_pkg::*;

  localparam int unsigned N = 4;
  localparam int unsigned LG = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cbt, rbt;
  logic [LG-1:0] pd, pd_o;
  rw_e rw, rw_o;
  word_t data, data_o;
  wl_t wl, wl_o;
  logic down_o, right_o, diag_o;
  int checks = 0, failures = 0;
  int n_wr = 0, n_rd = 0, n_down = 0, n_right = 0, n_diag = 0, n_hold = 0;

  word_t model [WORDS];
  bit    known [WORDS];

  memory_bank #(.N(N)) dut (
    .clk, .rst_n, .cbt_i(cbt), .pd_i(pd), .rw_i(rw), .data_i(data),
    .rbt_i(rbt), .wl_i(wl), .down_o, .right_o, .diag_o, .pd_o, .rw_o,
    .data_o, .wl_o
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s cbt=%0b rbt=%0b pd=%0d rw=%0d", what, cbt, rbt, pd, rw);
    end
  endtask

  initial begin
    int row;
    bit acc;
    word_t exp_data, old_data;
    wl_t old_wl;
    logic [LG-1:0] old_pd;
    foreach (known[k]) known[k] = 1'b0;
    cbt = 1'b1; rbt = 1'b1; pd = '0; rw = RW_READ; data = '0; wl = '0;
    @(posedge clk); #1;
    check(!down_o && !right_o && !diag_o, "reset");
    rst_n = 1'b1;
    // fill the array through accesses
    for (int k = 0; k < WORDS; k++) begin
      @(negedge clk);
      cbt = 1; rbt = 1; pd = 0; rw = RW_WRITE; wl = wl_t'(1) << k;
      data = {$urandom, $urandom, $urandom};
      model[k] = data; known[k] = 1'b1;
      @(posedge clk); #1;
      check(diag_o && !down_o && !right_o, "write goes diagonal");
      n_wr++;
    end
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      old_data = data_o; old_wl = wl_o; old_pd = pd_o;
      cbt = 1'($urandom); rbt = 1'($urandom);
      pd = LG'($urandom_range(3) == 0 ? 0 : $urandom);
      rw = rw_e'($urandom_range(1));
      row = $urandom_range(WORDS - 1);
      wl = wl_t'(1) << row;
      data = {$urandom, $urandom, $urandom};
      acc = cbt && rbt && pd == 0;
      exp_data = (acc && rw == RW_READ) ? model[row] : data;
      @(posedge clk); #1;
      check(down_o == (cbt && !rbt) && right_o == (rbt && !cbt) && diag_o == (cbt && rbt),
            "direction");
      if (cbt) begin
        check(pd_o == pd - 1'b1 && rw_o == rw, "PD-1 and R/W");
        check(data_o == exp_data, "data out");
      end else begin
        check(data_o == old_data && pd_o == old_pd, "vertical registers held");
        n_hold++;
      end
      if (rbt) check(wl_o == wl, "word lines");
      else     check(wl_o == old_wl, "horizontal registers held");
      if (acc && rw == RW_WRITE) begin model[row] = data; n_wr++; end
      if (acc && rw == RW_READ) n_rd++;
      if (down_o) n_down++;
      if (right_o) n_right++;
      if (diag_o) n_diag++;
    end
    check(n_wr > 0 && n_rd > 0 && n_down > 0 && n_right > 0 && n_diag > 0 && n_hold > 0,
          "some case never happened");
    $display("writes=%0d reads=%0d down=%0d right=%0d diag=%0d held=%0d",
             n_wr, n_rd, n_down, n_right, n_diag, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
