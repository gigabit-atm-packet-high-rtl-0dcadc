// pm_stim: stimulus and scoreboard for the pipelined bank-array memory.
//
// Drives one operation per cycle and checks every output cycle by cycle
// against a plain array model of the memory (one word per address, the
// reserved row-address bit masked off). Sequence:
//   1. reset, then the four-operation example of the memory's timing chart:
//      write 3, write 8, read 3, read 8, checking that the two reads return
//      N + 3 cycles after their address cycles;
//   2. a write to every word of the memory, in address order;
//   3. NOPS random operations: R/W, ME, MD, PA and data random, addresses
//      random over the full width, often repeating the previous address so
//      that a read follows a write to the same word in the next cycle;
//   4. idle cycles to drain the pipeline.
// Expected read data, the output valid flag, which output buffer is valid,
// and MD/PA/ME after the last column decoder (N + 1 cycles) are checked in
// exactly the cycle they are due. It counts how often each mechanism of the
// design occurred: diagonal paths starting on the top edge, on the left edge
// and at the corner bank, ME bubbles, back-to-back R/W changes,
// read-after-write in the next cycle, reserved-bit aliasing, and reads
// leaving through each of the 2N-1 output buffers; any that never occurred
// counts as a failure. Finally it checks that each operation activated
// exactly N of the N*N banks (one bank-cycle per bank on its path), the
// property that makes per-bank clock gating save power.
module pm_stim
  import pm_pkg::*;
#(
  parameter int unsigned N    = 4,
  parameter int unsigned NOPS = 20000,
  localparam int unsigned LG     = $clog2(N),
  localparam int unsigned ADDR_W = RA_W + 2 * LG,
  localparam int unsigned NBUF   = 2 * N - 1
) (
  input  logic              clk,
  output logic              rst_n,
  output logic [ADDR_W-1:0] addr,
  output word_t             data,
  output rw_e               rw,
  output logic              me,
  output logic              md,
  output pa_t               pa,
  input  word_t             odata,
  input  logic              ovalid,
  input  logic              md_o,
  input  pa_t               pa_o,
  input  logic              me_o,
  input  logic [NBUF-1:0]   ob_valid,
  input  int                active_banks,   // banks holding a trigger this cycle
  output logic              done,
  output int                checks,
  output int                failures
);

  localparam int unsigned LAT   = N + 3;   // read latency
  localparam int unsigned CDLAT = N + 1;   // to the last column decoder
  localparam int unsigned RING  = 64;

  word_t model [1 << (ADDR_W - 1)];

  // expectations, indexed by the cycle they are due in
  bit    e_valid[RING];
  word_t e_data [RING];
  int    e_buf  [RING];
  bit    e_me   [RING];
  bit    e_md   [RING];
  pa_t   e_pa   [RING];

  int cyc = 0;
  int n_top = 0, n_left = 0, n_corner = 0, n_bubble = 0, n_switch = 0;
  int n_raw = 0, n_alias = 0, n_reads = 0, n_writes = 0;
  int n_buf [NBUF];
  longint bank_cycles = 0;     // sum of active_banks over the run
  int n_ops = 0;               // operations with ME high
  int lat_seen [2];

  // previous issued operation
  bit prev_me = 0;
  rw_e prev_rw = RW_WRITE;
  logic [ADDR_W-1:0] prev_addr = '0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  function automatic int unsigned word_of(logic [ADDR_W-1:0] a);
    return int'(a[ADDR_W-2:0]);    // drop the reserved top bit
  endfunction

  // check the outputs due in this cycle
  task automatic check_outputs();
    int s = cyc % RING;
    check(ovalid == e_valid[s], "output valid");
    if (e_valid[s]) begin
      check(odata == e_data[s], "read data");
      for (int k = 0; k < NBUF; k++)
        check(ob_valid[k] == (k == e_buf[s]), "output buffer choice");
      n_buf[e_buf[s]]++;
    end else begin
      check(ob_valid == '0, "no output buffer when idle");
    end
    check(me_o == e_me[s], "ME after column decoders");
    if (e_me[s]) check(md_o == e_md[s] && pa_o == e_pa[s], "MD/PA after column decoders");
    e_valid[s] = 0;
    e_me[s] = 0;
  endtask

  // drive one operation in the current cycle and record what it must produce
  task automatic issue(logic [ADDR_W-1:0] a, rw_e r, logic m, word_t d);
    int x, y, sl, sc;
    addr = a; rw = r; me = m; data = d;
    md = 1'($urandom); pa = pa_t'($urandom);
    sc = (cyc + CDLAT) % RING;
    e_me[sc] = m; e_md[sc] = md; e_pa[sc] = pa;
    if (!m) begin
      n_bubble++;
    end else begin
      x = int'(a[3 +: LG]);
      y = int'(a[3 + LG +: LG]);
      n_ops++;
      if (x > y) n_left++; else if (x < y) n_top++; else n_corner++;
      if (a[ADDR_W-1]) n_alias++;
      if (prev_me && prev_rw != r) n_switch++;
      if (prev_me && prev_rw == RW_WRITE && r == RW_READ && prev_addr == a) n_raw++;
      if (r == RW_WRITE) begin
        model[word_of(a)] = d;
        n_writes++;
      end else begin
        sl = (cyc + LAT) % RING;
        e_valid[sl] = 1;
        e_data[sl]  = model[word_of(a)];
        e_buf[sl]   = (x >= y) ? N - 1 - (x - y) : N + (N - 1 - (y - x));
        n_reads++;
      end
    end
    prev_me = m; prev_rw = r; prev_addr = a;
  endtask

  // one clock: wait for the edge, check what is due, then drive
  task automatic step();
    @(posedge clk);
    #1;
    cyc++;
    bank_cycles += active_banks;
    check_outputs();
  endtask

  initial begin
    logic [ADDR_W-1:0] a;
    word_t d0, d1;
    int t_rd3;
    done = 0; checks = 0; failures = 0;
    foreach (e_valid[k]) begin e_valid[k] = 0; e_me[k] = 0; end
    foreach (n_buf[k]) n_buf[k] = 0;
    rst_n = 0; addr = '0; data = '0; rw = RW_WRITE; me = 0; md = 0; pa = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // 1. the timing-chart example
    d0 = {$urandom, $urandom, $urandom};
    d1 = {$urandom, $urandom, $urandom};
    step(); issue(ADDR_W'(3), RW_WRITE, 1, d0);
    step(); issue(ADDR_W'(8), RW_WRITE, 1, d1);
    step(); issue(ADDR_W'(3), RW_READ, 1, '0); t_rd3 = cyc;
    step(); issue(ADDR_W'(8), RW_READ, 1, '0);
    lat_seen[0] = -1; lat_seen[1] = -1;
    for (int t = 0; t < LAT + 2; t++) begin
      step();
      if (ovalid && lat_seen[0] < 0) lat_seen[0] = cyc - t_rd3;
      else if (ovalid && lat_seen[1] < 0) lat_seen[1] = cyc - t_rd3 - 1;
      issue('0, RW_WRITE, 0, '0);
    end
    check(lat_seen[0] == int'(LAT) && lat_seen[1] == int'(LAT), "latency N+3 of the example");
    $display("example reads came back after %0d and %0d cycles (N+3 = %0d)",
             lat_seen[0], lat_seen[1], LAT);

    // 2. fill every word
    for (int w = 0; w < (1 << (ADDR_W - 1)); w++) begin
      step();
      issue(ADDR_W'(w), RW_WRITE, 1, {$urandom, $urandom, $urandom});
    end

    // 3. random traffic
    for (int t = 0; t < int'(NOPS); t++) begin
      step();
      a = ($urandom_range(3) == 0) ? prev_addr : ADDR_W'($urandom);
      issue(a, rw_e'($urandom_range(1)), ($urandom_range(9) != 0),
            {$urandom, $urandom, $urandom});
    end

    // 4. drain
    for (int t = 0; t < int'(LAT) + 4; t++) begin
      step();
      issue('0, RW_WRITE, 0, '0);
    end

    $display("bank activations: %0d for %0d operations (N per operation expected)",
             bank_cycles, n_ops);
    check(bank_cycles == longint'(N) * n_ops, "each operation must activate exactly N banks");
    $display("ops: reads=%0d writes=%0d bubbles=%0d", n_reads, n_writes, n_bubble);
    $display("paths: top-edge start=%0d left-edge start=%0d corner start=%0d",
             n_top, n_left, n_corner);
    $display("R/W switches=%0d read-after-write next cycle=%0d reserved-bit aliases=%0d",
             n_switch, n_raw, n_alias);
    check(n_top > 0 && n_left > 0 && n_corner > 0, "a path start never occurred");
    check(n_bubble > 0 && n_switch > 0 && n_raw > 0 && n_alias > 0,
          "a traffic mechanism never occurred");
    for (int k = 0; k < NBUF; k++) begin
      $display("output buffer %0d: %0d reads", k, n_buf[k]);
      check(n_buf[k] > 0, "an output buffer was never used");
    end
    done = 1;
  end

endmodule
