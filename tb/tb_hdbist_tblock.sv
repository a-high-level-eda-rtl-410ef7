// tb_hdbist_tblock: unit test of the Test Block.
//
// Three TBlocks on a 1-bit ring segment, driven by the testbench acting as
// the TProcessor: address 1 uses a pulsed start and a pass flag, address 2 a
// level start, address 3 an active-low result (its input is a fail flag).
// Each wraps a behavioural BISTed core. Tokens are built here from the
// documented bit layout. Checked: TSR after reset, single-cast and broadcast
// RUN writes, the start-pulse width and the level-held start, DONE polled
// as 0 while the core runs and 1 after, GOOD for each result polarity, the
// AND of a broadcast read, and the extra TSR bits.
module tb_hdbist_tblock;
  import hdbist_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic       r0, r1, r2, r3;
  logic [3:1] bstart, bdone, bpass, tdone, tgood, perr;
  logic       good [4];
  int unsigned lat [4];
  int unsigned starts [4];

  hdbist_tblock #(.BUS_W(1), .ADDR(3'd1)) dut1 (
    .clk, .rst_n, .tbus_in(r0), .tbus_out(r1),
    .bist_start(bstart[1]), .bist_done(bdone[1]), .bist_pass(bpass[1]),
    .tsr_ext(6'b111110), .tsr_done(tdone[1]), .tsr_good(tgood[1]), .par_err(perr[1]));
  hdbist_tblock #(.BUS_W(1), .ADDR(3'd2), .START_PULSE(1'b0)) dut2 (
    .clk, .rst_n, .tbus_in(r1), .tbus_out(r2),
    .bist_start(bstart[2]), .bist_done(bdone[2]), .bist_pass(bpass[2]),
    .tsr_ext('1), .tsr_done(tdone[2]), .tsr_good(tgood[2]), .par_err(perr[2]));
  hdbist_tblock #(.BUS_W(1), .ADDR(3'd3), .PASS_ACTIVE_LOW(1'b1)) dut3 (
    .clk, .rst_n, .tbus_in(r2), .tbus_out(r3),
    .bist_start(bstart[3]), .bist_done(bdone[3]), .bist_pass(bpass[3]),
    .tsr_ext('1), .tsr_done(tdone[3]), .tsr_good(tgood[3]), .par_err(perr[3]));

  for (genvar i = 1; i <= 3; i++) begin : g_core
    bist_core_model u_core (
      .clk, .rst_n, .bist_start(bstart[i]), .bist_done(bdone[i]),
      .bist_pass(bpass[i]), .latency(lat[i]), .good(good[i]), .starts(starts[i]));
  end

  function automatic logic [10:0] mk(bit op, bit [2:0] sel, bit [2:0] addr, bit val);
    bit p;
    p = op ^ sel[0] ^ sel[1] ^ sel[2] ^ addr[0] ^ addr[1] ^ addr[2];
    return {1'b0, val, p, addr, sel, op, 1'b1};
  endfunction

  // Send a token into the segment and return what comes out of it.
  task automatic xfer(input logic [10:0] t, output logic [10:0] r);
    int n = 0;
    @(negedge clk);
    for (int i = 0; i < 11; i++) begin
      r0 = t[i];
      @(negedge clk);
    end
    r0 = 1'b0;
    while (!r3 && n < 100) begin
      @(negedge clk);
      n++;
    end
    for (int i = 0; i < 11; i++) begin
      r[i] = r3;
      @(negedge clk);
    end
  endtask

  // Read one TSR bit; returns {ack, val}.
  task automatic rd(input bit [2:0] addr, input bit [2:0] sel, output logic [1:0] av);
    logic [10:0] r;
    xfer(mk(1, sel, addr, 1), r);
    av = r[10:9];
  endtask

  task automatic wr_run(input bit [2:0] addr, output logic ack);
    logic [10:0] r;
    xfer(mk(0, 3'd0, addr, 1), r);
    ack = r[10];
  endtask

  // Pulse-width and level observation.
  int pulse_len [4];
  int cur_len [4];
  always @(posedge clk) begin
    for (int i = 1; i <= 3; i++) begin
      if (bstart[i]) cur_len[i]++;
      else if (cur_len[i] != 0) begin
        pulse_len[i] = cur_len[i];
        cur_len[i] = 0;
      end
    end
  end

  logic [1:0] av;
  logic       ack;
  int         polls;

  initial begin
    r0 = 0;
    lat = '{0, 150, 60, 20};
    good[1] = 1; good[2] = 1; good[3] = 1;   // core 3's pin = fail flag: it fails
    for (int i = 0; i < 4; i++) begin pulse_len[i] = 0; cur_len[i] = 0; end
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // After reset: not done, nothing failed.
    for (int a = 1; a <= 3; a++) begin
      rd(3'(a), TSR_DONE, av);
      check(av == 2'b10, $sformatf("addr %0d DONE = 0 after reset", a));
      rd(3'(a), TSR_GOOD, av);
      check(av == 2'b11, $sformatf("addr %0d GOOD = 1 after reset", a));
    end
    rd(3'd1, 3'd2, av);
    check(av == 2'b10, "extra TSR bit 2 of addr 1 = 0");
    rd(3'd1, 3'd3, av);
    check(av == 2'b11, "extra TSR bit 3 of addr 1 = 1");
    rd(3'd4, TSR_DONE, av);
    check(av[1] == 1'b0, "no block at addr 4: no ack");

    // Single-cast RUN to addr 1.
    wr_run(3'd1, ack);
    check(ack, "RUN to addr 1 acknowledged");
    repeat (2) @(negedge clk);
    check(starts[1] == 1 && starts[2] == 0 && starts[3] == 0, "only core 1 started");
    check(pulse_len[1] == 1, "start is a one-cycle pulse");
    rd(3'd1, TSR_DONE, av);
    check(av == 2'b10, "addr 1 DONE = 0 while running");
    polls = 0;
    do begin
      rd(3'd1, TSR_DONE, av);
      polls++;
    end while (av[0] == 1'b0 && polls < 20);
    check(av == 2'b11, "addr 1 DONE = 1 at the end");
    rd(3'd1, TSR_GOOD, av);
    check(av == 2'b11, "addr 1 GOOD = 1 (passed)");

    // Broadcast RUN: cores 2 and 3 start; core 1 starts again as well.
    wr_run(3'd7, ack);
    check(ack, "broadcast RUN acknowledged");
    repeat (3) @(negedge clk);
    check(starts[1] == 2 && starts[2] == 1 && starts[3] == 1, "broadcast started all");
    check(bstart[2] == 1'b1, "level start held while core 2 runs");
    rd(3'd7, TSR_DONE, av);
    check(av == 2'b10, "broadcast DONE = 0 while some run");
    repeat (80) @(negedge clk);
    check(bstart[2] == 1'b0, "level start dropped after done");
    check(pulse_len[2] > 40, "level start lasted the whole test");
    rd(3'd7, TSR_DONE, av);
    check(av == 2'b11, "broadcast DONE = 1 when all done");
    rd(3'd7, TSR_GOOD, av);
    check(av == 2'b10, "broadcast GOOD = 0: one failed");
    rd(3'd2, TSR_GOOD, av);
    check(av == 2'b11, "addr 2 GOOD = 1");
    rd(3'd3, TSR_GOOD, av);
    check(av == 2'b10, "addr 3 GOOD = 0 (active-low fail flag high)");
    check(tgood[3] == 1'b0 && tdone[3] == 1'b1, "addr 3 status outputs");
    check(perr == 3'b000, "no parity errors");

    // Core 3 fixed: a new run clears GOOD back to the new result.
    good[3] = 0;
    wr_run(3'd3, ack);
    repeat (40) @(negedge clk);
    rd(3'd3, TSR_GOOD, av);
    check(av == 2'b11, "addr 3 GOOD = 1 after a passing rerun");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
