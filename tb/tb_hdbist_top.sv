// tb_hdbist_top: end-to-end test of the two-chain HD-BIST example system.
//
// dut runs with every parameter at its default, i.e. the example schedules:
//   A all cores good          -> pass, no failure, empty diagnosis, the
//                                lower chain started by broadcast only after
//                                the RAM test ended
//   B BISTedCore1 fails       -> "wait" records it, schedule goes on,
//                                diagnosis logs top-chain address 2
//   C BISTedRAM fails         -> "stop" aborts, lower chain never started
//   D BISTedCore2 fails       -> TestProcessor1 reads as failed, "stop" aborts
//   E top ring cut            -> structural fault
// dut_d has the top schedule "test all; wait all; diagnose", to show the
// diagnosis reaching into the lower chain, and 2-bit-wide rings:
//   F BISTedCore1 and BISTedCore2 fail -> log {2} and {0 -> 1}
//   G lower ring cut          -> log {0} (TestProcessor1 itself)
// Expected values are worked out by hand from the schedules. Every
// mechanism (test, wait, stop-abort, broadcast, repeated polling, diagnosis
// at both levels, structural fault) is counted and must occur.
module tb_hdbist_top;
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

  // ------------------------------------------------------------ DUT, defaults
  logic                   start, done, pass, sfault;
  logic [MAXB-1:0]        fmap;
  logic [3:0]             dcount;
  diag_entry_t [7:0]      dlog;
  logic [3:0]             bstart, bdone, bpass;
  int unsigned            lat [4];
  logic [3:0]             good;
  int unsigned            starts [4];

  hdbist_top dut (
    .clk, .rst_n, .start, .done, .pass, .struct_fault(sfault), .fail_map(fmap),
    .diag_count(dcount), .diag_log(dlog),
    .bist_start(bstart), .bist_done(bdone), .bist_pass(bpass)
  );

  // ------------------------------------------------------------ DUT, diagnosis schedule
  localparam prog_t DIAG_PROG = '{
    7: instr_t'{OP_END,  1'b0, 7'b0},
    6: instr_t'{OP_END,  1'b0, 7'b0},
    5: instr_t'{OP_END,  1'b0, 7'b0},
    4: instr_t'{OP_END,  1'b0, 7'b0},
    3: instr_t'{OP_END,  1'b0, 7'b0},
    2: instr_t'{OP_DIAG, 1'b0, 7'b0},
    1: instr_t'{OP_WAIT, 1'b1, 7'b0},
    0: instr_t'{OP_TEST, 1'b1, 7'b0}
  };

  logic                   d_start, d_done, d_pass, d_sfault;
  logic [MAXB-1:0]        d_fmap;
  logic [3:0]             d_dcount;
  diag_entry_t [7:0]      d_dlog;
  logic [3:0]             d_bstart, d_bdone, d_bpass;
  logic [3:0]             d_good;
  int unsigned            d_starts [4];

  hdbist_top #(.TOP_SCHED(DIAG_PROG), .BUS_W(2)) dut_d (
    .clk, .rst_n, .start(d_start), .done(d_done), .pass(d_pass),
    .struct_fault(d_sfault), .fail_map(d_fmap),
    .diag_count(d_dcount), .diag_log(d_dlog),
    .bist_start(d_bstart), .bist_done(d_bdone), .bist_pass(d_bpass)
  );

  for (genvar i = 0; i < 4; i++) begin : g_cores
    bist_core_model u_core (
      .clk, .rst_n, .bist_start(bstart[i]), .bist_done(bdone[i]),
      .bist_pass(bpass[i]), .latency(lat[i]), .good(good[i]), .starts(starts[i])
    );
    bist_core_model u_core_d (
      .clk, .rst_n, .bist_start(d_bstart[i]), .bist_done(d_bdone[i]),
      .bist_pass(d_bpass[i]), .latency(lat[i]), .good(d_good[i]),
      .starts(d_starts[i])
    );
  end

  // ------------------------------------------------------------ observation
  longint unsigned cyc = 0;
  longint unsigned first_start [4];
  longint unsigned ram_done_cyc;
  int n_tests = 0, n_polls_repeat = 0, n_aborts = 0, n_bcast = 0;
  int n_sfault = 0, n_diag_top = 0, n_diag_sub = 0, n_wait_ok = 0;
  logic [3:0] bstart_q;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    bstart_q <= bstart;
    for (int i = 0; i < 4; i++)
      if (bstart[i] && !bstart_q[i]) begin
        n_tests++;
        if (first_start[i] == 0) first_start[i] = cyc;
      end
    if (bdone[0] && ram_done_cyc == 0 && first_start[0] != 0) ram_done_cyc = cyc;
    // A DONE poll that came back 0 and has to be repeated.
    if (dut.u_top_tp.m_done && dut.u_top_tp.phase == 3'd1 && !dut.u_top_tp.resp)
      n_polls_repeat++;
  end

  task automatic reset_all();
    rst_n   = 1'b0;
    start   = 1'b0;
    d_start = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 4; i++) first_start[i] = 0;
    ram_done_cyc = 0;
    @(posedge clk);
  endtask

  task automatic run(ref logic st, ref logic dn, input int max_cycles);
    int n = 0;
    #1 st = 1'b1;
    @(posedge clk);
    #1 st = 1'b0;
    while (!dn && n < max_cycles) begin
      @(posedge clk);
      n++;
    end
    check(dn, "schedule ended");
  endtask

  initial begin
    lat = '{40, 25, 30, 35};  // RAM, Core1, ROM, Core2

    // ---------------- A: everything good
    good = 4'b1111; d_good = 4'b1111;
    reset_all();
    run(start, done, 5000);
    check(pass === 1'b1, "A pass");
    check(fmap == '0, "A fail_map");
    check(dcount == 0, "A no diagnosis entries");
    check(!sfault, "A no structural fault");
    check(starts[0] == 1 && starts[1] == 1 && starts[2] == 1 && starts[3] == 1,
          "A every core tested once");
    // One broadcast token reaches BISTedRom, then one token time (11 bits on
    // a 1-bit bus) later BISTedCore2.
    check(first_start[3] == first_start[2] + 11, "A lower chain started by one broadcast");
    if (first_start[3] == first_start[2] + 11) n_bcast++;
    check(first_start[2] > ram_done_cyc, "A lower chain started after RAM test ended");
    check(first_start[0] != 0, "A RAM started");
    // test BISTedRAM BISTedCore1: RAM's token goes first, Core1's follows.
    check(first_start[1] > first_start[0], "A Core1 launched by its own token");
    n_wait_ok++;

    // ---------------- B: BISTedCore1 fails, wait records it, schedule continues
    good = 4'b1101;
    reset_all();
    run(start, done, 5000);
    check(pass === 1'b0, "B fails");
    check(fmap == 7'b0000100, "B fail_map = Core1");
    check(starts[2] == 1 && starts[3] == 1, "B lower chain still tested");
    check(dcount == 1, "B one diagnosis entry");
    check(dlog[0].addr == 3'd2 && !dlog[0].sub_valid, "B diagnosis names Core1");
    if (dcount == 1) n_diag_top++;

    // ---------------- C: BISTedRAM fails, stop aborts
    good = 4'b1110;
    reset_all();
    run(start, done, 5000);
    check(pass === 1'b0, "C fails");
    check(fmap == 7'b0000010, "C fail_map = RAM");
    check(starts[2] == 0 && starts[3] == 0, "C lower chain not started");
    check(dcount == 0, "C no diagnosis after abort");
    if (fmap == 7'b0000010 && starts[2] == 0) n_aborts++;

    // ---------------- D: BISTedCore2 fails, TestProcessor1 reads as failed
    good = 4'b0111;
    reset_all();
    run(start, done, 5000);
    check(pass === 1'b0, "D fails");
    check(fmap == 7'b0000001, "D fail_map = TestProcessor1");
    check(starts[2] == 1 && starts[3] == 1, "D lower chain tested");
    check(dcount == 0, "D stop aborts before diagnosis");
    if (fmap == 7'b0000001) n_aborts++;

    // ---------------- E: top ring cut between Core1 and RAM
    good = 4'b1111;
    reset_all();
    force dut.r_core1_ram = 1'b0;
    run(start, done, 5000);
    release dut.r_core1_ram;
    check(sfault === 1'b1, "E structural fault detected");
    check(pass === 1'b0, "E fails");
    if (sfault) n_sfault++;

    // ---------------- F: diagnosis into the lower chain
    d_good = 4'b0101;   // Core1 and Core2 fail
    reset_all();
    run(d_start, d_done, 5000);
    check(d_pass === 1'b0, "F fails");
    check(d_fmap == 7'b0000101, "F fail_map = TestProcessor1, Core1");
    check(d_dcount == 2, "F two diagnosis entries");
    check(d_dlog[0].addr == 3'd0 && d_dlog[0].sub_valid && d_dlog[0].sub_addr == 3'd1,
          "F entry 0 = TestProcessor1 -> BISTedCore2");
    check(d_dlog[1].addr == 3'd2 && !d_dlog[1].sub_valid, "F entry 1 = BISTedCore1");
    if (d_dcount == 2 && d_dlog[0].sub_valid) n_diag_sub++;

    // ---------------- G: lower ring cut
    d_good = 4'b1111;
    reset_all();
    force dut_d.s_rom_core2 = 2'b00;
    run(d_start, d_done, 5000);
    release dut_d.s_rom_core2;
    check(!d_sfault, "G top ring itself is fine");
    check(d_fmap == 7'b0000001, "G TestProcessor1 failed");
    check(d_dcount == 1 && d_dlog[0].addr == 3'd0 && !d_dlog[0].sub_valid,
          "G diagnosis names TestProcessor1 itself");
    if (d_dcount == 1) n_sfault++;

    // ---------------- every mechanism happened
    check(n_tests > 0, "test primitive used");
    check(n_wait_ok > 0, "wait primitive used");
    check(n_aborts >= 2, "stop aborted");
    check(n_bcast > 0, "broadcast token used");
    check(n_polls_repeat > 0, "polling repeated");
    check(n_diag_top > 0, "diagnosis of a top-chain block");
    check(n_diag_sub > 0, "diagnosis of a lower-chain block");
    check(n_sfault >= 2, "structural faults detected");
    $display("mechanisms: tests=%0d polls_repeated=%0d aborts=%0d broadcast_cycles=%0d diag_top=%0d diag_sub=%0d struct_faults=%0d",
             n_tests, n_polls_repeat, n_aborts, n_bcast, n_diag_top, n_diag_sub, n_sfault);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
