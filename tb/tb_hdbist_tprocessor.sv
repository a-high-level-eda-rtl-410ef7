// tb_hdbist_tprocessor: unit test of the Test Processor.
//
// A top TProcessor runs a 1-bit ring: TBlock at address 0, TBlock at
// address 1, and a lower TProcessor at address 2 whose own ring holds one
// TBlock. Schedule: test all; stop 0; wait 1 2; diagnose. The lower
// processor's schedule is: test all; wait all. The ring back into the top
// processor passes through a testbench cut/corrupt point. Scenarios:
//   S1 all good           -> pass, empty diagnosis
//   S2 block 0 fails      -> stop aborts: no wait, no diagnosis
//   S3 block 1 and lower block 0 fail -> diagnosis logs {1} and {2 -> 0}
//   S4 ring cut           -> token lost, structural fault
//   S5 one ring bit flipped -> returned token rejected, structural fault
// The first token's round trip is checked against the ring latency of
// three nodes of one token time (11 cycles) each.
module tb_hdbist_tprocessor;
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

  localparam prog_t P_TOP = '{
    7: instr_t'{OP_END,  1'b0, 7'b0},
    6: instr_t'{OP_END,  1'b0, 7'b0},
    5: instr_t'{OP_END,  1'b0, 7'b0},
    4: instr_t'{OP_END,  1'b0, 7'b0},
    3: instr_t'{OP_DIAG, 1'b0, 7'b0},
    2: instr_t'{OP_WAIT, 1'b0, 7'b0000110},
    1: instr_t'{OP_STOP, 1'b0, 7'b0000001},
    0: instr_t'{OP_TEST, 1'b1, 7'b0}
  };
  localparam prog_t P_SUB = '{
    7: instr_t'{OP_END,  1'b0, 7'b0},
    6: instr_t'{OP_END,  1'b0, 7'b0},
    5: instr_t'{OP_END,  1'b0, 7'b0},
    4: instr_t'{OP_END,  1'b0, 7'b0},
    3: instr_t'{OP_END,  1'b0, 7'b0},
    2: instr_t'{OP_END,  1'b0, 7'b0},
    1: instr_t'{OP_WAIT, 1'b1, 7'b0},
    0: instr_t'{OP_TEST, 1'b1, 7'b0}
  };

  logic start, done, pass, sfault;
  logic [MAXB-1:0] fmap;
  logic [3:0] dcount;
  diag_entry_t [7:0] dlog;
  logic r_tp_b0, r_b0_b1, r_b1_sub, r_sub_out, r_back;
  logic s_out, s_back;
  logic cut, flip;
  logic [2:0] bstart, bdone, bpass;
  logic       good [3];
  int unsigned lat [3];
  int unsigned starts [3];

  assign r_back = cut ? 1'b0 : (r_sub_out ^ flip);

  hdbist_tprocessor #(
    .N_BLOCKS(3), .BUS_W(1), .IS_TOP(1'b1), .PROG(P_TOP),
    .IS_TP(7'b0000100), .SUB_N({12'd0, 3'd1, 6'd0})
  ) dut (
    .clk, .rst_n, .start, .done, .pass, .struct_fault(sfault), .fail_map(fmap),
    .diag_count(dcount), .diag_log(dlog),
    .tbus_out(r_tp_b0), .tbus_in(r_back), .up_in(1'b0), .up_out()
  );

  hdbist_tblock #(.ADDR(3'd0)) u_b0 (
    .clk, .rst_n, .tbus_in(r_tp_b0), .tbus_out(r_b0_b1),
    .bist_start(bstart[0]), .bist_done(bdone[0]), .bist_pass(bpass[0]),
    .tsr_ext('1), .tsr_done(), .tsr_good(), .par_err());
  hdbist_tblock #(.ADDR(3'd1)) u_b1 (
    .clk, .rst_n, .tbus_in(r_b0_b1), .tbus_out(r_b1_sub),
    .bist_start(bstart[1]), .bist_done(bdone[1]), .bist_pass(bpass[1]),
    .tsr_ext('1), .tsr_done(), .tsr_good(), .par_err());

  hdbist_tprocessor #(
    .N_BLOCKS(1), .BUS_W(1), .IS_TOP(1'b0), .UP_ADDR(3'd2), .PROG(P_SUB),
    .IS_TP('0), .SUB_N('0), .DIAG_DEPTH(1)
  ) u_sub (
    .clk, .rst_n, .start(1'b0), .done(), .pass(), .struct_fault(), .fail_map(),
    .diag_count(), .diag_log(),
    .tbus_out(s_out), .tbus_in(s_back), .up_in(r_b1_sub), .up_out(r_sub_out)
  );

  hdbist_tblock #(.ADDR(3'd0)) u_s0 (
    .clk, .rst_n, .tbus_in(s_out), .tbus_out(s_back),
    .bist_start(bstart[2]), .bist_done(bdone[2]), .bist_pass(bpass[2]),
    .tsr_ext('1), .tsr_done(), .tsr_good(), .par_err());

  for (genvar i = 0; i < 3; i++) begin : g_core
    bist_core_model u_core (
      .clk, .rst_n, .bist_start(bstart[i]), .bist_done(bdone[i]),
      .bist_pass(bpass[i]), .latency(lat[i]), .good(good[i]), .starts(starts[i]));
  end

  // First-token round trip.
  longint unsigned cyc = 0, t_tx = 0, t_rx = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (r_tp_b0 && t_tx == 0) t_tx = cyc;
    if (r_back && t_rx == 0 && t_tx != 0) t_rx = cyc;
  end

  task automatic run_sched(input bit g0, input bit g1, input bit g2);
    int n = 0;
    good[0] = g0; good[1] = g1; good[2] = g2;
    rst_n = 0; start = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    t_tx = 0; t_rx = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done && n < 20000) begin
      @(negedge clk);
      n++;
    end
    check(done, "schedule ended");
  endtask

  initial begin
    cut = 0; flip = 0;
    lat = '{50, 120, 70};

    // S1
    run_sched(1, 1, 1);
    check(pass && !sfault && fmap == '0 && dcount == 0, "S1 all pass");
    check(starts[0] == 1 && starts[1] == 1 && starts[2] == 1, "S1 all tested");
    check(t_rx - t_tx == 33, "S1 round trip = 3 nodes x 11 cycles");
    $display("round trip %0d cycles", t_rx - t_tx);

    // S2
    run_sched(0, 1, 1);
    check(!pass && !sfault && fmap == 7'b0000001, "S2 block 0 recorded");
    check(dcount == 0, "S2 aborted before diagnosis");

    // S3
    run_sched(1, 0, 0);
    check(!pass && !sfault && fmap == 7'b0000110, "S3 blocks 1 and 2 recorded");
    check(dcount == 2, "S3 two diagnosis entries");
    check(dlog[0].addr == 3'd1 && !dlog[0].sub_valid, "S3 entry 0 = block 1");
    check(dlog[1].addr == 3'd2 && dlog[1].sub_valid && dlog[1].sub_addr == 3'd0,
          "S3 entry 1 = lower block 0");

    // S4
    cut = 1;
    run_sched(1, 1, 1);
    cut = 0;
    check(!pass && sfault, "S4 ring cut detected");

    // S5: flip one bit of the first returning token.
    fork
      run_sched(1, 1, 1);
      begin
        repeat (5) @(negedge clk);
        wait (r_sub_out == 1'b1);
        repeat (4) @(negedge clk);
        flip = 1;
        @(negedge clk);
        flip = 0;
      end
    join
    check(!pass && sfault, "S5 corrupted token detected");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
