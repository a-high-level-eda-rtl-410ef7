// tb_hdbist_top_full: one complete test session of the two-chain example
// system with every parameter of hdbist_top at its default.
//
// All four cores pass in the first session and the schedule must end with
// pass = 1, no failures and an empty diagnosis; the lower chain may start
// only after the RAM test ended (it follows "stop BISTedRAM"). A second
// session has BISTedCore1 fail: "wait" only records it, the schedule goes
// on, and the diagnosis names top-chain address 2.
module tb_hdbist_top_full;
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

  logic              start, done, pass, sfault;
  logic [MAXB-1:0]   fmap;
  logic [3:0]        dcount;
  diag_entry_t [7:0] dlog;
  logic [3:0]        bstart, bdone, bpass;
  int unsigned       lat [4];
  logic [3:0]        good;
  int unsigned       starts [4];

  hdbist_top dut (
    .clk, .rst_n, .start, .done, .pass, .struct_fault(sfault), .fail_map(fmap),
    .diag_count(dcount), .diag_log(dlog),
    .bist_start(bstart), .bist_done(bdone), .bist_pass(bpass)
  );

  for (genvar i = 0; i < 4; i++) begin : g_cores
    bist_core_model u_core (
      .clk, .rst_n, .bist_start(bstart[i]), .bist_done(bdone[i]),
      .bist_pass(bpass[i]), .latency(lat[i]), .good(good[i]), .starts(starts[i]));
  end

  longint unsigned cyc = 0, rom_start = 0, ram_done = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (bstart[2] && rom_start == 0) rom_start = cyc;
    if (bdone[0] && starts[0] != 0 && ram_done == 0) ram_done = cyc;
  end

  task automatic session(input logic [3:0] g);
    int n = 0;
    good = g;
    rst_n = 0; start = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    rom_start = 0; ram_done = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done && n < 20000) begin
      @(negedge clk);
      n++;
    end
    check(done, "schedule ended");
    $display("session took %0d cycles", n);
  endtask

  initial begin
    lat = '{300, 200, 250, 150};

    session(4'b1111);
    check(pass && !sfault && fmap == '0 && dcount == 0, "all pass");
    check(starts[0] == 1 && starts[1] == 1 && starts[2] == 1 && starts[3] == 1,
          "every core tested once");
    check(rom_start > ram_done, "lower chain started after the RAM test ended");

    session(4'b1101);
    check(!pass && !sfault && fmap == 7'b0000100, "Core1 failure recorded");
    check(starts[2] == 1 && starts[3] == 1, "schedule continued after wait");
    check(dcount == 1 && dlog[0].addr == 3'd2 && !dlog[0].sub_valid,
          "diagnosis names BISTedCore1");

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
