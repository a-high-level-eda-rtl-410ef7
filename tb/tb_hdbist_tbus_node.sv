// tb_hdbist_tbus_node: unit test of one Test Chain Bus ring stage.
//
// Two nodes, both at address 2, one on a 1-bit bus (11 beats per token) and
// one on a 4-bit bus (3 beats), receive the same tokens. Tokens are built
// here bit by bit from the documented layout (start, op, sel[3], addr[3],
// par, val, ack), independent of the design's package. Checked: forwarding
// latency of exactly one token time, ack and val of single-cast and
// broadcast reads, write strobes, tokens for other addresses passing
// untouched, and a parity error being ignored and flagged.
module tb_hdbist_tbus_node;
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

  logic       in1, out1;
  logic [3:0] in4, out4;
  logic [7:0] tsr;
  logic       we1, wv1, pe1, we4, wv4, pe4;
  logic [2:0] ws1, ws4;

  hdbist_tbus_node #(.BUS_W(1), .ADDR(3'd2)) dut1 (
    .clk, .rst_n, .tbus_in(in1), .tbus_out(out1), .tsr,
    .wr_en(we1), .wr_sel(ws1), .wr_val(wv1), .par_err(pe1));
  hdbist_tbus_node #(.BUS_W(4), .ADDR(3'd2)) dut4 (
    .clk, .rst_n, .tbus_in(in4), .tbus_out(out4), .tsr,
    .wr_en(we4), .wr_sel(ws4), .wr_val(wv4), .par_err(pe4));

  function automatic logic [10:0] mk(bit op, bit [2:0] sel, bit [2:0] addr,
                                     bit val, bit ack, bit bad_par);
    bit p;
    p = op ^ sel[0] ^ sel[1] ^ sel[2] ^ addr[0] ^ addr[1] ^ addr[2] ^ bad_par;
    return {ack, val, p, addr, sel, op, 1'b1};
  endfunction

  // ---------------------------------------------------------------- capture
  longint unsigned cyc = 0;
  longint unsigned t_in, t_out1, t_out4;
  logic [10:0] rx1;
  logic [11:0] rx4;
  int  c1 = 0, c4 = 0;
  bit  got1, got4;
  int  nwe1 = 0, nwe4 = 0, npe1 = 0, npe4 = 0;
  logic [2:0] lsel1, lsel4;
  logic lval1, lval4;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (c1 == 0 && out1) begin
      t_out1 = cyc; rx1[0] = out1; c1 = 1;
    end else if (c1 > 0) begin
      rx1[c1] = out1; c1++;
      if (c1 == 11) begin c1 = 0; got1 = 1; end
    end
    if (c4 == 0 && out4[0]) begin
      t_out4 = cyc; rx4[3:0] = out4; c4 = 1;
    end else if (c4 > 0) begin
      rx4[c4*4 +: 4] = out4; c4++;
      if (c4 == 3) begin c4 = 0; got4 = 1; end
    end
    if (we1) begin nwe1++; lsel1 = ws1; lval1 = wv1; end
    if (we4) begin nwe4++; lsel4 = ws4; lval4 = wv4; end
    if (pe1) npe1++;
    if (pe4) npe4++;
  end

  // Send one token on both buses and wait for both to come out.
  task automatic xfer(logic [10:0] t);
    logic [11:0] tp;
    tp = {1'b0, t};
    got1 = 0; got4 = 0;
    @(negedge clk);
    t_in = cyc;
    fork
      for (int i = 0; i < 11; i++) begin
        in1 = t[i];
        @(negedge clk);
      end
      begin
        for (int i = 0; i < 3; i++) begin
          in4 = tp[i*4 +: 4];
          @(negedge clk);
        end
        in4 = '0;
      end
    join
    in1 = 1'b0; in4 = '0;
    repeat (20) @(negedge clk);
  endtask

  task automatic expect_out(logic [10:0] e, string what);
    check(got1 && rx1 == e, {what, " (1-bit bus)"});
    check(got4 && rx4[10:0] == e, {what, " (4-bit bus)"});
  endtask

  initial begin
    in1 = 0; in4 = 0; tsr = 8'b1111_1101; // DONE = 1, GOOD = 0, ext = 1
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // Read DONE of address 2: ack set, val stays 1.
    xfer(mk(1, 3'd0, 3'd2, 1, 0, 0));
    expect_out(mk(1, 3'd0, 3'd2, 1, 1, 0), "read DONE own address");
    check(t_out1 - t_in == 11, "1-bit bus latency = 11 cycles");
    check(t_out4 - t_in == 3, "4-bit bus latency = 3 cycles");
    $display("latency: 1-bit %0d, 4-bit %0d", t_out1 - t_in, t_out4 - t_in);

    // Read GOOD (0) of address 2: val cleared.
    xfer(mk(1, 3'd1, 3'd2, 1, 0, 0));
    expect_out(mk(1, 3'd1, 3'd2, 0, 1, 0), "read GOOD own address");

    // Read for address 5: untouched.
    xfer(mk(1, 3'd1, 3'd5, 1, 0, 0));
    expect_out(mk(1, 3'd1, 3'd5, 1, 0, 0), "read other address");

    // Broadcast read of GOOD with ack already set upstream.
    xfer(mk(1, 3'd1, 3'd7, 1, 1, 0));
    expect_out(mk(1, 3'd1, 3'd7, 0, 1, 0), "broadcast read");

    // Write TCR bit 0 = 1 to own address.
    check(nwe1 == 0 && nwe4 == 0, "no write strobe yet");
    xfer(mk(0, 3'd0, 3'd2, 1, 0, 0));
    expect_out(mk(0, 3'd0, 3'd2, 1, 1, 0), "write own address");
    check(nwe1 == 1 && nwe4 == 1, "one write strobe each");
    check(lsel1 == 0 && lval1 == 1 && lsel4 == 0 && lval4 == 1, "write sel/val");

    // Write to another address: no strobe.
    xfer(mk(0, 3'd0, 3'd3, 1, 0, 0));
    expect_out(mk(0, 3'd0, 3'd3, 1, 0, 0), "write other address");
    check(nwe1 == 1 && nwe4 == 1, "no strobe for other address");

    // Bad parity: forwarded untouched, no strobe, error flagged.
    xfer(mk(0, 3'd0, 3'd2, 1, 0, 1));
    expect_out(mk(0, 3'd0, 3'd2, 1, 0, 1), "bad parity untouched");
    check(nwe1 == 1 && nwe4 == 1, "no strobe on bad parity");
    check(npe1 == 1 && npe4 == 1, "parity error flagged");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
