// hdbist_top: the two-chain HD-BIST example system.
//
// Top chain, run by the top TProcessor: TestProcessor1 (address 0),
// the TBlock of BISTedRAM (address 1) and the TBlock of BISTedCore1
// (address 2). Lower chain, run by TestProcessor1: the TBlock of BISTedRom
// (address 0) and the TBlock of BISTedCore2 (address 1). Addresses follow
// the order in which each chain's topology lists its blocks; the top ring
// runs TProcessor -> BISTedCore1 -> BISTedRAM -> TestProcessor1 -> TProcessor
// (the physical placement of the example), and the lower ring
// TestProcessor1 -> BISTedRom -> BISTedCore2 -> TestProcessor1.
//
// Top-chain schedule:  test RAM Core1; wait Core1; stop RAM;
//                      test TestProcessor1; stop TestProcessor1; diagnose.
// Lower-chain schedule: test all; wait all.
// Both are the package constants TOP_PROG and TP1_PROG; TOP_SCHED lets
// another top-chain schedule be compiled in.
//
// The BISTed cores are outside this design: their BIST ports come out as
// bist_start/bist_done/bist_pass, index 0 = BISTedRAM, 1 = BISTedCore1,
// 2 = BISTedRom, 3 = BISTedCore2. Each core must clear its done flag at the
// clock edge where it sees bist_start and raise it, with its result on
// bist_pass (1 = good), when the test ends.
//
// Use: pulse start; done rises when the schedule ends; pass = 1 when every
// test passed and the ring behaved. fail_map lists failed top-chain blocks,
// diag_log/diag_count the faulty blocks found by the diagnosis, with
// sub_valid = 1 for a block of the lower chain. struct_fault reports a token
// lost or corrupted on either ring (for the lower ring, through
// TestProcessor1's failure).
module hdbist_top
  import hdbist_pkg::*;
#(
  parameter int unsigned BUS_W      = 1,
  parameter int unsigned DIAG_DEPTH = 8,
  // Top-chain schedule; the default is the example's.
  parameter prog_t       TOP_SCHED  = TOP_PROG
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             start,
  output logic                             done,
  output logic                             pass,
  output logic                             struct_fault,
  output logic [MAXB-1:0]                  fail_map,
  output logic [$clog2(DIAG_DEPTH+1)-1:0]  diag_count,
  output diag_entry_t [DIAG_DEPTH-1:0]     diag_log,
  output logic [3:0]                       bist_start,
  input  logic [3:0]                       bist_done,
  input  logic [3:0]                       bist_pass
);

  localparam int unsigned I_RAM = 0, I_CORE1 = 1, I_ROM = 2, I_CORE2 = 3;

  // Top ring segments: tp -> core1 -> ram -> tp1 -> tp.
  logic [BUS_W-1:0] r_tp_core1, r_core1_ram, r_ram_tp1, r_tp1_tp;
  // Lower ring segments: tp1 -> rom -> core2 -> tp1.
  logic [BUS_W-1:0] s_tp1_rom, s_rom_core2, s_core2_tp1;

  hdbist_tprocessor #(
    .N_BLOCKS(3), .BUS_W(BUS_W), .IS_TOP(1'b1), .UP_ADDR('0),
    .PROG(TOP_SCHED),
    .IS_TP(MAXB'(1) << A_TP1),
    .SUB_N({18'd0, 3'd2}),
    .DIAG_DEPTH(DIAG_DEPTH)
  ) u_top_tp (
    .clk, .rst_n, .start, .done, .pass, .struct_fault, .fail_map,
    .diag_count, .diag_log,
    .tbus_out (r_tp_core1),
    .tbus_in  (r_tp1_tp),
    .up_in    ('0),
    .up_out   ()
  );

  hdbist_tblock #(.BUS_W(BUS_W), .ADDR(ADDR_W'(A_CORE1))) u_tb_core1 (
    .clk, .rst_n,
    .tbus_in    (r_tp_core1),
    .tbus_out   (r_core1_ram),
    .bist_start (bist_start[I_CORE1]),
    .bist_done  (bist_done[I_CORE1]),
    .bist_pass  (bist_pass[I_CORE1]),
    .tsr_ext    ('1),
    .tsr_done   (), .tsr_good (), .par_err ()
  );

  hdbist_tblock #(.BUS_W(BUS_W), .ADDR(ADDR_W'(A_RAM))) u_tb_ram (
    .clk, .rst_n,
    .tbus_in    (r_core1_ram),
    .tbus_out   (r_ram_tp1),
    .bist_start (bist_start[I_RAM]),
    .bist_done  (bist_done[I_RAM]),
    .bist_pass  (bist_pass[I_RAM]),
    .tsr_ext    ('1),
    .tsr_done   (), .tsr_good (), .par_err ()
  );

  hdbist_tprocessor #(
    .N_BLOCKS(2), .BUS_W(BUS_W), .IS_TOP(1'b0), .UP_ADDR(ADDR_W'(A_TP1)),
    .PROG(TP1_PROG),
    .IS_TP('0),
    .SUB_N('0),
    .DIAG_DEPTH(1)
  ) u_tp1 (
    .clk, .rst_n,
    .start        (1'b0),
    .done         (), .pass (), .struct_fault (), .fail_map (),
    .diag_count   (), .diag_log (),
    .tbus_out     (s_tp1_rom),
    .tbus_in      (s_core2_tp1),
    .up_in        (r_ram_tp1),
    .up_out       (r_tp1_tp)
  );

  hdbist_tblock #(.BUS_W(BUS_W), .ADDR(ADDR_W'(A_ROM))) u_tb_rom (
    .clk, .rst_n,
    .tbus_in    (s_tp1_rom),
    .tbus_out   (s_rom_core2),
    .bist_start (bist_start[I_ROM]),
    .bist_done  (bist_done[I_ROM]),
    .bist_pass  (bist_pass[I_ROM]),
    .tsr_ext    ('1),
    .tsr_done   (), .tsr_good (), .par_err ()
  );

  hdbist_tblock #(.BUS_W(BUS_W), .ADDR(ADDR_W'(A_CORE2))) u_tb_core2 (
    .clk, .rst_n,
    .tbus_in    (s_rom_core2),
    .tbus_out   (s_core2_tp1),
    .bist_start (bist_start[I_CORE2]),
    .bist_done  (bist_done[I_CORE2]),
    .bist_pass  (bist_pass[I_CORE2]),
    .tsr_ext    ('1),
    .tsr_done   (), .tsr_good (), .par_err ()
  );

endmodule
