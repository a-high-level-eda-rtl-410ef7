// hdbist_tblock: Test Block, the wrapper that puts one BISTed core on the
// Test Chain Bus.
//
// It holds the block's Test Control Register (TCR) and Test Status Register
// (TSR) behind a TBus ring node (hdbist_tbus_node). A token that writes 1 to
// TCR bit 0 (RUN) launches the core's BIST; the TSR then reports DONE = 0
// until the core signals the end of its test, when DONE becomes 1 and GOOD
// takes the core's result. GOOD stays 1 until a test fails, so a block that
// was never tested does not read as faulty. TSR bits 2 and up come from
// tsr_ext; a TBlock in front of a plain core ties them to 1, a TProcessor
// acting as a TBlock puts the GOOD flags of its lower chain there.
//
// BIST access protocol (chosen per block, as the HD-BIST language lets the
// designer describe each core's protocol):
//   START_PULSE = 1: bist_start is a one-cycle pulse;
//                 0: bist_start stays high until the core reports done.
//   PASS_ACTIVE_LOW = 0: bist_pass = 1 means the core passed;
//                     1: the input is a fail flag instead.
// The core must drop bist_done in the clock edge at which it sees
// bist_start, and raise it (with its result valid) when its test ends. The
// block ignores bist_done in the launch cycle for that reason.
//
// TCR/TSR and single-bit access follow the HD-BIST scheme; the register bit
// assignments and the handshake are this design's own.
module hdbist_tblock
  import hdbist_pkg::*;
#(
  parameter int unsigned       BUS_W           = 1,
  parameter logic [ADDR_W-1:0] ADDR            = '0,
  parameter bit                START_PULSE     = 1'b1,
  parameter bit                PASS_ACTIVE_LOW = 1'b0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [BUS_W-1:0]   tbus_in,
  output logic [BUS_W-1:0]   tbus_out,
  // BIST access of the wrapped core.
  output logic               bist_start,
  input  logic               bist_done,
  input  logic               bist_pass,
  // Extra TSR bits (index 2 and up).
  input  logic [EXT_MAX-1:0] tsr_ext,
  // Status, for observation.
  output logic               tsr_done,
  output logic               tsr_good,
  output logic               par_err
);

  typedef enum logic [1:0] {B_IDLE, B_LAUNCH, B_RUN} bstate_e;

  bstate_e          state;
  logic             tcr_run;
  logic             wr_en, wr_val;
  logic [SEL_W-1:0] wr_sel;
  logic             passed;

  hdbist_tbus_node #(.BUS_W(BUS_W), .ADDR(ADDR)) u_node (
    .clk, .rst_n, .tbus_in, .tbus_out,
    .tsr    ({tsr_ext, tsr_good, tsr_done}),
    .wr_en, .wr_sel, .wr_val, .par_err
  );

  assign passed     = bist_pass ^ PASS_ACTIVE_LOW;
  assign bist_start = (state == B_LAUNCH) || (!START_PULSE && state == B_RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= B_IDLE;
      tcr_run  <= 1'b0;
      tsr_done <= 1'b0;
      tsr_good <= 1'b1;
    end else begin
      // A RUN write while a test is in progress is ignored.
      if (wr_en && wr_sel == TCR_RUN && state == B_IDLE) tcr_run <= wr_val;
      case (state)
        B_IDLE: if (tcr_run) begin
          state    <= B_LAUNCH;
          tcr_run  <= 1'b0;
          tsr_done <= 1'b0;
          tsr_good <= 1'b1;
        end
        B_LAUNCH: state <= B_RUN;
        B_RUN: if (bist_done) begin
          state    <= B_IDLE;
          tsr_done <= 1'b1;
          tsr_good <= passed;
        end
        default: state <= B_IDLE;
      endcase
    end
  end

endmodule
